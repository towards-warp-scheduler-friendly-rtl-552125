// bank_arbiter: grants one bitline access per cycle to a register-file bank.
//
// Requests come from the write-back stage (`wr_req`) and from the operand
// collector units (`rd_req`, one bit per unit). A pending write always wins,
// so results retire without delay; reads are granted round robin among the
// collector units, starting after the unit granted last. Requests must
// already be masked by the caller when the bank cannot take them (bitlines
// held by a T-Write, a register being swapped). Grants are combinational;
// the round-robin pointer moves at the clock edge. The design description
// only names this arbitrator; the write-first, round-robin policy is this
// design's choice.
module bank_arbiter #(
  parameter int unsigned NUM_CU = hc_rf_pkg::RF_NUM_CU,
  localparam int unsigned CUW   = (NUM_CU > 1) ? $clog2(NUM_CU) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              wr_req,
  input  logic [NUM_CU-1:0] rd_req,
  output logic              wr_gnt,
  output logic [NUM_CU-1:0] rd_gnt
);

  logic [CUW-1:0] ptr_q;      // unit with the highest read priority
  logic [CUW-1:0] win;
  logic           win_valid;

  always_comb begin
    win       = '0;
    win_valid = 1'b0;
    for (int unsigned k = 0; k < NUM_CU; k++) begin
      automatic int unsigned c = (32'(ptr_q) + k) % NUM_CU;
      if (!win_valid && rd_req[c]) begin
        win       = CUW'(c);
        win_valid = 1'b1;
      end
    end
  end

  always_comb begin
    wr_gnt = wr_req;
    rd_gnt = '0;
    if (!wr_req && win_valid) rd_gnt[win] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) ptr_q <= '0;
    else if (!wr_req && win_valid) ptr_q <= CUW'((32'(win) + 1) % NUM_CU);
  end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0({wr_gnt, rd_gnt}));

endmodule
