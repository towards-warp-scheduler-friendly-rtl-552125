// rf_crossbar: interconnect between the register-file banks and the operand
// collector units.
//
// Request side: each collector unit presents at most one read request with
// its target bank; the crossbar sorts them into one request vector per bank
// for that bank's arbiter. Return side: a bank that performed a read
// presents its data one cycle later together with the tag of the unit and
// operand slot it was granted to; the crossbar delivers the data to that
// unit. Since a unit has at most one read in flight per cycle, at most one
// bank returns to a given unit in any cycle. Purely combinational. The
// crossbar between banks and collector units is part of the described
// register file; the tag scheme and one-cycle return are this design's own.
module rf_crossbar #(
  parameter int unsigned BANKS   = hc_rf_pkg::RF_BANKS,
  parameter int unsigned NUM_CU  = hc_rf_pkg::RF_NUM_CU,
  parameter int unsigned NUM_SRC = hc_rf_pkg::RF_NUM_SRC,
  parameter int unsigned WIDTH   = hc_rf_pkg::RF_WIDTH,
  localparam int unsigned BW     = $clog2(BANKS),
  localparam int unsigned CUW    = (NUM_CU > 1) ? $clog2(NUM_CU) : 1,
  localparam int unsigned SW     = (NUM_SRC > 1) ? $clog2(NUM_SRC) : 1
) (
  // request side
  input  logic [NUM_CU-1:0]            cu_req_valid,
  input  logic [NUM_CU-1:0][BW-1:0]    cu_req_bank,
  output logic [BANKS-1:0][NUM_CU-1:0] bank_rd_req,
  // return side
  input  logic [BANKS-1:0]             bank_rvalid,
  input  logic [BANKS-1:0][WIDTH-1:0]  bank_rdata,
  input  logic [BANKS-1:0][CUW-1:0]    bank_tag_cu,
  input  logic [BANKS-1:0][SW-1:0]     bank_tag_slot,
  output logic [NUM_CU-1:0]            fill_valid,
  output logic [NUM_CU-1:0][SW-1:0]    fill_slot,
  output logic [NUM_CU-1:0][WIDTH-1:0] fill_data
);

  always_comb begin
    for (int unsigned b = 0; b < BANKS; b++)
      for (int unsigned c = 0; c < NUM_CU; c++)
        bank_rd_req[b][c] = cu_req_valid[c] && (32'(cu_req_bank[c]) == b);
  end

  always_comb begin
    fill_valid = '0;
    fill_slot  = '0;
    fill_data  = '0;
    for (int unsigned c = 0; c < NUM_CU; c++)
      for (int unsigned b = 0; b < BANKS; b++)
        if (bank_rvalid[b] && (32'(bank_tag_cu[b]) == c)) begin
          fill_valid[c] = 1'b1;
          fill_slot[c]  = bank_tag_slot[b];
          fill_data[c]  = bank_rdata[b];
        end
  end

endmodule
