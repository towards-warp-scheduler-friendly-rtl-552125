// operand_collector: one operand collector unit (CU).
//
// At issue the unit is allocated one instruction: its warp, destination
// register and up to NUM_SRC source operands, each already mapped to a bank
// and row. The unit then requests its source operands from the banks, one
// request per cycle (so an instruction with two sources needs at least two
// cycles of operand read), lowest slot first. A granted request is marked in
// flight; the bank's data arrives through the crossbar one cycle later with
// the slot number. When every valid slot holds its data, `ready` rises and
// the unit waits for `release` from the dispatch stage, which frees it.
// `pend_*` lists the slots whose data has not yet arrived; the issue logic
// uses it to decide whether a register swap is safe. The one-request-per-
// cycle rule follows the design description; the slot bookkeeping is this
// design's own.
module operand_collector
  import hc_rf_pkg::*;
#(
  parameter int unsigned BANKS         = RF_BANKS,
  parameter int unsigned ROWS          = RF_ROWS,
  parameter int unsigned WIDTH         = RF_WIDTH,
  parameter int unsigned MAX_WARPS     = RF_MAX_WARPS,
  parameter int unsigned REGS_PER_WARP = RF_REGS_PER_WARP,
  parameter int unsigned NUM_SRC       = RF_NUM_SRC,
  localparam int unsigned WW           = $clog2(MAX_WARPS),
  localparam int unsigned GW           = $clog2(REGS_PER_WARP),
  localparam int unsigned BW           = $clog2(BANKS),
  localparam int unsigned RW           = $clog2(ROWS),
  localparam int unsigned SW           = (NUM_SRC > 1) ? $clog2(NUM_SRC) : 1
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // allocation at issue
  input  logic                          alloc,
  input  logic [WW-1:0]                 alloc_warp,
  input  logic [GW-1:0]                 alloc_dst,
  input  logic                          alloc_dst_valid,
  input  logic [NUM_SRC-1:0]            alloc_src_valid,
  input  logic [NUM_SRC-1:0][BW-1:0]    alloc_src_bank,
  input  logic [NUM_SRC-1:0][RW-1:0]    alloc_src_row,
  output logic                          busy,
  // operand read request
  output logic                          req_valid,
  output logic [BW-1:0]                 req_bank,
  output logic [RW-1:0]                 req_row,
  output logic [SW-1:0]                 req_slot,
  input  logic                          req_gnt,
  // operand data from the crossbar
  input  logic                          fill_valid,
  input  logic [SW-1:0]                 fill_slot,
  input  logic [WIDTH-1:0]              fill_data,
  // reads not yet completed
  output logic [NUM_SRC-1:0]            pend_valid,
  output logic [NUM_SRC-1:0][BW-1:0]    pend_bank,
  output logic [NUM_SRC-1:0][RW-1:0]    pend_row,
  // collected instruction
  output logic                          ready,
  input  logic                          release_cu,
  output logic [WW-1:0]                 warp,
  output logic [GW-1:0]                 dst,
  output logic                          dst_valid,
  output logic [NUM_SRC-1:0][WIDTH-1:0] opnd
);

  logic [NUM_SRC-1:0] need_q;   // valid, not yet requested
  logic [NUM_SRC-1:0] wait_q;   // valid, data not yet arrived
  logic [NUM_SRC-1:0][BW-1:0] alloc_src_bank_q;
  logic [NUM_SRC-1:0][RW-1:0] alloc_src_row_q;

  assign pend_valid = wait_q;
  assign pend_bank  = alloc_src_bank_q;
  assign pend_row   = alloc_src_row_q;

  always_comb begin
    req_valid = 1'b0;
    req_slot  = '0;
    for (int s = NUM_SRC - 1; s >= 0; s--) begin
      if (need_q[s]) begin
        req_valid = 1'b1;
        req_slot  = SW'(s);
      end
    end
    req_bank = alloc_src_bank_q[req_slot];
    req_row  = alloc_src_row_q[req_slot];
  end

  assign ready = busy && (wait_q == '0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      need_q <= '0;
      wait_q <= '0;
    end else if (alloc) begin
      busy   <= 1'b1;
      need_q <= alloc_src_valid;
      wait_q <= alloc_src_valid;
    end else begin
      if (release_cu) busy <= 1'b0;
      if (req_valid && req_gnt) need_q[req_slot] <= 1'b0;
      if (fill_valid)           wait_q[fill_slot] <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (alloc) begin
      warp             <= alloc_warp;
      dst              <= alloc_dst;
      dst_valid        <= alloc_dst_valid;
      alloc_src_bank_q <= alloc_src_bank;
      alloc_src_row_q  <= alloc_src_row;
    end
    if (fill_valid) opnd[fill_slot] <= fill_data;
  end

  a_alloc_free:  assert property (@(posedge clk) disable iff (!rst_n) alloc |-> !busy);
  a_release_rdy: assert property (@(posedge clk) disable iff (!rst_n) release_cu |-> ready);
  a_fill_wait:   assert property (@(posedge clk) disable iff (!rst_n) fill_valid |-> wait_q[fill_slot]);

endmodule
