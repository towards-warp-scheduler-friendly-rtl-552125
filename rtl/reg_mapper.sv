// reg_mapper: maps an architectural register of a warp to a bank and row.
//
// Registers are laid out in sequentially increasing order: the linear index
// warp * REGS_PER_WARP + reg selects bank (index mod BANKS) and row
// (index div BANKS). With 20 registers per warp, R0..R15 of warp 0 sit in
// row 0 of banks 0..15, R16..R19 in row 1 of banks 0..3, and warp 1 starts
// in row 1 of bank 4. This is the mapping of the design description.
// `valid` is low when the register, warp or resulting row is out of range.
// Purely combinational.
module reg_mapper
  import hc_rf_pkg::*;
#(
  parameter int unsigned BANKS         = RF_BANKS,
  parameter int unsigned ROWS          = RF_ROWS,
  parameter int unsigned MAX_WARPS     = RF_MAX_WARPS,
  parameter int unsigned REGS_PER_WARP = RF_REGS_PER_WARP,
  localparam int unsigned WW           = $clog2(MAX_WARPS),
  localparam int unsigned GW           = $clog2(REGS_PER_WARP),
  localparam int unsigned BW           = $clog2(BANKS),
  localparam int unsigned RW           = $clog2(ROWS)
) (
  input  logic [WW-1:0] warp,
  input  logic [GW-1:0] reg_idx,
  output logic [BW-1:0] bank,
  output logic [RW-1:0] row,
  output logic          valid
);

  localparam int unsigned LW = WW + GW + 1;
  logic [LW-1:0] lin;

  always_comb begin
    lin   = LW'(warp) * LW'(REGS_PER_WARP) + LW'(reg_idx);
    bank  = BW'(lin % LW'(BANKS));
    row   = RW'(lin / LW'(BANKS));
    valid = (32'(warp) < MAX_WARPS) && (32'(reg_idx) < REGS_PER_WARP)
         && (32'(lin / LW'(BANKS)) < ROWS);
  end

endmodule
