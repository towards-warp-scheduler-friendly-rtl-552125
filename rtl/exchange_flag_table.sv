// exchange_flag_table: the per-bank table of exchange flags.
//
// One flag per HC row (two device rows). A set flag means the two registers
// mapped to that HC row have swapped places: the register whose row address
// is even now lives in the STT-RAM sub-cells and the odd one in the SRAM
// sub-cells. The table has the two ports of the design description:
//   R port (read)       : R-check of the register being read or written,
//   X port (read/write) : X-check of an issued instruction's target register,
//                         and the flip of the flag when an X-Transfer ends.
// Reads are combinational; a flip takes effect at the next clock edge. All
// flags clear at reset (every register starts at its default location).
// One flag per HC row and the two ports follow the design description; the
// reset value and the combinational reads are this design's choices.
module exchange_flag_table #(
  parameter int unsigned HC_ROWS = hc_rf_pkg::RF_ROWS / 2,
  localparam int unsigned HW     = $clog2(HC_ROWS)
) (
  input  logic          clk,
  input  logic          rst_n,
  // R-check port
  input  logic [HW-1:0] r_addr,
  output logic          r_flag,
  // X-check port
  input  logic [HW-1:0] x_addr,
  output logic          x_flag,
  input  logic          x_flip
);

  logic [HC_ROWS-1:0] flag_q;

  assign r_flag = flag_q[r_addr];
  assign x_flag = flag_q[x_addr];

  always_ff @(posedge clk) begin
    if (!rst_n)      flag_q <= '0;
    else if (x_flip) flag_q[x_addr] <= ~flag_q[x_addr];
  end

endmodule
