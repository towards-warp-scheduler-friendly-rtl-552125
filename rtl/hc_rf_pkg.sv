// hc_rf_pkg: shared constants and types of the hybrid-cell GPU register file.
//
// The register file of one streaming multiprocessor holds 128 KB in 16 banks.
// Each bank is 64 device rows of 1024 bits (one 32-bit register for each of
// the 32 threads of a warp). Two neighbouring device rows form one hybrid-cell
// (HC) row: the even row is built from SRAM sub-cells, the odd row from
// STT-RAM sub-cells. The STT-RAM write is about four times slower than the
// SRAM write. These numbers follow the design description; the number of
// operand collector units and the X-Transfer duration are this design's own
// choices.
package hc_rf_pkg;

  // Register file organisation
  localparam int unsigned RF_BANKS         = 16;
  localparam int unsigned RF_ROWS          = 64;     // device rows per bank
  localparam int unsigned RF_THREADS       = 32;     // threads per warp
  localparam int unsigned RF_WIDTH         = RF_THREADS * 32;  // 1024 bits
  localparam int unsigned RF_MAX_WARPS     = 48;
  localparam int unsigned RF_REGS_PER_WARP = 20;

  // Timing, in core clock cycles
  localparam int unsigned RF_T_WRITE_CYCLES = 4;     // T-Write vs 1-cycle S-Write
  localparam int unsigned RF_XFER_CYCLES    = 4;     // silent SRAM -> STT-RAM copy

  // Operand collection
  localparam int unsigned RF_NUM_CU  = 4;
  localparam int unsigned RF_NUM_SRC = 2;

  // Bitline operation of a bank in one cycle (Table of basic HC operations).
  typedef enum logic [2:0] {
    HC_NOP     = 3'd0,
    HC_S_READ  = 3'd1,
    HC_S_WRITE = 3'd2,
    HC_T_READ  = 3'd3,
    HC_T_WRITE = 3'd4
  } hc_op_e;

  // Outcome of the exchange flag check made at issue.
  typedef enum logic [1:0] {
    XCHK_NONE    = 2'd0,  // no check this cycle
    XCHK_SRAM    = 2'd1,  // target already lives in SRAM s-cells
    XCHK_STARTED = 2'd2,  // X-Transfer started, write-back will be an S-Write
    XCHK_REFUSED = 2'd3   // target in STT-RAM but not safe to remap
  } xchk_result_e;

endpackage
