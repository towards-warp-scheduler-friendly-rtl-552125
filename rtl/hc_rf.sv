// hc_rf: register file of one GPU streaming multiprocessor built from hybrid
// SRAM/STT-RAM cells, with on-demand register remapping at issue.
//
// Structure: BANKS banks (hc_bank), each driven by its own row decoder with
// exchange flag check (efc_decoder) and arbiter (bank_arbiter); a crossbar
// (rf_crossbar) between the banks and NUM_CU operand collector units
// (operand_collector); a dispatch multiplexer (dispatch_mux) towards the
// SIMD lanes; and register mappers (reg_mapper) that turn (warp, register)
// into (bank, row).
//
// Operation:
//  * Issue (iss_*): an instruction enters a free collector unit. In the same
//    cycle its destination register is X-checked in its bank. If it lives in
//    STT-RAM sub-cells and the swap is safe, a silent X-Transfer copies the
//    partner register of the HC row from SRAM to STT-RAM and the exchange
//    flag flips, so the later write-back becomes a 1-cycle S-Write instead of
//    a T-Write that holds the bank for T_WRITE_CYCLES. "Safe" means: no
//    collector unit (the new one included) still waits for a read of that HC
//    row, no write-back to it is waiting, no T-Write to it is in progress and
//    the bank's swap buffer is free. Otherwise the check is refused and the
//    write-back later goes to STT-RAM.
//  * Operand read: collector units request one operand per cycle; the bank's
//    arbiter grants one access per cycle, write-back first. Reads are
//    decoded to the SRAM or STT-RAM row by row[0] XOR the exchange flag and
//    return one cycle later through the crossbar.
//  * Dispatch (disp_*): a unit with all operands is sent to execution with a
//    valid/ready handshake and freed.
//  * Write-back (wb_*): valid/ready; wb_ready rises in the cycle the bank
//    accepts the write.
// Bank accesses are held back while the bank's bitlines are occupied by a
// T-Write, writes to an HC row are held while that row is being swapped, and
// reads of the register being overwritten by the swap are held until the
// swap ends. Reads of the partner register run in parallel with the
// X-Transfer.
// Contract with the issue stage (the scoreboard of the baseline pipeline):
// an instruction must not be issued while an older instruction that writes
// one of its source or destination registers has not written back, and every
// register must be written before it is read.
// The ev_* outputs pulse per bank on each cell operation and X-check outcome.
// REMAP = 0 turns the X-check off: every register then keeps its static
// location (even rows in SRAM, odd rows in STT-RAM), the simple mapping the
// on-demand scheme improves on; it exists for comparison.
// The bank organisation, register mapping, XOR location rule, issue-time
// X-check and non-blocking transfer follow the design description; the
// arbitration policies, the number of collector units, the single-entry swap
// buffer and the exact conflict rules are this design's own.
module hc_rf
  import hc_rf_pkg::*;
#(
  parameter int unsigned BANKS          = RF_BANKS,
  parameter int unsigned ROWS           = RF_ROWS,
  parameter int unsigned WIDTH          = RF_WIDTH,
  parameter int unsigned MAX_WARPS      = RF_MAX_WARPS,
  parameter int unsigned REGS_PER_WARP  = RF_REGS_PER_WARP,
  parameter int unsigned NUM_CU         = RF_NUM_CU,
  parameter int unsigned NUM_SRC        = RF_NUM_SRC,
  parameter int unsigned T_WRITE_CYCLES = RF_T_WRITE_CYCLES,
  parameter int unsigned XFER_CYCLES    = RF_XFER_CYCLES,
  parameter bit          REMAP          = 1'b1,
  localparam int unsigned WW            = $clog2(MAX_WARPS),
  localparam int unsigned GW            = $clog2(REGS_PER_WARP),
  localparam int unsigned BW            = $clog2(BANKS),
  localparam int unsigned RW            = $clog2(ROWS),
  localparam int unsigned HW            = RW - 1,
  localparam int unsigned HC_ROWS       = ROWS / 2,
  localparam int unsigned CUW           = (NUM_CU > 1) ? $clog2(NUM_CU) : 1,
  localparam int unsigned SW            = (NUM_SRC > 1) ? $clog2(NUM_SRC) : 1
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // issue
  input  logic                          iss_valid,
  output logic                          iss_ready,
  input  logic [WW-1:0]                 iss_warp,
  input  logic [GW-1:0]                 iss_dst,
  input  logic                          iss_dst_valid,
  input  logic [NUM_SRC-1:0][GW-1:0]    iss_src,
  input  logic [NUM_SRC-1:0]            iss_src_valid,
  // dispatch to execution
  output logic                          disp_valid,
  input  logic                          disp_ready,
  output logic [WW-1:0]                 disp_warp,
  output logic [GW-1:0]                 disp_dst,
  output logic                          disp_dst_valid,
  output logic [NUM_SRC-1:0][WIDTH-1:0] disp_opnd,
  // write-back
  input  logic                          wb_valid,
  output logic                          wb_ready,
  input  logic [WW-1:0]                 wb_warp,
  input  logic [GW-1:0]                 wb_reg,
  input  logic [WIDTH-1:0]              wb_data,
  // events and status
  output logic [BANKS-1:0]              ev_s_read,
  output logic [BANKS-1:0]              ev_t_read,
  output logic [BANKS-1:0]              ev_s_write,
  output logic [BANKS-1:0]              ev_t_write,
  output logic [BANKS-1:0]              ev_xfer_start,
  output logic [BANKS-1:0]              ev_xfer_done,
  output xchk_result_e                  ev_xchk,
  output logic [BANKS-1:0]              swap_busy
);

  // ------------------------------------------------------------------
  // Register mapping
  // ------------------------------------------------------------------
  logic [BW-1:0]              dst_bank, wb_bank;
  logic [RW-1:0]              dst_row,  wb_row;
  logic                       dst_map_ok, wb_map_ok;
  logic [NUM_SRC-1:0][BW-1:0] src_bank;
  logic [NUM_SRC-1:0][RW-1:0] src_row;
  logic [NUM_SRC-1:0]         src_map_ok;

  reg_mapper #(.BANKS(BANKS), .ROWS(ROWS), .MAX_WARPS(MAX_WARPS), .REGS_PER_WARP(REGS_PER_WARP))
    u_map_dst (.warp(iss_warp), .reg_idx(iss_dst), .bank(dst_bank), .row(dst_row), .valid(dst_map_ok));
  reg_mapper #(.BANKS(BANKS), .ROWS(ROWS), .MAX_WARPS(MAX_WARPS), .REGS_PER_WARP(REGS_PER_WARP))
    u_map_wb (.warp(wb_warp), .reg_idx(wb_reg), .bank(wb_bank), .row(wb_row), .valid(wb_map_ok));
  for (genvar s = 0; s < NUM_SRC; s++) begin : g_map_src
    reg_mapper #(.BANKS(BANKS), .ROWS(ROWS), .MAX_WARPS(MAX_WARPS), .REGS_PER_WARP(REGS_PER_WARP))
      u_map_src (.warp(iss_warp), .reg_idx(iss_src[s]), .bank(src_bank[s]), .row(src_row[s]),
                 .valid(src_map_ok[s]));
  end

  // ------------------------------------------------------------------
  // Collector unit allocation
  // ------------------------------------------------------------------
  logic [NUM_CU-1:0] cu_busy, cu_alloc;
  logic [CUW-1:0]    free_idx;
  logic              any_free;
  always_comb begin
    free_idx = '0;
    any_free = 1'b0;
    for (int c = NUM_CU - 1; c >= 0; c--) begin
      if (!cu_busy[c]) begin
        free_idx = CUW'(c);
        any_free = 1'b1;
      end
    end
  end
  assign iss_ready = any_free;
  logic issue;
  assign issue = iss_valid && iss_ready;
  always_comb begin
    cu_alloc = '0;
    if (issue) cu_alloc[free_idx] = 1'b1;
  end

  // ------------------------------------------------------------------
  // Collector units
  // ------------------------------------------------------------------
  logic [NUM_CU-1:0]                        cu_req_valid, cu_req_gnt, cu_ready, cu_release;
  logic [NUM_CU-1:0][BW-1:0]                cu_req_bank;
  logic [NUM_CU-1:0][RW-1:0]                cu_req_row;
  logic [NUM_CU-1:0][SW-1:0]                cu_req_slot;
  logic [NUM_CU-1:0]                        cu_fill_valid;
  logic [NUM_CU-1:0][SW-1:0]                cu_fill_slot;
  logic [NUM_CU-1:0][WIDTH-1:0]             cu_fill_data;
  logic [NUM_CU-1:0][NUM_SRC-1:0]           cu_pend_valid;
  logic [NUM_CU-1:0][NUM_SRC-1:0][BW-1:0]   cu_pend_bank;
  logic [NUM_CU-1:0][NUM_SRC-1:0][RW-1:0]   cu_pend_row;
  logic [NUM_CU-1:0][WW-1:0]                cu_warp;
  logic [NUM_CU-1:0][GW-1:0]                cu_dst;
  logic [NUM_CU-1:0]                        cu_dst_valid;
  logic [NUM_CU-1:0][NUM_SRC-1:0][WIDTH-1:0] cu_opnd;

  for (genvar c = 0; c < NUM_CU; c++) begin : g_cu
    operand_collector #(
      .BANKS(BANKS), .ROWS(ROWS), .WIDTH(WIDTH), .MAX_WARPS(MAX_WARPS),
      .REGS_PER_WARP(REGS_PER_WARP), .NUM_SRC(NUM_SRC)
    ) u_cu (
      .clk             (clk),
      .rst_n           (rst_n),
      .alloc           (cu_alloc[c]),
      .alloc_warp      (iss_warp),
      .alloc_dst       (iss_dst),
      .alloc_dst_valid (iss_dst_valid),
      .alloc_src_valid (iss_src_valid),
      .alloc_src_bank  (src_bank),
      .alloc_src_row   (src_row),
      .busy            (cu_busy[c]),
      .req_valid       (cu_req_valid[c]),
      .req_bank        (cu_req_bank[c]),
      .req_row         (cu_req_row[c]),
      .req_slot        (cu_req_slot[c]),
      .req_gnt         (cu_req_gnt[c]),
      .fill_valid      (cu_fill_valid[c]),
      .fill_slot       (cu_fill_slot[c]),
      .fill_data       (cu_fill_data[c]),
      .pend_valid      (cu_pend_valid[c]),
      .pend_bank       (cu_pend_bank[c]),
      .pend_row        (cu_pend_row[c]),
      .ready           (cu_ready[c]),
      .release_cu      (cu_release[c]),
      .warp            (cu_warp[c]),
      .dst             (cu_dst[c]),
      .dst_valid       (cu_dst_valid[c]),
      .opnd            (cu_opnd[c])
    );
  end

  // ------------------------------------------------------------------
  // Crossbar
  // ------------------------------------------------------------------
  logic [BANKS-1:0][NUM_CU-1:0] bank_rd_req;
  logic [BANKS-1:0]             bank_rvalid;
  logic [BANKS-1:0][WIDTH-1:0]  bank_rdata;
  logic [BANKS-1:0][CUW-1:0]    bank_tag_cu;
  logic [BANKS-1:0][SW-1:0]     bank_tag_slot;

  rf_crossbar #(.BANKS(BANKS), .NUM_CU(NUM_CU), .NUM_SRC(NUM_SRC), .WIDTH(WIDTH)) u_xbar (
    .cu_req_valid  (cu_req_valid),
    .cu_req_bank   (cu_req_bank),
    .bank_rd_req   (bank_rd_req),
    .bank_rvalid   (bank_rvalid),
    .bank_rdata    (bank_rdata),
    .bank_tag_cu   (bank_tag_cu),
    .bank_tag_slot (bank_tag_slot),
    .fill_valid    (cu_fill_valid),
    .fill_slot     (cu_fill_slot),
    .fill_data     (cu_fill_data)
  );

  // ------------------------------------------------------------------
  // Issue-time X-check conflict detection
  // ------------------------------------------------------------------
  logic [BANKS-1:0]          wr_busy;
  logic [BANKS-1:0][HW-1:0]  wr_busy_hc;
  logic [BANKS-1:0][RW-1:0]  swap_row;
  logic                      xchk_conflict;

  always_comb begin
    xchk_conflict = 1'b0;
    // reads still outstanding in collector units
    for (int c = 0; c < NUM_CU; c++)
      for (int s = 0; s < NUM_SRC; s++)
        if (cu_pend_valid[c][s] && cu_pend_bank[c][s] == dst_bank &&
            cu_pend_row[c][s][RW-1:1] == dst_row[RW-1:1])
          xchk_conflict = 1'b1;
    // the issuing instruction's own source operands
    for (int s = 0; s < NUM_SRC; s++)
      if (iss_src_valid[s] && src_bank[s] == dst_bank && src_row[s][RW-1:1] == dst_row[RW-1:1])
        xchk_conflict = 1'b1;
    // a waiting write-back
    if (wb_valid && wb_bank == dst_bank && wb_row[RW-1:1] == dst_row[RW-1:1])
      xchk_conflict = 1'b1;
    // a T-Write in progress on the same HC row
    if (wr_busy[dst_bank] && wr_busy_hc[dst_bank] == dst_row[RW-1:1])
      xchk_conflict = 1'b1;
  end

  // ------------------------------------------------------------------
  // Banks
  // ------------------------------------------------------------------
  xchk_result_e [BANKS-1:0] xchk_res;
  logic [BANKS-1:0]         bank_wr_gnt;
  logic [BANKS-1:0][NUM_CU-1:0] bank_rd_gnt;

  for (genvar b = 0; b < BANKS; b++) begin : g_bank
    logic              wr_req;
    logic [NUM_CU-1:0] rd_req;
    logic              acc_en;
    logic [RW-1:0]     acc_row;
    logic              acc_stt;
    logic [ROWS-1:0]   wl;
    logic [HC_ROWS-1:0] bue;
    logic              xfer_done;
    hc_op_e            op;
    logic [CUW-1:0]    gnt_cu;
    logic [SW-1:0]     gnt_slot;

    // requests the bank can take this cycle
    assign wr_req = wb_valid && wb_map_ok && (32'(wb_bank) == b) && !wr_busy[b] &&
                    !(swap_busy[b] && swap_row[b][RW-1:1] == wb_row[RW-1:1]);
    always_comb begin
      for (int c = 0; c < NUM_CU; c++)
        rd_req[c] = bank_rd_req[b][c] && !wr_busy[b] &&
                    !(swap_busy[b] && swap_row[b] == cu_req_row[c]);
    end

    bank_arbiter #(.NUM_CU(NUM_CU)) u_arb (
      .clk    (clk),
      .rst_n  (rst_n),
      .wr_req (wr_req),
      .rd_req (rd_req),
      .wr_gnt (bank_wr_gnt[b]),
      .rd_gnt (bank_rd_gnt[b])
    );

    always_comb begin
      gnt_cu   = '0;
      gnt_slot = '0;
      acc_row  = wb_row;
      for (int c = 0; c < NUM_CU; c++)
        if (bank_rd_gnt[b][c]) begin
          gnt_cu   = CUW'(c);
          gnt_slot = cu_req_slot[c];
          acc_row  = cu_req_row[c];
        end
      if (bank_wr_gnt[b]) acc_row = wb_row;
    end
    assign acc_en = bank_wr_gnt[b] || (|bank_rd_gnt[b]);

    efc_decoder #(.ROWS(ROWS), .XFER_CYCLES(XFER_CYCLES)) u_efc (
      .clk           (clk),
      .rst_n         (rst_n),
      .acc_en        (acc_en),
      .acc_row       (acc_row),
      .wl            (wl),
      .acc_stt       (acc_stt),
      .xchk_valid    (REMAP && issue && iss_dst_valid && dst_map_ok && (32'(dst_bank) == b)),
      .xchk_row      (dst_row),
      .xchk_conflict (xchk_conflict),
      .xchk_result   (xchk_res[b]),
      .bue           (bue),
      .swap_busy     (swap_busy[b]),
      .swap_row      (swap_row[b]),
      .swap_done     (ev_xfer_done[b])
    );

    hc_bank #(
      .ROWS(ROWS), .WIDTH(WIDTH), .T_WRITE_CYCLES(T_WRITE_CYCLES), .XFER_CYCLES(XFER_CYCLES)
    ) u_bank (
      .clk        (clk),
      .rst_n      (rst_n),
      .wl         (wl),
      .rd_en      (|bank_rd_gnt[b]),
      .wr_en      (bank_wr_gnt[b]),
      .wdata      (wb_data),
      .rdata      (bank_rdata[b]),
      .rvalid     (bank_rvalid[b]),
      .wr_busy    (wr_busy[b]),
      .wr_busy_hc (wr_busy_hc[b]),
      .bue        (bue),
      .xfer_done  (xfer_done),
      .op         (op)
    );

    // read tags travel with the data through the bank's one-cycle read
    always_ff @(posedge clk) begin
      if (|bank_rd_gnt[b]) begin
        bank_tag_cu[b]   <= gnt_cu;
        bank_tag_slot[b] <= gnt_slot;
      end
    end

    assign ev_s_read[b]     = (op == HC_S_READ);
    assign ev_t_read[b]     = (op == HC_T_READ);
    assign ev_s_write[b]    = (op == HC_S_WRITE);
    assign ev_t_write[b]    = (op == HC_T_WRITE);
    assign ev_xfer_start[b] = (xchk_res[b] == XCHK_STARTED);

    // the decoder's timer and the cells' switching time agree
    a_xfer_sync: assert property (@(posedge clk) disable iff (!rst_n)
                                  ev_xfer_done[b] |=> xfer_done);
    // the decoder's location and the bank's operation agree
    a_loc: assert property (@(posedge clk) disable iff (!rst_n)
                            (op != HC_NOP) |-> (acc_stt == (op == HC_T_READ || op == HC_T_WRITE)));
  end

  always_comb begin
    ev_xchk = XCHK_NONE;
    for (int b = 0; b < BANKS; b++)
      if (xchk_res[b] != XCHK_NONE) ev_xchk = xchk_res[b];
  end

  always_comb begin
    cu_req_gnt = '0;
    for (int b = 0; b < BANKS; b++) cu_req_gnt |= bank_rd_gnt[b];
  end

  assign wb_ready = |bank_wr_gnt;

  // ------------------------------------------------------------------
  // Dispatch
  // ------------------------------------------------------------------
  logic [CUW-1:0]    disp_idx;
  dispatch_mux #(.NUM_CU(NUM_CU)) u_disp (
    .clk        (clk),
    .rst_n      (rst_n),
    .cu_ready   (cu_ready),
    .sel        (),
    .sel_idx    (disp_idx),
    .disp_valid (disp_valid),
    .disp_ready (disp_ready),
    .release_cu (cu_release)
  );
  assign disp_warp      = cu_warp[disp_idx];
  assign disp_dst       = cu_dst[disp_idx];
  assign disp_dst_valid = cu_dst_valid[disp_idx];
  assign disp_opnd      = cu_opnd[disp_idx];

  a_map_wb:  assert property (@(posedge clk) disable iff (!rst_n) wb_valid |-> wb_map_ok);
  a_map_iss: assert property (@(posedge clk) disable iff (!rst_n)
                              iss_valid |-> (dst_map_ok || !iss_dst_valid) &&
                                            ((src_map_ok | ~iss_src_valid) == '1));

endmodule
