// hc_bank: one register-file bank built from hybrid SRAM/STT-RAM cells.
//
// The bank is a 2D array of hybrid cells. Device row 2i is the SRAM sub-cell
// row of HC row i and device row 2i+1 its STT-RAM sub-cell row. The row
// decoder selects one device row through the one-hot wordline `wl`; the
// parity of the selected row decides the operation:
//   even row, rd_en : S-Read   (data on rdata one cycle later)
//   even row, wr_en : S-Write  (1 cycle)
//   odd row,  rd_en : T-Read   (data on rdata one cycle later)
//   odd row,  wr_en : T-Write  (T_WRITE_CYCLES cycles; the column drivers
//                               latch the data and hold the bitlines, so
//                               wr_busy blocks further bitline accesses)
// The BUE line of an HC row couples its two sub-cells locally and copies the
// SRAM row into the STT-RAM row without touching the bitlines (X-Transfer).
// A BUE line must be held for XFER_CYCLES consecutive cycles for the
// magnetic sub-cells to switch; the copy lands at the clock edge that ends
// the last of those cycles. Reads and writes over the bitlines may proceed
// in parallel with an X-Transfer. The cell operations and the 4x slower
// STT-RAM write follow the design description; the cycle counts, the
// 1-cycle read and the latch-then-hold write are this design's choices.
// The cell arrays have no reset, as in a real memory.
module hc_bank
  import hc_rf_pkg::*;
#(
  parameter int unsigned ROWS           = RF_ROWS,
  parameter int unsigned WIDTH          = RF_WIDTH,
  parameter int unsigned T_WRITE_CYCLES = RF_T_WRITE_CYCLES,
  parameter int unsigned XFER_CYCLES    = RF_XFER_CYCLES,
  localparam int unsigned HC_ROWS       = ROWS / 2,
  localparam int unsigned HW            = $clog2(HC_ROWS),
  localparam int unsigned CW            = $clog2(T_WRITE_CYCLES + XFER_CYCLES + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  // bitline access
  input  logic [ROWS-1:0]    wl,       // one-hot device wordline
  input  logic               rd_en,
  input  logic               wr_en,
  input  logic [WIDTH-1:0]   wdata,
  output logic [WIDTH-1:0]   rdata,
  output logic               rvalid,
  output logic               wr_busy,  // T-Write in progress, bitlines held
  output logic [HW-1:0]      wr_busy_hc,
  // silent transfer
  input  logic [HC_ROWS-1:0] bue,      // one-hot BUE lines
  output logic               xfer_done,
  // operation performed this cycle (for statistics)
  output hc_op_e             op
);

  logic [WIDTH-1:0] sram_q [HC_ROWS];
  logic [WIDTH-1:0] stt_q  [HC_ROWS];

  // ---- decode the wordline ----
  logic            wl_any;
  logic [HW-1:0]   wl_hc;
  logic            wl_odd;
  always_comb begin
    wl_any = |wl;
    wl_hc  = '0;
    wl_odd = 1'b0;
    for (int unsigned r = 0; r < ROWS; r++) begin
      if (wl[r]) begin
        wl_hc  = HW'(r / 2);
        wl_odd = r[0];
      end
    end
  end

  always_comb begin
    op = HC_NOP;
    if (wl_any && !wr_busy) begin
      if (wr_en)      op = wl_odd ? HC_T_WRITE : HC_S_WRITE;
      else if (rd_en) op = wl_odd ? HC_T_READ  : HC_S_READ;
    end
  end

  // ---- T-Write: latched column drivers ----
  logic [WIDTH-1:0] twr_data_q;
  logic [CW-1:0]    twr_cnt_q;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_busy    <= 1'b0;
      wr_busy_hc <= '0;
      twr_cnt_q  <= '0;
    end else if (op == HC_T_WRITE) begin
      wr_busy    <= (T_WRITE_CYCLES > 1);
      wr_busy_hc <= wl_hc;
      twr_cnt_q  <= CW'(1);
    end else if (wr_busy) begin
      twr_cnt_q <= twr_cnt_q + CW'(1);
      if (twr_cnt_q == CW'(T_WRITE_CYCLES - 1)) wr_busy <= 1'b0;
    end
  end
  always_ff @(posedge clk) begin
    if (op == HC_T_WRITE) twr_data_q <= wdata;
  end

  // ---- X-Transfer: per-row hold counter ----
  logic [HW-1:0]  xf_row;
  logic           xf_any;
  logic [HW-1:0]  xf_row_q;
  logic [CW-1:0]  xf_cnt_q;
  logic           xf_commit;
  always_comb begin
    xf_any = |bue;
    xf_row = '0;
    for (int unsigned h = 0; h < HC_ROWS; h++) if (bue[h]) xf_row = HW'(h);
  end
  // consecutive cycles BUE has been held on the same row, this cycle included
  logic [CW-1:0] xf_held;
  assign xf_held   = (xf_any && xf_cnt_q != '0 && xf_row_q == xf_row) ? xf_cnt_q + CW'(1) : CW'(1);
  assign xf_commit = xf_any && (xf_held == CW'(XFER_CYCLES));
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      xf_cnt_q <= '0;
      xf_row_q <= '0;
    end else if (xf_any && !xf_commit) begin
      xf_cnt_q <= xf_held;
      xf_row_q <= xf_row;
    end else begin
      xf_cnt_q <= '0;
    end
  end
  always_ff @(posedge clk) begin
    if (!rst_n) xfer_done <= 1'b0;
    else        xfer_done <= xf_commit;
  end

  // ---- cell arrays ----
  logic twr_commit;
  assign twr_commit = wr_busy ? (twr_cnt_q == CW'(T_WRITE_CYCLES - 1))
                              : (op == HC_T_WRITE && T_WRITE_CYCLES == 1);
  always_ff @(posedge clk) begin
    if (op == HC_S_WRITE) sram_q[wl_hc] <= wdata;
    if (xf_commit)        stt_q[xf_row] <= sram_q[xf_row];
    if (twr_commit)       stt_q[wr_busy ? wr_busy_hc : wl_hc]
                            <= wr_busy ? twr_data_q : wdata;
  end

  // ---- sense amplifiers ----
  always_ff @(posedge clk) begin
    if (!rst_n) rvalid <= 1'b0;
    else        rvalid <= (op == HC_S_READ) || (op == HC_T_READ);
  end
  always_ff @(posedge clk) begin
    if (op == HC_S_READ)      rdata <= sram_q[wl_hc];
    else if (op == HC_T_READ) rdata <= stt_q[wl_hc];
  end

  // ---- rules of use ----
  a_wl_onehot:  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(wl));
  a_bue_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(bue));
  a_no_rw:      assert property (@(posedge clk) disable iff (!rst_n) !(rd_en && wr_en && wl_any));
  a_busy_idle:  assert property (@(posedge clk) disable iff (!rst_n) wr_busy |-> !wl_any);
  // an X-Transfer and a T-Write must not target the same STT-RAM row at once
  // the SRAM row being copied must not be rewritten during its X-Transfer
  a_xf_swr:     assert property (@(posedge clk) disable iff (!rst_n)
                                 (xf_any && op == HC_S_WRITE) |-> (xf_row != wl_hc));
  a_xf_twr:     assert property (@(posedge clk) disable iff (!rst_n)
                                 (xf_any && twr_commit) |-> (xf_row != (wr_busy ? wr_busy_hc : wl_hc)));

endmodule
