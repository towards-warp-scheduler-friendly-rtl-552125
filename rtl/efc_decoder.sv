// efc_decoder: row decoder of one bank, extended with the exchange flag check.
//
// Two decoders work on two addresses in the same cycle:
//  * Access (R-check): the row address of the register being read or written.
//    Its location bit is row[0] XOR the HC row's exchange flag: 0 selects the
//    SRAM device row 2i, 1 the STT-RAM device row 2i+1. The one-hot wordline
//    `wl` drives the bank; `acc_stt` tells whether the access is a T-Read or
//    T-Write.
//  * X-check: the destination register of an instruction at issue. If its
//    location bit is 1 (it lives in STT-RAM), the caller reports no
//    conflicting access (`xchk_conflict` low) and no transfer is running in
//    this bank, the decoder stores the row address in its data swap address
//    buffer and raises the HC row's BUE line for XFER_CYCLES cycles. This
//    copies the partner register from SRAM to STT-RAM in the background. In
//    the last of those cycles it flips the exchange flag, so from the next
//    cycle on the target register maps to the SRAM sub-cells and its
//    write-back is a fast S-Write.
// `swap_busy` and `swap_row` expose the swap address buffer: the caller
// compares them with its access addresses, holds back writes to an HC row
// while it is being swapped, and holds back reads of the register whose
// STT-RAM copy is being overwritten (the row address in `swap_row`).
// The swap buffer holds one entry: a second X-check in the same bank while a
// transfer runs is refused and its write-back goes to STT-RAM. The XOR
// location rule, the two table ports, BUE and the flag flip follow the design
// description; the single-entry buffer and the refusal policy are this
// design's choices.
module efc_decoder
  import hc_rf_pkg::*;
#(
  parameter int unsigned ROWS        = RF_ROWS,
  parameter int unsigned XFER_CYCLES = RF_XFER_CYCLES,
  localparam int unsigned HC_ROWS    = ROWS / 2,
  localparam int unsigned RW         = $clog2(ROWS),
  localparam int unsigned CW         = $clog2(XFER_CYCLES + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  // access decoder (R-check)
  input  logic               acc_en,
  input  logic [RW-1:0]      acc_row,
  output logic [ROWS-1:0]    wl,
  output logic               acc_stt,
  // X-check from the issue stage
  input  logic               xchk_valid,
  input  logic [RW-1:0]      xchk_row,
  input  logic               xchk_conflict,
  output xchk_result_e       xchk_result,
  // silent transfer
  output logic [HC_ROWS-1:0] bue,
  output logic               swap_busy,
  output logic [RW-1:0]      swap_row,
  output logic               swap_done
);

  logic [CW-1:0] cnt_q;
  logic          r_flag, x_flag, x_flip;
  logic [RW-2:0] x_addr;

  assign swap_done = swap_busy && (cnt_q == CW'(XFER_CYCLES - 1));
  assign x_flip    = swap_done;
  assign x_addr    = swap_done ? swap_row[RW-1:1] : xchk_row[RW-1:1];

  exchange_flag_table #(.HC_ROWS(HC_ROWS)) u_eft (
    .clk    (clk),
    .rst_n  (rst_n),
    .r_addr (acc_row[RW-1:1]),
    .r_flag (r_flag),
    .x_addr (x_addr),
    .x_flag (x_flag),
    .x_flip (x_flip)
  );

  // ---- access path ----
  logic [RW-1:0] dev_row;
  assign acc_stt  = acc_row[0] ^ r_flag;
  assign dev_row  = {acc_row[RW-1:1], acc_stt};
  always_comb begin
    wl = '0;
    if (acc_en) wl[dev_row] = 1'b1;
  end

  // ---- X-check ----
  logic xchk_stt, start;
  assign xchk_stt = xchk_row[0] ^ x_flag;
  assign start    = xchk_valid && !swap_done && xchk_stt && !xchk_conflict && !swap_busy;
  always_comb begin
    if (!xchk_valid)                 xchk_result = XCHK_NONE;
    else if (swap_done)              xchk_result = XCHK_REFUSED;  // X port busy flipping
    else if (!xchk_stt)              xchk_result = XCHK_SRAM;
    else if (start)                  xchk_result = XCHK_STARTED;
    else                             xchk_result = XCHK_REFUSED;
  end

  // ---- data swap address buffer and transfer timer ----
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      swap_busy <= 1'b0;
      swap_row  <= '0;
      cnt_q     <= '0;
    end else if (start) begin
      swap_busy <= 1'b1;
      swap_row  <= xchk_row;
      cnt_q     <= '0;
    end else if (swap_busy) begin
      cnt_q <= cnt_q + CW'(1);
      if (swap_done) swap_busy <= 1'b0;
    end
  end

  always_comb begin
    bue = '0;
    if (swap_busy) bue[swap_row[RW-1:1]] = 1'b1;
  end

endmodule
