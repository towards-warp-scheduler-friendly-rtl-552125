// tb_efc_decoder: checks the wordline decode (row[0] XOR flag), the X-check
// outcomes, the BUE pulse of XFER_CYCLES cycles on the right HC row, the
// flag flip at its end, refusal on conflict and while a transfer runs, and a
// second swap that moves the pair back. Expected values come from a flag
// model in the testbench.
module tb_efc_decoder;
  import hc_rf_pkg::*;
  localparam int unsigned ROWS = 64, XF = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  logic acc_en, acc_stt, xchk_valid, xchk_conflict, swap_busy, swap_done;
  logic [5:0] acc_row, xchk_row, swap_row;
  logic [ROWS-1:0] wl;
  logic [ROWS/2-1:0] bue;
  xchk_result_e xchk_result;
  int checks = 0, failures = 0;
  logic [ROWS/2-1:0] flag;

  efc_decoder #(.ROWS(ROWS), .XFER_CYCLES(XF)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_decode();
    for (int r = 0; r < ROWS; r++) begin
      int dev;
      acc_en = 1'b1; acc_row = 6'(r); #1;
      dev = (r & ~1) | ((r & 1) ^ int'(flag[r/2]));
      checks++;
      if (wl !== ROWS'(64'(1) << dev) || acc_stt !== 1'(dev & 1)) failures++;
    end
    acc_en = 1'b0; #1;
    checks++; if (wl !== '0) failures++;
  endtask

  // X-check of row r expecting a started swap; follows it to completion
  task automatic swap(input int r);
    @(negedge clk);
    xchk_valid = 1'b1; xchk_row = 6'(r); xchk_conflict = 1'b0; #1;
    checks++; if (xchk_result != XCHK_STARTED) failures++;
    @(negedge clk);
    xchk_valid = 1'b0;
    for (int k = 0; k < XF; k++) begin
      checks++;
      if (!swap_busy || swap_row != 6'(r) || bue !== 32'(64'(1) << (r / 2))) failures++;
      checks++; if (swap_done !== (k == XF - 1)) failures++;
      // a second X-check while the transfer runs is refused
      if (k == 1) begin
        xchk_valid = 1'b1; xchk_row = 6'((r + 8) % ROWS); #1;
        checks++;
        if (xchk_result == XCHK_STARTED) failures++;
        xchk_valid = 1'b0;
      end
      // the flag is not flipped before the end of the transfer
      acc_en = 1'b1; acc_row = 6'(r); #1;
      checks++; if (acc_stt !== 1'((r & 1) ^ int'(flag[r/2]))) failures++;
      acc_en = 1'b0;
      @(negedge clk);
    end
    flag[r/2] = ~flag[r/2];
    checks++; if (swap_busy || bue !== '0) failures++;
  endtask

  initial begin
    acc_en = 1'b0; acc_row = '0; xchk_valid = 1'b0; xchk_row = '0; xchk_conflict = 1'b0;
    flag = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check_decode();
    // even row: already in SRAM, nothing to do
    xchk_valid = 1'b1; xchk_row = 6'd34; #1;
    checks++; if (xchk_result != XCHK_SRAM) failures++;
    // odd row with a conflict: refused, no transfer
    xchk_row = 6'd17; xchk_conflict = 1'b1; #1;
    checks++; if (xchk_result != XCHK_REFUSED) failures++;
    @(negedge clk);
    xchk_valid = 1'b0; xchk_conflict = 1'b0;
    checks++; if (swap_busy || bue !== '0) failures++;
    // odd row 17 (R17 of the example): swap, then it decodes to the SRAM row
    swap(17);
    check_decode();
    // now row 16 lives in STT-RAM: its X-check swaps the pair back
    @(negedge clk);
    xchk_valid = 1'b1; xchk_row = 6'd17; #1;
    checks++; if (xchk_result != XCHK_SRAM) failures++;
    xchk_valid = 1'b0;
    swap(16);
    check_decode();
    // random swaps
    for (int n = 0; n < 40; n++) begin
      int r;
      r = $urandom_range(ROWS - 1);
      if (((r & 1) ^ int'(flag[r/2])) == 1) swap(r);
      else begin
        @(negedge clk);
        xchk_valid = 1'b1; xchk_row = 6'(r); #1;
        checks++; if (xchk_result != XCHK_SRAM) failures++;
        xchk_valid = 1'b0;
      end
    end
    check_decode();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
