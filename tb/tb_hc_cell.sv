// tb_hc_cell: drives the five cell operations with pulses longer and shorter
// than the write times of the hybrid-cell model and checks the stored bits,
// the sensed value and the read latencies, including an S-Read during an
// X-Transfer.
module tb_hc_cell;
  logic bl_drive, bl, wl0, wl1, bue, sense, sram_bit, stt_bit;
  int checks = 0, failures = 0;

  hc_cell dut (.*);

  task automatic chk(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %b expected %b", what, got, exp);
    end
  endtask

  task automatic pulse_write(input bit stt, input logic d, input real ns);
    bl_drive = 1'b1; bl = d;
    if (stt) wl1 = 1'b1; else wl0 = 1'b1;
    #(ns * 1ns);
    wl0 = 1'b0; wl1 = 1'b0; bl_drive = 1'b0;
    #(1ns);
  endtask

  task automatic read(input bit stt, input logic exp, input real lat_ns);
    if (stt) wl1 = 1'b1; else wl0 = 1'b1;
    #((lat_ns - 0.05) * 1ns);
    chk(sense, ~exp, "sense before read latency");
    #(0.1ns);
    chk(sense, exp, stt ? "T-Read" : "S-Read");
    wl0 = 1'b0; wl1 = 1'b0;
    #(1ns);
  endtask

  initial begin
    #(1000ns);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bl_drive = 1'b0; bl = 1'b0; wl0 = 1'b0; wl1 = 1'b0; bue = 1'b0;
    #(1ns);
    // S-Write 1, T-Write 0
    pulse_write(1'b0, 1'b1, 0.8);
    chk(sram_bit, 1'b1, "S-Write");
    pulse_write(1'b1, 1'b0, 3.0);
    chk(stt_bit, 1'b0, "T-Write 0");
    // reads alternate the sensed value so the latency check sees a change
    read(1'b0, 1'b1, 0.77);
    read(1'b1, 1'b0, 0.71);
    // a T-Write pulse as short as an S-Write does not switch the MTJ
    pulse_write(1'b1, 1'b1, 0.8);
    chk(stt_bit, 1'b0, "short T-Write");
    pulse_write(1'b1, 1'b1, 2.9);
    chk(stt_bit, 1'b1, "T-Write 1");
    pulse_write(1'b1, 1'b0, 2.9);
    // X-Transfer with an S-Read in parallel: STT-RAM takes the SRAM bit
    bue = 1'b1;
    #(0.5ns);
    wl0 = 1'b1;
    #(0.8ns);
    chk(sense, 1'b1, "S-Read during X-Transfer");
    wl0 = 1'b0;
    chk(stt_bit, 1'b0, "X-Transfer not yet done");
    #(1.6ns);
    chk(stt_bit, 1'b1, "X-Transfer");
    chk(sram_bit, 1'b1, "SRAM kept after X-Transfer");
    bue = 1'b0;
    #(1ns);
    // a short BUE pulse leaves the STT-RAM sub-cell as it was
    pulse_write(1'b0, 1'b0, 0.8);
    bue = 1'b1; #(1ns); bue = 1'b0; #(3ns);
    chk(stt_bit, 1'b1, "short X-Transfer");
    chk(sram_bit, 1'b0, "S-Write 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
