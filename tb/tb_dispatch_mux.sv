// tb_dispatch_mux: random ready patterns and back-pressure; checks the
// round-robin choice, the one-hot select and that a unit is released only
// when the execute stage accepts.
module tb_dispatch_mux;
  localparam int unsigned NUM_CU = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [NUM_CU-1:0] cu_ready, sel, release_cu;
  logic [1:0] sel_idx;
  logic disp_valid, disp_ready;
  int checks = 0, failures = 0;
  int ptr;

  dispatch_mux #(.NUM_CU(NUM_CU)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e;
    cu_ready = '0; disp_ready = 1'b0; ptr = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      cu_ready   = NUM_CU'($urandom);
      disp_ready = ($urandom_range(3) != 0);
      #1;
      e = -1;
      for (int k = 0; k < NUM_CU; k++) begin
        int c; c = (ptr + k) % NUM_CU;
        if (e < 0 && cu_ready[c]) e = c;
      end
      checks++;
      if (disp_valid !== (e >= 0)) failures++;
      if (e >= 0) begin
        checks++;
        if (int'(sel_idx) != e || sel !== NUM_CU'(1 << e)) failures++;
        checks++;
        if (release_cu !== (disp_ready ? NUM_CU'(1 << e) : '0)) failures++;
      end else begin
        checks++;
        if (release_cu !== '0 || sel !== '0) failures++;
      end
      @(posedge clk);
      if (e >= 0 && disp_ready) ptr = (e + 1) % NUM_CU;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
