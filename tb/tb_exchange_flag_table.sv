// tb_exchange_flag_table: random flips and reads of the exchange flag table,
// checked against a bit-vector model kept in the testbench.
module tb_exchange_flag_table;
  localparam int unsigned HC_ROWS = 32;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [4:0] r_addr, x_addr;
  logic r_flag, x_flag, x_flip;
  int checks = 0, failures = 0;
  logic [HC_ROWS-1:0] model;

  exchange_flag_table #(.HC_ROWS(HC_ROWS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = '0; r_addr = '0; x_addr = '0; x_flip = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // all flags clear after reset
    for (int i = 0; i < HC_ROWS; i++) begin
      r_addr = 5'(i); #1;
      checks++; if (r_flag !== 1'b0) failures++;
    end
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      r_addr = 5'($urandom_range(HC_ROWS - 1));
      x_addr = 5'($urandom_range(HC_ROWS - 1));
      x_flip = ($urandom_range(2) == 0);
      #1;
      checks++; if (r_flag !== model[r_addr]) failures++;
      checks++; if (x_flag !== model[x_addr]) failures++;
      @(posedge clk);
      if (x_flip) model[x_addr] = ~model[x_addr];
    end
    @(negedge clk); x_flip = 1'b0;
    for (int i = 0; i < HC_ROWS; i++) begin
      r_addr = 5'(i); #1;
      checks++; if (r_flag !== model[i]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
