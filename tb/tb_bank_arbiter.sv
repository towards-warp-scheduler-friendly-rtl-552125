// tb_bank_arbiter: random request patterns; checks write priority, one-hot
// grants and round-robin order of read grants against a pointer model.
module tb_bank_arbiter;
  localparam int unsigned NUM_CU = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  logic wr_req, wr_gnt;
  logic [NUM_CU-1:0] rd_req, rd_gnt;
  int checks = 0, failures = 0;
  int ptr;

  bank_arbiter #(.NUM_CU(NUM_CU)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NUM_CU-1:0] exp;
    wr_req = 1'b0; rd_req = '0; ptr = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      wr_req = ($urandom_range(3) == 0);
      rd_req = NUM_CU'($urandom);
      #1;
      exp = '0;
      if (!wr_req) begin
        for (int k = 0; k < NUM_CU; k++) begin
          int c; c = (ptr + k) % NUM_CU;
          if (exp == '0 && rd_req[c]) exp[c] = 1'b1;
        end
      end
      checks++;
      if (wr_gnt !== wr_req || rd_gnt !== exp) begin
        failures++;
        $display("n=%0d wr %b rd %b: got %b %b exp %b", n, wr_req, rd_req, wr_gnt, rd_gnt, exp);
      end
      @(posedge clk);
      for (int c = 0; c < NUM_CU; c++) if (exp[c]) ptr = (c + 1) % NUM_CU;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
