// tb_reg_mapper: walks every register of every warp in order and checks the
// mapping against a bank/row counter that advances one bank per register and
// wraps to the next row after the last bank; also checks the worked example
// (warp 1, R0 -> bank 4, row 1) and out-of-range detection.
module tb_reg_mapper;
  logic [5:0] warp;
  logic [4:0] reg_idx;
  logic [3:0] bank;
  logic [5:0] row;
  logic valid;
  int checks = 0, failures = 0;

  reg_mapper dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int eb, er;
    eb = 0; er = 0;
    for (int w = 0; w < 48; w++) begin
      for (int r = 0; r < 20; r++) begin
        warp = 6'(w); reg_idx = 5'(r); #1;
        checks++;
        if (!valid || int'(bank) != eb || int'(row) != er) begin
          failures++;
          $display("mismatch w%0d r%0d: bank %0d row %0d, expected %0d %0d", w, r, bank, row, eb, er);
        end
        eb++;
        if (eb == 16) begin eb = 0; er++; end
      end
    end
    warp = 6'd1; reg_idx = 5'd0; #1;
    checks++; if (bank != 4'd4 || row != 6'd1) failures++;
    warp = 6'd0; reg_idx = 5'd17; #1;   // R1 and R17 share HC row 0 of bank 1
    checks++; if (bank != 4'd1 || row != 6'd1) failures++;
    warp = 6'd48; reg_idx = 5'd0; #1;
    checks++; if (valid) failures++;
    warp = 6'd3; reg_idx = 5'd20; #1;
    checks++; if (valid) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
