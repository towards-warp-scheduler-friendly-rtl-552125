// tb_rf_crossbar: random collector requests and bank returns; checks that
// every request reaches exactly its bank and every returned word reaches
// exactly its tagged collector unit and slot.
module tb_rf_crossbar;
  localparam int unsigned BANKS = 16, NUM_CU = 4, NUM_SRC = 2, WIDTH = 64;
  logic [NUM_CU-1:0]            cu_req_valid;
  logic [NUM_CU-1:0][3:0]       cu_req_bank;
  logic [BANKS-1:0][NUM_CU-1:0] bank_rd_req;
  logic [BANKS-1:0]             bank_rvalid;
  logic [BANKS-1:0][WIDTH-1:0]  bank_rdata;
  logic [BANKS-1:0][1:0]        bank_tag_cu;
  logic [BANKS-1:0][0:0]        bank_tag_slot;
  logic [NUM_CU-1:0]            fill_valid;
  logic [NUM_CU-1:0][0:0]       fill_slot;
  logic [NUM_CU-1:0][WIDTH-1:0] fill_data;
  int checks = 0, failures = 0;

  rf_crossbar #(.BANKS(BANKS), .NUM_CU(NUM_CU), .NUM_SRC(NUM_SRC), .WIDTH(WIDTH)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      // requests
      for (int c = 0; c < NUM_CU; c++) begin
        cu_req_valid[c] = ($urandom_range(1) == 1);
        cu_req_bank[c]  = 4'($urandom_range(BANKS - 1));
      end
      // returns: each collector gets data from at most one distinct bank
      bank_rvalid = '0;
      bank_rdata = '0; bank_tag_cu = '0; bank_tag_slot = '0;
      for (int c = 0; c < NUM_CU; c++) begin
        if ($urandom_range(1) == 1) begin
          int b;
          b = c * 4 + $urandom_range(3);
          bank_rvalid[b]   = 1'b1;
          bank_tag_cu[b]   = 2'(c);
          bank_tag_slot[b] = 1'($urandom_range(1));
          bank_rdata[b]    = {$urandom, $urandom};
        end
      end
      for (int b = 0; b < BANKS; b++) if (!bank_rvalid[b]) bank_rdata[b] = {$urandom, $urandom};
      #1;
      for (int b = 0; b < BANKS; b++)
        for (int c = 0; c < NUM_CU; c++) begin
          checks++;
          if (bank_rd_req[b][c] !== (cu_req_valid[c] && int'(cu_req_bank[c]) == b)) failures++;
        end
      for (int c = 0; c < NUM_CU; c++) begin
        logic found;
        found = 1'b0;
        for (int b = c * 4; b < c * 4 + 4; b++)
          if (bank_rvalid[b]) begin
            found = 1'b1;
            checks++;
            if (!fill_valid[c] || fill_slot[c] !== bank_tag_slot[b] || fill_data[c] !== bank_rdata[b])
              failures++;
          end
        if (!found) begin
          checks++;
          if (fill_valid[c]) failures++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
