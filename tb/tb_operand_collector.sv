// tb_operand_collector: allocates random instructions with zero to two
// source operands, grants requests after random delays, returns data out of
// order, and checks the request sequence (lowest slot first, one per
// cycle), the pending list, the collected operands, `ready` and release.
module tb_operand_collector;
  localparam int unsigned WIDTH = 64, NUM_SRC = 2;
  logic clk = 1'b0, rst_n = 1'b0;
  logic alloc, alloc_dst_valid, busy, req_valid, req_gnt, fill_valid, ready, release_cu, dst_valid;
  logic [5:0] alloc_warp, warp;
  logic [4:0] alloc_dst, dst;
  logic [NUM_SRC-1:0] alloc_src_valid, pend_valid;
  logic [NUM_SRC-1:0][3:0] alloc_src_bank, pend_bank;
  logic [NUM_SRC-1:0][5:0] alloc_src_row, pend_row;
  logic [3:0] req_bank;
  logic [5:0] req_row;
  logic [0:0] req_slot, fill_slot;
  logic [WIDTH-1:0] fill_data;
  logic [NUM_SRC-1:0][WIDTH-1:0] opnd;
  int checks = 0, failures = 0;

  operand_collector #(.WIDTH(WIDTH), .NUM_SRC(NUM_SRC)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one_instr();
    logic [NUM_SRC-1:0] sv;
    logic [NUM_SRC-1:0][3:0] sb;
    logic [NUM_SRC-1:0][5:0] sr;
    logic [NUM_SRC-1:0][WIDTH-1:0] data;
    logic [5:0] w; logic [4:0] d;
    int granted[$];
    sv = NUM_SRC'($urandom);
    for (int s = 0; s < NUM_SRC; s++) begin
      sb[s] = 4'($urandom); sr[s] = 6'($urandom); data[s] = {$urandom, $urandom};
    end
    w = 6'($urandom_range(47)); d = 5'($urandom_range(19));
    @(negedge clk);
    alloc = 1'b1; alloc_warp = w; alloc_dst = d; alloc_dst_valid = 1'b1;
    alloc_src_valid = sv; alloc_src_bank = sb; alloc_src_row = sr;
    @(negedge clk);
    alloc = 1'b0; alloc_src_bank = '0; alloc_src_row = '0;
    checks++; if (!busy || pend_valid !== sv) failures++;
    // requests, lowest slot first, with random grant delays
    for (int s = 0; s < NUM_SRC; s++) begin
      if (!sv[s]) continue;
      repeat ($urandom_range(2)) begin
        checks++;
        if (!req_valid || req_slot != 1'(s) || req_bank != sb[s] || req_row != sr[s]) failures++;
        @(negedge clk);
      end
      checks++;
      if (!req_valid || req_slot != 1'(s) || req_bank != sb[s] || req_row != sr[s]) failures++;
      checks++; if (ready) failures++;
      req_gnt = 1'b1;
      @(negedge clk);
      req_gnt = 1'b0;
      granted.push_front(s);
    end
    checks++; if (req_valid) failures++;
    // data returns in reverse order
    foreach (granted[i]) begin
      checks++; if (ready) failures++;
      fill_valid = 1'b1; fill_slot = 1'(granted[i]); fill_data = data[granted[i]];
      @(negedge clk);
      fill_valid = 1'b0;
    end
    checks++; if (!ready || pend_valid !== '0) failures++;
    checks++; if (warp != w || dst != d || !dst_valid) failures++;
    for (int s = 0; s < NUM_SRC; s++) if (sv[s]) begin
      checks++; if (opnd[s] !== data[s]) failures++;
    end
    release_cu = 1'b1;
    @(negedge clk);
    release_cu = 1'b0;
    checks++; if (busy || ready) failures++;
  endtask

  initial begin
    alloc = 1'b0; req_gnt = 1'b0; fill_valid = 1'b0; release_cu = 1'b0;
    alloc_warp = '0; alloc_dst = '0; alloc_dst_valid = 1'b0; alloc_src_valid = '0;
    alloc_src_bank = '0; alloc_src_row = '0; fill_slot = '0; fill_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    repeat (300) one_instr();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
