// tb_hc_bank: exercises the five cell operations on a full-size bank
// (64 rows x 1024 bits): S-Write/S-Read, T-Write/T-Read with the bitlines
// held for T_WRITE_CYCLES, X-Transfer copying an SRAM row into its STT-RAM
// row after XFER_CYCLES cycles of BUE while S-Reads run in parallel, and a
// BUE pulse that is too short to switch the magnetic cells. Expected data
// come from two row arrays kept in the testbench.
module tb_hc_bank;
  import hc_rf_pkg::*;
  localparam int unsigned ROWS = 64, WIDTH = 1024, TW = 4, XF = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [ROWS-1:0] wl;
  logic rd_en, wr_en, rvalid, wr_busy, xfer_done;
  logic [WIDTH-1:0] wdata, rdata;
  logic [4:0] wr_busy_hc;
  logic [ROWS/2-1:0] bue;
  hc_op_e op;
  int checks = 0, failures = 0;
  logic [WIDTH-1:0] m_sram [ROWS/2];
  logic [WIDTH-1:0] m_stt  [ROWS/2];

  hc_bank #(.ROWS(ROWS), .WIDTH(WIDTH), .T_WRITE_CYCLES(TW), .XFER_CYCLES(XF)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [WIDTH-1:0] rnd();
    logic [WIDTH-1:0] v;
    for (int i = 0; i < WIDTH / 32; i++) v[i*32 +: 32] = $urandom;
    return v;
  endfunction

  task automatic do_write(input int r, input logic [WIDTH-1:0] d);
    int cyc;
    @(negedge clk);
    wl = ROWS'(64'(1) << r); wr_en = 1'b1; wdata = d;
    #1;
    checks++; if (op != ((r & 1) ? HC_T_WRITE : HC_S_WRITE)) failures++;
    @(negedge clk);
    wl = '0; wr_en = 1'b0; wdata = rnd();
    if (r & 1) begin
      // bitlines stay occupied for the rest of the T-Write
      cyc = 1;
      while (wr_busy) begin
        checks++; if (wr_busy_hc != 5'(r / 2)) failures++;
        @(negedge clk); cyc++;
      end
      checks++;
      if (cyc != TW) begin
        failures++;
        $display("T-Write took %0d cycles, expected %0d", cyc, TW);
      end
      m_stt[r/2] = d;
    end else begin
      checks++; if (wr_busy) failures++;
      m_sram[r/2] = d;
    end
  endtask

  task automatic do_read(input int r);
    @(negedge clk);
    wl = ROWS'(64'(1) << r); rd_en = 1'b1;
    #1;
    checks++; if (op != ((r & 1) ? HC_T_READ : HC_S_READ)) failures++;
    @(negedge clk);
    wl = '0; rd_en = 1'b0;
    checks++;
    if (!rvalid || rdata !== ((r & 1) ? m_stt[r/2] : m_sram[r/2])) begin
      failures++;
      $display("read of row %0d mismatched", r);
    end
  endtask

  initial begin
    wl = '0; rd_en = 1'b0; wr_en = 1'b0; wdata = '0; bue = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // fill every row, SRAM and STT-RAM
    for (int r = 0; r < ROWS; r++) do_write(r, rnd());
    for (int r = 0; r < ROWS; r++) do_read(r);
    // X-Transfer on HC row 8 with S-Reads of other rows and of row 16 itself
    @(negedge clk);
    bue = 32'(1) << 8;
    for (int k = 0; k < XF; k++) begin
      wl = ROWS'(64'(1) << ((k == 1) ? 16 : 2 * k)); rd_en = 1'b1;
      #1;
      checks++; if (op != HC_S_READ) failures++;
      checks++; if (xfer_done) failures++;
      @(negedge clk);
      checks++; if (!rvalid || rdata !== m_sram[(k == 1) ? 8 : k]) failures++;
    end
    wl = '0; rd_en = 1'b0; bue = '0;
    // copy landed at the end of the last BUE cycle
    checks++; if (!xfer_done) failures++;
    m_stt[8] = m_sram[8];
    do_read(17);
    do_read(16);
    // BUE held too briefly: STT-RAM row keeps its value
    do_write(20, rnd());
    @(negedge clk);
    bue = 32'(1) << 10;
    repeat (XF - 1) @(negedge clk);
    bue = '0;
    @(negedge clk);
    checks++; if (xfer_done) failures++;
    do_read(21);
    // random mix
    for (int n = 0; n < 300; n++) begin
      int r;
      r = $urandom_range(ROWS - 1);
      if ($urandom_range(1) == 1) do_write(r, rnd());
      else do_read(r);
    end
    for (int r = 0; r < ROWS; r++) do_read(r);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
