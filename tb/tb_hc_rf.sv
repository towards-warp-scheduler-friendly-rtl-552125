// tb_hc_rf: end-to-end test of the hybrid-cell register file at its default
// size (16 banks of 64 x 1024 bits, 48 warps of 20 registers).
//
// 1. Every register of every warp is written through the write-back port;
//    registers on odd rows land in STT-RAM sub-cells (T-Writes).
// 2. Instructions are issued from the warps in loose round-robin order, each
//    writing one of a few "hot" registers of its warp and reading two random
//    ones (one in eight reads none). A scoreboard in the testbench keeps the issue-stage contract (no
//    issue while an older instruction still writes one of the registers, or
//    still has to read the destination). The execute stage checks every
//    dispatched operand against a shadow copy of the register file, computes
//    a result and writes it back after a random delay.
// 3. Every register is read back through operand collectors and compared.
// It counts each mechanism (S-/T-Read, S-/T-Write, X-check outcomes,
// X-Transfers, reads running in parallel with a transfer, write-backs held
// by a swap) and fails if one never happened. It also checks that each
// X-Transfer ends exactly XFER_CYCLES cycles after it started and that a
// T-Write blocks its bank for T_WRITE_CYCLES cycles.
module tb_hc_rf;
  import hc_rf_pkg::*;
  localparam int unsigned BANKS = RF_BANKS, WIDTH = RF_WIDTH, NW = RF_MAX_WARPS,
                          NR = RF_REGS_PER_WARP, NSRC = RF_NUM_SRC, NREG = NW * NR;
  localparam int unsigned N_INSTR = 3000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic iss_valid, iss_ready, iss_dst_valid;
  logic [5:0] iss_warp;
  logic [4:0] iss_dst;
  logic [NSRC-1:0][4:0] iss_src;
  logic [NSRC-1:0] iss_src_valid;
  logic disp_valid, disp_ready, disp_dst_valid;
  logic [5:0] disp_warp;
  logic [4:0] disp_dst;
  logic [NSRC-1:0][WIDTH-1:0] disp_opnd;
  logic wb_valid, wb_ready;
  logic [5:0] wb_warp;
  logic [4:0] wb_reg;
  logic [WIDTH-1:0] wb_data;
  logic [BANKS-1:0] ev_s_read, ev_t_read, ev_s_write, ev_t_write, ev_xfer_start, ev_xfer_done, swap_busy;
  xchk_result_e ev_xchk;

  hc_rf dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle++;

  // ---------------- counters ----------------
  int n_s_read, n_t_read, n_s_write, n_t_write, n_xfer_start, n_xfer_done;
  int n_xchk_sram, n_xchk_started, n_xchk_refused, n_par_read, n_wb_swap_hold;
  int n_wb_phase2, n_swr_phase2;
  bit phase2 = 1'b0;
  longint xfer_t0 [BANKS];
  int twr_bank_cnt [BANKS];

  function automatic int bank_of(int w, int r);
    return (w * NR + r) % BANKS;
  endfunction
  function automatic int row_of(int w, int r);
    return (w * NR + r) / BANKS;
  endfunction

  always @(posedge clk) if (rst_n) begin
    n_s_read     += $countones(ev_s_read);
    n_t_read     += $countones(ev_t_read);
    n_s_write    += $countones(ev_s_write);
    n_t_write    += $countones(ev_t_write);
    n_xfer_start += $countones(ev_xfer_start);
    n_xfer_done  += $countones(ev_xfer_done);
    if (phase2) n_swr_phase2 += $countones(ev_s_write);
    case (ev_xchk)
      XCHK_SRAM:    n_xchk_sram++;
      XCHK_STARTED: n_xchk_started++;
      XCHK_REFUSED: n_xchk_refused++;
      default: ;
    endcase
    n_par_read += $countones((ev_s_read | ev_t_read) & swap_busy);
    if (wb_valid && !wb_ready && swap_busy[bank_of(int'(wb_warp), int'(wb_reg))] &&
        dut.swap_row[bank_of(int'(wb_warp), int'(wb_reg))][5:1] == 5'(row_of(int'(wb_warp), int'(wb_reg)) / 2))
      n_wb_swap_hold++;
    for (int b = 0; b < BANKS; b++) begin
      // X-Transfer duration
      if (ev_xfer_start[b]) xfer_t0[b] = cycle;
      if (ev_xfer_done[b]) begin
        checks++;
        if (cycle - xfer_t0[b] != longint'(RF_XFER_CYCLES)) begin
          failures++;
          $display("bank %0d: X-Transfer took %0d cycles", b, cycle - xfer_t0[b]);
        end
      end
      // T-Write occupancy: no other bitline access for T_WRITE_CYCLES-1 cycles
      if (twr_bank_cnt[b] > 0) begin
        checks++;
        if (ev_s_read[b] | ev_t_read[b] | ev_s_write[b] | ev_t_write[b]) begin
          failures++;
          $display("bank %0d accessed during a T-Write", b);
        end
        twr_bank_cnt[b]--;
      end
      if (ev_t_write[b]) twr_bank_cnt[b] = RF_T_WRITE_CYCLES - 1;
    end
  end

  // ---------------- reference model ----------------
  logic [WIDTH-1:0] shadow [NREG];
  int pend_wr [NREG];   // outstanding writes per register
  int pend_rd [NREG];   // outstanding reads per register

  function automatic logic [WIDTH-1:0] rnd();
    logic [WIDTH-1:0] v;
    for (int i = 0; i < WIDTH / 32; i++) v[i*32 +: 32] = $urandom;
    return v;
  endfunction

  typedef struct {
    int w; int r; logic [WIDTH-1:0] d; longint t;
  } wb_t;
  wb_t wbq[$];

  // write-back driver
  initial begin
    wb_valid = 1'b0; wb_warp = '0; wb_reg = '0; wb_data = '0;
    forever begin
      @(negedge clk);
      if (!wb_valid && wbq.size() > 0 && wbq[0].t <= cycle) begin
        wb_valid = 1'b1; wb_warp = 6'(wbq[0].w); wb_reg = 5'(wbq[0].r); wb_data = wbq[0].d;
      end
      @(posedge clk);
      if (wb_valid && wb_ready) begin
        wb_t e;
        e = wbq.pop_front();
        shadow[e.w * NR + e.r] = e.d;
        pend_wr[e.w * NR + e.r]--;
        if (phase2) n_wb_phase2++;
        #1 wb_valid = 1'b0;
      end
    end
  end

  // in-flight instructions, keyed by warp and destination (unique by the
  // scoreboard), or by warp and a read-back tag for instructions without one
  typedef struct {
    int dst; bit dv; int src [NSRC]; bit sv [NSRC];
  } issued_t;
  issued_t inflight [int];
  int rd_tag [NW];
  int rd_tag_disp [NW];
  function automatic int disp_tag();
    return int'(disp_warp) * 64 + (disp_dst_valid ? int'(disp_dst) : 32 + rd_tag_disp[int'(disp_warp)]);
  endfunction

  // execute stage: checks operands, produces results
  int n_dispatched = 0;
  initial begin
    disp_ready = 1'b0;
    forever begin
      @(negedge clk);
      disp_ready = ($urandom_range(3) != 0);
      @(posedge clk);
      if (disp_valid && disp_ready) begin
        int w;
        logic [WIDTH-1:0] res;
        w = int'(disp_warp);
        res = '0;
        // operands recorded at issue are checked against the shadow
        begin
          issued_t it;
          it = inflight[disp_tag()];
          for (int s = 0; s < NSRC; s++) if (it.sv[s]) begin
            checks++;
            if (disp_opnd[s] !== shadow[w * NR + it.src[s]]) begin
              failures++;
              $display("cycle %0d: warp %0d operand %0d (R%0d) mismatch", cycle, w, s, it.src[s]);
            end
            pend_rd[w * NR + it.src[s]]--;
            res ^= {disp_opnd[s][WIDTH-2:0], disp_opnd[s][WIDTH-1]};
          end
          if (it.dv) begin
            wb_t e;
            res = res + WIDTH'(longint'(it.dst) * 1000 + w);
            e.w = w; e.r = it.dst; e.d = res; e.t = cycle + $urandom_range(1, 4);
            wbq.push_back(e);
          end
          inflight.delete(disp_tag());
          if (!disp_dst_valid) rd_tag_disp[w] = (rd_tag_disp[w] + 1) % 32;
        end
        n_dispatched++;
      end
    end
  end


  // ---------------- issue: loose round robin ----------------
  task automatic issue_one(input int w, input bit dv, input int d, input int s0, input int s1,
                           input bit [1:0] sv);
    issued_t it;
    @(negedge clk);
    iss_valid = 1'b1; iss_warp = 6'(w);
    iss_dst_valid = dv; iss_dst = 5'(d);
    iss_src[0] = 5'(s0); iss_src[1] = 5'(s1); iss_src_valid = sv;
    it.dst = d; it.dv = dv; it.src[0] = s0; it.src[1] = s1; it.sv[0] = sv[0]; it.sv[1] = sv[1];
    if (sv[0]) pend_rd[w * NR + s0]++;
    if (sv[1]) pend_rd[w * NR + s1]++;
    if (dv) begin
      pend_wr[w * NR + d]++;
      inflight[w * 64 + d] = it;
    end else begin
      inflight[w * 64 + 32 + rd_tag[w]] = it;
    end
    @(posedge clk);
    while (!iss_ready) @(posedge clk);
    #1 iss_valid = 1'b0;
  endtask

  function automatic bit can_issue(int w, int d, int s0, int s1);
    if (pend_wr[w * NR + s0] > 0 || pend_wr[w * NR + s1] > 0) return 1'b0;
    if (pend_wr[w * NR + d] > 0 || pend_rd[w * NR + d] > 0) return 1'b0;
    return 1'b1;
  endfunction

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int issued, w;
    iss_valid = 1'b0; iss_warp = '0; iss_dst = '0; iss_dst_valid = 1'b0;
    iss_src = '0; iss_src_valid = '0;
    for (int i = 0; i < NREG; i++) begin pend_wr[i] = 0; pend_rd[i] = 0; end
    for (int w2 = 0; w2 < NW; w2++) begin rd_tag[w2] = 0; rd_tag_disp[w2] = 0; end
    for (int b = 0; b < BANKS; b++) twr_bank_cnt[b] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // 1. initialise every register
    for (int w2 = 0; w2 < NW; w2++)
      for (int r = 0; r < NR; r++) begin
        wb_t e;
        e.w = w2; e.r = r; e.d = rnd(); e.t = 0;
        pend_wr[w2 * NR + r]++;
        wbq.push_back(e);
      end
    while (wbq.size() > 0) @(posedge clk);
    repeat (2) @(posedge clk);
    checks++;
    if (n_t_write != NREG / 2 || n_s_write != NREG / 2) begin
      failures++;
      $display("initial fill: %0d S-Writes, %0d T-Writes", n_s_write, n_t_write);
    end

    // 2. loose round-robin instruction stream
    phase2 = 1'b1;
    issued = 0; w = 0;
    while (issued < N_INSTR) begin
      int d, s0, s1;
      d  = 16 + $urandom_range(3);          // hot registers R16..R19
      if ($urandom_range(7) == 0) d = $urandom_range(NR - 1);
      s0 = $urandom_range(NR - 1);
      s1 = $urandom_range(NR - 1);
      if (can_issue(w, d, s0, s1)) begin
        // one in eight instructions has no register source (a move of an
        // immediate): its write-back follows the X-check within a few cycles
        issue_one(w, 1'b1, d, s0, s1, ($urandom_range(7) == 0) ? 2'b00 : 2'b11);
        issued++;
      end else begin
        @(posedge clk);
      end
      w = (w + 1) % NW;
    end
    while (wbq.size() > 0 || inflight.size() > 0) @(posedge clk);
    repeat (10) @(posedge clk);
    phase2 = 1'b0;

    // 3. read every register back
    for (int w2 = 0; w2 < NW; w2++)
      for (int r = 0; r < NR; r += 2) begin
        while (inflight.exists(w2 * 64 + 32 + rd_tag[w2])) @(posedge clk);
        issue_one(w2, 1'b0, 0, r, r + 1, 2'b11);
        rd_tag[w2] = (rd_tag[w2] + 1) % 32;
      end
    while (inflight.size() > 0) @(posedge clk);
    repeat (5) @(posedge clk);

    $display("S-Read %0d T-Read %0d S-Write %0d T-Write %0d", n_s_read, n_t_read, n_s_write, n_t_write);
    $display("X-check: sram %0d started %0d refused %0d; X-Transfers done %0d",
             n_xchk_sram, n_xchk_started, n_xchk_refused, n_xfer_done);
    $display("reads parallel to a transfer %0d; write-backs held by a swap %0d cycles",
             n_par_read, n_wb_swap_hold);
    $display("instruction phase: %0d write-backs, %0d S-Writes", n_wb_phase2, n_swr_phase2);
    // every mechanism happened
    checks++; if (n_s_read == 0)        begin failures++; $display("no S-Read"); end
    checks++; if (n_t_read == 0)        begin failures++; $display("no T-Read"); end
    checks++; if (n_s_write == 0)       begin failures++; $display("no S-Write"); end
    checks++; if (n_t_write == 0)       begin failures++; $display("no T-Write"); end
    checks++; if (n_xchk_sram == 0)     begin failures++; $display("no X-check hit in SRAM"); end
    checks++; if (n_xchk_started == 0)  begin failures++; $display("no X-Transfer started"); end
    checks++; if (n_xchk_refused == 0)  begin failures++; $display("no X-check refused"); end
    checks++; if (n_xfer_done != n_xchk_started) begin failures++; $display("transfer count mismatch"); end
    checks++; if (n_par_read == 0)      begin failures++; $display("no read parallel to a transfer"); end
    checks++; if (n_wb_swap_hold == 0)  begin failures++; $display("no write-back held by a swap"); end
    checks++; if (n_dispatched != N_INSTR + NREG / 2) begin failures++; $display("dispatched %0d", n_dispatched); end
    // remapping moves most writes of the hot registers to SRAM
    checks++; if (n_swr_phase2 * 4 < n_wb_phase2 * 3) begin failures++; $display("too few S-Writes"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
