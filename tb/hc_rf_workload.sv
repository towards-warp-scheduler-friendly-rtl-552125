// hc_rf_workload: reusable stimulus and checker for hc_rf, used by
// tb_hc_rf_sched to run the same program under different warp schedulers.
//
// Every warp runs the same kind of program: N_PER_WARP instructions, each
// writing one of the warp's hot registers R16..R19 (one in eight writes any
// register) and reading two random registers (one in eight reads none). The
// program of each warp is a fixed function of the warp number, so every
// scheduler and every register-file variant sees identical work. The issue
// order is loose round robin (GTO = 0: one attempt per warp in turn) or
// greedy-then-oldest (GTO = 1: keep issuing from the same warp, and when it
// is blocked switch to the lowest-numbered warp that can issue). A
// scoreboard keeps the issue contract of hc_rf. All registers are written
// first; after the program every register is read back. Every operand is
// compared with a shadow register file. The module reports the cycle count
// of the program phase and the operation counts (T-Read plus T-Write is the
// number of STT-RAM accesses), and raises `done`.
module hc_rf_workload
  import hc_rf_pkg::*;
#(
  parameter bit          REMAP      = 1'b1,
  parameter bit          GTO        = 1'b0,
  parameter int unsigned N_PER_WARP = 40
) (
  input  logic clk,
  output logic done,
  output int   prog_cycles,
  output int   checks,
  output int   failures,
  output int   n_s_write,
  output int   n_t_write,
  output int   n_t_read,
  output int   n_xfer,
  output int   n_refused
);
  localparam int unsigned BANKS = RF_BANKS, WIDTH = RF_WIDTH, NW = RF_MAX_WARPS,
                          NR = RF_REGS_PER_WARP, NSRC = RF_NUM_SRC, NREG = NW * NR;

  logic rst_n;
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

  hc_rf #(.REMAP(REMAP)) dut (.*);

  longint cycle = 0;
  bit in_prog = 1'b0;
  always @(posedge clk) begin
    cycle++;
    if (in_prog) prog_cycles++;
    if (rst_n) begin
      n_s_write += $countones(ev_s_write);
      n_t_write += $countones(ev_t_write);
      n_t_read  += $countones(ev_t_read);
      n_xfer    += $countones(ev_xfer_start);
      if (ev_xchk == XCHK_REFUSED) n_refused++;
    end
  end

  // deterministic hash for programs and initial data
  function automatic int unsigned mix(int unsigned x);
    x ^= x << 13; x ^= x >> 17; x ^= x << 5;
    x ^= x << 13; x ^= x >> 17; x ^= x << 5;
    return x;
  endfunction
  function automatic logic [WIDTH-1:0] init_val(int w, int r);
    logic [WIDTH-1:0] v;
    for (int i = 0; i < WIDTH / 32; i++) v[i*32 +: 32] = mix(32'(w * 100003 + r * 1009 + i + 1));
    return v;
  endfunction

  logic [WIDTH-1:0] shadow [NREG];
  int pend_wr [NREG];
  int pend_rd [NREG];

  typedef struct { int w; int r; logic [WIDTH-1:0] d; longint t; } wb_t;
  wb_t wbq[$];
  typedef struct { int dst; bit dv; int src [NSRC]; bit sv [NSRC]; } issued_t;
  issued_t inflight [int];
  int rd_tag [NW];
  int rd_tag_disp [NW];
  function automatic int disp_tag();
    return int'(disp_warp) * 64 + (disp_dst_valid ? int'(disp_dst) : 32 + rd_tag_disp[int'(disp_warp)]);
  endfunction

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
        #1 wb_valid = 1'b0;
      end
    end
  end

  // execute stage, fixed latency of 2 cycles before write-back
  initial begin
    disp_ready = 1'b1;
    forever begin
      @(posedge clk);
      if (disp_valid && disp_ready) begin
        int w;
        logic [WIDTH-1:0] res;
        issued_t it;
        w = int'(disp_warp);
        res = '0;
        it = inflight[disp_tag()];
        for (int s = 0; s < NSRC; s++) if (it.sv[s]) begin
          checks++;
          if (disp_opnd[s] !== shadow[w * NR + it.src[s]]) begin
            failures++;
            $display("warp %0d operand %0d (R%0d) mismatch", w, s, it.src[s]);
          end
          pend_rd[w * NR + it.src[s]]--;
          res ^= {disp_opnd[s][WIDTH-2:0], disp_opnd[s][WIDTH-1]};
        end
        if (it.dv) begin
          wb_t e;
          res = res + WIDTH'(longint'(it.dst) * 1000 + w);
          e.w = w; e.r = it.dst; e.d = res; e.t = cycle + 2;
          wbq.push_back(e);
        end
        inflight.delete(disp_tag());
        if (!disp_dst_valid) rd_tag_disp[w] = (rd_tag_disp[w] + 1) % 32;
      end
    end
  end

  // per-warp programs
  int pc [NW];
  function automatic void instr_of(int w, int k, output int d, output int s0, output int s1,
                                   output bit [1:0] sv);
    int unsigned h;
    h  = mix(32'(w * 7919 + k * 104729 + 17));
    d  = 16 + int'(h % 4);
    if (((h >> 2) % 8) == 0) d = int'((h >> 5) % NR);
    s0 = int'((h >> 10) % NR);
    s1 = int'((h >> 16) % NR);
    sv = (((h >> 22) % 8) == 0) ? 2'b00 : 2'b11;
  endfunction
  function automatic bit can_issue(int w);
    int d, s0, s1; bit [1:0] sv;
    if (pc[w] >= int'(N_PER_WARP)) return 1'b0;
    instr_of(w, pc[w], d, s0, s1, sv);
    if (sv[0] && pend_wr[w * NR + s0] > 0) return 1'b0;
    if (sv[1] && pend_wr[w * NR + s1] > 0) return 1'b0;
    if (pend_wr[w * NR + d] > 0 || pend_rd[w * NR + d] > 0) return 1'b0;
    return 1'b1;
  endfunction

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

  initial begin
    int remaining, ptr, greedy;
    done = 1'b0; prog_cycles = 0; checks = 0; failures = 0;
    n_s_write = 0; n_t_write = 0; n_t_read = 0; n_xfer = 0; n_refused = 0;
    rst_n = 1'b0;
    iss_valid = 1'b0; iss_warp = '0; iss_dst = '0; iss_dst_valid = 1'b0;
    iss_src = '0; iss_src_valid = '0;
    for (int i = 0; i < NREG; i++) begin pend_wr[i] = 0; pend_rd[i] = 0; end
    for (int w = 0; w < NW; w++) begin rd_tag[w] = 0; rd_tag_disp[w] = 0; pc[w] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int w = 0; w < NW; w++)
      for (int r = 0; r < NR; r++) begin
        wb_t e;
        e.w = w; e.r = r; e.d = init_val(w, r); e.t = 0;
        pend_wr[w * NR + r]++;
        wbq.push_back(e);
      end
    while (wbq.size() > 0) @(posedge clk);
    repeat (2) @(posedge clk);

    // program phase
    in_prog = 1'b1;
    remaining = NW * N_PER_WARP;
    ptr = 0; greedy = 0;
    while (remaining > 0) begin
      int w;
      w = -1;
      if (GTO) begin
        if (can_issue(greedy)) w = greedy;
        else
          for (int k = 0; k < NW; k++) if (w < 0 && can_issue(k)) w = k;
        if (w >= 0) greedy = w;
      end else begin
        if (can_issue(ptr)) w = ptr;
        ptr = (ptr + 1) % NW;
      end
      if (w >= 0) begin
        int d, s0, s1; bit [1:0] sv;
        instr_of(w, pc[w], d, s0, s1, sv);
        pc[w]++;
        issue_one(w, 1'b1, d, s0, s1, sv);
        remaining--;
      end else begin
        @(posedge clk);
      end
    end
    while (wbq.size() > 0 || inflight.size() > 0) @(posedge clk);
    in_prog = 1'b0;

    // read back every register
    for (int w = 0; w < NW; w++)
      for (int r = 0; r < NR; r += 2) begin
        while (inflight.exists(w * 64 + 32 + rd_tag[w])) @(posedge clk);
        issue_one(w, 1'b0, 0, r, r + 1, 2'b11);
        rd_tag[w] = (rd_tag[w] + 1) % 32;
      end
    while (inflight.size() > 0) @(posedge clk);
    repeat (3) @(posedge clk);
    done = 1'b1;
  end
endmodule
