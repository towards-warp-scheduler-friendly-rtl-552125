// tb_hc_rf_sched: runs one program on four register files at default size:
// loose round robin (LRR) and greedy-then-oldest (GTO) issue, each with
// on-demand remapping (REMAP = 1) and with the static mapping (REMAP = 0).
// Each run checks every operand and the read-back of every register. The
// test prints cycles, S-/T-Writes and swaps per run, and checks that
// remapping removes most T-Writes under both schedulers. It also checks that
// with remapping the LRR run takes no more cycles than the same run with the
// static mapping.
module tb_hc_rf_sched;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic done [4];
  int cyc [4], chk [4], fail [4], sw [4], tw [4], tr [4], xf [4], rf [4];
  string name [4] = '{"LRR static", "LRR remap ", "GTO static", "GTO remap "};

  hc_rf_workload #(.REMAP(1'b0), .GTO(1'b0)) u_lrr_static (.clk, .done(done[0]), .prog_cycles(cyc[0]),
    .checks(chk[0]), .failures(fail[0]), .n_s_write(sw[0]), .n_t_write(tw[0]), .n_t_read(tr[0]), .n_xfer(xf[0]), .n_refused(rf[0]));
  hc_rf_workload #(.REMAP(1'b1), .GTO(1'b0)) u_lrr_remap (.clk, .done(done[1]), .prog_cycles(cyc[1]),
    .checks(chk[1]), .failures(fail[1]), .n_s_write(sw[1]), .n_t_write(tw[1]), .n_t_read(tr[1]), .n_xfer(xf[1]), .n_refused(rf[1]));
  hc_rf_workload #(.REMAP(1'b0), .GTO(1'b1)) u_gto_static (.clk, .done(done[2]), .prog_cycles(cyc[2]),
    .checks(chk[2]), .failures(fail[2]), .n_s_write(sw[2]), .n_t_write(tw[2]), .n_t_read(tr[2]), .n_xfer(xf[2]), .n_refused(rf[2]));
  hc_rf_workload #(.REMAP(1'b1), .GTO(1'b1)) u_gto_remap (.clk, .done(done[3]), .prog_cycles(cyc[3]),
    .checks(chk[3]), .failures(fail[3]), .n_s_write(sw[3]), .n_t_write(tw[3]), .n_t_read(tr[3]), .n_xfer(xf[3]), .n_refused(rf[3]));

  int checks = 0, failures = 0;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1;
    wait (done[0] && done[1] && done[2] && done[3]);
    for (int i = 0; i < 4; i++) begin
      $display("%s: %0d cycles, %0d S-Writes, %0d T-Writes, %0d T-Reads, %0d swaps, %0d refused, %0d operand checks",
               name[i], cyc[i], sw[i], tw[i], tr[i], xf[i], rf[i], chk[i]);
      checks += chk[i];
      failures += fail[i];
    end
    // the initial fill writes 480 registers to STT-RAM in every run; the
    // program itself should add few T-Writes when remapping is on
    for (int s = 0; s < 2; s++) begin
      checks++;
      if ((tw[2*s+1] - 480) * 4 > (tw[2*s] - 480)) begin
        failures++;
        $display("%s: remapping did not remove most T-Writes", name[2*s+1]);
      end
      checks++;
      if (xf[2*s+1] == 0 || xf[2*s] != 0) failures++;
    end
    checks++;
    if (cyc[1] > cyc[0]) begin
      failures++;
      $display("LRR with remapping slower than with the static mapping");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
