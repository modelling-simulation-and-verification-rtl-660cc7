// tb_adb_notbuf: self-checking testbench of the NOT/BUF adiabatic core.
//
// dut takes a correctly phased PC1 input from a converter. Its output in
// period n must equal the converted input of period n-1 (a one-phase delay):
// logic 1 puts the PC1 trapezoid on Out, logic 0 on Outb. Invalid inputs are
// driven on purpose: both pulse inputs at 1 must give 'Z' on both outputs
// in every non-idle period and raise invalid_in; both at 0 must leave both
// outputs at '0' (inactive). A second core, late, gets an input converted
// for PC2, one phase too late for its PC1 power-clock, and a third core,
// early, one converted for PC4, one phase too early: both must raise
// timing_err and never drive an output. A watchdog ends the run.
module tb_adb_notbuf;
  import adiabatic_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [1:0] cnt;
  level_t [NPHASE-1:0] pc;
  logic ip, in_;
  dr_t a, a_late, a_early, y, y_late, y_early, a_d;
  logic te, iv, te_late, iv_late, te_early, iv_early;
  int checks = 0, failures = 0;
  int n_one = 0, n_zero = 0, n_z = 0, n_inact = 0, n_terr = 0, n_terr_early = 0;

  always #5 clk = ~clk;

  adb_pcgen u_pcgen (.clk, .rst_n, .cnt, .pc);
  adb_p2a #(.PHASE(0)) u_cv  (.clk, .rst_n, .cnt, .in_p(ip), .in_n(in_), .a(a));
  adb_p2a #(.PHASE(1)) u_cvl (.clk, .rst_n, .cnt, .in_p(ip), .in_n(in_), .a(a_late));
  adb_p2a #(.PHASE(3)) u_cve (.clk, .rst_n, .cnt, .in_p(ip), .in_n(in_), .a(a_early));
  adb_notbuf early (.clk, .rst_n, .pc(pc[0]), .a(a_early), .out(y_early),
                    .timing_err(te_early), .invalid_in(iv_early));
  adb_notbuf dut  (.clk, .rst_n, .pc(pc[0]), .a(a), .out(y), .timing_err(te), .invalid_in(iv));
  adb_notbuf late (.clk, .rst_n, .pc(pc[0]), .a(a_late), .out(y_late),
                   .timing_err(te_late), .invalid_in(iv_late));

  always @(posedge clk) a_d <= a;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL t=%0t cnt=%0d %s: y=%p a_d=%p", $time, cnt, what, y, a_d);
    end
  endtask

  initial begin
    logic [1:0] pair;
    ip = 1'b0; in_ = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 800; n++) begin
      @(negedge clk);
      if (n % 4 == 2) begin
        // mostly valid pairs, sometimes 11 or 00
        pair = 2'($urandom);
        if ((n / 4) % 3 != 0) pair = {pair[0], ~pair[0]};
        {ip, in_} = pair;
      end
      if (n < 8) continue;
      if (pc[0] == L0) begin
        check(y == '{t: L0, f: L0}, "idle output");
      end else if (a_d.t != L0 && a_d.f != L0) begin
        check(y == '{t: LZ, f: LZ}, "both inputs 1 -> Z");
        n_z++;
      end else begin
        check(y == a_d, "one-phase delayed copy");
        if (a_d.t != L0) n_one++;
        else if (a_d.f != L0) n_zero++;
        else if (pc[0] == L1) n_inact++;
      end
      // invalid_in: both rails active in this or the previous period
      check(iv == ((a.t != L0 || a_d.t != L0) && (a.f != L0 || a_d.f != L0)), "invalid_in flag");
      check(!te, "no timing error on a well-phased input");
      // the late core must never drive anything
      check(y_late == '{t: L0, f: L0}, "late input gives no output");
      if (te_late) n_terr++;
      check(y_early == '{t: L0, f: L0}, "early input gives no output");
      if (te_early) n_terr_early++;
    end
    check(n_one > 0 && n_zero > 0, "both logic values seen");
    check(n_z > 0, "Z case seen");
    check(n_inact > 0, "inactive case seen");
    check(n_terr > 0, "timing error seen on the late input");
    check(n_terr_early > 0, "timing error seen on the early input");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
