// tb_adb_p2a: self-checking testbench of the pulse-to-adiabatic converter.
//
// Four converters, one per PHASE, see the same random pulse pair. For the
// input of PC(k+1) the active rail must trace the waveform of PC(k) (one
// phase ahead): for PHASE 0 that is 'X', '1', 'X', '0' at counts 00..11.
// One value must hold for a whole trapezoid: the value shown in the Hold
// period is the pair that was present at the start of the Evaluate ramp.
// A rail whose pulse is 0 stays '0'; equal pulse inputs are passed on as two
// active or two silent rails. A watchdog ends the run.
module tb_adb_p2a;
  import adiabatic_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [1:0] cnt;
  level_t [NPHASE-1:0] pc;
  logic ip, in_;
  dr_t a [4];
  logic [1:0] at_eval [4];
  int checks = 0, failures = 0;

  level_t wave [4] = '{L0, LX, L1, LX};   // level by period number

  always #5 clk = ~clk;

  adb_pcgen u_pcgen (.clk, .rst_n, .cnt, .pc);
  for (genvar k = 0; k < 4; k++) begin : g_cv
    adb_p2a #(.PHASE(k)) dut (.clk, .rst_n, .cnt, .in_p(ip), .in_n(in_), .a(a[k]));
  end

  initial begin
    int per;
    level_t lv;
    ip = 1'b0; in_ = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 4; k++) at_eval[k] = 2'b00;
    for (int n = 0; n < 400; n++) begin
      // change the pair just before the edge, at a random count
      @(negedge clk);
      if ($urandom % 3 == 0) {ip, in_} = 2'($urandom);
      @(posedge clk);
      #1;
      for (int k = 0; k < 4; k++) begin
        per = (int'(cnt) - (k + 3) + 8) % 4;      // period of PC(k), one ahead
        if (per == 1) at_eval[k] = {ip, in_};      // sampled on this edge
        lv = wave[per];
        if (n < 8) continue;
        checks++;
        if (a[k].t != (at_eval[k][1] ? lv : L0) || a[k].f != (at_eval[k][0] ? lv : L0)) begin
          failures++;
          $display("FAIL PHASE %0d cnt %0d a=%p expected pair %b level %p", k, cnt, a[k], at_eval[k], lv);
        end
      end
    end
    // spot check: PHASE 0, logic 1 in, at count 01 the true rail is at L1
    {ip, in_} = 2'b10;
    repeat (8) @(posedge clk);
    do begin @(posedge clk); #1; end while (cnt != 2'b01);
    checks++;
    if (a[0] != '{t: L1, f: L0}) begin failures++; $display("FAIL spot a=%p cnt=%0d", a[0], cnt); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
