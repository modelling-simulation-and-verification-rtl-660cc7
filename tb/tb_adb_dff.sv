// tb_adb_dff: self-checking testbench of the adiabatic D flip-flop.
//
// d and res are random PC4-phase inputs from converters. Each stage adds one
// phase, so the output of the stage on PC(k+1) in period n carries, on the
// PC(k+1) trapezoid, the value d AND res seen by the converters k+1 periods
// before; the flip-flop output q[3] is the input one full power-clock cycle
// (four periods) later. The expected levels are rebuilt from a history of
// the converted inputs and the present power-clock levels. A watchdog ends
// the run.
module tb_adb_dff;
  import adiabatic_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [1:0] cnt;
  level_t [NPHASE-1:0] pc;
  logic dp, dn, rp, rn;
  dr_t d, res;
  dr_t [NPHASE-1:0] q;
  logic te, iv;
  int checks = 0, failures = 0;
  int n_one = 0, n_zero = 0, n_reset = 0;
  dr_t dh [1:4];
  dr_t rh [1:4];

  always #5 clk = ~clk;

  adb_pcgen u_pcgen (.clk, .rst_n, .cnt, .pc);
  adb_p2a #(.PHASE(0)) u_cd (.clk, .rst_n, .cnt, .in_p(dp), .in_n(dn), .a(d));
  adb_p2a #(.PHASE(0)) u_cr (.clk, .rst_n, .cnt, .in_p(rp), .in_n(rn), .a(res));
  adb_dff dut (.clk, .rst_n, .pc, .d, .res, .q, .timing_err(te), .invalid_in(iv));

  always @(posedge clk) begin
    dh[1] <= d;   rh[1] <= res;
    for (int i = 2; i <= 4; i++) begin
      dh[i] <= dh[i-1];
      rh[i] <= rh[i-1];
    end
  end

  initial begin
    logic v;
    dr_t e;
    {dp, dn, rp, rn} = 4'b0110;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 800; n++) begin
      @(negedge clk);
      if (n % 3 == 0) begin
        dp = 1'($urandom); dn = ~dp;
        rp = ($urandom % 4 != 0); rn = ~rp;
      end
      if (n < 12) continue;
      for (int k = 0; k < 4; k++) begin
        v = (dh[k+1].t != L0) && (rh[k+1].t != L0);
        e = v ? '{t: pc[k], f: L0} : '{t: L0, f: pc[k]};
        if (pc[k] == L0) e = '{t: L0, f: L0};
        checks++;
        if (q[k] != e) begin
          failures++;
          $display("FAIL n=%0d stage %0d q=%p expected %p", n, k, q[k], e);
        end
        if (k == 3 && pc[3] == L1) begin
          if (rh[4].t == L0) n_reset++;
          else if (v) n_one++;
          else n_zero++;
        end
      end
      checks++;
      if (te || iv) begin
        failures++; $display("FAIL n=%0d flags te=%0b iv=%0b", n, te, iv);
      end
    end
    checks++;
    if (n_one == 0 || n_zero == 0 || n_reset == 0) failures++;
    $display("stored 1: %0d, stored 0: %0d, reset: %0d", n_one, n_zero, n_reset);
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
