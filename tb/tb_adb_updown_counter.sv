// tb_adb_updown_counter: self-checking testbench of the 3-bit up/down
// counter.
//
// Pulse inputs RES/RESb and CU/CD are converted to adiabatic inputs: the
// reset for the PC1 reset gates, the direction once for the PC2 gates and
// once for the PC3 gate. The count is read once per power-clock cycle, in
// the Hold period of PC4, and decoded from dual rail. A reference counter
// runs alongside: reading n is 0 if the reset applied after reading n-2 was
// low, else reading n-1 plus or minus one (mod 8) by the direction applied
// after reading n-DIR_LAT. Inputs are changed once per cycle in the PC2
// period, after the PC2 direction converter has sampled, so both converters
// take the new direction in the same counter cycle. The run covers reset,
// counting down through the wrap 0 -> 7, counting up through 7 -> 0, and
// direction changes both ways; each must happen. A watchdog ends the run.
module tb_adb_updown_counter;
  import adiabatic_pkg::*;

  localparam int DIR_LAT = 3;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [1:0] cnt;
  level_t [NPHASE-1:0] pc;
  logic res_p, cu;
  dr_t res, dir2, dir3;
  dr_t [2:0] q;
  dr_t [NPHASE-1:0] s0, s1, s2;
  logic te, iv;
  int checks = 0, failures = 0;
  int n_reset = 0, n_up = 0, n_down = 0, n_wrap_up = 0, n_wrap_down = 0, n_switch = 0;

  always #5 clk = ~clk;

  adb_pcgen u_pcgen (.clk, .rst_n, .cnt, .pc);
  adb_p2a #(.PHASE(0)) u_cr (.clk, .rst_n, .cnt, .in_p(res_p), .in_n(~res_p), .a(res));
  adb_p2a #(.PHASE(1)) u_c2 (.clk, .rst_n, .cnt, .in_p(cu), .in_n(~cu), .a(dir2));
  adb_p2a #(.PHASE(2)) u_c3 (.clk, .rst_n, .cnt, .in_p(cu), .in_n(~cu), .a(dir3));
  adb_updown_counter dut (.clk, .rst_n, .pc, .res, .dir_pc2(dir2), .dir_pc3(dir3), .q,
                          .q0_stage(s0), .q1_stage(s1), .q2_stage(s2),
                          .timing_err(te), .invalid_in(iv));

  logic res_hist [0:511];
  logic cu_hist  [0:511];

  // stimulus plan for the inputs applied after reading n
  function automatic logic plan_res(input int n);
    return !(n < 5 || (n >= 70 && n < 72));
  endfunction
  function automatic logic plan_cu(input int n);
    // down first, then up, then alternating stretches
    if (n < 30) return 1'b0;
    if (n < 60) return 1'b1;
    return ((n / 7) % 2) == 1;
  endfunction

  initial begin
    dr_value_t v [3];
    logic [2:0] value, ref_v, prev_ref;
    int n;
    res_p = 1'b0; cu = 1'b0;
    ref_v = 3'd0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    n = 0;
    while (n < 150) begin
      @(negedge clk);
      if (pc[3] != L1) continue;
      for (int b = 0; b < 3; b++) v[b] = dr_decode(q[b]);
      value = {v[2].value, v[1].value, v[0].value};
      if (n >= DIR_LAT) begin
        prev_ref = ref_v;
        if (!res_hist[n-2]) begin
          ref_v = 3'd0; n_reset++;
        end else if (cu_hist[n-DIR_LAT]) begin
          ref_v = prev_ref + 3'd1; n_up++;
          if (prev_ref == 3'd7) n_wrap_up++;
          if (n > DIR_LAT && !cu_hist[n-DIR_LAT-1] && res_hist[n-3]) n_switch++;
        end else begin
          ref_v = prev_ref - 3'd1; n_down++;
          if (prev_ref == 3'd0) n_wrap_down++;
          if (n > DIR_LAT && cu_hist[n-DIR_LAT-1] && res_hist[n-3]) n_switch++;
        end
        checks++;
        if (!(v[0].valid && v[1].valid && v[2].valid) || value != ref_v) begin
          failures++;
          $display("FAIL reading %0d: q=%p decoded %0d expected %0d", n, q, value, ref_v);
        end
        checks++;
        if (te || iv) begin
          failures++; $display("FAIL reading %0d flags te=%0b iv=%0b", n, te, iv);
        end
      end
      // wait for the PC2 period, then apply the inputs
      do @(negedge clk); while (pc[1] != LX || pc[0] != L1);
      res_p = plan_res(n);
      cu    = plan_cu(n);
      res_hist[n] = res_p;
      cu_hist[n]  = cu;
      n++;
    end
    checks++;
    if (n_reset == 0 || n_up == 0 || n_down == 0 || n_wrap_up == 0 || n_wrap_down == 0 || n_switch < 2) begin
      failures++;
    end
    $display("reset %0d up %0d down %0d wrap up %0d wrap down %0d switches %0d",
             n_reset, n_up, n_down, n_wrap_up, n_wrap_down, n_switch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4 * 170) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
