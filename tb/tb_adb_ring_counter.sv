// tb_adb_ring_counter: self-checking testbench of the 2-bit twisted ring
// counter.
//
// The counter starts from the all-zeros state with the step reset low. Its
// outputs are read once per power-clock cycle, in the Hold period of PC4,
// and decoded from dual rail. A reference Johnson counter, (Q0,Q1) -> (not
// Q1, Q0), runs alongside. The reset step is changed right after a reading;
// it is registered at the start of the next PC4 cycle and passes four gates,
// so it governs the reading two cycles later. Every reading must be a valid
// dual-rail value equal to the reference; the error flags must stay low.
// The full cycle 00, 10, 11, 01 must be seen. A watchdog ends the run.
module tb_adb_ring_counter;
  import adiabatic_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [1:0] cnt;
  level_t [NPHASE-1:0] pc;
  logic res_step;
  dr_t q0, q1;
  dr_t [NPHASE-1:0] s0, s1;
  logic te, iv;
  int checks = 0, failures = 0;
  int seen [4] = '{0, 0, 0, 0};
  int n_reset = 0, n_step = 0;

  always #5 clk = ~clk;

  adb_pcgen u_pcgen (.clk, .rst_n, .cnt, .pc);
  adb_ring_counter dut (.clk, .rst_n, .pc, .res_step, .q0, .q1,
                        .q0_stage(s0), .q1_stage(s1), .timing_err(te), .invalid_in(iv));

  // reset level applied after reading n
  logic res_hist [0:255];

  initial begin
    dr_value_t v0, v1;
    logic [1:0] ref_s;   // {Q1, Q0}
    int n;
    res_step = 1'b0;
    ref_s = 2'b00;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    n = 0;
    while (n < 120) begin
      @(negedge clk);
      if (pc[3] != L1) continue;
      v0 = dr_decode(q0);
      v1 = dr_decode(q1);
      if (n >= 2) begin
        if (res_hist[n-2] == 1'b0) begin
          ref_s = 2'b00;
          n_reset++;
        end else begin
          ref_s = {ref_s[0], ~ref_s[1]};
          n_step++;
        end
        checks++;
        if (!v0.valid || !v1.valid || {v1.value, v0.value} != ref_s) begin
          failures++;
          $display("FAIL reading %0d: q0=%p q1=%p expected Q1Q0=%b", n, q0, q1, ref_s);
        end
        seen[{v1.value, v0.value}]++;
        checks++;
        if (te || iv) begin
          failures++; $display("FAIL reading %0d flags te=%0b iv=%0b", n, te, iv);
        end
      end
      // reset low for readings 0..5 and 60..62, high otherwise
      res_step = !(n < 6 || (n >= 60 && n < 63));
      res_hist[n] = res_step;
      n++;
    end
    for (int s = 0; s < 4; s++) begin
      checks++;
      if (seen[s] == 0) begin failures++; $display("FAIL state %b never seen", s); end
    end
    checks++;
    if (n_reset == 0 || n_step == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4 * 140) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
