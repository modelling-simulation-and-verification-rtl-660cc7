// tb_adiabatic_top: end-to-end testbench of the whole model at its default
// (and only) size.
//
// One loop runs power-clock cycle by power-clock cycle. In the Hold period
// of PC4 it reads both counters; in the Hold period of PC1 it reads the
// library cells and then applies new pulse inputs to all three designs.
// Expected values come from reference models written here:
//   * library cells: the value of A, B, S applied one cycle earlier through
//     the Boolean function of each cell; a cell reads '1' on its true rail
//     for logic 1, on the complement rail for logic 0;
//   * ring counter: Johnson sequence, reset two readings after the step;
//   * up/down counter: +1 / -1 mod 8, reset two readings and direction three
//     readings after they are applied.
// Each mechanism is counted and must occur: both counter resets, up and
// down counting, both wraps, direction changes, all four ring states, both
// logic values on each cell, and the two invalid-input encodings of the
// NOT/BUF cell (both inputs 1 -> 'Z' on both rails, both 0 -> both '0').
// A watchdog ends the run.
module tb_adiabatic_top;
  import adiabatic_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic lib_a_p, lib_a_n, lib_b_p, lib_b_n, lib_s_p, lib_s_n;
  logic ring_res, ud_res_p, ud_res_n, ud_cu, ud_cd;
  logic [1:0] cnt;
  level_t [NPHASE-1:0] pc;
  dr_t lib_a, lib_buf, lib_and, lib_or, lib_xor, lib_mux, lib_dmx0, lib_dmx1;
  logic [5:0] lib_te, lib_iv;
  dr_t ring_q0, ring_q1;
  dr_t [NPHASE-1:0] ring_s0, ring_s1, ud_s0, ud_s1, ud_s2;
  logic ring_te, ring_iv, ud_te, ud_iv;
  dr_t [2:0] ud_q;

  int checks = 0, failures = 0;

  // mechanism counters
  int m_ring_reset = 0, m_ring_step = 0;
  int m_ring_state [4] = '{0, 0, 0, 0};
  int m_ud_reset = 0, m_up = 0, m_down = 0, m_wrap_up = 0, m_wrap_down = 0, m_switch = 0;
  int m_lib_one [6] = '{0, 0, 0, 0, 0, 0};
  int m_lib_zero [6] = '{0, 0, 0, 0, 0, 0};
  int m_inv_z = 0, m_inv_0 = 0;

  always #5 clk = ~clk;

  adiabatic_top dut (
    .clk, .rst_n,
    .lib_a_p, .lib_a_n, .lib_b_p, .lib_b_n, .lib_s_p, .lib_s_n,
    .ring_res, .ud_res_p, .ud_res_n, .ud_cu, .ud_cd,
    .cnt, .pc,
    .lib_a, .lib_buf, .lib_and, .lib_or, .lib_xor, .lib_mux, .lib_dmx0, .lib_dmx1,
    .lib_timing_err(lib_te), .lib_invalid_in(lib_iv),
    .ring_q0, .ring_q1, .ring_q0_stage(ring_s0), .ring_q1_stage(ring_s1),
    .ring_timing_err(ring_te), .ring_invalid_in(ring_iv),
    .ud_q, .ud_q0_stage(ud_s0), .ud_q1_stage(ud_s1), .ud_q2_stage(ud_s2),
    .ud_timing_err(ud_te), .ud_invalid_in(ud_iv)
  );

  task automatic check(input logic ok, input string what, input int n);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL cycle %0d: %s", n, what);
    end
  endtask

  // check one cell output in the PC1 Hold period against logic value v
  task automatic check_cell(input dr_t y, input logic v, input int idx, input int n);
    dr_value_t d;
    d = dr_decode(y);
    check(d.valid && d.value == v, $sformatf("cell %0d value", idx), n);
    if (v) m_lib_one[idx]++; else m_lib_zero[idx]++;
  endtask

  localparam int NCYC = 200;
  logic ring_hist [0:NCYC];
  logic res_hist  [0:NCYC];
  logic cu_hist   [0:NCYC];

  initial begin
    logic [1:0] ring_ref;   // {Q1, Q0}
    logic [2:0] ud_ref, prev;
    logic [1:0] la;         // applied {p, n} of A
    logic va, vb, vs, lib_valid;
    dr_value_t r0, r1, u [3];
    {lib_a_p, lib_a_n, lib_b_p, lib_b_n, lib_s_p, lib_s_n} = 6'b0;
    {ring_res, ud_res_p, ud_cu} = 3'b000;
    ud_res_n = 1'b1; ud_cd = 1'b1;
    ring_ref = 2'b00; ud_ref = 3'd0;
    la = 2'b00; va = 1'b0; vb = 1'b0; vs = 1'b0; lib_valid = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < NCYC; n++) begin
      // ---- PC4 Hold: read the counters ----
      do @(negedge clk); while (pc[3] != L1);
      if (n >= 3) begin
        r0 = dr_decode(ring_q0);
        r1 = dr_decode(ring_q1);
        if (!ring_hist[n-2]) begin ring_ref = 2'b00; m_ring_reset++; end
        else begin ring_ref = {ring_ref[0], ~ring_ref[1]}; m_ring_step++; end
        check(r0.valid && r1.valid && {r1.value, r0.value} == ring_ref, "ring counter value", n);
        m_ring_state[ring_ref]++;
        check(!ring_te && !ring_iv, "ring counter flags", n);

        for (int b = 0; b < 3; b++) u[b] = dr_decode(ud_q[b]);
        prev = ud_ref;
        if (!res_hist[n-2]) begin ud_ref = 3'd0; m_ud_reset++; end
        else if (cu_hist[n-3]) begin
          ud_ref = prev + 3'd1; m_up++;
          if (prev == 3'd7) m_wrap_up++;
          if (!cu_hist[n-4] && res_hist[n-3]) m_switch++;
        end else begin
          ud_ref = prev - 3'd1; m_down++;
          if (prev == 3'd0) m_wrap_down++;
          if (cu_hist[n-4] && res_hist[n-3]) m_switch++;
        end
        check(u[0].valid && u[1].valid && u[2].valid &&
              {u[2].value, u[1].value, u[0].value} == ud_ref, "up/down counter value", n);
        check(!ud_te && !ud_iv, "up/down counter flags", n);
      end
      // ---- PC1 Hold: read the library cells ----
      do @(negedge clk); while (pc[0] != L1);
      if (n >= 2) begin
        check(lib_te == '0, "library timing flags", n);
        if (la == 2'b11) begin
          check(lib_buf == '{t: LZ, f: LZ}, "NOT/BUF both inputs 1 gives Z", n);
          check(lib_iv[0], "NOT/BUF invalid flag", n);
          m_inv_z++;
        end else if (la == 2'b00) begin
          check(lib_buf == '{t: L0, f: L0}, "NOT/BUF both inputs 0 gives 0", n);
          m_inv_0++;
        end else if (lib_valid) begin
          check_cell(lib_buf, va, 0, n);
          check_cell(lib_and, va & vb, 1, n);
          check_cell(lib_or, va | vb, 2, n);
          check_cell(lib_xor, va ^ vb, 3, n);
          check_cell(lib_mux, vs ? vb : va, 4, n);
          check_cell(lib_dmx0, va & ~vs, 5, n);
          check_cell(lib_dmx1, va & vs, 5, n);
          check(lib_iv == '0, "library invalid flags", n);
        end
      end
      // ---- apply the next inputs (PC2 Evaluate) ----
      va = 1'($urandom); vb = 1'($urandom); vs = 1'($urandom);
      la = {va, ~va};
      if (n % 11 == 5) la = 2'b11;
      if (n % 13 == 7) la = 2'b00;
      lib_valid = (la == 2'b10 || la == 2'b01);
      {lib_a_p, lib_a_n} = la;
      lib_b_p = vb; lib_b_n = ~vb;
      lib_s_p = vs; lib_s_n = ~vs;
      ring_res = !(n < 4 || (n >= 50 && n < 53));
      ud_res_p = !(n < 5 || (n >= 120 && n < 122));
      ud_res_n = ~ud_res_p;
      ud_cu = (n < 30) ? 1'b0 : (n < 60) ? 1'b1 : (((n / 9) % 2) == 1);
      ud_cd = ~ud_cu;
      ring_hist[n] = ring_res;
      res_hist[n]  = ud_res_p;
      cu_hist[n]   = ud_cu;
    end
    // every mechanism must have happened
    check(m_ring_reset > 0 && m_ring_step > 0, "ring reset and stepping happened", NCYC);
    for (int s = 0; s < 4; s++) check(m_ring_state[s] > 0, "ring state reached", NCYC);
    check(m_ud_reset > 0, "up/down reset happened", NCYC);
    check(m_up > 0 && m_down > 0, "counting up and down happened", NCYC);
    check(m_wrap_up > 0 && m_wrap_down > 0, "both wraps happened", NCYC);
    check(m_switch >= 2, "direction changes happened", NCYC);
    for (int c = 0; c < 6; c++) check(m_lib_one[c] > 0 && m_lib_zero[c] > 0, "cell values", NCYC);
    check(m_inv_z > 0 && m_inv_0 > 0, "invalid input cases happened", NCYC);
    $display("ring: reset %0d step %0d | up/down: reset %0d up %0d down %0d wrap+ %0d wrap- %0d switch %0d | invalid Z %0d 0 %0d",
             m_ring_reset, m_ring_step, m_ud_reset, m_up, m_down, m_wrap_up, m_wrap_down, m_switch, m_inv_z, m_inv_0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4 * (NCYC + 20)) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
