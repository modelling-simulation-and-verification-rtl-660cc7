// tb_adiabatic_pkg: self-checking testbench of the shared package.
//
// Checks the functions one by one against tables written out here: the
// power-clock level of each period, the 90 degree shift of period_at, the
// four edge functions over all 16 (previous, present) level pairs, the
// power-clock period decoder, level AND / OR over all pairs (minimum and
// maximum of 0 < X < 1, Z losing to a controlling value and winning
// otherwise), and the dual-rail helpers. A watchdog ends the run.
module tb_adiabatic_pkg;
  import adiabatic_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // rank for min/max on the three proper levels
  function automatic int rank(input level_t l);
    return (l == L0) ? 0 : (l == LX) ? 1 : 2;
  endfunction

  initial begin
    level_t lv [4] = '{L0, LX, L1, LZ};
    level_t e_and, e_or;
    pc_decode_t d;
    dr_t x;
    check(period_level(P_IDLE) == L0, "idle level");
    check(period_level(P_EVALUATE) == LX, "evaluate level");
    check(period_level(P_HOLD) == L1, "hold level");
    check(period_level(P_RECOVERY) == LX, "recovery level");
    for (int c = 0; c < 4; c++)
      for (int k = 0; k < 4; k++)
        check(int'(period_at(2'(c), 2'(k))) == (c - k + 4) % 4, "period_at");
    for (int p = 0; p < 4; p++)
      check(int'(next_period(period_t'(p))) == (p + 1) % 4, "next_period");
    for (int i = 0; i < 4; i++) begin
      for (int j = 0; j < 4; j++) begin
        check(evaluate_edge(lv[i], lv[j]) == (i == 0 && j == 1), "evaluate_edge");
        check(hold_edge(lv[i], lv[j])     == (i == 1 && j == 2), "hold_edge");
        check(recovery_edge(lv[i], lv[j]) == (i == 2 && j == 1), "recovery_edge");
        check(idle_edge(lv[i], lv[j])     == (i == 1 && j == 0), "idle_edge");
        check(edge_into(P_HOLD, lv[i], lv[j]) == hold_edge(lv[i], lv[j]), "edge_into");
        check(edge_into(P_IDLE, lv[i], lv[j]) == idle_edge(lv[i], lv[j]), "edge_into idle");
        // level AND / OR
        if (i == 0 || j == 0)      e_and = L0;
        else if (i == 3 || j == 3) e_and = LZ;
        else                       e_and = lv[(rank(lv[i]) < rank(lv[j])) ? i : j];
        if (i == 2 || j == 2)      e_or = L1;
        else if (i == 3 || j == 3) e_or = LZ;
        else                       e_or = lv[(rank(lv[i]) > rank(lv[j])) ? i : j];
        check(level_and(lv[i], lv[j]) == e_and, "level_and");
        check(level_or(lv[i], lv[j]) == e_or, "level_or");
      end
    end
    d = pc_period(L0, LX); check(d.valid && d.p == P_EVALUATE, "decode evaluate");
    d = pc_period(L1, LX); check(d.valid && d.p == P_RECOVERY, "decode recovery");
    d = pc_period(LX, L1); check(d.valid && d.p == P_HOLD, "decode hold");
    d = pc_period(LX, L0); check(d.valid && d.p == P_IDLE, "decode idle");
    d = pc_period(LX, LX); check(!d.valid, "decode ramp after ramp");
    d = pc_period(L0, LZ); check(!d.valid, "decode Z");
    x = dr_not('{t: L1, f: L0}); check(x.t == L0 && x.f == L1, "dr_not");
    x = dr_and('{t: L1, f: L0}, '{t: L0, f: L1}); check(x.t == L0 && x.f == L1, "dr_and 1.0");
    x = dr_or('{t: L1, f: L0}, '{t: L0, f: L1});  check(x.t == L1 && x.f == L0, "dr_or 1+0");
    check(dr_decode('{t: L1, f: L0}) == 2'b11, "decode 1");
    check(dr_decode('{t: L0, f: L1}) == 2'b10, "decode 0");
    check(!dr_decode('{t: L1, f: L1}).valid, "decode invalid 11");
    check(!dr_decode('{t: L0, f: L0}).valid, "decode invalid 00");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
