// adb_notbuf: behavioural core of a dual-rail PFAL NOT/BUF adiabatic gate.
//
// The gate's output rails follow its power-clock: in a valid cycle the rail
// selected by the input (Out for A, Outb for Ab) traces the trapezoid and the
// other rail stays at '0'. Out is the buffer and Outb the inverter output.
// The input must run one phase ahead of the power-clock: it has to be in Hold
// while the power-clock evaluates, in Recovery while it holds, and so on.
//
// Rules, checked for each period of the power-clock:
//   * Idle: both outputs '0'.
//   * Evaluate / Hold / Recovery: a rail follows the power-clock only if its
//     input rail made the transition that matches the input's own period;
//     both input rails making it (both inputs at 1) drive 'Z' on both
//     outputs; neither (both inputs at 0, or a misplaced input) leaves both
//     outputs at '0', the inactive state. An LZ on an input rail is passed on
//     as 'Z' on both outputs.
// These rules follow the modelling approach; the propagation of LZ is this
// design's own addition.
//
// Timing: every level in this model is constant over a period and changes
// on the clock edge that starts the next one. To keep all gate outputs in
// registers (the counters close loops through chains of gates), the output
// of period n+1 is registered on the edge that ends period n. It is decided
// from the input's transition into period n, which in a well-formed cycle is
// the transition one phase before the one checked in the same period; the
// power-clock period of n+1 is the successor of the one decoded now. The
// waveforms are the same as with a same-period check; an input placed a
// phase early or late produces no output either way.
//
// The timing check of the flow (adiabatic principle) is done on the present
// period: timing_err is 1 when an active input rail is not in the period one
// phase ahead of the power-clock. invalid_in is 1 when both input rails are
// active or one is LZ. Both are combinational from registers and inputs.
// rst_n clears all levels to '0' (the all-zeros state); the previous power-
// clock level resets to LZ ("unknown") so a ramp seen first is not decoded.
module adb_notbuf
  import adiabatic_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  level_t pc,          // power-clock of this gate
  input  dr_t    a,           // dual-rail adiabatic input (A, Ab)
  output dr_t    out,         // dual-rail output (Out, Outb)
  output logic   timing_err,  // input not one phase ahead of pc
  output logic   invalid_in   // complementary inputs equal or Z
);

  level_t     pc_last;
  dr_t        a_last;
  pc_decode_t pcd;
  period_t    p_next;
  level_t     lvl_next;
  logic       t_edge, f_edge;
  dr_t        out_next;

  assign pcd      = pc_period(pc_last, pc);
  assign p_next   = next_period(pcd.p);
  assign lvl_next = period_level(p_next);
  // The input is one phase ahead, so its period now is the power-clock's next one.
  assign t_edge   = edge_into(p_next, a_last.t, a.t);
  assign f_edge   = edge_into(p_next, a_last.f, a.f);

  always_comb begin
    out_next = '{t: L0, f: L0};
    if (!pcd.valid || p_next == P_IDLE) begin
      out_next = '{t: L0, f: L0};
    end else if (a.t == LZ || a.f == LZ) begin
      out_next = '{t: LZ, f: LZ};
    end else if (t_edge && f_edge) begin
      out_next = '{t: LZ, f: LZ};
    end else if (t_edge) begin
      out_next = '{t: lvl_next, f: L0};
    end else if (f_edge) begin
      out_next = '{t: L0, f: lvl_next};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc_last <= LZ;
      a_last  <= '{t: L0, f: L0};
      out     <= '{t: L0, f: L0};
    end else begin
      pc_last <= pc;
      a_last  <= a;
      out     <= out_next;
    end
  end

  // A rail is well placed if it is inactive (at '0' now and before) or if it
  // has just entered the period that runs one phase ahead of the power-clock.
  function automatic logic rail_ok(input period_t want, input level_t last, input level_t cur);
    return ((last == L0) && (cur == L0)) || edge_into(want, last, cur);
  endfunction

  assign invalid_in = (a.t == LZ) || (a.f == LZ) ||
                      ((a.t != L0 || a_last.t != L0) && (a.f != L0 || a_last.f != L0));
  assign timing_err = pcd.valid && (a.t != LZ) && (a.f != LZ) &&
                      !(rail_ok(p_next, a_last.t, a.t) && rail_ok(p_next, a_last.f, a.f));

  // Dual-rail rule: the two output rails are never both driven by the
  // power-clock; a valid output has exactly one active rail, an invalid one
  // is 'Z' on both or '0' on both.
  a_one_rail: assert property (@(posedge clk) disable iff (!rst_n)
    !((out.t == LX || out.t == L1) && (out.f == LX || out.f == L1)))
    else $error("adb_notbuf: both output rails active");

  // An active output rail carries the power-clock level of its own period.
  a_follows_pc: assert property (@(posedge clk) disable iff (!rst_n)
    (out.t == LX || out.t == L1) |-> (out.t == pc))
    else $error("adb_notbuf: output does not follow the power-clock");

endmodule
