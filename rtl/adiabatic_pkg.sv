// adiabatic_pkg: shared types and functions for the multi-level model of
// 4-phase adiabatic logic.
//
// A trapezoidal power-clock is cut into four equal periods: Idle, Evaluate,
// Hold and Recovery. In the multi-level encoding Hold is the level '1', Idle
// the level '0', and both ramps (Evaluate and Recovery) the intermediate
// level 'X'. An adiabatic signal carrying logic 1 has the same waveform as the
// power-clock that drives it; logic 0 stays at '0'. Signals are dual rail:
// a true rail and a complement rail.
//
// Because the simulator used for this model has only two states, the four
// levels are an enum of their own (L0, LX, L1 and LZ). LZ is the high
// impedance level a gate drives when both of its input rails are active.
//
// A ramp level alone does not tell Evaluate from Recovery: the level that
// came before does. The edge functions below therefore take the previous and
// the current level of a signal, as the modelling method's edge functions
// do. Level AND is the minimum
// and level OR the maximum of 0 < X < 1, the same as the IEEE std_logic
// tables for those three values; LZ is this design's own addition and loses
// against a controlling value and wins otherwise.
package adiabatic_pkg;

  // Signal level of one rail.
  typedef enum logic [1:0] {
    L0 = 2'd0,   // ground
    LX = 2'd1,   // ramp (evaluate or recovery)
    L1 = 2'd2,   // full supply (hold)
    LZ = 2'd3    // high impedance: invalid, both input rails active
  } level_t;

  // Power-clock period. The numbering follows the 2-bit count of PC1:
  // count 00 Idle, 01 Evaluate, 10 Hold, 11 Recovery.
  typedef enum logic [1:0] {
    P_IDLE     = 2'd0,
    P_EVALUATE = 2'd1,
    P_HOLD     = 2'd2,
    P_RECOVERY = 2'd3
  } period_t;

  // Dual-rail adiabatic signal: t is the true rail (A, Out), f the
  // complement rail (Ab, Outb).
  typedef struct packed {
    level_t t;
    level_t f;
  } dr_t;

  localparam int unsigned NPHASE = 4;

  // Level of a power-clock in a given period.
  function automatic level_t period_level(input period_t p);
    unique case (p)
      P_IDLE:     return L0;
      P_EVALUATE: return LX;
      P_HOLD:     return L1;
      default:    return LX;
    endcase
  endfunction

  // Period of power-clock PC(phase+1) at base count cnt: each successive
  // power-clock is shifted by one count.
  function automatic period_t period_at(input logic [1:0] cnt, input logic [1:0] phase);
    logic [1:0] p;
    p = cnt - phase;
    return period_t'(p);
  endfunction

  function automatic period_t next_period(input period_t p);
    return period_t'(2'(p) + 2'd1);
  endfunction

  // Edge functions: a transition from `last` to `cur` that enters the period.
  function automatic logic evaluate_edge(input level_t last, input level_t cur);
    return (last == L0) && (cur == LX);
  endfunction

  function automatic logic hold_edge(input level_t last, input level_t cur);
    return (last == LX) && (cur == L1);
  endfunction

  function automatic logic recovery_edge(input level_t last, input level_t cur);
    return (last == L1) && (cur == LX);
  endfunction

  function automatic logic idle_edge(input level_t last, input level_t cur);
    return (last == LX) && (cur == L0);
  endfunction

  // Edge into period p.
  function automatic logic edge_into(input period_t p, input level_t last, input level_t cur);
    unique case (p)
      P_IDLE:     return idle_edge(last, cur);
      P_EVALUATE: return evaluate_edge(last, cur);
      P_HOLD:     return hold_edge(last, cur);
      default:    return recovery_edge(last, cur);
    endcase
  endfunction

  // Period of a power-clock seen as a level, given its previous level.
  // valid is 0 when the pair cannot occur on a well-formed power-clock
  // (a ramp after a ramp, or any LZ).
  typedef struct packed {
    logic    valid;
    period_t p;
  } pc_decode_t;

  function automatic pc_decode_t pc_period(input level_t last, input level_t cur);
    pc_decode_t d;
    d.valid = 1'b1;
    d.p     = P_IDLE;
    unique case (cur)
      L0: d.p = P_IDLE;
      L1: d.p = P_HOLD;
      LX: begin
        if (last == L0)      d.p = P_EVALUATE;
        else if (last == L1) d.p = P_RECOVERY;
        else                 d.valid = 1'b0;
      end
      default: d.valid = 1'b0;
    endcase
    return d;
  endfunction

  // Level AND (minimum of 0 < X < 1).
  function automatic level_t level_and(input level_t a, input level_t b);
    if (a == L0 || b == L0) return L0;
    if (a == LZ || b == LZ) return LZ;
    return (a == LX || b == LX) ? LX : L1;
  endfunction

  // Level OR (maximum of 0 < X < 1).
  function automatic level_t level_or(input level_t a, input level_t b);
    if (a == L1 || b == L1) return L1;
    if (a == LZ || b == LZ) return LZ;
    return (a == LX || b == LX) ? LX : L0;
  endfunction

  // Dual-rail inversion is a swap of the rails.
  function automatic dr_t dr_not(input dr_t a);
    dr_t r;
    r.t = a.f;
    r.f = a.t;
    return r;
  endfunction

  // Dual-rail AND and OR built from level operations: the true rail of AND is
  // the AND of the true rails, its complement rail the OR of the complements.
  function automatic dr_t dr_and(input dr_t a, input dr_t b);
    dr_t r;
    r.t = level_and(a.t, b.t);
    r.f = level_or(a.f, b.f);
    return r;
  endfunction

  function automatic dr_t dr_or(input dr_t a, input dr_t b);
    dr_t r;
    r.t = level_or(a.t, b.t);
    r.f = level_and(a.f, b.f);
    return r;
  endfunction

  // Logic value of a dual-rail signal seen in its hold period.
  // valid is 0 unless exactly one rail is at L1 and the other at L0.
  typedef struct packed {
    logic valid;
    logic value;
  } dr_value_t;

  function automatic dr_value_t dr_decode(input dr_t a);
    dr_value_t v;
    v.valid = ((a.t == L1) && (a.f == L0)) || ((a.t == L0) && (a.f == L1));
    v.value = (a.t == L1);
    return v;
  endfunction

endpackage
