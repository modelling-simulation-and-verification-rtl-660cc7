// adb_ring_counter: 2-bit 4-phase adiabatic twisted ring (Johnson) counter.
//
// Two adiabatic D flip-flops (adb_dff) form the ring: Q1 takes Q0, and Q0
// takes the inverse of Q1, which in dual rail is a swap of Q1's rails. Out
// of reset the counter steps (Q0,Q1) = 00, 10, 11, 01, 00, ... one step per
// power-clock cycle, and it starts from the all-zeros state. The two flip-
// flops and the twisted feedback follow the description of the counter; its
// gate-level design is not given, so this structure is this design's.
//
// Reset is a plain step signal, not a converted adiabatic input: res_step = 0
// holds both bits at 0. Inside, the step selects which rail of the reset
// input carries the PC4 waveform (an adiabatic constant 1 or 0 for the PC1
// stage), which is this design's way to feed a step into the AND stage. The
// step is registered while PC4 is idle, so a step that arrives mid-cycle
// never cuts a trapezoid short; it takes effect from the next PC4 cycle.
//
// Interface: pc[k] is PC(k+1). q0, q1 (and the stage taps q0_stage,
// q1_stage) are dual-rail PC4-phase signals; their value is read in the
// Hold period of PC4.
module adb_ring_counter
  import adiabatic_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  level_t [NPHASE-1:0]    pc,
  input  logic                   res_step,   // 0: reset, 1: count
  output dr_t                    q0,
  output dr_t                    q1,
  output dr_t    [NPHASE-1:0]    q0_stage,
  output dr_t    [NPHASE-1:0]    q1_stage,
  output logic                   timing_err,
  output logic                   invalid_in
);

  dr_t  res;
  logic res_q;
  logic te0, te1, iv0, iv1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                  res_q <= 1'b0;
    else if (pc[NPHASE-1] == L0) res_q <= res_step;
  end

  assign res.t = res_q ? pc[NPHASE-1] : L0;
  assign res.f = res_q ? L0 : pc[NPHASE-1];

  adb_dff u_bit0 (
    .clk, .rst_n, .pc, .d(dr_not(q1_stage[NPHASE-1])), .res,
    .q(q0_stage), .timing_err(te0), .invalid_in(iv0)
  );

  adb_dff u_bit1 (
    .clk, .rst_n, .pc, .d(q0_stage[NPHASE-1]), .res,
    .q(q1_stage), .timing_err(te1), .invalid_in(iv1)
  );

  assign q0 = q0_stage[NPHASE-1];
  assign q1 = q1_stage[NPHASE-1];
  assign timing_err = te0 | te1;
  assign invalid_in = iv0 | iv1;

endmodule
