// adb_updown_counter: 3-bit dual-rail 4-phase adiabatic up/down counter.
//
// Each bit is an adiabatic D flip-flop (adb_dff: reset AND gate on PC1, then
// buffers on PC2, PC3, PC4). Stage outputs are named Qb1, Qb2, Qb3 and Qb
// after the bit b, as in the counter's circuit diagram. The next-state logic
// sits between the chains so that every gate takes its inputs from the phase
// before its own:
//   bit 0: D0 = not Q0 (a swap of the rails fed back from Q0).
//   bit 1: XOR on PC3 of Q02 and the direction, then XOR on PC4 with Q13:
//          D1 = Q1 xor Q0 xor CD.
//   bit 2: on PC2, from Q01, Q11, Q21 and the direction: a = Q0.CU,
//          b = Q2 xor Q1, c = not Q0 . CD, d = CU xor Q0; on PC3 the products
//          a.b, c.(not b) and Q22.d; on PC4 a 3-input OR gives D2.
//          D2 = Q2 xor (CU ? Q0.Q1 : not Q0 . not Q1).
// The gate types, their phases and their inputs follow the circuit diagram.
// Which rail of a dual-rail pair enters each gate (a rail swap is an
// inversion) is chosen here so that the counter counts as described; the
// Boolean equations themselves are not given with the diagram.
//
// Direction (CU, CD) is a dual-rail pair, CU = 1 counting up and CD = 1
// counting down. Its gates sit on PC2 and PC3, so it enters twice: dir_pc2
// must run one phase ahead of PC2 (a PC1-phase waveform), dir_pc3 one phase
// ahead of PC3. res is the dual-rail adiabatic reset (RES, RESb) with a PC4-
// phase waveform; RES = 0 clears the count, RES = 1 lets it count.
//
// Timing: the count changes once per power-clock cycle (four base clock
// periods). The outputs q[b] are PC4-phase dual-rail signals whose value is
// read in the Hold period of PC4.
module adb_updown_counter
  import adiabatic_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  level_t [NPHASE-1:0]    pc,
  input  dr_t                    res,       // RES / RESb
  input  dr_t                    dir_pc2,   // t = CU, f = CD, for PC2 gates
  input  dr_t                    dir_pc3,   // t = CU, f = CD, for PC3 gates
  output dr_t    [2:0]           q,         // Q0, Q1, Q2
  output dr_t    [NPHASE-1:0]    q0_stage,  // Q01, Q02, Q03, Q0
  output dr_t    [NPHASE-1:0]    q1_stage,  // Q11, Q12, Q13, Q1
  output dr_t    [NPHASE-1:0]    q2_stage,  // Q21, Q22, Q23, Q2
  output logic                   timing_err,
  output logic                   invalid_in
);

  localparam int unsigned NGATE = 3 + 2 + 4 + 3 + 1;

  dr_t d1, d2;
  dr_t x1;                   // PC3: Q02 xor CU
  dr_t g_a, g_b, g_c, g_d;   // PC2 gates of bit 2
  dr_t t1, t2, t3;           // PC3 products of bit 2
  logic [NGATE-1:0] te, iv;

  // ---- bit chains ---------------------------------------------------------
  adb_dff u_bit0 (
    .clk, .rst_n, .pc, .d(dr_not(q0_stage[NPHASE-1])), .res,
    .q(q0_stage), .timing_err(te[0]), .invalid_in(iv[0])
  );
  adb_dff u_bit1 (
    .clk, .rst_n, .pc, .d(d1), .res,
    .q(q1_stage), .timing_err(te[1]), .invalid_in(iv[1])
  );
  adb_dff u_bit2 (
    .clk, .rst_n, .pc, .d(d2), .res,
    .q(q2_stage), .timing_err(te[2]), .invalid_in(iv[2])
  );

  // ---- bit 1: D1 = Q1 xor (Q0 xnor CU) ------------------------------------
  adb_xor u_x1 (
    .clk, .rst_n, .pc(pc[2]), .a(q0_stage[1]), .b(dir_pc3), .out(x1),
    .timing_err(te[3]), .invalid_in(iv[3])
  );
  adb_xor u_x2 (
    .clk, .rst_n, .pc(pc[3]), .a(dr_not(x1)), .b(q1_stage[2]), .out(d1),
    .timing_err(te[4]), .invalid_in(iv[4])
  );

  // ---- bit 2, PC2 gates ---------------------------------------------------
  adb_and #(.N(2)) u_a (
    .clk, .rst_n, .pc(pc[1]), .in({dir_pc2, q0_stage[0]}), .out(g_a),
    .timing_err(te[5]), .invalid_in(iv[5])
  );
  adb_xor u_b (
    .clk, .rst_n, .pc(pc[1]), .a(q2_stage[0]), .b(q1_stage[0]), .out(g_b),
    .timing_err(te[6]), .invalid_in(iv[6])
  );
  adb_and #(.N(2)) u_c (
    .clk, .rst_n, .pc(pc[1]), .in({dr_not(dir_pc2), dr_not(q0_stage[0])}), .out(g_c),
    .timing_err(te[7]), .invalid_in(iv[7])
  );
  adb_xor u_d (
    .clk, .rst_n, .pc(pc[1]), .a(dir_pc2), .b(q0_stage[0]), .out(g_d),
    .timing_err(te[8]), .invalid_in(iv[8])
  );

  // ---- bit 2, PC3 products ------------------------------------------------
  adb_and #(.N(2)) u_t1 (
    .clk, .rst_n, .pc(pc[2]), .in({g_b, g_a}), .out(t1),
    .timing_err(te[9]), .invalid_in(iv[9])
  );
  adb_and #(.N(2)) u_t2 (
    .clk, .rst_n, .pc(pc[2]), .in({dr_not(g_b), g_c}), .out(t2),
    .timing_err(te[10]), .invalid_in(iv[10])
  );
  adb_and #(.N(2)) u_t3 (
    .clk, .rst_n, .pc(pc[2]), .in({g_d, q2_stage[1]}), .out(t3),
    .timing_err(te[11]), .invalid_in(iv[11])
  );

  // ---- bit 2, PC4 sum -----------------------------------------------------
  adb_or #(.N(3)) u_d2 (
    .clk, .rst_n, .pc(pc[3]), .in({t3, t2, t1}), .out(d2),
    .timing_err(te[12]), .invalid_in(iv[12])
  );

  assign q[0] = q0_stage[NPHASE-1];
  assign q[1] = q1_stage[NPHASE-1];
  assign q[2] = q2_stage[NPHASE-1];
  assign timing_err = |te;
  assign invalid_in = |iv;

endmodule
