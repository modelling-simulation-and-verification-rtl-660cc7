// adiabatic_top: the multi-level 4-phase adiabatic model, all parts side by
// side on one power-clock generator.
//
// One adb_pcgen drives PC1..PC4 for three independent designs:
//   * a cell library bench: dual-rail pulse inputs A, B and S are converted
//     to PC1 adiabatic inputs (adb_p2a) and drive, on PC1, the NOT/BUF gate,
//     AND/NAND, OR/NOR, XOR/XNOR, MUX and DeMUX cells;
//   * the 2-bit twisted ring counter with its step reset;
//   * the 3-bit up/down counter, whose dual-rail reset (RES/RESb) and
//     direction (CU/CD) pulse inputs are converted to adiabatic inputs for
//     the phases of the gates that use them.
// Which parts share the power-clock and how the inputs are converted follow
// the modelling approach; the bench of library cells is this design's way to
// bring every cell out.
//
// Timing: every base clock cycle is one power-clock period; a power-clock
// cycle is four base clock cycles. Pulse inputs are sampled by their
// converters once per power-clock cycle. All outputs are multi-level dual-
// rail signals (adiabatic_pkg::dr_t) plus error flags: timing_err reports
// an input that breaks the one-phase-ahead rule, invalid_in complementary
// inputs that are equal.
module adiabatic_top
  import adiabatic_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  // cell library bench
  input  logic                 lib_a_p, lib_a_n,
  input  logic                 lib_b_p, lib_b_n,
  input  logic                 lib_s_p, lib_s_n,
  // ring counter
  input  logic                 ring_res,
  // up/down counter
  input  logic                 ud_res_p, ud_res_n,
  input  logic                 ud_cu, ud_cd,
  // power-clock
  output logic [1:0]           cnt,
  output level_t [NPHASE-1:0]  pc,
  // cell library bench outputs (PC1 phase)
  output dr_t                  lib_a,      // converted input A
  output dr_t                  lib_buf,    // Out = A, Outb = not A
  output dr_t                  lib_and,
  output dr_t                  lib_or,
  output dr_t                  lib_xor,
  output dr_t                  lib_mux,    // S ? B : A
  output dr_t                  lib_dmx0,   // A when S = 0
  output dr_t                  lib_dmx1,   // A when S = 1
  output logic [5:0]           lib_timing_err,
  output logic [5:0]           lib_invalid_in,
  // ring counter outputs (PC4 phase)
  output dr_t                  ring_q0,
  output dr_t                  ring_q1,
  output dr_t [NPHASE-1:0]     ring_q0_stage,   // Q01, Q02, Q03, Q0
  output dr_t [NPHASE-1:0]     ring_q1_stage,   // Q11, Q12, Q13, Q1
  output logic                 ring_timing_err,
  output logic                 ring_invalid_in,
  // up/down counter outputs (PC4 phase)
  output dr_t [2:0]            ud_q,
  output dr_t [NPHASE-1:0]     ud_q0_stage,
  output dr_t [NPHASE-1:0]     ud_q1_stage,
  output dr_t [NPHASE-1:0]     ud_q2_stage,
  output logic                 ud_timing_err,
  output logic                 ud_invalid_in
);

  // ---- power-clock --------------------------------------------------------
  adb_pcgen u_pcgen (.clk, .rst_n, .cnt, .pc);

  // ---- cell library bench -------------------------------------------------
  dr_t lib_b, lib_s;

  adb_p2a #(.PHASE(0)) u_cv_a (.clk, .rst_n, .cnt, .in_p(lib_a_p), .in_n(lib_a_n), .a(lib_a));
  adb_p2a #(.PHASE(0)) u_cv_b (.clk, .rst_n, .cnt, .in_p(lib_b_p), .in_n(lib_b_n), .a(lib_b));
  adb_p2a #(.PHASE(0)) u_cv_s (.clk, .rst_n, .cnt, .in_p(lib_s_p), .in_n(lib_s_n), .a(lib_s));

  adb_notbuf u_buf (
    .clk, .rst_n, .pc(pc[0]), .a(lib_a), .out(lib_buf),
    .timing_err(lib_timing_err[0]), .invalid_in(lib_invalid_in[0])
  );
  adb_and #(.N(2)) u_and (
    .clk, .rst_n, .pc(pc[0]), .in({lib_b, lib_a}), .out(lib_and),
    .timing_err(lib_timing_err[1]), .invalid_in(lib_invalid_in[1])
  );
  adb_or #(.N(2)) u_or (
    .clk, .rst_n, .pc(pc[0]), .in({lib_b, lib_a}), .out(lib_or),
    .timing_err(lib_timing_err[2]), .invalid_in(lib_invalid_in[2])
  );
  adb_xor u_xor (
    .clk, .rst_n, .pc(pc[0]), .a(lib_a), .b(lib_b), .out(lib_xor),
    .timing_err(lib_timing_err[3]), .invalid_in(lib_invalid_in[3])
  );
  adb_mux u_mux (
    .clk, .rst_n, .pc(pc[0]), .s(lib_s), .a(lib_a), .b(lib_b), .out(lib_mux),
    .timing_err(lib_timing_err[4]), .invalid_in(lib_invalid_in[4])
  );
  adb_demux u_demux (
    .clk, .rst_n, .pc(pc[0]), .s(lib_s), .d(lib_a), .y0(lib_dmx0), .y1(lib_dmx1),
    .timing_err(lib_timing_err[5]), .invalid_in(lib_invalid_in[5])
  );

  // ---- ring counter -------------------------------------------------------
  adb_ring_counter u_ring (
    .clk, .rst_n, .pc, .res_step(ring_res), .q0(ring_q0), .q1(ring_q1),
    .q0_stage(ring_q0_stage), .q1_stage(ring_q1_stage),
    .timing_err(ring_timing_err), .invalid_in(ring_invalid_in)
  );

  // ---- up/down counter ----------------------------------------------------
  dr_t ud_res, ud_dir2, ud_dir3;

  adb_p2a #(.PHASE(0)) u_cv_res  (.clk, .rst_n, .cnt, .in_p(ud_res_p), .in_n(ud_res_n), .a(ud_res));
  adb_p2a #(.PHASE(1)) u_cv_dir2 (.clk, .rst_n, .cnt, .in_p(ud_cu), .in_n(ud_cd), .a(ud_dir2));
  adb_p2a #(.PHASE(2)) u_cv_dir3 (.clk, .rst_n, .cnt, .in_p(ud_cu), .in_n(ud_cd), .a(ud_dir3));

  adb_updown_counter u_ud (
    .clk, .rst_n, .pc, .res(ud_res), .dir_pc2(ud_dir2), .dir_pc3(ud_dir3),
    .q(ud_q), .q0_stage(ud_q0_stage), .q1_stage(ud_q1_stage), .q2_stage(ud_q2_stage),
    .timing_err(ud_timing_err), .invalid_in(ud_invalid_in)
  );

endmodule
