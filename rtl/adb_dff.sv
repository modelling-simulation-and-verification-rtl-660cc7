// adb_dff: adiabatic D flip-flop with reset, one power-clock cycle of delay.
//
// In 4-phase adiabatic logic every gate delays its input by one phase, so
// four gates in a row, on PC1, PC2, PC3 and PC4, hold a value for exactly one
// power-clock cycle: that chain is the flip-flop. The first stage is a
// two-input AND/NAND gate whose second input is the reset signal (logic 0
// forces the stored value to 0); the other three stages are buffers. This is
// the per-bit chain of the up/down counter (stage outputs Qx1, Qx2, Qx3 and
// Qx); reset acting as the second AND input is this design's reading of the
// reset pins of the first stage.
//
// Interface: pc[k] is PC(k+1). d and res must carry PC4-phase waveforms (one
// phase ahead of PC1). q[k] is the output of the stage on PC(k+1); q[3] is
// the flip-flop output, again a PC4-phase signal, so q[3] can feed d of a
// flip-flop directly. timing_err and invalid_in are the OR of the four
// stages.
module adb_dff
  import adiabatic_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  level_t [NPHASE-1:0]    pc,
  input  dr_t                    d,
  input  dr_t                    res,
  output dr_t    [NPHASE-1:0]    q,
  output logic                   timing_err,
  output logic                   invalid_in
);

  logic [NPHASE-1:0] te, iv;

  adb_and #(.N(2)) u_stage0 (
    .clk, .rst_n, .pc(pc[0]), .in({res, d}), .out(q[0]),
    .timing_err(te[0]), .invalid_in(iv[0])
  );

  for (genvar k = 1; k < NPHASE; k++) begin : g_buf
    adb_notbuf u_stage (
      .clk, .rst_n, .pc(pc[k]), .a(q[k-1]), .out(q[k]),
      .timing_err(te[k]), .invalid_in(iv[k])
    );
  end

  assign timing_err = |te;
  assign invalid_in = |iv;

endmodule
