// adb_or: N-input dual-rail adiabatic OR/NOR gate.
//
// The gate is a level-logic function part followed by the NOT/BUF core: the
// true rails of the inputs are ORed (maximum of the levels) and the
// complement rails ANDed (minimum), and the pair drives adb_notbuf, which
// times the output to the gate's power-clock and detects invalid inputs.
// It is built like the AND/NAND cell, as the modelling method prescribes;
// the width N is this design's own generalisation (the up/down counter uses
// N = 3).
//
// Interface: all inputs must run one phase ahead of pc. out.t is OR,
// out.f is NOR, registered as in adb_notbuf (one phase from input to
// output).
module adb_or
  import adiabatic_pkg::*;
#(
  parameter int unsigned N = 2
)(
  input  logic            clk,
  input  logic            rst_n,
  input  level_t          pc,
  input  dr_t [N-1:0]     in,
  output dr_t             out,
  output logic            timing_err,
  output logic            invalid_in
);

  dr_t f;

  always_comb begin
    f = in[0];
    for (int unsigned k = 1; k < N; k++) f = dr_or(f, in[k]);
  end

  adb_notbuf u_core (
    .clk, .rst_n, .pc, .a(f), .out, .timing_err, .invalid_in
  );

endmodule
