// adb_xor: two-input dual-rail adiabatic XOR/XNOR gate.
//
// The function part forms XOR = A.Bb + Ab.B on the true rail and
// XNOR = A.B + Ab.Bb on the complement rail with level AND (minimum) and
// level OR (maximum), and drives the NOT/BUF core for timing and invalid
// input detection. Building a cell as a function part plus a NOT/BUF gate
// follows the modelling method; the sum-of-products form is this design's
// own choice.
//
// Interface: a and b must run one phase ahead of pc. out.t is XOR, out.f
// XNOR, registered (one phase from input to output).
module adb_xor
  import adiabatic_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  level_t pc,
  input  dr_t    a,
  input  dr_t    b,
  output dr_t    out,
  output logic   timing_err,
  output logic   invalid_in
);

  dr_t f;

  always_comb begin
    f.t = level_or(level_and(a.t, b.f), level_and(a.f, b.t));
    f.f = level_or(level_and(a.t, b.t), level_and(a.f, b.f));
  end

  adb_notbuf u_core (
    .clk, .rst_n, .pc, .a(f), .out, .timing_err, .invalid_in
  );

endmodule
