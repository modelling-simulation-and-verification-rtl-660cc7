// adb_mux: dual-rail adiabatic 2:1 multiplexer.
//
// y = s ? b : a. The function part forms Y = S.B + Sb.A on the true rail and
// Yb = S.Bb + Sb.Ab on the complement rail with level AND/OR and drives the
// NOT/BUF core. Building a cell as a function part plus a NOT/BUF gate
// follows the modelling method; the equations are this design's own.
//
// Interface: s, a and b must run one phase ahead of pc. out is registered
// (one phase from input to output).
module adb_mux
  import adiabatic_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  level_t pc,
  input  dr_t    s,
  input  dr_t    a,
  input  dr_t    b,
  output dr_t    out,
  output logic   timing_err,
  output logic   invalid_in
);

  dr_t f;

  always_comb begin
    f.t = level_or(level_and(s.t, b.t), level_and(s.f, a.t));
    f.f = level_or(level_and(s.t, b.f), level_and(s.f, a.f));
  end

  adb_notbuf u_core (
    .clk, .rst_n, .pc, .a(f), .out, .timing_err, .invalid_in
  );

endmodule
