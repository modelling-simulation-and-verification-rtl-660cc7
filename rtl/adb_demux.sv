// adb_demux: dual-rail adiabatic 1:2 demultiplexer.
//
// y0 = d when s = 0, else 0; y1 = d when s = 1, else 0. Each output has a
// function part (Y0 = Sb.D, Y0b = S + Db; Y1 = S.D, Y1b = Sb + Db, with
// level AND/OR) and a NOT/BUF core of its own. Building a cell as a function
// part plus a NOT/BUF gate follows the modelling method; the equations are
// this design's own.
//
// Interface: s and d must run one phase ahead of pc. y0 and y1 are
// registered (one phase from input to output). The error flags are the OR
// of both cores.
module adb_demux
  import adiabatic_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  level_t pc,
  input  dr_t    s,
  input  dr_t    d,
  output dr_t    y0,
  output dr_t    y1,
  output logic   timing_err,
  output logic   invalid_in
);

  dr_t  f0, f1;
  logic te0, te1, iv0, iv1;

  assign f0 = dr_and(dr_not(s), d);
  assign f1 = dr_and(s, d);

  adb_notbuf u_core0 (
    .clk, .rst_n, .pc, .a(f0), .out(y0), .timing_err(te0), .invalid_in(iv0)
  );
  adb_notbuf u_core1 (
    .clk, .rst_n, .pc, .a(f1), .out(y1), .timing_err(te1), .invalid_in(iv1)
  );

  assign timing_err = te0 | te1;
  assign invalid_in = iv0 | iv1;

endmodule
