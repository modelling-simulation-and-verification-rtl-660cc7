// adb_p2a: dual-rail pulse input to multi-level adiabatic input conversion.
//
// An input of a gate driven by PC(PHASE+1) must already be in its Hold
// period while that power-clock evaluates, so its waveform is the
// power-clock of the previous phase: for PHASE 0 (inputs of PC1 gates) the
// active rail is 'X', '1', 'X', '0' at counts 00, 01, 10, 11. The rail whose
// pulse input is 1 carries this waveform and a rail whose pulse input is 0
// stays at '0'. The pulse pair is sampled once per cycle, on the clock edge
// that starts the Evaluate ramp of the output, so a whole trapezoid always
// carries one value. Both pulse inputs at 1, or both at 0, are passed on as
// they are (two active rails, or none), so the gate downstream can flag them.
// The phase relation follows the modelling approach; the sampling instant is
// this design's choice.
//
// Interface: cnt is the count of adb_pcgen. in_p / in_n are the true and
// complement pulse inputs. a is the dual-rail adiabatic signal,
// combinational from cnt and the sampled pair.
module adb_p2a
  import adiabatic_pkg::*;
#(
  parameter int unsigned PHASE = 0   // 0..3: inputs of gates on PC1..PC4
)(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [1:0] cnt,
  input  logic       in_p,
  input  logic       in_n,
  output dr_t        a
);

  // The input waveform is the power-clock one phase earlier.
  localparam int unsigned SRC = (PHASE + NPHASE - 1) % NPHASE;

  logic    hold_p, hold_n;
  period_t per;

  assign per = period_at(cnt, 2'(SRC));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hold_p <= 1'b0;
      hold_n <= 1'b0;
    end else if (period_at(cnt + 2'b01, 2'(SRC)) == P_EVALUATE) begin
      hold_p <= in_p;
      hold_n <= in_n;
    end
  end

  always_comb begin
    a.t = hold_p ? period_level(per) : L0;
    a.f = hold_n ? period_level(per) : L0;
  end

endmodule
