// adb_pcgen: four-phase power-clock generator of the multi-level model.
//
// Two flip-flops form a 2-bit counter advanced by the base clock; each count
// lasts one power-clock period (a quarter of a power-clock cycle). PC1 is
// decoded from the count as 00 Idle ('0'), 01 Evaluate ('X'), 10 Hold ('1'),
// 11 Recovery ('X'); each following power-clock is the same decode shifted by
// one count, so PC(k+1) lags PC(k) by 90 degrees. The decode and the shift
// follow the modelling approach this design implements; the reset value
// (count 00) is this design's choice.
//
// Interface: clk advances one period per rising edge, rst_n is an
// asynchronous active-low reset. cnt is the 2-bit period count,
// pc[k] the level of PC(k+1), combinational from cnt.
module adb_pcgen
  import adiabatic_pkg::*;
(
  input  logic                      clk,
  input  logic                      rst_n,
  output logic [1:0]                cnt,
  output level_t [NPHASE-1:0]       pc
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cnt <= 2'b00;
    else        cnt <= cnt + 2'b01;
  end

  always_comb begin
    for (int unsigned k = 0; k < NPHASE; k++) begin
      pc[k] = period_level(period_at(cnt, 2'(k)));
    end
  end

endmodule
