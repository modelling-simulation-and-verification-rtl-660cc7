// tb_adb_and: self-checking testbench of the two-input AND/NAND cell.
//
// A power-clock generator and PC1-phase input converters drive the cell on
// PC1 with random dual-rail pulse inputs, one new value per power-clock
// cycle. A gate delays its input waveform by one phase, so the expected
// output in period n is worked out from the converted inputs of period n-1:
// in every period where PC1 is not idle, the rail selected by the logic
// function carries the PC1 level and the other rail is '0'. The error flags
// must stay low. A watchdog ends the run.
module tb_adb_and;
  import adiabatic_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [1:0] cnt;
  level_t [NPHASE-1:0] pc;
  logic ap, an, bp, bn, cp, cn;
  dr_t a, b, c, y0, y1;
  logic te, iv;
  int checks = 0, failures = 0;
  int ones = 0, zeros = 0;

  always #5 clk = ~clk;

  adb_pcgen u_pcgen (.clk, .rst_n, .cnt, .pc);
  adb_p2a #(.PHASE(0)) u_ca (.clk, .rst_n, .cnt, .in_p(ap), .in_n(an), .a(a));
  adb_p2a #(.PHASE(0)) u_cb (.clk, .rst_n, .cnt, .in_p(bp), .in_n(bn), .a(b));
  adb_p2a #(.PHASE(0)) u_cc (.clk, .rst_n, .cnt, .in_p(cp), .in_n(cn), .a(c));
  adb_and #(.N(2)) dut (.clk, .rst_n, .pc(pc[0]), .in({b, a}), .out(y0), .timing_err(te), .invalid_in(iv));
  assign y1 = dr_t'(0);

  dr_t a_d, b_d, c_d;

  function automatic dr_t expect_out(input logic v, input level_t lvl);
    dr_t r;
    r.t = v ? lvl : L0;
    r.f = v ? L0 : lvl;
    if (lvl == L0) r = '{t: L0, f: L0};
    return r;
  endfunction

  always @(posedge clk) begin
    a_d <= a; b_d <= b; c_d <= c;
  end

  initial begin
    logic va, vb, vc, e0, e1;
    {ap, an, bp, bn, cp, cn} = 6'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 400; n++) begin
      // change pulse inputs away from the sampling edge
      @(negedge clk);
      if (n % 4 == 0) begin
        ap = 1'($urandom); an = ~ap;
        bp = 1'($urandom); bn = ~bp;
        cp = 1'($urandom); cn = ~cp;
      end
      if (n >= 8) begin
        // compare the present period with the inputs of the previous one
        va = (a_d.t != L0); vb = (b_d.t != L0); vc = (c_d.t != L0);
        e0 = va & vb;
        e1 = 1'b0;
        checks++;
        if (y0 !== expect_out(e0, pc[0])) begin
          failures++;
          $display("FAIL n=%0d cnt=%0d y0=%p expected value %0b", n, cnt, y0, e0);
        end
        if (e1) failures++;
        checks++;
        if (te || iv) begin
          failures++;
          $display("FAIL n=%0d error flags te=%0b iv=%0b", n, te, iv);
        end
        if (pc[0] == L1) begin
          if (e0) ones++; else zeros++;
        end
      end
    end
    // both values of the function must have been seen
    checks++;
    if (ones == 0 || zeros == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
