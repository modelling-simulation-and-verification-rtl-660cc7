// tb_adb_pcgen: self-checking testbench of the power-clock generator.
//
// The count must advance by one per base clock. PC1 must read '0', 'X',
// '1', 'X' at counts 00, 01, 10, 11, and every following power-clock must
// repeat the previous one a count later (90 degree shift). The expected
// levels come from a table written out here. A watchdog ends the run.
module tb_adb_pcgen;
  import adiabatic_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [1:0] cnt, cnt_d;
  level_t [NPHASE-1:0] pc, pc_d;
  int checks = 0, failures = 0;

  // PC1 level at counts 0..3
  level_t pc1_tab [4] = '{L0, LX, L1, LX};

  always #5 clk = ~clk;

  adb_pcgen dut (.clk, .rst_n, .cnt, .pc);

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    checks++;
    if (cnt != 2'b00) failures++;
    rst_n = 1'b1;
    @(negedge clk);
    for (int n = 0; n < 64; n++) begin
      cnt_d = cnt;
      pc_d  = pc;
      @(negedge clk);
      checks++;
      if (cnt != cnt_d + 2'b01) begin
        failures++; $display("FAIL count %0d after %0d", cnt, cnt_d);
      end
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (pc[k] != pc1_tab[(int'(cnt) - k + 4) % 4]) begin
          failures++; $display("FAIL PC%0d=%p at count %0d", k + 1, pc[k], cnt);
        end
        if (k > 0) begin
          checks++;
          if (pc[k] != pc_d[k-1]) begin
            failures++; $display("FAIL PC%0d does not lag PC%0d", k + 1, k);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
