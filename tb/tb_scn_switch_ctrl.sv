// tb_scn_switch_ctrl: for each of the six step-down ratios, runs the
// switch driver for several phase periods and checks every switch against
// the published schedule, held here as text ("1" = phase 1, "2" = phase 2,
// "N" = on, "F" = off). Also checks that the phases never overlap, their
// period, that no switch is closed with both phases' switches in one cycle,
// power gating (all open) and bypass (only the bypass switch closed).
// The switch schedule is the published one; phase lengths are this design's
// own.
`timescale 1ns/1ps
module tb_scn_switch_ctrl;
  import lit_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;

  logic        en, bypass, phi1, phi2, bypass_sw;
  scn_ratio_e  ratio;
  logic [10:0] sw;

  scn_switch_ctrl #(.PHASE(4), .DEAD(1)) dut (.*);

  // columns 25 33 50 66 75 100 %, one string per switch ck1..ck11
  string table3 [11] = '{
    "11111N", "22222N", "2NNN1N", "22N11N", "11F22F", "11F22F",
    "22N11N", "22N11N", "22222N", "11111F", "NFNFNN" };

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; bypass = 0; ratio = SCN_R100;
    #22 rst_n = 1;
    for (int r = 0; r < 6; r++) begin
      int last_rise, period, cyc;
      bit prev1;
      last_rise = -1; period = 0; cyc = 0; prev1 = 0;
      @(negedge clk); ratio = scn_ratio_e'(r); en = 1;
      repeat (3) @(negedge clk);
      for (int c = 0; c < 40; c++) begin
        @(negedge clk);
        cyc++;
        check(!(phi1 && phi2), "phases overlap");
        if (phi1 && !prev1) begin
          if (last_rise >= 0) period = cyc - last_rise;
          last_rise = cyc;
        end
        prev1 = phi1;
        for (int k = 0; k < 11; k++) begin
          byte code;
          logic exp;
          code = table3[k][r];
          case (code)
            "1": exp = phi1;
            "2": exp = phi2;
            "N": exp = 1'b1;
            default: exp = 1'b0;
          endcase
          check(sw[k] == exp, $sformatf("ratio %0d ck%0d = %0d, table says %s", r, k + 1, sw[k], string'(code)));
        end
      end
      check(period == 10, $sformatf("phase period %0d, expected 10", period));
    end
    // power gated
    @(negedge clk); en = 0;
    repeat (2) @(negedge clk);
    check(sw == 0 && !phi1 && !phi2 && !bypass_sw, "power gated: everything open");
    // bypass
    @(negedge clk); en = 1; bypass = 1; ratio = SCN_R50;
    repeat (12) begin
      @(negedge clk);
      check(sw == 0 && bypass_sw && !phi1 && !phi2, "bypass: only the bypass switch closed");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
