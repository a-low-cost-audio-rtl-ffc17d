// tb_bod_comparators: sweeps the battery voltage from 0 to 3.5 V in 10 mV
// steps and checks both comparator outputs against 1.7 V and 1.2 V.
// No clock: each voltage step is held 1 ns. The two thresholds checked are
// the published ones.
`timescale 1ns/1ps
module tb_bod_comparators;
  int checks = 0, failures = 0;
  logic [15:0] vbat_mv;
  logic comp_hi, comp_lo;
  bod_comparators dut (.*);
  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int mv = 0; mv <= 3500; mv += 10) begin
      vbat_mv = 16'(mv);
      #1;
      checks++;
      if (comp_hi != (mv > 1700) || comp_lo != (mv > 1200)) begin
        failures++;
        $display("FAIL at %0d mV: hi %0d lo %0d", mv, comp_hi, comp_lo);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
