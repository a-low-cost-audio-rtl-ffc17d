// tb_doubler_clk_ctrl: runs the doubler clock control from a fast core clock
// (10 ns) and a slow oscillator (70 ns). Checks that the pump clock has the
// period of the selected source, that switching in both directions never
// produces a pulse shorter than half a period of the faster clock, and that
// the two pump phases never overlap and stop when disabled.
// The two clock sources are the published ones; their periods here are
// scaled to keep the run short.
`timescale 1ns/1ps
module tb_doubler_clk_ctrl;
  int checks = 0, failures = 0;
  logic core_clk = 0, osc_clk = 0, rst_n = 0, osc_sel = 0, en = 0;
  logic pump_clk, phi1, phi2;
  always #5  core_clk = !core_clk;
  always #35 osc_clk  = !osc_clk;

  doubler_clk_ctrl dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  realtime last_edge = 0, min_pulse = 1e9;
  bit      mon = 0;
  always @(pump_clk) begin
    if (mon && $realtime - last_edge < min_pulse) min_pulse = $realtime - last_edge;
    last_edge = $realtime;
  end
  always @(posedge core_clk) if (rst_n) check(!(phi1 && phi2), "phases overlap");

  task automatic measure(input realtime expect_per);
    realtime t0;
    @(posedge pump_clk); t0 = $realtime;
    repeat (4) @(posedge pump_clk);
    check(($realtime - t0) / 4 == expect_per, $sformatf("pump period %0t, expected %0t", ($realtime - t0) / 4, expect_per));
  endtask

  initial begin
    #200_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_p1 = 0;
    #100 rst_n = 1; en = 1;
    #100 mon = 1;
    measure(10);
    osc_sel = 1; #500;
    measure(70);
    osc_sel = 0; #500;
    measure(10);
    osc_sel = 1; #503;
    measure(70);
    check(min_pulse >= 5, $sformatf("shortest pump pulse %0t", min_pulse));
    repeat (20) begin @(posedge pump_clk); #1; if (phi1) n_p1++; end
    check(n_p1 > 0, "phase 1 produced");
    en = 0;
    repeat (3) @(posedge pump_clk);
    #1 check(!phi1 && !phi2, "phases stop when disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
