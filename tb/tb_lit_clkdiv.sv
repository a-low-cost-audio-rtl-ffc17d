// tb_lit_clkdiv: feeds a 512 MHz clock into the divider chain and measures
// the outputs: clk_half at 256 MHz, clk_sys at 512 / (2 * n * 2) MHz for the
// Active divider n = 2 (64 MHz), n = 3, 32 (4 MHz), the Standby divider when
// clk_slow is set, and no edges at all while clk_en is low.
// Time unit 1 ps for the 512 MHz input. The /2, /n, /2 chain and the 64 MHz
// and 4 MHz points are the published ones.
`timescale 1ps/1ps
module tb_lit_clkdiv;
  int checks = 0, failures = 0;
  logic clk_in = 0, rst_n = 0, clk_en = 1, clk_slow = 0;
  logic [7:0] div_act = 2, div_slow = 32;
  logic clk_half, clk_sys;
  always #977 clk_in = !clk_in;   // 1.954 ns period, 512 MHz

  lit_clkdiv dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  // period of clk_sys in input clock cycles
  task automatic sys_period(input int expect_in_cycles, input string what);
    int n = 0;
    @(posedge clk_sys);
    fork
      forever @(posedge clk_in) n++;
      begin repeat (4) @(posedge clk_sys); end
    join_any
    disable fork;
    check(n == 4 * expect_in_cycles, $sformatf("%s: %0d input cycles per 4 periods, expected %0d", what, n, 4 * expect_in_cycles));
  endtask

  initial begin
    #50_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    #5000 rst_n = 1;
    repeat (50) @(posedge clk_in);
    // clk_half
    n = 0;
    fork
      forever @(posedge clk_in) n++;
      begin @(posedge clk_half); repeat (8) @(posedge clk_half); end
    join_any
    disable fork;
    check(n == 16 || n == 17, $sformatf("clk_half: %0d input cycles for 8 periods", n));
    sys_period(8,   "n=2 (64 MHz)");
    div_act = 3;  repeat (40) @(posedge clk_in);
    sys_period(12,  "n=3");
    div_act = 32; repeat (200) @(posedge clk_in);
    sys_period(128, "n=32 (4 MHz)");
    div_act = 2;  div_slow = 16; clk_slow = 1; repeat (200) @(posedge clk_in);
    sys_period(64,  "Standby n=16");
    clk_slow = 0; repeat (100) @(posedge clk_in);
    sys_period(8,   "back to 64 MHz");
    // stopped
    clk_en = 0; repeat (20) @(posedge clk_in);
    n = 0;
    fork
      forever @(posedge clk_sys) n++;
      repeat (400) @(posedge clk_in);
    join_any
    disable fork;
    check(n == 0 && !clk_half, "no clock while clk_en is low");
    clk_en = 1;
    sys_period(8, "restart");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
