// tb_lit_wic: walks the wakeup interrupt controller through its modes and
// checks the outputs of each against the published state table:
//   Active -> Standby (command) -> Active (event),
//   Active -> Deep Sleep (command) -> wakeup on timer, GPIO and CDC events,
// the wake order and spacing (Active LDO, wait wake_delay 32 kHz cycles,
// clock, one cycle later cache power, one cycle later core clock), masked
// events, the Deep Sleep cache bank mask, Dirty LDO and battery bypass bits,
// and the STATUS register.
// The wake order checked is the published one; register layout and timing
// margins are this design's own.
`timescale 1ns/1ps
module tb_lit_wic;
  import lit_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, clk32k = 0, rst_n = 0;
  always #5 clk = !clk;
  always #150 clk32k = !clk32k;

  logic        cfg_we, cfg_re;
  logic [1:0]  cfg_addr;
  logic [31:0] cfg_wdata, cfg_rdata;
  logic        ev_timer, ev_gpio, ev_cdc;
  logic        active_ldo_en, sleep_mode, dirty_ldo_en, bypass_batt;
  logic        clk_en, clk_slow, core_clk_en, cache_tag_pwr;
  logic [15:0] cache_bank_pwr;
  pmode_e      mode;

  lit_wic dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  task automatic wr(input logic [1:0] a, input logic [31:0] d);
    @(negedge clk); cfg_we = 1; cfg_addr = a; cfg_wdata = d;
    @(negedge clk); cfg_we = 0;
  endtask

  task automatic rd(input logic [1:0] a, output logic [31:0] d);
    @(negedge clk); cfg_re = 1; cfg_addr = a;
    @(negedge clk); cfg_re = 0; d = cfg_rdata;
  endtask

  task automatic wait32(int n);
    repeat (n) @(posedge clk32k);
    #1;
  endtask

  task automatic expect_active();
    check(mode == PM_ACTIVE, "mode Active");
    check(active_ldo_en && !sleep_mode && clk_en && !clk_slow && core_clk_en, "Active: LDO on, clock on, core ungated");
    check(cache_bank_pwr == 16'hFFFF && cache_tag_pwr, "Active: cache on");
  endtask

  // wake sequence: returns the 32 kHz cycle count at which each output rose
  task automatic wake_and_time(input int delay, input logic [15:0] banks);
    int t_ldo = -1, t_clk = -1, t_mem = -1, t_core = -1;
    for (int c = 0; c < delay + 20; c++) begin
      @(posedge clk32k); #1;
      if (t_ldo  < 0 && active_ldo_en)              t_ldo  = c;
      if (t_clk  < 0 && clk_en)                     t_clk  = c;
      if (t_mem  < 0 && cache_bank_pwr == 16'hFFFF) t_mem  = c;
      if (t_core < 0 && core_clk_en)                t_core = c;
      if (t_ldo >= 0 && t_clk < 0) check(cache_bank_pwr == banks && !core_clk_en, "during LDO wait: cache still as in Deep Sleep, core gated");
    end
    check(t_ldo >= 0, "Active LDO enabled");
    check(t_clk - t_ldo == delay + 1, $sformatf("clock enabled %0d cycles after LDO, expected %0d", t_clk - t_ldo, delay + 1));
    check(t_mem - t_clk == 1, "cache powered one 32 kHz cycle after clock");
    check(t_core - t_mem == 1, "core ungated one 32 kHz cycle after cache");
  endtask

  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    int n_stby = 0, n_deep = 0;
    cfg_we = 0; cfg_re = 0; cfg_addr = 0; cfg_wdata = 0;
    ev_timer = 0; ev_gpio = 0; ev_cdc = 0;
    #400 rst_n = 1;
    wait32(2);
    expect_active();

    // configuration: delay 6, all events, dirty LDO on, bypass on
    wr(0, {19'd0, 1'b1, 1'b1, 3'b111, 8'd6});
    rd(0, d);
    check(d[12:0] == {1'b1, 1'b1, 3'b111, 8'd6}, "CTRL reads back");
    check(dirty_ldo_en && bypass_batt, "Dirty LDO and bypass follow CTRL");
    wr(1, 32'h0000_0003);   // keep 16 kB in Deep Sleep

    // ---- Standby ----
    wr(2, 1);
    wait32(4);
    check(mode == PM_STANDBY, "mode Standby");
    check(active_ldo_en && clk_en && clk_slow && !core_clk_en && cache_bank_pwr == 16'hFFFF,
          "Standby: LDO on, clock slowed, core gated, cache on");
    wait32(5);
    check(mode == PM_STANDBY, "Standby holds without events");
    ev_gpio = 1; wait32(4); ev_gpio = 0;
    expect_active();
    n_stby++;
    rd(3, d);
    check(d[6:4] == 3'b010, "STATUS wake cause GPIO");

    // ---- Deep Sleep, wake on the timer ----
    wr(2, 2);
    wait32(4);
    check(mode == PM_DEEP, "mode Deep Sleep");
    check(!active_ldo_en && sleep_mode && !clk_en && !core_clk_en, "Deep Sleep: LDO off, clock off, core gated");
    check(cache_bank_pwr == 16'h0003 && cache_tag_pwr, "Deep Sleep: two banks and the tag/LRU banks on");
    check(!dirty_ldo_en, "Dirty LDO off in Deep Sleep");
    rd(3, d);
    check(d[2:0] == 3'(PM_DEEP), "STATUS mode");
    fork
      begin wait32(2); ev_timer = 1; wait32(3); ev_timer = 0; end
      wake_and_time(6, 16'h0003);
    join
    expect_active();
    n_deep++;

    // ---- masked event is ignored; CDC wakes with the whole cache off ----
    wr(0, {19'd0, 1'b0, 1'b0, 3'b100, 8'd2});    // only CDC enabled, delay 2
    wr(1, 0);
    wr(2, 2);
    wait32(4);
    check(mode == PM_DEEP && !cache_tag_pwr && cache_bank_pwr == 0, "Deep Sleep with the whole cache gated");
    ev_gpio = 1; wait32(6); ev_gpio = 0;
    check(mode == PM_DEEP, "disabled GPIO event does not wake");
    fork
      begin wait32(1); ev_cdc = 1; wait32(3); ev_cdc = 0; end
      wake_and_time(2, 16'h0000);
    join
    expect_active();
    n_deep++;
    rd(3, d);
    check(d[6:4] == 3'b100, "STATUS wake cause CDC");

    check(n_stby > 0 && n_deep > 1, "all mode changes exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
