// tb_lit_wake_timer: runs the 32 kHz counter, reads NOW through the Gray
// crossing and checks it against a count of 32 kHz edges kept here; arms an
// alarm a fixed distance ahead and checks that ev_wake rises exactly when
// the counter reaches it, stays until cleared, and that a disarmed alarm
// never fires.
// System clock 100 MHz, 32 kHz clock scaled to 5 MHz to keep the run short.
// The timer's purpose is published; its registers are this design's own.
`timescale 1ns/1ps
module tb_lit_wake_timer;
  int checks = 0, failures = 0;
  logic clk = 0, clk32k = 0, rst_n = 0;
  always #5 clk = !clk;
  always #100 clk32k = !clk32k;

  logic        cfg_we, cfg_re, ev_wake;
  logic [1:0]  cfg_addr;
  logic [31:0] cfg_wdata, cfg_rdata;

  lit_wake_timer dut (.*);

  int ticks = 0;
  always @(posedge clk32k) if (rst_n) ticks++;

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
  task automatic wait_idle();
    logic [31:0] d;
    do rd(2, d); while (d[2]);
  endtask

  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d, alarm;
    int fire_tick;
    cfg_we = 0; cfg_re = 0; cfg_addr = 0; cfg_wdata = 0;
    #250 rst_n = 1;
    repeat (30) @(posedge clk32k);
    for (int i = 0; i < 5; i++) begin
      int t;
      repeat ($urandom_range(1, 9)) @(posedge clk32k);
      #20;
      t = ticks;
      rd(1, d);
      // the Gray crossing lags a few system clocks: allow 0..1 tick behind
      check(int'(d) <= t && int'(d) >= t - 1, $sformatf("NOW %0d, edges counted %0d", d, t));
    end
    // alarm 40 ticks ahead; ALARM takes effect with the CTRL write
    rd(1, d);
    alarm = d + 40;
    wr(0, alarm);
    wr(2, 32'h1);
    wait_idle();
    check(!ev_wake, "no event before the alarm");
    @(posedge ev_wake);
    fire_tick = ticks;
    // counter == alarm is seen at the edge after the counter got there
    check(fire_tick == int'(alarm) + 1 || fire_tick == int'(alarm) + 2,
          $sformatf("alarm fired at tick %0d for alarm %0d", fire_tick, alarm));
    repeat (10) @(posedge clk32k);
    check(ev_wake, "event stays until cleared");
    rd(2, d);
    check(d[1:0] == 2'b11, "status armed and pending");
    wr(2, 32'h2);   // clear, disarm
    wait_idle();
    repeat (3) @(posedge clk32k);
    #1 check(!ev_wake, "event cleared");
    // disarmed alarm must not fire
    rd(1, d);
    wr(0, d + 10);
    wait_idle();
    repeat (30) @(posedge clk32k);
    check(!ev_wake, "disarmed alarm does not fire");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
