// tb_lit_gpio: writes and reads back the OUT, OE, WAKE_EN and WAKE_LVL
// registers, checks the pads follow OUT/OE, that IN returns the pad levels
// after synchronisation, and that the wake line is high exactly while an
// enabled pin is at its active level (checked with random patterns).
// Clock 100 MHz. The 27-bit width is the published one; the register layout
// is this design's own.
`timescale 1ns/1ps
module tb_lit_gpio;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;
  logic        cfg_we, cfg_re, ev_wake;
  logic [2:0]  cfg_addr;
  logic [31:0] cfg_wdata, cfg_rdata;
  logic [26:0] pin_in, pin_out, pin_oe;

  lit_gpio dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask
  task automatic wr(input logic [2:0] a, input logic [31:0] d);
    @(negedge clk); cfg_we = 1; cfg_addr = a; cfg_wdata = d;
    @(negedge clk); cfg_we = 0;
  endtask
  task automatic rd(input logic [2:0] a, output logic [31:0] d);
    @(negedge clk); cfg_re = 1; cfg_addr = a;
    @(negedge clk); cfg_re = 0; d = cfg_rdata;
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    cfg_we = 0; cfg_re = 0; cfg_addr = 0; cfg_wdata = 0; pin_in = 0;
    #22 rst_n = 1;
    for (int i = 0; i < 20; i++) begin
      logic [26:0] o, e, wen, wl, pin;
      o = 27'($urandom); e = 27'($urandom); wen = 27'($urandom) & 27'($urandom); wl = 27'($urandom);
      pin = 27'($urandom);
      wr(0, 32'(o)); wr(1, 32'(e)); wr(3, 32'(wen)); wr(4, 32'(wl));
      pin_in = pin;
      check(pin_out == o && pin_oe == e, "pads follow OUT and OE");
      rd(0, d); check(d == 32'(o), "OUT reads back");
      rd(1, d); check(d == 32'(e), "OE reads back");
      rd(3, d); check(d == 32'(wen), "WAKE_EN reads back");
      rd(4, d); check(d == 32'(wl), "WAKE_LVL reads back");
      rd(2, d); check(d == 32'(pin), "IN returns the pads");
      #1 check(ev_wake == |(wen & ~(pin ^ wl)), "wake line");
      // force a wake: one enabled pin at its level
      wr(3, 32'h0000_0100); wr(4, 32'h0000_0100);
      pin_in = 27'h100; #1 check(ev_wake, "enabled pin at its level wakes");
      pin_in = 27'h0FF; #1 check(!ev_wake, "other pins do not wake");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
