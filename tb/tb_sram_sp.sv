// tb_sram_sp: writes random words with random bit masks into a 2048x32
// bank, reads them back against a reference array, and checks that a
// powered-down bank reads zero and ignores writes.
// Clock 100 MHz; one-clock read latency. The 2048 x 32 shape is the
// published one.
`timescale 1ns/1ps
module tb_sram_sp;
  int checks = 0, failures = 0;
  logic clk = 0, pwr, en, we;
  logic [10:0] addr;
  logic [31:0] wdata, wmask, rdata;
  logic [31:0] ref_mem [2048];

  sram_sp #(.DEPTH(2048), .WIDTH(32)) dut (.*);
  always #5 clk = !clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pwr = 1; en = 0; we = 0; addr = 0; wdata = 0; wmask = '1;
    // initialise everything
    for (int a = 0; a < 2048; a++) begin
      @(negedge clk); en = 1; we = 1; addr = 11'(a); wdata = $urandom; wmask = '1;
      ref_mem[a] = wdata;
    end
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      en = 1; addr = 11'($urandom_range(0, 2047));
      if ($urandom_range(0, 1) == 1) begin
        we = 1; wdata = $urandom; wmask = $urandom;
        ref_mem[addr] = (ref_mem[addr] & ~wmask) | (wdata & wmask);
      end else begin
        we = 0;
        @(negedge clk); en = 0;
        check(rdata == ref_mem[addr], $sformatf("read %h at %0d expected %h", rdata, addr, ref_mem[addr]));
      end
    end
    // power gating
    @(negedge clk); pwr = 0; en = 1; we = 1; addr = 11'd7; wdata = ~ref_mem[7]; wmask = '1;
    @(negedge clk); we = 0;
    @(negedge clk); check(rdata == 0, "gated bank reads zero");
    pwr = 1;
    @(negedge clk); en = 0;
    check(rdata == ref_mem[7], "write while gated ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
