// tb_lit_dsram: random word, halfword and byte writes and word reads over
// the whole 2 kB Deep Sleep memory, checked against a reference array;
// also checks that `done` follows every request by one clock.
// Clock 100 MHz. The 512 x 32 size is the published one.
`timescale 1ns/1ps
module tb_lit_dsram;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;
  logic        req, we, done;
  logic [3:0]  be;
  logic [10:0] addr;
  logic [31:0] wdata, rdata;
  lit_dsram dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  logic [31:0] ref_mem [512];

  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic access(bit w, logic [10:0] a, logic [3:0] b, logic [31:0] d, output logic [31:0] r);
    @(negedge clk); req = 1; we = w; addr = a; be = b; wdata = d;
    @(negedge clk); req = 0;
    check(done, "done one clock after the request");
    r = rdata;
    @(negedge clk);
    check(!done, "done is one pulse");
  endtask

  initial begin
    logic [31:0] r;
    req = 0; we = 0; be = 0; addr = 0; wdata = 0;
    #22 rst_n = 1;
    for (int i = 0; i < 512; i++) begin
      ref_mem[i] = $urandom;
      access(1, 11'(i * 4), 4'hF, ref_mem[i], r);
    end
    for (int k = 0; k < 1500; k++) begin
      int i; logic [3:0] b; logic [31:0] d;
      i = $urandom_range(0, 511);
      if ($urandom_range(0, 1) == 1) begin
        b = 4'($urandom);
        d = $urandom;
        for (int j = 0; j < 4; j++) if (b[j]) ref_mem[i][8*j +: 8] = d[8*j +: 8];
        access(1, 11'(i * 4), b, d, r);
      end else begin
        access(0, 11'(i * 4), 4'hF, 0, r);
        check(r == ref_mem[i], $sformatf("word %0d reads %h, expected %h", i, r, ref_mem[i]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
