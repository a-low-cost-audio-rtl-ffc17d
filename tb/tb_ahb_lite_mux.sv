// tb_ahb_lite_mux: the pipelined AHB master model reads random addresses in
// every mapped region, just outside each region, and elsewhere. Five slave
// models here answer after 0-2 wait states with a word that names the slave
// and the address it saw. Checks that each mapped address reaches its slave
// with the right address, that unmapped ones get the two-cycle ERROR, and
// that the number of transfers each slave served matches.
// Clock 100 MHz; one slave model per region. The address map checked is
// this design's own; the bus rules are AHB-Lite's.
`timescale 1ns/1ps
module tb_ahb_lite_mux;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;

  logic [31:0] haddr, hwdata, hrdata;
  logic [1:0]  htrans;
  logic        hwrite, hready, hresp;
  logic [2:0]  hsize;
  logic [4:0]  hsel, s_hreadyout;
  logic [4:0]  s_hresp = '0;
  logic [31:0] s_hrdata [5];

  ahb_master_bfm bfm (.hclk(clk), .hresetn(rst_n), .haddr, .htrans, .hwrite,
                      .hsize, .hwdata, .hready, .hresp, .hrdata);
  ahb_lite_mux dut (.hclk(clk), .hresetn(rst_n), .haddr, .htrans, .hready,
                    .hresp, .hrdata, .hsel, .s_hreadyout, .s_hresp, .s_hrdata);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  // slave models
  bit [4:0] dp = '0;
  int       wt [5];
  int       served [5];
  int       expected_served [5];
  initial begin
    s_hreadyout = '1;
    for (int i = 0; i < 5; i++) begin
      s_hrdata[i] = '0; wt[i] = 0; served[i] = 0; expected_served[i] = 0;
    end
  end
  always begin
    bit [4:0] acc, cpl;
    logic [31:0] a;
    @(negedge clk);
    a = haddr;
    for (int i = 0; i < 5; i++) begin
      acc[i] = hsel[i] && htrans[1] && hready;
      cpl[i] = dp[i] && s_hreadyout[i];
    end
    @(posedge clk);
    #1;
    for (int i = 0; i < 5; i++) begin
      if (cpl[i]) served[i]++;
      if (acc[i]) begin
        dp[i] = 1; wt[i] = $urandom_range(0, 2);
        s_hreadyout[i] = (wt[i] == 0);
        s_hrdata[i] = {4'(i), a[27:0]};
      end else if (cpl[i]) begin
        dp[i] = 0; s_hreadyout[i] = 1;
      end else if (dp[i]) begin
        wt[i]--; s_hreadyout[i] = (wt[i] == 0);
      end
    end
  end

  // two-cycle ERROR form
  logic prev_err1 = 0;
  int   n_err2 = 0;
  always @(negedge clk) if (rst_n) begin
    if (prev_err1) begin
      check(hresp && hready, "second ERROR cycle");
      n_err2++;
    end
    prev_err1 = hresp && !hready;
  end

  initial begin
    #5_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int region(logic [31:0] a);
    if (a < 32'h200) return 0;
    if (a >= 32'h1000_0000 && a < 32'h1010_0000) return 1;
    if (a >= 32'h2000_0000 && a < 32'h2000_0800) return 2;
    if (a >= 32'h4000_0000 && a < 32'h4000_1000) return 3;
    if (a >= 32'h4001_0000 && a < 32'h4002_0000) return 4;
    return 5;
  endfunction

  int n_unmapped = 0;
  task automatic one();
    logic [31:0] base [6] = '{32'h0, 32'h1000_0000, 32'h2000_0000, 32'h4000_0000, 32'h4001_0000, 32'h0};
    logic [31:0] size [6] = '{32'h200, 32'h10_0000, 32'h800, 32'h1000, 32'h1_0000, 32'h0};
    logic [31:0] a, rd;
    bit err;
    int k, r;
    k = $urandom_range(0, 5);
    case ($urandom_range(0, 3))
      0: a = base[k] + size[k];                     // first address past it
      1: a = base[k] + size[k] - 4;                 // last word in it
      default: a = base[k] + ($urandom % (size[k] == 0 ? 32'hFFFF_FFFF : size[k]));
    endcase
    a[1:0] = 2'd0;
    r = region(a);
    if (r < 5) expected_served[r]++; else n_unmapped++;
    bfm.read32(a, rd, err);
    check(err == (r == 5), $sformatf("address %h: ERROR %0b", a, err));
    if (r < 5) check(rd == {4'(r), a[27:0]}, $sformatf("address %h read %h", a, rd));
  endtask

  initial begin
    #22 rst_n = 1;
    fork
      for (int i = 0; i < 400; i++) one();
      for (int i = 0; i < 400; i++) one();
    join
    repeat (5) @(posedge clk);
    for (int i = 0; i < 5; i++)
      check(served[i] == expected_served[i] && served[i] > 20,
            $sformatf("slave %0d served %0d, expected %0d", i, served[i], expected_served[i]));
    check(n_err2 == n_unmapped && n_unmapped > 20, $sformatf("%0d ERROR responses for %0d unmapped", n_err2, n_unmapped));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
