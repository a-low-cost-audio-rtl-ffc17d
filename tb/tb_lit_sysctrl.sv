// tb_lit_sysctrl: drives the register block's request port directly.
// Checks reset values; writes and reads back CACHE_PIN, CLK_CFG, SCN_CFG and
// DBL_CFG with random values and their outputs; runs CACHE_ALLOC against a
// cache model here that answers after a random delay (one alloc_req pulse,
// `done` only after alloc_done, status and EVICT_ADDR captured); captures a
// cache fault into FAULT_ADDR/FAULT_STAT and clears it by reading; sends
// LINK_TX bytes against a busy encoder model and captures LINK_RX bytes and
// errors; and checks that the WIC, timer and GPIO strobes fire for exactly
// their address ranges and pass their read data through.
// Clock 100 MHz; every access waits for `done`. The register map checked is
// this design's own.
`timescale 1ns/1ps
module tb_lit_sysctrl;
  import lit_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;

  logic        req, we, done;
  logic [11:0] addr;
  logic [31:0] wdata, rdata;
  logic [19:0] pin_line, alloc_addr, evict_addr, cache_fault_addr;
  logic        alloc_req, alloc_done, alloc_ok, evict_valid, cache_fault, cache_fault_pinned;
  logic [1:0]  alloc_way;
  logic        wic_we, wic_re, tmr_we, tmr_re, gpio_we, gpio_re;
  logic [31:0] wic_rdata, tmr_rdata, gpio_rdata;
  logic [7:0]  div_act, div_slow;
  scn_ratio_e  scn_ratio;
  logic        scn_en, scn_bypass, dbl_osc_sel, dbl_en;
  logic        link_tx_valid, link_tx_ready, link_rx_valid, link_rx_err;
  logic [7:0]  link_tx_data, link_rx_data;

  lit_sysctrl dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  // one access; returns read data and the number of cycles until done
  task automatic acc(bit w, logic [11:0] a, logic [31:0] d, output logic [31:0] r, output int cyc);
    @(negedge clk); req = 1; we = w; addr = a; wdata = d;
    @(negedge clk); req = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    r = rdata;
  endtask
  task automatic wr(logic [11:0] a, logic [31:0] d);
    logic [31:0] r; int c;
    acc(1, a, d, r, c);
  endtask
  task automatic rd(logic [11:0] a, output logic [31:0] r);
    int c;
    acc(0, a, 0, r, c);
  endtask

  // sub-block read data: registered one clock after the read strobe, as the
  // real blocks do
  logic [31:0] wic_v = 32'h1111_0000, tmr_v = 32'h2222_0000, gpio_v = 32'h3333_0000;
  int n_wic = 0, n_tmr = 0, n_gpio = 0;
  always @(posedge clk) begin
    if (wic_re)  wic_rdata  <= wic_v  | 32'(addr);
    if (tmr_re)  tmr_rdata  <= tmr_v  | 32'(addr);
    if (gpio_re) gpio_rdata <= gpio_v | 32'(addr);
    if (rst_n) begin
      n_wic  += int'(wic_we  || wic_re);
      n_tmr  += int'(tmr_we  || tmr_re);
      n_gpio += int'(gpio_we || gpio_re);
    end
  end

  // cache allocation model
  int n_alloc_req = 0;
  int alloc_wait = 0;
  always @(posedge clk) begin
    alloc_done <= 1'b0;
    if (rst_n && alloc_req) begin
      n_alloc_req++;
      alloc_wait = $urandom_range(1, 6);
    end else if (alloc_wait > 0) begin
      alloc_wait--;
      if (alloc_wait == 0) alloc_done <= 1'b1;
    end
  end

  // link encoder model: busy for a while after each byte
  int tx_busy = 0;
  byte tx_seen [$];
  always @(posedge clk) begin
    if (rst_n && link_tx_valid && link_tx_ready) begin
      tx_seen.push_back(link_tx_data);
      tx_busy <= $urandom_range(5, 30);
    end else if (tx_busy > 0) tx_busy <= tx_busy - 1;
  end
  assign link_tx_ready = (tx_busy == 0);

  initial begin
    #5_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] r, d;
    int c;
    req = 0; we = 0; addr = 0; wdata = 0;
    alloc_ok = 0; alloc_way = 0; evict_valid = 0; evict_addr = 0;
    cache_fault = 0; cache_fault_pinned = 0; cache_fault_addr = 0;
    wic_rdata = 0; tmr_rdata = 0; gpio_rdata = 0;
    link_rx_valid = 0; link_rx_err = 0; link_rx_data = 0;
    #22 rst_n = 1;

    // reset values
    check(div_act == 2 && div_slow == 32, "divider reset values");
    check(scn_ratio == SCN_R100 && !scn_en && !scn_bypass, "converter reset values");
    check(!dbl_osc_sel && dbl_en, "doubler reset values");
    rd(12'h024, r); check(r == 32'h0000_2002, "CLK_CFG reads its reset value");

    // plain registers
    for (int i = 0; i < 20; i++) begin
      d = $urandom;
      wr(12'h010, d); rd(12'h010, r);
      check(pin_line == d[19:0] && r == 32'(d[19:0]), "CACHE_PIN");
      d = $urandom;
      wr(12'h024, d); rd(12'h024, r);
      check(div_act == d[7:0] && div_slow == d[15:8] && r == {16'd0, d[15:0]}, "CLK_CFG");
      d = $urandom; d[2:0] = 3'($urandom_range(0, 5));
      wr(12'h028, d); rd(12'h028, r);
      check(scn_ratio == scn_ratio_e'(d[2:0]) && scn_en == d[3] && scn_bypass == d[4]
            && r == {27'd0, d[4:0]}, "SCN_CFG");
      d = $urandom;
      wr(12'h02C, d); rd(12'h02C, r);
      check(dbl_osc_sel == d[0] && dbl_en == d[1] && r == {30'd0, d[1:0]}, "DBL_CFG");
    end

    // allocation
    for (int i = 0; i < 20; i++) begin
      int n0;
      logic [19:0] la, ea;
      la = 20'($urandom); ea = 20'($urandom);
      alloc_ok = 1'($urandom); alloc_way = 2'($urandom); evict_valid = 1'($urandom);
      evict_addr = ea;
      n0 = n_alloc_req;
      acc(1, 12'h014, 32'(la), r, c);
      check(n_alloc_req == n0 + 1, "one alloc_req per CACHE_ALLOC write");
      check(alloc_addr == la, "alloc address");
      check(c >= 2, "the write waits for the allocation");
      rd(12'h014, r);
      check(r == {28'd0, alloc_way, evict_valid, alloc_ok}, "CACHE_ALLOC status");
      if (evict_valid) begin
        rd(12'h018, r);
        check(r == 32'(ea), "EVICT_ADDR");
      end
    end

    // miss capture
    for (int i = 0; i < 10; i++) begin
      logic [19:0] fa;
      bit pinned;
      fa = 20'($urandom); pinned = 1'($urandom);
      @(negedge clk); cache_fault = 1; cache_fault_addr = fa; cache_fault_pinned = pinned;
      @(negedge clk); cache_fault = 0;
      rd(12'h01C, r); check(r == 32'(fa), "FAULT_ADDR");
      rd(12'h020, r); check(r == {30'd0, pinned, 1'b1}, "FAULT_STAT after a miss");
      rd(12'h020, r); check(r[0] == 1'b0, "FAULT_STAT cleared by reading");
    end

    // link transmit
    for (int i = 0; i < 10; i++) begin
      d = $urandom;
      wr(12'h060, d);
      @(posedge clk); #1;   // the encoder takes the byte at this edge
      check(tx_seen.size() == 1 && tx_seen[0] == d[7:0], "LINK_TX byte to the encoder");
      tx_seen.delete();
    end
    // link receive
    for (int i = 0; i < 10; i++) begin
      logic [7:0] b;
      b = 8'($urandom);
      @(negedge clk); link_rx_valid = 1; link_rx_data = b;
      @(negedge clk); link_rx_valid = 0;
      rd(12'h064, r); check(r == {22'd0, 2'b01, b}, "LINK_RX new byte");
      rd(12'h064, r); check(r[9:8] == 2'b00, "LINK_RX flags cleared by reading");
    end
    @(negedge clk); link_rx_err = 1;
    @(negedge clk); link_rx_err = 0;
    rd(12'h064, r); check(r[9], "LINK_RX framing error");

    // strobe decode over the first 256 bytes, reads and writes
    n_wic = 0; n_tmr = 0; n_gpio = 0;
    for (int a = 0; a < 256; a += 4) begin
      int w0, t0, g0;
      if (a == 12'h014 || a == 12'h060) continue;   // these wait on models
      w0 = n_wic; t0 = n_tmr; g0 = n_gpio;
      rd(12'(a), r);
      check((n_wic - w0) == int'(a < 16) && (n_tmr - t0) == int'(a >= 48 && a < 64)
            && (n_gpio - g0) == int'(a >= 64 && a < 96), $sformatf("strobes for offset %h", a));
      if (a < 16)            check(r == (wic_v  | 32'(a)), "WIC read data");
      if (a >= 48 && a < 64) check(r == (tmr_v  | 32'(a)), "timer read data");
      if (a >= 64 && a < 96) check(r == (gpio_v | 32'(a)), "GPIO read data");
      w0 = n_wic; t0 = n_tmr; g0 = n_gpio;
      wr(12'(a), 0);
      check((n_wic - w0) == int'(a < 16) && (n_tmr - t0) == int'(a >= 48 && a < 64)
            && (n_gpio - g0) == int'(a >= 64 && a < 96), $sformatf("write strobes for offset %h", a));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
