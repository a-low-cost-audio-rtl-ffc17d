// tb_ahb_slave_bridge: drives the bridge from the pipelined AHB master model
// with random byte, halfword and word reads and writes from two parallel
// threads. A responder here answers each request after a random delay and
// flags a fault for addresses with bit 10 set. Checks read data against a
// byte-level reference memory, the byte enables against the transfer size,
// that faulting transfers end in ERROR and others do not, and that every
// ERROR response is the two-cycle form (HREADY low then high, HRESP high).
// Clock 100 MHz; the responder answers 1-4 clocks after each request. The
// fault-to-ERROR mapping checked is this design's own reading of a precise
// bus fault.
`timescale 1ns/1ps
module tb_ahb_slave_bridge;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;

  logic [31:0] haddr, hwdata, hrdata;
  logic [1:0]  htrans;
  logic        hwrite, hready, hresp;
  logic [2:0]  hsize;
  logic        req, we, done, fault;
  logic [3:0]  be;
  logic [31:0] addr, wdata, rdata;

  ahb_master_bfm bfm (.hclk(clk), .hresetn(rst_n), .haddr, .htrans, .hwrite,
                      .hsize, .hwdata, .hready, .hresp, .hrdata);
  ahb_slave_bridge dut (.hclk(clk), .hresetn(rst_n), .hsel(1'b1), .haddr,
                        .htrans, .hwrite, .hsize, .hwdata, .hready,
                        .hreadyout(hready), .hresp, .hrdata, .req, .we, .be,
                        .addr, .wdata, .done, .fault, .rdata);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  // responder memory: 256 words
  logic [31:0] mem [256];
  logic [31:0] ref_mem [256];
  int  pend = 0;          // cycles left before done, 0 = no request
  bit  p_we; logic [31:0] p_addr, p_wdata; logic [3:0] p_be;
  int  n_req = 0, n_faults = 0, n_err2 = 0;

  always @(posedge clk) begin
    done  <= 1'b0;
    fault <= 1'b0;
    if (rst_n && req) begin
      n_req++;
      p_we = we; p_addr = addr; p_wdata = wdata; p_be = be;
      pend = $urandom_range(1, 4);
    end else if (pend > 0) begin
      pend--;
      if (pend == 0) begin
        done  <= 1'b1;
        fault <= p_addr[10];
        rdata <= mem[p_addr[9:2]];
        if (p_addr[10]) n_faults++;
        if (p_we && !p_addr[10])
          for (int i = 0; i < 4; i++)
            if (p_be[i]) mem[p_addr[9:2]][8*i +: 8] <= p_wdata[8*i +: 8];
      end
    end
  end

  // byte enables for every request
  always @(negedge clk) if (rst_n && req) begin
    logic [3:0] exp_be;
    // size is not visible on the request port; tell by the address pattern
    // the test uses: bits [31:30] carry the size
    case (addr[31:30])
      2'd0: exp_be = 4'b0001 << addr[1:0];
      2'd1: exp_be = 4'b0011 << (2 * addr[1]);
      default: exp_be = 4'b1111;
    endcase
    check(be == exp_be, $sformatf("byte enables %b for address %h", be, addr));
  end

  // two-cycle ERROR form
  logic prev_err1 = 0;
  always @(negedge clk) if (rst_n) begin
    if (prev_err1) begin
      check(hresp && hready, "second ERROR cycle");
      n_err2++;
    end
    if (hresp && !hready) check(!prev_err1, "ERROR first cycle lasts one cycle");
    prev_err1 = hresp && !hready;
  end

  initial begin
    #5_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(int thread);
    logic [31:0] a, wd, rd, exp;
    logic [2:0]  sz;
    bit          w, err, flt;
    sz = 3'($urandom_range(0, 2));
    a  = {2'(sz), 19'd0, 1'($urandom_range(0, 3) == 0), 2'(thread), 6'($urandom), 2'd0};
    if (sz == 0) a[1:0] = 2'($urandom);
    if (sz == 1) a[1]   = 1'($urandom);
    w   = 1'($urandom);
    wd  = $urandom;
    flt = a[10];
    exp = ref_mem[a[9:2]];
    if (w && !flt)
      for (int i = 0; i < 4; i++)
        if ((sz == 0 && i == a[1:0]) || (sz == 1 && i / 2 == a[1]) || sz == 2)
          ref_mem[a[9:2]][8*i +: 8] = wd[8*i +: 8];
    bfm.xfer(w, a, sz, wd, rd, err);
    check(err == flt, $sformatf("ERROR response %0b for address %h", err, a));
    if (!w && !flt) check(rd == exp, $sformatf("read %h = %h, expected %h", a, rd, exp));
  endtask

  initial begin
    for (int i = 0; i < 256; i++) begin
      mem[i] = 0; ref_mem[i] = 0;
    end
    done = 0; fault = 0; rdata = 0;
    #22 rst_n = 1;
    // each thread owns its own words (address bits 9:8), so the order of
    // a read and a write to one word is fixed by its thread
    fork
      for (int i = 0; i < 300; i++) one(0);
      for (int i = 0; i < 300; i++) one(1);
    join
    repeat (5) @(posedge clk);
    check(n_req == 600, $sformatf("%0d requests for 600 transfers", n_req));
    check(n_faults > 50 && n_err2 == n_faults, $sformatf("%0d faults, %0d ERROR responses", n_faults, n_err2));
    check(bfm.n_wait_cycles > 0, "wait states inserted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
