// tb_lit_cache: drives the cache through the software miss-handling flow
// and compares every result with a reference model kept in the testbench
// (tags, valid bits and use order per set, and the data of every line).
//   - misses fault and change nothing; pinned misses are flagged
//   - allocation picks an invalid way, else the oldest unpinned way, and
//     reports the displaced line; a set with four pinned lines refuses
//   - stores fill a line, loads return it; byte enables
//   - powering a data bank down invalidates exactly its lines
//   - every access completes one clock after the request
// Clock 100 MHz; full-size cache. Organisation and pinning follow the
// published cache; the allocation command is this design's own.
`timescale 1ns/1ps
module tb_lit_cache;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;

  logic        idle, req, we, done, fault, fault_pinned;
  logic [3:0]  be;
  logic [19:0] addr, alloc_addr, evict_addr, pin_line;
  logic [31:0] wdata, rdata;
  logic        alloc_req, alloc_done, alloc_ok, evict_valid;
  logic [1:0]  alloc_way;
  logic [15:0] bank_pwr;
  logic        tag_pwr;

  lit_cache dut (.*);

  // ---------------- reference model ----------------
  int          m_tag   [512][4];
  bit          m_vld   [512][4];
  int          m_order [512][4];   // [0] = most recent
  logic [31:0] m_data  [int];      // key: word address (addr >> 2)
  int          n_evict = 0, n_pinskip = 0, n_refuse = 0, n_hit = 0, n_miss = 0;

  function automatic int set_of(logic [19:0] a); return int'(a[14:6]); endfunction
  function automatic int tag_of(logic [19:0] a); return int'(a[19:15]); endfunction

  function automatic void m_touch(int s, int w);
    int pos = 0;
    for (int i = 0; i < 4; i++) if (m_order[s][i] == w) pos = i;
    for (int i = pos; i > 0; i--) m_order[s][i] = m_order[s][i-1];
    m_order[s][0] = w;
  endfunction

  function automatic int m_hit(logic [19:0] a);
    int s = set_of(a);
    for (int w = 0; w < 4; w++) if (m_vld[s][w] && m_tag[s][w] == tag_of(a)) return w;
    return -1;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------- drivers ----------------
  task automatic access(input bit w, input logic [19:0] a, input logic [31:0] d,
                        input logic [3:0] b, output bit f, output logic [31:0] q);
    int lat = 0;
    @(negedge clk);
    req = 1; we = w; addr = a; wdata = d; be = b;
    @(negedge clk);
    req = 0;
    while (!done) begin @(negedge clk); lat++; end
    check(lat == 0, "access completes one clock after the request");
    f = fault; q = rdata;
    if (fault) check(fault_pinned == (a < pin_line), "fault_pinned flag");
  endtask

  task automatic do_alloc(input logic [19:0] a, output bit ok);
    int s = set_of(a), w, exp_w;
    bit exp_ok, exp_ev;
    int exp_ev_tag;
    // model
    w = m_hit(a);
    exp_ev = 0; exp_ev_tag = 0;
    if (w >= 0) begin exp_ok = 1; exp_w = w; end
    else begin
      exp_ok = 0; exp_w = 0;
      for (int i = 3; i >= 0; i--) if (!m_vld[s][i]) begin exp_ok = 1; exp_w = i; end
      if (!exp_ok)
        for (int i = 3; i >= 0; i--) begin
          int c = m_order[s][i];
          bit pinned = ((m_tag[s][c] << 9) | s) < (pin_line >> 6);
          if (!exp_ok && !pinned) begin
            exp_ok = 1; exp_w = c;
            if (i != 3) n_pinskip++;
          end
        end
      if (exp_ok && m_vld[s][exp_w]) begin exp_ev = 1; exp_ev_tag = m_tag[s][exp_w]; end
    end
    @(negedge clk);
    alloc_req = 1; alloc_addr = a;
    @(negedge clk);
    alloc_req = 0;
    check(alloc_done, "allocation completes one clock after the request");
    check(alloc_ok == exp_ok, $sformatf("alloc_ok %0d expected %0d (set %0d)", alloc_ok, exp_ok, s));
    if (exp_ok) begin
      check(alloc_way == 2'(exp_w), $sformatf("alloc way %0d expected %0d (set %0d)", alloc_way, exp_w, s));
      check(evict_valid == exp_ev, "evict_valid");
      if (exp_ev) begin
        n_evict++;
        check(evict_addr == 20'((exp_ev_tag << 15) | (s << 6)), "evict_addr");
        // the evicted line's data is gone from the model
        for (int k = 0; k < 16; k++) m_data.delete(((exp_ev_tag << 15) | (s << 6) | (k << 2)) >> 2);
      end
      m_tag[s][exp_w] = tag_of(a);
      m_vld[s][exp_w] = 1;
      m_touch(s, exp_w);
    end else n_refuse++;
    ok = exp_ok;
  endtask

  // the miss handler: fault, allocate, fill the line with stores, retry
  task automatic load_check(input logic [19:0] a);
    bit f; logic [31:0] q;
    int w = m_hit(a);
    access(0, a, 0, 4'hf, f, q);
    check(f == (w < 0), $sformatf("load at %h: fault %0d, model hit way %0d", a, f, w));
    if (w >= 0) begin
      n_hit++;
      m_touch(set_of(a), w);
      if (m_data.exists(a >> 2)) check(q == m_data[a >> 2], $sformatf("load at %h: %h expected %h", a, q, m_data[a >> 2]));
    end else n_miss++;
  endtask

  task automatic fill_line(input logic [19:0] a);
    bit ok, f; logic [31:0] q;
    logic [19:0] base = {a[19:6], 6'd0};
    do_alloc(base, ok);
    if (!ok) return;
    for (int k = 0; k < 16; k++) begin
      logic [31:0] d = $urandom;
      access(1, base | 20'(k << 2), d, 4'hf, f, q);
      check(!f, "store into allocated line hits");
      m_data[(base >> 2) + k] = d;
      m_touch(set_of(base), m_hit(base));
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int sets [6] = '{0, 1, 127, 128, 300, 511};

  initial begin
    bit f; logic [31:0] q;
    req = 0; we = 0; be = 0; addr = 0; wdata = 0; alloc_req = 0; alloc_addr = 0;
    pin_line = 20'h0_2000;   // lowest 8 kB pinned
    bank_pwr = '1; tag_pwr = 1;
    for (int s = 0; s < 512; s++)
      for (int w = 0; w < 4; w++) begin m_vld[s][w] = 0; m_tag[s][w] = 0; m_order[s][w] = w; end
    repeat (3) @(posedge clk);
    rst_n = 1;

    // cold misses
    load_check(20'h0_0040);
    load_check(20'h4_1234 & ~20'h3);

    // random traffic over a few sets with many tags
    for (int n = 0; n < 400; n++) begin
      logic [19:0] a;
      int s, t;
      s = sets[$urandom_range(0, 5)];
      t = $urandom_range(0, 9);
      a = 20'((t << 15) | (s << 6) | ($urandom_range(0, 15) << 2));
      if (m_hit(a) < 0 && $urandom_range(0, 3) != 0) begin
        load_check(a);       // miss
        fill_line(a);
      end
      load_check(a);
    end

    // a set whose four lines are all pinned refuses allocation
    pin_line = 20'hF_FFC0;
    begin
      bit ok;
      for (int t = 0; t < 4; t++) fill_line(20'((t << 15) | (9 << 6)));
      do_alloc(20'((20 << 15) | (9 << 6)), ok);
      check(!ok, "allocation refused when every way is pinned");
    end
    pin_line = 20'h0_2000;

    // byte enables
    begin
      logic [19:0] a = 20'((3 << 15) | (9 << 6) | 8);
      access(1, a, 32'hAABBCCDD, 4'b0101, f, q);
      m_data[a >> 2] = (m_data[a >> 2] & 32'hFF00FF00) | 32'h00BB00DD;
      m_touch(9, m_hit(a));
      load_check(a);
    end

    // power down data bank 5 = way 1, sets 128..255
    begin
      logic [19:0] a1 = 20'((1 << 15) | (130 << 6));
      logic [19:0] a0 = 20'((2 << 15) | (131 << 6));
      for (int w = 0; w < 4; w++) begin m_vld[130][w] = 0; m_vld[131][w] = 0; end
      // fresh lines: the first two allocations of a set take ways 0 and 1
      fill_line(a0); fill_line(a1);
      fill_line(20'((5 << 15) | (130 << 6)));
      check(m_hit(a1) == 1 || m_hit(a1) == 0, "line placed");
      @(negedge clk); bank_pwr = 16'hFFFF & ~16'h0020;
      @(negedge clk); bank_pwr = '1;
      for (int s = 128; s < 256; s++) m_vld[s][1] = 0;
      load_check(a0); load_check(a1);
      load_check(20'((5 << 15) | (130 << 6)));
      // whole cache off
      @(negedge clk); tag_pwr = 0;
      @(negedge clk); tag_pwr = 1;
      for (int s = 0; s < 512; s++) for (int w = 0; w < 4; w++) m_vld[s][w] = 0;
      load_check(20'h0_0040);
    end

    check(n_evict > 0, "evictions happened");
    check(n_pinskip > 0, "pinned oldest line skipped at least once");
    check(n_refuse > 0, "refused allocation happened");
    check(n_hit > 50 && n_miss > 20, "hits and misses both happened");
    $display("hits %0d misses %0d evictions %0d pinned-skips %0d refusals %0d", n_hit, n_miss, n_evict, n_pinskip, n_refuse);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
