// tb_lit_top: end-to-end test of the whole digital core at full size (no
// parameter changes). A pipelined AHB master model stands in for the
// Cortex-M0 and plays the software; slave models stand in for the boot ROM
// and for the NAND Flash controller, whose data port streams a known image
// of the flash contents. The coil output is looped back to the coil input.
//
// Sequence:
//   battery ramps up, the brown-out detector releases reset; boot ROM read;
//   unmapped address answered with ERROR;
//   pin the handler line, then random loads and stores over a working set
//   bigger than the cache's associativity: every miss arrives as a bus
//   ERROR and is handled as the real fault handler would (FAULT_ADDR,
//   CACHE_ALLOC, copy 16 words from the flash model with stores, retry);
//   a reference list of resident lines, kept from the eviction reports,
//   predicts hit or miss and the data of every access;
//   a set filled with pinned lines refuses allocation; a miss below the pin
//   line is flagged;
//   Deep Sleep memory is written; Standby with a GPIO wake; Deep Sleep with
//   one way's banks kept and a timer wake (wake order checked, lines of the
//   other ways gone, kept lines and the Deep Sleep memory intact); Deep
//   Sleep with a touch-sensor (CDC) wake;
//   system clock divider set to 4 MHz and back; converter on, ratio set,
//   bypass; voltage doubler on the core clock and on its oscillator;
//   bytes through the coil link;
//   battery dip: lock-off holds reset after recovery, a full discharge and
//   recharge restarts the chip.
// Each mechanism is counted; one that never happened is a failure.
// Clocks: 512 MHz generator, 32.768 kHz crystal, 2 MHz doubler oscillator;
// about 2.3 ms of simulated time. The modes, wake order, pinning and
// lock-off checked follow the published chip; memory map, registers and
// handler sequence are this design's own.
`timescale 1ps/1ps
module tb_lit_top;
  import lit_pkg::*;
  int checks = 0, failures = 0;

  // ---------------- clocks and stimulus ----------------
  logic clk_512 = 0, clk32k = 0, dbl_osc_clk = 0;
  always #977 clk_512 = !clk_512;             // 512 MHz
  always #15_258_789 clk32k = !clk32k;        // 32.768 kHz
  always #250_000 dbl_osc_clk = !dbl_osc_clk; // 2 MHz doubler oscillator

  logic [15:0] vbat_mv = 0;
  logic [26:0] gpio_in = 0;
  logic [9:0]  cdc_event = 0;

  // ---------------- DUT ----------------
  logic        resetn, clk_half, sys_clk, m0_hclk;
  logic [31:0] m0_haddr, m0_hwdata, m0_hrdata;
  logic [1:0]  m0_htrans;
  logic        m0_hwrite, m0_hready, m0_hresp;
  logic [2:0]  m0_hsize;
  logic        rom_hsel, nand_hsel;
  logic [31:0] rom_hrdata = 0, nand_hrdata = 0;
  logic        rom_hreadyout = 1, nand_hreadyout = 1;
  logic        rom_hresp = 0, nand_hresp = 0;
  pmode_e      power_mode;
  logic        active_ldo_en, sleep_mode, dirty_ldo_en, bypass_batt;
  logic [10:0] scn_sw;
  logic        scn_phi1, scn_phi2, scn_bypass_sw, dbl_phi1, dbl_phi2;
  logic [26:0] gpio_out, gpio_oe;
  logic        coil_tx, coil_rx;

  assign coil_rx = coil_tx;

  lit_top dut (.*);

  ahb_master_bfm cpu (.hclk(m0_hclk), .hresetn(resetn), .haddr(m0_haddr),
                      .htrans(m0_htrans), .hwrite(m0_hwrite), .hsize(m0_hsize),
                      .hwdata(m0_hwdata), .hready(m0_hready), .hresp(m0_hresp),
                      .hrdata(m0_hrdata));

  wire hclk = sys_clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t ps)", what, $time); end
  endtask

  // ---------------- memory map ----------------
  localparam logic [31:0] CACHE = 32'h1000_0000, DSRAM = 32'h2000_0000,
                          SYS = 32'h4000_0000, NAND = 32'h4001_0000;
  localparam logic [31:0] WIC_CTRL = SYS + 'h00, WIC_BANKS = SYS + 'h04,
                          WIC_CMD = SYS + 'h08, WIC_STATUS = SYS + 'h0C,
                          PIN = SYS + 'h10, ALLOC = SYS + 'h14, EVICT = SYS + 'h18,
                          FADDR = SYS + 'h1C, FSTAT = SYS + 'h20, CLKCFG = SYS + 'h24,
                          SCNCFG = SYS + 'h28, DBLCFG = SYS + 'h2C,
                          T_ALARM = SYS + 'h30, T_NOW = SYS + 'h34, T_CTRL = SYS + 'h38,
                          G_OUT = SYS + 'h40, G_OE = SYS + 'h44, G_IN = SYS + 'h48,
                          G_WEN = SYS + 'h4C, G_WLVL = SYS + 'h50,
                          LTX = SYS + 'h60, LRX = SYS + 'h64;

  // flash image: what the NAND Flash holds for each cache-window offset
  function automatic logic [31:0] img(logic [31:0] off);
    return (off >> 2) * 32'h9E37_79B1 ^ 32'hC0DE_0000;
  endfunction

  // ---------------- boot ROM model: no wait states ----------------
  always begin
    bit acc; logic [31:0] a;
    @(negedge hclk);
    acc = rom_hsel && m0_htrans[1] && m0_hready; a = m0_haddr;
    @(posedge hclk); #1;
    if (acc) rom_hrdata = {16'hB007, a[15:0]};
  end

  // ---------------- NAND Flash controller model ----------------
  // offset 0: write the flash offset to stream from; offset 4: read the
  // next word (the offset advances by 4). 0-2 wait states per transfer.
  logic [31:0] nand_ptr = 0;
  bit          n_dp = 0, n_dpw = 0;
  logic [31:0] n_dpa = 0;
  int          n_wt = 0, n_nand_reads = 0;
  always begin
    bit acc, cpl, w; logic [31:0] a, wd;
    @(negedge hclk);
    acc = nand_hsel && m0_htrans[1] && m0_hready; a = m0_haddr; w = m0_hwrite;
    cpl = n_dp && nand_hreadyout && m0_hready; wd = m0_hwdata;
    @(posedge hclk); #1;
    if (cpl) begin
      if (n_dpw && n_dpa[3:0] == 4'h0) nand_ptr = wd;
      if (!n_dpw && n_dpa[3:0] == 4'h4) begin nand_ptr += 4; n_nand_reads++; end
    end
    if (acc) begin
      n_dp = 1; n_dpw = w; n_dpa = a;
      n_wt = $urandom_range(0, 2);
      nand_hreadyout = (n_wt == 0);
      nand_hrdata = (a[3:0] == 4'h4) ? img(nand_ptr) : nand_ptr;
    end else if (cpl) begin
      n_dp = 0; nand_hreadyout = 1;
    end else if (n_dp && n_wt > 0) begin
      n_wt--; nand_hreadyout = (n_wt == 0);
    end
  end

  // ---------------- software helpers ----------------
  task automatic rd(logic [31:0] a, output logic [31:0] d, output bit err);
    cpu.read32(a, d, err);
  endtask
  task automatic wr(logic [31:0] a, logic [31:0] d);
    bit err;
    cpu.write32(a, d, err);
    check(!err, $sformatf("write %h answered OK", a));
  endtask
  task automatic rdv(logic [31:0] a, output logic [31:0] d);
    bit err;
    cpu.read32(a, d, err);
    check(!err, $sformatf("read %h answered OK", a));
  endtask

  // ---------------- mechanism counters ----------------
  int m_reset_release = 0, m_rom = 0, m_unmapped = 0, m_miss = 0, m_alloc = 0,
      m_evict = 0, m_fill_hit = 0, m_store_hit = 0, m_pin_kept = 0,
      m_refused = 0, m_pin_miss_flag = 0, m_dsram = 0, m_stby_gpio = 0,
      m_deep_timer = 0, m_deep_cdc = 0, m_bank_keep = 0, m_bank_lost = 0,
      m_wake_order = 0, m_stby_slow = 0, m_clk_switch = 0, m_scn = 0,
      m_scn_bypass = 0, m_dbl_core = 0, m_dbl_osc = 0, m_link = 0,
      m_bod_lock = 0, m_bod_restart = 0;

  // ---------------- cache reference: resident lines ----------------
  bit          resident [int];     // line offset -> resident
  int          line_way [int];
  logic [31:0] stored   [int];     // word offset -> value stored by software
  logic [19:0] pin_now = 0;

  function automatic logic [31:0] expect_word(int off);
    if (stored.exists(off)) return stored[off];
    return img(off);
  endfunction

  function automatic void drop_line(int line);
    resident.delete(line);
    line_way.delete(line);
    for (int i = 0; i < 64; i += 4) stored.delete(line + i);
  endfunction

  // the miss handler; returns 0 if no line could be allocated
  task automatic handle_miss(int off, output bit ok);
    logic [31:0] d;
    int line;
    line = off & ~63;
    rdv(FSTAT, d);
    check(d[0] == 1'b1, "FAULT_STAT shows the miss");
    check(d[1] == (off < int'(pin_now) - (int'(pin_now) % 64) + ((int'(pin_now) % 64) != 0 ? 64 : 0)),
          $sformatf("FAULT_STAT pinned flag for %h", off));
    rdv(FADDR, d);
    check(d == 32'(off), $sformatf("FAULT_ADDR %h, expected %h", d, off));
    wr(ALLOC, 32'(line));
    m_alloc++;
    rdv(ALLOC, d);
    ok = d[0];
    if (!ok) return;
    if (d[1]) begin
      logic [31:0] e;
      rdv(EVICT, e);
      check(resident.exists(int'(e)), $sformatf("evicted line %h was resident", e));
      check(int'(e) >= int'(pin_now), $sformatf("evicted line %h is not pinned", e));
      check(line_way.exists(int'(e)) && line_way[int'(e)] == int'(d[3:2]), "evicted from the allocated way");
      drop_line(int'(e));
      m_evict++;
    end else begin
      // no eviction: there was a free way in the set
      int n;
      n = 0;
      foreach (resident[l]) if (((l >> 6) & 511) == ((line >> 6) & 511)) n++;
      check(n < 4, "allocation without eviction only when the set had room");
    end
    resident[line] = 1;
    line_way[line] = int'(d[3:2]);
    wr(NAND, 32'(line));
    for (int i = 0; i < 16; i++) begin
      logic [31:0] w;
      rdv(NAND + 4, w);
      wr(CACHE + 32'(line + 4 * i), w);
    end
  endtask

  // a load from the cache window, as the program sees it: a miss faults,
  // the handler runs, the load is retried
  task automatic load(int off, output logic [31:0] d);
    bit err, ok;
    rd(CACHE + 32'(off), d, err);
    check(err == !resident.exists(off & ~63), $sformatf("load %h: miss %0b, reference says %0b", off, err, !resident.exists(off & ~63)));
    if (err) begin
      m_miss++;
      handle_miss(off, ok);
      check(ok, "allocation succeeded");
      rd(CACHE + 32'(off), d, err);
      check(!err, "retried load hits");
      if (!err) m_fill_hit++;
    end
    check(d == expect_word(off), $sformatf("load %h = %h, expected %h", off, d, expect_word(off)));
  endtask

  task automatic store(int off, logic [31:0] v);
    bit err, ok;
    logic [31:0] dummy;
    cpu.write32(CACHE + 32'(off), v, err);
    check(err == !resident.exists(off & ~63), $sformatf("store %h: miss %0b", off, err));
    if (err) begin
      m_miss++;
      handle_miss(off, ok);
      check(ok, "allocation succeeded");
      cpu.write32(CACHE + 32'(off), v, err);
      check(!err, "retried store hits");
    end
    if (!err) m_store_hit++;
    stored[off] = v;
    dummy = 0;
  endtask

  // ---------------- waiting helpers ----------------
  task automatic wait_mode(pmode_e m, int max_us, string what);
    int t;
    t = 0;
    while (power_mode != m && t < max_us * 10) begin #100_000; t++; end
    check(power_mode == m, what);
  endtask

  // count edges of a signal over a window
  int n_mclk = 0, n_half = 0;
  always @(posedge m0_hclk) n_mclk++;
  always @(posedge clk_half) n_half++;

  // mode-change trace for the wake order
  pmode_e mode_trace [$];
  always @(power_mode) mode_trace.push_back(power_mode);

  // converter and doubler phase monitors
  int n_scn_phi1 = 0, n_dbl_phi1 = 0, n_overlap = 0, n_p1p2_overlap = 0;
  always @(posedge scn_phi1) n_scn_phi1++;
  always @(posedge dbl_phi1) n_dbl_phi1++;
  always @(negedge clk_512) begin
    if (scn_phi1 && scn_phi2) n_overlap++;
    if (dbl_phi1 && dbl_phi2) n_overlap++;
  end

  // ---------------- watchdog ----------------
  initial begin
    #20_000_000_000;   // 20 ms; the whole test needs about 2.3 ms
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- the test ----------------
  task automatic measure_period(ref logic clk, output int ps);
    realtime t0, t1;
    @(posedge clk); t0 = $realtime;
    repeat (8) @(posedge clk);
    t1 = $realtime;
    ps = int'((t1 - t0) / 8);
  endtask

  initial begin
    logic [31:0] d;
    bit err, ok;
    int per;

    // battery insertion
    for (int v = 0; v <= 3000; v += 100) begin
      vbat_mv = 16'(v);
      #200_000;
      if (v <= 1700) check(!resetn, $sformatf("reset held at %0d mV", v));
    end
    check(resetn, "reset released above the high threshold");
    if (resetn) m_reset_release++;
    repeat (20) @(posedge hclk);

    // boot ROM and an unmapped address
    rd(32'h0000_0010, d, err);
    check(!err && d == 32'hB007_0010, "boot ROM word");
    if (!err) m_rom++;
    rd(32'h3000_0000, d, err);
    check(err, "unmapped address answered with ERROR");
    if (err) m_unmapped++;
    rdv(CLKCFG, d);
    check(d == 32'h0000_2002, "clock divider reset value");
    measure_period(m0_hclk, per);
    check(per > 15_000 && per < 16_300, $sformatf("core clock period %0d ps at 64 MHz", per));

    // pin the first line (the handler's home) and load it
    pin_now = 20'h40;
    wr(PIN, 32'(pin_now));
    load(0, d);

    // random loads and stores: sets 0..3, six tags each (more than 4 ways)
    for (int i = 0; i < 400; i++) begin
      int off;
      off = $urandom_range(0, 5) * 32'h8000 + $urandom_range(0, 3) * 64 + $urandom_range(0, 15) * 4;
      if ($urandom_range(0, 3) == 0) store(off, $urandom);
      else load(off, d);
    end
    rd(CACHE + 0, d, err);
    check(!err && d == expect_word(0), "pinned line still resident");
    if (!err) m_pin_kept++;

    // fill set 0 with four lines, pin them all, and ask for a fifth
    load(32'h00000, d); load(32'h08000, d); load(32'h10000, d); load(32'h18000, d);
    pin_now = 20'h18040;
    wr(PIN, 32'(pin_now));
    rd(CACHE + 32'h20000, d, err);
    check(err, "miss on a fifth line of a fully pinned set");
    if (err) begin
      handle_miss(32'h20000, ok);
      check(!ok, "allocation refused when all ways are pinned");
      if (!ok) m_refused++;
    end
    // a miss below the pin line is flagged
    rd(CACHE + 32'h1900, d, err);
    check(err, "miss at a line never loaded");
    rdv(FSTAT, d);
    check(d[1:0] == 2'b11, "miss below the pin line flagged");
    if (d[1:0] == 2'b11) m_pin_miss_flag++;
    pin_now = 20'h40;
    wr(PIN, 32'(pin_now));

    // Deep Sleep memory
    for (int i = 0; i < 16; i++) wr(DSRAM + 32'(4 * i), 32'hD5_0000 + 32'(i));
    for (int i = 0; i < 16; i++) begin
      rdv(DSRAM + 32'(4 * i), d);
      check(d == 32'hD5_0000 + 32'(i), "Deep Sleep memory word");
    end
    m_dsram++;

    // ---- Standby, GPIO wake ----
    wr(WIC_CTRL, {19'd0, 1'b0, 1'b1, 3'b111, 8'd4});   // all wakes, delay 4
    wr(G_WLVL, 32'h20); wr(G_WEN, 32'h20);
    wr(WIC_CMD, 1);
    wait_mode(PM_STANDBY, 500, "entered Standby");
    n_mclk = 0;
    measure_period(sys_clk, per);
    check(per > 240_000 && per < 260_000, $sformatf("Standby system clock period %0d ps", per));
    if (per > 240_000 && per < 260_000) m_stby_slow++;
    #20_000_000;
    check(n_mclk == 0, "core clock gated in Standby");
    check(active_ldo_en && !sleep_mode, "Standby keeps the Active LDO");
    gpio_in[5] = 1;
    wait_mode(PM_ACTIVE, 500, "GPIO wakes Standby");
    gpio_in[5] = 0;
    rdv(WIC_STATUS, d);
    check(d[6:4] == 3'b010, $sformatf("wake cause %b is GPIO", d[6:4]));
    if (power_mode == PM_ACTIVE && d[6:4] == 3'b010) m_stby_gpio++;
    wr(G_WEN, 0);

    // ---- Deep Sleep with way 0 kept, timer wake ----
    wr(WIC_BANKS, 32'h000F);
    rdv(T_NOW, d);
    wr(T_ALARM, d + 30);
    wr(T_CTRL, 1);
    do rdv(T_CTRL, d); while (d[2]);
    wr(WIC_CMD, 2);
    wait_mode(PM_DEEP, 500, "entered Deep Sleep");
    mode_trace.delete();
    n_mclk = 0; n_half = 0;
    #30_000_000;
    check(n_mclk == 0 && n_half == 0, "clocks stopped in Deep Sleep");
    check(sleep_mode && !active_ldo_en && !dirty_ldo_en, "LDOs in Deep Sleep");
    wait_mode(PM_ACTIVE, 3000, "timer wakes Deep Sleep");
    check(mode_trace.size() == 4 && mode_trace[0] == PM_WAKE_LDO && mode_trace[1] == PM_WAKE_CLK
          && mode_trace[2] == PM_WAKE_MEM && mode_trace[3] == PM_ACTIVE, "wake order LDO, clock, memory, core");
    if (mode_trace.size() == 4 && mode_trace[3] == PM_ACTIVE) m_wake_order++;
    rdv(WIC_STATUS, d);
    check(d[6:4] == 3'b001, $sformatf("wake cause %b is the timer", d[6:4]));
    if (d[6:4] == 3'b001) m_deep_timer++;
    wr(T_CTRL, 2);
    do rdv(T_CTRL, d); while (d[2]);   // the clear reaches the 32 kHz side
    check(d[1:0] == 2'b00, "timer disarmed and cleared");
    // lines outside way 0 are gone, way 0 kept
    begin
      int kept, lost;
      int lines [$];
      kept = 0; lost = 0;
      foreach (resident[l]) lines.push_back(l);
      foreach (lines[k]) begin
        int l;
        l = lines[k];
        rd(CACHE + 32'(l), d, err);
        if (line_way[l] == 0) begin
          check(!err && d == expect_word(l), $sformatf("line %h in a kept bank survives", l));
          kept++;
        end else begin
          check(err, $sformatf("line %h in a powered-down bank is gone", l));
          lost++;
          drop_line(l);
        end
      end
      check(kept > 0 && lost > 0, $sformatf("%0d lines kept, %0d lost", kept, lost));
      if (kept > 0) m_bank_keep++;
      if (lost > 0) m_bank_lost++;
      rdv(FSTAT, d);   // clear the flag left by the probing
    end
    for (int i = 0; i < 16; i++) begin
      rdv(DSRAM + 32'(4 * i), d);
      check(d == 32'hD5_0000 + 32'(i), "Deep Sleep memory kept");
    end

    // ---- Deep Sleep, touch sensor wake ----
    wr(WIC_CMD, 2);
    wait_mode(PM_DEEP, 500, "entered Deep Sleep again");
    #5_000_000;
    cdc_event[3] = 1;
    wait_mode(PM_ACTIVE, 3000, "touch sensor wakes Deep Sleep");
    cdc_event[3] = 0;
    rdv(WIC_STATUS, d);
    check(d[6:4] == 3'b100, $sformatf("wake cause %b is the touch sensor", d[6:4]));
    if (d[6:4] == 3'b100) m_deep_cdc++;
    load(0, d);   // pinned handler line still there and working

    // ---- system clock 4 MHz and back ----
    wr(CLKCFG, 32'h0000_2020);
    repeat (4) @(posedge m0_hclk);
    measure_period(m0_hclk, per);
    check(per > 240_000 && per < 260_000, $sformatf("core clock period %0d ps at 4 MHz", per));
    wr(CLKCFG, 32'h0000_2002);
    repeat (4) @(posedge m0_hclk);
    measure_period(m0_hclk, per);
    check(per > 15_000 && per < 16_300, $sformatf("core clock period %0d ps back at 64 MHz", per));
    if (per > 15_000 && per < 16_300) m_clk_switch++;

    // ---- converter ----
    wr(SCNCFG, {27'd0, 1'b0, 1'b1, 3'(SCN_R50)});
    n_scn_phi1 = 0;
    begin
      int bad_on, bad_off, seen_hi [11];
      bad_on = 0; bad_off = 0;
      for (int k = 0; k < 11; k++) seen_hi[k] = 0;
      repeat (200) begin
        @(negedge hclk);
        for (int k = 0; k < 11; k++) begin
          sw_mode_e m;
          m = scn_switch_mode(SCN_R50, k + 1);
          if (m == SW_ON && !scn_sw[k]) bad_on++;
          if (m == SW_OFF && scn_sw[k]) bad_off++;
          if (scn_sw[k]) seen_hi[k]++;
        end
      end
      check(bad_on == 0 && bad_off == 0, "converter switches held on/off per the schedule");
      check(n_scn_phi1 > 5, "converter phases running");
      begin
        int moving;
        moving = 0;
        for (int k = 0; k < 11; k++)
          if (scn_switch_mode(SCN_R50, k + 1) inside {SW_P1, SW_P2})
            moving += int'(seen_hi[k] > 0 && seen_hi[k] < 200);
        check(moving > 0, "phase switches toggle");
        if (bad_on == 0 && bad_off == 0 && moving > 0) m_scn++;
      end
    end
    wr(SCNCFG, {27'd0, 1'b1, 1'b1, 3'(SCN_R50)});
    repeat (10) @(negedge hclk);
    check(scn_bypass_sw && scn_sw == 0, "converter bypass");
    if (scn_bypass_sw && scn_sw == 0) m_scn_bypass++;
    wr(SCNCFG, {27'd0, 1'b0, 1'b0, 3'(SCN_R100)});

    // ---- doubler clocks ----
    n_dbl_phi1 = 0;
    #2_000_000;
    check(n_dbl_phi1 > 10, $sformatf("doubler pumps on the core clock (%0d)", n_dbl_phi1));
    if (n_dbl_phi1 > 10) m_dbl_core++;
    wr(DBLCFG, 32'h3);
    #1_000_000;
    n_dbl_phi1 = 0;
    #10_000_000;
    // 2 MHz oscillator, four-cycle period of the phase generator: ~5 in 10 us
    check(n_dbl_phi1 >= 3 && n_dbl_phi1 <= 8, $sformatf("doubler pumps on its oscillator (%0d)", n_dbl_phi1));
    if (n_dbl_phi1 >= 3 && n_dbl_phi1 <= 8) m_dbl_osc++;
    wr(DBLCFG, 32'h2);
    check(n_overlap == 0, "converter and doubler phases never overlap");

    // ---- coil link ----
    rdv(LRX, d);
    for (int i = 0; i < 6; i++) begin
      logic [7:0] b;
      int t;
      b = 8'($urandom);
      wr(LTX, 32'(b));
      t = 0;
      do begin rdv(LRX, d); t++; end while (!d[8] && t < 2000);
      check(d[9:0] == {2'b01, b}, $sformatf("coil link byte %h received as %h", b, d[9:0]));
      if (d[9:0] == {2'b01, b}) m_link++;
    end

    // ---- brown-out ----
    vbat_mv = 1500;
    #1_000_000;
    check(!resetn, "reset asserted on a dip below 1.7 V");
    vbat_mv = 3000;
    #5_000_000;
    check(!resetn, "lock-off: reset held after the battery recovers");
    if (!resetn) m_bod_lock++;
    vbat_mv = 900;
    #1_000_000;
    vbat_mv = 3000;
    #1_000_000;
    check(resetn, "restart after a full discharge");
    repeat (20) @(posedge hclk);
    rdv(CLKCFG, d);
    check(d == 32'h0000_2002, "registers back at reset values after restart");
    rd(CACHE + 0, d, err);
    check(err, "cache empty after restart");
    if (resetn && err) m_bod_restart++;

    // ---- every mechanism must have happened ----
    begin
      int m [string];
      m["reset release"] = m_reset_release;  m["boot ROM read"] = m_rom;
      m["unmapped ERROR"] = m_unmapped;       m["cache miss fault"] = m_miss;
      m["line allocation"] = m_alloc;         m["eviction"] = m_evict;
      m["hit after fill"] = m_fill_hit;       m["store hit"] = m_store_hit;
      m["pinned line kept"] = m_pin_kept;     m["allocation refused"] = m_refused;
      m["pinned miss flag"] = m_pin_miss_flag; m["Deep Sleep memory"] = m_dsram;
      m["Standby GPIO wake"] = m_stby_gpio;   m["Standby slow clock"] = m_stby_slow;
      m["Deep Sleep timer wake"] = m_deep_timer; m["Deep Sleep CDC wake"] = m_deep_cdc;
      m["bank kept"] = m_bank_keep;           m["bank lost"] = m_bank_lost;
      m["wake order"] = m_wake_order;         m["clock switch"] = m_clk_switch;
      m["converter"] = m_scn;                 m["converter bypass"] = m_scn_bypass;
      m["doubler core clock"] = m_dbl_core;   m["doubler oscillator"] = m_dbl_osc;
      m["coil link"] = m_link;                m["lock-off"] = m_bod_lock;
      m["restart"] = m_bod_restart;
      foreach (m[k]) begin
        $display("mechanism %-22s %0d", k, m[k]);
        check(m[k] > 0, $sformatf("mechanism '%s' happened", k));
      end
    end
    $display("bus transfers %0d, ERROR responses %0d", cpu.n_xfers, cpu.n_errors);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
