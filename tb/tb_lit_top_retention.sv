// tb_lit_top_retention: the Deep Sleep retention options at full size.
// Software may keep any set of the cache's sixteen 8 kB data banks powered
// in Deep Sleep (8 kB to 128 kB, or none when the event checker runs from
// the 2 kB Deep Sleep memory). For each option below the test empties the
// cache (a Deep Sleep with no bank kept), installs 32 lines that cover every
// bank twice, enters Deep Sleep with that option in BANKS, wakes on a GPIO
// pin, and then reads every line: a line must hit with its data exactly
// when its bank ({way, set[8:7]}) was kept, and miss otherwise. The Deep
// Sleep memory must keep its contents through every sleep.
// The processor is the pipelined AHB master model; lines are filled with
// stores of a known pattern instead of a flash copy.
// Clocks as in the end-to-end test. The 8 kB
// retention granularity is the published one.
`timescale 1ps/1ps
module tb_lit_top_retention;
  import lit_pkg::*;
  int checks = 0, failures = 0;

  logic clk_512 = 0, clk32k = 0, dbl_osc_clk = 0;
  always #977 clk_512 = !clk_512;             // 512 MHz
  always #15_258_789 clk32k = !clk32k;        // 32.768 kHz
  always #250_000 dbl_osc_clk = !dbl_osc_clk;

  logic [15:0] vbat_mv = 0;
  logic [26:0] gpio_in = 0;
  logic [9:0]  cdc_event = 0;

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

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t ps)", what, $time); end
  endtask

  localparam logic [31:0] CACHE = 32'h1000_0000, DSRAM = 32'h2000_0000,
                          SYS = 32'h4000_0000;
  localparam logic [31:0] WIC_CTRL = SYS + 'h00, WIC_BANKS = SYS + 'h04,
                          WIC_CMD = SYS + 'h08, ALLOC = SYS + 'h14,
                          FSTAT = SYS + 'h20, G_WEN = SYS + 'h4C, G_WLVL = SYS + 'h50;

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

  function automatic logic [31:0] pat(int off, int round);
    return 32'(off) * 32'h0101_0007 ^ 32'(round) << 24;
  endfunction

  task automatic wait_mode(pmode_e m, int max_us, string what);
    int t;
    t = 0;
    while (power_mode != m && t < max_us * 10) begin #100_000; t++; end
    check(power_mode == m, what);
  endtask

  // one Deep Sleep with the given banks kept, woken by GPIO pin 0
  task automatic deep_sleep(logic [15:0] banks);
    wr(WIC_BANKS, 32'(banks));
    wr(WIC_CMD, 2);
    wait_mode(PM_DEEP, 500, "entered Deep Sleep");
    #100_000_000;
    gpio_in[0] = 1;
    wait_mode(PM_ACTIVE, 3000, "GPIO wakes Deep Sleep");
    gpio_in[0] = 0;
    #100_000_000;   // the pin level is seen as released before the next sleep
  endtask

  initial begin
    #100_000_000_000;   // 100 ms; the test needs about 8 ms
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int m_options = 0, m_kept = 0, m_lost = 0, m_dsram = 0;

  initial begin
    logic [31:0] d;
    bit err;
    logic [15:0] options [6] = '{16'h0000, 16'h0001, 16'h000F, 16'h00FF, 16'hA5C3, 16'hFFFF};

    for (int v = 0; v <= 3000; v += 300) begin vbat_mv = 16'(v); #200_000; end
    check(resetn, "reset released");
    repeat (20) @(posedge sys_clk);

    wr(WIC_CTRL, {19'd0, 1'b0, 1'b1, 3'b010, 8'd4});   // GPIO wake only
    wr(G_WLVL, 32'h1); wr(G_WEN, 32'h1);
    for (int i = 0; i < 512; i++) wr(DSRAM + 32'(4 * i), pat(i * 4, 99));

    foreach (options[r]) begin
      int line [32];
      int way [32];
      int kept, lost, exp_kept;
      logic [15:0] banks;
      banks = options[r];
      // empty the cache
      deep_sleep(16'h0000);
      // two sets in each quarter of the sets, four tags each: every way of
      // those sets, so every bank gets two lines
      for (int q = 0; q < 4; q++)
        for (int j = 0; j < 2; j++)
          for (int t = 0; t < 4; t++) begin
            int n, off;
            n = q * 8 + j * 4 + t;
            off = t * 32'h8000 + (q * 128 + j * 37 + r) * 64;
            line[n] = off;
            cpu.read32(CACHE + 32'(off), d, err);
            check(err, $sformatf("line %h misses in the empty cache", off));
            rdv(FSTAT, d);
            wr(ALLOC, 32'(off));
            rdv(ALLOC, d);
            check(d[0] && !d[1], "allocated into a free way");
            way[n] = int'(d[3:2]);
            for (int w = 0; w < 16; w += 5) wr(CACHE + 32'(off + 4 * w), pat(off + 4 * w, r));
          end
      begin
        bit [15:0] covered;
        covered = '0;
        foreach (line[n]) covered[way[n] * 4 + ((line[n] >> 13) & 3)] = 1'b1;
        check(covered == 16'hFFFF, $sformatf("lines cover every bank (%h)", covered));
      end
      deep_sleep(banks);
      kept = 0; lost = 0; exp_kept = 0;
      foreach (line[n]) begin
        int b;
        b = way[n] * 4 + ((line[n] >> 13) & 3);
        cpu.read32(CACHE + 32'(line[n]), d, err);
        if (banks[b]) begin
          exp_kept++;
          check(!err && d == pat(line[n], r), $sformatf("line %h in kept bank %0d survives", line[n], b));
          if (!err) kept++;
        end else begin
          check(err, $sformatf("line %h in bank %0d is gone", line[n], b));
          if (err) lost++;
        end
      end
      rdv(FSTAT, d);
      $display("option %h: %0d kB kept, %0d lines kept, %0d lost", banks, 8 * $countones(banks), kept, lost);
      check(kept == exp_kept && kept + lost == 32, "every line as the option says");
      if (kept == exp_kept && kept + lost == 32) m_options++;
      m_kept += kept; m_lost += lost;
    end
    for (int i = 0; i < 512; i++) begin
      rdv(DSRAM + 32'(4 * i), d);
      check(d == pat(i * 4, 99), "Deep Sleep memory kept through every sleep");
    end
    m_dsram++;

    check(m_options == 6, $sformatf("%0d of 6 retention options behaved", m_options));
    check(m_kept > 0, "some lines kept");
    check(m_lost > 0, "some lines lost");
    check(m_dsram > 0, "Deep Sleep memory checked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
