// lit_top: digital core of the LIT low-cost audio computer SoC.
//
// The chip is an ARM Cortex-M0 system whose code lives in cheap off-chip
// NAND Flash instead of NOR Flash or DRAM. A 128 kB 4-way true-LRU cache
// sits on the AHB bus; a miss becomes a bus error, and the fault handler
// (kept in a pinned part of the cache that is never evicted) copies the line
// from NAND Flash and installs it with an allocation command. Power is the
// other theme: a wakeup interrupt controller on the 32 kHz crystal clock
// moves the chip between Active, Standby and Deep Sleep, gating the core
// clock, stopping the clock divider, switching LDOs and power gating cache
// banks in 8 kB steps, and wakes it on a touch sensor, GPIO or timer event.
// A brown-out detector with lock-off keeps a sagging carbon-zinc battery
// from cycling the chip in and out of reset.
//
// This module wires the digital blocks together:
//   ahb_lite_mux      bus decoder; slaves: boot ROM (external), cache,
//                     Deep Sleep memory, system control, NAND Flash
//                     controller (external)
//   lit_cache         the cache, behind an ahb_slave_bridge
//   lit_dsram         2 kB Deep Sleep code memory, behind a bridge
//   lit_sysctrl       registers, behind a bridge; hosts the controls of
//   lit_wic           the wakeup interrupt controller,
//   lit_wake_timer    the 32 kHz wake timer,
//   lit_gpio          the 27-bit GPIO port,
//   manchester_codec  the near-field coil link codec,
//   lit_clkdiv        the /2, /n, /2 divider after the 512 MHz generator,
//   scn_switch_ctrl   the switched-capacitor boost converter's switches,
//   doubler_clk_ctrl  the voltage doubler's clock;
//   bod_comparators + bod_lockoff  power-on reset / brown-out detector.
// Not in this module (ports instead): the Cortex-M0 (its AHB master port
// and gated clock), the boot ROM and NAND Flash controller (AHB slave
// ports), the 512 MHz clock generator, the 32 kHz crystal oscillator, the
// doubler's internal oscillator, the touch-sensor converters (their event
// lines), and all analog power circuits (their enables).
//
// Clocks: `clk_512` feeds the divider; the bus and all bus slaves run on
// the divided system clock (64 MHz by default), which also leaves on
// `sys_clk` for the external bus slaves and the other peripheral blocks;
// `clk_half` (256 MHz) is for the class-D amplifier and the NAND Flash
// controller. The core gets `m0_hclk`, the system clock gated by the
// wakeup controller. `clk32k` runs always. Reset is
// the brown-out detector's RESETn, asserted asynchronously, for everything.
module lit_top
  import lit_pkg::*;
(
  input  logic        clk_512,
  input  logic        clk32k,
  input  logic        dbl_osc_clk,
  input  logic [15:0] vbat_mv,
  output logic        resetn,
  output logic        clk_half,
  output logic        sys_clk,
  // Cortex-M0 AHB-Lite master
  output logic        m0_hclk,
  input  logic [31:0] m0_haddr,
  input  logic [1:0]  m0_htrans,
  input  logic        m0_hwrite,
  input  logic [2:0]  m0_hsize,
  input  logic [31:0] m0_hwdata,
  output logic [31:0] m0_hrdata,
  output logic        m0_hready,
  output logic        m0_hresp,
  // external AHB slaves: boot ROM and NAND Flash controller
  output logic        rom_hsel,
  input  logic [31:0] rom_hrdata,
  input  logic        rom_hreadyout,
  input  logic        rom_hresp,
  output logic        nand_hsel,
  input  logic [31:0] nand_hrdata,
  input  logic        nand_hreadyout,
  input  logic        nand_hresp,
  // power control
  output pmode_e      power_mode,
  output logic        active_ldo_en,
  output logic        sleep_mode,
  output logic        dirty_ldo_en,
  output logic        bypass_batt,
  // switched-capacitor boost converter
  output logic [10:0] scn_sw,
  output logic        scn_phi1,
  output logic        scn_phi2,
  output logic        scn_bypass_sw,
  // voltage doubler
  output logic        dbl_phi1,
  output logic        dbl_phi2,
  // GPIO, touch sensor events, coil link
  input  logic [26:0] gpio_in,
  output logic [26:0] gpio_out,
  output logic [26:0] gpio_oe,
  input  logic [9:0]  cdc_event,
  output logic        coil_tx,
  input  logic        coil_rx
);

  localparam int unsigned CA_W = 20;

  // ---------------- reset ----------------
  logic comp_hi, comp_lo;
  bod_comparators u_bodc (.vbat_mv, .comp_hi, .comp_lo);
  bod_lockoff     u_bod  (.comp_hi, .comp_lo, .resetn);

  // ---------------- clocks ----------------
  logic clk_sys, clk_en, clk_slow, core_clk_en;
  logic [7:0] div_act, div_slow;
  lit_clkdiv u_clk (
    .clk_in(clk_512), .rst_n(resetn), .clk_en, .clk_slow,
    .div_act, .div_slow, .clk_half, .clk_sys
  );
  clk_gate u_m0_gate (.clk(clk_sys), .en(core_clk_en), .gclk(m0_hclk));
  assign sys_clk = clk_sys;

  // ---------------- bus ----------------
  logic [4:0]  hsel, s_hreadyout, s_hresp;
  logic [31:0] s_hrdata [5];
  ahb_lite_mux u_mux (
    .hclk(clk_sys), .hresetn(resetn),
    .haddr(m0_haddr), .htrans(m0_htrans),
    .hready(m0_hready), .hresp(m0_hresp), .hrdata(m0_hrdata),
    .hsel, .s_hreadyout, .s_hresp, .s_hrdata
  );
  assign rom_hsel  = hsel[0];
  assign nand_hsel = hsel[4];
  assign s_hreadyout[0] = rom_hreadyout;
  assign s_hresp[0]     = rom_hresp;
  assign s_hrdata[0]    = rom_hrdata;
  assign s_hreadyout[4] = nand_hreadyout;
  assign s_hresp[4]     = nand_hresp;
  assign s_hrdata[4]    = nand_hrdata;

  // ---------------- cache ----------------
  logic        c_req, c_we, c_done, c_fault, c_fault_pin;
  logic [3:0]  c_be;
  logic [31:0] c_addr, c_wdata, c_rdata;
  logic        c_idle;
  logic [CA_W-1:0] pin_line, alloc_addr, evict_addr;
  logic        alloc_req, alloc_done, alloc_ok, evict_valid;
  logic [1:0]  alloc_way;
  logic [15:0] bank_pwr;
  logic        tag_pwr;

  ahb_slave_bridge u_br_cache (
    .hclk(clk_sys), .hresetn(resetn), .hsel(hsel[1]), .haddr(m0_haddr),
    .htrans(m0_htrans), .hwrite(m0_hwrite), .hsize(m0_hsize), .hwdata(m0_hwdata),
    .hready(m0_hready), .hreadyout(s_hreadyout[1]), .hresp(s_hresp[1]),
    .hrdata(s_hrdata[1]),
    .req(c_req), .we(c_we), .be(c_be), .addr(c_addr), .wdata(c_wdata),
    .done(c_done), .fault(c_fault), .rdata(c_rdata)
  );

  lit_cache u_cache (
    .clk(clk_sys), .rst_n(resetn), .idle(c_idle),
    .req(c_req), .we(c_we), .be(c_be), .addr(c_addr[CA_W-1:0]), .wdata(c_wdata),
    .done(c_done), .fault(c_fault), .fault_pinned(c_fault_pin), .rdata(c_rdata),
    .alloc_req, .alloc_addr, .alloc_done, .alloc_ok, .alloc_way,
    .evict_valid, .evict_addr, .pin_line,
    .bank_pwr, .tag_pwr
  );

  // ---------------- Deep Sleep memory ----------------
  logic        d_req, d_we, d_done;
  logic [3:0]  d_be;
  logic [31:0] d_addr, d_wdata, d_rdata;
  ahb_slave_bridge u_br_dsram (
    .hclk(clk_sys), .hresetn(resetn), .hsel(hsel[2]), .haddr(m0_haddr),
    .htrans(m0_htrans), .hwrite(m0_hwrite), .hsize(m0_hsize), .hwdata(m0_hwdata),
    .hready(m0_hready), .hreadyout(s_hreadyout[2]), .hresp(s_hresp[2]),
    .hrdata(s_hrdata[2]),
    .req(d_req), .we(d_we), .be(d_be), .addr(d_addr), .wdata(d_wdata),
    .done(d_done), .fault(1'b0), .rdata(d_rdata)
  );
  lit_dsram u_dsram (
    .clk(clk_sys), .rst_n(resetn), .req(d_req), .we(d_we), .be(d_be),
    .addr(d_addr[10:0]), .wdata(d_wdata), .done(d_done), .rdata(d_rdata)
  );

  // ---------------- system control ----------------
  logic        r_req, r_we, r_done;
  logic [3:0]  r_be;
  logic [31:0] r_addr, r_wdata, r_rdata;
  logic        wic_we, wic_re, tmr_we, tmr_re, gpio_we, gpio_re;
  logic [31:0] wic_rdata, tmr_rdata, gpio_rdata;
  scn_ratio_e  scn_ratio;
  logic        scn_en, scn_bypass, dbl_osc_sel, dbl_en;
  logic        ltx_valid, ltx_ready, lrx_valid, lrx_err;
  logic [7:0]  ltx_data, lrx_data;

  ahb_slave_bridge u_br_sys (
    .hclk(clk_sys), .hresetn(resetn), .hsel(hsel[3]), .haddr(m0_haddr),
    .htrans(m0_htrans), .hwrite(m0_hwrite), .hsize(m0_hsize), .hwdata(m0_hwdata),
    .hready(m0_hready), .hreadyout(s_hreadyout[3]), .hresp(s_hresp[3]),
    .hrdata(s_hrdata[3]),
    .req(r_req), .we(r_we), .be(r_be), .addr(r_addr), .wdata(r_wdata),
    .done(r_done), .fault(1'b0), .rdata(r_rdata)
  );

  lit_sysctrl #(.CA_W(CA_W)) u_sys (
    .clk(clk_sys), .rst_n(resetn),
    .req(r_req), .we(r_we), .addr(r_addr[11:0]), .wdata(r_wdata),
    .done(r_done), .rdata(r_rdata),
    .pin_line, .alloc_req, .alloc_addr, .alloc_done, .alloc_ok, .alloc_way,
    .evict_valid, .evict_addr,
    .cache_fault(c_fault), .cache_fault_pinned(c_fault_pin),
    .cache_fault_addr(c_addr[CA_W-1:0]),
    .wic_we, .wic_re, .tmr_we, .tmr_re, .gpio_we, .gpio_re,
    .wic_rdata, .tmr_rdata, .gpio_rdata,
    .div_act, .div_slow, .scn_ratio, .scn_en, .scn_bypass, .dbl_osc_sel, .dbl_en,
    .link_tx_valid(ltx_valid), .link_tx_data(ltx_data), .link_tx_ready(ltx_ready),
    .link_rx_valid(lrx_valid), .link_rx_data(lrx_data), .link_rx_err(lrx_err)
  );

  // ---------------- power management ----------------
  logic ev_timer, ev_gpio;
  lit_wic u_wic (
    .clk(clk_sys), .clk32k, .rst_n(resetn),
    .cfg_we(wic_we), .cfg_re(wic_re), .cfg_addr(r_addr[3:2]), .cfg_wdata(r_wdata),
    .cfg_rdata(wic_rdata),
    .ev_timer, .ev_gpio, .ev_cdc(|cdc_event),
    .active_ldo_en, .sleep_mode, .dirty_ldo_en, .bypass_batt,
    .clk_en, .clk_slow, .core_clk_en,
    .cache_bank_pwr(bank_pwr), .cache_tag_pwr(tag_pwr), .mode(power_mode)
  );

  lit_wake_timer u_tmr (
    .clk(clk_sys), .clk32k, .rst_n(resetn),
    .cfg_we(tmr_we), .cfg_re(tmr_re), .cfg_addr(r_addr[3:2]), .cfg_wdata(r_wdata),
    .cfg_rdata(tmr_rdata), .ev_wake(ev_timer)
  );

  lit_gpio u_gpio (
    .clk(clk_sys), .rst_n(resetn),
    .cfg_we(gpio_we), .cfg_re(gpio_re), .cfg_addr(r_addr[4:2]), .cfg_wdata(r_wdata),
    .cfg_rdata(gpio_rdata),
    .pin_in(gpio_in), .pin_out(gpio_out), .pin_oe(gpio_oe), .ev_wake(ev_gpio)
  );

  scn_switch_ctrl u_scn (
    .clk(clk_sys), .rst_n(resetn), .en(scn_en), .bypass(scn_bypass), .ratio(scn_ratio),
    .sw(scn_sw), .phi1(scn_phi1), .phi2(scn_phi2), .bypass_sw(scn_bypass_sw)
  );

  logic dbl_pump_clk;
  doubler_clk_ctrl u_dbl (
    .core_clk(clk_sys), .osc_clk(dbl_osc_clk), .rst_n(resetn), .osc_sel(dbl_osc_sel),
    .en(dbl_en), .pump_clk(dbl_pump_clk), .phi1(dbl_phi1), .phi2(dbl_phi2)
  );

  // ---------------- near-field link ----------------
  manchester_codec u_link (
    .clk(clk_sys), .rst_n(resetn),
    .tx_valid(ltx_valid), .tx_data(ltx_data), .tx_ready(ltx_ready), .tx_out(coil_tx),
    .rx_in(coil_rx), .rx_valid(lrx_valid), .rx_data(lrx_data), .rx_err(lrx_err)
  );

  logic unused;
  assign unused = ^{c_idle, r_be, c_addr[31:CA_W], d_addr[31:11], r_addr[31:12], dbl_pump_clk};

endmodule
