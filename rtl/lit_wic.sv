// lit_wic: wakeup interrupt controller. Runs the three operating modes
// (Active, Standby, Deep Sleep), drives the enables of the LDOs, the clock
// generator, the core clock gate and the cache power switches, watches the
// Deep Sleep wake sources, and sequences the wakeup.
//
// Two clock domains. Configuration registers sit in the system clock domain
// (`clk`), written by software through a small register port; they keep
// their values while the clock generator is stopped. The mode state machine
// and the wake-source synchronisers run on the always-on 32 kHz crystal
// clock (`clk32k`). Commands cross by toggle synchronisation; configuration
// fields are read by the 32 kHz side only while no command is in flight,
// so they are quasi-static there.
//
// Modes and outputs (state machine on clk32k):
//   ACTIVE   Active LDO on, core clocked, cache on, clock running.
//   STANDBY  like ACTIVE but core clock gated and clock slowed (`clk_slow`).
//            Any enabled wake event returns to ACTIVE.
//   DEEP     Active and Dirty LDO off (`sleep_mode` = 1), clock stopped,
//            core gated, cache data banks powered only as set in the BANKS
//            register (tag and LRU banks stay on if any bank stays on).
//            An enabled CDC, GPIO or wake-timer event starts the wakeup.
//   WAKE_LDO Active LDO on; waits `wake_delay` 32 kHz cycles.
//   WAKE_CLK clock generator enabled.
//   WAKE_MEM one 32 kHz cycle later: whole cache powered.
//   then ACTIVE one 32 kHz cycle later: core clock ungated.
// Software enters STANDBY or DEEP by writing CMD. `bypass_batt` (connect
// the core supply to the battery when it has sagged) and `dirty_ldo_en`
// are register bits; the Dirty LDO is also forced off in DEEP.
//
// Register port (clk domain, word index `cfg_addr`):
//   0 CTRL   [7:0] wake_delay, [10:8] event enable (timer, GPIO, CDC),
//            [11] dirty_ldo_en, [12] bypass_batt
//   1 BANKS  [15:0] data banks kept powered in Deep Sleep (8 kB each)
//   2 CMD    write 1: enter Standby, write 2: enter Deep Sleep
//   3 STATUS [2:0] mode, [6:4] wake sources seen at the last wakeup
// Reads return the addressed register one cycle later (`cfg_rdata`).
//
// The modes, what each one switches on and off, the wake sources, the wake
// order (LDO, configurable wait, clock, cache, core) and the 32 kHz state
// clock follow the published controller; the register layout, the
// synchronisation and the reset values are this design's own.
module lit_wic
  import lit_pkg::*;
(
  input  logic        clk,
  input  logic        clk32k,
  input  logic        rst_n,
  // register port
  input  logic        cfg_we,
  input  logic        cfg_re,
  input  logic [1:0]  cfg_addr,
  input  logic [31:0] cfg_wdata,
  output logic [31:0] cfg_rdata,
  // wake sources (asynchronous levels)
  input  logic        ev_timer,
  input  logic        ev_gpio,
  input  logic        ev_cdc,
  // power and clock control
  output logic        active_ldo_en,
  output logic        sleep_mode,
  output logic        dirty_ldo_en,
  output logic        bypass_batt,
  output logic        clk_en,
  output logic        clk_slow,
  output logic        core_clk_en,
  output logic [15:0] cache_bank_pwr,
  output logic        cache_tag_pwr,
  output pmode_e      mode
);

  // ---------------- configuration (clk domain) ----------------
  logic [7:0]  wake_delay;
  logic [2:0]  ev_en;
  logic        dirty_cfg;
  logic [15:0] ds_banks;
  logic        tog_stby, tog_deep;
  logic [2:0]  mode_s, cause_s;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wake_delay  <= 8'd4;
      ev_en       <= 3'b111;
      dirty_cfg   <= 1'b0;
      bypass_batt <= 1'b0;
      ds_banks    <= '0;
      tog_stby    <= 1'b0;
      tog_deep    <= 1'b0;
    end else if (cfg_we) begin
      unique case (cfg_addr)
        2'd0: begin
          wake_delay  <= cfg_wdata[7:0];
          ev_en       <= cfg_wdata[10:8];
          dirty_cfg   <= cfg_wdata[11];
          bypass_batt <= cfg_wdata[12];
        end
        2'd1: ds_banks <= cfg_wdata[15:0];
        2'd2: begin
          if (cfg_wdata[1:0] == 2'd1) tog_stby <= ~tog_stby;
          if (cfg_wdata[1:0] == 2'd2) tog_deep <= ~tog_deep;
        end
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cfg_rdata <= '0;
    else if (cfg_re) begin
      unique case (cfg_addr)
        2'd0:    cfg_rdata <= {19'd0, bypass_batt, dirty_cfg, ev_en, wake_delay};
        2'd1:    cfg_rdata <= {16'd0, ds_banks};
        2'd3:    cfg_rdata <= {25'd0, cause_s, 1'b0, mode_s};
        default: cfg_rdata <= '0;
      endcase
    end
  end

  // ---------------- crossing into clk32k ----------------
  logic [1:0] tog_s;
  logic [2:0] ev_s;
  logic [1:0] tog_d;
  sync2 #(.W(2)) u_sync_cmd (.clk(clk32k), .rst_n, .d({tog_deep, tog_stby}), .q(tog_s));
  sync2 #(.W(3)) u_sync_ev  (.clk(clk32k), .rst_n, .d({ev_cdc, ev_gpio, ev_timer}), .q(ev_s));

  logic cmd_stby, cmd_deep;
  logic [2:0] ev_hit;
  assign cmd_stby = tog_s[0] ^ tog_d[0];
  assign cmd_deep = tog_s[1] ^ tog_d[1];
  assign ev_hit   = ev_s & ev_en;

  // ---------------- mode state machine (clk32k) ----------------
  pmode_e     st;
  logic [7:0] cnt;
  logic [2:0] cause;

  always_ff @(posedge clk32k or negedge rst_n) begin
    if (!rst_n) begin
      st    <= PM_ACTIVE;
      cnt   <= '0;
      cause <= '0;
      tog_d <= '0;
    end else begin
      tog_d <= tog_s;
      unique case (st)
        PM_ACTIVE: begin
          if (cmd_deep)      st <= PM_DEEP;
          else if (cmd_stby) st <= PM_STANDBY;
        end
        PM_STANDBY: if (|ev_hit) begin
          st    <= PM_ACTIVE;
          cause <= ev_hit;
        end
        PM_DEEP: if (|ev_hit) begin
          st    <= PM_WAKE_LDO;
          cause <= ev_hit;
          cnt   <= '0;
        end
        PM_WAKE_LDO: begin
          cnt <= cnt + 8'd1;
          if (cnt >= wake_delay) st <= PM_WAKE_CLK;
        end
        PM_WAKE_CLK: st <= PM_WAKE_MEM;
        PM_WAKE_MEM: st <= PM_ACTIVE;
        default:     st <= PM_ACTIVE;
      endcase
    end
  end

  // ---------------- outputs ----------------
  always_comb begin
    active_ldo_en  = 1'b1;
    sleep_mode     = 1'b0;
    clk_en         = 1'b1;
    clk_slow       = 1'b0;
    core_clk_en    = 1'b0;
    cache_bank_pwr = '1;
    unique case (st)
      PM_ACTIVE:   core_clk_en = 1'b1;
      PM_STANDBY:  clk_slow = 1'b1;
      PM_DEEP: begin
        active_ldo_en  = 1'b0;
        sleep_mode     = 1'b1;
        clk_en         = 1'b0;
        cache_bank_pwr = ds_banks;
      end
      PM_WAKE_LDO: begin
        clk_en         = 1'b0;
        cache_bank_pwr = ds_banks;
      end
      PM_WAKE_CLK: cache_bank_pwr = ds_banks;
      default: ;   // PM_WAKE_MEM
    endcase
    cache_tag_pwr = |cache_bank_pwr;
    dirty_ldo_en  = dirty_cfg && !sleep_mode;
    mode          = st;
  end

  // status back into the clk domain
  sync2 #(.W(6)) u_sync_st (.clk, .rst_n, .d({cause, st}), .q({cause_s, mode_s}));

`ifndef SYNTHESIS
  assert property (@(posedge clk32k) disable iff (!rst_n)
                   (st == PM_DEEP) |-> !core_clk_en && !clk_en && !active_ldo_en)
    else $error("lit_wic: deep sleep with core supply or clock on");
`endif

endmodule
