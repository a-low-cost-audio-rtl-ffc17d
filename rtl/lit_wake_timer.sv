// lit_wake_timer: 32 kHz real-time counter with an alarm, the wake timer of
// the always-on domain.
//
// A 32-bit counter runs on the crystal clock in every mode. Software sets an
// alarm time; when the counter reaches it, `ev_wake` rises and stays high
// until software clears it. The wakeup interrupt controller uses `ev_wake`
// to leave Deep Sleep at a preset time (for example to record a scheduled
// radio broadcast).
//
// Register port, system clock domain, word index `cfg_addr`:
//   0 ALARM  alarm time (read back the last value written)
//   1 NOW    current count (read only)
//   2 CTRL   write: [0] arm, [1] clear the pending alarm;
//            read:  [0] armed, [1] pending, [2] a write still crossing
// A CTRL write crosses into the 32 kHz domain through a toggle handshake:
// ALARM and arm are held stable and copied together about three 32 kHz
// cycles later, so ALARM takes effect at the next CTRL write. Software waits
// for [2] to clear before writing CTRL again. NOW
// crosses as a Gray code. Reads return one system clock after `cfg_re`.
// The counter width and the register layout are this design's own; the
// published design gives the timer's purpose and its 32 kHz clock.
module lit_wake_timer (
  input  logic        clk,
  input  logic        clk32k,
  input  logic        rst_n,
  input  logic        cfg_we,
  input  logic        cfg_re,
  input  logic [1:0]  cfg_addr,
  input  logic [31:0] cfg_wdata,
  output logic [31:0] cfg_rdata,
  output logic        ev_wake
);

  // ---------------- system clock side ----------------
  logic [31:0] alarm_h;
  logic        arm_h, tog_ld, tog_clr;
  logic [1:0]  ack_s;     // toggles echoed back from the 32 kHz side
  logic [31:0] now_g_s, now_b;
  logic [1:0]  st_s;      // {pending, armed}

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      alarm_h <= '0;
      arm_h   <= 1'b0;
      tog_ld  <= 1'b0;
      tog_clr <= 1'b0;
    end else if (cfg_we) begin
      if (cfg_addr == 2'd0) alarm_h <= cfg_wdata;
      if (cfg_addr == 2'd2) begin
        arm_h <= cfg_wdata[0];
        tog_ld <= !tog_ld;
        if (cfg_wdata[1]) tog_clr <= !tog_clr;
      end
    end
  end

  // Gray to binary: bit i is the XOR of Gray bits i and above
  always_comb
    for (int i = 0; i < 32; i++) now_b[i] = ^(now_g_s >> i);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cfg_rdata <= '0;
    else if (cfg_re) begin
      unique case (cfg_addr)
        2'd0:    cfg_rdata <= alarm_h;
        2'd1:    cfg_rdata <= now_b;
        2'd2:    cfg_rdata <= {29'd0, (ack_s != {tog_clr, tog_ld}), st_s};
        default: cfg_rdata <= '0;
      endcase
    end
  end

  // ---------------- 32 kHz side ----------------
  logic [1:0]  tog_s, tog_d;
  logic [31:0] now, now_g, alarm;
  logic        armed, pend;

  sync2 #(.W(2)) u_sync_tog (.clk(clk32k), .rst_n, .d({tog_clr, tog_ld}), .q(tog_s));

  always_ff @(posedge clk32k or negedge rst_n) begin
    if (!rst_n) begin
      tog_d <= '0;
      now   <= '0;
      alarm <= '0;
      armed <= 1'b0;
      pend  <= 1'b0;
    end else begin
      tog_d <= tog_s;
      now   <= now + 32'd1;
      if (tog_s[0] != tog_d[0]) begin
        alarm <= alarm_h;
        armed <= arm_h;
      end
      if (tog_s[1] != tog_d[1])       pend <= 1'b0;
      else if (armed && now == alarm) pend <= 1'b1;
    end
  end

  assign now_g   = now ^ (now >> 1);
  assign ev_wake = pend;

  // back into the system clock domain
  logic [31:0] now_g_r;
  always_ff @(posedge clk32k or negedge rst_n)
    if (!rst_n) now_g_r <= '0; else now_g_r <= now_g;
  sync2 #(.W(32)) u_sync_now (.clk, .rst_n, .d(now_g_r), .q(now_g_s));
  sync2 #(.W(4))  u_sync_st  (.clk, .rst_n, .d({tog_d, pend, armed}), .q({ack_s, st_s}));

endmodule
