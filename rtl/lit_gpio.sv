// lit_gpio: 27-bit general-purpose I/O port with a Deep Sleep wake source.
//
// Each pin has an output value and an output enable. Inputs are
// synchronised to the system clock for reading. For waking the chip, each
// pin has a wake enable and an active level; `ev_wake` is 1 while any
// enabled pin sits at its active level. It is a plain combination of the
// pad inputs and two registers, so it works with the system clock stopped;
// the wakeup interrupt controller samples it on the 32 kHz clock.
//
// Register port, word index `cfg_addr`: 0 OUT, 1 OE (1 = drive), 2 IN
// (read only), 3 WAKE_EN, 4 WAKE_LVL. Reads return one clock after
// `cfg_re`. The pin count and the role as a wake source are published; the
// register layout and the level-type wake condition are this design's own.
module lit_gpio #(
  parameter int unsigned W = 27
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         cfg_we,
  input  logic         cfg_re,
  input  logic [2:0]   cfg_addr,
  input  logic [31:0]  cfg_wdata,
  output logic [31:0]  cfg_rdata,
  input  logic [W-1:0] pin_in,
  output logic [W-1:0] pin_out,
  output logic [W-1:0] pin_oe,
  output logic         ev_wake
);
  logic [W-1:0] in_s, wake_en, wake_lvl;

  sync2 #(.W(W)) u_sync (.clk, .rst_n, .d(pin_in), .q(in_s));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pin_out  <= '0;
      pin_oe   <= '0;
      wake_en  <= '0;
      wake_lvl <= '0;
    end else if (cfg_we) begin
      unique case (cfg_addr)
        3'd0: pin_out  <= cfg_wdata[W-1:0];
        3'd1: pin_oe   <= cfg_wdata[W-1:0];
        3'd3: wake_en  <= cfg_wdata[W-1:0];
        3'd4: wake_lvl <= cfg_wdata[W-1:0];
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cfg_rdata <= '0;
    else if (cfg_re) begin
      unique case (cfg_addr)
        3'd0:    cfg_rdata <= 32'(pin_out);
        3'd1:    cfg_rdata <= 32'(pin_oe);
        3'd2:    cfg_rdata <= 32'(in_s);
        3'd3:    cfg_rdata <= 32'(wake_en);
        3'd4:    cfg_rdata <= 32'(wake_lvl);
        default: cfg_rdata <= '0;
      endcase
    end
  end

  assign ev_wake = |(wake_en & ~(pin_in ^ wake_lvl));
endmodule
