// lit_clkdiv: system clock divider chain after the 512 MHz clock generator.
//
// clk_in (512 MHz) -> /2 -> clk_half (256 MHz, for the class-D amplifier and
// the NAND Flash controller) -> /n -> /2 -> clk_sys (distributed to most
// blocks and the core). With n = 2 the system clock is 64 MHz; n = 32 gives
// 4 MHz. n comes from `div_act`, or from `div_slow` while the wakeup
// interrupt controller asks for a slowed clock (Standby). Values below 2
// count as 2. `clk_en` = 0 stops the whole chain (Deep Sleep); outputs then
// hold low. Each stage is a registered counter, so the outputs are glitch
// free. The chain /2, /n, /2 is the published one; the register encoding and
// the limits of n are this design's own.
module lit_clkdiv (
  input  logic       clk_in,
  input  logic       rst_n,
  input  logic       clk_en,
  input  logic       clk_slow,
  input  logic [7:0] div_act,
  input  logic [7:0] div_slow,
  output logic       clk_half,
  output logic       clk_sys
);
  logic [7:0] n, cnt;
  logic       clk_n;

  always_ff @(posedge clk_in or negedge rst_n)
    if (!rst_n)      clk_half <= 1'b0;
    else if (clk_en) clk_half <= !clk_half;
    else             clk_half <= 1'b0;

  always_comb begin
    n = clk_slow ? div_slow : div_act;
    if (n < 8'd2) n = 8'd2;
  end

  always_ff @(posedge clk_half or negedge rst_n) begin
    if (!rst_n) begin
      cnt   <= '0;
      clk_n <= 1'b0;
    end else begin
      cnt   <= (cnt >= n - 8'd1) ? 8'd0 : cnt + 8'd1;
      clk_n <= (cnt < (n >> 1));
    end
  end

  always_ff @(posedge clk_n or negedge rst_n)
    if (!rst_n) clk_sys <= 1'b0;
    else        clk_sys <= !clk_sys;

endmodule
