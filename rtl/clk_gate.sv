// clk_gate: latch-based clock gate. `en` is captured while `clk` is low, so
// `gclk` = clk AND en has no glitches. The latch is intended.
module clk_gate (
  input  logic clk,
  input  logic en,
  output logic gclk
);
  logic en_l;
  always_latch begin
    if (!clk) en_l = en;
  end
  assign gclk = clk && en_l;
endmodule
