// clk_mux_gf: glitch-free multiplexer of two unrelated clocks.
//
// `sel` = 0 passes clk0, 1 passes clk1. Each side has an enable that is
// synchronised in its own clock domain, changes only while its clock is
// low, and is allowed on only after the other side's enable has gone off,
// so the output never has a shortened pulse. A switch completes within
// about three cycles of each clock. Both clocks must run while switching.
// The output is a gated combination of the two clocks by design.
module clk_mux_gf (
  input  logic clk0,
  input  logic clk1,
  input  logic rst_n,
  input  logic sel,
  output logic clk_out
);
  logic s0, e0, s1, e1;

  always_ff @(posedge clk0 or negedge rst_n)
    if (!rst_n) s0 <= 1'b1; else s0 <= !sel && !e1;
  always_ff @(negedge clk0 or negedge rst_n)
    if (!rst_n) e0 <= 1'b1; else e0 <= s0;

  always_ff @(posedge clk1 or negedge rst_n)
    if (!rst_n) s1 <= 1'b0; else s1 <= sel && !e0;
  always_ff @(negedge clk1 or negedge rst_n)
    if (!rst_n) e1 <= 1'b0; else e1 <= s1;

  assign clk_out = (clk0 && e0) || (clk1 && e1);
endmodule
