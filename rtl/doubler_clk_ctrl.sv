// doubler_clk_ctrl: clock control of the on-chip voltage doubler.
//
// The doubler pumps with one of two clocks: the core clock (MHz range, in
// Active mode when there is much off-chip traffic) or its own internal
// oscillator (hundreds of kHz, in Deep Sleep or when traffic is light).
// `osc_sel` picks the internal oscillator. The chosen clock goes through a
// glitch-free multiplexer and a non-overlapping two-phase generator that
// drives the doubler's switches (`phi1`, `phi2`). `pump_clk` is the selected
// clock itself. The two clock sources and the non-overlapping generator are
// the published structure; the phase lengths are this design's choice.
module doubler_clk_ctrl #(
  parameter int unsigned PHASE = 1,
  parameter int unsigned DEAD  = 1
) (
  input  logic core_clk,
  input  logic osc_clk,
  input  logic rst_n,
  input  logic osc_sel,
  input  logic en,
  output logic pump_clk,
  output logic phi1,
  output logic phi2
);
  clk_mux_gf u_mux (.clk0(core_clk), .clk1(osc_clk), .rst_n, .sel(osc_sel), .clk_out(pump_clk));
  nonoverlap_gen #(.PHASE(PHASE), .DEAD(DEAD)) u_phase (
    .clk(pump_clk), .rst_n, .en, .phi1, .phi2
  );
endmodule
