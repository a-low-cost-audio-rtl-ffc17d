// scn_switch_ctrl: switch driver of the hybrid switched-capacitor boost
// converter (step-down network feeding a step-up stage).
//
// The step-down network produces 25, 33, 50, 66, 75 or 100 % of the battery
// voltage, depending on which of its eleven switches ck1..ck11 are closed in
// clock phase 1, in phase 2, always, or never. The step-up stage adds the
// battery voltage on top, so the output is (1 + ratio) * Vbat; software
// picks the ratio that keeps the output near 3.2 V.
//
// `sw[k-1]` drives switch ck<k> (1 = closed). `phi1`/`phi2` are the two
// non-overlapping phases, also used by the step-up stage. `en` = 0 power
// gates the converter: every switch open, phases stopped. `bypass` = 1 opens
// every switch of the network and closes `bypass_sw`, which connects the
// battery straight to the output. Switch outputs are registered, one clock
// after the phases they are built from, so they do not overlap either.
// The switch schedule per ratio is the published one (kept in lit_pkg);
// the phase generator, bypass and enable encodings are this design's own.
module scn_switch_ctrl
  import lit_pkg::*;
#(
  parameter int unsigned PHASE = 4,
  parameter int unsigned DEAD  = 1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic        bypass,
  input  scn_ratio_e  ratio,
  output logic [10:0] sw,
  output logic        phi1,
  output logic        phi2,
  output logic        bypass_sw
);

  logic p1, p2;
  nonoverlap_gen #(.PHASE(PHASE), .DEAD(DEAD)) u_phase (
    .clk, .rst_n, .en(en && !bypass), .phi1(p1), .phi2(p2)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sw        <= '0;
      phi1      <= 1'b0;
      phi2      <= 1'b0;
      bypass_sw <= 1'b0;
    end else begin
      phi1      <= p1;
      phi2      <= p2;
      bypass_sw <= en && bypass;
      for (int unsigned k = 1; k <= 11; k++) begin
        logic c;
        unique case (scn_switch_mode(ratio, k))
          SW_ON:   c = 1'b1;
          SW_P1:   c = p1;
          SW_P2:   c = p2;
          default: c = 1'b0;
        endcase
        sw[k-1] <= en && !bypass && c;
      end
    end
  end

endmodule
