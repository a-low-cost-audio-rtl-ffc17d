// nonoverlap_gen: two-phase non-overlapping clock generator for switched-
// capacitor converters.
//
// From `clk` it makes phi1 and phi2 that are never high together: phi1 for
// PHASE clocks, both low for DEAD clocks, phi2 for PHASE clocks, both low
// for DEAD clocks, and again. The period is 2*(PHASE+DEAD) clocks. With
// `en` low both phases stay low and the sequence restarts at phi1. Outputs
// are registered. The dead time and phase lengths are this design's choice.
module nonoverlap_gen #(
  parameter int unsigned PHASE = 4,
  parameter int unsigned DEAD  = 1,
  localparam int unsigned PER  = 2 * (PHASE + DEAD),
  localparam int unsigned CW   = $clog2(PER)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  output logic phi1,
  output logic phi2
);
  logic [CW-1:0] cnt;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      phi1 <= 1'b0;
      phi2 <= 1'b0;
    end else if (!en) begin
      cnt  <= '0;
      phi1 <= 1'b0;
      phi2 <= 1'b0;
    end else begin
      cnt  <= (32'(cnt) == PER - 1) ? '0 : cnt + 1'b1;
      phi1 <= 32'(cnt) < PHASE;
      phi2 <= (32'(cnt) >= PHASE + DEAD) && (32'(cnt) < 2 * PHASE + DEAD);
    end
  end
endmodule
