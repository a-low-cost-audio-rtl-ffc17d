// sync2: two-flip-flop synchroniser for a level that crosses into the `clk`
// domain. Output follows the input two clocks later; resets to RST_VAL.
module sync2 #(
  parameter int unsigned W       = 1,
  parameter logic        RST_VAL = 1'b0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  logic [W-1:0] meta;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= {W{RST_VAL}};
      q    <= {W{RST_VAL}};
    end else begin
      meta <= d;
      q    <= meta;
    end
  end
endmodule
