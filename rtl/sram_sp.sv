// sram_sp: single-port synchronous SRAM bank with a power switch.
//
// Models one 6T SRAM macro of the memory system (a cache data, tag or LRU
// bank, the 2 kB deep-sleep code memory). A read returns the word one clock
// after `en` with `we` low; a write stores the bits selected by `wmask`. When
// `pwr` is low the bank is power gated: it ignores accesses and reads as zero.
// A gated bank loses its contents in silicon; here the array keeps its old
// values, and the blocks using the bank track validity themselves, so they
// never read a word written before a power-down. Depth and width are
// parameters; the defaults are those of a cache data bank (2048 x 32).
module sram_sp #(
  parameter int unsigned DEPTH = 2048,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             pwr,     // 1 = powered
  input  logic             en,      // access this cycle
  input  logic             we,      // 1 = write, 0 = read
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [WIDTH-1:0] wmask,   // bit write enables
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (pwr && en && we) begin
      for (int i = 0; i < int'(WIDTH); i++)
        if (wmask[i]) mem[addr][i] <= wdata[i];
    end
  end

  always_ff @(posedge clk) begin
    if (!pwr)            rdata <= '0;
    else if (en && !we)  rdata <= mem[addr];
  end

endmodule
