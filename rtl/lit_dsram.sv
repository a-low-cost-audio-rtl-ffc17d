// lit_dsram: the 2 kB Deep Sleep code memory (512 x 32 SRAM) on the system
// bus.
//
// It holds the event validity checker, the routine that runs on a wake
// event in Deep Sleep to tell real button presses from false triggers, so
// the whole cache can be powered down. The memory is never power gated.
// Request port as produced by ahb_slave_bridge: one-cycle `req`, `done` one
// clock later with read data; byte enables select the bytes written.
// Size and shape are the published ones; the port is this design's own.
module lit_dsram #(
  parameter int unsigned WORDS = 512,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        req,
  input  logic        we,
  input  logic [3:0]  be,
  input  logic [AW+1:0] addr,    // byte address
  input  logic [31:0] wdata,
  output logic        done,
  output logic [31:0] rdata
);
  logic [31:0] wmask;
  for (genvar i = 0; i < 4; i++) begin : g_mask
    assign wmask[8*i +: 8] = {8{be[i]}};
  end

  sram_sp #(.DEPTH(WORDS), .WIDTH(32)) u_mem (
    .clk, .pwr(1'b1), .en(req), .we, .addr(addr[AW+1:2]),
    .wdata, .wmask, .rdata
  );

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) done <= 1'b0; else done <= req;

  logic unused;
  assign unused = ^addr[1:0];
endmodule
