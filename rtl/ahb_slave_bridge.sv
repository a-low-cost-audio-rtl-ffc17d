// ahb_slave_bridge: AHB-Lite slave front end that turns each bus transfer
// into one request on a simple request/done port.
//
// The address phase (HSEL, HTRANS NONSEQ/SEQ, HREADY high) is latched. In
// the first data-phase cycle, when HWDATA is valid, the bridge pulses `req`
// with the address, direction, byte enables (from HSIZE and the low address
// bits) and write data, and holds HREADYOUT low. The slave answers with a
// one-cycle `done`, with `rdata` valid in that cycle. Without `fault` the
// transfer ends in that same cycle (HREADYOUT high, HRDATA = rdata). With
// `fault` the bridge gives the two-cycle AHB ERROR response, which the core
// takes as a precise bus fault; the cache's misses reach software this way.
// A new address phase is accepted whenever HREADYOUT is high.
module ahb_slave_bridge #(
  parameter int unsigned AW = 32
) (
  input  logic          hclk,
  input  logic          hresetn,
  input  logic          hsel,
  input  logic [AW-1:0] haddr,
  input  logic [1:0]    htrans,
  input  logic          hwrite,
  input  logic [2:0]    hsize,
  input  logic [31:0]   hwdata,
  input  logic          hready,
  output logic          hreadyout,
  output logic          hresp,
  output logic [31:0]   hrdata,
  // request side
  output logic          req,
  output logic          we,
  output logic [3:0]    be,
  output logic [AW-1:0] addr,
  output logic [31:0]   wdata,
  input  logic          done,
  input  logic          fault,
  input  logic [31:0]   rdata
);

  typedef enum logic [1:0] {B_IDLE, B_ISSUE, B_WAIT, B_ERR2} bstate_e;
  bstate_e st;

  logic       accept;
  logic [2:0] l_size;

  always_comb begin
    hreadyout = 1'b1;
    hresp     = 1'b0;
    unique case (st)
      B_IDLE:  ;
      B_ISSUE: hreadyout = 1'b0;
      B_WAIT: begin
        hreadyout = done && !fault;
        hresp     = done && fault;
      end
      default: hresp = 1'b1;   // B_ERR2
    endcase
  end

  assign accept = hsel && htrans[1] && hready && hreadyout;
  assign req    = (st == B_ISSUE);
  assign wdata  = hwdata;
  assign hrdata = rdata;

  always_comb begin
    unique case (l_size)
      3'd0:    be = 4'b0001 << addr[1:0];
      3'd1:    be = addr[1] ? 4'b1100 : 4'b0011;
      default: be = 4'b1111;
    endcase
  end

  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      st     <= B_IDLE;
      addr   <= '0;
      we     <= 1'b0;
      l_size <= '0;
    end else begin
      if (accept) begin
        addr   <= haddr;
        we     <= hwrite;
        l_size <= hsize;
      end
      unique case (st)
        B_ISSUE: st <= B_WAIT;
        B_WAIT:  if (done) st <= fault ? B_ERR2 : (accept ? B_ISSUE : B_IDLE);
        default: st <= accept ? B_ISSUE : B_IDLE;   // B_IDLE, B_ERR2
      endcase
    end
  end

`ifndef SYNTHESIS
  assert property (@(posedge hclk) disable iff (!hresetn) done |-> st == B_WAIT)
    else $error("ahb_slave_bridge: done without a pending request");
`endif

endmodule
