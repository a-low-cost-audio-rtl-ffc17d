// ahb_master_bfm: testbench AHB-Lite master. Test code calls `xfer` (from
// one or several parallel threads); transfers are issued in call order and
// pipelined back to back: the next address phase overlaps the current data
// phase, as a processor core does. Each call returns the read data and
// whether the transfer ended with an ERROR response.
// Timing: outputs change 1 time unit after the rising clock edge; HREADY,
// HRESP and HRDATA are sampled on the falling edge before the rising edge
// that completes a phase. Single transfers only (NONSEQ), no bursts.
// The transfer ordering and pipelining follow the AHB-Lite rules; the task
// interface is this testbench's own.
module ahb_master_bfm (
  input  logic        hclk,
  input  logic        hresetn,
  output logic [31:0] haddr,
  output logic [1:0]  htrans,
  output logic        hwrite,
  output logic [2:0]  hsize,
  output logic [31:0] hwdata,
  input  logic        hready,
  input  logic        hresp,
  input  logic [31:0] hrdata
);
  // request queue
  bit          q_w  [$];
  logic [31:0] q_a  [$];
  logic [2:0]  q_sz [$];
  logic [31:0] q_wd [$];
  int          q_id [$];
  // results, by request number
  bit          r_done [int];
  logic [31:0] r_data [int];
  bit          r_err  [int];
  int          next_id = 0;
  int          n_xfers = 0, n_errors = 0, n_wait_cycles = 0;

  // phases in flight
  bit          ap_v = 0, dp_v = 0;
  int          ap_id = 0, dp_id = 0;
  logic [31:0] ap_wd = '0;

  initial begin
    haddr = '0; htrans = 2'b00; hwrite = 1'b0; hsize = 3'd2; hwdata = '0;
  end

  always begin
    logic rdy, resp;
    logic [31:0] rd;
    @(negedge hclk);
    rdy = hready; resp = hresp; rd = hrdata;
    @(posedge hclk);
    #1;
    if (!hresetn) begin
      ap_v = 0; dp_v = 0; htrans = 2'b00;
    end else if (rdy) begin
      if (dp_v) begin
        r_data[dp_id] = rd;
        r_err[dp_id]  = resp;
        r_done[dp_id] = 1;
        n_xfers++;
        if (resp) n_errors++;
      end
      dp_v  = ap_v;
      dp_id = ap_id;
      if (ap_v) hwdata = ap_wd;
      if (q_id.size() > 0) begin
        ap_v   = 1;
        ap_id  = q_id.pop_front();
        hwrite = q_w.pop_front();
        haddr  = q_a.pop_front();
        hsize  = q_sz.pop_front();
        ap_wd  = q_wd.pop_front();
        htrans = 2'b10;
      end else begin
        ap_v   = 0;
        htrans = 2'b00;
      end
    end else if (dp_v) n_wait_cycles++;
  end

  task automatic xfer(input bit w, input logic [31:0] a, input logic [2:0] sz,
                      input logic [31:0] wd, output logic [31:0] rd, output bit err);
    int id;
    id = next_id++;
    q_w.push_back(w); q_a.push_back(a); q_sz.push_back(sz);
    q_wd.push_back(wd); q_id.push_back(id);
    while (!r_done.exists(id)) @(posedge hclk);
    rd  = r_data[id];
    err = r_err[id];
    r_done.delete(id); r_data.delete(id); r_err.delete(id);
  endtask

  task automatic write32(input logic [31:0] a, input logic [31:0] wd, output bit err);
    logic [31:0] rd;
    xfer(1'b1, a, 3'd2, wd, rd, err);
  endtask

  task automatic read32(input logic [31:0] a, output logic [31:0] rd, output bit err);
    xfer(1'b0, a, 3'd2, '0, rd, err);
  endtask
endmodule
