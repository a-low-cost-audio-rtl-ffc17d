// ahb_lite_mux: AHB-Lite interconnect for one master and five slaves, with a
// built-in default slave.
//
// Address map (byte addresses):
//   slave 0  0x0000_0000 - 0x0000_01FF  512 B boot ROM
//   slave 1  0x1000_0000 - 0x100F_FFFF  cache window (1 MB)
//   slave 2  0x2000_0000 - 0x2000_07FF  2 kB Deep Sleep code memory
//   slave 3  0x4000_0000 - 0x4000_0FFF  system control registers
//   slave 4  0x4001_0000 - 0x4001_FFFF  NAND Flash controller
// Any other address gets the two-cycle ERROR response from the default
// slave. HSEL is decoded from HADDR in the address phase; the selection is
// registered for the data phase and steers HRDATA, HREADY and HRESP back to
// the master. The bus members are the published ones (core, boot ROM,
// Deep Sleep memory, cache, NAND Flash controller); the map is this
// design's own.
module ahb_lite_mux (
  input  logic        hclk,
  input  logic        hresetn,
  input  logic [31:0] haddr,
  input  logic [1:0]  htrans,
  output logic        hready,         // to master and all slaves
  output logic        hresp,
  output logic [31:0] hrdata,
  output logic [4:0]  hsel,
  input  logic [4:0]  s_hreadyout,
  input  logic [4:0]  s_hresp,
  input  logic [31:0] s_hrdata [5]
);

  logic [5:0] dsel;     // data-phase select, bit 5 = default slave
  logic [5:0] asel;
  logic       def_err1, def_err2;

  always_comb begin
    asel = '0;
    if      (haddr[31:9]  == 23'h0)           asel[0] = 1'b1;
    else if (haddr[31:20] == 12'h100)         asel[1] = 1'b1;
    else if (haddr[31:11] == 21'h04_0000)     asel[2] = 1'b1;
    else if (haddr[31:12] == 20'h4_0000)      asel[3] = 1'b1;
    else if (haddr[31:16] == 16'h4001)        asel[4] = 1'b1;
    else                                      asel[5] = 1'b1;
    hsel = asel[4:0];
  end

  // default slave: ERROR for an active transfer to an unmapped address
  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      dsel     <= 6'b10_0000;
      def_err1 <= 1'b0;
      def_err2 <= 1'b0;
    end else begin
      def_err2 <= def_err1;
      def_err1 <= 1'b0;
      if (hready) begin
        dsel     <= asel;
        def_err1 <= asel[5] && htrans[1];
      end
    end
  end

  always_comb begin
    hready = 1'b1;
    hresp  = 1'b0;
    hrdata = '0;
    for (int i = 0; i < 5; i++)
      if (dsel[i]) begin
        hready = s_hreadyout[i];
        hresp  = s_hresp[i];
        hrdata = s_hrdata[i];
      end
    if (dsel[5]) begin
      hready = !def_err1;
      hresp  = def_err1 || def_err2;
    end
  end

endmodule
