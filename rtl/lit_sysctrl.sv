// lit_sysctrl: system control register block on the AHB bus.
//
// Gathers the software-visible controls of the chip in one 4 kB window:
// the wakeup interrupt controller, the cache pin line and the miss
// handler's line-allocation command, the clock divider, the switched-
// capacitor converter, the voltage doubler's clock, the wake timer, the
// GPIO port and the near-field link codec. It also records the address of
// the last access that missed in the cache, which the miss handler needs.
//
// Word offsets (byte offset in the window):
//   0x000-0x00C  WIC CTRL, BANKS, CMD, STATUS  (see lit_wic)
//   0x010 CACHE_PIN    pin line, a byte offset in the cache window
//   0x014 CACHE_ALLOC  write: allocate the line holding this offset; the bus
//                      waits until it is done. read: [0] ok, [1] a valid
//                      line was evicted, [3:2] way
//   0x018 EVICT_ADDR   offset of the evicted line
//   0x01C FAULT_ADDR   offset of the last access that missed
//   0x020 FAULT_STAT   [0] a miss since the last read (cleared by reading),
//                      [1] that miss was below the pin line
//   0x024 CLK_CFG      [7:0] divider n in Active, [15:8] n in Standby
//   0x028 SCN_CFG      [2:0] step-down ratio, [3] enable, [4] bypass
//   0x02C DBL_CFG      [0] doubler on its own oscillator, [1] doubler enable
//   0x030-0x038  wake timer ALARM, NOW, CTRL  (see lit_wake_timer)
//   0x040-0x050  GPIO OUT, OE, IN, WAKE_EN, WAKE_LVL  (see lit_gpio)
//   0x060 LINK_TX      write a byte to send; waits while the encoder is busy
//   0x064 LINK_RX      [7:0] last byte, [8] new byte, [9] framing error;
//                      reading clears [8] and [9]
// Request port as produced by ahb_slave_bridge; `done` comes one clock after
// `req`, later for CACHE_ALLOC and LINK_TX. Reset values: divider 2 (64 MHz)
// and 32 (4 MHz), converter off at ratio 100 %, doubler on the core clock.
// This register map is this design's own.
module lit_sysctrl
  import lit_pkg::*;
#(
  parameter int unsigned CA_W = 20      // cache window offset width
) (
  input  logic            clk,
  input  logic            rst_n,
  // request port
  input  logic            req,
  input  logic            we,
  input  logic [11:0]     addr,
  input  logic [31:0]     wdata,
  output logic            done,
  output logic [31:0]     rdata,
  // cache
  output logic [CA_W-1:0] pin_line,
  output logic            alloc_req,
  output logic [CA_W-1:0] alloc_addr,
  input  logic            alloc_done,
  input  logic            alloc_ok,
  input  logic [1:0]      alloc_way,
  input  logic            evict_valid,
  input  logic [CA_W-1:0] evict_addr,
  input  logic            cache_fault,
  input  logic            cache_fault_pinned,
  input  logic [CA_W-1:0] cache_fault_addr,
  // sub-block register ports
  output logic            wic_we, wic_re,
  output logic            tmr_we, tmr_re,
  output logic            gpio_we, gpio_re,
  input  logic [31:0]     wic_rdata, tmr_rdata, gpio_rdata,
  // plain controls
  output logic [7:0]      div_act,
  output logic [7:0]      div_slow,
  output scn_ratio_e      scn_ratio,
  output logic            scn_en,
  output logic            scn_bypass,
  output logic            dbl_osc_sel,
  output logic            dbl_en,
  // near-field link codec
  output logic            link_tx_valid,
  output logic [7:0]      link_tx_data,
  input  logic            link_tx_ready,
  input  logic            link_rx_valid,
  input  logic [7:0]      link_rx_data,
  input  logic            link_rx_err
);

  typedef enum logic [1:0] {R_IDLE, R_READ, R_ALLOC, R_TX} rstate_e;
  rstate_e     st;
  logic [9:0]  wa;         // word address
  logic [9:0]  l_wa;
  logic [31:0] l_wdata;

  assign wa = addr[11:2];

  // sub-block strobes
  always_comb begin
    wic_we  = req && we  && (wa[9:2] == 8'h00);
    wic_re  = req && !we && (wa[9:2] == 8'h00);
    tmr_we  = req && we  && (wa[9:2] == 8'h03);
    tmr_re  = req && !we && (wa[9:2] == 8'h03);
    gpio_we = req && we  && (wa[9:3] == 7'h02);
    gpio_re = req && !we && (wa[9:3] == 7'h02);
  end

  // local registers
  logic [CA_W-1:0] evict_r, fault_r;
  logic [3:0]      alloc_stat;
  logic            fault_seen, fault_pin;
  logic [7:0]      rx_byte;
  logic            rx_new, rx_bad;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st          <= R_IDLE;
      l_wa        <= '0;
      l_wdata     <= '0;
      pin_line    <= '0;
      alloc_addr  <= '0;
      alloc_stat  <= '0;
      evict_r     <= '0;
      fault_r     <= '0;
      fault_seen  <= 1'b0;
      fault_pin   <= 1'b0;
      div_act     <= 8'd2;
      div_slow    <= 8'd32;
      scn_ratio   <= SCN_R100;
      scn_en      <= 1'b0;
      scn_bypass  <= 1'b0;
      dbl_osc_sel <= 1'b0;
      dbl_en      <= 1'b1;
      rx_byte     <= '0;
      rx_new      <= 1'b0;
      rx_bad      <= 1'b0;
    end else begin
      if (cache_fault) begin
        fault_r    <= cache_fault_addr;
        fault_seen <= 1'b1;
        fault_pin  <= cache_fault_pinned;
      end
      if (link_rx_valid) begin
        rx_byte <= link_rx_data;
        rx_new  <= 1'b1;
      end
      if (link_rx_err) rx_bad <= 1'b1;

      unique case (st)
        R_IDLE: if (req) begin
          l_wa    <= wa;
          l_wdata <= wdata;
          st      <= R_READ;
          if (we) begin
            unique case (wa)
              10'h004: pin_line <= wdata[CA_W-1:0];
              10'h005: begin
                alloc_addr <= wdata[CA_W-1:0];
                st         <= R_ALLOC;
              end
              10'h009: begin
                div_act  <= wdata[7:0];
                div_slow <= wdata[15:8];
              end
              10'h00A: begin
                scn_ratio  <= scn_ratio_e'(wdata[2:0]);
                scn_en     <= wdata[3];
                scn_bypass <= wdata[4];
              end
              10'h00B: begin
                dbl_osc_sel <= wdata[0];
                dbl_en      <= wdata[1];
              end
              10'h018: st <= R_TX;
              default: ;
            endcase
          end
        end
        R_ALLOC: if (alloc_done) begin
          alloc_stat <= {alloc_way, evict_valid, alloc_ok};
          if (evict_valid) evict_r <= evict_addr;
          st <= R_IDLE;
        end
        R_TX: if (link_tx_ready) st <= R_IDLE;
        default: begin   // R_READ: reply, clear read-sensitive flags
          st <= R_IDLE;
          if (l_wa == 10'h008 && !cache_fault) fault_seen <= 1'b0;
          if (l_wa == 10'h019 && !link_rx_valid) begin
            rx_new <= 1'b0;
            rx_bad <= 1'b0;
          end
        end
      endcase
    end
  end

  // the ALLOC request pulses in the first cycle of R_ALLOC
  logic alloc_issued;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) alloc_issued <= 1'b0;
    else        alloc_issued <= (st == R_ALLOC) && !alloc_done;
  assign alloc_req = (st == R_ALLOC) && !alloc_issued;

  assign link_tx_valid = (st == R_TX) && link_tx_ready;
  assign link_tx_data  = l_wdata[7:0];

  assign done = (st == R_READ)
             || (st == R_ALLOC && alloc_done)
             || (st == R_TX && link_tx_ready);

  always_comb begin
    rdata = '0;
    unique casez (l_wa)
      10'b0000_0000_??: rdata = wic_rdata;
      10'h004:          rdata = 32'(pin_line);
      10'h005:          rdata = 32'(alloc_stat);
      10'h006:          rdata = 32'(evict_r);
      10'h007:          rdata = 32'(fault_r);
      10'h008:          rdata = {30'd0, fault_pin, fault_seen};
      10'h009:          rdata = {16'd0, div_slow, div_act};
      10'h00A:          rdata = {27'd0, scn_bypass, scn_en, scn_ratio};
      10'h00B:          rdata = {30'd0, dbl_en, dbl_osc_sel};
      10'b0000_0011_??: rdata = tmr_rdata;
      10'b0000_0100_??,
      10'b0000_0101_??: rdata = gpio_rdata;
      10'h019:          rdata = {22'd0, rx_bad, rx_new, rx_byte};
      default:          rdata = '0;
    endcase
  end

endmodule
