// manchester_codec: Manchester encoder and decoder for the near-field
// inductive link between two devices (a coil traced on the circuit board).
//
// Line code: every bit is two half-bit levels with a transition in the
// middle, 0 = high then low, 1 = low then high. The line idles low. A frame
// is one start bit (a 0, so it begins with a rising edge out of idle),
// eight data bits LSB first, then at least one idle bit time. CLK_PER_BIT
// system clocks make one bit; 96 at 64 MHz gives 667 kbit/s, the link's
// rate of about 660 kbit/s.
//
// Transmit: offer a byte with `tx_valid`; it is taken in a cycle where
// `tx_ready` is 1 and appears on `tx_out` from the next clock.
// Receive: `rx_in` is synchronised, a rising edge out of idle starts a
// frame, each half bit is sampled in its middle, and `rx_valid` pulses for
// one clock with `rx_data` after the last data bit. `rx_err` pulses instead
// if a bit has no mid-bit transition or the start bit is wrong.
// The published design names the encoder/decoder and the link rate; the
// frame format is this design's own.
module manchester_codec #(
  parameter int unsigned CLK_PER_BIT = 96,
  localparam int unsigned CW = $clog2(CLK_PER_BIT + 1)
) (
  input  logic       clk,
  input  logic       rst_n,
  // transmit
  input  logic       tx_valid,
  input  logic [7:0] tx_data,
  output logic       tx_ready,
  output logic       tx_out,
  // receive
  input  logic       rx_in,
  output logic       rx_valid,
  output logic [7:0] rx_data,
  output logic       rx_err
);

  localparam int unsigned HALF = CLK_PER_BIT / 2;

  // ---------------- encoder ----------------
  logic [9:0]    tx_sh;     // {idle, d7..d0, start}, shifted out LSB first
  logic [3:0]    tx_bits;   // bits left including the trailing idle bit
  logic [CW-1:0] tx_cnt;
  logic          tx_busy;

  assign tx_ready = !tx_busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_busy <= 1'b0;
      tx_sh   <= '0;
      tx_bits <= '0;
      tx_cnt  <= '0;
      tx_out  <= 1'b0;
    end else if (!tx_busy) begin
      tx_out <= 1'b0;
      if (tx_valid) begin
        tx_busy <= 1'b1;
        tx_sh   <= {1'b0, tx_data, 1'b0};
        tx_bits <= 4'd10;
        tx_cnt  <= '0;
        tx_out  <= 1'b1;            // first half of the start bit (0)
      end
    end else begin
      logic last_bit;
      last_bit = (tx_bits == 4'd1);
      if (32'(tx_cnt) == CLK_PER_BIT - 1) begin
        tx_cnt  <= '0;
        tx_sh   <= tx_sh >> 1;
        tx_bits <= tx_bits - 4'd1;
        if (tx_bits == 4'd2 || last_bit) tx_out <= 1'b0;   // idle bit
        else                             tx_out <= !tx_sh[1];
        if (last_bit) tx_busy <= 1'b0;
      end else begin
        tx_cnt <= tx_cnt + 1'b1;
        if (32'(tx_cnt) == HALF - 1 && !last_bit) tx_out <= tx_sh[0];
      end
    end
  end

  // ---------------- decoder ----------------
  logic          rx_s, rx_p;
  logic          rx_busy;
  logic [CW-1:0] rx_cnt;
  logic [3:0]    rx_bit;   // 0 = start bit, 1..8 data
  logic          first_half;
  logic [7:0]    rx_sh;

  sync2 u_sync_rx (.clk, .rst_n, .d(rx_in), .q(rx_s));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_p       <= 1'b0;
      rx_busy    <= 1'b0;
      rx_cnt     <= '0;
      rx_bit     <= '0;
      first_half <= 1'b0;
      rx_sh      <= '0;
      rx_valid   <= 1'b0;
      rx_data    <= '0;
      rx_err     <= 1'b0;
    end else begin
      rx_p     <= rx_s;
      rx_valid <= 1'b0;
      rx_err   <= 1'b0;
      if (!rx_busy) begin
        if (rx_s && !rx_p) begin
          rx_busy <= 1'b1;
          rx_cnt  <= CW'(1);
          rx_bit  <= '0;
        end
      end else begin
        rx_cnt <= (32'(rx_cnt) == CLK_PER_BIT - 1) ? '0 : rx_cnt + 1'b1;
        if (32'(rx_cnt) == HALF / 2) first_half <= rx_s;
        if (32'(rx_cnt) == HALF + HALF / 2) begin
          if (rx_s == first_half || (rx_bit == 4'd0 && rx_s)) begin
            rx_err  <= 1'b1;
            rx_busy <= 1'b0;
          end else begin
            if (rx_bit != 4'd0) rx_sh <= {rx_s, rx_sh[7:1]};
            if (rx_bit == 4'd8) begin
              rx_busy  <= 1'b0;
              rx_valid <= 1'b1;
              rx_data  <= {rx_s, rx_sh[7:1]};
            end
            rx_bit <= rx_bit + 4'd1;
          end
        end
      end
    end
  end

endmodule
