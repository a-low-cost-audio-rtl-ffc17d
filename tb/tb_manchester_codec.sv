// tb_manchester_codec: loops the encoder's output into the decoder and
// sends random bytes. Independently of the decoder, a monitor here samples
// tx_out in the middle of each half bit and checks the line code (start
// bit, LSB-first data, mid-bit transition, 0 = high-low) and the bit time.
// Also injects a frame without mid-bit transitions and expects rx_err.
// Clock 100 MHz, 96 clocks per bit. The frame format checked is this
// design's own; Manchester coding is what the published link uses.
`timescale 1ns/1ps
module tb_manchester_codec;
  localparam int CPB = 96;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;

  logic       tx_valid, tx_ready, tx_out, rx_in, rx_valid, rx_err;
  logic [7:0] tx_data, rx_data;
  logic       inject, inj_level;

  assign rx_in = inject ? inj_level : tx_out;
  manchester_codec #(.CLK_PER_BIT(CPB)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  byte q_sent [$];
  byte q_line [$];
  int  n_rx = 0, n_err = 0;

  // line monitor
  initial begin
    forever begin
      logic [7:0] b;
      @(posedge tx_out);
      @(posedge clk);   // align to the clock edge that raised it
      repeat (CPB / 4 - 1) @(posedge clk);
      for (int k = 0; k < 9; k++) begin
        logic h1, h2;
        h1 = tx_out;
        repeat (CPB / 2) @(posedge clk);
        h2 = tx_out;
        repeat (CPB / 2) @(posedge clk);
        check(h1 != h2, "mid-bit transition");
        if (k == 0) check(h1 == 1 && h2 == 0, "start bit is high-low");
        else b[k-1] = h2;
      end
      q_line.push_back(b);
    end
  end

  always @(posedge clk) if (rst_n) begin
    if (rx_valid) begin
      n_rx++;
      check(q_sent.size() > 0, "byte received");
      if (q_sent.size() > 0) check(rx_data == q_sent.pop_front(), "received byte equals sent byte");
    end
    if (rx_err) n_err++;
  end

  initial begin
    #20_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, t1;
    tx_valid = 0; tx_data = 0; inject = 0; inj_level = 0;
    #22 rst_n = 1;
    for (int i = 0; i < 40; i++) begin
      @(negedge clk);
      tx_data = 8'($urandom);
      if (i == 0) tx_data = 8'h00;
      if (i == 1) tx_data = 8'hFF;
      tx_valid = 1;
      while (!tx_ready) @(negedge clk);
      q_sent.push_back(tx_data);
      if (i == 2) t0 = int'($time / 10);
      @(negedge clk);
      tx_valid = 0;
      if (i == 3) begin
        t1 = int'($time / 10);
        // accept to accept is ten bit times plus one idle clock; t1 is
        // taken one clock after the accept, t0 one clock before it
        check(t1 - t0 == 10 * CPB + 2, $sformatf("frame takes %0d clocks, expected %0d", t1 - t0, 10 * CPB + 2));
      end
    end
    while (q_sent.size() > 0) @(negedge clk);
    repeat (3 * CPB) @(negedge clk);
    check(n_rx == 40, $sformatf("%0d bytes received", n_rx));
    check(q_line.size() == 40, "monitor saw every frame");
    // a frame with no mid-bit transitions: rise and stay high
    inject = 1; inj_level = 1;
    repeat (2 * CPB) @(negedge clk);
    inj_level = 0;
    repeat (2 * CPB) @(negedge clk);
    check(n_err == 1, "violation flagged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
