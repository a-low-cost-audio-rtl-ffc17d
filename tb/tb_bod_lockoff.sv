// tb_bod_lockoff: replays battery voltage stories through two ideal
// comparators (thresholds 1.7 V and 1.2 V, computed here) into the lock-off
// logic and compares RESETn with the expected behaviour:
//   insertion and rise above 1.7 V releases reset;
//   a sag below 1.7 V asserts reset, and recovery above 1.7 V (self-healing
//   cells) does NOT release it;
//   only a fall below 1.2 V (battery change) re-arms, and the next rise
//   above 1.7 V releases reset again.
// No clock: comparator levels are stepped every 10 ns or so. The lock-off sequence
// checked is the published one.
`timescale 1ns/1ps
module tb_bod_lockoff;
  int checks = 0, failures = 0;
  logic comp_hi, comp_lo, resetn;
  int   n_release = 0, n_lock = 0;

  bod_lockoff dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  task automatic set_v(int mv);
    comp_hi = mv > 1700;
    comp_lo = mv > 1200;
    #10;
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // battery insertion: supply starts low
    set_v(0);
    check(!resetn, "reset held at insertion");
    set_v(900);  check(!resetn, "reset held at 0.9 V");
    set_v(1500); check(!resetn, "reset held at 1.5 V");
    set_v(2000); check(resetn, "reset released above 1.7 V"); n_release++;
    set_v(2400); check(resetn, "running at 2.4 V");
    // brown-out and self-healing oscillation
    for (int k = 0; k < 5; k++) begin
      set_v(1650); check(!resetn, "reset on sag below 1.7 V");
      set_v(1800); check(!resetn, "locked off after recovery above 1.7 V"); n_lock++;
    end
    set_v(1300); check(!resetn, "still locked at 1.3 V");
    set_v(1900); check(!resetn, "still locked at 1.9 V");
    // battery change: below 1.2 V re-arms
    set_v(1100); check(!resetn, "reset at 1.1 V");
    set_v(1500); check(!resetn, "reset between thresholds");
    set_v(2600); check(resetn, "released after a fresh battery"); n_release++;
    // a second brown-out that passes straight through to 0 V
    set_v(1000); check(!resetn, "reset at 1.0 V");
    set_v(3000); check(resetn, "released again"); n_release++;
    check(n_release == 3 && n_lock == 5, "release and lock-off both exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
