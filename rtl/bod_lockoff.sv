// bod_lockoff: lock-off logic of the power-on-reset / brown-out detector.
//
// Carbon-zinc cells recover when the load is removed: a plain brown-out
// detector would release reset as the voltage creeps back up, load the
// battery, drop it again, and oscillate. This circuit holds the chip in
// reset after a brown-out until the battery has fallen below the low
// threshold (removed or replaced), and only then lets it start again.
//
// Inputs are the two comparator outputs: `comp_hi` (battery above the high
// threshold, 1.7 V) and `comp_lo` (above the low threshold, 1.2 V).
// Three storage elements:
//   FF1 set while both comparators are low, cleared while RESETn is 1;
//   FF2 captures FF1 on the rising edge of (comp_hi AND comp_lo) and is
//       cleared while RESETn is 1;
//   FF3 is RESETn: cleared while comp_hi is low, set while FF2 is 1.
// Battery insertion: FF1 = 1, FF3 = 0. Rising past 1.7 V clocks FF2 to 1,
// which sets RESETn; RESETn clears FF1 and FF2. A dip below 1.7 V clears
// RESETn; a recovery past 1.7 V clocks FF2 with FF1 = 0, so RESETn stays 0
// until the battery has gone below 1.2 V, which sets FF1 again.
//
// FF1 and FF3 are set/reset storage with no clock and are written as
// latches on purpose; FF2 is the one edge-triggered flip-flop. This is an
// asynchronous circuit with no system clock. The three storage elements and
// how each is set, cleared and clocked follow the published circuit; which
// of set and clear wins on FF1 and FF3 when both act is this design's choice
// (clear wins; in normal operation they never act together).
module bod_lockoff (
  input  logic comp_hi,
  input  logic comp_lo,
  output logic resetn
);

  logic q1, q2, q3;
  logic both_low, both_high;

  assign both_low  = !comp_hi && !comp_lo;
  assign both_high = comp_hi && comp_lo;

  // FF1: set by both comparators low, cleared by RESETn
  always_latch begin
    if (q3)            q1 = 1'b0;
    else if (both_low) q1 = 1'b1;
  end

  // FF2: clocked by both comparators high, cleared by RESETn
  always_ff @(posedge both_high or posedge q3) begin
    if (q3) q2 <= 1'b0;
    else    q2 <= q1;
  end

  // FF3: cleared by the high comparator low, set by FF2
  always_latch begin
    if (!comp_hi) q3 = 1'b0;
    else if (q2)  q3 = 1'b1;
  end

  assign resetn = q3;

endmodule
