// true_lru: true least-recently-used bookkeeping for one 4-way cache set,
// with victim selection that skips pinned ways.
//
// The state is a 6-bit pairwise order matrix, one bit per pair of ways
// (0,1) (0,2) (0,3) (1,2) (1,3) (2,3); a bit is 1 when the lower-numbered way
// of its pair was used more recently. From it every way gets an age, 0 for
// the most recently used up to 3 for the least, so the full order is known,
// not just the oldest way as with tree pseudo-LRU. That order is what lets
// the cache fall back to the second, third or fourth oldest line when the
// older ones lie in the pinned region. Purely combinational:
//   next_state = state after a use of `touch_way`;
//   victim     = the oldest way whose bit in `excl` is 0; victim_ok = 0 when
//                all four ways are excluded.
// A 6-bit LRU word per set is the published width; the matrix encoding is
// this design's choice. A state that is not a consistent order (as after
// power-up, before every way has been used) still yields a non-excluded
// victim.
module true_lru (
  input  logic [5:0] state,
  input  logic [1:0] touch_way,
  input  logic [3:0] excl,
  output logic [5:0] next_state,
  output logic [1:0] victim,
  output logic       victim_ok,
  output logic [1:0] age [4]
);

  // bit index of pair (i,j), i<j
  function automatic int unsigned pidx(int unsigned i, int unsigned j);
    unique case ({i[1:0], j[1:0]})
      4'b00_01: return 0;
      4'b00_10: return 1;
      4'b00_11: return 2;
      4'b01_10: return 3;
      4'b01_11: return 4;
      default:  return 5;   // (2,3)
    endcase
  endfunction

  // w is newer than v
  function automatic logic newer(logic [5:0] s, int unsigned w, int unsigned v);
    if (w < v) return s[pidx(w, v)];
    else       return ~s[pidx(v, w)];
  endfunction

  always_comb begin
    for (int unsigned w = 0; w < 4; w++) begin
      logic [1:0] a;
      a = '0;
      for (int unsigned v = 0; v < 4; v++)
        if (v != w && newer(state, v, w)) a = a + 2'd1;
      age[w] = a;
    end
  end

  always_comb begin
    next_state = state;
    for (int unsigned v = 0; v < 4; v++) begin
      if (v < touch_way)      next_state[pidx(v, 32'(touch_way))] = 1'b0;
      else if (v > touch_way) next_state[pidx(32'(touch_way), v)] = 1'b1;
    end
  end

  // oldest first; any non-excluded way if the matrix is inconsistent
  always_comb begin
    victim    = '0;
    victim_ok = 1'b0;
    for (int a = 3; a >= 0; a--)
      for (int unsigned w = 0; w < 4; w++)
        if (!victim_ok && !excl[w] && age[w] == a[1:0]) begin
          victim    = w[1:0];
          victim_ok = 1'b1;
        end
    for (int unsigned w = 0; w < 4; w++)
      if (!victim_ok && !excl[w]) begin
        victim    = w[1:0];
        victim_ok = 1'b1;
      end
  end

endmodule
