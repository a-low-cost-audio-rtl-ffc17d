// tb_true_lru: checks the true-LRU matrix against a reference list that
// keeps the four ways in use order. Random uses; after every use the ages
// and the victim for a random exclusion mask are compared with the list.
// Purely combinational checks, 1 ns per step. True LRU with a fallback past
// pinned ways is the published requirement; the pairwise encoding is this
// design's own.
`timescale 1ns/1ps
module tb_true_lru;
  int checks = 0, failures = 0;
  logic [5:0] state, next_state;
  logic [1:0] touch_way, victim;
  logic [3:0] excl;
  logic       victim_ok;
  logic [1:0] age [4];

  true_lru dut (.*);

  int order [4];   // order[0] = most recent

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic use_way(int w);
    int pos;
    touch_way = 2'(w);
    #1;
    state = next_state;
    pos = 0;
    for (int i = 0; i < 4; i++) if (order[i] == w) pos = i;
    for (int i = pos; i > 0; i--) order[i] = order[i-1];
    order[0] = w;
    #1;
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    state = '0; touch_way = '0; excl = '0;
    // establish a consistent order: use 3,2,1,0 -> order 0,1,2,3
    order = '{3, 2, 1, 0};
    use_way(3); use_way(2); use_way(1); use_way(0);
    order = '{0, 1, 2, 3};
    for (int n = 0; n < 2000; n++) begin
      int exp_v;
      bit exp_ok;
      use_way($urandom_range(0, 3));
      excl = 4'($urandom_range(0, 15));
      #1;
      for (int i = 0; i < 4; i++)
        check(age[order[i]] == 2'(i), $sformatf("age of way %0d is %0d, expected %0d", order[i], age[order[i]], i));
      exp_ok = 0; exp_v = 0;
      for (int i = 3; i >= 0; i--)
        if (!exp_ok && !excl[order[i]]) begin exp_ok = 1; exp_v = order[i]; end
      check(victim_ok == exp_ok, "victim_ok");
      if (exp_ok) check(victim == 2'(exp_v), $sformatf("victim %0d expected %0d excl %b", victim, exp_v, excl));
    end
    // the second and third oldest as fallbacks, explicitly
    excl = 4'b0000; excl[order[3]] = 1; #1;
    check(victim == 2'(order[2]), "fallback to second oldest");
    excl[order[2]] = 1; #1;
    check(victim == 2'(order[1]), "fallback to third oldest");
    excl = 4'b1111; #1;
    check(!victim_ok, "all pinned");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
