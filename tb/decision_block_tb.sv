// decision_block_tb -- self-checking test of the single-cycle Decision block.
//
// Directed pairs exercise each ordering rule once; then 20000 random pairs,
// drawn from small value ranges so that equal deadlines, equal
// window-constraints and equal arrival times are common, are checked against
// ss_ref_pkg::ref_precedes. Both input orders are applied to every pair, and
// the winner/loser outputs must be the two inputs. The block is
// combinational: outputs are sampled 1 ns after the inputs change.
module decision_block_tb;
  import ss_pkg::*;
  import ss_ref_pkg::*;

  stream_attr_t a, b, winner, loser;
  logic         a_wins;
  int checks = 0, failures = 0;
  int rule_hits [5] = '{default: 0};

  decision_block dut (.a(a), .b(b), .winner(winner), .loser(loser), .a_wins(a_wins));

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic stream_attr_t mk(int d, int x, int y, int ar, int id);
    stream_attr_t s;
    s.deadline = 16'(d); s.loss_num = 8'(x); s.loss_den = 8'(y);
    s.arrival = 16'(ar); s.id = 5'(id);
    return s;
  endfunction

  function automatic int which_rule(stream_attr_t p, stream_attr_t q);
    if (p.deadline != q.deadline) return 0;
    if (int'(p.loss_num) * int'(q.loss_den) != int'(q.loss_num) * int'(p.loss_den)) return 1;
    if (p.loss_num == 0 && q.loss_num == 0 && p.loss_den != q.loss_den) return 2;
    if (p.loss_num != 0 && p.loss_num != q.loss_num) return 3;
    return 4;
  endfunction

  task automatic check_pair(stream_attr_t p, stream_attr_t q);
    bit exp_a;
    for (int swap = 0; swap < 2; swap++) begin
      a = swap ? q : p;
      b = swap ? p : q;
      #1;
      exp_a = ref_precedes(a, b);
      checks++;
      if (a_wins !== exp_a || winner !== (exp_a ? a : b) || loser !== (exp_a ? b : a)) begin
        failures++;
        if (failures < 10)
          $display("FAIL a=%p b=%p a_wins=%0d expected %0d", a, b, a_wins, exp_a);
      end
    end
    rule_hits[which_rule(p, q)]++;
  endtask

  task automatic expect_first(stream_attr_t first, stream_attr_t second);
    a = second; b = first; #1;
    checks++;
    if (winner !== first) begin
      failures++;
      $display("FAIL directed: expected %p ahead of %p", first, second);
    end
  endtask

  initial begin
    // Rule 1: earliest deadline first, also across the 16-bit wrap.
    expect_first(mk(10, 5, 6, 100, 1), mk(11, 0, 9, 0, 0));
    expect_first(mk(16'hFFF0, 1, 2, 0, 3), mk(16'h0005, 0, 2, 0, 2));
    // Rule 2: equal deadlines, lowest x/y first (1/4 < 1/3).
    expect_first(mk(20, 1, 4, 50, 2), mk(20, 1, 3, 1, 1));
    // Rule 3: equal deadlines, both W zero, highest denominator first.
    expect_first(mk(20, 0, 9, 50, 4), mk(20, 0, 3, 1, 1));
    // Rule 4: equal deadlines, equal non-zero W (2/4 = 1/2), lowest numerator.
    expect_first(mk(20, 1, 2, 50, 6), mk(20, 2, 4, 1, 1));
    // Rule 5: everything equal but arrival time: first come first served.
    expect_first(mk(20, 1, 2, 7, 6), mk(20, 1, 2, 8, 1));
    // Full tie: lower slot ID.
    expect_first(mk(20, 1, 2, 7, 3), mk(20, 1, 2, 7, 9));

    for (int i = 0; i < 20000; i++) begin
      stream_attr_t p, q;
      p = mk($urandom_range(0, 3), $urandom_range(0, 3), $urandom_range(0, 4),
             $urandom_range(0, 3), $urandom_range(0, 31));
      q = mk($urandom_range(0, 3), $urandom_range(0, 3), $urandom_range(0, 4),
             $urandom_range(0, 3), $urandom_range(0, 31));
      if (i % 4 == 0) begin
        p.deadline = 16'($urandom); q.deadline = 16'($urandom);
        p.loss_num = 8'($urandom); q.loss_num = 8'($urandom);
        p.loss_den = 8'($urandom); q.loss_den = 8'($urandom);
      end
      check_pair(p, q);
    end

    for (int r = 0; r < 5; r++) begin
      checks++;
      if (rule_hits[r] == 0) begin
        failures++;
        $display("FAIL rule %0d never exercised", r + 1);
      end
    end
    $display("rule hits: %p", rule_hits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
