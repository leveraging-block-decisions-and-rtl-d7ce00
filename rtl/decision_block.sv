// decision_block -- orders two streams in a single clock cycle.
//
// The block receives the attribute buses of two streams, A and B, and puts
// the higher-priority one on `winner` and the other on `loser`. All five
// comparisons are evaluated at once and a small logic function picks the one
// whose rule applies:
//   1. different deadlines            -> earliest deadline first
//   2. equal deadlines, different W   -> lowest window-constraint W = x/y first
//   3. equal deadlines, both W zero   -> highest window denominator y first
//   4. equal deadlines, equal W != 0  -> lowest window numerator x first
//   5. all other cases                -> first come, first served (arrival time)
// W is never divided out: W_A < W_B is tested as x_A*y_B < x_B*y_A with two
// 8x8 multipliers, and "equal W" as equality of the same two products.
//
// The rules, the compare set and the cross-multiplication follow the
// architecture. This implementation's own choices: deadlines and arrival
// times are compared modulo 2^16 (so they may wrap); rule 3 and rule 4 fall
// through to rule 5 when the denominators or numerators are also equal; when
// the arrival times are equal too, the lower stream-slot ID wins, so the order
// is total and the outcome does not depend on which input a stream is on.
//
// Purely combinational: winner, loser and a_wins are valid in the cycle the
// inputs are applied.
module decision_block
  import ss_pkg::*;
(
  input  stream_attr_t a,
  input  stream_attr_t b,
  output stream_attr_t winner,
  output stream_attr_t loser,
  output logic         a_wins
);

  // Value bus comparisons.
  logic [2*LOSS_W-1:0] xa_yb, xb_ya;
  logic dl_lt, dl_gt, w_lt, w_gt, den_gt, den_lt, num_lt, num_gt, arr_lt, arr_gt, id_lt;
  // Predicate bus comparisons (equalities that select the rule).
  logic dl_eq, w_eq, w_both_zero;

  always_comb begin
    xa_yb  = a.loss_num * b.loss_den;
    xb_ya  = b.loss_num * a.loss_den;

    dl_lt  = time_before(a.deadline, b.deadline);
    dl_gt  = time_before(b.deadline, a.deadline);
    w_lt   = xa_yb < xb_ya;
    w_gt   = xb_ya < xa_yb;
    den_gt = a.loss_den > b.loss_den;
    den_lt = a.loss_den < b.loss_den;
    num_lt = a.loss_num < b.loss_num;
    num_gt = a.loss_num > b.loss_num;
    arr_lt = time_before(a.arrival, b.arrival);
    arr_gt = time_before(b.arrival, a.arrival);
    id_lt  = a.id < b.id;

    dl_eq       = a.deadline == b.deadline;
    w_eq        = xa_yb == xb_ya;
    w_both_zero = (a.loss_num == '0) && (b.loss_num == '0);
  end

  // Logic function: select the result of the rule that applies.
  logic fcfs_a;
  always_comb begin
    fcfs_a = arr_lt || (!arr_gt && id_lt);
    if (!dl_eq)                   a_wins = dl_lt && !dl_gt;
    else if (!w_eq)               a_wins = w_lt && !w_gt;
    else if (w_both_zero)         a_wins = den_gt || (!den_lt && fcfs_a);
    else                          a_wins = num_lt || (!num_gt && fcfs_a);
  end

  assign winner = a_wins ? a : b;
  assign loser  = a_wins ? b : a;

endmodule
