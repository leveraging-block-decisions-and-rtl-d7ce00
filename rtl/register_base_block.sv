// register_base_block -- one stream-slot of the ShareStreams scheduler.
//
// The slot holds the service state of one stream (or of an aggregate of
// streamlets bound to it) and drives it on the 53-bit attribute bus to the
// shuffle-exchange network. After each decision the Control and Steering
// Logic broadcasts the winner's slot ID, the current time and a priority
// update enable; every slot then updates itself in that one cycle according
// to whether it won or lost and whether it met or missed its deadline.
//
// Update rules. The architecture states what is updated (winner priority
// effectively lowered, losers that missed their deadline raised, misses
// recorded in a per-slot performance counter). The exact arithmetic below is
// the usual DWCS window-constraint adjustment, chosen for this design:
//   winner:  if y' > x'           y' -= 1
//            else if y' == x' > 0 x' -= 1, y' -= 1
//            if x' == y' == 0 or the slot is tagged: x' = x, y' = y, untag
//            deadline += T; the head-packet arrival time is replaced by
//            the next one from the slot's queue when one is offered
//   loser whose deadline is not later than the current time (a miss):
//            missed counter += 1 (saturating)
//            if x' > 0            x' -= 1, y' -= 1, reset to x/y if both 0
//            else if y > 0        y' += 1 (saturating), tag the slot
//            deadline += T
//   other losers keep their state.
// Block service (serve_all high): the whole ordered block is sent in one
// transaction, so every slot takes the winner's update above; only the
// circulated winner also takes a new arrival time from its queue.
//
// Interface: load_en writes the slot from load_cfg (current x'/y' start at
// the original x/y). update_en applies one priority update; serve_all
// selects block service for it. Both act on the
// rising clock edge; attr reflects the new state in the next cycle.
// Synchronous active-low reset clears the slot.
module register_base_block
  import ss_pkg::*;
#(
  parameter int unsigned SLOT_ID = 0,
  parameter int unsigned CNT_W   = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // LOAD
  input  logic                 load_en,
  input  stream_cfg_t          load_cfg,
  // PRIORITY_UPDATE
  input  logic                 update_en,
  input  logic [ID_W-1:0]      winner_id,
  input  logic                 serve_all,
  input  logic [DEADLINE_W-1:0] now,
  input  logic                 arrival_valid,
  input  logic [ARRIVAL_W-1:0] arrival_next,
  // state
  output stream_attr_t         attr,
  output logic [CNT_W-1:0]     missed_count,
  output logic                 is_winner,
  output logic                 missed
);

  logic [DEADLINE_W-1:0] deadline_q;
  logic [PERIOD_W-1:0]   period_q;
  logic [LOSS_W-1:0]     x_q, y_q;        // current x', y'
  logic [LOSS_W-1:0]     x0_q, y0_q;      // original x, y
  logic [ARRIVAL_W-1:0]  arrival_q;
  logic                  tag_q;
  logic                  served;

  assign attr.deadline = deadline_q;
  assign attr.loss_num = x_q;
  assign attr.loss_den = y_q;
  assign attr.arrival  = arrival_q;
  assign attr.id       = ID_W'(SLOT_ID);

  assign is_winner = (winner_id == ID_W'(SLOT_ID));
  // Served this decision: the winner, or every slot when the whole block is sent.
  assign served    = is_winner || serve_all;
  // Deadline expired: deadline <= now (modulo 2^16).
  assign missed    = !served && !time_before(now, deadline_q);

  // Next window-constraint for the winner and for a missing loser.
  logic [LOSS_W-1:0] win_x, win_y, miss_x, miss_y;
  logic              win_tag, miss_tag;

  always_comb begin
    win_x   = x_q;
    win_y   = y_q;
    win_tag = tag_q;
    if (y_q > x_q) begin
      win_y = y_q - 1'b1;
    end else if (y_q == x_q && x_q != '0) begin
      win_x = x_q - 1'b1;
      win_y = y_q - 1'b1;
    end
    if ((win_x == '0 && win_y == '0) || tag_q) begin
      win_x   = x0_q;
      win_y   = y0_q;
      win_tag = 1'b0;
    end

    miss_x   = x_q;
    miss_y   = y_q;
    miss_tag = tag_q;
    if (x_q != '0) begin
      miss_x = x_q - 1'b1;
      miss_y = y_q - 1'b1;
      if (miss_x == '0 && miss_y == '0) begin
        miss_x = x0_q;
        miss_y = y0_q;
      end
    end else if (y0_q != '0) begin
      if (y_q != '1) miss_y = y_q + 1'b1;
      miss_tag = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      deadline_q   <= '0;
      period_q     <= '0;
      x_q          <= '0;
      y_q          <= '0;
      x0_q         <= '0;
      y0_q         <= '0;
      arrival_q    <= '0;
      tag_q        <= 1'b0;
      missed_count <= '0;
    end else if (load_en) begin
      deadline_q   <= load_cfg.deadline;
      period_q     <= load_cfg.period;
      x_q          <= load_cfg.loss_num;
      y_q          <= load_cfg.loss_den;
      x0_q         <= load_cfg.loss_num;
      y0_q         <= load_cfg.loss_den;
      arrival_q    <= load_cfg.arrival;
      tag_q        <= 1'b0;
      missed_count <= '0;
    end else if (update_en) begin
      if (served) begin
        x_q        <= win_x;
        y_q        <= win_y;
        tag_q      <= win_tag;
        deadline_q <= deadline_q + period_q;
        if (is_winner && arrival_valid) arrival_q <= arrival_next;
      end else if (missed) begin
        x_q        <= miss_x;
        y_q        <= miss_y;
        tag_q      <= miss_tag;
        deadline_q <= deadline_q + period_q;
        if (missed_count != '1) missed_count <= missed_count + 1'b1;
      end
    end
  end

endmodule
