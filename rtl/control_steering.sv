// control_steering -- Control and Steering Logic of the ShareStreams scheduler.
//
// A three-state controller sequences every decision:
//   LOAD      The stream-slots are written from the load port (one slot per
//             cycle). `start` begins scheduling.
//   SCHEDULE  log2(N) cycles. In the first the network muxes take the
//             Register Base block buses, later they recirculate the Decision
//             block outputs.
//   PRIORITY_UPDATE
//             One cycle. The circulated stream ID (position 0 of the block in
//             max-first mode, position N-1 in min-first mode), the current
//             time and the priority update enable go to every stream-slot;
//             the winner's next arrival time is taken from its queue and the
//             winner record {time, ID} is written to the winner queue. The
//             current time then advances by one packet-time.
// After PRIORITY_UPDATE the controller returns to SCHEDULE, or to LOAD when
// `stop` is high. A DWCS decision therefore takes log2(N)+1 cycles.
// With cfg_update_en low (priority-class and fair-queuing disciplines, whose
// tags never change once loaded) PRIORITY_UPDATE is bypassed: after SCHEDULE
// the controller records the winner and returns to LOAD for the next tags.
//
// The states, their order, the mux control, the winner-ID circulation, the
// max-first/min-first choice and the bypass follow the architecture. The
// start/stop handshake, the time counter (one unit per decision) and the
// stall are this design's choices: PRIORITY_UPDATE waits, counting stall
// cycles, while the winner queue is full, so no decision is lost.
//
// In bypass mode a winner record that finds the winner queue full is dropped
// (the queue flags the overflow); the arrival queues are not popped.
//
// block_valid is high for one cycle, the cycle after the last SCHEDULE cycle,
// when the network outputs hold the finished block.
module control_steering
  import ss_pkg::*;
#(
  parameter int unsigned N = 32
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // configuration / command
  input  logic                  start,
  input  logic                  stop,
  input  logic                  cfg_update_en,
  input  logic                  cfg_min_first,
  // load port
  input  logic                  load_valid,
  input  logic [ID_W-1:0]       load_slot,
  output logic [N-1:0]          slot_load_en,
  // network steering
  output logic                  net_advance,
  output logic                  net_sel_regs,
  input  logic [ID_W-1:0]       block_first_id,
  input  logic [ID_W-1:0]       block_last_id,
  // priority update broadcast
  output logic                  update_en,
  output logic [ID_W-1:0]       winner_id,
  output logic [DEADLINE_W-1:0] now,
  // memory interface
  output logic                  arr_pop,
  output logic                  win_push,
  input  logic                  win_full,
  // status
  output ctrl_state_t           state,
  output logic                  block_valid,
  output logic [31:0]           decisions,
  output logic [31:0]           stall_cycles
);

  localparam int unsigned LOGN = $clog2(N);

  ctrl_state_t     state_d;
  logic [ID_W-1:0] cyc_q;
  logic            stall;

  assign winner_id    = cfg_min_first ? block_last_id : block_first_id;
  assign net_advance  = (state == ST_SCHEDULE);
  assign net_sel_regs = (state == ST_SCHEDULE) && (cyc_q == '0);

  always_comb begin
    for (int s = 0; s < N; s++)
      slot_load_en[s] = (state == ST_LOAD) && load_valid && (load_slot == ID_W'(s));
  end

  assign stall     = (state == ST_UPDATE) && win_full;
  assign update_en = (state == ST_UPDATE) && !win_full;
  // In bypass mode the winner is recorded in the cycle after SCHEDULE.
  assign win_push  = update_en || (block_valid && !cfg_update_en && state == ST_LOAD);
  assign arr_pop   = update_en;

  always_comb begin
    state_d = state;
    unique case (state)
      ST_LOAD:     if (start) state_d = ST_SCHEDULE;
      ST_SCHEDULE: if (cyc_q == ID_W'(LOGN - 1)) state_d = cfg_update_en ? ST_UPDATE : ST_LOAD;
      ST_UPDATE:   if (!win_full) state_d = stop ? ST_LOAD : ST_SCHEDULE;
      default:     state_d = ST_LOAD;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state        <= ST_LOAD;
      cyc_q        <= '0;
      block_valid  <= 1'b0;
      now          <= '0;
      decisions    <= '0;
      stall_cycles <= '0;
    end else begin
      state       <= state_d;
      block_valid <= (state == ST_SCHEDULE) && (cyc_q == ID_W'(LOGN - 1));
      if (state == ST_SCHEDULE && cyc_q != ID_W'(LOGN - 1)) cyc_q <= cyc_q + 1'b1;
      else                                                   cyc_q <= '0;
      if (win_push) begin
        now       <= now + 1'b1;
        decisions <= decisions + 1'b1;
      end
      if (stall) stall_cycles <= stall_cycles + 1'b1;
    end
  end

  // The controller is only ever in one of its three states, and a slot is
  // loaded only in LOAD.
  always_ff @(posedge clk) begin
    if (rst_n) begin
      assert (state inside {ST_LOAD, ST_SCHEDULE, ST_UPDATE})
        else $error("control_steering: illegal state");
      assert (!(|slot_load_en) || state == ST_LOAD)
        else $error("control_steering: slot loaded outside LOAD");
    end
  end

endmodule
