// control_steering_tb -- self-checking test of the Control and Steering Logic
// at the default N = 32 (log2 N = 5).
//
// Checks, cycle by cycle:
//   * LOAD: a load request enables exactly the addressed slot, only in LOAD;
//   * SCHEDULE lasts log2(N) cycles, with the muxes on the Register Base
//     block buses in the first only, and block_valid follows it;
//   * PRIORITY_UPDATE: one cycle of update enable, winner = position 0 of the
//     block (max-first) or position N-1 (min-first), arrival pop and winner
//     push, current time +1; a DWCS decision repeats every log2(N)+1 cycles;
//   * a full winner queue stalls PRIORITY_UPDATE and is counted;
//   * `stop` returns to LOAD; with the update disabled (bypass) SCHEDULE
//     returns to LOAD and the winner is recorded without a priority update.
// A second, random phase drives start, stop, win_full, the mode bits, loads
// and the block IDs at random for 6000 cycles and compares every output in
// every cycle with a behavioural model of the controller, counting stalls,
// bypass and min-first decisions and stops (each must occur).
module control_steering_tb;
  import ss_pkg::*;

  localparam int N = 32, LOGN = 5;

  logic clk = 0, rst_n = 0;
  logic start = 0, stop = 0, cfg_update_en = 1, cfg_min_first = 0;
  logic load_valid = 0;
  logic [ID_W-1:0] load_slot = '0, block_first_id = 5'd7, block_last_id = 5'd19;
  logic [N-1:0] slot_load_en;
  logic net_advance, net_sel_regs, update_en, arr_pop, win_push, win_full = 0, block_valid;
  logic [ID_W-1:0] winner_id;
  logic [15:0] now;
  ctrl_state_t state;
  logic [31:0] decisions, stall_cycles;

  int checks = 0, failures = 0;

  control_steering dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL @%0t: %s (state=%s)", $time, msg, state.name());
    end
  endtask

  // Observe one cycle (sample just before the edge) and advance.
  task automatic step();
    @(posedge clk);
    #1;
  endtask

  // Expect a full SCHEDULE phase starting now.
  task automatic expect_schedule();
    for (int c = 0; c < LOGN; c++) begin
      chk(state == ST_SCHEDULE && net_advance, "schedule cycle");
      chk(net_sel_regs == (c == 0), "mux select only in first schedule cycle");
      chk(!update_en && !win_push, "no update while scheduling");
      step();
    end
    chk(block_valid, "block_valid after last schedule cycle");
  endtask

  initial begin
    int t0, d0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    step();
    chk(state == ST_LOAD, "reset into LOAD");
    // LOAD: write every slot once.
    for (int s = 0; s < N; s++) begin
      load_valid = 1; load_slot = 5'(s);
      #1;
      chk(slot_load_en == (32'd1 << s), "one-hot slot load enable");
      step();
    end
    load_valid = 0;
    #1 chk(slot_load_en == '0, "no load without request");
    // Start DWCS scheduling, max-first.
    start = 1;
    step();
    start = 0;
    t0 = now; d0 = decisions;
    for (int d = 0; d < 4; d++) begin
      expect_schedule();
      chk(state == ST_UPDATE && update_en && arr_pop && win_push, "priority update cycle");
      chk(winner_id == block_first_id, "max-first circulates position 0");
      // load requests are ignored outside LOAD
      load_valid = 1;
      #1 chk(slot_load_en == '0, "no load outside LOAD");
      load_valid = 0;
      step();
    end
    chk(now == 16'(t0 + 4) && decisions == d0 + 4, "time and decision count advance");
    // Min-first.
    cfg_min_first = 1;
    expect_schedule();
    chk(update_en && winner_id == block_last_id, "min-first circulates position N-1");
    step();
    cfg_min_first = 0;
    // Stall: winner queue full for 3 cycles during PRIORITY_UPDATE.
    expect_schedule();
    win_full = 1;
    for (int k = 0; k < 3; k++) begin
      #1 chk(state == ST_UPDATE && !update_en && !win_push && !arr_pop, "stalled update");
      step();
    end
    win_full = 0;
    #1 chk(update_en && win_push, "update after stall");
    chk(stall_cycles == 3, "three stall cycles counted");
    // Stop: back to LOAD after this update.
    stop = 1;
    step();
    stop = 0;
    chk(state == ST_LOAD, "stop returns to LOAD");
    repeat (3) begin
      chk(state == ST_LOAD && !net_advance && !update_en, "idle in LOAD");
      step();
    end
    // Bypass (priority-class / fair-queuing): no PRIORITY_UPDATE state.
    cfg_update_en = 0;
    d0 = decisions;
    for (int d = 0; d < 3; d++) begin
      start = 1;
      step();
      start = 0;
      expect_schedule();
      chk(state == ST_LOAD && win_push && !update_en && !arr_pop, "bypass records winner in LOAD");
      step();
      chk(!win_push, "single winner record per bypass decision");
    end
    chk(decisions == d0 + 3, "bypass decisions counted");

    // ---- random phase against a behavioural model ----------------------
    begin
      ctrl_state_t m_st;
      int m_k, m_now, m_dec, m_stall;
      bit m_bv;
      int n_stall = 0, n_byp = 0, n_min = 0, n_stop = 0, n_upd = 0;
      bit e_upd, e_push;
      @(negedge clk);
      m_st = state; m_k = 0; m_bv = block_valid;
      m_now = now; m_dec = decisions; m_stall = stall_cycles;
      for (int c = 0; c < 6000; c++) begin
        start          = ($urandom_range(0, 9) < 3);
        stop           = ($urandom_range(0, 19) == 0);
        win_full       = ($urandom_range(0, 9) < 2);
        cfg_min_first  = $urandom_range(0, 1);
        if ($urandom_range(0, 49) == 0) cfg_update_en = !cfg_update_en;
        load_valid     = $urandom_range(0, 1);
        load_slot      = 5'($urandom_range(0, N - 1));
        block_first_id = 5'($urandom_range(0, N - 1));
        block_last_id  = 5'($urandom_range(0, N - 1));
        #1;
        e_upd  = (m_st == ST_UPDATE) && !win_full;
        e_push = e_upd || (m_bv && !cfg_update_en && m_st == ST_LOAD);
        chk(state == m_st, "random: state");
        chk(net_advance == (m_st == ST_SCHEDULE), "random: advance");
        chk(net_sel_regs == (m_st == ST_SCHEDULE && m_k == 0), "random: mux select");
        chk(update_en == e_upd && arr_pop == e_upd, "random: update enable and pop");
        chk(win_push == e_push, "random: winner push");
        chk(winner_id == (cfg_min_first ? block_last_id : block_first_id), "random: circulated ID");
        chk(slot_load_en == ((m_st == ST_LOAD && load_valid) ? (32'd1 << load_slot) : 32'd0),
            "random: slot load enable");
        chk(block_valid == m_bv, "random: block_valid");
        chk(now == 16'(m_now) && decisions == 32'(m_dec) && stall_cycles == 32'(m_stall),
            "random: time, decision and stall counters");
        if (e_upd) n_upd++;
        if (e_upd && cfg_min_first) n_min++;
        if (e_push && !e_upd) n_byp++;
        if (m_st == ST_UPDATE && win_full) n_stall++;
        if (e_upd && stop) n_stop++;
        // model: next state at the clock edge
        m_bv = (m_st == ST_SCHEDULE) && (m_k == LOGN - 1);
        if (e_push) begin m_now = (m_now + 1) & 16'hFFFF; m_dec++; end
        if (m_st == ST_UPDATE && win_full) m_stall++;
        case (m_st)
          ST_LOAD:     if (start) begin m_st = ST_SCHEDULE; m_k = 0; end
          ST_SCHEDULE: if (m_k == LOGN - 1) m_st = cfg_update_en ? ST_UPDATE : ST_LOAD;
                       else m_k++;
          default:     if (!win_full) begin m_st = stop ? ST_LOAD : ST_SCHEDULE; m_k = 0; end
        endcase
        @(negedge clk);
      end
      $display("random phase: updates=%0d min_first=%0d bypass=%0d stall_cycles=%0d stops=%0d",
               n_upd, n_min, n_byp, n_stall, n_stop);
      chk(n_upd > 0 && n_min > 0 && n_byp > 0 && n_stall > 0 && n_stop > 0,
          "random phase exercised update, min-first, bypass, stall and stop");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
