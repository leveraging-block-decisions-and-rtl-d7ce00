// sharestreams_top_tb -- end-to-end test of the scheduler at its default size
// (32 stream-slots, 16-entry arrival partitions, 64-entry winner partition).
// Arrival time stamps advance with simulation time, as real ones do: the
// 16-bit time comparisons are a consistent order only while the live stamps
// lie within half the 16-bit range of each other.
//
// A reference model keeps the state of every stream-slot, every arrival
// partition and the winner partition. Stimulus: random stream
// configurations are loaded, a producer appends random arrival times (biased
// towards a few slots so that partitions overflow) and a consumer drains
// winner records (with a long pause so that the winner partition fills and
// the controller stalls); every few hundred cycles a batch of arrival times
// is placed in the card SRAM model and pulled into a slot by the streaming
// engine. The run covers DWCS scheduling in max-first mode, then min-first
// mode, block service (every slot served each decision), a stop and reload,
// and bypass mode.
//
// Checked against the model: block[0] and block[N-1] at every block_valid
// (the highest- and lowest-priority streams), that the block is a
// permutation, every winner record {time, ID} read by the consumer, the
// missed-deadline counters of all slots, the arrival overflow flag, and the
// decision period of log2(N)+1 cycles. Each mechanism must occur at least
// once: LOAD, DWCS decision, min-first decision, block-service decision,
// bypass decision, stall,
// arrival overflow, missed deadline, window reset, violation tag, and a
// winner whose partition was empty.
module sharestreams_top_tb;
  import ss_pkg::*;
  import ss_ref_pkg::*;

  localparam int N = 32, LOGN = 5, AQ = 16, WQ = 64;

  logic clk = 0, rst_n = 0;
  logic start = 0, stop = 0, cfg_update_en = 1, cfg_min_first = 0, cfg_block_serve = 0;
  logic load_valid = 0;
  logic [ID_W-1:0] load_slot = '0;
  stream_cfg_t load_cfg = '0;
  logic arr_wr_en = 0;
  logic [ID_W-1:0] arr_wr_slot = '0;
  logic [15:0] arr_wr_time = '0;
  logic arr_overflow, win_empty, win_overflow, block_valid;
  logic [N-1:0] arr_empty;
  logic pull_start = 0, pull_busy, pull_done, sram_own, sram_rd_en;
  logic [21:0] dma_src_addr = '0, sram_addr;
  logic [15:0] dma_count = '0, sram_rdata;
  logic [ID_W-1:0] dma_slot = '0;
  logic win_rd_en = 0;
  logic [15:0] win_rd_stamp, now;
  logic [ID_W-1:0] win_rd_id;
  logic [6:0] win_count;
  logic [ID_W-1:0] block_ids [N];
  logic [15:0] missed_count [N];
  ctrl_state_t state;
  logic [31:0] decisions, stall_cycles;

  sharestreams_top dut (.*);

  logic host_wr_en = 0;
  logic [21:0] host_addr = '0;
  logic [15:0] host_wdata = '0;
  card_sram_model u_sram (
    .clk, .host_wr_en, .host_addr, .host_wdata, .fpga_own(sram_own),
    .rd_en(sram_rd_en), .rd_addr(sram_addr), .rd_data(sram_rdata)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_load = 0, n_dwcs = 0, n_minfirst = 0, n_bypass = 0, n_stall = 0, n_aovf = 0;
  int n_pull_words = 0, n_pulls = 0;
  logic [15:0] pull_expect [$];
  bit pulls_on = 1;
  int n_missed = 0, n_reset = 0, n_tag = 0, n_empty_win = 0, n_reads = 0;
  int n_block = 0, n_block_missed = 0;

  ref_slot_t   m [N];
  logic [15:0] aq [N][$];
  logic [20:0] wq [$];
  int unsigned m_now = 0;
  int          last_bv = -1, cycle = 0;
  bit          consumer_on = 1;
  int          producer_pct = 30;
  bit          exp_aovf_q = 0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL cycle %0d: %s", cycle, msg);
    end
  endtask

  function automatic int ref_best(bit lowest);
    int b = 0;
    for (int s = 1; s < N; s++) begin
      if (!lowest && ref_precedes(ref_attr(m[s], s), ref_attr(m[b], b))) b = s;
      if ( lowest && ref_precedes(ref_attr(m[b], b), ref_attr(m[s], s))) b = s;
    end
    return b;
  endfunction

  // ---------------- monitor / model (samples values before each edge) ----
  always @(posedge clk) begin
    if (rst_n) begin
      bit sched_pop;
      int wid;
      cycle++;
      sched_pop = 0;
      wid = 0;
      // block check
      if (block_valid) begin
        bit seen [N];
        bit perm;
        perm = 1;
        for (int s = 0; s < N; s++) seen[s] = 0;
        for (int p = 0; p < N; p++) seen[block_ids[p]] = 1;
        for (int s = 0; s < N; s++) if (!seen[s]) perm = 0;
        chk(perm, "block is a permutation of the slots");
        chk(block_ids[0] == ID_W'(ref_best(0)), "block[0] is the highest-priority stream");
        chk(block_ids[N-1] == ID_W'(ref_best(1)), "block[N-1] is the lowest-priority stream");
        for (int s = 0; s < N; s++)
          chk(missed_count[s] == 16'(m[s].missed), "missed-deadline counter");
        if (cfg_update_en && last_bv >= 0 && stall_cycles == 0)
          chk(cycle - last_bv == LOGN + 1, "DWCS decision period is log2(N)+1 cycles");
        last_bv = cycle;
      end
      // PRIORITY_UPDATE (or the bypass record)
      if (state == ST_UPDATE && win_count == 7'(WQ)) n_stall++;
      if ((state == ST_UPDATE && win_count != 7'(WQ)) ||
          (block_valid && state == ST_LOAD && !cfg_update_en)) begin
        bit upd;
        bit av;
        int unsigned a;
        upd = (state == ST_UPDATE);
        wid = cfg_min_first ? ref_best(1) : ref_best(0);
        if (upd) begin
          av = aq[wid].size() > 0;
          a  = av ? aq[wid][0] : 0;
          if (av) sched_pop = 1; else n_empty_win++;
          for (int s = 0; s < N; s++) begin
            ref_slot_t nm;
            nm = ref_slot_update(m[s], s == wid || cfg_block_serve, m_now, av && s == wid, a);
            if (s != wid && nm.missed != m[s].missed) n_missed++;
            if (cfg_block_serve && nm.missed != m[s].missed) n_block_missed++;
            if (nm.tag && !m[s].tag) n_tag++;
            if (s == wid && nm.x == m[s].x0 && nm.y == m[s].y0 && (m[s].x != m[s].x0 || m[s].y != m[s].y0)) n_reset++;
            m[s] = nm;
          end
          n_dwcs++;
          if (cfg_min_first) n_minfirst++;
          if (cfg_block_serve) n_block++;
        end else n_bypass++;
      end
      // consumer
      if (win_rd_en && !win_empty) begin
        chk(wq.size() > 0 && {win_rd_stamp, win_rd_id} == wq[0], "winner record");
        if (wq.size() > 0) void'(wq.pop_front());
        n_reads++;
      end
      // scheduler side of the memory
      if (sched_pop) void'(aq[wid].pop_front());
      if ((state == ST_UPDATE && win_count != 7'(WQ)) ||
          (block_valid && state == ST_LOAD && !cfg_update_en)) begin
        if (wq.size() < WQ) wq.push_back({16'(m_now), 5'(wid)});
        m_now = (m_now + 1) & 16'hFFFF;
      end
      // producer; the overflow flag follows one cycle later
      chk(arr_overflow == exp_aovf_q, "arrival overflow flag");
      exp_aovf_q = 0;
      if (arr_wr_en) begin
        if (aq[arr_wr_slot].size() < AQ) aq[arr_wr_slot].push_back(arr_wr_time);
        else begin n_aovf++; exp_aovf_q = 1; end
      end else if (dut.part_wr_pulled) begin
        chk(dut.part_wr_slot == dma_slot, "pulled word goes to the programmed partition");
        chk(pull_expect.size() > 0 && dut.part_wr_time == pull_expect[0], "pulled word in order");
        chk(aq[dma_slot].size() < AQ, "pulled word never overflows a partition");
        if (pull_expect.size() > 0) void'(pull_expect.pop_front());
        aq[dma_slot].push_back(dut.part_wr_time);
        n_pull_words++;
      end
      // loads
      if (load_valid && state == ST_LOAD) begin
        m[load_slot] = ref_load(load_cfg);
        n_load++;
      end
    end
  end


  // ---------------- producer and consumer (drive on the falling edge) -----
  always @(negedge clk) begin
    if (rst_n) begin
      arr_wr_en   <= ($urandom_range(0, 99) < producer_pct);
      arr_wr_slot <= ($urandom_range(0, 1)) ? ID_W'($urandom_range(0, 3)) : ID_W'($urandom_range(0, N - 1));
      arr_wr_time <= 16'(cycle / 4 + $urandom_range(0, 3));   // time stamps advance with time
      win_rd_en   <= consumer_on && ($urandom_range(0, 9) < 8);
    end
  end

  function automatic stream_cfg_t rnd_cfg();
    stream_cfg_t c;
    c.deadline = 16'($urandom_range(0, 10));
    c.period   = 16'($urandom_range(4, 40));
    c.loss_den = 8'($urandom_range(1, 5));
    c.loss_num = 8'($urandom_range(0, c.loss_den));
    c.arrival  = 16'($urandom_range(0, 15));
    return c;
  endfunction

  task automatic load_slots(int first, int last);
    for (int s = first; s <= last; s++) begin
      @(negedge clk);
      load_valid = 1; load_slot = ID_W'(s); load_cfg = rnd_cfg();
    end
    @(negedge clk);
    load_valid = 0;
  endtask

  task automatic wait_decisions(int k);
    int target = n_dwcs + n_bypass + k;
    while (n_dwcs + n_bypass < target) @(negedge clk);
  endtask

  // Bulk transfers: every few hundred cycles the host deposits a batch of
  // arrival times in the card SRAM and has the engine pull it into a slot.
  initial begin
    repeat (10) @(negedge clk);
    while (pulls_on) begin
      int len;
      repeat (250) @(negedge clk);
      len = $urandom_range(4, 12);
      for (int i = 0; i < len; i++) begin
        host_wr_en = 1; host_addr = 22'(100 + i);
        host_wdata = 16'(cycle / 4 + i);
        pull_expect.push_back(host_wdata);
        @(negedge clk);
      end
      host_wr_en = 0;
      dma_src_addr = 22'd100; dma_count = 16'(len); dma_slot = ID_W'($urandom_range(0, 7));
      pull_start = 1; @(negedge clk); pull_start = 0;
      n_pulls++;
      while (!pull_done) @(negedge clk);
      chk(pull_expect.size() == 0, "whole batch delivered by pull_done");
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // LOAD every slot.
    load_slots(0, N - 1);
    repeat (40) @(negedge clk);      // let arrivals accumulate
    // DWCS, max-first.
    start = 1; @(negedge clk); start = 0;
    wait_decisions(150);
    consumer_on = 0;                 // winner partition fills, scheduler stalls
    wait_decisions(40);
    repeat (600) @(negedge clk);
    consumer_on = 1;
    wait_decisions(150);
    // Min-first.
    cfg_min_first = 1;
    wait_decisions(60);
    cfg_min_first = 0;
    wait_decisions(20);
    // Block service: the whole block is sent, every slot is served.
    cfg_block_serve = 1;
    wait_decisions(40);
    cfg_block_serve = 0;
    wait_decisions(10);
    // Stop, reload half the slots, run again.
    stop = 1;
    while (state != ST_LOAD) @(negedge clk);
    stop = 0;
    load_slots(0, N / 2 - 1);
    start = 1; @(negedge clk); start = 0;
    wait_decisions(100);
    stop = 1;
    while (state != ST_LOAD) @(negedge clk);
    stop = 0;
    // Bypass: fixed tags, LOAD and SCHEDULE only.
    cfg_update_en = 0;
    for (int d = 0; d < 20; d++) begin
      load_slots(d % N, d % N);
      start = 1; @(negedge clk); start = 0;
      wait_decisions(1);
    end
    // Drain the winner partition.
    producer_pct = 0;
    pulls_on = 0;
    repeat (200) @(negedge clk);
    chk(wq.size() == 0 && win_empty, "winner partition drained");
    chk(decisions == 32'(n_dwcs + n_bypass), "decision counter");

    $display("loads=%0d dwcs=%0d min_first=%0d bypass=%0d stall_cycles=%0d arrival_overflows=%0d",
             n_load, n_dwcs, n_minfirst, n_bypass, n_stall, n_aovf);
    $display("missed_deadlines=%0d window_resets=%0d tags=%0d empty_partition_wins=%0d reads=%0d",
             n_missed, n_reset, n_tag, n_empty_win, n_reads);
    $display("pulls=%0d pulled_words=%0d block_service=%0d", n_pulls, n_pull_words, n_block);
    chk(n_pull_words > 0, "bulk pull transfers happened");
    chk(n_load > 0, "LOAD happened");
    chk(n_dwcs > 0, "DWCS decisions happened");
    chk(n_minfirst > 0, "min-first decisions happened");
    chk(n_bypass > 0, "bypass decisions happened");
    chk(n_block > 0, "block-service decisions happened");
    chk(n_block_missed == 0, "no slot misses a deadline under block service");
    chk(n_stall > 0 && stall_cycles == 32'(n_stall), "stalls happened and were counted");
    chk(n_aovf > 0, "arrival overflow happened");
    chk(n_missed > 0, "missed deadlines happened");
    chk(n_reset > 0, "window reset happened");
    chk(n_tag > 0, "violation tag happened");
    chk(n_empty_win > 0, "winner with empty partition happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
