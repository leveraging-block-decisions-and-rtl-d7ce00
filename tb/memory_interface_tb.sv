// memory_interface_tb -- self-checking test of the banked scheduler memory.
//
// At the default 32 partitions (arrival queues 16 deep) and with a 4-deep
// winner partition, the test issues random, concurrent producer writes,
// scheduler reads of a random partition, winner-record writes and consumer
// reads, and compares every cycle with per-partition SystemVerilog queues:
// the head seen by the scheduler, the empty vector, the winner record at the
// head, win_full and both overflow flags. It fails if no partition ever
// overflowed or the winner partition never filled.
module memory_interface_tb;
  import ss_pkg::*;

  localparam int N = 32, AQ = 16, WQ = 4;

  logic clk = 0, rst_n = 0;
  logic arr_wr_en = 0, sched_pop = 0, sched_win_push = 0, win_rd_en = 0;
  logic [ID_W-1:0] arr_wr_slot = '0, sched_slot = '0, sched_win_id = '0;
  logic [15:0] arr_wr_time = '0, sched_win_stamp = '0;
  logic arr_overflow, sched_arrival_valid, win_full, win_overflow, win_empty;
  logic [N-1:0] arr_empty, arr_full;
  logic [15:0] sched_arrival, win_rd_stamp;
  logic [ID_W-1:0] win_rd_id;
  logic [2:0] win_count;

  int checks = 0, failures = 0, n_aovf = 0, n_wfull = 0;
  logic [15:0] aq [N][$];
  logic [20:0] wq [$];

  memory_interface #(.N(N), .AQ_DEPTH(AQ), .WQ_DEPTH(WQ)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < 30000; i++) begin
      bit w, p, wp, wr, exp_aovf, exp_wovf;
      int ws, ss;
      logic [15:0] t, st;
      logic [4:0] wid;
      w  = $urandom_range(0, 9) < 6;
      ws = $urandom_range(0, 3);           // mostly a few partitions, so they fill
      if ($urandom_range(0, 3) == 0) ws = $urandom_range(0, N - 1);
      t  = 16'($urandom);
      ss = $urandom_range(0, 3);
      p  = $urandom_range(0, 9) < 3;
      wp = $urandom_range(0, 9) < 5;
      wr = $urandom_range(0, 9) < ((i / 500) % 2 ? 2 : 7);
      st = 16'($urandom); wid = 5'($urandom);
      arr_wr_en <= w; arr_wr_slot <= 5'(ws); arr_wr_time <= t;
      sched_slot <= 5'(ss); sched_pop <= p;
      sched_win_push <= wp; sched_win_stamp <= st; sched_win_id <= wid;
      win_rd_en <= wr;
      #1;
      // combinational scheduler view of the selected partition
      checks++;
      if (sched_arrival_valid !== (aq[ss].size() > 0) ||
          (aq[ss].size() > 0 && sched_arrival !== aq[ss][0])) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d: scheduler head of %0d", i, ss);
      end
      // model update
      if (p && aq[ss].size() > 0) void'(aq[ss].pop_front());
      exp_aovf = w && aq[ws].size() == AQ;
      if (w && !exp_aovf) aq[ws].push_back(t);
      if (exp_aovf) n_aovf++;
      if (wq.size() == WQ) n_wfull++;
      if (wr && wq.size() > 0) void'(wq.pop_front());
      exp_wovf = wp && wq.size() == WQ;
      if (wp && !exp_wovf) wq.push_back({st, wid});
      @(posedge clk);
      #1;
      checks++;
      begin
        bit ok;
        ok = 1;
        for (int s = 0; s < N; s++) if (arr_empty[s] !== (aq[s].size() == 0) || arr_full[s] !== (aq[s].size() == AQ)) ok = 0;
        if (arr_overflow !== exp_aovf || win_overflow !== exp_wovf) ok = 0;
        if (win_empty !== (wq.size() == 0) || win_full !== (wq.size() == WQ)) ok = 0;
        if (win_count !== 3'(wq.size())) ok = 0;
        if (wq.size() > 0 && {win_rd_stamp, win_rd_id} !== wq[0]) ok = 0;
        if (!ok) begin
          failures++;
          if (failures < 10) $display("FAIL cycle %0d: state mismatch", i);
        end
      end
    end
    checks++;
    if (n_aovf == 0 || n_wfull == 0) begin
      failures++;
      $display("FAIL: arrival overflow %0d, winner full %0d", n_aovf, n_wfull);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
