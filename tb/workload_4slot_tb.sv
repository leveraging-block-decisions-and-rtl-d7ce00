// workload_4slot_tb -- the scheduler with four stream-slots, one stream per
// slot, running the evaluation workloads of the architecture.
//
// 1. Deadline-constrained streams, EDF operation (window-constraints zero):
//    every stream is requested every decision (T = 1) and the four streams
//    start with deadlines one time unit apart. 16000 decisions per run.
//    a) Max-finding use, max-first: one frame per decision, so each stream
//       wins about a quarter of the decisions and the other three streams
//       miss their deadlines; every stream must record misses.
//    b) Block use, max-first (cfg_block_serve): the whole ordered block of
//       four streams is sent per decision, so 16000 decisions carry 64000
//       frames and no stream may miss a deadline.
//    c) Min-first circulation without block service: missed-deadline
//       counts are reported only.
//    Checked as well: every block holds all four streams, and each decision
//    costs log2(4)+1 = 3 cycles.
// 2. Fair bandwidth allocation 1:1:2:4: request periods 8, 8, 4 and 2 with
//    zero window-constraints. Over 8000 decisions the streams must be served
//    1000, 1000, 2000 and 4000 times (within one frame).
// Deadlines and arrival times are loaded relative to the scheduler's current
// time, and the missed-deadline counters restart at each load.
module workload_4slot_tb;
  import ss_pkg::*;

  localparam int N = 4;

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
  logic win_rd_en = 1;
  logic [15:0] win_rd_stamp, now;
  logic [ID_W-1:0] win_rd_id;
  logic [6:0] win_count;
  logic [ID_W-1:0] block_ids [N];
  logic [15:0] missed_count [N];
  ctrl_state_t state;
  logic [31:0] decisions, stall_cycles;

  sharestreams_top #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int wins [N];
  int blocks = 0, block_frames = 0, cycles = 0;

  initial begin
    repeat (800000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge clk) begin
    if (rst_n && state != ST_LOAD) cycles++;
    if (rst_n && block_valid) begin
      bit seen [N];
      bit ok;
      ok = 1;
      for (int s = 0; s < N; s++) seen[s] = 0;
      for (int p = 0; p < N; p++) if (block_ids[p] < N) seen[block_ids[p]] = 1;
      for (int s = 0; s < N; s++) if (!seen[s]) ok = 0;
      if (!ok) chk(0, "block does not hold all four streams");
      blocks++;
      block_frames += N;
      wins[block_ids[0]]++;
    end
  end

  task automatic run(int periods [N], int first_deadline [N], int ndec);
    for (int s = 0; s < N; s++) wins[s] = 0;
    blocks = 0; block_frames = 0; cycles = 0;
    for (int s = 0; s < N; s++) begin
      @(negedge clk);
      load_valid = 1; load_slot = ID_W'(s);
      load_cfg = '{deadline: 16'(first_deadline[s]) + now, period: 16'(periods[s]),
                   loss_num: 8'd0, loss_den: 8'd1, arrival: now + 16'(s)};
    end
    @(negedge clk);
    load_valid = 0;
    start = 1; @(negedge clk); start = 0;
    while (blocks < ndec - 1) @(negedge clk);
    stop = 1;
    while (state != ST_LOAD) @(negedge clk);
    stop = 0;
    @(negedge clk);
  endtask

  initial begin
    int p1 [N] = '{1, 1, 1, 1};
    int d1 [N] = '{1, 2, 3, 4};
    int p2 [N] = '{8, 8, 4, 2};
    int d2 [N] = '{8, 8, 4, 2};
    repeat (3) @(negedge clk);
    rst_n = 1;

    // ---- workload 1: EDF, T = 1, deadlines one unit apart --------------
    // a) max-finding
    run(p1, d1, 16000);
    $display("EDF T=1, max-finding: decisions=%0d cycles=%0d wins=%0d/%0d/%0d/%0d", blocks, cycles, wins[0], wins[1], wins[2], wins[3]);
    $display("  missed deadlines: %0d %0d %0d %0d", missed_count[0], missed_count[1],
             missed_count[2], missed_count[3]);
    chk(blocks == 16000, "16000 decisions");
    chk(cycles == 3 * blocks, "3 cycles per decision at four stream-slots");
    for (int s = 0; s < N; s++) chk(wins[s] >= 3996 && wins[s] <= 4004, "each stream wins a quarter of the decisions");
    for (int s = 0; s < N; s++) chk(missed_count[s] > 16'd10000, "max-finding: losers miss their deadlines");
    // b) block service, max-first
    cfg_block_serve = 1;
    run(p1, d1, 16000);
    cfg_block_serve = 0;
    $display("EDF T=1, block max-first: decisions=%0d frames=%0d wins=%0d/%0d/%0d/%0d", blocks, block_frames, wins[0], wins[1], wins[2], wins[3]);
    $display("  missed deadlines: %0d %0d %0d %0d", missed_count[0], missed_count[1],
             missed_count[2], missed_count[3]);
    chk(block_frames == 64000, "block use carries 64000 frames in 16000 decisions");
    chk(cycles == 3 * blocks, "3 cycles per decision with block service");
    for (int s = 0; s < N; s++) chk(missed_count[s] == 16'd0, "block max-first: no missed deadlines");
    // c) min-first circulation
    cfg_min_first = 1;
    run(p1, d1, 16000);
    cfg_min_first = 0;
    $display("EDF T=1, min-first: decisions=%0d wins(block[0])=%0d/%0d/%0d/%0d", blocks, wins[0], wins[1], wins[2], wins[3]);
    $display("  missed deadlines: %0d %0d %0d %0d", missed_count[0], missed_count[1],
             missed_count[2], missed_count[3]);
    chk(blocks == 16000, "16000 min-first decisions");

    // ---- workload 2: 1:1:2:4 bandwidth ------------------------------------
    run(p2, d2, 8000);
    $display("1:1:2:4: decisions=%0d wins=%0d/%0d/%0d/%0d", blocks, wins[0], wins[1], wins[2], wins[3]);
    chk(wins[0] >= 999 && wins[0] <= 1001, "stream 1 share 1/8");
    chk(wins[1] >= 999 && wins[1] <= 1001, "stream 2 share 1/8");
    chk(wins[2] >= 1999 && wins[2] <= 2001, "stream 3 share 2/8");
    chk(wins[3] >= 3999 && wins[3] <= 4001, "stream 4 share 4/8");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
