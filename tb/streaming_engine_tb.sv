// streaming_engine_tb -- self-checking test of the push/pull streaming engine.
//
// The card SRAM is the behavioural card_sram_model; the partitions are
// modelled as SystemVerilog queues of capacity 4 that a random consumer
// drains, so partitions are often full. The host pushes random arrival times
// while pull transfers of random length move batches from the SRAM into
// random partitions. Checked: a push reaches the partition write port in the
// same cycle; every pulled word arrives, in order, in the programmed
// partition; no pulled word is written into a full partition; sram_own is
// high exactly while a pull is busy; pull_done follows the last word; a
// zero-length pull completes at once. It fails if pushes never collided with
// a pending pulled word or a pull never waited for a full partition.
module streaming_engine_tb;
  import ss_pkg::*;

  localparam int N = 32, AW = 22, CAP = 4;

  logic clk = 0, rst_n = 0;
  logic push_valid = 0;
  logic [ID_W-1:0] push_slot = '0;
  logic [15:0] push_time = '0;
  logic pull_start = 0;
  logic [AW-1:0] dma_src_addr = '0;
  logic [15:0] dma_count = '0;
  logic [ID_W-1:0] dma_slot = '0;
  logic pull_busy, pull_done, sram_own, sram_rd_en;
  logic [AW-1:0] sram_addr;
  logic [15:0] sram_rdata;
  logic [N-1:0] part_full;
  logic part_wr_en, part_wr_pulled;
  logic [ID_W-1:0] part_wr_slot;
  logic [15:0] part_wr_time;
  logic host_wr_en = 0;
  logic [AW-1:0] host_addr = '0;
  logic [15:0] host_wdata = '0;

  streaming_engine #(.N(N), .ADDR_W(AW)) dut (
    .clk, .rst_n, .push_valid, .push_slot, .push_time, .pull_start, .dma_src_addr,
    .dma_count, .dma_slot, .pull_busy, .pull_done, .sram_own, .sram_rd_en, .sram_addr,
    .sram_rdata, .part_full, .part_wr_en, .part_wr_slot, .part_wr_time, .part_wr_pulled
  );

  card_sram_model #(.ADDR_W(AW), .DEPTH(1024)) u_sram (
    .clk, .host_wr_en, .host_addr, .host_wdata, .fpga_own(sram_own),
    .rd_en(sram_rd_en), .rd_addr(sram_addr), .rd_data(sram_rdata)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_collide = 0, n_fullwait = 0, n_pulls = 0, n_words = 0;
  int fill [N];
  logic [15:0] expected [$];
  int exp_slot;
  bit drain_now;

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL @%0t: %s", $time, msg); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always_comb for (int s = 0; s < N; s++) part_full[s] = (fill[s] >= CAP);

  // Monitor: before each edge.
  always @(posedge clk) begin
    if (rst_n) begin
      chk(sram_own == pull_busy, "bank owned exactly while pulling");
      if (push_valid) begin
        chk(part_wr_en && part_wr_slot == push_slot && part_wr_time == push_time && !part_wr_pulled,
            "push passes straight to the partition port");
        if (dut.pstate == 2'd3) n_collide++;
      end
      if (pull_busy && part_full[dma_slot] && dut.pstate == 2'd1) n_fullwait++;
      if (part_wr_pulled) begin
        chk(!part_full[part_wr_slot], "pulled word not written into a full partition");
        chk(part_wr_slot == ID_W'(exp_slot), "pulled word goes to the programmed partition");
        chk(expected.size() > 0 && part_wr_time == expected[0], "pulled word in order");
        if (expected.size() > 0) void'(expected.pop_front());
        n_words++;
      end
      if (part_wr_en && fill[part_wr_slot] < CAP) fill[part_wr_slot]++;
      if (drain_now) for (int s = 0; s < N; s++) if (fill[s] > 0 && $urandom_range(0, 1)) fill[s]--;
    end
  end

  // random host pushes and partition drains
  always @(negedge clk) begin
    push_valid <= rst_n && ($urandom_range(0, 9) < 3);
    push_slot  <= ID_W'($urandom_range(0, N - 1));
    push_time  <= 16'($urandom);
    drain_now  = ($urandom_range(0, 9) < 2);
  end

  initial begin
    for (int s = 0; s < N; s++) fill[s] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 150; t++) begin
      int len, base;
      len  = $urandom_range(0, 12);
      base = $urandom_range(0, 1000);
      // host fills the SRAM batch while it owns the bank
      for (int i = 0; i < len; i++) begin
        @(negedge clk);
        host_wr_en = 1; host_addr = AW'(base + i); host_wdata = 16'($urandom);
        expected.push_back(host_wdata);
      end
      @(negedge clk);
      host_wr_en = 0;
      exp_slot = (t % 3 == 0) ? 2 : $urandom_range(0, N - 1);
      dma_src_addr = AW'(base); dma_count = 16'(len); dma_slot = ID_W'(exp_slot);
      pull_start = 1;
      @(negedge clk);
      pull_start = 0;
      n_pulls++;
      while (!pull_done) @(negedge clk);
      chk(expected.size() == 0, "all pulled words delivered before pull_done");
      @(negedge clk);
      chk(!pull_busy && !sram_own, "bank released after the pull");
      expected.delete();
    end
    $display("pulls=%0d words=%0d push_collisions=%0d full_waits=%0d", n_pulls, n_words, n_collide, n_fullwait);
    chk(n_collide > 0, "a push collided with a pending pulled word");
    chk(n_fullwait > 0, "a pull waited for a full partition");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
