// circ_queue_tb -- self-checking test of the circular buffer.
//
// A 4-deep, 16-bit queue is driven with random concurrent writes and reads
// (bursts biased towards filling and towards draining) and checked every
// cycle against a SystemVerilog queue: head data, empty, full, count and the
// overflow pulse on a write into a full queue. It fails if the queue was
// never filled, never overflowed, or never written and read in one cycle
// while full.
module circ_queue_tb;

  logic clk = 0, rst_n = 0;
  logic wr_en = 0, rd_en = 0;
  logic [15:0] wr_data = '0, rd_data;
  logic empty, full, overflow;
  logic [2:0] count;

  int checks = 0, failures = 0;
  int n_full = 0, n_ovf = 0, n_rw_full = 0;
  logic [15:0] model [$];
  bit exp_ovf = 0;

  circ_queue #(.WIDTH(16), .DEPTH(4)) dut (
    .clk, .rst_n, .wr_en, .wr_data, .rd_en, .rd_data, .empty, .full, .count, .overflow
  );

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < 20000; i++) begin
      bit w, r;
      int bias;
      logic [15:0] d;
      bias = (i / 200) % 2;
      w = ($urandom_range(0, 9) < (bias ? 8 : 3));
      r = ($urandom_range(0, 9) < (bias ? 3 : 8));
      d = 16'($urandom);
      wr_en <= w; rd_en <= r; wr_data <= d;
      // expected effect of this cycle
      if (w && r && model.size() == 4) n_rw_full++;
      exp_ovf = w && model.size() == 4 && !(r && model.size() > 0);
      if (exp_ovf) n_ovf++;
      if (r && model.size() > 0) void'(model.pop_front());
      if (w && !exp_ovf) model.push_back(d);
      @(posedge clk);
      #1;
      checks++;
      if (empty !== (model.size() == 0) || full !== (model.size() == 4) ||
          count !== 3'(model.size()) || overflow !== exp_ovf ||
          (model.size() > 0 && rd_data !== model[0])) begin
        failures++;
        if (failures < 10)
          $display("FAIL cycle %0d: empty=%0d full=%0d count=%0d ovf=%0d head=%h model size=%0d head=%h",
                   i, empty, full, count, overflow, rd_data, model.size(),
                   model.size() ? model[0] : 16'h0);
      end
      if (full) n_full++;
    end
    checks++;
    if (n_full == 0 || n_ovf == 0 || n_rw_full == 0) begin
      failures++;
      $display("FAIL: full=%0d overflow=%0d rw-when-full=%0d", n_full, n_ovf, n_rw_full);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
