// shuffle_exchange_network_tb -- self-checking test of the recirculating
// shuffle-exchange network, at N = 32 (the default) and N = 4.
//
// For each of many random sets of stream attributes (small value ranges so
// that ties are frequent) the test applies one cycle with the muxes on the
// Register Base block buses and log2(N)-1 recirculating cycles, then checks:
//   * the block is a permutation of the inputs,
//   * block[0] precedes every other stream and block[N-1] follows every other
//     stream (ss_ref_pkg::ref_precedes),
//   * the block equals a cycle-by-cycle model of shuffle + compare-exchange,
//   * the result is ready after exactly log2(N) cycles, and holds while
//     `advance` is low.
module shuffle_exchange_network_tb;
  import ss_pkg::*;
  import ss_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- N = 32 -----------------------------------------------------------
  logic advance32 = 0, sel32 = 0;
  stream_attr_t in32 [32];
  stream_attr_t out32 [32];
  shuffle_exchange_network dut32 (
    .clk, .rst_n, .advance(advance32), .sel_regs(sel32), .slot_attr(in32), .block(out32)
  );

  // ---- N = 4 ------------------------------------------------------------
  logic advance4 = 0, sel4 = 0;
  stream_attr_t in4 [4];
  stream_attr_t out4 [4];
  shuffle_exchange_network #(.N(4)) dut4 (
    .clk, .rst_n, .advance(advance4), .sel_regs(sel4), .slot_attr(in4), .block(out4)
  );

  function automatic stream_attr_t rnd_attr(int id);
    stream_attr_t a;
    a.deadline = 16'($urandom_range(100, 104));
    a.loss_num = 8'($urandom_range(0, 2));
    a.loss_den = 8'($urandom_range(1, 3));
    a.arrival  = 16'($urandom_range(0, 3));
    a.id       = 5'(id);
    return a;
  endfunction

  // Model: shuffle (p -> rotate_left(p)) then compare-exchange each pair.
  function automatic void model_level(ref stream_attr_t v [$], input int logn);
    stream_attr_t s [$];
    int n = v.size();
    s = v;
    for (int p = 0; p < n; p++) begin
      int rot = ((p << 1) | (p >> (logn - 1))) & (n - 1);
      s[rot] = v[p];
    end
    for (int k = 0; k < n / 2; k++) begin
      if (ref_precedes(s[2*k], s[2*k+1])) begin
        v[2*k] = s[2*k]; v[2*k+1] = s[2*k+1];
      end else begin
        v[2*k] = s[2*k+1]; v[2*k+1] = s[2*k];
      end
    end
  endfunction

  task automatic check_block(stream_attr_t inp [$], stream_attr_t outp [$], int logn, string tag);
    stream_attr_t model [$];
    bit seen [32];
    bit ok;
    int n = inp.size();
    // permutation
    ok = 1;
    for (int i = 0; i < 32; i++) seen[i] = 0;
    for (int p = 0; p < n; p++) begin
      if (outp[p] !== inp[outp[p].id]) ok = 0;
      else seen[outp[p].id] = 1;
    end
    for (int i = 0; i < n; i++) if (!seen[i]) ok = 0;
    checks++;
    if (!ok) begin failures++; $display("FAIL %s: block is not a permutation", tag); end
    // max first, min last
    ok = 1;
    for (int p = 1; p < n; p++) if (!ref_precedes(outp[0], outp[p])) ok = 0;
    for (int p = 0; p < n - 1; p++) if (!ref_precedes(outp[p], outp[n-1])) ok = 0;
    checks++;
    if (!ok) begin failures++; $display("FAIL %s: winner/last position wrong", tag); end
    // exact model
    model = inp;
    for (int l = 0; l < logn; l++) model_level(model, logn);
    ok = 1;
    for (int p = 0; p < n; p++) if (outp[p] !== model[p]) ok = 0;
    checks++;
    if (!ok) begin failures++; $display("FAIL %s: block differs from network model", tag); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int trial = 0; trial < 400; trial++) begin
      stream_attr_t i32q [$], o32q [$], i4q [$], o4q [$];
      int cyc;
      for (int s = 0; s < 32; s++) in32[s] = rnd_attr(s);
      for (int s = 0; s < 4; s++)  in4[s]  = rnd_attr(s);
      // N = 32: 5 cycles, N = 4: 2 cycles, started together.
      cyc = 0;
      advance32 <= 1; sel32 <= 1; advance4 <= 1; sel4 <= 1;
      @(posedge clk); cyc++;
      sel32 <= 0; sel4 <= 0;
      @(posedge clk); cyc++;
      advance4 <= 0;
      #1;
      i4q.delete(); o4q.delete();
      for (int s = 0; s < 4; s++) begin i4q.push_back(in4[s]); o4q.push_back(out4[s]); end
      checks++;
      if (cyc != 2) begin failures++; $display("FAIL N=4 cycle count %0d", cyc); end
      check_block(i4q, o4q, 2, "N=4");
      repeat (3) @(posedge clk); cyc += 3;
      advance32 <= 0;
      // N = 4 block must hold while advance is low.
      #1;
      for (int s = 0; s < 4; s++) begin
        checks++;
        if (out4[s] !== o4q[s]) begin failures++; $display("FAIL N=4 block did not hold"); end
      end
      i32q.delete(); o32q.delete();
      for (int s = 0; s < 32; s++) begin i32q.push_back(in32[s]); o32q.push_back(out32[s]); end
      checks++;
      if (cyc != 5) begin failures++; $display("FAIL N=32 cycle count %0d", cyc); end
      check_block(i32q, o32q, 5, "N=32");
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
