// register_base_block_tb -- self-checking test of one stream-slot.
//
// The slot (SLOT_ID 5) is loaded with random configurations and then given
// random priority updates in which it wins or loses, with the current time
// placed before, at or after its deadline, and with or without a new arrival
// time on offer. After every clock the attribute bus and the missed-deadline
// counter are compared with ss_ref_pkg::ref_slot_update. The test also counts
// how often each update case (win, window reset, met, missed with x' > 0,
// missed with x' = 0 i.e. tagged, block service of a losing slot) occurred
// and fails if one never did.
module register_base_block_tb;
  import ss_pkg::*;
  import ss_ref_pkg::*;

  localparam int unsigned ID = 5;

  logic clk = 0, rst_n = 0;
  logic load_en = 0, update_en = 0, arrival_valid = 0, serve_all = 0;
  stream_cfg_t load_cfg;
  logic [ID_W-1:0] winner_id = '0;
  logic [DEADLINE_W-1:0] now = '0;
  logic [ARRIVAL_W-1:0] arrival_next = '0;
  stream_attr_t attr;
  logic [15:0] missed_count;
  logic is_winner, missed;

  int checks = 0, failures = 0;
  int n_win = 0, n_reset = 0, n_met = 0, n_miss_x = 0, n_miss_tag = 0, n_block = 0;

  register_base_block #(.SLOT_ID(ID)) dut (
    .clk, .rst_n, .load_en, .load_cfg, .update_en, .winner_id, .serve_all, .now,
    .arrival_valid, .arrival_next, .attr, .missed_count, .is_winner, .missed
  );

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  ref_slot_t m;

  task automatic compare(string what);
    stream_attr_t e;
    e = ref_attr(m, ID);
    checks++;
    if (attr !== e || missed_count !== 16'(m.missed)) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s: attr=%p cnt=%0d expected %p cnt=%0d", what, attr, missed_count, e, m.missed);
    end
  endtask

  initial begin
    load_cfg = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int run = 0; run < 200; run++) begin
      // LOAD
      load_cfg.deadline <= 16'($urandom_range(0, 40));
      load_cfg.period   <= 16'($urandom_range(1, 4));
      load_cfg.loss_num <= 8'($urandom_range(0, 3));
      load_cfg.loss_den <= 8'($urandom_range(1, 6));
      load_cfg.arrival  <= 16'($urandom);
      load_en <= 1;
      @(posedge clk);
      load_en <= 0;
      #1;
      m = ref_load(load_cfg);
      // keep x <= y as a valid window-constraint
      if (load_cfg.loss_num > load_cfg.loss_den) begin
        load_cfg.loss_num <= load_cfg.loss_den;
        load_en <= 1;
        @(posedge clk);
        load_en <= 0;
        #1;
        m = ref_load(load_cfg);
      end
      compare("load");
      for (int u = 0; u < 60; u++) begin
        bit won, av, blk;
        int unsigned t, a;
        ref_slot_t nm;
        won = ($urandom_range(0, 2) == 0);
        blk = ($urandom_range(0, 5) == 0);
        t   = (m.deadline + 16'($urandom_range(0, 6)) - 3) & 16'hFFFF;
        av  = $urandom_range(0, 1);
        a   = $urandom & 16'hFFFF;
        winner_id     <= won ? ID_W'(ID) : ID_W'($urandom_range(0, 4));
        now           <= 16'(t);
        arrival_valid <= av;
        arrival_next  <= 16'(a);
        serve_all     <= blk;
        update_en     <= 1;
        // Block service: every slot is served; only the winner takes a new arrival.
        nm = ref_slot_update(m, won || blk, t, av && won, a);
        if (blk && !won) n_block++;
        if (won || blk) begin
          n_win++;
          if (nm.x == m.x0 && nm.y == m.y0 && (m.x != m.x0 || m.y != m.y0)) n_reset++;
        end else if (tdiff(t, m.deadline) >= 0) begin
          if (m.x > 0) n_miss_x++; else n_miss_tag++;
        end else n_met++;
        @(posedge clk);
        update_en <= 0;
        serve_all <= 0;
        #1;
        m = nm;
        compare("update");
      end
    end
    // Updates without update_en must not change anything.
    winner_id <= ID_W'(ID);
    repeat (3) @(posedge clk);
    #1 compare("idle");

    checks++;
    if (n_win == 0 || n_reset == 0 || n_met == 0 || n_miss_x == 0 || n_miss_tag == 0 ||
        n_block == 0) begin
      failures++;
      $display("FAIL: case not exercised win=%0d reset=%0d met=%0d miss_x=%0d miss_tag=%0d block=%0d",
               n_win, n_reset, n_met, n_miss_x, n_miss_tag, n_block);
    end
    $display("win=%0d reset=%0d met=%0d miss_x=%0d miss_tag=%0d block=%0d",
             n_win, n_reset, n_met, n_miss_x, n_miss_tag, n_block);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
