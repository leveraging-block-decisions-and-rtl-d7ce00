// sharestreams_top -- ShareStreams packet-scheduler hardware unit.
//
// N stream-slots (Register Base blocks) hold the service state of N streams.
// Each decision, the recirculating shuffle-exchange network of N/2 Decision
// blocks orders the slots in log2(N) cycles, producing a block: the stream
// IDs from highest to lowest priority (position 0 is the winner, position N-1
// the lowest-priority stream, the rest partially ordered). In DWCS mode the
// Control and Steering Logic then spends one PRIORITY_UPDATE cycle
// circulating the winner ID (max-first) or the last ID of the block
// (min-first) to every slot, which adjusts its deadline and window-constraint
// according to whether it won, met or missed its deadline. The winner's next
// packet arrival time is taken from its partition of the memory interface
// and a {time, stream ID} record is written to the winner partition, where
// the packet transmitter reads it. A push/pull streaming engine keeps the
// arrival partitions filled, from single pushed words or from batches it
// pulls out of the card SRAM.
//
// Ports:
//   load_*        write a stream-slot's configuration while in LOAD
//   start/stop    leave LOAD / return to it after the current decision
//   cfg_update_en 1: DWCS (priority update each decision);
//                 0: tags fixed (priority-class, fair-queuing), update bypassed
//   cfg_min_first circulate the lowest-priority stream instead of the highest
//   cfg_block_serve the whole block is sent each decision: every stream-slot
//                 is updated as served, none counts a miss
//   arr_wr_*      push a packet arrival time into a stream's partition
//   pull_start, dma_*  bulk-transfer a batch of arrival times from the card
//                 SRAM (sram_* port, owned by the scheduler while sram_own)
//   win_rd_*      read scheduled {time, stream ID} records
//   block_*       the full ordered block, valid for one cycle per decision
//   missed_count  per-slot missed-deadline performance counters
//
// The block structure, field widths, state sequence and cycle counts follow
// the architecture; the default of 32 stream-slots is the largest size it
// describes (5-bit stream IDs). Queue depths, the time base (one unit per
// decision) and the handshakes are this design's choices.
//
// Timing: a DWCS decision takes log2(N)+1 clock cycles (6 at N = 32, 3 at
// N = 4); a bypass-mode decision takes log2(N) cycles plus the LOAD cycles.
module sharestreams_top
  import ss_pkg::*;
#(
  parameter int unsigned N        = 32,
  parameter int unsigned AQ_DEPTH = 16,
  parameter int unsigned WQ_DEPTH = 64,
  parameter int unsigned CNT_W    = 16,
  parameter int unsigned ADDR_W   = 22
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // command and configuration
  input  logic                      start,
  input  logic                      stop,
  input  logic                      cfg_update_en,
  input  logic                      cfg_min_first,
  input  logic                      cfg_block_serve,
  // LOAD port
  input  logic                      load_valid,
  input  logic [ID_W-1:0]           load_slot,
  input  stream_cfg_t               load_cfg,
  // packet arrival times pushed by the producer
  input  logic                      arr_wr_en,
  input  logic [ID_W-1:0]           arr_wr_slot,
  input  logic [ARRIVAL_W-1:0]      arr_wr_time,
  output logic                      arr_overflow,
  output logic [N-1:0]              arr_empty,
  // bulk (pull) transfers from the card SRAM
  input  logic                      pull_start,
  input  logic [ADDR_W-1:0]         dma_src_addr,
  input  logic [15:0]               dma_count,
  input  logic [ID_W-1:0]           dma_slot,
  output logic                      pull_busy,
  output logic                      pull_done,
  output logic                      sram_own,
  output logic                      sram_rd_en,
  output logic [ADDR_W-1:0]         sram_addr,
  input  logic [ARRIVAL_W-1:0]      sram_rdata,
  // scheduled winners to the consumer
  input  logic                      win_rd_en,
  output logic                      win_empty,
  output logic [DEADLINE_W-1:0]     win_rd_stamp,
  output logic [ID_W-1:0]           win_rd_id,
  output logic [$clog2(WQ_DEPTH):0] win_count,
  output logic                      win_overflow,
  // block output and status
  output logic                      block_valid,
  output logic [ID_W-1:0]           block_ids    [N],
  output logic [CNT_W-1:0]          missed_count [N],
  output ctrl_state_t               state,
  output logic [DEADLINE_W-1:0]     now,
  output logic [31:0]               decisions,
  output logic [31:0]               stall_cycles
);

  stream_attr_t    slot_attr [N];
  stream_attr_t    block     [N];
  logic [N-1:0]    slot_load_en;
  logic            net_advance, net_sel_regs;
  logic            update_en;
  logic [ID_W-1:0] winner_id;
  logic            arr_pop, win_push, win_full;
  logic            arrival_valid;
  logic [ARRIVAL_W-1:0] arrival_next;
  logic [N-1:0]    arr_full;
  logic            part_wr_en, part_wr_pulled;
  logic [ID_W-1:0] part_wr_slot;
  logic [ARRIVAL_W-1:0] part_wr_time;

  streaming_engine #(.N(N), .ADDR_W(ADDR_W)) u_stream (
    .clk            (clk),
    .rst_n          (rst_n),
    .push_valid     (arr_wr_en),
    .push_slot      (arr_wr_slot),
    .push_time      (arr_wr_time),
    .pull_start     (pull_start),
    .dma_src_addr   (dma_src_addr),
    .dma_count      (dma_count),
    .dma_slot       (dma_slot),
    .pull_busy      (pull_busy),
    .pull_done      (pull_done),
    .sram_own       (sram_own),
    .sram_rd_en     (sram_rd_en),
    .sram_addr      (sram_addr),
    .sram_rdata     (sram_rdata),
    .part_full      (arr_full),
    .part_wr_en     (part_wr_en),
    .part_wr_slot   (part_wr_slot),
    .part_wr_time   (part_wr_time),
    .part_wr_pulled (part_wr_pulled)
  );

  control_steering #(.N(N)) u_ctrl (
    .clk            (clk),
    .rst_n          (rst_n),
    .start          (start),
    .stop           (stop),
    .cfg_update_en  (cfg_update_en),
    .cfg_min_first  (cfg_min_first),
    .load_valid     (load_valid),
    .load_slot      (load_slot),
    .slot_load_en   (slot_load_en),
    .net_advance    (net_advance),
    .net_sel_regs   (net_sel_regs),
    .block_first_id (block[0].id),
    .block_last_id  (block[N-1].id),
    .update_en      (update_en),
    .winner_id      (winner_id),
    .now            (now),
    .arr_pop        (arr_pop),
    .win_push       (win_push),
    .win_full       (win_full),
    .state          (state),
    .block_valid    (block_valid),
    .decisions      (decisions),
    .stall_cycles   (stall_cycles)
  );

  for (genvar s = 0; s < N; s++) begin : g_slot
    logic is_winner, missed;
    register_base_block #(.SLOT_ID(s), .CNT_W(CNT_W)) u_rbb (
      .clk           (clk),
      .rst_n         (rst_n),
      .load_en       (slot_load_en[s]),
      .load_cfg      (load_cfg),
      .update_en     (update_en),
      .winner_id     (winner_id),
      .serve_all     (cfg_block_serve),
      .now           (now),
      .arrival_valid (arrival_valid),
      .arrival_next  (arrival_next),
      .attr          (slot_attr[s]),
      .missed_count  (missed_count[s]),
      .is_winner     (is_winner),
      .missed        (missed)
    );
  end

  shuffle_exchange_network #(.N(N)) u_net (
    .clk       (clk),
    .rst_n     (rst_n),
    .advance   (net_advance),
    .sel_regs  (net_sel_regs),
    .slot_attr (slot_attr),
    .block     (block)
  );

  always_comb begin
    for (int p = 0; p < N; p++) block_ids[p] = block[p].id;
  end

  memory_interface #(.N(N), .AQ_DEPTH(AQ_DEPTH), .WQ_DEPTH(WQ_DEPTH)) u_mem (
    .clk                 (clk),
    .rst_n               (rst_n),
    .arr_wr_en           (part_wr_en),
    .arr_wr_slot         (part_wr_slot),
    .arr_wr_time         (part_wr_time),
    .arr_overflow        (arr_overflow),
    .arr_empty           (arr_empty),
    .arr_full            (arr_full),
    .sched_slot          (winner_id),
    .sched_pop           (arr_pop),
    .sched_arrival_valid (arrival_valid),
    .sched_arrival       (arrival_next),
    .sched_win_push      (win_push),
    .sched_win_stamp     (now),
    .sched_win_id        (winner_id),
    .win_full            (win_full),
    .win_overflow        (win_overflow),
    .win_rd_en           (win_rd_en),
    .win_empty           (win_empty),
    .win_rd_stamp        (win_rd_stamp),
    .win_rd_id           (win_rd_id),
    .win_count           (win_count)
  );

endmodule
