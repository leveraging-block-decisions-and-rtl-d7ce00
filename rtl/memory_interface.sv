// memory_interface -- banked buffers between the stream producer and the
// scheduler (the "SRAM interface" / "Memory / Interconnect interface").
//
// The memory is split into one partition per stream-slot, holding the 16-bit
// arrival times of that stream's queued packets, and one partition for
// scheduled winners. Each partition is a circ_queue, so the producer (switch
// fabric or stream processor) can deposit arrival times while the scheduler
// reads them, and the scheduler can deposit winners while the consumer reads
// them, all in the same cycle.
//
// Producer port: arr_wr_en/arr_wr_slot/arr_wr_time append an arrival time to
//   the slot's partition; arr_overflow pulses when the partition was full.
//   arr_empty and arr_full give each partition's fill state.
// Scheduler port: sched_slot selects a partition; sched_arrival_valid and
//   sched_arrival show its head entry; sched_pop consumes it. sched_win_push
//   appends a winner record {time stamp, stream ID}; win_full tells the
//   scheduler to hold off.
// Consumer port: win_rd_en pops the oldest winner record shown on
//   win_rd_stamp/win_rd_id while win_empty is low.
//
// The partitioning and the 16-bit arrival / 5-bit ID widths follow the
// architecture; the winner record carries the decision's time stamp as
// well. Partition depths are this design's choice. All state is held in
// on-chip memory arrays; the external card SRAM is not modelled.
module memory_interface
  import ss_pkg::*;
#(
  parameter int unsigned N        = 32,
  parameter int unsigned AQ_DEPTH = 16,
  parameter int unsigned WQ_DEPTH = 64
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // producer
  input  logic                    arr_wr_en,
  input  logic [ID_W-1:0]         arr_wr_slot,
  input  logic [ARRIVAL_W-1:0]    arr_wr_time,
  output logic                    arr_overflow,
  output logic [N-1:0]            arr_empty,
  output logic [N-1:0]            arr_full,
  // scheduler
  input  logic [ID_W-1:0]         sched_slot,
  input  logic                    sched_pop,
  output logic                    sched_arrival_valid,
  output logic [ARRIVAL_W-1:0]    sched_arrival,
  input  logic                    sched_win_push,
  input  logic [DEADLINE_W-1:0]   sched_win_stamp,
  input  logic [ID_W-1:0]         sched_win_id,
  output logic                    win_full,
  output logic                    win_overflow,
  // consumer
  input  logic                    win_rd_en,
  output logic                    win_empty,
  output logic [DEADLINE_W-1:0]   win_rd_stamp,
  output logic [ID_W-1:0]         win_rd_id,
  output logic [$clog2(WQ_DEPTH):0] win_count
);

  logic [ARRIVAL_W-1:0] head [N];
  logic [N-1:0]         ovf;

  for (genvar s = 0; s < N; s++) begin : g_bank
    logic [$clog2(AQ_DEPTH):0] count_unused;
    circ_queue #(.WIDTH(ARRIVAL_W), .DEPTH(AQ_DEPTH)) u_arrq (
      .clk      (clk),
      .rst_n    (rst_n),
      .wr_en    (arr_wr_en && (arr_wr_slot == ID_W'(s))),
      .wr_data  (arr_wr_time),
      .rd_en    (sched_pop && (sched_slot == ID_W'(s))),
      .rd_data  (head[s]),
      .empty    (arr_empty[s]),
      .full     (arr_full[s]),
      .count    (count_unused),
      .overflow (ovf[s])
    );
  end

  assign arr_overflow        = |ovf;
  assign sched_arrival_valid = (32'(sched_slot) < N) && !arr_empty[sched_slot];
  assign sched_arrival       = head[sched_slot];

  circ_queue #(.WIDTH(DEADLINE_W + ID_W), .DEPTH(WQ_DEPTH)) u_winq (
    .clk      (clk),
    .rst_n    (rst_n),
    .wr_en    (sched_win_push),
    .wr_data  ({sched_win_stamp, sched_win_id}),
    .rd_en    (win_rd_en),
    .rd_data  ({win_rd_stamp, win_rd_id}),
    .empty    (win_empty),
    .full     (win_full),
    .count    (win_count),
    .overflow (win_overflow)
  );

endmodule
