// circ_queue -- circular buffer with separate read and write pointers.
//
// Used for every bank behind the scheduler's memory interface: one queue of
// 16-bit packet arrival times per stream-slot and one queue of 5-bit winner
// stream IDs. The producer side only moves the write pointer and the consumer
// side only moves the read pointer, so both sides work concurrently without
// any other synchronisation, as the architecture requires of its per-stream
// queues.
//
// Interface: a write (wr_en) stores wr_data at the write pointer; a read
// (rd_en) advances the read pointer. rd_data always shows the entry at the
// read pointer (first-word fall-through) and is valid while `empty` is low.
// A write while full is dropped and reported by a one-cycle `overflow` pulse;
// a read while empty is ignored. Reading and writing in the same cycle is
// allowed, also when full (the read frees the entry). The depth, the
// fall-through read and the overflow handling are this design's choices.
//
// Timing: pointers, flags and `count` change on the rising clock edge;
// synchronous active-low reset empties the queue.
module circ_queue #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     wr_en,
  input  logic [WIDTH-1:0]         wr_data,
  input  logic                     rd_en,
  output logic [WIDTH-1:0]         rd_data,
  output logic                     empty,
  output logic                     full,
  output logic [$clog2(DEPTH):0]   count,
  output logic                     overflow
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wr_ptr, rd_ptr;

  assign count   = wr_ptr - rd_ptr;
  assign empty   = (wr_ptr == rd_ptr);
  assign full    = (wr_ptr[AW] != rd_ptr[AW]) && (wr_ptr[AW-1:0] == rd_ptr[AW-1:0]);
  assign rd_data = mem[rd_ptr[AW-1:0]];

  logic do_rd, do_wr;
  assign do_rd = rd_en && !empty;
  assign do_wr = wr_en && (!full || do_rd);

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr   <= '0;
      rd_ptr   <= '0;
      overflow <= 1'b0;
    end else begin
      if (do_wr) wr_ptr <= wr_ptr + 1'b1;
      if (do_rd) rd_ptr <= rd_ptr + 1'b1;
      overflow <= wr_en && !do_wr;
    end
  end

  initial begin
    assert (DEPTH >= 2 && (1 << AW) == DEPTH)
      else $fatal(1, "circ_queue: DEPTH must be a power of two, at least 2");
  end

  // The pointers never drift further apart than the depth.
  always_ff @(posedge clk) begin
    if (rst_n) assert (count <= ($clog2(DEPTH)+1)'(DEPTH))
      else $error("circ_queue: pointer distance exceeds depth");
  end

endmodule
