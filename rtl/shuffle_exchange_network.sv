// shuffle_exchange_network -- recirculating single-stage shuffle-exchange
// network of N/2 Decision blocks that orders N stream-slots in log2(N) cycles.
//
// Each cycle the N attribute buses pass through a perfect shuffle (the bus at
// position p moves to position rotate_left(p)) and Decision block k compares
// the buses now at positions 2k and 2k+1. Its winner is registered at
// position 2k and its loser at 2k+1. In the first cycle of a decision the
// input muxes (`sel_regs` = 1) take the buses of the Register Base blocks;
// in the following cycles they take the registered outputs, so the same N/2
// Decision blocks are reused for every level of what would otherwise be a
// tree. After log2(N) cycles with `advance` high:
//   block[0]   holds the highest-priority stream (the winner),
//   block[N-1] holds the lowest-priority stream,
// and the positions in between hold the other streams, partially ordered
// (a stream that won in the last cycle is ahead of the one it beat). Every
// stream appears exactly once. Each compare-exchange sets one bit of the
// winner's position to 0 and the shuffle rotates the bits, so after log2(N)
// compares every bit of the winner's position is 0; the loser of the final
// compares mirrors this and ends at N-1.
//
// The network, the N/2 Decision blocks, the muxes and the log2(N) cycle count
// follow the architecture. Which output port feeds which position is this
// implementation's choice, as is registering all N outputs in this module.
//
// Timing: one compare level per clock; `block` changes on the clock edge at
// which `advance` is high.
module shuffle_exchange_network
  import ss_pkg::*;
#(
  parameter int unsigned N = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         advance,      // perform one compare level
  input  logic         sel_regs,     // 1: mux selects Register Base block buses
  input  stream_attr_t slot_attr [N],
  output stream_attr_t block     [N]
);

  localparam int unsigned LOGN = $clog2(N);

  stream_attr_t src      [N];
  stream_attr_t shuffled [N];
  stream_attr_t nxt      [N];

  // Input muxes (CTRL from the control unit).
  always_comb begin
    for (int p = 0; p < N; p++) src[p] = sel_regs ? slot_attr[p] : block[p];
  end

  // Perfect shuffle: position p -> rotate_left(p).
  always_comb begin
    for (int p = 0; p < N; p++) begin
      logic [LOGN-1:0] pos;
      logic [LOGN-1:0] rot;
      pos = LOGN'(p);
      rot = {pos[LOGN-2:0], pos[LOGN-1]};
      shuffled[rot] = src[p];
    end
  end

  for (genvar k = 0; k < N / 2; k++) begin : g_db
    logic a_wins;
    decision_block u_db (
      .a      (shuffled[2*k]),
      .b      (shuffled[2*k+1]),
      .winner (nxt[2*k]),
      .loser  (nxt[2*k+1]),
      .a_wins (a_wins)
    );
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int p = 0; p < N; p++) block[p] <= '0;
    end else if (advance) begin
      for (int p = 0; p < N; p++) block[p] <= nxt[p];
    end
  end

  initial begin
    assert (N >= 4 && (1 << LOGN) == N)
      else $fatal(1, "shuffle_exchange_network: N must be a power of two, at least 4");
  end

endmodule
