// streaming_engine -- push/pull data streaming engine that keeps the
// per-stream arrival-time partitions filled.
//
// Arrival times reach the scheduler's partitions in two ways:
//   push  The stream processor writes single arrival times (small
//         transfers); push_valid/push_slot/push_time pass straight to the
//         partition write port in the same cycle.
//   pull  For bulk transfers the stream processor first deposits a batch of
//         arrival times in the card SRAM, programs the DMA registers (source
//         word address, word count, target stream-slot) and raises
//         pull_start. The engine then owns the SRAM bank (sram_own high),
//         reads the words one at a time and appends them to the target
//         partition, and hands the bank back when the count is exhausted
//         (pull_done pulses for one cycle).
// Push writes take priority: a pulled word waits in a one-word holding
// register while a push uses the write port, and the engine does not read
// the next word while the target partition is full, so pulled data is never
// dropped. Push writes into a full partition are dropped by the partition,
// which flags the overflow.
//
// The two transfer kinds, the DMA registers, the pull-start signal and the
// bank-ownership hand-over follow the architecture. The register layout, the
// SRAM read timing (data one cycle after the request), one word in flight
// and the push priority are this design's choices.
module streaming_engine
  import ss_pkg::*;
#(
  parameter int unsigned N      = 32,
  parameter int unsigned ADDR_W = 22
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // push transfers from the stream processor
  input  logic                 push_valid,
  input  logic [ID_W-1:0]      push_slot,
  input  logic [ARRIVAL_W-1:0] push_time,
  // DMA registers and pull start
  input  logic                 pull_start,
  input  logic [ADDR_W-1:0]    dma_src_addr,
  input  logic [15:0]          dma_count,
  input  logic [ID_W-1:0]      dma_slot,
  output logic                 pull_busy,
  output logic                 pull_done,
  // card SRAM bank (FPGA side)
  output logic                 sram_own,
  output logic                 sram_rd_en,
  output logic [ADDR_W-1:0]    sram_addr,
  input  logic [ARRIVAL_W-1:0] sram_rdata,
  // partition write port
  input  logic [N-1:0]         part_full,
  output logic                 part_wr_en,
  output logic [ID_W-1:0]      part_wr_slot,
  output logic [ARRIVAL_W-1:0] part_wr_time,
  output logic                 part_wr_pulled
);

  typedef enum logic [1:0] {
    P_IDLE  = 2'd0,
    P_READ  = 2'd1,   // issue an SRAM read
    P_DATA  = 2'd2,   // SRAM data arrives, captured into the holding register
    P_WRITE = 2'd3    // append the held word to the partition
  } pull_state_t;

  pull_state_t          pstate;
  logic [ADDR_W-1:0]    addr_q;
  logic [15:0]          left_q;
  logic [ID_W-1:0]      slot_q;
  logic [ARRIVAL_W-1:0] hold_q;
  logic                 pull_wr;

  assign pull_busy  = (pstate != P_IDLE);
  assign sram_own   = pull_busy;
  assign sram_rd_en = (pstate == P_READ) && !part_full[slot_q];
  assign sram_addr  = addr_q;
  // A held word is written when no push uses the port and the partition has room.
  assign pull_wr    = (pstate == P_WRITE) && !push_valid && !part_full[slot_q];

  always_comb begin
    part_wr_pulled = 1'b0;
    if (push_valid) begin
      part_wr_en   = 1'b1;
      part_wr_slot = push_slot;
      part_wr_time = push_time;
    end else begin
      part_wr_en     = pull_wr;
      part_wr_slot   = slot_q;
      part_wr_time   = hold_q;
      part_wr_pulled = pull_wr;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pstate    <= P_IDLE;
      addr_q    <= '0;
      left_q    <= '0;
      slot_q    <= '0;
      hold_q    <= '0;
      pull_done <= 1'b0;
    end else begin
      pull_done <= 1'b0;
      unique case (pstate)
        P_IDLE: if (pull_start) begin
          addr_q <= dma_src_addr;
          left_q <= dma_count;
          slot_q <= dma_slot;
          if (dma_count == '0) pull_done <= 1'b1;
          else                 pstate    <= P_READ;
        end
        P_READ: if (sram_rd_en) begin
          addr_q <= addr_q + 1'b1;
          pstate <= P_DATA;
        end
        P_DATA: begin
          hold_q <= sram_rdata;
          pstate <= P_WRITE;
        end
        P_WRITE: if (pull_wr) begin
          left_q <= left_q - 1'b1;
          if (left_q == 16'd1) begin
            pstate    <= P_IDLE;
            pull_done <= 1'b1;
          end else begin
            pstate <= P_READ;
          end
        end
        default: pstate <= P_IDLE;
      endcase
    end
  end

  // A pull never writes a partition that is full.
  always_ff @(posedge clk) begin
    if (rst_n && part_wr_pulled) assert (!part_full[slot_q])
      else $error("streaming_engine: pulled word written into a full partition");
  end

endmodule
