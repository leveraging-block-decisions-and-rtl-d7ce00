// ss_pkg -- types and constants shared by the ShareStreams scheduler.
//
// A stream's service attributes travel between the Register Base blocks
// (stream-slots) and the Decision blocks on a 53-bit attribute bus:
//   deadline 16 b, loss numerator 8 b, loss denominator 8 b,
//   arrival time 16 b, register (stream-slot) ID 5 b.
// These field widths are the ones the architecture specifies. The ID field is
// 5 bits wide, which is why a chip holds at most 32 stream-slots.
//
// Each stream-slot also keeps configuration that never reaches the Decision
// blocks: the request period T and the original window-constraint x/y, to
// which the current x'/y' are reset at the end of each window. Their widths
// (request period 16 b as specified, originals 8 b like the current values)
// give the stream_cfg_t load word.
package ss_pkg;

  localparam int unsigned DEADLINE_W = 16;
  localparam int unsigned LOSS_W     = 8;
  localparam int unsigned ARRIVAL_W  = 16;
  localparam int unsigned ID_W       = 5;
  localparam int unsigned PERIOD_W   = 16;

  // Attribute bus between Register Base blocks and Decision blocks (53 bits).
  typedef struct packed {
    logic [DEADLINE_W-1:0] deadline;
    logic [LOSS_W-1:0]     loss_num;    // x'  current window numerator
    logic [LOSS_W-1:0]     loss_den;    // y'  current window denominator
    logic [ARRIVAL_W-1:0]  arrival;     // arrival time of the head packet
    logic [ID_W-1:0]       id;          // stream-slot (register) ID
  } stream_attr_t;

  // Word written into a stream-slot during LOAD.
  typedef struct packed {
    logic [DEADLINE_W-1:0] deadline;    // first deadline
    logic [PERIOD_W-1:0]   period;      // request period T
    logic [LOSS_W-1:0]     loss_num;    // original x (loss numerator)
    logic [LOSS_W-1:0]     loss_den;    // original y (loss denominator)
    logic [ARRIVAL_W-1:0]  arrival;     // arrival time of the head packet
  } stream_cfg_t;

  // Control and Steering Logic states.
  typedef enum logic [1:0] {
    ST_LOAD     = 2'd0,
    ST_SCHEDULE = 2'd1,
    ST_UPDATE   = 2'd2
  } ctrl_state_t;

  // Wrap-aware "a is earlier than b" for 16-bit time stamps: the difference
  // is taken modulo 2^16 and read as a signed number.
  function automatic logic time_before(input logic [15:0] a, input logic [15:0] b);
    logic signed [15:0] d;
    d = a - b;
    return d < 0;
  endfunction

endpackage
