// ss_ref_pkg -- reference models used by the testbenches.
//
// ref_precedes() restates the pairwise ordering rules as a plain sequence of
// tests on integers; ref_slot_update() restates the per-slot priority update
// (DWCS window-constraint adjustment, deadline advance, missed-deadline
// counting). The testbenches compare the hardware against these models.
package ss_ref_pkg;
  import ss_pkg::*;

  typedef struct {
    int unsigned deadline;
    int unsigned period;
    int unsigned x, y;      // current window-constraint
    int unsigned x0, y0;    // original window-constraint
    int unsigned arrival;
    bit          tag;
    int unsigned missed;
  } ref_slot_t;

  // Signed distance a - b of two 16-bit time stamps.
  function automatic int tdiff(int unsigned a, int unsigned b);
    int d;
    d = int'((a - b) & 32'hFFFF);
    if (d >= 32768) d -= 65536;
    return d;
  endfunction

  // 1 when stream a is ordered ahead of stream b.
  function automatic bit ref_precedes(stream_attr_t a, stream_attr_t b);
    int wa, wb;
    if (a.deadline != b.deadline) return tdiff(a.deadline, b.deadline) < 0;
    wa = int'(a.loss_num) * int'(b.loss_den);
    wb = int'(b.loss_num) * int'(a.loss_den);
    if (wa < wb) return 1;
    if (wa > wb) return 0;
    if (a.loss_num == 0 && b.loss_num == 0) begin
      if (a.loss_den > b.loss_den) return 1;
      if (a.loss_den < b.loss_den) return 0;
    end else begin
      if (a.loss_num < b.loss_num) return 1;
      if (a.loss_num > b.loss_num) return 0;
    end
    if (a.arrival != b.arrival) return tdiff(a.arrival, b.arrival) < 0;
    return a.id < b.id;
  endfunction

  function automatic stream_attr_t ref_attr(ref_slot_t s, int unsigned id);
    stream_attr_t a;
    a.deadline = DEADLINE_W'(s.deadline);
    a.loss_num = LOSS_W'(s.x);
    a.loss_den = LOSS_W'(s.y);
    a.arrival  = ARRIVAL_W'(s.arrival);
    a.id       = ID_W'(id);
    return a;
  endfunction

  function automatic ref_slot_t ref_load(stream_cfg_t c);
    ref_slot_t s;
    s.deadline = c.deadline;
    s.period   = c.period;
    s.x        = c.loss_num;
    s.y        = c.loss_den;
    s.x0       = c.loss_num;
    s.y0       = c.loss_den;
    s.arrival  = c.arrival;
    s.tag      = 0;
    s.missed   = 0;
    return s;
  endfunction

  // One priority update of one slot.
  function automatic ref_slot_t ref_slot_update(ref_slot_t s, bit won, int unsigned now,
                                                bit arr_valid, int unsigned arr);
    ref_slot_t r = s;
    if (won) begin
      if (s.y > s.x) r.y = s.y - 1;
      else if (s.y == s.x && s.x > 0) begin r.x = s.x - 1; r.y = s.y - 1; end
      if ((r.x == 0 && r.y == 0) || s.tag) begin r.x = s.x0; r.y = s.y0; r.tag = 0; end
      r.deadline = (s.deadline + s.period) & 16'hFFFF;
      if (arr_valid) r.arrival = arr;
    end else if (tdiff(now, s.deadline) >= 0) begin
      if (r.missed < 65535) r.missed = s.missed + 1;
      if (s.x > 0) begin
        r.x = s.x - 1; r.y = s.y - 1;
        if (r.x == 0 && r.y == 0) begin r.x = s.x0; r.y = s.y0; end
      end else if (s.y0 > 0) begin
        if (s.y < 255) r.y = s.y + 1;
        r.tag = 1;
      end
      r.deadline = (s.deadline + s.period) & 16'hFFFF;
    end
    return r;
  endfunction

endpackage
