// newbdp_coder: steps 1 and 2 of Max-CU-VF for the burst being scheduled.
//
// The observation window starts at the beginning of the slot that holds the current time
// (Ts) and is NUM_SLOTS slots of SLOT_LEN cycles long. Step 1 locates the burst:
//   Head = floor((Th - Ts) / tau),  Tail = floor((Tt - Ts) / tau)
// Step 2 builds the slot-cover code
//   NewBDP = ((1 << Tail) - (1 << Head)) | (1 << Tail)
// which has ones from slot Head to slot Tail. Both formulas are the paper's.
//
// This design's own choice: the per-channel slot registers and time tables are circular,
// indexed by the absolute slot number modulo NUM_SLOTS, so that nothing has to be shifted
// when time moves on. The window-relative code is therefore rotated left by the physical
// index of the current slot (cur_slot), and head_idx / tail_idx are physical indices.
// in_window is low when the burst cannot be scheduled at all: its start is not after the
// current time (offset used up), its end is not after its start, or its end lies beyond
// the window. NUM_SLOTS and SLOT_LEN must be powers of two.
//
// Purely combinational; the result is used in the same clock cycle.
module newbdp_coder
  import maxcu_pkg::*;
#(
  parameter int NUM_SLOTS = DEF_NUM_SLOTS,
  parameter int SLOT_LEN  = DEF_SLOT_LEN,
  localparam int IDX_W    = $clog2(NUM_SLOTS),
  localparam int SL_W     = $clog2(SLOT_LEN)
) (
  input  time_t                 now,        // current time, clock cycles
  input  time_t                 start_time, // Th
  input  time_t                 end_time,   // Tt
  output logic [IDX_W-1:0]      head_rel,   // Head, window-relative (eq. 2)
  output logic [IDX_W-1:0]      tail_rel,   // Tail, window-relative (eq. 3)
  output logic [IDX_W-1:0]      head_idx,   // physical slot of the head
  output logic [IDX_W-1:0]      tail_idx,   // physical slot of the tail
  output logic [IDX_W-1:0]      cur_slot,   // physical slot of the current time
  output logic [NUM_SLOTS-1:0]  newbdp,     // physical slot-cover code (eq. 4, rotated)
  output logic [NUM_SLOTS-1:0]  newbdp_rel, // window-relative slot-cover code (eq. 4)
  output time_t                 length,     // Tt - Th
  output logic                  in_window
);

  localparam int WIN_LEN = NUM_SLOTS * SLOT_LEN;

  time_t win_start, rel_h, rel_t;
  logic [2*NUM_SLOTS-1:0] rot;

  initial begin
    assert (NUM_SLOTS == (1 << IDX_W)) else $error("NUM_SLOTS must be a power of two");
    assert (SLOT_LEN == (1 << SL_W)) else $error("SLOT_LEN must be a power of two");
    assert (2 * WIN_LEN <= (1 << TIME_W)) else $error("TIME_W too small for the window");
  end

  always_comb begin
    win_start = {now[TIME_W-1:SL_W], {SL_W{1'b0}}};
    rel_h     = start_time - win_start;
    rel_t     = end_time - win_start;
    head_rel  = rel_h[SL_W +: IDX_W];
    tail_rel  = rel_t[SL_W +: IDX_W];
    cur_slot  = now[SL_W +: IDX_W];
    head_idx  = head_rel + cur_slot;   // wraps modulo NUM_SLOTS
    tail_idx  = tail_rel + cur_slot;
    length    = end_time - start_time;
    in_window = time_before(now, start_time) && time_before(start_time, end_time)
                && (rel_t < time_t'(WIN_LEN));

    newbdp_rel = ((NUM_SLOTS'(1) << tail_rel) - (NUM_SLOTS'(1) << head_rel))
                 | (NUM_SLOTS'(1) << tail_rel);
    rot    = {newbdp_rel, newbdp_rel} << cur_slot;
    newbdp = rot[2*NUM_SLOTS-1 -: NUM_SLOTS];
  end

endmodule
