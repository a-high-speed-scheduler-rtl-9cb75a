// judgment_engine: the per-channel state and feasibility test of Max-CU-VF (steps 3 and 5).
//
// Each data channel owns
//   ch       - an N-bit register, bit k set while part of a scheduled burst lies in slot k,
//   s_time   - an N-entry start-time table: start of the burst whose head is in slot k,
//   e_time   - an N-entry end-time table: end of the burst whose tail is in slot k,
//   cu       - the channel utilisation, the summed length of the bursts scheduled on it.
// These four come from the paper. Step 3 forms R = NewBDP & CH and decides:
//   case 4  R == 0                        feasible
//   case 1  only the head slot shared     feasible if the burst ending there ends before Th
//   case 2  only the tail slot shared     feasible if the burst starting there starts after Tt
//   case 3  head and tail slots shared    feasible if both of the above hold; when the new
//                                         burst covers only those two slots, the head slot
//                                         must hold no start and the tail slot no end
//   case 5  anything else                 not feasible
// Step 5 (update, only on the channel the selector chose) ORs NewBDP into CH, writes Th and
// Tt into the two tables and adds the burst length to CU.
//
// This design's own choices, where the paper is silent:
//  - An empty table entry is marked by a valid bit rather than by the value zero, since zero
//    is a legal time of the wrapping time counter. A shared head (tail) slot is only
//    accepted when its end (start) entry is present; this also rejects a scheduled burst
//    that passes straight through both slots of a two-slot burst.
//  - A burst shorter than one slot (Head == Tail) is accepted only when R is zero.
//  - Slots are circular. When the current slot ends (slot_tick), its CH bit and table
//    entries are cleared so that it can serve as the newest slot of the window, and the
//    length of any burst whose tail was in it is taken off CU. That length is kept in a
//    third table (l_tab) indexed like the end-time table.
//  - Times are compared with maxcu_pkg::time_before; "before" is strict, so bursts that
//    touch at the same clock cycle collide, as in the paper's "less than".
//
// Timing: en_feasible and cu are combinational from the registers and the broadcast burst
// inputs; all state changes on the rising clock edge. Reset (active low, synchronous)
// empties the channel.
module judgment_engine
  import maxcu_pkg::*;
#(
  parameter int NUM_SLOTS = DEF_NUM_SLOTS,
  localparam int IDX_W    = $clog2(NUM_SLOTS)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // time base
  input  logic                 slot_tick,   // last cycle of the current slot
  input  logic [IDX_W-1:0]     cur_slot,    // physical index of the current slot
  // the burst being judged (broadcast to all engines)
  input  logic                 en_search,
  input  logic [NUM_SLOTS-1:0] newbdp,
  input  logic [IDX_W-1:0]     head_idx,
  input  logic [IDX_W-1:0]     tail_idx,
  input  time_t                start_time,
  input  time_t                end_time,
  input  time_t                length,
  // result and update
  output logic                 en_feasible,
  output time_t                cu,
  output r_case_e              r_case,
  input  logic                 update
);

  logic [NUM_SLOTS-1:0] ch;
  time_t                s_time [NUM_SLOTS];
  time_t                e_time [NUM_SLOTS];
  time_t                l_tab  [NUM_SLOTS];
  logic [NUM_SLOTS-1:0] s_valid, e_valid;

  logic [NUM_SLOTS-1:0] r, head_bit, tail_bit, inner;
  logic head_ok, tail_ok;

  // ---------------- step 3: feasibility ----------------
  always_comb begin
    r        = newbdp & ch;
    head_bit = NUM_SLOTS'(1) << head_idx;
    tail_bit = NUM_SLOTS'(1) << tail_idx;
    inner    = r & ~head_bit & ~tail_bit;

    head_ok = !r[head_idx] ||
              (e_valid[head_idx] && !s_valid[head_idx] && time_before(e_time[head_idx], start_time));
    tail_ok = !r[tail_idx] ||
              (s_valid[tail_idx] && !e_valid[tail_idx] && time_before(end_time, s_time[tail_idx]));

    if (r == '0)                          r_case = R_CLEAR;
    else if (head_idx == tail_idx)        r_case = R_OTHER;
    else if (inner != '0)                 r_case = R_OTHER;
    else if (r == head_bit)               r_case = R_HEAD;
    else if (r == tail_bit)               r_case = R_TAIL;
    else                                  r_case = R_BOTH;

    unique case (r_case)
      R_CLEAR: en_feasible = en_search;
      R_HEAD:  en_feasible = en_search && head_ok;
      R_TAIL:  en_feasible = en_search && tail_ok;
      R_BOTH:  en_feasible = en_search && head_ok && tail_ok;
      default: en_feasible = 1'b0;
    endcase
  end

  // ---------------- step 5: update, and slot expiry ----------------
  logic [NUM_SLOTS-1:0] clr_mask, set_mask;
  time_t                expired_len, added_len;

  always_comb begin
    clr_mask    = slot_tick ? (NUM_SLOTS'(1) << cur_slot) : '0;
    set_mask    = update ? newbdp : '0;
    expired_len = (slot_tick && e_valid[cur_slot]) ? l_tab[cur_slot] : '0;
    added_len   = update ? length : '0;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ch      <= '0;
      s_valid <= '0;
      e_valid <= '0;
      cu      <= '0;
    end else begin
      ch      <= (ch & ~clr_mask) | set_mask;
      s_valid <= s_valid & ~clr_mask;
      e_valid <= e_valid & ~clr_mask;
      cu      <= cu - expired_len + added_len;
      if (update) begin
        s_time[head_idx]  <= start_time;
        s_valid[head_idx] <= 1'b1;
        e_time[tail_idx]  <= end_time;
        e_valid[tail_idx] <= 1'b1;
        l_tab[tail_idx]   <= length;
      end
    end
  end

  // The control unit may only update a channel this engine found feasible, and never a
  // slot that is being retired in the same cycle.
  property p_update_feasible;
    @(posedge clk) disable iff (!rst_n) update |-> en_feasible;
  endproperty
  a_update_feasible: assert property (p_update_feasible);

  property p_no_write_retired;
    @(posedge clk) disable iff (!rst_n) (update && slot_tick) |-> ((newbdp & clr_mask) == '0);
  endproperty
  a_no_write_retired: assert property (p_no_write_retired);

endmodule
