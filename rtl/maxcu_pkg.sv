// maxcu_pkg: types, constants and helpers shared by the Max-CU-VF burst scheduler.
//
// The scheduler keeps time as a free-running count of clock cycles, TIME_W bits wide,
// which wraps. All times a BCP carries (start and end time of its data burst) are in that
// same count. Times that are compared are always closer together than half the counter
// range, so "a before b" is decided from the sign of the modular difference b - a
// (time_before). The default sizes follow the 16-channel FPGA scheduler: 16 data channels,
// a 32-slot observation window and 256 clock cycles per slot. TIME_W and the BCP fields
// other than the burst times, the offset and the channel number are this design's own.
package maxcu_pkg;

  // Defaults of the main configuration.
  localparam int DEF_NUM_CH    = 16;   // data channels (wavelengths) per output link
  localparam int DEF_NUM_SLOTS = 32;   // N, slots in the observation window
  localparam int DEF_SLOT_LEN  = 256;  // tau, clock cycles per slot
  localparam int DEF_TIME_W    = 16;   // width of the time counter and of all times

  localparam int TIME_W = DEF_TIME_W;
  typedef logic [TIME_W-1:0] time_t;

  // Burst control packet as seen by the scheduler. start/end are the arrival and departure
  // times of the data burst at this node; offset is the remaining offset time (refreshed on
  // the way out); channel is the data channel the burst is assigned to (refreshed);
  // payload stands for the fields the scheduler passes through untouched (e.g. destination).
  typedef struct packed {
    time_t       start_time;
    time_t       end_time;
    time_t       offset;
    logic [7:0]  channel;
    logic [15:0] payload;
  } bcp_t;

  // Information sent to the switching matrix controller for every scheduled burst.
  typedef struct packed {
    logic [7:0] channel;     // 1-based data channel number
    time_t      start_time;
    time_t      end_time;
  } ch_info_t;

  // Classification of R = NewBDP & CH on one channel (the five cases of step 3).
  typedef enum logic [2:0] {
    R_CLEAR = 3'd4,  // case 4: R is zero, no contention
    R_HEAD  = 3'd1,  // case 1: only the head slot of the new burst is shared
    R_TAIL  = 3'd2,  // case 2: only the tail slot of the new burst is shared
    R_BOTH  = 3'd3,  // case 3: exactly the head and the tail slots are shared
    R_OTHER = 3'd5   // case 5: anything else, channel unusable
  } r_case_e;

  // Modular "a strictly before b" for times less than half the counter range apart.
  function automatic logic time_before(input time_t a, input time_t b);
    time_t d;
    d = b - a;
    return (d != '0) && !d[TIME_W-1];
  endfunction

endpackage
