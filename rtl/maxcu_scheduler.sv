// maxcu_scheduler: a Max-CU-VF channel scheduler for one output link of an optical burst
// switching node.
//
// Burst control packets (BCPs) arrive ahead of their data bursts and are queued in the
// input FIFO. For each one the scheduler picks a data channel (wavelength) on which the
// burst fits into a void between already scheduled bursts, and among all such channels it
// takes the one with the highest channel utilisation CU, the summed length of the bursts
// already on it. Because CU is a plain register per channel, no search over voids is
// needed and a decision takes one clock cycle. Structure (after the paper's architecture
// figure): central control unit -> shared NewBDP coder -> NUM_CH judgment engines in
// parallel -> optimal channel selector -> back to the control unit, which updates the
// chosen engine, writes the refreshed BCP into the output FIFO and reports Ch_Info to the
// switching matrix controller.
//
// Defaults are the paper's: 16 channels, a 32-slot window of 256 clock cycles per slot.
// The O/E receiver, the E/O transmitter and the switching matrix controller lie outside:
// the input FIFO's write side, the output FIFO's read side and Ch_Info are ports.
// Times are in clock cycles of the time counter 'now' (TIME_W bits, wrapping), which starts
// at 0 on reset; a BCP's start_time/end_time must be given in that count.
//
// Timing: a BCP written at cycle t is visible to the control unit at t+1, judged and
// committed at t+2, and its result (valid_wave, drop, ch_info) is registered at t+3.
// Back-to-back BCPs are scheduled one per clock.
module maxcu_scheduler
  import maxcu_pkg::*;
#(
  parameter int NUM_CH     = DEF_NUM_CH,
  parameter int NUM_SLOTS  = DEF_NUM_SLOTS,
  parameter int SLOT_LEN   = DEF_SLOT_LEN,
  parameter int FIFO_DEPTH = 16,
  localparam int CH_W      = $clog2(NUM_CH),
  localparam int IDX_W     = $clog2(NUM_SLOTS),
  localparam int CNT_W     = $clog2(FIFO_DEPTH + 1)
) (
  input  logic        clk,
  input  logic        rst_n,
  output time_t       now,
  // from the O/E receiver
  input  logic        bcp_in_wr,
  input  bcp_t        bcp_in,
  output logic        bcp_in_full,
  // to the E/O transmitter
  input  logic        bcp_out_rd,
  output bcp_t        bcp_out,
  output logic        bcp_out_empty,
  // to the switching matrix controller
  output logic        ch_info_valid,
  output ch_info_t    ch_info,
  // scheduling results
  output logic        result_valid,
  output logic [7:0]  valid_wave,
  output logic        drop,
  output logic        stall
);

  // input FIFO
  logic       in_empty, in_rd_en;
  bcp_t       in_data;
  logic [CNT_W-1:0] in_count, out_count;

  bcp_fifo #(.DATA_T(bcp_t), .DEPTH(FIFO_DEPTH)) u_in_fifo (
    .clk, .rst_n,
    .wr_en(bcp_in_wr), .wr_data(bcp_in),
    .rd_en(in_rd_en), .rd_data(in_data),
    .full(bcp_in_full), .empty(in_empty), .count(in_count)
  );

  // output FIFO
  logic out_full, out_wr_en;
  bcp_t out_data;

  bcp_fifo #(.DATA_T(bcp_t), .DEPTH(FIFO_DEPTH)) u_out_fifo (
    .clk, .rst_n,
    .wr_en(out_wr_en), .wr_data(out_data),
    .rd_en(bcp_out_rd), .rd_data(bcp_out),
    .full(out_full), .empty(bcp_out_empty), .count(out_count)
  );

  // central control
  logic              slot_tick, cur_valid, en_search, in_window, found;
  bcp_t              cur_bcp;
  logic [NUM_CH-1:0] update, en_feasible;
  logic [CH_W-1:0]   best;
  logic [7:0]        sel_wave;

  central_control #(.NUM_CH(NUM_CH), .SLOT_LEN(SLOT_LEN)) u_ctrl (
    .clk, .rst_n, .now, .slot_tick,
    .in_empty, .in_data, .in_rd_en,
    .out_full, .out_wr_en, .out_data,
    .cur_valid, .cur_bcp, .en_search, .update,
    .in_window, .found, .best, .sel_wave,
    .result_valid, .valid_wave, .drop, .stall,
    .ch_info_valid, .ch_info
  );

  // steps 1 and 2
  logic [IDX_W-1:0]     head_rel, tail_rel, head_idx, tail_idx, cur_slot;
  logic [NUM_SLOTS-1:0] newbdp, newbdp_rel;
  time_t                length;

  newbdp_coder #(.NUM_SLOTS(NUM_SLOTS), .SLOT_LEN(SLOT_LEN)) u_coder (
    .now, .start_time(cur_bcp.start_time), .end_time(cur_bcp.end_time),
    .head_rel, .tail_rel, .head_idx, .tail_idx, .cur_slot,
    .newbdp, .newbdp_rel, .length, .in_window
  );

  // steps 3 and 5: one judgment engine per data channel
  time_t   cu     [NUM_CH];
  r_case_e r_case [NUM_CH];

  for (genvar i = 0; i < NUM_CH; i++) begin : g_je
    judgment_engine #(.NUM_SLOTS(NUM_SLOTS)) u_je (
      .clk, .rst_n, .slot_tick, .cur_slot,
      .en_search, .newbdp, .head_idx, .tail_idx,
      .start_time(cur_bcp.start_time), .end_time(cur_bcp.end_time), .length,
      .en_feasible(en_feasible[i]), .cu(cu[i]), .r_case(r_case[i]),
      .update(update[i])
    );
  end

  // step 4
  channel_selector #(.NUM_CH(NUM_CH)) u_sel (
    .en_feasible, .cu, .found, .best, .valid_wave(sel_wave)
  );

endmodule
