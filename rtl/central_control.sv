// central_control: the central control unit of the Max-CU-VF scheduler.
//
// It keeps the node's current time (a free-running cycle counter started at reset), reads
// the next BCP from the input FIFO as soon as the previous one is finished, holds it for one
// clock while the judgment engines and the channel selector decide, and in that same clock
// commits the decision: it raises Update on the chosen channel, writes the refreshed BCP to
// the output FIFO and sends Ch_Info to the switching matrix controller. One BCP is thus
// scheduled per clock cycle, as in the paper's single-clock (combinational) scheduler.
// The result appears on valid_wave / drop one clock after the BCP's times were presented,
// which is the relation the paper's simulation traces show.
//
// The paper names the unit and lists its jobs; the following are this design's own:
//  - The refreshed BCP gets the 1-based channel number and, as its offset, the time left
//    from the commit cycle to the burst's start. Dropped bursts are not forwarded.
//  - A burst is dropped (drop = 1, valid_wave = 0) when no channel is feasible or when it
//    cannot be placed at all: start not after the current time, end not after start, or end
//    beyond the observation window (in_window low).
//  - When the output FIFO is full the BCP in hand waits (stall) and no new one is read.
//  - slot_tick marks the last cycle of every slot; the engines retire that slot on it.
// Synchronous active-low reset.
module central_control
  import maxcu_pkg::*;
#(
  parameter int NUM_CH   = DEF_NUM_CH,
  parameter int SLOT_LEN = DEF_SLOT_LEN,
  localparam int CH_W    = $clog2(NUM_CH),
  localparam int SL_W    = $clog2(SLOT_LEN)
) (
  input  logic              clk,
  input  logic              rst_n,
  // time base
  output time_t             now,
  output logic              slot_tick,
  // BCP input FIFO
  input  logic              in_empty,
  input  bcp_t              in_data,
  output logic              in_rd_en,
  // BCP output FIFO
  input  logic              out_full,
  output logic              out_wr_en,
  output bcp_t              out_data,
  // to the coder and the judgment engines
  output logic              cur_valid,
  output bcp_t              cur_bcp,
  output logic              en_search,
  output logic [NUM_CH-1:0] update,
  // from the coder and the selector
  input  logic              in_window,
  input  logic              found,
  input  logic [CH_W-1:0]   best,
  input  logic [7:0]        sel_wave,
  // results
  output logic              result_valid,  // one pulse per scheduled or dropped BCP
  output logic [7:0]        valid_wave,    // 1-based channel, 0 on a drop
  output logic              drop,
  output logic              stall,         // a BCP waits for room in the output FIFO
  output logic              ch_info_valid,
  output ch_info_t          ch_info
);

  logic commit, accept;

  always_comb begin
    stall     = cur_valid && out_full;
    commit   = cur_valid && !out_full;
    en_search = commit;
    accept    = commit && in_window && found;
    update    = accept ? (NUM_CH'(1) << best) : '0;
    in_rd_en  = !in_empty && (!cur_valid || commit);

    out_wr_en          = accept;
    out_data           = cur_bcp;
    out_data.channel   = sel_wave;
    out_data.offset    = cur_bcp.start_time - now;
  end

  assign slot_tick = (now[SL_W-1:0] == {SL_W{1'b1}});

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      now           <= '0;
      cur_valid     <= 1'b0;
      cur_bcp       <= '0;
      result_valid  <= 1'b0;
      valid_wave    <= '0;
      drop          <= 1'b0;
      ch_info_valid <= 1'b0;
      ch_info       <= '0;
    end else begin
      now <= now + 1'b1;
      if (in_rd_en) begin
        cur_valid <= 1'b1;
        cur_bcp   <= in_data;
      end else if (commit) begin
        cur_valid <= 1'b0;
      end
      result_valid  <= commit;
      drop          <= commit && !accept;
      ch_info_valid <= accept;
      if (commit) valid_wave <= accept ? sel_wave : 8'd0;
      if (accept)  ch_info    <= '{channel: sel_wave,
                                   start_time: cur_bcp.start_time,
                                   end_time: cur_bcp.end_time};
    end
  end

  a_onehot_update: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(update));

endmodule
