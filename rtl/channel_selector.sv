// channel_selector: the optimal channel selector of Max-CU-VF (step 4).
//
// For every channel i a value is formed from its feasibility flag and its channel
// utilisation CU_i, and a comparator finds the channel with the largest value. The
// document sets Value_i = CU_i for a feasible channel and 0 otherwise, and uses a parallel
// maximum finder it does not describe. This design's own choices:
//  - Value_i = {En_Feasible_i, CU_i}, i.e. the feasibility flag is put above CU. A feasible
//    channel whose CU is still zero then still beats every infeasible one, which a plain
//    CU_i/0 value could not tell apart.
//  - The comparator is a balanced binary tree of two-input max cells (log2(NUM_CH) levels).
//    On equal values the lower channel number wins, so an empty link is filled from
//    channel 1 upward.
// Outputs: found (some channel is feasible), best (0-based index) and valid_wave, the
// 1-based channel number that is 0 when no channel is feasible, as in the paper's
// simulation traces. Purely combinational.
module channel_selector
  import maxcu_pkg::*;
#(
  parameter int NUM_CH  = DEF_NUM_CH,
  localparam int CH_W   = $clog2(NUM_CH)
) (
  input  logic [NUM_CH-1:0] en_feasible,
  input  time_t             cu [NUM_CH],
  output logic              found,
  output logic [CH_W-1:0]   best,
  output logic [7:0]        valid_wave
);

  localparam int LEAVES = 1 << $clog2(NUM_CH);

  typedef struct packed {
    logic       feas;
    time_t      cu;
    logic [CH_W-1:0] idx;
  } cand_t;

  cand_t node [2*LEAVES];

  always_comb begin
    for (int i = 0; i < 2*LEAVES; i++) node[i] = '0;
    for (int i = 0; i < LEAVES; i++) begin
      if (i < NUM_CH) begin
        node[LEAVES+i].feas = en_feasible[i];
        node[LEAVES+i].cu   = en_feasible[i] ? cu[i] : '0;
        node[LEAVES+i].idx  = CH_W'(i);
      end
    end
    // Tree of max cells; the left (lower-numbered) input wins a tie.
    for (int n = LEAVES - 1; n >= 1; n--) begin
      if ({node[2*n+1].feas, node[2*n+1].cu} > {node[2*n].feas, node[2*n].cu})
        node[n] = node[2*n+1];
      else
        node[n] = node[2*n];
    end
    found      = node[1].feas;
    best       = node[1].idx;
    valid_wave = found ? 8'(node[1].idx) + 8'd1 : 8'd0;
  end

endmodule
