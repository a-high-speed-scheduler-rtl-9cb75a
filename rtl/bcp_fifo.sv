// bcp_fifo: synchronous first-word-fall-through FIFO for burst control packets.
//
// The scheduler has one in front (O/E receiver -> scheduler) and one behind it
// (scheduler -> E/O transmitter). The paper gives their place and purpose but not their
// depth or interface; this design uses a circular buffer of DEPTH entries with a
// read pointer, a write pointer and an occupancy counter. The head entry is visible on
// rd_data whenever empty is low; rd_en pops it at the clock edge, wr_en pushes wr_data.
// A simultaneous push and pop is allowed, also when full (the pop makes room). Writing a
// full FIFO without a pop, or reading an empty one, is a protocol error (asserted) and is
// ignored. Synchronous active-low reset empties the FIFO.
module bcp_fifo
  import maxcu_pkg::*;
#(
  parameter type DATA_T = bcp_t,
  parameter int  DEPTH  = 16,
  localparam int PTR_W  = $clog2(DEPTH),
  localparam int CNT_W  = $clog2(DEPTH + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  DATA_T            wr_data,
  input  logic             rd_en,
  output DATA_T            rd_data,
  output logic             full,
  output logic             empty,
  output logic [CNT_W-1:0] count
);

  DATA_T            mem [DEPTH];
  logic [PTR_W-1:0] wr_ptr, rd_ptr;
  logic             do_wr, do_rd;

  assign empty   = (count == '0);
  assign full    = (count == CNT_W'(DEPTH));
  assign rd_data = mem[rd_ptr];
  assign do_rd   = rd_en && !empty;
  assign do_wr   = wr_en && (!full || do_rd);

  function automatic logic [PTR_W-1:0] next_ptr(input logic [PTR_W-1:0] p);
    return (p == PTR_W'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_wr) begin
        mem[wr_ptr] <= wr_data;
        wr_ptr      <= next_ptr(wr_ptr);
      end
      if (do_rd) rd_ptr <= next_ptr(rd_ptr);
      count <= count + CNT_W'(do_wr) - CNT_W'(do_rd);
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                  (wr_en && full) |-> rd_en);
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n)
                                   rd_en |-> !empty);

endmodule
