// tb_central_control: self-checking test of the central control unit on its own.
//
// The FIFOs, the coder and the selector are replaced by testbench signals. Each cycle the
// testbench offers a random BCP, random FIFO flags and a random selector answer, and
// predicts from them, with a small cycle model: whether a BCP is read, whether the BCP in
// hand is committed or stalls, the one-hot Update, the output FIFO write with the refreshed
// channel and offset, and the registered valid_wave / drop / Ch_Info one cycle later.
// It also checks the time counter and the slot tick.
module tb_central_control;
  import maxcu_pkg::*;

  localparam int NC = 16, TAU = 256;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic rst_n, slot_tick, in_empty, in_rd_en, out_full, out_wr_en, cur_valid, en_search;
  logic in_window, found, result_valid, drop, stall, ch_info_valid;
  time_t now;
  bcp_t in_data, out_data, cur_bcp;
  logic [NC-1:0] update;
  logic [3:0] best;
  logic [7:0] sel_wave, valid_wave;
  ch_info_t ch_info;

  central_control #(.NUM_CH(NC), .SLOT_LEN(TAU)) u (
    .clk, .rst_n, .now, .slot_tick, .in_empty, .in_data, .in_rd_en,
    .out_full, .out_wr_en, .out_data, .cur_valid, .cur_bcp, .en_search, .update,
    .in_window, .found, .best, .sel_wave, .result_valid, .valid_wave, .drop, .stall,
    .ch_info_valid, .ch_info
  );

  // model state
  logic m_valid;
  bcp_t m_bcp;
  int   n_acc = 0, n_drop = 0, n_stall = 0;

  initial begin
    #20_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    rst_n = 1'b0; in_empty = 1'b1; out_full = 1'b0; in_data = '0;
    in_window = 1'b0; found = 1'b0; best = '0; sel_wave = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    m_valid = 1'b0; m_bcp = '0;
    cyc = 0;
    check(now == '0, "time starts at zero");
    for (int c = 0; c < 30000; c++) begin
      logic e_commit, e_accept, e_rd;
      int b;
      // stimulus for this cycle
      in_empty  = ($urandom_range(0, 3) == 0);
      in_data   = bcp_t'({$urandom(), $urandom(), $urandom()});
      out_full  = ($urandom_range(0, 5) == 0);
      in_window = ($urandom_range(0, 7) != 0);
      found     = ($urandom_range(0, 4) != 0);
      b         = int'($urandom_range(0, NC - 1));
      best      = 4'(b);
      sel_wave  = found ? 8'(b + 1) : 8'd0;
      #1;
      e_commit = m_valid && !out_full;
      e_accept = e_commit && in_window && found;
      e_rd     = !in_empty && (!m_valid || e_commit);
      check(now == time_t'(cyc), "time counter");
      check(slot_tick == ((cyc % TAU) == TAU - 1), "slot tick");
      check(cur_valid == m_valid && (!m_valid || cur_bcp == m_bcp), "BCP in hand");
      check(in_rd_en == e_rd, "input FIFO read");
      check(en_search == e_commit && stall == (m_valid && out_full), "search enable / stall");
      check(update == (e_accept ? (NC'(1) << b) : '0), "update one-hot");
      check(out_wr_en == e_accept, "output FIFO write");
      if (e_accept) begin
        check(out_data.channel == 8'(b + 1) && out_data.offset == m_bcp.start_time - time_t'(cyc)
              && out_data.start_time == m_bcp.start_time && out_data.end_time == m_bcp.end_time
              && out_data.payload == m_bcp.payload, "refreshed BCP");
      end
      if (e_accept) n_acc++;
      if (e_commit && !e_accept) n_drop++;
      if (m_valid && out_full) n_stall++;
      @(posedge clk);
      #1;
      check(result_valid == e_commit, "result strobe");
      if (e_commit) begin
        check(drop == !e_accept, "drop flag");
        check(valid_wave == (e_accept ? 8'(b + 1) : 8'd0), "valid_wave");
      end else check(!drop, "no drop without commit");
      check(ch_info_valid == e_accept, "ch_info strobe");
      if (e_accept) check(ch_info.channel == 8'(b + 1) && ch_info.start_time == m_bcp.start_time
                          && ch_info.end_time == m_bcp.end_time, "ch_info");
      // model update
      if (e_rd) begin m_valid = 1'b1; m_bcp = in_data; end
      else if (e_commit) m_valid = 1'b0;
      cyc++;
      @(negedge clk);
    end
    check(n_acc > 100 && n_drop > 100 && n_stall > 100, "accept, drop and stall all seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
