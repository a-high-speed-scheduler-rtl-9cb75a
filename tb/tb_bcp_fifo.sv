// tb_bcp_fifo: self-checking test of the BCP FIFO.
//
// Random pushes and pops (never pushing a full FIFO without a pop, never popping an empty
// one) against a queue model; checks the head entry, count, full and empty every cycle,
// and that the FIFO fills to exactly DEPTH entries, including simultaneous push and pop
// while full.
module tb_bcp_fifo;
  import maxcu_pkg::*;

  localparam int DEPTH = 16;

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

  logic rst_n, wr_en, rd_en, full, empty;
  bcp_t wr_data, rd_data;
  logic [4:0] count;

  bcp_fifo #(.DATA_T(bcp_t), .DEPTH(DEPTH)) u (
    .clk, .rst_n, .wr_en, .wr_data, .rd_en, .rd_data, .full, .empty, .count
  );

  bcp_t q[$];
  int n_full = 0, n_fullpp = 0;

  initial begin
    #10_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; wr_en = 1'b0; rd_en = 1'b0; wr_data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 20000; c++) begin
      int bias;
      bias = ((c / 500) % 2 == 0) ? 70 : 30;   // alternate filling and draining phases
      @(negedge clk);
      check(count == 5'(q.size()), $sformatf("count %0d vs %0d", count, q.size()));
      check(empty == (q.size() == 0) && full == (q.size() == DEPTH), "flags");
      if (q.size() > 0) check(rd_data == q[0], "head entry");
      if (full) n_full++;
      rd_en = !empty && ($urandom_range(0, 99) >= bias);
      wr_en = ($urandom_range(0, 99) < bias) && (!full || rd_en);
      if (full && rd_en && wr_en) n_fullpp++;
      wr_data = bcp_t'({$urandom(), $urandom(), $urandom()});
      @(posedge clk);
      #1;
      if (rd_en && q.size() > 0) void'(q.pop_front());
      if (wr_en && q.size() < DEPTH + 1) q.push_back(wr_data);
    end
    check(n_full > 10 && n_fullpp > 0, "full and push-pop-while-full reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
