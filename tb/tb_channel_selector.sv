// tb_channel_selector: self-checking test of the optimal channel selector.
//
// Random feasibility flags and CU values on 16 channels (with many ties and many zero
// CUs); the expected winner is found with a plain linear scan: the feasible channel with
// the largest CU, the lowest number on a tie, valid_wave = number + 1, and 0 with found low
// when nothing is feasible. A few directed vectors check a feasible channel with CU = 0
// against infeasible channels with large CU.
module tb_channel_selector;
  import maxcu_pkg::*;

  localparam int NC = DEF_NUM_CH;

  int checks = 0, failures = 0;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic [NC-1:0] feas;
  time_t         cu [NC];
  logic          found;
  logic [3:0]    best;
  logic [7:0]    wave;

  channel_selector u (.en_feasible(feas), .cu, .found, .best, .valid_wave(wave));

  task automatic expect_scan(input string tag);
    int bi = -1;
    for (int i = 0; i < NC; i++)
      if (feas[i] && (bi < 0 || cu[i] > cu[bi])) bi = i;
    if (bi < 0) check(!found && wave == 8'd0, $sformatf("%s: none feasible", tag));
    else check(found && best == 4'(bi) && wave == 8'(bi + 1),
               $sformatf("%s: got %0d expected %0d", tag, wave, bi + 1));
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // feasible channel 9 with CU 0 beats infeasible channels with large CU
    feas = '0; feas[9] = 1'b1;
    for (int i = 0; i < NC; i++) cu[i] = 16'd5000;
    cu[9] = '0;
    #1; check(found && wave == 8'd10, "feasible zero-CU channel wins");
    // all infeasible
    feas = '0; #1; check(!found && wave == 8'd0, "drop when nothing feasible");
    // all feasible, all zero: channel 1
    feas = '1; for (int i = 0; i < NC; i++) cu[i] = '0;
    #1; check(found && wave == 8'd1, "empty link fills from channel 1");
    // last channel largest
    cu[15] = 16'd1; #1; check(wave == 8'd16, "channel 16 largest");
    for (int t = 0; t < 50000; t++) begin
      feas = NC'($urandom());
      for (int i = 0; i < NC; i++)
        cu[i] = ($urandom_range(0, 3) == 0) ? time_t'($urandom_range(0, 3)) : time_t'($urandom());
      #1; expect_scan($sformatf("random %0d", t));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
