// tb_newbdp_coder: self-checking test of the slot locator and slot-cover coder.
//
// Checks the worked example (8-slot window, burst from slot 2 to slot 5 gives NewBDP =
// 8'b00111100) and then random bursts in the default 32-slot, 256-cycle window at random
// current times, including times where the 16-bit counter wraps. The expected Head, Tail,
// physical indices and cover code are built by enumerating the slots the burst touches,
// not with the shift formula; the in-window decision is recomputed with integer arithmetic.
module tb_newbdp_coder;
  import maxcu_pkg::*;

  int checks = 0, failures = 0;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // 8-slot instance for the worked example
  time_t now8, s8, e8, len8;
  logic [2:0] hr8, tr8, hi8, ti8, cs8;
  logic [7:0] nb8, nbr8;
  logic win8;
  newbdp_coder #(.NUM_SLOTS(8), .SLOT_LEN(256)) u8 (
    .now(now8), .start_time(s8), .end_time(e8),
    .head_rel(hr8), .tail_rel(tr8), .head_idx(hi8), .tail_idx(ti8), .cur_slot(cs8),
    .newbdp(nb8), .newbdp_rel(nbr8), .length(len8), .in_window(win8)
  );

  // default instance
  localparam int NS = DEF_NUM_SLOTS, TAU = DEF_SLOT_LEN;
  time_t now, s, e, len;
  logic [4:0] hr, tr, hi, ti, cs;
  logic [NS-1:0] nb, nbr;
  logic win;
  newbdp_coder u (
    .now, .start_time(s), .end_time(e),
    .head_rel(hr), .tail_rel(tr), .head_idx(hi), .tail_idx(ti), .cur_slot(cs),
    .newbdp(nb), .newbdp_rel(nbr), .length(len), .in_window(win)
  );

  initial begin
    #10_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_in = 0, n_out = 0;
    now8 = 16'd0; s8 = 16'd600; e8 = 16'd1400;
    #1;
    check(hr8 == 3'd2 && tr8 == 3'd5, "worked example Head/Tail");
    check(nb8 == 8'b0011_1100, $sformatf("worked example NewBDP=%b", nb8));
    check(win8 && len8 == 16'd800, "worked example window/length");
    // same burst seen from a window that starts 3 slots later in a wrapped ring
    now8 = 16'd512 + 16'd7; s8 = 16'd600 + 16'd512; e8 = 16'd1400 + 16'd512;
    #1;
    check(hr8 == 3'd2 && tr8 == 3'd5, "shifted Head/Tail");
    check(nbr8 == 8'b0011_1100 && nb8 == 8'b1111_0000, $sformatf("shifted NewBDP=%b", nb8));

    for (int i = 0; i < 200000; i++) begin
      int n, st, en, ws, hs, ts;
      logic exp_win;
      logic [NS-1:0] exp_nb, exp_rel;
      n  = int'($urandom_range(0, 200000));
      st = n + int'($urandom_range(0, 9000)) - 50;
      en = st + int'($urandom_range(0, 8000)) - 20;
      now = time_t'(n); s = time_t'(st); e = time_t'(en);
      #1;
      ws = (n / TAU) * TAU;
      exp_win = (st > n) && (en > st) && (en < ws + NS * TAU);
      check(win === exp_win, $sformatf("in_window n=%0d s=%0d e=%0d", n, st, en));
      check(len == time_t'(en - st), "length");
      check(cs == 5'((n / TAU) % NS), "cur_slot");
      if (exp_win) begin
        n_in++;
        hs = (st - ws) / TAU; ts = (en - ws) / TAU;
        exp_nb = '0; exp_rel = '0;
        for (int k = hs; k <= ts; k++) begin
          exp_rel[k] = 1'b1;
          exp_nb[(k + n / TAU) % NS] = 1'b1;
        end
        check(hr == 5'(hs) && tr == 5'(ts), $sformatf("Head/Tail n=%0d s=%0d e=%0d", n, st, en));
        check(hi == 5'((st / TAU) % NS) && ti == 5'((en / TAU) % NS), "physical indices");
        check(nbr == exp_rel, $sformatf("relative code %h vs %h", nbr, exp_rel));
        check(nb == exp_nb, $sformatf("physical code %h vs %h", nb, exp_nb));
      end else n_out++;
    end
    check(n_in > 1000 && n_out > 1000, "both in- and out-of-window bursts tried");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
