// tb_maxcu_scheduler: end-to-end test of the complete scheduler at its default size
// (16 channels, 32 slots of 256 cycles, 16-entry FIFOs).
//
// Phase 1 feeds, one per clock, the 19 bursts of the paper's 16-channel simulation trace
// (start/end times in clock cycles) and checks the channel numbers it shows for the first
// 18 of them, no drops, and one result per clock cycle.
// Phase 2 runs about 270,000 cycles of random traffic (four wraps of the 16-bit time
// counter) with the paper's burst statistics: offset uniform in [1280, 5376] cycles,
// length uniform in [256, 2560] cycles. The arrival rate moves through light, medium,
// heavy and overload phases; a few bursts are made late (almost no offset) or too long for
// the window, and the output FIFO is not read around the start of every overload phase, so that it fills
// up and the scheduler stalls.
// Every decision is compared with a reference model that keeps each channel's bursts as a
// list of intervals: feasible = overlaps no interval, CU = summed length of the bursts whose
// tail slot has not yet ended, choice = largest CU, lowest channel on a tie. The model also
// checks every channel's CU register, every refreshed BCP leaving the output FIFO and Ch_Info.
// Finally it counts how often each mechanism occurred (the five R cases, void filling,
// a max-CU choice that differs from first fit, both kinds of drop, stall, full input FIFO,
// slot retirement, time-counter wrap) and counts a failure for any that never did.
module tb_maxcu_scheduler;
  import maxcu_pkg::*;

  localparam int NC = DEF_NUM_CH, NS = DEF_NUM_SLOTS, TAU = DEF_SLOT_LEN;
  localparam int CYCLES = 270_000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  logic       rst_n, bcp_in_wr, bcp_in_full, bcp_out_rd, bcp_out_empty;
  logic       ch_info_valid, result_valid, drop, stall;
  logic [7:0] valid_wave;
  time_t      now;
  bcp_t       bcp_in, bcp_out;
  ch_info_t   ch_info;

  maxcu_scheduler u_dut (
    .clk, .rst_n, .now,
    .bcp_in_wr, .bcp_in, .bcp_in_full,
    .bcp_out_rd, .bcp_out, .bcp_out_empty,
    .ch_info_valid, .ch_info,
    .result_valid, .valid_wave, .drop, .stall
  );

  // ---------------------------------------------------------------- reference model
  int ch_s [NC][$];
  int ch_e [NC][$];
  int pend_s[$], pend_e[$], pend_p[$];     // BCPs written to the input FIFO, in order
  bcp_t exp_out[$];                        // refreshed BCPs expected from the output FIFO

  int n_case [8];
  int n_fill = 0, n_notfirst = 0, n_drop_nf = 0, n_drop_win = 0, n_stall = 0;
  int n_in_full = 0, n_retire = 0, n_wrap = 0, n_acc = 0, n_read = 0;

  function automatic void retire(input int c);
    for (int k = 0; k < NC; k++)
      for (int i = ch_s[k].size() - 1; i >= 0; i--)
        if (ch_e[k][i] / TAU < c / TAU) begin
          ch_s[k].delete(i); ch_e[k].delete(i); n_retire++;
        end
  endfunction

  function automatic int model_cu(input int k);
    int sum = 0;
    foreach (ch_s[k][i]) sum += ch_e[k][i] - ch_s[k][i];
    return sum;
  endfunction

  function automatic logic fits(input int k, input int s, input int e);
    foreach (ch_s[k][i]) if (!(ch_e[k][i] < s || e < ch_s[k][i])) return 1'b0;
    return 1'b1;
  endfunction

  // expected result of the commit in progress
  logic exp_pending;
  logic exp_drop;
  int   exp_wave, exp_s, exp_e;

  // evaluate the BCP committed in cycle c
  task automatic model_commit(input int c);
    int s, e, p, bi, first, cus [NC];
    logic win;
    s = pend_s.pop_front(); e = pend_e.pop_front(); p = pend_p.pop_front();
    retire(c);
    for (int k = 0; k < NC; k++) begin
      cus[k] = model_cu(k);
      check(u_dut.cu[k] == time_t'(cus[k]), $sformatf("t=%0d CU[%0d]=%0d model %0d", c, k, u_dut.cu[k], cus[k]));
      n_case[int'(u_dut.r_case[k])]++;
    end
    win = (s > c) && (e > s) && (e < (c / TAU) * TAU + NS * TAU);
    bi = -1; first = -1;
    if (win)
      for (int k = 0; k < NC; k++)
        if (fits(k, s, e)) begin
          if (first < 0) first = k;
          if (bi < 0 || cus[k] > cus[bi]) bi = k;
        end
    for (int k = 0; k < NC; k++)
      if (win) check(u_dut.en_feasible[k] == fits(k, s, e), $sformatf("t=%0d feasible[%0d]", c, k));
    exp_pending = 1'b1;
    exp_s = s; exp_e = e;
    if (!win) begin
      exp_drop = 1'b1; exp_wave = 0; n_drop_win++;
    end else if (bi < 0) begin
      exp_drop = 1'b1; exp_wave = 0; n_drop_nf++;
    end else begin
      bcp_t o;
      exp_drop = 1'b0; exp_wave = bi + 1; n_acc++;
      if (bi != first) n_notfirst++;
      if (u_dut.r_case[bi] inside {R_HEAD, R_TAIL, R_BOTH}) n_fill++;
      ch_s[bi].push_back(s); ch_e[bi].push_back(e);
      o.start_time = time_t'(s); o.end_time = time_t'(e);
      o.offset = time_t'(s - c); o.channel = 8'(bi + 1); o.payload = 16'(p);
      exp_out.push_back(o);
    end
  endtask

  // ---------------------------------------------------------------- the paper's trace
  localparam int FIG_N = 19;
  int fig_s [FIG_N] = '{4059, 3968, 2790, 3962, 1790, 3809, 1353, 2559, 2426, 1984,
                        4458, 2859, 2909, 3983, 4368, 3721, 5091, 5219, 4627};
  int fig_e [FIG_N] = '{4712, 4879, 3720, 4703, 2139, 5697, 2268, 3255, 3858, 3385,
                        4787, 3644, 4222, 5411, 4870, 5970, 7600, 6566, 5441};
  int fig_w [FIG_N-1] = '{1, 2, 2, 3, 2, 4, 4, 4, 3, 1, 5, 5, 6, 7, 6, 8, 2, 3};
  int fig_got = 0, fig_first_t = -1, fig_last_t = -1;

  initial begin
    #10_000_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int tnow, results, payload, fig_i;
    rst_n = 1'b0; bcp_in_wr = 1'b0; bcp_in = '0; bcp_out_rd = 1'b0;
    exp_pending = 1'b0; exp_drop = 1'b0; exp_wave = 0; exp_s = 0; exp_e = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    tnow = 0; results = 0; payload = 0; fig_i = 0;
    for (int cyc = 0; cyc < CYCLES; cyc++) begin
      check(now == time_t'(tnow), "time counter");
      if (tnow > 0 && (tnow % 65536) == 0) n_wrap++;

      // 1. registered result of last cycle's commit
      check(result_valid == exp_pending, $sformatf("t=%0d result strobe", tnow));
      if (exp_pending) begin
        check(drop == exp_drop && valid_wave == 8'(exp_wave),
              $sformatf("t=%0d burst %0d..%0d: wave=%0d drop=%0b, expected %0d/%0b",
                        tnow, exp_s, exp_e, valid_wave, drop, exp_wave, exp_drop));
        check(ch_info_valid == !exp_drop, "ch_info strobe");
        if (!exp_drop)
          check(ch_info.channel == 8'(exp_wave) && ch_info.start_time == time_t'(exp_s)
                && ch_info.end_time == time_t'(exp_e), "ch_info fields");
        if (results < FIG_N - 1) begin
          check(valid_wave == 8'(fig_w[results]) && !drop,
                $sformatf("trace burst %0d: channel %0d, expected %0d", results + 1, valid_wave, fig_w[results]));
          if (fig_first_t < 0) fig_first_t = tnow;
          fig_last_t = tnow;
          fig_got++;
        end
        results++;
      end
      exp_pending = 1'b0;

      // 2. the commit of this cycle
      if (u_dut.en_search) model_commit(tnow);
      if (stall) n_stall++;

      // 3. output FIFO reader, stopped now and then so that the FIFO fills
      bcp_out_rd = !bcp_out_empty && !((tnow % 16000) >= 10000 && (tnow % 16000) < 14000);
      if (bcp_out_rd) begin
        check(exp_out.size() > 0 && bcp_out == exp_out[0],
              $sformatf("t=%0d refreshed BCP %h", tnow, bcp_out));
        void'(exp_out.pop_front());
        n_read++;
      end

      // 4. BCP source
      bcp_in_wr = 1'b0;
      if (bcp_in_full) n_in_full++;
      if (!bcp_in_full) begin
        int s, e, ph, rate;
        logic go;
        if (fig_i < FIG_N) begin
          go = 1'b1; s = fig_s[fig_i]; e = fig_e[fig_i]; fig_i++;
        end else begin
          ph = (tnow / 4000) % 4;
          rate = (ph == 0) ? 150 : (ph == 1) ? 40 : (ph == 2) ? 8 : 1;
          go = (ph == 3) ? ((tnow % 4000) < 300 || $urandom_range(0, 149) == 0)
                         : ($urandom_range(0, rate - 1) == 0);
          s = tnow + int'($urandom_range(1280, 5376));
          e = s + int'($urandom_range(256, 2560));
          if ($urandom_range(0, 99) == 0) begin        // late: offset used up in the queue
            s = tnow + int'($urandom_range(0, 2)); e = s + 300;
          end else if ($urandom_range(0, 99) == 0) begin  // longer than the window reaches
            s = tnow + 6000; e = s + 2500;
          end
        end
        if (go) begin
          bcp_in_wr = 1'b1;
          bcp_in = '{start_time: time_t'(s), end_time: time_t'(e), offset: time_t'(s - tnow),
                     channel: 8'd0, payload: 16'(payload)};
          pend_s.push_back(s); pend_e.push_back(e); pend_p.push_back(payload);
          payload++;
        end
      end

      @(negedge clk);
      tnow++;
    end

    check(fig_got == FIG_N - 1 && fig_last_t - fig_first_t == FIG_N - 2,
          $sformatf("trace: %0d results in %0d cycles", fig_got, fig_last_t - fig_first_t + 1));
    $display("results=%0d accepted=%0d read=%0d", results, n_acc, n_read);
    $display("cases: c1=%0d c2=%0d c3=%0d c4=%0d c5=%0d", n_case[1], n_case[2], n_case[3], n_case[4], n_case[5]);
    $display("void filling=%0d maxcu!=firstfit=%0d drop_nofeasible=%0d drop_window=%0d",
             n_fill, n_notfirst, n_drop_nf, n_drop_win);
    $display("stall=%0d input_full=%0d retired=%0d wraps=%0d", n_stall, n_in_full, n_retire, n_wrap);
    for (int k = 1; k <= 5; k++) check(n_case[k] > 0, $sformatf("case %0d never occurred", k));
    check(n_fill > 0, "void filling never occurred");
    check(n_notfirst > 0, "max-CU choice never differed from first fit");
    check(n_drop_nf > 0, "drop for no feasible channel never occurred");
    check(n_drop_win > 0, "drop for late / out-of-window burst never occurred");
    check(n_stall > 0, "output FIFO stall never occurred");
    check(n_in_full > 0, "input FIFO never full");
    check(n_retire > 0, "slot retirement never occurred");
    check(n_wrap > 0, "time counter never wrapped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
