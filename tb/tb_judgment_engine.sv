// tb_judgment_engine: self-checking test of one data channel's judgment engine.
//
// Part 1 rebuilds the worked example of five channels in an 8-slot window (slot k covers
// cycles 256k..256k+255): a new burst from slot 2 to slot 5, and the five channel
// occupancies that give case 1 (infeasible), case 2 (infeasible), case 3 (feasible),
// case 3 (feasible, larger CU) and case 5. It also checks the two-slot special case with
// and without the burst that sits between the neighbours, and a burst shorter than a slot.
// Part 2 runs a 32-slot engine against a reference model that keeps the scheduled bursts
// as a list of intervals: a burst is feasible exactly when it overlaps none of them
// (touching counts as overlap), CU is the summed length of the bursts whose tail slot has
// not yet passed. Time runs through several wraps of the 16-bit time counter.
module tb_judgment_engine;
  import maxcu_pkg::*;

  localparam int TAU = 256;

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

  // ---------------------------------------------------------------- 8-slot engine
  localparam int NS8 = 8;
  logic          rst8_n;
  logic          en8, upd8;
  logic [NS8-1:0] nb8;
  logic [2:0]    h8, t8;
  time_t         st8, et8, ln8, cu8;
  logic          feas8;
  r_case_e       rc8;

  judgment_engine #(.NUM_SLOTS(NS8)) u8 (
    .clk, .rst_n(rst8_n), .slot_tick(1'b0), .cur_slot(3'd0),
    .en_search(en8), .newbdp(nb8), .head_idx(h8), .tail_idx(t8),
    .start_time(st8), .end_time(et8), .length(ln8),
    .en_feasible(feas8), .cu(cu8), .r_case(rc8), .update(upd8)
  );

  // Slot-cover code built by enumeration (independent of the shift formula).
  task automatic present8(input int s, input int e);
    nb8 = '0;
    for (int k = s / TAU; k <= e / TAU; k++) nb8[k % NS8] = 1'b1;
    h8  = 3'((s / TAU) % NS8);
    t8  = 3'((e / TAU) % NS8);
    st8 = time_t'(s);
    et8 = time_t'(e);
    ln8 = time_t'(e - s);
    en8 = 1'b1;
  endtask

  task automatic load8(input int s, input int e);
    @(negedge clk);
    present8(s, e);
    #1;
    check(feas8, $sformatf("setup burst %0d..%0d must be feasible", s, e));
    upd8 = 1'b1;
    @(negedge clk);
    upd8 = 1'b0;
    en8  = 1'b0;
  endtask

  task automatic reset8();
    @(negedge clk);
    rst8_n = 1'b0; upd8 = 1'b0; en8 = 1'b0;
    @(negedge clk);
    rst8_n = 1'b1;
  endtask

  task automatic judge8(input int s, input int e, input logic exp_feas,
                        input r_case_e exp_case, input string name);
    @(negedge clk);
    present8(s, e);
    #1;
    check(feas8 === exp_feas, $sformatf("%s: feasible=%0b expected %0b", name, feas8, exp_feas));
    check(rc8 === exp_case, $sformatf("%s: case=%s expected %s", name, rc8.name(), exp_case.name()));
    en8 = 1'b0;
  endtask

  // New burst of the worked example: H9 in slot 2, T9 in slot 5.
  localparam int H9 = 600, T9 = 1400;

  task automatic part1();
    // channel 1: BDP1 slot0..slot2 ending after H9 -> case 1, infeasible
    reset8(); load8(100, 650);
    judge8(H9, T9, 1'b0, R_HEAD, "ch1");
    judge8(660, T9, 1'b1, R_HEAD, "ch1 later head");
    // channel 2: BDP2 slot5..slot7 starting before T9 -> case 2, infeasible
    reset8(); load8(1350, 1900);
    judge8(H9, T9, 1'b0, R_TAIL, "ch2");
    judge8(H9, 1300, 1'b1, R_TAIL, "ch2 earlier tail");
    // channel 3: BDP3 ends in slot2 before H9, BDP4 starts in slot5 after T9 -> case 3 feasible
    reset8(); load8(50, 550); load8(1450, 1950);
    check(cu8 == time_t'(1000), "ch3 CU");
    judge8(H9, T9, 1'b1, R_BOTH, "ch3");
    judge8(H9, 1460, 1'b0, R_BOTH, "ch3 tail collides");
    // channel 4: same shape with more utilisation; then the new burst is committed
    reset8(); load8(10, 580); load8(1420, 2000);
    check(cu8 == time_t'(1150), "ch4 CU");
    judge8(H9, T9, 1'b1, R_BOTH, "ch4");
    load8(H9, T9);
    check(cu8 == time_t'(1150 + T9 - H9), "ch4 CU after update");
    // state after scheduling: CH4 = 8'b11111111, H9 in slot 2 of the start table, T9 in
    // slot 5 of the end table, next to H5/T5 and H6/T6
    check(u8.ch == 8'hFF, "ch4 CH after update");
    check(u8.s_valid[2] && u8.s_time[2] == time_t'(H9) && u8.e_valid[5] && u8.e_time[5] == time_t'(T9),
          "ch4 tables after update");
    check(u8.s_time[0] == time_t'(10) && u8.e_time[2] == time_t'(580) && u8.s_time[5] == time_t'(1420)
          && u8.e_time[7] == time_t'(2000), "ch4 old entries kept");
    judge8(1000, 1300, 1'b0, R_OTHER, "ch4 full after update");
    // channel 5: BDP7 slot1..3 and BDP8 slot4..6 -> case 5
    reset8(); load8(300, 800); load8(1100, 1600);
    judge8(H9, T9, 1'b0, R_OTHER, "ch5");
    // two-slot special case: new burst slot3..slot4
    reset8(); load8(300, 780); load8(1120, 1600);
    judge8(800, 1100, 1'b1, R_BOTH, "two-slot, middle free");
    load8(790, 1110);
    judge8(800, 1100, 1'b0, R_BOTH, "two-slot, middle burst present");
    // a burst passing straight through both slots of a two-slot request
    reset8(); load8(700, 1300);
    judge8(800, 1100, 1'b0, R_BOTH, "two-slot, pass-through burst");
    // burst shorter than one slot: only accepted on an untouched slot
    reset8(); load8(100, 400);
    judge8(1030, 1100, 1'b1, R_CLEAR, "short burst, empty slot");
    judge8(420, 500, 1'b0, R_OTHER, "short burst, shared slot");
    // en_search low gates the result
    @(negedge clk); present8(1500, 1800); en8 = 1'b0; #1;
    check(!feas8, "no result without en_search");
  endtask

  // ---------------------------------------------------------------- 32-slot engine
  localparam int NS = 32;
  logic          rst_n;
  logic          tick, en, upd;
  logic [4:0]    cslot, hi, ti;
  logic [NS-1:0] nb;
  time_t         st, et, ln, cu;
  logic          feas;
  r_case_e       rc;

  judgment_engine #(.NUM_SLOTS(NS)) u32 (
    .clk, .rst_n, .slot_tick(tick), .cur_slot(cslot),
    .en_search(en), .newbdp(nb), .head_idx(hi), .tail_idx(ti),
    .start_time(st), .end_time(et), .length(ln),
    .en_feasible(feas), .cu(cu), .r_case(rc), .update(upd)
  );

  int q_s[$], q_e[$];
  int n_feas = 0, n_upd = 0, n_exp = 0;
  int seen_case [8];

  function automatic logic model_feasible(input int s, input int e);
    foreach (q_s[i]) if (!(q_e[i] < s || e < q_s[i])) return 1'b0;
    return 1'b1;
  endfunction

  function automatic int model_cu();
    int sum = 0;
    foreach (q_s[i]) sum += q_e[i] - q_s[i];
    return sum;
  endfunction

  task automatic part2(input int cycles);
    int now = 0;
    @(negedge clk);
    rst_n = 1'b0; upd = 1'b0; en = 1'b0; tick = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < cycles; c++) begin
      int s, e;
      logic mf;
      s = now + 1 + int'($urandom_range(0, 5376));
      e = s + int'($urandom_range(256, 2560));
      tick  = ((now % TAU) == TAU - 1);
      cslot = 5'((now / TAU) % NS);
      en    = 1'b0;
      upd   = 1'b0;
      if (e < (now / TAU) * TAU + NS * TAU && $urandom_range(0, 99) == 0) begin
        nb = '0;
        for (int k = s / TAU; k <= e / TAU; k++) nb[k % NS] = 1'b1;
        hi = 5'((s / TAU) % NS);
        ti = 5'((e / TAU) % NS);
        st = time_t'(s); et = time_t'(e); ln = time_t'(e - s);
        en = 1'b1;
        #1;
        mf = model_feasible(s, e);
        check(feas === mf, $sformatf("t=%0d burst %0d..%0d feasible=%0b model=%0b", now, s, e, feas, mf));
        seen_case[int'(rc)]++;
        if (mf) n_feas++;
        if (feas && mf) begin
          upd = 1'b1;
          q_s.push_back(s); q_e.push_back(e);
          n_upd++;
        end
      end
      @(negedge clk);
      // model of slot retirement: bursts whose tail slot just ended leave CU
      if (tick) begin
        for (int i = q_s.size() - 1; i >= 0; i--)
          if (q_e[i] / TAU == now / TAU) begin
            q_s.delete(i); q_e.delete(i); n_exp++;
          end
      end
      now++;
      if (c % 97 == 0) check(cu == time_t'(model_cu()), $sformatf("t=%0d CU=%0d model=%0d", now, cu, model_cu()));
    end
    en = 1'b0; upd = 1'b0; tick = 1'b0;
  endtask

  initial begin
    #100_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en8 = 1'b0; upd8 = 1'b0; rst8_n = 1'b0;
    en = 1'b0; upd = 1'b0; rst_n = 1'b0; tick = 1'b0; cslot = '0;
    nb = '0; hi = '0; ti = '0; st = '0; et = '0; ln = '0;
    part1();
    part2(600000);
    $display("random: feasible=%0d committed=%0d retired=%0d cases c1=%0d c2=%0d c3=%0d c4=%0d c5=%0d",
             n_feas, n_upd, n_exp, seen_case[1], seen_case[2], seen_case[3], seen_case[4], seen_case[5]);
    check(n_upd > 200 && n_exp > 200, "random run exercised commits and retirement");
    for (int k = 1; k <= 5; k++) check(seen_case[k] > 0, $sformatf("case %0d seen in random run", k));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
