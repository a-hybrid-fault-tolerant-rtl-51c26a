// tb_hft_fsm: self-checking test of the configuration FSM.
//
// 1. The two published reconfiguration examples: nine clock periods with errors in
//    periods 3, 6 and 7; the configuration of every period is compared with the
//    expected sequence for FSM1 and for FSM2.
// 2. The seven fault scenarios (soft error on first use of a pair, permanent fault in
//    one circuit, and their combinations) for both policies. The testbench derives Ok
//    from the scenario and the configuration the FSM is in, and compares the pair used
//    in every period and the error/ok outcome with the expected tables.
// 3. Final state: six errors in a row raise fail, which then holds regardless of Ok.
// 4. Rotation requests move to the next pair only in fault-free periods.
module tb_hft_fsm;
  import hft_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, ok = 1'b1, rotate = 1'b0;
  policy_e policy = POL_FSM1;
  cfg_e cfg;
  logic [2:0] level;
  logic fail;
  int checks = 0, failures = 0;

  hft_fsm dut (.clk, .rst_n, .ok, .policy, .rotate, .cfg, .level, .fail);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic do_reset(policy_e p);
    @(negedge clk);
    rst_n = 1'b0;
    policy = p;
    ok = 1'b1;
    rotate = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
  endtask

  // One clock period: apply ok/rotate before the edge, return the configuration that
  // was in force during the period.
  task automatic period(logic o, logic r, output cfg_e used);
    @(negedge clk);
    ok = o;
    rotate = r;
    used = cfg;
    @(posedge clk);
  endtask

  // Same, for a caller that is already at the falling edge.
  task automatic period_now(logic o, logic r, output cfg_e used);
    ok = o;
    rotate = r;
    used = cfg;
    @(posedge clk);
  endtask

  // Pair and level in force in the coming period (read at the falling edge).
  task automatic peek(output int pr, output int lv);
    @(negedge clk);
    pr = int'(cfg);
    lv = int'(level);
  endtask

  // Pairs as numbers 0:1-2 1:2-3 2:3-1; standby circuit of a pair.
  function automatic logic pair_has(int pair, int lc);  // lc is 1..3
    case (pair)
      0: return lc == 1 || lc == 2;
      1: return lc == 2 || lc == 3;
      default: return lc == 3 || lc == 1;
    endcase
  endfunction

  // Scenario: perm = faulty circuit (0 none), soft_pair = pair whose first use has a soft
  // error (-1 none). exp_cfg/exp_res: expected pair and outcome (0 OK, 1 SE, 2 HE) of
  // each period until the error is tolerated.
  task automatic scenario(policy_e p, string name, int perm, int soft_pair,
                          int exp_cfg[$], int exp_res[$]);
    bit used_before [3] = '{0, 0, 0};
    do_reset(p);
    for (int t = 0; t < exp_cfg.size(); t++) begin
      cfg_e u;
      int pr, lv, res;
      logic o;
      peek(pr, lv);
      res = 0;
      if (perm != 0 && pair_has(pr, perm)) res = 2;
      else if (soft_pair == pr && !used_before[pr]) res = 1;
      used_before[pr] = 1'b1;
      o = (res == 0);
      period_now(o, 1'b0, u);
      check($sformatf("%s %s period %0d pair", p.name(), name, t + 1), int'(u), exp_cfg[t]);
      check($sformatf("%s %s period %0d outcome", p.name(), name, t + 1), res, exp_res[t]);
    end
  endtask

  initial begin
    cfg_e u;
    int seq1 [9] = '{0, 0, 0, 0, 0, 0, 0, 1, 1};
    int seq2 [9] = '{0, 0, 0, 1, 1, 1, 2, 0, 0};
    int lvl1 [9] = '{0, 0, 0, 1, 0, 0, 1, 2, 0};
    int lvl2 [9] = '{0, 0, 0, 1, 0, 0, 1, 2, 0};
    repeat (2) @(posedge clk);

    // 1. Reconfiguration examples: errors in periods 3, 6, 7.
    do_reset(POL_FSM1);
    for (int t = 1; t <= 9; t++) begin
      int pr, lv;
      peek(pr, lv);
      check($sformatf("FSM1 example period %0d level", t), lv, lvl1[t-1]);
      period_now(!(t == 3 || t == 6 || t == 7), 1'b0, u);
      check($sformatf("FSM1 example period %0d pair", t), int'(u), seq1[t-1]);
    end
    do_reset(POL_FSM2);
    for (int t = 1; t <= 9; t++) begin
      int pr, lv;
      peek(pr, lv);
      check($sformatf("FSM2 example period %0d level", t), lv, lvl2[t-1]);
      period_now(!(t == 3 || t == 6 || t == 7), 1'b0, u);
      check($sformatf("FSM2 example period %0d pair", t), int'(u), seq2[t-1]);
    end

    // 2. Fault scenarios, FSM1 (retry once, then next pair).
    scenario(POL_FSM1, "S12",    0,  0, '{0, 0},             '{1, 0});
    scenario(POL_FSM1, "P1",     1, -1, '{0, 0, 1},          '{2, 2, 0});
    scenario(POL_FSM1, "P2",     2, -1, '{0, 0, 1, 1, 2},    '{2, 2, 2, 2, 0});
    scenario(POL_FSM1, "P3",     3, -1, '{0},                '{0});
    scenario(POL_FSM1, "P1-S23", 1,  1, '{0, 0, 1, 1},       '{2, 2, 1, 0});
    scenario(POL_FSM1, "P2-S31", 2,  2, '{0, 0, 1, 1, 2, 2}, '{2, 2, 2, 2, 1, 0});
    scenario(POL_FSM1, "P3-S12", 3,  0, '{0, 0},             '{1, 0});
    // FSM2 (next pair on every error).
    scenario(POL_FSM2, "S12",    0,  0, '{0, 1},             '{1, 0});
    scenario(POL_FSM2, "P1",     1, -1, '{0, 1},             '{2, 0});
    scenario(POL_FSM2, "P2",     2, -1, '{0, 1, 2},          '{2, 2, 0});
    scenario(POL_FSM2, "P3",     3, -1, '{0},                '{0});
    scenario(POL_FSM2, "P1-S23", 1,  1, '{0, 1, 2, 0, 1},    '{2, 1, 2, 2, 0});
    scenario(POL_FSM2, "P2-S31", 2,  2, '{0, 1, 2, 0, 1, 2}, '{2, 2, 1, 2, 2, 0});
    scenario(POL_FSM2, "P3-S12", 3,  0, '{0, 1, 2, 0},       '{1, 2, 2, 0});

    // 3. Final state after six consecutive errors, both policies.
    for (int p = 0; p < 2; p++) begin
      do_reset(policy_e'(p));
      for (int t = 0; t < 5; t++) period(1'b0, 1'b0, u);
      @(negedge clk);
      check("no fail after five errors", int'(fail), 0);
      period(1'b0, 1'b0, u);
      @(negedge clk);
      check("fail after six errors", int'(fail), 1);
      for (int t = 0; t < 4; t++) period(1'b1, 1'b1, u);
      @(negedge clk);
      check("final state is kept", int'(fail), 1);
      check("final state keeps the pair", int'(cfg), int'(u));
    end

    // 4. Rotation: only in fault-free periods, always to the next pair.
    do_reset(POL_FSM1);
    for (int t = 0; t < 6; t++) begin
      cfg_e prev;
      @(negedge clk);
      prev = cfg;
      period_now(1'b1, 1'b1, u);
      @(negedge clk);
      check("rotation moves to next pair", int'(cfg), int'(next_cfg(prev)));
    end
    period(1'b0, 1'b1, u);   // error: FSM1 keeps the pair despite the request
    @(negedge clk);
    check("no rotation on error", int'(cfg), int'(u));
    check("error counted", int'(level), 1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
