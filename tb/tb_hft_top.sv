// tb_hft_top: end-to-end test of the hybrid fault tolerant architecture at its default
// size (32-input, 32-output logic circuit, six-error final state, rotation after 1024
// fault-free periods, four stored patterns). No parameter of the top is overridden.
//
// A scoreboard keeps every input vector the design accepts and checks every result it
// delivers against the 16x16 product computed here, including the latency: one clock
// period after acceptance plus one period per detected error in between. Faults are
// emulated through the fault-emulation port: a permanent fault XORs a fixed non-zero
// mask onto one circuit's outputs for the whole run, a soft error XORs a random mask
// onto one running circuit for one period.
//
// Phases:
//   1. fault-free streaming of random vectors (throughput of one vector per period);
//   2. the seven fault scenarios of each policy (soft error on first use of a pair,
//      permanent fault in one circuit, and combinations), checking the pair used in
//      each period and that no wrong result ever leaves the design;
//   3. two faulty circuits: the final state is reached, nothing is delivered;
//   4. rotation after 1024 fault-free periods, with soft errors in between;
//   5. rotation on stored input patterns.
// Throughout, the standby circuit must see the all-zero standby vector. Each mechanism
// is counted, and one that never happened counts as a failure.
module tb_hft_top;
  import hft_pkg::*;

  logic               clk = 1'b0, rst_n = 1'b0;
  logic [31:0]        in_data = '0;
  logic               in_ready, out_valid;
  logic [31:0]        out_data;
  policy_e            policy = POL_FSM1;
  logic               rot_time_en = 1'b0, rot_pat_en = 1'b0, pat_wr_en = 1'b0;
  logic [1:0]         pat_wr_addr = '0;
  logic [31:0]        pat_wr_data = '0;
  logic [2:0][31:0]   inj_err = '0;
  cfg_e               cfg;
  logic [2:0]         level;
  logic               error, fail;

  hft_top dut (
    .clk, .rst_n, .in_data, .in_ready, .out_data, .out_valid, .policy,
    .rot_time_en, .rot_pat_en, .pat_wr_en, .pat_wr_addr, .pat_wr_data, .inj_err,
    .cfg, .level, .error, .fail
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_err = 0, n_retry = 0, n_reconf = 0, n_fail = 0, n_rot_time = 0, n_rot_pat = 0;
  int n_standby = 0, n_delivered = 0, n_fsm1 = 0, n_fsm2 = 0, n_latency_err = 0;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 30) $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  function automatic logic [31:0] ref_f(logic [31:0] x);
    longint unsigned p = longint'(x[15:0]) * longint'(x[31:16]);
    return p[31:0];
  endfunction

  // ---------------------------------------------------------------- scoreboard
  typedef struct { logic [31:0] v; int edge_no; int stalls; } acc_t;
  acc_t   acc_q [$];
  int     edge_no = 0, stall_edges = 0;
  logic   acc_prev = 1'b0;

  always @(posedge clk) begin
    if (rst_n) begin
      edge_no++;
      acc_prev = in_ready;
      if (in_ready) acc_q.push_back('{in_data, edge_no, stall_edges});
      if (!in_ready) stall_edges++;
    end
  end

  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      acc_t a;
      if (acc_q.size() == 0) begin
        checks++;
        failures++;
        $display("FAIL result with no accepted vector");
      end else begin
        a = acc_q.pop_front();
        check($sformatf("result of %h", a.v), out_data, ref_f(a.v));
        // Loaded at the edge just past: one period after acceptance plus one per stall.
        checks++;
        if (edge_no - a.edge_no != 1 + (stall_edges - a.stalls)) begin
          failures++;
          $display("FAIL latency %0d for %h", edge_no - a.edge_no, a.v);
        end
        if (stall_edges != a.stalls) n_latency_err++;
        n_delivered++;
      end
    end
  end

  // The standby circuit sees the standby vector, the running ones the input register.
  always @(negedge clk) begin
    if (rst_n) begin
      int sb;
      sb = (cfg == CFG_12) ? 2 : (cfg == CFG_23) ? 0 : 1;
      for (int k = 0; k < 3; k++) begin
        check($sformatf("LC%0d input", k + 1), dut.lc_in[k], (k == sb) ? 32'h0 : dut.in_q);
      end
      n_standby++;
    end
  end

  // ---------------------------------------------------------------- stimulus
  logic [31:0] forced_vec;
  logic        use_forced = 1'b0;

  task automatic do_reset(policy_e p);
    @(negedge clk);
    rst_n = 1'b0;
    policy = p;
    inj_err = '0;
    rot_time_en = 1'b0;
    rot_pat_en = 1'b0;
    @(negedge clk);
    acc_q.delete();
    acc_q.push_back('{32'h0, 0, 0});   // reset content of the input register
    edge_no = 0;
    stall_edges = 0;
    acc_prev = 1'b0;
    in_data = $urandom;
    rst_n = 1'b1;
  endtask

  // One clock period from a falling edge to the next. `inj` is the fault pattern of
  // this period. Returns the pair in force and whether an error was flagged.
  task automatic step(logic [2:0][31:0] inj, output cfg_e used, output logic err);
    if (acc_prev) in_data = use_forced ? forced_vec : $urandom;
    use_forced = 1'b0;
    inj_err = inj;
    used = cfg;
    #1;
    err = error;
    if (err) begin
      n_err++;
      if (policy == POL_FSM1) n_fsm1++; else n_fsm2++;
    end
    @(posedge clk);
    @(negedge clk);
    if (err && !fail) begin
      if (cfg == used) n_retry++; else n_reconf++;
    end
  endtask

  function automatic logic pair_has(int pair, int lc);
    case (pair)
      0: return lc == 1 || lc == 2;
      1: return lc == 2 || lc == 3;
      default: return lc == 3 || lc == 1;
    endcase
  endfunction

  function automatic int pair_first(int pair);   // 0-based index of the pair's first LC
    return (pair == 0) ? 0 : (pair == 1) ? 1 : 2;
  endfunction

  localparam logic [31:0] PMASK [3] = '{32'h0000_0100, 32'h0040_0000, 32'h8000_0001};

  task automatic scenario(policy_e p, string name, int perm, int soft_pair,
                          int exp_cfg[$], int exp_res[$]);
    bit used_before [3] = '{0, 0, 0};
    do_reset(p);
    for (int t = 0; t < exp_cfg.size() + 20; t++) begin
      logic [2:0][31:0] inj;
      cfg_e u;
      logic e;
      int pr, res;
      pr = int'(cfg);
      inj = '0;
      if (perm != 0) inj[perm-1] = PMASK[perm-1];
      res = (perm != 0 && pair_has(pr, perm)) ? 2 : 0;
      if (res == 0 && soft_pair == pr && !used_before[pr]) begin
        inj[pair_first(pr)] = $urandom | 32'h10;
        res = 1;
      end
      used_before[pr] = 1'b1;
      step(inj, u, e);
      check($sformatf("%s %s error flag, period %0d", p.name(), name, t + 1), e, res != 0);
      if (t < exp_cfg.size()) begin
        check($sformatf("%s %s pair, period %0d", p.name(), name, t + 1), int'(u), exp_cfg[t]);
        check($sformatf("%s %s outcome, period %0d", p.name(), name, t + 1), res, exp_res[t]);
      end else begin
        check($sformatf("%s %s tolerated, period %0d", p.name(), name, t + 1), res, 0);
      end
    end
    check($sformatf("%s %s not failed", p.name(), name), fail, 0);
  endtask

  initial begin
    cfg_e u;
    logic e;
    int   okp, rots, d0;
    logic [31:0] pat;

    // 1. Fault-free streaming.
    do_reset(POL_FSM1);
    d0 = n_delivered;
    for (int t = 0; t < 200; t++) step('0, u, e);
    #1 check("fault-free throughput", n_delivered - d0, 200);
    check("fault-free pair", int'(cfg), int'(CFG_12));

    // 2. Fault scenarios. Pairs: 0 = 1-2, 1 = 2-3, 2 = 3-1; outcomes 0 OK, 1 SE, 2 HE.
    scenario(POL_FSM1, "S12",    0,  0, '{0, 0},             '{1, 0});
    scenario(POL_FSM1, "P1",     1, -1, '{0, 0, 1},          '{2, 2, 0});
    scenario(POL_FSM1, "P2",     2, -1, '{0, 0, 1, 1, 2},    '{2, 2, 2, 2, 0});
    scenario(POL_FSM1, "P3",     3, -1, '{0},                '{0});
    scenario(POL_FSM1, "P1-S23", 1,  1, '{0, 0, 1, 1},       '{2, 2, 1, 0});
    scenario(POL_FSM1, "P2-S31", 2,  2, '{0, 0, 1, 1, 2, 2}, '{2, 2, 2, 2, 1, 0});
    scenario(POL_FSM1, "P3-S12", 3,  0, '{0, 0},             '{1, 0});
    scenario(POL_FSM2, "S12",    0,  0, '{0, 1},             '{1, 0});
    scenario(POL_FSM2, "P1",     1, -1, '{0, 1},             '{2, 0});
    scenario(POL_FSM2, "P2",     2, -1, '{0, 1, 2},          '{2, 2, 0});
    scenario(POL_FSM2, "P3",     3, -1, '{0},                '{0});
    scenario(POL_FSM2, "P1-S23", 1,  1, '{0, 1, 2, 0, 1},    '{2, 1, 2, 2, 0});
    scenario(POL_FSM2, "P2-S31", 2,  2, '{0, 1, 2, 0, 1, 2}, '{2, 2, 1, 2, 2, 0});
    scenario(POL_FSM2, "P3-S12", 3,  0, '{0, 1, 2, 0},       '{1, 2, 2, 0});

    // 2b. Nine-period example: soft errors in periods 3, 6 and 7. The input register
    //     must hold V1 V2 V3 V3 V4 V5 V5 V5 V6 and the pairs follow each policy.
    for (int p = 0; p < 2; p++) begin
      int vidx [9] = '{1, 2, 3, 3, 4, 5, 5, 5, 6};
      int pr1 [9] = '{0, 0, 0, 0, 0, 0, 0, 1, 1};
      int pr2 [9] = '{0, 0, 0, 1, 1, 1, 2, 0, 0};
      logic [31:0] vseen [7];
      do_reset(policy_e'(p));
      step('0, u, e);               // loads V1
      for (int t = 1; t <= 9; t++) begin
        logic [2:0][31:0] inj;
        inj = '0;
        if (t == 3 || t == 6 || t == 7) inj[pair_first(int'(cfg))] = 32'h0001_0000;
        if (t == 1 || vidx[t-1] != vidx[t-2]) vseen[vidx[t-1]] = dut.in_q;
        check($sformatf("%s example: input vector in period %0d", policy.name(), t),
              dut.in_q, vseen[vidx[t-1]]);
        if (t > 1 && vidx[t-1] != vidx[t-2])
          check($sformatf("%s example: new vector in period %0d", policy.name(), t),
                dut.in_q != vseen[vidx[t-2]], 1);
        step(inj, u, e);
        check($sformatf("%s example: pair in period %0d", policy.name(), t), int'(u),
              (p == 0) ? pr1[t-1] : pr2[t-1]);
        check($sformatf("%s example: error in period %0d", policy.name(), t), e,
              (t == 3 || t == 6 || t == 7));
      end
    end

    // 3. LC1 and LC2 permanently faulty (different masks): no pair is clean.
    for (int p = 0; p < 2; p++) begin
      logic [2:0][31:0] inj;
      logic [31:0] held;
      do_reset(policy_e'(p));
      inj = '0;
      inj[0] = PMASK[0];
      inj[1] = PMASK[1];
      for (int t = 0; t < 6; t++) begin
        check("not failed before six errors", fail, 0);
        step(inj, u, e);
      end
      check("final state reached", fail, 1);
      if (fail) n_fail++;
      held = out_data;
      for (int t = 0; t < 10; t++) begin
        step(inj, u, e);
        check("final state: nothing accepted", in_ready, 0);
        check("final state: output held", out_data, held);
        check("final state kept", fail, 1);
      end
    end

    // 4. Rotation after 1024 fault-free periods; soft errors do not count.
    do_reset(POL_FSM1);
    rot_time_en = 1'b1;
    okp = 0;
    rots = 0;
    for (int t = 0; t < 3200; t++) begin
      logic [2:0][31:0] inj;
      cfg_e prev_cfg;
      inj = '0;
      prev_cfg = cfg;
      if (t % 700 == 350) inj[pair_first(int'(cfg))] = 32'h4;   // soft error
      step(inj, u, e);
      if (!e) okp++;
      if (cfg != prev_cfg) begin
        rots++;
        n_rot_time++;
        check("rotation only after 1024 fault-free periods", okp % 1024, 0);
        check("rotation to next pair", int'(cfg), int'(next_cfg(prev_cfg)));
      end
    end
    check("number of timed rotations", rots, okp / 1024);
    rot_time_en = 1'b0;

    // 5. Rotation on stored input patterns.
    do_reset(POL_FSM2);
    pat = 32'h1234_ABCD;
    @(negedge clk);
    pat_wr_en = 1'b1;
    pat_wr_addr = 2'd1;
    pat_wr_data = pat;
    @(negedge clk);
    pat_wr_en = 1'b0;
    rot_pat_en = 1'b1;
    rots = 0;
    for (int t = 0; t < 60; t++) begin
      cfg_e prev_cfg;
      logic hit;
      if (t % 15 == 5) begin
        forced_vec = pat;
        use_forced = 1'b1;
      end
      prev_cfg = cfg;
      #1 hit = (dut.in_q == pat);
      step('0, u, e);
      check("pattern rotation", int'(cfg), int'(hit ? next_cfg(prev_cfg) : prev_cfg));
      if (cfg != prev_cfg) begin
        rots++;
        n_rot_pat++;
      end
    end
    check("number of pattern rotations", rots, 4);

    // Every mechanism must have happened.
    check("errors detected", n_err > 0, 1);
    check("FSM1 retry on the same pair", n_retry > 0, 1);
    check("reconfiguration", n_reconf > 0, 1);
    check("FSM1 used on errors", n_fsm1 > 0, 1);
    check("FSM2 used on errors", n_fsm2 > 0, 1);
    check("recomputation delayed a result", n_latency_err > 0, 1);
    check("final state", n_fail > 0, 1);
    check("timed rotation", n_rot_time > 0, 1);
    check("pattern rotation", n_rot_pat > 0, 1);
    check("standby checked", n_standby > 0, 1);
    $display("mechanisms: errors=%0d retries=%0d reconfigurations=%0d final=%0d timed_rot=%0d pattern_rot=%0d delayed_results=%0d delivered=%0d",
             n_err, n_retry, n_reconf, n_fail, n_rot_time, n_rot_pat, n_latency_err, n_delivered);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
