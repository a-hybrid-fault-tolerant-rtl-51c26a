// hft_fsm: configuration FSM of the hybrid fault tolerant architecture.
//
// It chooses which pair of logic circuits runs (1-2, 2-3 or 3-1) from the comparator's
// Ok signal, one decision per clock period. Two error policies are built in and chosen
// with the `policy` input:
//   FSM1  on a first error the pair is kept and recomputes the same input; a second
//         error in a row moves to the next pair. Soft errors are tolerated first.
//   FSM2  every error moves to the next pair. Hard errors are tolerated first.
// A fault-free period returns the FSM to the pair's initial state. The state is the
// pair together with the number of consecutive errors seen (`level`); after MAX_ERR
// errors in a row every pair has had its share of retries (two each with the default
// of 6, under both policies) and the FSM enters the final state, which raises `fail`
// and is left only by reset. The initial state is pair 1-2 at level 0.
//
// Aging balance: when `rotate` is high in a fault-free period the FSM moves to the next
// pair, so that all three circuits share the running time. The rotation requests come
// from a fault-free-period counter and from an input-pattern memory (hft_age_timer,
// hft_pattern_mem).
//
// Following the architecture: the two policies, the retry of the same input, the final
// state and periodic rotation. This design's own choices: the level counter as the
// state encoding, MAX_ERR = 6, the final state being absorbing, and policy being a run
// time input.
//
// Interface: clk, rst_n, ok, policy, rotate in; cfg, level, fail out (all registered).
// Timing: a decision taken from ok in period t is the configuration of period t+1.
module hft_fsm
  import hft_pkg::*;
#(
  parameter int unsigned MAX_ERR = 6,
  localparam int unsigned LW     = $clog2(MAX_ERR + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          ok,
  input  policy_e       policy,
  input  logic          rotate,
  output cfg_e          cfg,
  output logic [LW-1:0] level,
  output logic          fail
);

  cfg_e          cfg_d;
  logic [LW-1:0] level_d;
  logic          fail_d;

  always_comb begin
    cfg_d   = cfg;
    level_d = level;
    fail_d  = fail;
    if (!fail) begin
      if (!ok) begin
        if (level == LW'(MAX_ERR - 1)) begin
          fail_d  = 1'b1;
          level_d = LW'(MAX_ERR);
        end else begin
          level_d = level + 1'b1;
          // FSM1 moves on the second error on a pair (odd level), FSM2 on every error.
          if (policy == POL_FSM2 || level[0]) cfg_d = next_cfg(cfg);
        end
      end else begin
        level_d = '0;
        if (rotate) cfg_d = next_cfg(cfg);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg   <= CFG_12;
      level <= '0;
      fail  <= 1'b0;
    end else begin
      cfg   <= cfg_d;
      level <= level_d;
      fail  <= fail_d;
    end
  end

  // Rules of the state encoding: only the three pairs, level never above MAX_ERR.
  always_comb begin
    if (rst_n) begin
      a_cfg_legal: assert (cfg != 2'd3) else $error("illegal configuration");
      a_level_range: assert (level <= LW'(MAX_ERR)) else $error("level out of range");
    end
  end

endmodule
