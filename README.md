# Hybrid fault tolerant architecture for combinational logic

Triple modular redundancy (TMR) protects a block of logic by building it three times
and voting on the outputs. It tolerates a fault in any one copy, but all three copies
switch on every clock, so it costs three times the dynamic power of the unprotected
logic.

This design keeps the three copies but runs only two of them at a time. The third is
held in standby with a constant input and does not switch. The two running copies are
compared bit by bit. While they agree, results flow through at one vector per clock.
When they disagree, three kinds of redundancy take over:

* **Information redundancy (detection).** Duplication and comparison. A mismatch
  drops the comparator's `Ok` signal.
* **Temporal redundancy (soft errors).** `Ok` is the load enable of the input and
  output registers. After a mismatch the input register keeps its vector, so the
  logic computes the same vector again in the next clock period. The output register
  keeps its last checked value, so no wrong result leaves the design.
* **Hardware redundancy (hard errors).** A small FSM picks which pair of copies runs.
  When errors persist, it moves to another pair. The standby copy then replaces the
  faulty one.

The FSM can also rotate the running pair during fault-free operation. This spreads the
running time, and with it the wear from aging, evenly over the three copies.

The protected logic circuit (LC) can be any combinational block. In this RTL it is a
16x16-bit unsigned multiplier with 32 inputs and 32 outputs. That is the function of
the ISCAS'85 benchmark c6288, one of the circuits the architecture was evaluated on.

## Data path

```
            +-----------+   +--------+   LC1   +---------+  A  +------------+
 in_data -->| input reg |-->| MUX_IN |-->LC2 -->| MUX_OUT |---->| output reg |--> out_data
            +-----^-----+   +---^----+   LC3   +----^----+--+  +-----^------+
                  |             |                   |    A  |B       |
                  |             +------- FSM -------+   +---v---v+   |
                  |                       ^             |   =    |   |
                  +-----------------------+-------------+  Ok    +---+
                                 (register enable = Ok and not fail)
```

One clock period handles one vector:

1. The input register holds vector V.
2. `hft_mux_in` sends V to the two running copies. The standby copy gets
   `STANDBY_VEC`, which is all zeros by default (inputs tied to ground).
3. `hft_mux_out` uses two 2:1 multiplexers per output bit to pick the two running
   outputs:

   | Pair | Port A | Port B | Standby |
   |------|--------|--------|---------|
   | 1-2  | LC1    | LC2    | LC3     |
   | 2-3  | LC3    | LC2    | LC1     |
   | 3-1  | LC1    | LC3    | LC2     |

4. `hft_comparator` XORs ports A and B and ORs the differences: `Ok = ~|(A ^ B)`.
5. At the clock edge:
   * If `Ok` is high, the output register takes port A and the input register takes
     the next vector.
   * If `Ok` is low, both registers hold their values.
   * In either case, the FSM picks the pair for the next period.

## The configuration FSM (`hft_fsm`)

This is the part that needs the most care. The state is the running pair together with
`level`, the number of consecutive errors so far. The FSM starts on pair 1-2 at level 0.
In every period:

* **No error:** `level` goes back to 0 and the pair stays the same. If a rotation
  request is present, the FSM moves to the next pair instead.
* **Error:** `level` goes up by one. Whether the pair changes depends on the policy,
  set by the `policy` input:
  * **FSM1** keeps the pair on the first error. The same pair recomputes, which is
    enough for a soft error. It moves to the next pair on the second error in a row,
    that is, whenever `level` was odd. Soft errors cost one period. A hard error costs
    two periods per pair tried.
  * **FSM2** moves to the next pair on every error. Hard errors are cleared sooner.
    A soft error may move the design off a good pair, which can cost extra periods
    when a hard fault is also present.
* **Final state:** after `MAX_ERR` = 6 errors in a row, every pair has had two tries,
  under either policy. The FSM then enters the final state. It raises `fail`, keeps
  both registers disabled, and stays there until reset.

Pairs always follow the cycle 1-2 -> 2-3 -> 3-1 -> 1-2.

### Example: errors in periods 3, 6 and 7

The input vectors are V1, V2, and so on.

| Period         | 1   | 2   | 3   | 4   | 5   | 6   | 7   | 8   | 9   |
|----------------|-----|-----|-----|-----|-----|-----|-----|-----|-----|
| Input vector   | V1  | V2  | V3  | V3  | V4  | V5  | V5  | V5  | V6  |
| Error          |     |     | x   |     |     | x   | x   |     |     |
| FSM1 pair      | 1-2 | 1-2 | 1-2 | 1-2 | 1-2 | 1-2 | 1-2 | 2-3 | 2-3 |
| FSM2 pair      | 1-2 | 1-2 | 1-2 | 2-3 | 2-3 | 2-3 | 3-1 | 1-2 | 1-2 |
| `level`        | 0   | 0   | 0   | 1   | 0   | 0   | 1   | 2   | 0   |

### Fault scenarios

These are the periods it takes to tolerate each fault. `Pi` is a permanent fault in
LCi. `Sjk` is a soft error in the first period that pair j-k is used. Each entry gives
the pair used in a period and its outcome: SE (soft error seen), HE (hard error seen)
or OK.

| Scenario | FSM1                                  | FSM2                               |
|----------|---------------------------------------|------------------------------------|
| S12      | 1-2 SE, 1-2 OK                        | 1-2 SE, 2-3 OK                     |
| P1       | 1-2 HE, 1-2 HE, 2-3 OK                | 1-2 HE, 2-3 OK                     |
| P2       | 1-2 HE x2, 2-3 HE x2, 3-1 OK          | 1-2 HE, 2-3 HE, 3-1 OK             |
| P3       | 1-2 OK                                | 1-2 OK                             |
| P1-S23   | 1-2 HE x2, 2-3 SE, 2-3 OK             | 1-2 HE, 2-3 SE, 3-1 HE, 1-2 HE, 2-3 OK |
| P2-S31   | 1-2 HE x2, 2-3 HE x2, 3-1 SE, 3-1 OK  | 1-2 HE, 2-3 HE, 3-1 SE, 1-2 HE, 2-3 HE, 3-1 OK |
| P3-S12   | 1-2 SE, 1-2 OK                        | 1-2 SE, 2-3 HE, 3-1 HE, 1-2 OK     |

FSM1 handles mixes of soft and hard errors faster. That makes it the better policy
early in a part's life, when manufacturing defects are the main concern. FSM2 clears
hard errors faster, so it suits later life, when aging adds permanent faults.
`policy` is a run-time input so that a system can switch between them.

## Aging balance

If the FSM never rotates, the two copies that start out running age faster than the
third. Once both wear out, no clean pair is left. Two rotation methods are provided.
Each has its own enable, and they can be used together. A request counts only in a
fault-free period.

* **Time** (`hft_age_timer`): counts fault-free periods and requests a rotation every
  `ROT_PERIOD` (1024) of them. Periods with errors are not counted and do not clear
  the count.
* **Pattern** (`hft_pattern_mem`): holds `PAT_DEPTH` (4) input patterns, each with a
  valid bit, written through `pat_wr_*`. It requests a rotation whenever the input
  register holds a stored pattern.

## Interface and timing (`hft_top`)

| Port | Dir | Width | Meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | Clock. Asynchronous active-low reset. |
| `in_data` | in | N_IN | Input vector. Low half is operand A, high half is operand B. |
| `in_ready` | out | 1 | `in_data` is loaded at this edge. Combinational: Ok and not fail. Hold `in_data` while it is low. |
| `out_data` | out | N_OUT | Output register. |
| `out_valid` | out | 1 | The output register took a checked result at the last edge. |
| `policy` | in | 1 | 0 = FSM1, 1 = FSM2. |
| `rot_time_en`, `rot_pat_en` | in | 1 | Enable the two rotation methods. |
| `pat_wr_en`, `pat_wr_addr`, `pat_wr_data` | in | 1, log2(PAT_DEPTH), N_IN | Write one stored pattern. |
| `inj_err` | in | 3 x N_OUT | Fault emulation, XORed onto the outputs of LC1..LC3. Tie to zero in use. |
| `cfg`, `level`, `error`, `fail` | out | 2, 3, 1, 1 | Running pair, consecutive errors, mismatch in this period, final state. |

Latency: a vector loaded at edge t is in `out_data` after edge t+1. Each detected
error in between adds one period. Throughput is one vector per period when there are
no faults. The comparator sits after the LC, so the critical path is LC + MUX_OUT +
comparator + register enable.

## Parameters

| Module | Parameter | Default | Note |
|--------|-----------|---------|------|
| `hft_top` | `N_IN`, `N_OUT` | 32, 32 | Inputs and outputs of the LC (c6288 size). |
| `hft_top` | `STANDBY_VEC` | 0 | Input of the standby copy. A chosen low-leakage vector can cut static power. |
| `hft_top` | `MAX_ERR` | 6 | Consecutive errors before the final state. |
| `hft_top` | `ROT_PERIOD` | 1024 | Fault-free periods between timed rotations. |
| `hft_top` | `PAT_DEPTH` | 4 | Entries in the pattern memory. |

To protect a different circuit, replace the body of `hft_lc`, keeping its `x`/`y`
ports, and set `N_IN`/`N_OUT`. Nothing else depends on the function.

## Cost compared with TMR

This is a transistor-count estimate for an LC with n inputs, m outputs and N_LC
transistors:

* TMR with a bitwise voter: 3 N_LC + 14(n + m) + 18m. The terms are the three copies,
  the enable flip-flops, and an 18-transistor majority gate per output bit.
* This design: about 3 N_LC + 14(n + m) + 9n + 14.67m + 340. The terms are the three
  copies, the same enable flip-flops, the input multiplexer (9 per input), the output
  multiplexers (8 per output), the comparator (about 6.67 per output) and about 340
  for the FSM. For c6288 (n = m = 32, N_LC = 8846) this gives about 28,530 transistors
  against 28,010 for TMR.

For large circuits the area difference is a few percent. The published evaluation
reports that TMR needs roughly 30% more dynamic power than this scheme on the larger
benchmarks, because only two copies switch. Unlike TMR with a bitwise voter, two copies
must agree on the whole output word before it is released. The aging-balance counter and
pattern memory are not included in the estimate.

## What is this design's own

These follow the architecture:

* the structure;
* the register enable driven by Ok;
* grounding the standby copy's inputs;
* the two error policies and the final state;
* the two aging-balance methods.

These are choices the architecture leaves open. Read them as assumptions:

* **LC function:** a behavioural 16x16 multiplier with c6288's function, not the
  benchmark's gate netlist. The other benchmark circuits (c5315, c7552, s15850,
  s35932, s38417, s38584, b14s-b22s) are not included.
* **FSM levels:** the level count, `MAX_ERR` = 6, and a final state that holds until
  reset. The count of six follows from the state-diagram shape (six states per pair
  plus one final state). It is also consistent with the longest scenario, which needs
  five consecutive errors.
* **Multiplexer wiring:** which LC each output multiplexer sees. Port A feeds the
  output register.
* **Handshake:** `in_ready` and `out_valid`.
* **Reset:** asynchronous, active low. It clears the registers to zero and the pattern
  memory's valid bits.
* **Rotation:** the rotation period, the pattern-memory size, its write port, and
  matching against the input register. A rotation request in an error period is
  ignored.
* **Fault emulation:** the `inj_err` port is a test aid, not part of the
  architecture. It adds one XOR per LC output bit.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`.

| Testbench | What it checks |
|-----------|----------------|
| `tb_hft_en_reg` | Load enable against a model register. |
| `tb_hft_mux_in` | Running and standby inputs for each pair. Default and non-zero standby vector. |
| `tb_hft_lc` | Corner operands and 2000 random products. |
| `tb_hft_mux_out`, `tb_hft_comparator` | Selection per pair. Equal, single-bit-different and random words. |
| `tb_hft_fsm` | The example above and all 14 fault scenarios, period by period. Final state after six errors, for both policies. Rotation only in fault-free periods. |
| `tb_hft_age_timer`, `tb_hft_pattern_mem` | Rotation requests against a model, with `PERIOD` = 5. Empty, disabled, matching, near-miss and overwritten patterns. |
| `tb_hft_top` | End-to-end test at the default sizes with no parameter overrides; details below. |

`tb_hft_top` keeps a scoreboard of every accepted vector. Each delivered result is
checked against the product and against the expected latency. The test then runs:

* fault-free streaming;
* all 14 scenarios with real data, checking the pair in each period and that no wrong
  result is delivered;
* the nine-period example above under both policies, checking the pair and the vector
  held in the input register in each period;
* two faulty copies, which drive the design into the final state;
* timed rotation with soft errors in between;
* pattern rotation.

It checks the standby copy's input in every period. It counts the mechanisms it
exercised and fails if any of them never happened: retry, reconfiguration, final
state, both rotation methods, and delayed results.

Run one testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/hft_pkg.sv tb/tb_hft_top.sv \
          --top-module tb_hft_top -Mdir obj_top
./obj_top/Vtb_hft_top
```

Every file in `rtl/` lints without warnings under `verilator --lint-only -Wall`. Every testbench passes.
