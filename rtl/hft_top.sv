// hft_top: hybrid fault tolerant architecture around one combinational logic circuit.
//
// The logic circuit (LC) is built three times, as in triple modular redundancy, but
// only two copies run at a time; the third is held in standby with a constant input.
// Three kinds of redundancy work together:
//   information  the two running copies are compared (duplication and comparison);
//   temporal     on a mismatch the Ok signal disables the input and output registers,
//                so the same input vector is computed again in the next clock period;
//   hardware     the configuration FSM moves to another pair of copies when errors
//                persist, replacing a permanently faulty copy by the standby one.
// Data path, one clock period per vector:
//   in_data -> input register -> MUX_IN -> LC1/LC2/LC3 -> MUX_OUT -> comparator -> Ok
//                                                         MUX_OUT port A -> output register
// The FSM can also rotate the running pair in fault-free periods, after PERIOD
// fault-free periods (hft_age_timer) or when a stored input pattern is applied
// (hft_pattern_mem), to balance the aging of the three copies.
//
// Interface
//   in_data / in_ready  in_data is loaded into the input register at an edge where
//                       in_ready is high; otherwise the source must hold it. in_ready
//                       is Ok and not failed (combinational).
//   out_data / out_valid the output register; out_valid is high in the period after it
//                       was loaded with a checked result.
//   policy              0: FSM1 (retry, then reconfigure), 1: FSM2 (reconfigure).
//   rot_time_en, rot_pat_en, pat_wr_*  aging rotation controls.
//   inj_err[k]          XORed onto the outputs of LC k+1; a fault-emulation port for
//                       test, tie to zero in use.
//   cfg, level, error, fail  status: running pair, consecutive errors, comparator
//                       mismatch this period, final state (no tolerance left).
// Latency: a vector loaded at edge t appears on out_data after edge t+1 when fault
// free; each detected error adds one period.
//
// Following the architecture: the structure, the register enables driven by Ok, the
// standby-by-ground input multiplexer, the two FSM policies and the rotation methods.
// This design's own choices: the LC function (see hft_lc), the interface handshake,
// out_valid, the fault-emulation port, resets and the sizes of the rotation blocks.
module hft_top
  import hft_pkg::*;
#(
  parameter int unsigned      N_IN        = 32,
  parameter int unsigned      N_OUT       = 32,
  parameter logic [N_IN-1:0]  STANDBY_VEC = '0,
  parameter int unsigned      MAX_ERR     = 6,
  parameter int unsigned      ROT_PERIOD  = 1024,
  parameter int unsigned      PAT_DEPTH   = 4,
  localparam int unsigned     LW          = $clog2(MAX_ERR + 1),
  localparam int unsigned     PAW         = (PAT_DEPTH > 1) ? $clog2(PAT_DEPTH) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [N_IN-1:0]       in_data,
  output logic                  in_ready,
  output logic [N_OUT-1:0]      out_data,
  output logic                  out_valid,
  input  policy_e               policy,
  input  logic                  rot_time_en,
  input  logic                  rot_pat_en,
  input  logic                  pat_wr_en,
  input  logic [PAW-1:0]        pat_wr_addr,
  input  logic [N_IN-1:0]       pat_wr_data,
  input  logic [2:0][N_OUT-1:0] inj_err,
  output cfg_e                  cfg,
  output logic [LW-1:0]         level,
  output logic                  error,
  output logic                  fail
);

  logic [N_IN-1:0]        in_q;
  logic [2:0][N_IN-1:0]   lc_in;
  logic [2:0][N_OUT-1:0]  lc_y;
  logic [2:0][N_OUT-1:0]  lc_out;
  logic [N_OUT-1:0]       sel_a, sel_b;
  logic                   ok;
  logic                   reg_en;
  logic                   rot_time, rot_pat;

  // Registers load only when the running pair agrees and the FSM is not failed.
  assign reg_en   = ok && !fail;
  assign in_ready = reg_en;
  assign error    = !ok;

  hft_en_reg #(.W(N_IN)) u_in_reg (
    .clk, .rst_n, .en(reg_en), .d(in_data), .q(in_q)
  );

  hft_mux_in #(.N(N_IN), .STANDBY_VEC(STANDBY_VEC)) u_mux_in (
    .cfg, .in_vec(in_q), .lc_in
  );

  for (genvar k = 0; k < 3; k++) begin : g_lc
    hft_lc #(.N_IN(N_IN), .N_OUT(N_OUT)) u_lc (.x(lc_in[k]), .y(lc_y[k]));
    assign lc_out[k] = lc_y[k] ^ inj_err[k];
  end

  hft_mux_out #(.M(N_OUT)) u_mux_out (
    .cfg, .lc_out, .out_a(sel_a), .out_b(sel_b)
  );

  hft_comparator #(.M(N_OUT)) u_cmp (.a(sel_a), .b(sel_b), .ok);

  hft_en_reg #(.W(N_OUT)) u_out_reg (
    .clk, .rst_n, .en(reg_en), .d(sel_a), .q(out_data)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= reg_en;
  end

  hft_age_timer #(.PERIOD(ROT_PERIOD)) u_age_timer (
    .clk, .rst_n, .en(rot_time_en && !fail), .ok, .rotate(rot_time)
  );

  hft_pattern_mem #(.N(N_IN), .DEPTH(PAT_DEPTH)) u_pat_mem (
    .clk, .rst_n, .wr_en(pat_wr_en), .wr_addr(pat_wr_addr), .wr_data(pat_wr_data),
    .en(rot_pat_en), .vec(in_q), .rotate(rot_pat)
  );

  hft_fsm #(.MAX_ERR(MAX_ERR)) u_fsm (
    .clk, .rst_n, .ok, .policy, .rotate(rot_time || rot_pat), .cfg, .level, .fail
  );

endmodule
