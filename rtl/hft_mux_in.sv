// hft_mux_in: input multiplexer (MUX_IN) of the hybrid fault tolerant architecture.
//
// It hands the input vector to the two logic circuits of the current configuration and
// drives the third one, which is in standby, with a constant vector so that it has no
// switching activity. The standby vector is all zeros by default (inputs tied to
// ground); STANDBY_VEC allows the alternative of a chosen low-leakage vector. One
// selection cell per LC input bit, as in the architecture's transistor count.
//
// Interface: cfg (running pair), in_vec[N]; lc_in[3][N] to LC1..LC3 (index 0 is LC1).
// Purely combinational.
module hft_mux_in
  import hft_pkg::*;
#(
  parameter int unsigned  N           = 32,
  parameter logic [N-1:0] STANDBY_VEC = '0
) (
  input  cfg_e                cfg,
  input  logic [N-1:0]        in_vec,
  output logic [2:0][N-1:0]   lc_in
);

  always_comb begin
    for (int unsigned k = 0; k < 3; k++) begin
      lc_in[k] = lc_running(cfg, k) ? in_vec : STANDBY_VEC;
    end
  end

endmodule
