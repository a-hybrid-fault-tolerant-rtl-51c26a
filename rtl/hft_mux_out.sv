// hft_mux_out: output multiplexer (MUX_OUT) of the hybrid fault tolerant architecture.
//
// It picks the outputs of the two running logic circuits for the comparator, with two
// 2:1 multiplexers per output bit as in the architecture's transistor count. Which LC
// each multiplexer can see is this design's choice: port A chooses between LC1 and LC3,
// port B between LC2 and LC3, which covers the three pairs:
//   1-2: A = LC1, B = LC2     2-3: A = LC3, B = LC2     3-1: A = LC1, B = LC3
// Port A also feeds the output register.
//
// Interface: cfg, lc_out[3][M] (index 0 is LC1); out_a[M], out_b[M]. Combinational.
module hft_mux_out
  import hft_pkg::*;
#(
  parameter int unsigned M = 32
) (
  input  cfg_e              cfg,
  input  logic [2:0][M-1:0] lc_out,
  output logic [M-1:0]      out_a,
  output logic [M-1:0]      out_b
);

  assign out_a = (cfg == CFG_23) ? lc_out[2] : lc_out[0];
  assign out_b = (cfg == CFG_31) ? lc_out[2] : lc_out[1];

endmodule
