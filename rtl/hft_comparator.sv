// hft_comparator: the comparator ("=") of the hybrid fault tolerant architecture.
//
// Duplication and comparison is the architecture's error detection: the outputs of the
// two running logic circuits are compared bit by bit with XOR gates, and an OR tree
// over the M differences builds the global mismatch; Ok is its complement. Ok is true
// when both copies agree, and it enables the input and output registers.
//
// Interface: a[M], b[M] in; ok out. Combinational.
module hft_comparator #(
  parameter int unsigned M = 32
) (
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  output logic         ok
);

  logic [M-1:0] diff;

  assign diff = a ^ b;   // first stage: one XOR per output bit
  assign ok   = ~|diff;  // second stage: OR tree, inverted

endmodule
