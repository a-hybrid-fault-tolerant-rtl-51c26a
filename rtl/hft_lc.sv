// hft_lc: the protected combinational logic circuit (LC), instantiated three times.
//
// The architecture is generic: any combinational block with N_IN inputs and N_OUT
// outputs can be protected, and its structure is left untouched. This design fills the
// slot with the function of the ISCAS'85 circuit c6288, a 16x16-bit unsigned
// multiplier with 32 inputs and 32 outputs, which is one of the circuits the
// architecture was evaluated on. The choice of circuit, and writing it as a plain
// multiplication rather than the benchmark's gate netlist, are this design's own.
//
// Interface: x[N_IN] in, the low half is operand A and the high half operand B;
// y[N_OUT] out = A * B, truncated or zero-extended to N_OUT bits. Combinational.
module hft_lc #(
  parameter int unsigned N_IN  = 32,
  parameter int unsigned N_OUT = 32
) (
  input  logic [N_IN-1:0]  x,
  output logic [N_OUT-1:0] y
);

  localparam int unsigned WA = N_IN / 2;
  localparam int unsigned WB = N_IN - WA;
  localparam int unsigned WP = WA + WB;

  logic [WA-1:0] a;
  logic [WB-1:0] b;
  logic [WP-1:0] p;

  assign a = x[WA-1:0];
  assign b = x[N_IN-1:WA];
  assign p = WP'(a) * WP'(b);

  if (N_OUT <= WP) begin : g_trunc
    assign y = p[N_OUT-1:0];
  end else begin : g_ext
    assign y = {{(N_OUT-WP){1'b0}}, p};
  end

endmodule
