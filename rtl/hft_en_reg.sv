// hft_en_reg: register of D flip-flops with a load enable, used as the input register
// and the output register of the hybrid fault tolerant architecture.
//
// While `en` is high the register loads `d` at every rising clock edge; while it is low
// it keeps its value. In the architecture `en` is the comparator's Ok signal, so after a
// detected error the input register keeps the same input vector (the logic is re-run on
// it in the next clock period) and the output register keeps the last checked result.
// That load-enable behaviour is the architecture's temporal redundancy. The
// asynchronous active-low reset to RST_VAL is this design's own choice.
//
// Interface: clk, rst_n, en, d[W] in; q[W] out. Timing: q follows d one edge after en.
module hft_en_reg #(
  parameter int unsigned W       = 32,
  parameter logic [W-1:0] RST_VAL = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= RST_VAL;
    else if (en) q <= d;
  end

endmodule
