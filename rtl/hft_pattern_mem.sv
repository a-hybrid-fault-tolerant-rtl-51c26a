// hft_pattern_mem: input-pattern memory for aging balance ("pattern" method).
//
// The configuration is changed each time one of a few stored input patterns is applied
// to the logic circuits. This block holds DEPTH patterns of N bits, each with a valid
// bit, written through a simple write port, and compares the vector in the input
// register with all of them in parallel. `rotate` is high while the block is enabled
// and the vector equals a valid stored pattern. DEPTH = 4 and the write port are this
// design's own choices; the architecture only asks for a small memory.
//
// Interface: clk, rst_n; wr_en, wr_addr, wr_data (one pattern per edge, marks the
// entry valid); en, vec in; rotate out (combinational in vec). Reset clears the valid
// bits.
module hft_pattern_mem #(
  parameter int unsigned N     = 32,
  parameter int unsigned DEPTH = 4,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [N-1:0]  wr_data,
  input  logic          en,
  input  logic [N-1:0]  vec,
  output logic          rotate
);

  logic [N-1:0]     pat   [DEPTH];
  logic [DEPTH-1:0] valid;
  logic [DEPTH-1:0] hit;

  always_ff @(posedge clk) begin
    if (wr_en && int'(wr_addr) < DEPTH) pat[wr_addr] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                             valid <= '0;
    else if (wr_en && int'(wr_addr) < DEPTH) valid[wr_addr] <= 1'b1;
  end

  always_comb begin
    for (int unsigned k = 0; k < DEPTH; k++) hit[k] = valid[k] && (pat[k] == vec);
  end

  assign rotate = en && |hit;

endmodule
