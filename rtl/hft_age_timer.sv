// hft_age_timer: fault-free period counter for aging balance ("time" method).
//
// The circuits that run age while the standby one rests. To share the wear, the
// configuration is changed after a set number of fault-free clock periods. This block
// counts the periods in which Ok is true while it is enabled and raises `rotate` during
// the PERIOD-th one; the count then starts again. Periods with an error are not counted
// and do not clear the count. PERIOD = 1024, and not clearing on errors, are this
// design's own choices.
//
// Interface: clk, rst_n, en, ok in; rotate out (combinational, one period wide).
module hft_age_timer #(
  parameter int unsigned PERIOD = 1024,
  localparam int unsigned CW    = (PERIOD > 1) ? $clog2(PERIOD) : 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic ok,
  output logic rotate
);

  logic [CW-1:0] cnt;

  assign rotate = en && ok && (cnt == CW'(PERIOD - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          cnt <= '0;
    else if (en && ok)   cnt <= rotate ? '0 : cnt + 1'b1;
  end

endmodule
