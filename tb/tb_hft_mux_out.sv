// tb_hft_mux_out: self-checking test of the output multiplexer. For each configuration
// and random LC outputs it checks that the two ports carry the two running circuits'
// outputs (1-2: LC1/LC2, 2-3: LC3/LC2, 3-1: LC1/LC3) and never the standby one's.
module tb_hft_mux_out;
  import hft_pkg::*;
  localparam int unsigned M = 24;

  cfg_e cfg;
  logic [2:0][M-1:0] lc_out;
  logic [M-1:0] out_a, out_b;
  int checks = 0, failures = 0;

  hft_mux_out #(.M(M)) dut (.cfg, .lc_out, .out_a, .out_b);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg_e cl [3] = '{CFG_12, CFG_23, CFG_31};
    int ia [3] = '{0, 2, 0};
    int ib [3] = '{1, 1, 2};
    for (int i = 0; i < 300; i++) begin
      int c;
      c = i % 3;
      cfg = cl[c];
      for (int k = 0; k < 3; k++) lc_out[k] = M'($urandom);
      #1;
      checks += 2;
      if (out_a !== lc_out[ia[c]]) begin
        failures++;
        $display("FAIL cfg=%0d port A got %h exp %h", c, out_a, lc_out[ia[c]]);
      end
      if (out_b !== lc_out[ib[c]]) begin
        failures++;
        $display("FAIL cfg=%0d port B got %h exp %h", c, out_b, lc_out[ib[c]]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
