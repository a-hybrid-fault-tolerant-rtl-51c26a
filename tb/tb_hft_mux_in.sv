// tb_hft_mux_in: self-checking test of the input multiplexer.
// For every configuration and random vectors it checks that the two running logic
// circuits get the input and the standby one gets the standby vector. Two instances
// are tested: the default (standby inputs grounded) and one with a non-zero standby
// vector.
module tb_hft_mux_in;
  import hft_pkg::*;
  localparam int unsigned N = 20;
  localparam logic [N-1:0] SB = 20'hA5C3F;

  cfg_e cfg;
  logic [N-1:0] in_vec;
  logic [2:0][N-1:0] lc_in0, lc_in1;
  int checks = 0, failures = 0;

  hft_mux_in #(.N(N)) dut0 (.cfg, .in_vec, .lc_in(lc_in0));
  hft_mux_in #(.N(N), .STANDBY_VEC(SB)) dut1 (.cfg, .in_vec, .lc_in(lc_in1));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg_e cl [3] = '{CFG_12, CFG_23, CFG_31};
    int standby [3] = '{2, 0, 1};  // standby LC index for 1-2, 2-3, 3-1
    for (int i = 0; i < 300; i++) begin
      int c;
      c = i % 3;
      cfg = cl[c];
      in_vec = N'($urandom);
      #1;
      for (int k = 0; k < 3; k++) begin
        logic [N-1:0] e0, e1;
        e0 = (k == standby[c]) ? '0 : in_vec;
        e1 = (k == standby[c]) ? SB : in_vec;
        checks += 2;
        if (lc_in0[k] !== e0) begin
          failures++;
          $display("FAIL default cfg=%0d lc%0d got %h exp %h", c, k + 1, lc_in0[k], e0);
        end
        if (lc_in1[k] !== e1) begin
          failures++;
          $display("FAIL standby-vec cfg=%0d lc%0d got %h exp %h", c, k + 1, lc_in1[k], e1);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
