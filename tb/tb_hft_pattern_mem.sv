// tb_hft_pattern_mem: self-checking test of the input-pattern memory (default
// N=32, DEPTH=4). Nothing matches after reset; after patterns are written the stored
// vectors match only while enabled, other vectors never do, and overwriting an entry
// replaces its pattern.
module tb_hft_pattern_mem;
  logic clk = 1'b0, rst_n = 1'b0, wr_en = 1'b0, en = 1'b0, rotate;
  logic [1:0] wr_addr = '0;
  logic [31:0] wr_data = '0, vec = '0;
  logic [31:0] pats [4];
  int checks = 0, failures = 0;

  hft_pattern_mem dut (.clk, .rst_n, .wr_en, .wr_addr, .wr_data, .en, .vec, .rotate);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_rot(logic [31:0] v, logic e, logic exp, string what);
    vec = v;
    en  = e;
    #1;
    checks++;
    if (rotate !== exp) begin
      failures++;
      $display("FAIL %s: vec=%h en=%b rotate=%b expected %b", what, v, e, rotate, exp);
    end
  endtask

  task automatic write(int a, logic [31:0] d);
    @(negedge clk);
    wr_en = 1'b1;
    wr_addr = 2'(a);
    wr_data = d;
    @(posedge clk);
    #1 wr_en = 1'b0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    expect_rot(32'h0, 1'b1, 1'b0, "empty memory");
    for (int a = 0; a < 4; a++) begin
      pats[a] = $urandom | 32'h1;
      write(a, pats[a]);
    end
    for (int a = 0; a < 4; a++) begin
      expect_rot(pats[a], 1'b1, 1'b1, "stored pattern");
      expect_rot(pats[a], 1'b0, 1'b0, "disabled");
      expect_rot(pats[a] ^ 32'h8000_0000, 1'b1, 1'b0, "one bit off");
    end
    for (int i = 0; i < 200; i++) begin
      logic [31:0] r;
      logic m;
      r = (i % 50 == 7) ? pats[i % 4] : $urandom;
      m = (r == pats[0]) || (r == pats[1]) || (r == pats[2]) || (r == pats[3]);
      expect_rot(r, 1'b1, m, "random vector");
    end
    write(2, 32'hCAFE_0002);
    expect_rot(pats[2], 1'b1, (pats[2] == pats[0]) || (pats[2] == pats[1]) || (pats[2] == pats[3]), "overwritten entry");
    expect_rot(32'hCAFE_0002, 1'b1, 1'b1, "new entry");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
