// tb_hft_lc: self-checking test of the logic circuit at its default size (16x16-bit
// multiplier, 32 inputs, 32 outputs). Checks corner operands and 2000 random pairs
// against a 64-bit product computed in the testbench.
module tb_hft_lc;
  logic [31:0] x, y;
  int checks = 0, failures = 0;

  hft_lc dut (.x, .y);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try(logic [15:0] a, logic [15:0] b);
    longint unsigned p;
    x = {b, a};
    #1;
    p = longint'(a) * longint'(b);
    checks++;
    if (y !== p[31:0]) begin
      failures++;
      $display("FAIL %h * %h: got %h expected %h", a, b, y, p[31:0]);
    end
  endtask

  initial begin
    try(16'h0000, 16'h0000);
    try(16'hFFFF, 16'hFFFF);
    try(16'hFFFF, 16'h0001);
    try(16'h8000, 16'h8000);
    try(16'h1234, 16'h0000);
    for (int i = 0; i < 2000; i++) try(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
