// tb_hft_comparator: self-checking test of the comparator. Equal random words must
// give Ok; words differing in one bit (every position) or in several random bits must
// not.
module tb_hft_comparator;
  localparam int unsigned M = 40;

  logic [M-1:0] a, b;
  logic ok;
  int checks = 0, failures = 0;

  hft_comparator #(.M(M)) dut (.a, .b, .ok);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try(logic [M-1:0] x, logic [M-1:0] y);
    a = x;
    b = y;
    #1;
    checks++;
    if (ok !== (x == y)) begin
      failures++;
      $display("FAIL a=%h b=%h ok=%b", x, y, ok);
    end
  endtask

  initial begin
    logic [M-1:0] r;
    for (int i = 0; i < 200; i++) begin
      r = {$urandom, $urandom};
      try(r, r);
      try(r, r ^ (M'(1) << (i % M)));
      try(r, r ^ {$urandom, $urandom});
    end
    try('0, '0);
    try('1, '1);
    try('0, '1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
