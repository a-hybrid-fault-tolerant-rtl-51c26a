// tb_hft_en_reg: self-checking test of the load-enable register.
// Drives random data and enables for 500 clocks and compares q with a model register
// kept in the testbench; also checks the reset value. Prints TB_RESULT at the end.
module tb_hft_en_reg;
  localparam int unsigned W = 12;
  localparam logic [W-1:0] RV = 12'h5A3;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [W-1:0] d = '0, q, model;
  int checks = 0, failures = 0;

  hft_en_reg #(.W(W), .RST_VAL(RV)) dut (.clk, .rst_n, .en, .d, .q);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [W-1:0] got, logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 check("reset value", q, RV);
    model = RV;
    rst_n = 1'b1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      en = 1'($urandom_range(0, 1));
      d  = W'($urandom);
      @(posedge clk);
      if (en) model = d;
      #1 check("q", q, model);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
