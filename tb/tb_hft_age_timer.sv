// tb_hft_age_timer: self-checking test of the fault-free period counter with PERIOD=5.
// Random Ok and enable patterns; a model counter in the testbench predicts on which
// periods `rotate` must be high.
module tb_hft_age_timer;
  localparam int unsigned P = 5;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, ok = 1'b0, rotate;
  int checks = 0, failures = 0, pulses = 0, model = 0;

  hft_age_timer #(.PERIOD(P)) dut (.clk, .rst_n, .en, .ok, .rotate);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      en = ($urandom_range(0, 9) != 0);
      ok = ($urandom_range(0, 3) != 0);
      #1;
      exp = en && ok && (model == P - 1);
      checks++;
      if (rotate !== exp) begin
        failures++;
        $display("FAIL period %0d: rotate=%b expected %b (count %0d)", i, rotate, exp, model);
      end
      if (exp) pulses++;
      @(posedge clk);
      if (en && ok) model = (model == P - 1) ? 0 : model + 1;
    end
    checks++;
    if (pulses < 50) begin
      failures++;
      $display("FAIL only %0d rotation pulses", pulses);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
