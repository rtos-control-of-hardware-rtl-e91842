// tb_subtractor_unit: drives random operand pairs into the subtractor with and without
// its enable, and checks that the result register changes only when enabled,
// holds a - b (9 bits) one cycle after go, and that valid pulses then.
module tb_subtractor_unit;
  logic clk = 0, rst_n = 0, en = 0, go = 0, valid;
  logic [7:0] a, b;
  logic [8:0] diff, held;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  subtractor_unit dut (.*);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [8:0] expv;
    repeat (3) @(negedge clk);
    rst_n = 1;
    held = '0;
    for (int t = 0; t < 500; t++) begin
      a = 8'($urandom);
      b = 8'($urandom);
      en = (t % 4) != 3;
      @(negedge clk) go = 1;
      @(negedge clk) go = 0;
      expv = en ? (9'(a) - 9'(b)) : held;
      checks += 2;
      if (diff !== expv) begin
        failures++;
        $display("a=%0d b=%0d en=%b result %0d expected %0d", a, b, en, diff, expv);
      end
      if (valid !== en) failures++;
      held = expv;
      @(negedge clk);
      checks++;
      if (valid) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
