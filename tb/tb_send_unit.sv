// tb_send_unit: checks the order interrupt-then-result: irq_n falls one
// cycle after res_valid, result and result_strobe follow one cycle later,
// irq_n stays low for exactly 32 cycles, and the result is held until the
// next one.
module tb_send_unit;
  logic clk = 0, rst_n = 0, res_valid = 0, result_strobe, irq_n;
  logic [8:0] res, result;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  send_unit dut (.*);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [8:0] v, prev;
    int low;
    repeat (3) @(negedge clk);
    rst_n = 1;
    checks++;
    if (!irq_n) failures++;
    prev = result;
    for (int t = 0; t < 40; t++) begin
      v = 9'($urandom);
      @(negedge clk) begin res_valid = 1; res = v; end
      @(negedge clk) begin res_valid = 0; res = ~v; end
      // cycle t+1: interrupt raised, result not yet changed
      checks += 3;
      if (irq_n !== 1'b0) failures++;
      if (result !== prev) failures++;
      if (result_strobe) failures++;
      @(negedge clk);
      checks += 2;
      if (result !== v) begin failures++; $display("result %h expected %h", result, v); end
      if (!result_strobe) failures++;
      low = 1;
      while (!irq_n && low < 100) begin @(negedge clk); low++; end
      checks += 2;
      if (low != 32) begin failures++; $display("irq low %0d cycles", low); end
      if (result !== v) failures++;
      repeat ($urandom % 4) @(negedge clk);
      prev = v;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
