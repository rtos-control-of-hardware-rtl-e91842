// tb_u_delay_line: checks that a vector leaves the delay line unchanged
// exactly delay+1 cycles after it entered, for every fixed delay, and that
// in random mode the latency equals the reported tap + 1 and takes several
// different values.
module tb_u_delay_line;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, rand_en = 0, out_valid, busy;
  logic [35:0] in_data, out_data;
  logic [3:0] delay, tap_used;
  int checks = 0, failures = 0;
  bit seen [16];
  int distinct;

  always #5 clk = ~clk;

  u_delay_line dut (.*);

  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(input logic [35:0] d, output int lat);
    @(negedge clk) begin in_valid = 1; in_data = d; end
    @(negedge clk) begin in_valid = 0; in_data = ~d; end
    lat = 1;
    while (!out_valid && lat < 40) begin @(negedge clk); lat++; end
    checks++;
    if (out_data !== d) begin
      failures++;
      $display("data %h expected %h", out_data, d);
    end
    @(negedge clk);
    checks++;
    if (busy || out_valid) failures++;
  endtask

  initial begin
    int lat;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 4; r++)
      for (int d = 0; d < 16; d++) begin
        delay = 4'(d);
        send({$urandom, 4'(r)}, lat);
        checks++;
        if (lat != d + 1) begin
          failures++;
          $display("delay %0d: latency %0d", d, lat);
        end
      end
    rand_en = 1;
    delay = 0;
    for (int t = 0; t < 64; t++) begin
      repeat ($urandom % 5) @(negedge clk);
      send({$urandom, 4'(t)}, lat);
      checks++;
      if (lat != int'(tap_used) + 1) failures++;
      seen[tap_used] = 1;
    end
    distinct = 0;
    foreach (seen[i]) if (seen[i]) distinct++;
    checks++;
    if (distinct < 6) begin
      failures++;
      $display("random delay took only %0d values", distinct);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
