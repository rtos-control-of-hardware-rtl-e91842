// tb_seven_seg: with a 6-bit refresh counter, checks that each of the four
// anodes is driven low in turn for 16 cycles, and that the segments then
// show the hex digit of that position (patterns from the standard
// seven-segment hex font, active low).
module tb_seven_seg;
  logic clk = 0, rst_n = 0;
  logic [15:0] value;
  logic [3:0] an_n;
  logic [6:0] seg_n;
  logic dp_n;
  int checks = 0, failures = 0;
  logic [6:0] font [16] = '{7'h3F, 7'h06, 7'h5B, 7'h4F, 7'h66, 7'h6D, 7'h7D, 7'h07,
                            7'h7F, 7'h6F, 7'h77, 7'h7C, 7'h39, 7'h5E, 7'h79, 7'h71};
  int on_cycles [4];

  always #5 clk = ~clk;

  seven_seg #(.REFRESH_BITS(6)) dut (.*);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 8; t++) begin
      // all sixteen digits first, then random values
      value = (t < 4) ? 16'({4'(4*t+3), 4'(4*t+2), 4'(4*t+1), 4'(4*t)}) : 16'($urandom);
      foreach (on_cycles[i]) on_cycles[i] = 0;
      repeat (64) begin
        int d;
        @(negedge clk);
        d = -1;
        for (int i = 0; i < 4; i++) if (!an_n[i]) d = i;
        checks += 3;
        if ($countones(~an_n) != 1) failures++;
        if (dp_n !== 1'b1) failures++;
        if (d >= 0) begin
          on_cycles[d]++;
          if (seg_n !== ~font[value[d*4 +: 4]]) begin
            failures++;
            $display("digit %0d value %h seg_n %b", d, value, seg_n);
          end
        end
      end
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (on_cycles[i] != 16) begin failures++; $display("digit %0d on %0d", i, on_cycles[i]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
