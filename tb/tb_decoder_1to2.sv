// tb_decoder_1to2: exhaustive truth-table check of the 1-to-2 decoder.
module tb_decoder_1to2;
  logic in, enable;
  logic [1:0] en;
  int checks = 0, failures = 0;

  decoder_1to2 dut (.*);

  initial begin
    logic [1:0] expv;
    for (int r = 0; r < 3; r++)
      for (int v = 0; v < 4; v++) begin
        {enable, in} = 2'(v);
        #1;
        expv = !enable ? 2'b00 : (in ? 2'b10 : 2'b01);
        checks++;
        if (en !== expv) begin
          failures++;
          $display("enable=%b in=%b en=%b expected %b", enable, in, en, expv);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
