// tb_mux_2to1: random data on both inputs, checks that sel picks d0 or d1.
module tb_mux_2to1;
  logic sel;
  logic [8:0] d0, d1, y;
  int checks = 0, failures = 0;

  mux_2to1 dut (.*);

  initial begin
    for (int t = 0; t < 200; t++) begin
      d0 = 9'($urandom);
      d1 = 9'($urandom);
      sel = t[0];
      #1;
      checks++;
      if (y !== (sel ? d1 : d0)) begin
        failures++;
        $display("sel=%b y=%h", sel, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
