// tb_spi_process: the microcontroller side in miniature. A mode-0 SPI master
// model sends operand pairs; the process select pins choose the adder or the
// subtractor (or neither, with enable low). The testbench plays the receiving
// task: it waits for the interrupt, reads the parallel result and checks it
// against a + b or a - b (9 bits), checks that the result read back over MISO
// in the next frame is the low byte of the previous result, that no interrupt
// comes when the process is disabled, and that display digit 0 shows the
// result's low nibble.
module tb_spi_process;
  logic clk = 0, rst_n = 0;
  logic sclk, ss_n, mosi, miso, miso_oe;
  logic in_sel = 0, enable = 0;
  logic [8:0] result;
  logic result_strobe, irq_n;
  logic [3:0] an_n;
  logic [6:0] seg_n;
  logic dp_n;
  int checks = 0, failures = 0, n_add = 0, n_sub = 0, n_off = 0, n_irq = 0;
  logic [6:0] font [16] = '{7'h3F, 7'h06, 7'h5B, 7'h4F, 7'h66, 7'h6D, 7'h7D, 7'h07,
                            7'h7F, 7'h6F, 7'h77, 7'h7C, 7'h39, 7'h5E, 7'h79, 7'h71};

  always #5 clk = ~clk;

  spi_process #(.REFRESH_BITS(6)) dut (.*);
  spi_master_model mst (.sclk, .ss_n, .mosi, .miso);

  logic irq_q = 1;
  always @(posedge clk) begin
    irq_q <= irq_n;
    if (rst_n && irq_q && !irq_n) n_irq++;
  end

  initial begin
    #50_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] a, b, rx0, rx1;
    logic [8:0] expv, prev;
    int irq_before, wait_cyc;
    repeat (3) @(negedge clk);
    rst_n = 1;
    prev = '0;
    for (int t = 0; t < 60; t++) begin
      a = 8'($urandom);
      b = 8'($urandom);
      enable = (t % 5) != 4;
      in_sel = $urandom % 2;
      irq_before = n_irq;
      mst.select();
      mst.xfer(a, rx0);
      mst.xfer(b, rx1);
      mst.deselect();
      // read-back of the previous result
      checks++;
      if (rx0 !== prev[7:0]) begin
        failures++;
        $display("readback %h expected %h", rx0, prev[7:0]);
      end
      if (enable) begin
        expv = in_sel ? (9'(a) - 9'(b)) : (9'(a) + 9'(b));
        if (in_sel) n_sub++; else n_add++;
      end else begin
        expv = prev;
        n_off++;
      end
      repeat (40) @(negedge clk);
      checks += 2;
      if (n_irq != irq_before + (enable ? 1 : 0)) begin
        failures++;
        $display("t=%0d interrupts %0d -> %0d, enable %b", t, irq_before, n_irq, enable);
      end
      if (result !== expv) begin
        failures++;
        $display("t=%0d a=%0d b=%0d sel=%b result %0d expected %0d", t, a, b, in_sel, result, expv);
      end
      // display digit 0
      wait_cyc = 0;
      while (an_n != 4'b1110 && wait_cyc < 100) begin @(negedge clk); wait_cyc++; end
      checks++;
      if (seg_n !== ~font[expv[3:0]]) begin failures++; $display("segments %b", seg_n); end
      prev = expv;
    end
    checks++;
    if (n_add == 0 || n_sub == 0 || n_off == 0) failures++;
    $display("add %0d sub %0d disabled %0d interrupts %0d", n_add, n_sub, n_off, n_irq);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
