// tb_spi_slave: exchanges random bytes with the SPI slave in all four SPI
// modes (CPOL, CPHA), one slave and one matching master model per mode, run
// one mode after the other. Several words go in each frame. It checks the
// received byte, the rx_valid pulse, the byte returned on MISO (the tx_data
// value loaded at the frame's start and again for each word; held constant
// here within a frame) and the frame start/end pulses.
module tb_spi_slave;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  int turn = 0;

  always #5 clk = ~clk;

  initial begin
    #40_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar m = 0; m < 4; m++) begin : g_mode
    localparam bit CPOL = m[1];
    localparam bit CPHA = m[0];
    logic sclk, ss_n, mosi, miso, miso_oe;
    logic [7:0] tx_data, rx_data;
    logic rx_valid, frame_start, frame_end;
    int n_rx = 0, n_fs = 0, n_fe = 0;

    spi_slave #(.CPOL(CPOL), .CPHA(CPHA)) dut (.*);
    spi_master_model #(.CPOL(CPOL), .CPHA(CPHA)) mst (.sclk, .ss_n, .mosi, .miso);

    always @(posedge clk) if (rst_n) begin
      if (rx_valid) n_rx++;
      if (frame_start) n_fs++;
      if (frame_end) n_fe++;
    end

    initial begin
      logic [7:0] tx, rx;
      int words;
      tx_data = 8'h00;
      wait (rst_n && turn == m);
      words = 0;
      for (int f = 0; f < 20; f++) begin
        tx_data = 8'($urandom);
        mst.select();
        checks++;
        if (!miso_oe) begin failures++; $display("mode %0d: miso_oe low while selected", m); end
        for (int w = 0; w < 1 + f % 3; w++) begin
          tx = 8'($urandom);
          mst.xfer(tx, rx);
          words++;
          repeat (5) @(negedge clk);
          checks += 3;
          if (rx_data !== tx) begin failures++; $display("mode %0d: rx %h expected %h", m, rx_data, tx); end
          if (rx !== tx_data) begin failures++; $display("mode %0d: miso %h expected %h", m, rx, tx_data); end
          if (n_rx != words) begin failures++; $display("mode %0d: rx_valid count %0d, words %0d", m, n_rx, words); end
        end
        mst.deselect();
        checks++;
        if (miso_oe) begin failures++; $display("mode %0d: miso_oe high after deselect", m); end
      end
      checks += 2;
      if (n_fs != 20) begin failures++; $display("mode %0d: frame starts %0d", m, n_fs); end
      if (n_fe != 20) begin failures++; $display("mode %0d: frame ends %0d", m, n_fe); end
      turn++;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (turn == 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
