// spi_master_model: behavioural model of the microcontroller's SPI master,
// for testbenches only. MSB first, 8-bit words, SCLK half-period HALF time
// units (125 ns gives 4 MHz at 1 ns units). CPOL is the idle level of SCLK.
// With CPHA = 0 (default, mode 0) MOSI is set half a period before each
// leading SCLK edge and MISO is sampled on that edge. With CPHA = 1 MOSI is
// set on the leading edge and MISO is sampled on the trailing edge.
module spi_master_model #(
  parameter int HALF = 125,
  parameter bit CPOL = 1'b0,
  parameter bit CPHA = 1'b0
) (
  output logic sclk,
  output logic ss_n,
  output logic mosi,
  input  logic miso
);

  initial begin
    sclk = CPOL;
    ss_n = 1'b1;
    mosi = 1'b0;
  end

  task automatic select();
    ss_n = 1'b0;
    #(HALF);
  endtask

  task automatic deselect();
    #(HALF);
    ss_n = 1'b1;
    #(2 * HALF);
  endtask

  task automatic xfer(input logic [7:0] tx, output logic [7:0] rx);
    for (int i = 7; i >= 0; i--) begin
      if (!CPHA) begin
        mosi = tx[i];
        #(HALF);
        sclk = ~CPOL;
        rx[i] = miso;
        #(HALF);
        sclk = CPOL;
      end else begin
        sclk = ~CPOL;
        mosi = tx[i];
        #(HALF);
        sclk = CPOL;
        rx[i] = miso;
        #(HALF);
      end
    end
  endtask

endmodule
