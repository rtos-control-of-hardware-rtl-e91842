// spi_process: the FPGA side of a hardware process run under control of the
// real-time operating system on the microcontroller. The microcontroller's
// SPI task sends operands over SPI, picks the process with two port pins
// (`in`, `enable`), and its receiving task waits for the FPGA's interrupt and
// reads the result from a parallel port.
//
// Datapath: SPI slave -> operand registers -> adder and subtractor, enabled
// by the 1-to-2 decoder -> 2-to-1 mux (select = in) -> send module (interrupt
// and parallel result) and seven-segment display.
//
// Transaction: while SS_n is low the master sends operand A, then operand B,
// one byte each. When B has arrived the enabled process computes. One clock
// later its result is at the mux; the send module then asserts irq_n and,
// a clock after that, drives result. During every word the slave returns
// the low byte of the last result on MISO, so the master can also read it
// back over SPI. A frame with more than two bytes restarts at operand A on
// every odd byte.
// Following the design: the blocks and their connections. This design's
// choices: two operand bytes per frame, the read-back on MISO and the widths.
// SPI_CPOL and SPI_CPHA set the slave to the SPI mode the master is
// configured for (default mode 0).
module spi_process #(
  parameter int unsigned DW           = 8,
  parameter int unsigned IRQ_CYCLES   = 32,
  parameter int unsigned REFRESH_BITS = 18,
  parameter bit          SPI_CPOL     = 1'b0,
  parameter bit          SPI_CPHA     = 1'b0,
  localparam int unsigned RW          = DW + 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // SPI from the microcontroller
  input  logic          sclk,
  input  logic          ss_n,
  input  logic          mosi,
  output logic          miso,
  output logic          miso_oe,
  // process selection from the microcontroller's port pins
  input  logic          in_sel,
  input  logic          enable,
  // parallel interface to the microcontroller
  output logic [RW-1:0] result,
  output logic          result_strobe,
  output logic          irq_n,
  // seven-segment display
  output logic [3:0]    an_n,
  output logic [6:0]    seg_n,
  output logic          dp_n
);

  logic [DW-1:0] rx_data, op_a, op_b;
  logic          rx_valid, frame_start, frame_end, second, go;
  logic [1:0]    en;
  logic [RW-1:0] sum, diff, mux_y;
  logic          add_valid, sub_valid;

  spi_slave #(.DW(DW), .CPOL(SPI_CPOL), .CPHA(SPI_CPHA)) u_spi (
    .clk, .rst_n, .sclk, .ss_n, .mosi, .miso, .miso_oe,
    .tx_data(result[DW-1:0]), .rx_data, .rx_valid, .frame_start, .frame_end
  );

  // Operand registers: first byte of a pair is A, second is B.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      op_a   <= '0;
      op_b   <= '0;
      second <= 1'b0;
      go     <= 1'b0;
    end else begin
      go <= 1'b0;
      if (frame_start || frame_end) begin
        second <= 1'b0;
      end else if (rx_valid) begin
        if (!second) op_a <= rx_data;
        else begin
          op_b <= rx_data;
          go   <= 1'b1;
        end
        second <= ~second;
      end
    end
  end

  decoder_1to2 u_dec (.in(in_sel), .enable, .en);

  adder_unit #(.DW(DW)) u_add (
    .clk, .rst_n, .en(en[0]), .go, .a(op_a), .b(op_b), .sum, .valid(add_valid)
  );

  subtractor_unit #(.DW(DW)) u_sub (
    .clk, .rst_n, .en(en[1]), .go, .a(op_a), .b(op_b), .diff, .valid(sub_valid)
  );

  mux_2to1 #(.W(RW)) u_mux (.sel(in_sel), .d0(sum), .d1(diff), .y(mux_y));

  send_unit #(.RW(RW), .IRQ_CYCLES(IRQ_CYCLES)) u_send (
    .clk, .rst_n, .res_valid(add_valid | sub_valid), .res(mux_y),
    .result, .result_strobe, .irq_n
  );

  seven_seg #(.REFRESH_BITS(REFRESH_BITS)) u_seg (
    .clk, .rst_n, .value(16'(result)), .an_n, .seg_n, .dp_n
  );

endmodule
