// spi_slave: SPI slave for the FPGA side of the microcontroller link. The
// microcontroller is the master: it drives SCLK, selects the FPGA with the
// active-low slave select and exchanges 8-bit words, most significant bit
// first, on MOSI and MISO (full duplex).
//
// How it works: SCLK, SS_n and MOSI are brought into the system clock domain
// through two-flip-flop synchronisers; the system clock must be several
// times faster than SCLK (100 MHz against at most 4 MHz). The parameters
// CPOL and CPHA match the clock polarity and phase the master is set to.
// CPOL is the idle level of SCLK; the leading edge of each bit is the one
// that leaves the idle level. With CPHA = 0 (default, mode 0) MOSI is
// sampled on the leading edge and MISO changes on the trailing edge; tx_data
// is loaded when the slave is selected and after every completed word, so
// its MSB is on MISO before the first edge. With CPHA = 1 MISO changes on the
// leading edge (tx_data is loaded there for a word's first bit) and MOSI is
// sampled on the trailing edge. A bit counter closes each word; the received
// byte is presented on rx_data with a one-cycle rx_valid pulse.
//
// Interface and timing: rx_valid comes 3 system clocks after the eighth
// sampling SCLK edge (synchroniser plus edge detection). frame_start and
// frame_end pulse on the falling and rising edge of SS_n. miso_oe is high
// while selected, for an external tri-state buffer.
// Following the link description: 8-bit shift registers, MSB first,
// active-low select, full duplex, clock polarity and phase set to match the
// master. This design's choices: mode 0 as the default and the oversampling
// with synchronisers.
module spi_slave #(
  parameter int unsigned DW   = 8,
  parameter bit          CPOL = 1'b0,
  parameter bit          CPHA = 1'b0
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          sclk,
  input  logic          ss_n,
  input  logic          mosi,
  output logic          miso,
  output logic          miso_oe,
  input  logic [DW-1:0] tx_data,
  output logic [DW-1:0] rx_data,
  output logic          rx_valid,
  output logic          frame_start,
  output logic          frame_end
);

  logic [2:0] sclk_s, ss_s;
  logic [1:0] mosi_s;
  logic [DW-1:0] rx_sr, tx_sr;
  logic [$clog2(DW)-1:0] bitcnt;

  // edges of SCLK with the idle level taken as low
  wire sclk_lead  = (sclk_s[1] ^ CPOL) & ~(sclk_s[2] ^ CPOL);
  wire sclk_trail = ~(sclk_s[1] ^ CPOL) & (sclk_s[2] ^ CPOL);
  wire sample     = CPHA ? sclk_trail : sclk_lead;
  wire shift      = CPHA ? sclk_lead : sclk_trail;
  wire selected  = ~ss_s[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sclk_s <= {3{CPOL}};
      ss_s   <= '1;
      mosi_s <= '0;
    end else begin
      sclk_s <= {sclk_s[1:0], sclk};
      ss_s   <= {ss_s[1:0], ss_n};
      mosi_s <= {mosi_s[0], mosi};
    end
  end

  assign frame_start = ~ss_s[1] &  ss_s[2];
  assign frame_end   =  ss_s[1] & ~ss_s[2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_sr    <= '0;
      tx_sr    <= '0;
      bitcnt   <= '0;
      rx_data  <= '0;
      rx_valid <= 1'b0;
    end else begin
      rx_valid <= 1'b0;
      if (!selected) begin
        bitcnt <= '0;
      end else if (frame_start) begin
        bitcnt <= '0;
        tx_sr  <= tx_data;
      end else if (sample) begin
        rx_sr  <= {rx_sr[DW-2:0], mosi_s[1]};
        bitcnt <= bitcnt + 1'b1;
        if (bitcnt == ($bits(bitcnt))'(DW - 1)) begin
          rx_data  <= {rx_sr[DW-2:0], mosi_s[1]};
          rx_valid <= 1'b1;
        end
      end else if (shift) begin
        // bitcnt == 0 here means a word has just completed (CPHA = 0) or is
        // about to start (CPHA = 1): reload.
        tx_sr <= (bitcnt == '0) ? tx_data : {tx_sr[DW-2:0], 1'b0};
      end
    end
  end

  assign miso    = tx_sr[DW-1];
  assign miso_oe = selected;

endmodule
