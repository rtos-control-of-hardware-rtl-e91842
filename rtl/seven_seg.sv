// seven_seg: shows a 16-bit value as four hexadecimal digits on a
// four-digit, common-anode seven-segment display (anodes and segments active
// low, as on the FPGA board used).
//
// How it works: a free-running REFRESH_BITS-bit counter; its two top bits
// pick the digit. One anode is driven low at a time and the segments carry
// that digit's pattern, so each digit is lit for 2^(REFRESH_BITS-2) clocks in
// turn (about 2.6 ms per round at 100 MHz with the default 18 bits).
// seg_n[6:0] = {g, f, e, d, c, b, a}; digit 0 (an_n[0]) is the least
// significant. The decimal point is kept off.
// The display module is the design's; the multiplexing, hex coding and
// refresh rate are this design's choices.
module seven_seg #(
  parameter int unsigned REFRESH_BITS = 18
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] value,
  output logic [3:0]  an_n,
  output logic [6:0]  seg_n,
  output logic        dp_n
);

  logic [REFRESH_BITS-1:0] cnt;
  logic [1:0]              digit;
  logic [3:0]              nib;
  logic [6:0]              seg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cnt <= '0;
    else        cnt <= cnt + 1'b1;
  end

  assign digit = cnt[REFRESH_BITS-1 -: 2];
  assign nib   = value[digit*4 +: 4];

  always_comb begin
    unique case (nib)      // gfedcba, 1 = lit
      4'h0: seg = 7'b0111111;
      4'h1: seg = 7'b0000110;
      4'h2: seg = 7'b1011011;
      4'h3: seg = 7'b1001111;
      4'h4: seg = 7'b1100110;
      4'h5: seg = 7'b1101101;
      4'h6: seg = 7'b1111101;
      4'h7: seg = 7'b0000111;
      4'h8: seg = 7'b1111111;
      4'h9: seg = 7'b1101111;
      4'hA: seg = 7'b1110111;
      4'hB: seg = 7'b1111100;
      4'hC: seg = 7'b0111001;
      4'hD: seg = 7'b1011110;
      4'hE: seg = 7'b1111001;
      default: seg = 7'b1110001;   // F
    endcase
  end

  assign seg_n = ~seg;
  assign an_n  = ~(4'b0001 << digit);
  assign dp_n  = 1'b1;

endmodule
