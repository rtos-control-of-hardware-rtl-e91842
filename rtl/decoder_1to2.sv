// decoder_1to2: 1-to-2 decoder that chooses which hardware process runs.
// The microcontroller drives `in` and `enable` on two port pins; with enable
// high, in = 0 enables the adder and in = 1 the subtractor; with enable low
// neither runs. Purely combinational.
// The decoder and its two inputs are the design's; which value of `in`
// selects which process is this design's choice.
module decoder_1to2 (
  input  logic       in,
  input  logic       enable,
  output logic [1:0] en      // en[0]: adder, en[1]: subtractor
);

  always_comb begin
    en = 2'b00;
    if (enable) en[in] = 1'b1;
  end

endmodule
