// subtractor_unit: hardware process that subtracts the second operand from
// the first. When its enable (from the decoder) is high and `go` pulses, it
// registers diff = a - b as a two's-complement number one bit wider than the
// unsigned operands (bit DW is the sign), and pulses `valid` one clock later.
// The subtractor and its enable are the design's; the operand order, the
// signed result and the registered output are this design's choices.
module subtractor_unit #(
  parameter int unsigned DW = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic          go,
  input  logic [DW-1:0] a,
  input  logic [DW-1:0] b,
  output logic [DW:0]   diff,
  output logic          valid
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      diff  <= '0;
      valid <= 1'b0;
    end else begin
      valid <= en && go;
      if (en && go) diff <= {1'b0, a} - {1'b0, b};
    end
  end

endmodule
