// adder_unit: hardware process that adds the two operands received from the
// microcontroller. When its enable (from the decoder) is high and `go`
// pulses, it registers sum = a + b, one bit wider than the operands so no
// carry is lost, and pulses `valid` with it one clock later.
// The adder and its enable are the design's; the operand width, the full-width
// result and the registered output are this design's choices.
module adder_unit #(
  parameter int unsigned DW = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic          go,
  input  logic [DW-1:0] a,
  input  logic [DW-1:0] b,
  output logic [DW:0]   sum,
  output logic          valid
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sum   <= '0;
      valid <= 1'b0;
    end else begin
      valid <= en && go;
      if (en && go) sum <= {1'b0, a} + {1'b0, b};
    end
  end

endmodule
