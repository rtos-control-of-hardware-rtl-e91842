// mux_2to1: selects which process's result goes on to the send and display
// modules. Its select is the same `in` line that steers the decoder, so the
// result shown is always that of the process that was enabled:
// sel = 0 passes d0 (adder), sel = 1 passes d1 (subtractor). Combinational.
module mux_2to1 #(
  parameter int unsigned W = 9
) (
  input  logic         sel,
  input  logic [W-1:0] d0,
  input  logic [W-1:0] d1,
  output logic [W-1:0] y
);

  assign y = sel ? d1 : d0;

endmodule
