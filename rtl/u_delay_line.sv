// u_delay_line: the shift register on the control-input link from the
// controller to the satellite emulator. It holds each control vector for a
// selectable number of clock cycles before handing it on, which emulates
// jitter in the controller's response (late tasks, interrupts, cache effects).
// The same module, with a wider word, delays the state handshake from the
// emulator to the controller.
//
// How it works: a DEPTH-stage shift register of data words advances every
// clock. When a vector enters (in_valid), the tap for it is chosen: the
// `delay` input, or, with rand_en set, the low bits of a free-running 16-bit
// LFSR (x^16 + x^14 + x^13 + x^11 + 1), giving a random delay. The output is
// read at that tap, so a vector appears delay+1 cycles after it entered; a
// small counter marks the cycle at which the vector reaches its tap.
//
// Interface and timing: one vector may be in flight at a time (`busy` is high
// from in_valid until out_valid); the sender must wait for !busy, and an
// assertion checks it. out_valid is a one-cycle pulse with out_data.
// That U is delayed by a shift register for a fixed or random number of
// cycles is the model's; the depth (16), the LFSR (seed SEED) and the
// one-vector-in-flight handshake are this design's choices.
module u_delay_line #(
  parameter int unsigned DW    = 36,
  parameter int unsigned DEPTH = 16,
  parameter logic [15:0] SEED  = 16'hACE1,
  localparam int unsigned SW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [DW-1:0] in_data,
  input  logic [SW-1:0] delay,
  input  logic          rand_en,
  output logic          out_valid,
  output logic [DW-1:0] out_data,
  output logic          busy,
  output logic [SW-1:0] tap_used
);

  logic [DW-1:0] sr_d [DEPTH];
  logic [SW-1:0] age;
  logic [15:0]   lfsr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lfsr     <= SEED;
      tap_used <= '0;
      busy     <= 1'b0;
      age      <= '0;
      for (int i = 0; i < DEPTH; i++) sr_d[i] <= '0;
    end else begin
      lfsr <= {lfsr[14:0], lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10]};
      sr_d[0] <= in_data;
      for (int i = 1; i < DEPTH; i++) begin
        sr_d[i] <= sr_d[i-1];
      end
      if (in_valid) begin
        tap_used <= rand_en ? lfsr[SW-1:0] : delay;
        busy     <= 1'b1;
        age      <= '0;
      end else if (out_valid) begin
        busy <= 1'b0;
      end else if (busy) begin
        age <= age + 1'b1;
      end
    end
  end

  assign out_valid = busy && (age == tap_used);
  assign out_data  = sr_d[tap_used];

  // Only one vector may be in flight.
  a_one_in_flight: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid |-> !busy);

endmodule
