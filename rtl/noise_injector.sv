// noise_injector: the "noise box" on the state link from the satellite
// emulator to the controller. It emulates sensing and transmission error by
// adding pseudo-random noise to each state value; a strobe (noise_en) selects
// whether noise is added at all.
//
// How it works: each of the NX state words has its own 32-bit Galois LFSR
// (polynomial x^32 + x^22 + x^2 + x + 1, distinct non-zero seeds). On every
// `sample` pulse the input vector is registered, each element plus the low
// NOISE_BITS bits of its LFSR taken as a signed number (uniform in
// [-2^(NOISE_BITS-1), 2^(NOISE_BITS-1)-1] LSBs of Q8.24), and the LFSRs step.
// NOISE_BITS sets the noise amplitude and so the signal-to-noise ratio.
//
// Interface and timing: x_out and valid follow `sample` by one clock. The
// LFSRs step on every sample, whether or not noise is enabled.
// That noise is added under a strobe is the model's; the LFSR generator, the
// uniform distribution and the default amplitude (16 bits, about +-0.002 rad)
// are this design's choices.
module noise_injector
  import hil_pkg::*;
#(
  parameter int unsigned NOISE_BITS = 16
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  sample,
  input  logic  noise_en,
  input  mfix_t x_in  [NX],
  output mfix_t x_out [NX],
  output logic  valid
);

  localparam logic [31:0] POLY = 32'h8020_0003;

  logic [31:0] lfsr [NX];

  function automatic logic [31:0] lfsr_next(logic [31:0] s);
    return s[0] ? ((s >> 1) ^ POLY) : (s >> 1);
  endfunction

  function automatic logic [31:0] seed(int i);
    return 32'h1234_5678 ^ (32'h9E37_79B9 * 32'(i + 1));
  endfunction

  function automatic mfix_t noise_of(logic [31:0] s);
    logic signed [NOISE_BITS-1:0] n;
    n = s[NOISE_BITS-1:0];
    return mfix_t'(n);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= 1'b0;
      for (int i = 0; i < NX; i++) begin
        lfsr[i]  <= seed(i);
        x_out[i] <= '0;
      end
    end else begin
      valid <= sample;
      if (sample) begin
        for (int i = 0; i < NX; i++) begin
          x_out[i] <= noise_en ? x_in[i] + noise_of(lfsr[i]) : x_in[i];
          lfsr[i]  <= lfsr_next(lfsr[i]);
        end
      end
    end
  end

endmodule
