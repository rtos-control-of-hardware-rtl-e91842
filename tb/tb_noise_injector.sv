// tb_noise_injector: checks that the state passes unchanged with the noise
// strobe off, and that with it on each element receives the sign-extended
// low 16 bits of its own LFSR (x^32 + x^22 + x^2 + x + 1, Galois form,
// seeds 0x12345678 ^ 0x9E3779B9*(i+1)), stepped on every sample.
module tb_noise_injector;
  import hil_pkg::*;

  logic clk = 0, rst_n = 0;
  logic sample = 0, noise_en = 0, valid;
  mfix_t x_in [NX], x_out [NX];
  logic [31:0] ref_lfsr [NX];
  int checks = 0, failures = 0, nonzero = 0;

  always #5 clk = ~clk;

  noise_injector dut (.*);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NX; i++) ref_lfsr[i] = 32'h1234_5678 ^ (32'h9E37_79B9 * 32'(i + 1));
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      noise_en = (t % 3) != 0;
      for (int i = 0; i < NX; i++) x_in[i] = mfix_t'($urandom);
      @(negedge clk) sample = 1;
      @(negedge clk) sample = 0;
      checks++;
      if (!valid) failures++;
      for (int i = 0; i < NX; i++) begin
        mfix_t n, expv;
        n = noise_en ? mfix_t'($signed(ref_lfsr[i][15:0])) : '0;
        expv = x_in[i] + n;
        checks++;
        if (x_out[i] !== expv) begin
          failures++;
          $display("t=%0d x_out[%0d]=%h expected %h", t, i, x_out[i], expv);
        end
        if (noise_en && x_out[i] != x_in[i]) nonzero++;
        if (noise_en && (n > 32767 || n < -32768)) failures++;
        ref_lfsr[i] = ref_lfsr[i][0] ? ((ref_lfsr[i] >> 1) ^ 32'h8020_0003) : (ref_lfsr[i] >> 1);
      end
      @(negedge clk);
      checks++;
      if (valid) failures++;
    end
    checks++;
    if (nonzero < 500) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
