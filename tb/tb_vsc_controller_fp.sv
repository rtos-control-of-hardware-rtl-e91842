// tb_vsc_controller_fp: checks the floating-point sliding-mode controller
// against the control law evaluated in double precision on the exact error
// e = x - ref: Z = T e, s1 = z1 + z3, s2 = 2 z2 + z4, u = -30 sign(s) for
// |s| > 128 and u = -(30/128) s otherwise, rounded and saturated to Q9.9.
// The single-precision result may differ from that by one output LSB. Also
// checks the mode flags, the 7-cycle latency, and that both modes occur.
// First, the arithmetic functions are compared with double-precision results
// rounded to single precision: multiply and fixed-to-float exactly, add
// within one unit in the last place (the reference rounds twice).
module tb_vsc_controller_fp;
  import hil_pkg::*;
  import fp32_pkg::*;

  function automatic f32_t rand_f32();
    // exponents well inside the normal range
    return {1'($urandom), 8'(96 + $urandom_range(0, 60)), 23'($urandom)};
  endfunction

  // single -> double: exact
  function automatic real f32_val(f32_t a);
    if (a[30:23] == 0) return 0.0;
    return $bitstoreal({a[31], 11'(int'(a[30:23]) - 127 + 1023), a[22:0], 29'd0});
  endfunction

  // double -> single, rounded to nearest even (normal range only)
  function automatic f32_t to_f32(real r);
    logic [63:0] d;
    logic [24:0] m;
    int e;
    d = $realtobits(r);
    if (d[62:0] == 0) return 32'd0;
    e = int'(d[62:52]) - 1023 + 127;
    m = {2'b01, d[51:29]};
    if (d[28] && (d[27:0] != 0 || d[29])) m = m + 1;
    if (m[24]) begin m = m >> 1; e++; end
    return {d[63], 8'(e), m[22:0]};
  endfunction

  logic clk = 0, rst_n = 0, start = 0, done;
  mfix_t x_in [NX], ref_in [NX];
  logic signed [17:0] u_out [NU];
  logic [1:0] mode;
  int checks = 0, failures = 0, n_reach = 0, n_layer = 0;

  always #5 clk = ~clk;

  vsc_controller_fp dut (.*);

  initial begin
    #5_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real e [NX], z [NX], s [NU], u_exp [NU], u_got;
    int cyc;
    for (int t = 0; t < 5000; t++) begin
      f32_t a, b, got, ref_b;
      logic signed [32:0] v;
      a = rand_f32();
      b = (t % 8 == 0) ? {~a[31], a[30:0]} ^ 32'($urandom_range(0, 3)) : rand_f32();
      got   = f32_mul(a, b);
      ref_b = to_f32((f32_val(a) * f32_val(b)));
      checks++;
      if (got !== ref_b) begin failures++; $display("mul %h %h = %h, expected %h", a, b, got, ref_b); end
      got   = f32_add(a, b);
      ref_b = to_f32((f32_val(a) + f32_val(b)));
      checks++;
      if ((got[30:0] > ref_b[30:0] ? got[30:0] - ref_b[30:0] : ref_b[30:0] - got[30:0]) > 1 ||
          (got[31] != ref_b[31] && ref_b[30:0] != 0)) begin
        failures++; $display("add %h %h = %h, expected %h", a, b, got, ref_b);
      end
      v     = 33'($signed($urandom)) >>> $urandom_range(0, 31);
      got   = fix_to_f32(v, MODEL_F);
      ref_b = to_f32((real'(v) / 16777216.0));
      checks++;
      if (got !== ref_b) begin failures++; $display("cvt %0d = %h, expected %h", v, got, ref_b); end
    end

    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      // mix of large and small errors so both modes appear
      for (int i = 0; i < NX; i++) begin
        int sh;
        sh = (t % 2) ? 13 : 7;
        x_in[i]   = mfix_t'($signed($urandom) >>> sh);
        ref_in[i] = (t % 4 == 1) ? mfix_t'($signed($urandom) >>> 12) : '0;
        e[i] = real'(longint'(x_in[i]) - longint'(ref_in[i])) / 16777216.0;
      end
      for (int i = 0; i < NX; i++) begin
        z[i] = 0.0;
        for (int j = 0; j < NX; j++) z[i] += T_R[i][j] * e[j];
      end
      s[0] = z[0] + z[2];
      s[1] = 2.0 * z[1] + z[3];
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      cyc = 1;
      while (!done && cyc < 20) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != 7) begin failures++; $display("latency %0d", cyc); end
      for (int k = 0; k < NU; k++) begin
        real mag;
        mag = s[k] < 0 ? -s[k] : s[k];
        if (mag > 128.0) u_exp[k] = s[k] > 0 ? -30.0 : 30.0;
        else             u_exp[k] = -30.0 / 128.0 * s[k];
        if (u_exp[k] > 255.998) u_exp[k] = 255.998;
        if (u_exp[k] < -256.0)  u_exp[k] = -256.0;
        u_got = real'(u_out[k]) / 512.0;
        // skip points where single precision may fall on either side of the edge
        if (mag > 127.999 && mag < 128.001) continue;
        checks += 2;
        if (u_got - u_exp[k] > 1.5 / 512.0 || u_got - u_exp[k] < -1.5 / 512.0) begin
          failures++;
          $display("t=%0d u[%0d]=%f expected %f (s=%f)", t, k, u_got, u_exp[k], s[k]);
        end
        if (mode[k] != (mag > 128.0)) begin
          failures++;
          $display("t=%0d mode[%0d]=%0d s=%f", t, k, mode[k], s[k]);
        end
        if (mode[k]) n_reach++; else n_layer++;
      end
    end
    checks++;
    if (n_reach == 0 || n_layer == 0) begin
      failures++;
      $display("modes: reaching %0d, layer %0d", n_reach, n_layer);
    end
    $display("reaching %0d layer %0d", n_reach, n_layer);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
