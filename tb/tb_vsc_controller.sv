// tb_vsc_controller: checks the sliding-mode controller against the control
// law evaluated in double precision: e = floor((x - ref) * 2^9) / 2^9,
// Z = T e, s1 = z1 + z3, s2 = 2 z2 + z4, u = -30 sign(s) for |s| > 128 and
// u = -(30/128) s otherwise, saturated to Q9.9. Also checks the mode flags,
// the 4-cycle latency, and that both modes occur.
module tb_vsc_controller;
  import hil_pkg::*;

  logic clk = 0, rst_n = 0, start = 0, done;
  mfix_t x_in [NX], ref_in [NX];
  logic signed [17:0] u_out [NU];
  logic [1:0] mode;
  int checks = 0, failures = 0, n_reach = 0, n_layer = 0;

  always #5 clk = ~clk;

  vsc_controller dut (.*);

  initial begin
    #5_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real e [NX], z [NX], s [NU], u_exp [NU], u_got;
    int cyc;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      // mix of large and small errors so both modes appear
      for (int i = 0; i < NX; i++) begin
        int sh;
        sh = (t % 2) ? 13 : 7;
        x_in[i]   = mfix_t'($signed($urandom) >>> sh);
        ref_in[i] = (t % 4 == 1) ? mfix_t'($signed($urandom) >>> 12) : '0;
        e[i] = $floor(real'(longint'(x_in[i]) - longint'(ref_in[i])) / 32768.0) / 512.0;
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
      if (cyc != 4) begin failures++; $display("latency %0d", cyc); end
      for (int k = 0; k < NU; k++) begin
        real mag;
        mag = s[k] < 0 ? -s[k] : s[k];
        if (mag > 128.0) u_exp[k] = s[k] > 0 ? -30.0 : 30.0;
        else             u_exp[k] = -30.0 / 128.0 * s[k];
        if (u_exp[k] > 255.998) u_exp[k] = 255.998;
        if (u_exp[k] < -256.0)  u_exp[k] = -256.0;
        u_got = real'(u_out[k]) / 512.0;
        // skip points too close to the layer edge for the rounding of T
        if (mag > 127.0 && mag < 129.0) continue;
        checks += 2;
        if (u_got - u_exp[k] > 0.02 || u_got - u_exp[k] < -0.02) begin
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
