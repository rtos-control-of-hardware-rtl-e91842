// tb_hil_qformats: the three controller word formats, Q9.9, Q8.8 and Q7.7,
// each closing the loop around its own satellite emulator for 30 s of model
// time (30 000 steps of 1 ms, 24 clocks per step here) from yaw 0.4 rad,
// roll 0.2 rad. Each loop must settle, with the final error no larger than
// about two LSBs of its own format. The yaw angle at 1 s, 5 s and 30 s is
// printed for comparison between the formats. A fourth loop uses the
// single-precision controller (its output still Q9.9). It must settle at
// least as closely as Q9.9, and its yaw must stay within 0.01 rad of the
// Q9.9 loop's at 1 s and 5 s, since the two are expected to almost overlap.
module tb_hil_qformats;
  import hil_pkg::*;

  logic clk = 0, rst_n = 0, run = 0, load = 0;
  mfix_t x_init [NX], ref_in [NX];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  // one loop per format
  mfix_t xs [4][NX], xm [4][NX], um [4][NU];
  logic [31:0] steps [4], stale [4], over [4];
  logic [1:0] mode [4];
  logic sd [4];
  logic signed [17:0] u9 [NU], uf [NU];
  logic signed [15:0] u8 [NU];
  logic signed [13:0] u7 [NU];

  hil_system #(.STEP_CYCLES(24), .M(9), .N(9)) q9 (
    .clk, .rst_n, .run, .load_state(load), .x_init, .ref_in, .noise_en(1'b0),
    .jitter_en(1'b0), .delay_sel(4'd0), .x_delay_sel(4'd0), .ctrl_float(1'b0), .x_state(xs[0]), .x_meas(xm[0]), .u_ctrl(u9),
    .u_model(um[0]), .ctrl_mode(mode[0]), .step_done(sd[0]), .step_count(steps[0]),
    .stale_count(stale[0]), .overrun_count(over[0]));
  hil_system #(.STEP_CYCLES(24), .M(8), .N(8)) q8 (
    .clk, .rst_n, .run, .load_state(load), .x_init, .ref_in, .noise_en(1'b0),
    .jitter_en(1'b0), .delay_sel(4'd0), .x_delay_sel(4'd0), .ctrl_float(1'b0), .x_state(xs[1]), .x_meas(xm[1]), .u_ctrl(u8),
    .u_model(um[1]), .ctrl_mode(mode[1]), .step_done(sd[1]), .step_count(steps[1]),
    .stale_count(stale[1]), .overrun_count(over[1]));
  hil_system #(.STEP_CYCLES(24), .M(7), .N(7)) q7 (
    .clk, .rst_n, .run, .load_state(load), .x_init, .ref_in, .noise_en(1'b0),
    .jitter_en(1'b0), .delay_sel(4'd0), .x_delay_sel(4'd0), .ctrl_float(1'b0), .x_state(xs[2]), .x_meas(xm[2]), .u_ctrl(u7),
    .u_model(um[2]), .ctrl_mode(mode[2]), .step_done(sd[2]), .step_count(steps[2]),
    .stale_count(stale[2]), .overrun_count(over[2]));
  hil_system #(.STEP_CYCLES(24), .M(9), .N(9)) fp (
    .clk, .rst_n, .run, .load_state(load), .x_init, .ref_in, .noise_en(1'b0),
    .jitter_en(1'b0), .delay_sel(4'd0), .x_delay_sel(4'd0), .ctrl_float(1'b1), .x_state(xs[3]), .x_meas(xm[3]), .u_ctrl(uf),
    .u_model(um[3]), .ctrl_mode(mode[3]), .step_done(sd[3]), .step_count(steps[3]),
    .stale_count(stale[3]), .overrun_count(over[3]));

  initial begin
    #30_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real r_of(mfix_t v);
    return real'(v) / 16777216.0;
  endfunction

  initial begin
    int marks [3] = '{1000, 5000, 30000};
    foreach (ref_in[i]) ref_in[i] = '0;
    x_init[0] = to_mfix(0.4);
    x_init[1] = to_mfix(0.2);
    x_init[2] = '0;
    x_init[3] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk) load = 1;
    @(negedge clk) load = 0;
    run = 1;
    foreach (marks[k]) begin
      while (steps[0] < marks[k] || steps[3] < marks[k]) @(negedge clk);
      $display("t=%0d ms yaw: Q9.9 %f  Q8.8 %f  Q7.7 %f  float %f", marks[k],
               r_of(xs[0][0]), r_of(xs[1][0]), r_of(xs[2][0]), r_of(xs[3][0]));
      if (k < 2) begin
        real d;
        d = r_of(xs[3][0]) - r_of(xs[0][0]);
        checks++;
        if (d > 0.01 || d < -0.01) begin
          failures++;
          $display("float and Q9.9 differ by %f at %0d ms", d, marks[k]);
        end
      end
    end
    for (int q = 0; q < 4; q++) begin
      real lim;
      lim = 2.5 / real'(2 ** (q == 3 ? 9 : 9 - q));
      for (int i = 0; i < 2; i++) begin
        real v;
        v = r_of(xs[q][i]);
        checks++;
        if (v > lim || v < -lim) begin
          failures++;
          $display("loop %0d: angle %0d = %f, limit %f", q, i, v, lim);
        end
      end
      checks++;
      if (steps[q] < 30000) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
