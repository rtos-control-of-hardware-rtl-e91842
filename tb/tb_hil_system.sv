// tb_hil_system: closed-loop test of the satellite attitude loop with a short
// time step (24 clocks; a second instance with 10 clocks).
//   Phase A: yaw 0.4 rad, roll 0.2 rad, no noise, no delay. Both angles and
//            rates must settle to near zero within 10 s of model time
//            (10 000 steps); the controller must pass through reaching mode
//            and the boundary layer; no step may see a stale U or overrun;
//            steps must come exactly every 24 clocks.
//   Phase B: the same start with noise and random delay. Delays of 12 or
//            more clocks outlast the step, so stale steps must appear; the
//            loop must still settle (looser bound).
//   Phase C: a 10-clock step is shorter than one pass of the FSM, so ticks
//            must be merged (overruns) while steps still complete.
// Before that, the step is timed with delays on the state link.
// The decay check is independent of the RTL: on the sliding surfaces the
// yaw and roll errors decay with time constants of about 1 s and 0.5 s.
module tb_hil_system;
  import hil_pkg::*;

  logic clk = 0, rst_n = 0;
  logic run = 0, load_state = 0, noise_en = 0, jitter_en = 0;
  logic [3:0] delay_sel = 0, x_delay_sel = 0;
  logic ctrl_float = 0;
  mfix_t x_init [NX], ref_in [NX], x_state [NX], x_meas [NX], u_model [NU];
  logic signed [17:0] u_ctrl [NU];
  logic [1:0] ctrl_mode;
  logic step_done;
  logic [31:0] step_count, stale_count, overrun_count;

  // second instance for overruns
  logic run2 = 0;
  mfix_t x_state2 [NX], x_meas2 [NX], u_model2 [NU];
  logic signed [17:0] u_ctrl2 [NU];
  logic [1:0] ctrl_mode2;
  logic step_done2;
  logic [31:0] step_count2, stale_count2, overrun_count2;

  int checks = 0, failures = 0;
  int n_reach = 0, n_layer = 0, n_noisy = 0, last_done = -1, period_bad = 0, cyc = 0;
  int run_cyc = 0, first_done = -1;

  always #5 clk = ~clk;

  hil_system #(.STEP_CYCLES(24)) dut (.*);

  hil_system #(.STEP_CYCLES(10)) dut2 (
    .clk, .rst_n, .run(run2), .load_state, .x_init, .ref_in, .noise_en(1'b0),
    .jitter_en(1'b0), .delay_sel(4'd0), .x_delay_sel(4'd0), .ctrl_float(1'b0),
    .x_state(x_state2), .x_meas(x_meas2), .u_ctrl(u_ctrl2), .u_model(u_model2),
    .ctrl_mode(ctrl_mode2), .step_done(step_done2), .step_count(step_count2),
    .stale_count(stale_count2), .overrun_count(overrun_count2)
  );

  always @(posedge clk) begin
    cyc++;
    if (step_done) begin
      if (ctrl_mode != 2'b00) n_reach++;
      if (ctrl_mode != 2'b11) n_layer++;
      for (int i = 0; i < NX; i++) if (x_meas[i] != x_state[i]) n_noisy++;
      if (first_done < 0) first_done = cyc;
      if (!noise_en && !jitter_en && last_done >= 0 && cyc - last_done != 24) period_bad++;
      last_done = cyc;
    end
  end

  initial begin
    #20_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real r_of(mfix_t v);
    return real'(v) / 16777216.0;
  endfunction

  task automatic check_small(input real lim, input string tag);
    for (int i = 0; i < NX; i++) begin
      real v;
      v = r_of(x_state[i]);
      checks++;
      if (v > lim || v < -lim) begin
        failures++;
        $display("%s: x[%0d] = %f, limit %f", tag, i, v, lim);
      end
    end
  endtask

  task automatic start_from(input real yaw, input real roll);
    run = 0;
    @(negedge clk);
    x_init[0] = to_mfix(yaw);
    x_init[1] = to_mfix(roll);
    x_init[2] = '0;
    x_init[3] = '0;
    load_state = 1;
    @(negedge clk) load_state = 0;
    repeat (40) @(negedge clk);
    last_done = -1;
    first_done = -1;
    run_cyc = cyc;
    run = 1;
  endtask

  // Clocks from run to the first completed step, for given link delays.
  task automatic offset_for(input int dx, input int du, output int off);
    x_delay_sel = 4'(dx);
    delay_sel = 4'(du);
    start_from(0.1, 0.1);
    while (first_done < 0) @(negedge clk);
    off = first_done - run_cyc;
    run = 0;
  endtask

  task automatic wait_steps(input int n);
    int target;
    target = int'(step_count) + n;
    while (int'(step_count) < target) @(negedge clk);
  endtask

  initial begin
    int s0;
    real th1_1s;
    foreach (ref_in[i]) ref_in[i] = '0;
    foreach (x_init[i]) x_init[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // ---- link delays: each clock of delay moves the step's end by one -----
    begin
      int o00, o50, o03;
      offset_for(0, 0, o00);
      offset_for(5, 0, o50);
      offset_for(0, 3, o03);
      $display("step end after run: %0d, state link +5: %0d, U link +3: %0d", o00, o50, o03);
      checks += 2;
      if (o50 - o00 != 5) failures++;
      // the step ends when U enters the U delay line, so that delay does not
      // move it; it moves when U reaches the emulator instead
      if (o03 - o00 != 0) failures++;
      x_delay_sel = 0;
      delay_sel = 0;
    end

    // ---- phase A ----------------------------------------------------------
    start_from(0.4, 0.2);
    s0 = int'(step_count);
    wait_steps(1000);
    th1_1s = r_of(x_state[0]);
    $display("A: after 1 s yaw %f roll %f", th1_1s, r_of(x_state[1]));
    checks++;
    // ~ 0.4*exp(-1) after reaching the surface: must have decayed
    if (th1_1s > 0.25 || th1_1s < 0.05) begin failures++; $display("A: yaw at 1 s %f", th1_1s); end
    wait_steps(9000);
    $display("A: after 10 s yaw %f roll %f rates %f %f", r_of(x_state[0]), r_of(x_state[1]),
             r_of(x_state[2]), r_of(x_state[3]));
    check_small(0.01, "A");
    checks += 4;
    if (stale_count != 0) begin failures++; $display("A: stale %0d", stale_count); end
    if (overrun_count != 0) begin failures++; $display("A: overrun %0d", overrun_count); end
    if (int'(step_count) - s0 < 10000) failures++;
    if (period_bad != 0) begin failures++; $display("A: %0d irregular steps", period_bad); end

    // ---- phase B ----------------------------------------------------------
    noise_en = 1;
    jitter_en = 1;
    start_from(0.4, 0.2);
    wait_steps(10000);
    $display("B: after 10 s yaw %f roll %f, stale steps %0d, noisy words %0d",
             r_of(x_state[0]), r_of(x_state[1]), stale_count, n_noisy);
    check_small(0.03, "B");
    checks += 2;
    if (stale_count == 0) begin failures++; $display("B: no stale steps"); end
    if (n_noisy == 0) begin failures++; $display("B: no noise seen"); end
    noise_en = 0;
    jitter_en = 0;
    run = 0;

    // ---- phase C ----------------------------------------------------------
    run2 = 1;
    repeat (2000) @(negedge clk);
    run2 = 0;
    checks += 2;
    $display("C: steps %0d overruns %0d", step_count2, overrun_count2);
    if (overrun_count2 == 0) failures++;
    if (step_count2 < 50) failures++;

    checks += 2;
    if (n_reach == 0) begin failures++; $display("reaching mode never seen"); end
    if (n_layer == 0) begin failures++; $display("boundary layer never seen"); end
    $display("mechanisms: reaching %0d layer %0d stale %0d overrun %0d noisy %0d",
             n_reach, n_layer, stale_count, overrun_count2, n_noisy);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
