// tb_sat_model: checks the satellite emulator's state update against
// x(k+1) = Ad x(k) + Bd u(k) evaluated in double precision from the real
// coefficients, for random states and inputs and for a chain of steps, and
// checks that each step takes 5 cycles from start to done.
module tb_sat_model;
  import hil_pkg::*;

  logic clk = 0, rst_n = 0;
  logic load = 0, u_we = 0, start = 0, busy, done;
  mfix_t x_init [NX], u_in [NU], x [NX], u [NU];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sat_model dut (.*);

  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real r_of(mfix_t v);
    return real'(v) / 16777216.0;
  endfunction

  task automatic step_and_check(input real xr [NX], input real ur [NU]);
    real exp_x [NX];
    int  cyc;
    for (int i = 0; i < NX; i++) begin
      exp_x[i] = 0.0;
      for (int j = 0; j < NX; j++) exp_x[i] += AD_R[i][j] * xr[j];
      for (int k = 0; k < NU; k++) exp_x[i] += BD_R[i][k] * ur[k];
    end
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != 5) begin
      failures++;
      $display("latency %0d, expected 5", cyc);
    end
    for (int i = 0; i < NX; i++) begin
      real err;
      err = r_of(x[i]) - exp_x[i];
      checks++;
      if (err > 32.0 / 16777216.0 || err < -32.0 / 16777216.0) begin
        failures++;
        $display("x[%0d] = %f expected %f", i, r_of(x[i]), exp_x[i]);
      end
    end
  endtask

  initial begin
    real xr [NX], ur [NU];
    repeat (3) @(negedge clk);
    rst_n = 1;
    // random single steps
    for (int t = 0; t < 200; t++) begin
      for (int i = 0; i < NX; i++) begin
        x_init[i] = mfix_t'($signed($urandom) >>> 5);   // about +-4
        xr[i] = r_of(x_init[i]);
      end
      for (int k = 0; k < NU; k++) begin
        u_in[k] = mfix_t'($signed($urandom) >>> 6);     // about +-32
        ur[k] = r_of(u_in[k]);
      end
      @(negedge clk) begin load = 1; u_we = 1; end
      @(negedge clk) begin load = 0; u_we = 0; end
      step_and_check(xr, ur);
    end
    // a chain of steps from the state the emulator holds
    for (int t = 0; t < 50; t++) begin
      for (int i = 0; i < NX; i++) xr[i] = r_of(x[i]);
      for (int k = 0; k < NU; k++) ur[k] = r_of(u[k]);
      step_and_check(xr, ur);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
