// tb_rtos_hw_top: end-to-end test of both designs in the top level, run side
// by side. The hardware process is driven like the microcontroller drives
// it: SPI operand pairs, process selection, wait for the interrupt, read the
// result. At the same time the satellite loop is started from yaw 0.4 rad,
// roll 0.2 rad with a 24-clock step, run clean, then with noise and random
// delay. A second top with a 10-clock step shows overruns. Every mechanism
// is counted and must occur: add, subtract, disabled process, interrupt,
// read-back over MISO, reaching mode, boundary layer, noise, stale U,
// overrun, and steps closed by the floating-point controller (a last clean
// run from the same start).
module tb_rtos_hw_top;
  import hil_pkg::*;

  logic clk = 0, rst_n = 0;
  logic spi_sclk, spi_ss_n, spi_mosi, spi_miso, spi_miso_oe;
  logic proc_in = 0, proc_enable = 0;
  logic [8:0] proc_result;
  logic proc_result_strobe, proc_irq_n;
  logic [3:0] an_n;
  logic [6:0] seg_n;
  logic dp_n;
  logic hil_run = 0, hil_load = 0, hil_noise_en = 0, hil_jitter_en = 0;
  logic [3:0] hil_delay_sel = 0, hil_x_delay_sel = 0;
  logic hil_ctrl_float = 0;
  mfix_t hil_x_init [NX], hil_ref [NX], hil_x [NX], hil_x_meas [NX], hil_u_model [NU];
  logic signed [17:0] hil_u_ctrl [NU];
  logic [1:0] hil_ctrl_mode;
  logic hil_step_done;
  logic [31:0] hil_step_count, hil_stale_count, hil_overrun_count;

  // second top, short step, only its loop is used
  logic run_b = 0;
  logic miso_b, miso_oe_b, strobe_b, irq_b, dp_b;
  logic [8:0] res_b;
  logic [3:0] an_b;
  logic [6:0] seg_b;
  mfix_t x_b [NX], xm_b [NX], um_b [NU];
  logic signed [17:0] uc_b [NU];
  logic [1:0] mode_b;
  logic done_b;
  logic [31:0] steps_b, stale_b, overrun_b;

  int checks = 0, failures = 0;
  int n_add = 0, n_sub = 0, n_off = 0, n_irq = 0, n_readback = 0;
  int n_reach = 0, n_layer = 0, n_noisy = 0, n_float = 0;

  always #5 clk = ~clk;

  rtos_hw_top #(.STEP_CYCLES(24)) dut (.*);

  rtos_hw_top #(.STEP_CYCLES(10)) dut_b (
    .clk, .rst_n, .spi_sclk(1'b0), .spi_ss_n(1'b1), .spi_mosi(1'b0),
    .spi_miso(miso_b), .spi_miso_oe(miso_oe_b), .proc_in(1'b0), .proc_enable(1'b0),
    .proc_result(res_b), .proc_result_strobe(strobe_b), .proc_irq_n(irq_b),
    .an_n(an_b), .seg_n(seg_b), .dp_n(dp_b),
    .hil_run(run_b), .hil_load(hil_load), .hil_x_init, .hil_ref, .hil_noise_en(1'b0),
    .hil_jitter_en(1'b0), .hil_delay_sel(4'd0), .hil_x_delay_sel(4'd0), .hil_ctrl_float(1'b0), .hil_x(x_b), .hil_x_meas(xm_b),
    .hil_u_ctrl(uc_b), .hil_u_model(um_b), .hil_ctrl_mode(mode_b),
    .hil_step_done(done_b), .hil_step_count(steps_b), .hil_stale_count(stale_b),
    .hil_overrun_count(overrun_b)
  );

  spi_master_model mst (.sclk(spi_sclk), .ss_n(spi_ss_n), .mosi(spi_mosi), .miso(spi_miso));

  logic irq_q = 1;
  always @(posedge clk) begin
    irq_q <= proc_irq_n;
    if (rst_n && irq_q && !proc_irq_n) n_irq++;
    if (rst_n && hil_step_done) begin
      if (hil_ctrl_mode != 2'b00) n_reach++;
      if (hil_ctrl_mode != 2'b11) n_layer++;
      if (hil_ctrl_float) n_float++;
      for (int i = 0; i < NX; i++) if (hil_x_meas[i] != hil_x[i]) n_noisy++;
    end
  end

  initial begin
    #50_000_000;
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
      v = r_of(hil_x[i]);
      checks++;
      if (v > lim || v < -lim) begin
        failures++;
        $display("%s: x[%0d] = %f", tag, i, v);
      end
    end
  endtask

  // microcontroller side: operand pairs while the loop runs
  task automatic spi_session(input int n);
    logic [7:0] a, b, rx0, rx1;
    logic [8:0] expv, prev;
    int irq_before;
    prev = proc_result;
    for (int t = 0; t < n; t++) begin
      a = 8'($urandom);
      b = 8'($urandom);
      proc_enable = (t % 4) != 3;
      proc_in = t[0];
      irq_before = n_irq;
      mst.select();
      mst.xfer(a, rx0);
      mst.xfer(b, rx1);
      mst.deselect();
      checks++;
      if (rx0 === prev[7:0]) n_readback++;
      else begin failures++; $display("readback %h expected %h", rx0, prev[7:0]); end
      if (proc_enable) begin
        expv = proc_in ? 9'(a) - 9'(b) : 9'(a) + 9'(b);
        if (proc_in) n_sub++; else n_add++;
      end else begin
        expv = prev;
        n_off++;
      end
      repeat (40) @(negedge clk);
      checks += 2;
      if (proc_result !== expv) begin failures++; $display("result %h expected %h", proc_result, expv); end
      if (n_irq != irq_before + (proc_enable ? 1 : 0)) failures++;
      prev = expv;
    end
  endtask

  initial begin
    foreach (hil_ref[i]) hil_ref[i] = '0;
    hil_x_init[0] = to_mfix(0.4);
    hil_x_init[1] = to_mfix(0.2);
    hil_x_init[2] = '0;
    hil_x_init[3] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk) hil_load = 1;
    @(negedge clk) hil_load = 0;
    hil_run = 1;
    run_b = 1;
    fork
      spi_session(24);
      begin
        while (hil_step_count < 8000) @(negedge clk);
      end
    join
    run_b = 0;
    $display("clean: %0d steps, yaw %f roll %f", hil_step_count, r_of(hil_x[0]), r_of(hil_x[1]));
    check_small(0.01, "clean");
    checks += 2;
    if (hil_stale_count != 0) failures++;
    if (hil_overrun_count != 0) failures++;
    // noise and random delay, from the same start
    hil_run = 0;
    hil_noise_en = 1;
    hil_jitter_en = 1;
    @(negedge clk) hil_load = 1;
    @(negedge clk) hil_load = 0;
    repeat (40) @(negedge clk);
    hil_run = 1;
    fork
      spi_session(12);
      begin
        while (hil_step_count < 18000) @(negedge clk);
      end
    join
    $display("noisy: yaw %f roll %f stale %0d", r_of(hil_x[0]), r_of(hil_x[1]), hil_stale_count);
    check_small(0.03, "noisy");
    // floating-point controller, clean, from the same start
    hil_run = 0;
    hil_noise_en = 0;
    hil_jitter_en = 0;
    hil_ctrl_float = 1;
    @(negedge clk) hil_load = 1;
    @(negedge clk) hil_load = 0;
    repeat (40) @(negedge clk);
    hil_run = 1;
    while (hil_step_count < 26000) @(negedge clk);
    hil_run = 0;
    $display("float: yaw %f roll %f", r_of(hil_x[0]), r_of(hil_x[1]));
    check_small(0.01, "float");

    $display("mechanisms: add %0d sub %0d disabled %0d irq %0d readback %0d reaching %0d layer %0d noisy %0d stale %0d overrun %0d float %0d",
             n_add, n_sub, n_off, n_irq, n_readback, n_reach, n_layer, n_noisy, hil_stale_count, overrun_b, n_float);
    checks += 11;
    if (n_float == 0) failures++;
    if (n_add == 0) failures++;
    if (n_sub == 0) failures++;
    if (n_off == 0) failures++;
    if (n_irq == 0) failures++;
    if (n_readback == 0) failures++;
    if (n_reach == 0) failures++;
    if (n_layer == 0) failures++;
    if (n_noisy == 0) failures++;
    if (hil_stale_count == 0) failures++;
    if (overrun_b == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
