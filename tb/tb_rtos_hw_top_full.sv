// tb_rtos_hw_top_full: the top level with every parameter at its default
// (100 000-clock, 1 ms time step at 100 MHz; Q9.9 controller). One complete
// operation of each design: an add and a subtract over SPI with interrupt
// and parallel result, and 300 ms of the satellite loop from yaw 0.4 rad,
// roll 0.2 rad, checking exact step spacing, that the controller leaves
// reaching mode for the boundary layer, and that both angles fall.
module tb_rtos_hw_top_full;
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
  logic [3:0] hil_delay_sel = 4'd3, hil_x_delay_sel = 4'd2;
  logic hil_ctrl_float = 0;   // fixed-point Q9.9 controller, the default configuration
  mfix_t hil_x_init [NX], hil_ref [NX], hil_x [NX], hil_x_meas [NX], hil_u_model [NU];
  logic signed [17:0] hil_u_ctrl [NU];
  logic [1:0] hil_ctrl_mode;
  logic hil_step_done;
  logic [31:0] hil_step_count, hil_stale_count, hil_overrun_count;
  int checks = 0, failures = 0, n_irq = 0, n_reach = 0, n_layer = 0, cyc = 0, last = -1, bad_period = 0;

  always #5 clk = ~clk;

  rtos_hw_top dut (.*);
  spi_master_model mst (.sclk(spi_sclk), .ss_n(spi_ss_n), .mosi(spi_mosi), .miso(spi_miso));

  logic irq_q = 1;
  always @(posedge clk) begin
    cyc++;
    irq_q <= proc_irq_n;
    if (rst_n && irq_q && !proc_irq_n) n_irq++;
    if (rst_n && hil_step_done) begin
      if (hil_ctrl_mode != 2'b00) n_reach++;
      if (hil_ctrl_mode != 2'b11) n_layer++;
      if (last >= 0 && cyc - last != 100_000) begin bad_period++; $display("step %0d spacing %0d", hil_step_count, cyc - last); end
      last = cyc;
    end
  end

  initial begin
    #400_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] rx;
    real yaw0, roll0;
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
    // add 200 + 100, then subtract 17 - 80
    proc_enable = 1;
    proc_in = 0;
    mst.select(); mst.xfer(8'd200, rx); mst.xfer(8'd100, rx); mst.deselect();
    repeat (40) @(negedge clk);
    checks += 2;
    if (n_irq != 1) begin failures++; $display("interrupts %0d", n_irq); end
    if (proc_result !== 9'd300) begin failures++; $display("add %0d", proc_result); end
    proc_in = 1;
    mst.select(); mst.xfer(8'd17, rx); mst.xfer(8'd80, rx); mst.deselect();
    checks++;
    if (rx !== 8'(300)) failures++;           // read-back of the previous result
    repeat (40) @(negedge clk);
    checks += 2;
    if (n_irq != 2) failures++;
    if (proc_result !== 9'(17 - 80)) begin failures++; $display("sub %0d", proc_result); end
    // satellite loop
    yaw0 = real'(hil_x_init[0]) / 16777216.0;
    roll0 = real'(hil_x_init[1]) / 16777216.0;
    while (hil_step_count < 300) @(negedge clk);
    $display("after 300 ms: yaw %f roll %f", real'(hil_x[0]) / 16777216.0, real'(hil_x[1]) / 16777216.0);
    checks += 5;
    if (!(real'(hil_x[0]) / 16777216.0 < yaw0 * 0.9)) failures++;
    if (!(real'(hil_x[1]) / 16777216.0 < roll0 * 0.9)) failures++;
    if (n_reach == 0 || n_layer == 0) failures++;
    if (bad_period != 0) begin failures++; $display("%0d irregular steps", bad_period); end
    if (hil_stale_count != 0 || hil_overrun_count != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
