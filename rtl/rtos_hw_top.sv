// rtos_hw_top: the two hardware designs of the FPGA, side by side.
//
//   spi_process - a hardware process (add or subtract) controlled from a
//                 real-time operating system on a microcontroller over SPI,
//                 two select pins, an interrupt line and a parallel port.
//   hil_system  - a satellite attitude loop: a hardware-in-the-loop emulator
//                 of the satellite's roll/yaw dynamics, a noise box, a jitter
//                 delay and a sliding-mode controller, stepped every 1 ms.
//
// The two share only the clock and reset; each brings out its own ports.
// All parameters keep their defaults: 8-bit SPI words, a 100 000-cycle time
// step (1 ms at 100 MHz), a Q9.9 controller and a Q8.24 emulator. The
// input hil_ctrl_float lets the single-precision controller close the loop
// instead of the Q9.9 one.
module rtos_hw_top
  import hil_pkg::*;
#(
  parameter int unsigned STEP_CYCLES = 100_000,
  parameter int unsigned CTRL_M      = 9,
  parameter int unsigned CTRL_N      = 9
) (
  input  logic        clk,
  input  logic        rst_n,
  // ---- hardware process over SPI -----------------------------------------
  input  logic        spi_sclk,
  input  logic        spi_ss_n,
  input  logic        spi_mosi,
  output logic        spi_miso,
  output logic        spi_miso_oe,
  input  logic        proc_in,
  input  logic        proc_enable,
  output logic [8:0]  proc_result,
  output logic        proc_result_strobe,
  output logic        proc_irq_n,
  output logic [3:0]  an_n,
  output logic [6:0]  seg_n,
  output logic        dp_n,
  // ---- satellite hardware-in-the-loop ------------------------------------
  input  logic        hil_run,
  input  logic        hil_load,
  input  mfix_t       hil_x_init   [NX],
  input  mfix_t       hil_ref      [NX],
  input  logic        hil_noise_en,
  input  logic        hil_jitter_en,
  input  logic [3:0]  hil_delay_sel,
  input  logic [3:0]  hil_x_delay_sel,
  input  logic        hil_ctrl_float,
  output mfix_t       hil_x        [NX],
  output mfix_t       hil_x_meas   [NX],
  output logic signed [CTRL_M+CTRL_N-1:0] hil_u_ctrl [NU],
  output mfix_t       hil_u_model  [NU],
  output logic [1:0]  hil_ctrl_mode,
  output logic        hil_step_done,
  output logic [31:0] hil_step_count,
  output logic [31:0] hil_stale_count,
  output logic [31:0] hil_overrun_count
);

  spi_process u_proc (
    .clk, .rst_n,
    .sclk(spi_sclk), .ss_n(spi_ss_n), .mosi(spi_mosi),
    .miso(spi_miso), .miso_oe(spi_miso_oe),
    .in_sel(proc_in), .enable(proc_enable),
    .result(proc_result), .result_strobe(proc_result_strobe), .irq_n(proc_irq_n),
    .an_n, .seg_n, .dp_n
  );

  hil_system #(.STEP_CYCLES(STEP_CYCLES), .M(CTRL_M), .N(CTRL_N)) u_hil (
    .clk, .rst_n,
    .run(hil_run), .load_state(hil_load), .x_init(hil_x_init),
    .ref_in(hil_ref), .noise_en(hil_noise_en), .jitter_en(hil_jitter_en),
    .delay_sel(hil_delay_sel), .x_delay_sel(hil_x_delay_sel), .ctrl_float(hil_ctrl_float),
    .x_state(hil_x), .x_meas(hil_x_meas), .u_ctrl(hil_u_ctrl),
    .u_model(hil_u_model), .ctrl_mode(hil_ctrl_mode),
    .step_done(hil_step_done), .step_count(hil_step_count),
    .stale_count(hil_stale_count), .overrun_count(hil_overrun_count)
  );

endmodule
