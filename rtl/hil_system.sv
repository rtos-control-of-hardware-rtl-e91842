// hil_system: the satellite attitude loop on one chip. The hardware-in-the-
// loop emulator of the satellite (sat_model) computes the state X, the noise
// box (noise_injector) corrupts the copy sent to the controller, the
// sliding-mode controller (vsc_controller) computes the control input U, and
// the delay shift register (u_delay_line) holds U for a chosen or random
// number of cycles before the emulator takes it. A second delay line holds
// back the handshake that delivers the (noisy) state to the controller. A
// control FSM sequences the data flow once per time step.
//
// How it works: a step timer produces a tick every STEP_CYCLES clocks (one
// 1 ms time step; 100 000 cycles at a 100 MHz clock). On a tick the FSM
//   IDLE  -> MODEL : start x(k+1) = Ad x(k) + Bd u, with the U held now;
//   MODEL -> SENSE : sample x(k+1) through the noise box;
//   SENSE -> XWAIT : hand the noisy state to the state delay line;
//   XWAIT -> CTRL  : when it comes out, start the controller on it and ref;
//   CTRL  -> PUSH  : hand U to the delay line (waits while it is busy);
//   PUSH  -> IDLE.
// The delay line delivers U into the emulator's input register on its own,
// so a U that is still in the delay line when the next tick comes is simply
// missed by that step and the emulator uses the previous one: this is how
// controller jitter shows up in the loop. Such steps are counted in
// stale_count; ticks that arrive while a step is still running, and so are
// merged, are counted in overrun_count.
//
// Interface: load_state writes x_init into the emulator; run enables the step
// timer; ref_in is the desired state; noise_en is the noise strobe;
// jitter_en selects random delays on both links, otherwise delay_sel cycles
// on the U link and x_delay_sel cycles on the state link. x_state is
// the emulator's true state (available to an external controller), x_meas
// the noisy copy, u_ctrl the controller's Qm.n output, u_model the input the
// emulator is using. step_done pulses when a step's U has been handed on.
// ctrl_float selects the single-precision controller (vsc_controller_fp)
// instead of the Qm.n one; its output still enters the loop as Qm.n. It
// should change only while run is low.
// The structure follows the model's schematic; the FSM's states, the step
// timer, the counters and the clock rate are this design's choices.
module hil_system
  import hil_pkg::*;
#(
  parameter int unsigned STEP_CYCLES = 100_000,
  parameter int unsigned M           = 9,
  parameter int unsigned N           = 9,
  parameter int unsigned NOISE_BITS  = 16,
  parameter int unsigned DELAY_DEPTH = 16,
  localparam int unsigned W          = M + N,
  localparam int unsigned DSW        = $clog2(DELAY_DEPTH)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                run,
  input  logic                load_state,
  input  mfix_t               x_init    [NX],
  input  mfix_t               ref_in    [NX],
  input  logic                noise_en,
  input  logic                jitter_en,
  input  logic [DSW-1:0]      delay_sel,
  input  logic [DSW-1:0]      x_delay_sel,
  input  logic                ctrl_float,
  output mfix_t               x_state   [NX],
  output mfix_t               x_meas    [NX],
  output logic signed [W-1:0] u_ctrl    [NU],
  output mfix_t               u_model   [NU],
  output logic [NU-1:0]       ctrl_mode,
  output logic                step_done,
  output logic [31:0]         step_count,
  output logic [31:0]         stale_count,
  output logic [31:0]         overrun_count
);

  typedef enum logic [2:0] {S_IDLE, S_MODEL, S_SENSE, S_XWAIT, S_CTRL, S_PUSH} state_t;
  state_t state;

  // ---- step timer ---------------------------------------------------------
  logic [$clog2(STEP_CYCLES+1)-1:0] tcnt;
  logic tick, pending;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) tcnt <= '0;
    else if (!run || tick) tcnt <= '0;
    else tcnt <= tcnt + 1'b1;
  end
  assign tick = run && (tcnt == ($bits(tcnt))'(STEP_CYCLES - 1));

  // ---- datapath blocks ----------------------------------------------------
  logic  m_start, m_done, m_busy, m_uwe;
  mfix_t m_uin [NU];

  sat_model u_model_i (
    .clk, .rst_n,
    .load(load_state), .x_init,
    .u_we(m_uwe), .u_in(m_uin),
    .start(m_start), .busy(m_busy), .done(m_done),
    .x(x_state), .u(u_model)
  );

  logic n_sample, n_valid;
  noise_injector #(.NOISE_BITS(NOISE_BITS)) u_noise (
    .clk, .rst_n,
    .sample(n_sample), .noise_en,
    .x_in(x_state), .x_out(x_meas), .valid(n_valid)
  );

  // State handshake to the controller, delayed.
  localparam int unsigned XW = NX * MODEL_W;
  logic          xd_in_valid, xd_out_valid, xd_busy;
  logic [XW-1:0] xd_in_data, xd_out_data;
  logic [DSW-1:0] xd_tap;
  mfix_t         x_ctrl [NX];
  for (genvar i = 0; i < NX; i++) begin : g_x
    assign xd_in_data[i*MODEL_W +: MODEL_W] = x_meas[i];
    assign x_ctrl[i] = mfix_t'(xd_out_data[i*MODEL_W +: MODEL_W]);
  end
  u_delay_line #(.DW(XW), .DEPTH(DELAY_DEPTH), .SEED(16'h1D0F)) u_xdelay (
    .clk, .rst_n,
    .in_valid(xd_in_valid), .in_data(xd_in_data),
    .delay(x_delay_sel), .rand_en(jitter_en),
    .out_valid(xd_out_valid), .out_data(xd_out_data),
    .busy(xd_busy), .tap_used(xd_tap)
  );

  logic c_start, c_done;
  // Both controllers see every start; ctrl_float picks whose U is used.
  logic signed [W-1:0] u_fix [NU], u_flt [NU];
  logic [NU-1:0]       mode_fix, mode_flt;
  logic                done_fix, done_flt;
  vsc_controller #(.M(M), .N(N)) u_ctrl_i (
    .clk, .rst_n,
    .start(c_start), .x_in(x_ctrl), .ref_in,
    .u_out(u_fix), .mode(mode_fix), .done(done_fix)
  );
  vsc_controller_fp #(.M(M), .N(N)) u_ctrl_fp (
    .clk, .rst_n,
    .start(c_start), .x_in(x_ctrl), .ref_in,
    .u_out(u_flt), .mode(mode_flt), .done(done_flt)
  );
  assign u_ctrl    = ctrl_float ? u_flt : u_fix;
  assign ctrl_mode = ctrl_float ? mode_flt : mode_fix;
  assign c_done    = ctrl_float ? done_flt : done_fix;

  logic           d_in_valid, d_out_valid, d_busy;
  logic [2*W-1:0] d_out_data;
  logic [DSW-1:0] d_tap;
  u_delay_line #(.DW(2 * W), .DEPTH(DELAY_DEPTH)) u_delay (
    .clk, .rst_n,
    .in_valid(d_in_valid), .in_data({u_ctrl[1], u_ctrl[0]}),
    .delay(delay_sel), .rand_en(jitter_en),
    .out_valid(d_out_valid), .out_data(d_out_data),
    .busy(d_busy), .tap_used(d_tap)
  );

  // Delayed U, Qm.n -> Q8.24, into the emulator's input register.
  assign m_uwe = d_out_valid;
  for (genvar k = 0; k < NU; k++) begin : g_u
    assign m_uin[k] = mfix_t'($signed(d_out_data[k*W +: W])) <<< (MODEL_F - N);
  end

  // ---- control FSM --------------------------------------------------------
  always_comb begin
    m_start    = 1'b0;
    n_sample   = 1'b0;
    xd_in_valid = 1'b0;
    c_start    = 1'b0;
    d_in_valid = 1'b0;
    unique case (state)
      S_IDLE:  m_start    = pending && !load_state;
      S_MODEL: n_sample   = m_done;
      S_SENSE: xd_in_valid = n_valid;
      S_XWAIT: c_start    = xd_out_valid;
      S_PUSH:  d_in_valid = !d_busy;
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= S_IDLE;
      pending       <= 1'b0;
      step_done     <= 1'b0;
      step_count    <= '0;
      stale_count   <= '0;
      overrun_count <= '0;
    end else begin
      step_done <= 1'b0;
      if (tick) begin
        if (pending && !m_start) overrun_count <= overrun_count + 1'b1;
        pending <= 1'b1;
      end else if (m_start) begin
        pending <= 1'b0;
      end
      unique case (state)
        S_IDLE: if (m_start) begin
          state <= S_MODEL;
          if (d_busy) stale_count <= stale_count + 1'b1;
        end
        S_MODEL: if (m_done)  state <= S_SENSE;
        S_SENSE: if (n_valid) state <= S_XWAIT;
        S_XWAIT: if (xd_out_valid) state <= S_CTRL;
        S_CTRL:  if (c_done)  state <= S_PUSH;
        S_PUSH:  if (!d_busy) begin
          state      <= S_IDLE;
          step_done  <= 1'b1;
          step_count <= step_count + 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The controller is only started from its state.
  a_ctrl_after_sense: assert property (@(posedge clk) disable iff (!rst_n)
    c_start |-> state == S_XWAIT);

  // The state delay line is always free when the FSM hands it a state.
  a_xdelay_free: assert property (@(posedge clk) disable iff (!rst_n)
    xd_in_valid |-> !xd_busy);

endmodule
