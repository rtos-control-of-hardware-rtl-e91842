// sat_model: hardware-in-the-loop emulator of the linearised roll/yaw
// attitude dynamics of a satellite, x(k+1) = Ad x(k) + Bd u(k).
//
// How it works: the state x and the input u are held in registers. A step is
// started with `start`; the module then evaluates one row of the update per
// clock, i.e. a row of the matrix-vector product Ad x (four multipliers) plus
// the matching row of Bd u (two multipliers) summed by one adder tree, as in
// the model's block diagram (matrix-vector product, vector-vector product,
// adder). The four new values are collected and committed together, so every
// row reads the old state.
//
// Number format: Q8.24 for states, inputs and coefficients (32 bits); products
// are 64 bits and are rounded back to Q8.24. Ad and Bd are parameters whose
// defaults are the 1 ms discretisation from hil_pkg.
//
// Interface and timing:
//   load   - copies x_init into the state (initial attitude); has priority.
//   u_we   - writes u_in into the input register (the delayed controller
//            output); may happen at any time, a step uses the value held
//            when it starts.
//   start  - begins a step; ignored while busy.
//   done   - one-cycle pulse NX+1 = 5 cycles after start, when x holds x(k+1)
//            (one cycle to accept start, one per row).
// The 32-bit format, the row-per-cycle schedule and the rounding are this
// design's choices; the equation and the coefficients are the model's.
module sat_model
  import hil_pkg::*;
#(
  parameter real AD [NX][NX] = AD_R,
  parameter real BD [NX][NU] = BD_R
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  load,
  input  mfix_t x_init [NX],
  input  logic  u_we,
  input  mfix_t u_in [NU],
  input  logic  start,
  output logic  busy,
  output logic  done,
  output mfix_t x [NX],
  output mfix_t u [NU]
);

  typedef logic signed [2*MODEL_W-1:0] prod_t;

  logic [1:0] row;
  mfix_t      x_nxt [NX];
  mfix_t      row_val;

  // Coefficients converted to Q8.24 at elaboration.
  mfix_t ad_q [NX][NX];
  mfix_t bd_q [NX][NU];
  for (genvar r = 0; r < NX; r++) begin : g_coef
    for (genvar c = 0; c < NX; c++) begin : g_a
      assign ad_q[r][c] = to_mfix(AD[r][c]);
    end
    for (genvar c = 0; c < NU; c++) begin : g_b
      assign bd_q[r][c] = to_mfix(BD[r][c]);
    end
  end

  // One row of Ad*x + Bd*u, rounded to nearest.
  always_comb begin
    prod_t acc;
    acc = '0;
    for (int j = 0; j < NX; j++)
      acc += prod_t'(ad_q[row][j]) * prod_t'(x[j]);
    for (int k = 0; k < NU; k++)
      acc += prod_t'(bd_q[row][k]) * prod_t'(u[k]);
    acc += prod_t'(1) <<< (MODEL_F - 1);
    row_val = mfix_t'(acc >>> MODEL_F);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row    <= '0;
      busy   <= 1'b0;
      done   <= 1'b0;
      for (int i = 0; i < NX; i++) begin
        x[i]     <= '0;
        x_nxt[i] <= '0;
      end
      for (int k = 0; k < NU; k++) u[k] <= '0;
    end else begin
      done   <= 1'b0;
      if (u_we)
        for (int k = 0; k < NU; k++) u[k] <= u_in[k];
      if (load) begin
        for (int i = 0; i < NX; i++) x[i] <= x_init[i];
        busy <= 1'b0;
        row  <= '0;
      end else if (busy) begin
        x_nxt[row] <= row_val;
        row        <= row + 1'b1;
        if (row == 2'(NX - 1)) begin
          // last row: commit the whole new state at once
          for (int i = 0; i < NX - 1; i++) x[i] <= x_nxt[i];
          x[NX-1] <= row_val;
          busy    <= 1'b0;
          done    <= 1'b1;
        end
      end else if (start) begin
        busy <= 1'b1;
        row  <= '0;
      end
    end
  end

endmodule
