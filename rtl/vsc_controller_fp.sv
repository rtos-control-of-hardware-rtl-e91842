// vsc_controller_fp: the two-input sliding-mode attitude controller in
// single-precision floating point. It has the same law, surface, gains and
// ports as the fixed-point vsc_controller, so the loop can use either one.
//
// How it works: on start, the error e = x_in - ref_in is formed exactly in
// 33-bit fixed point and converted to single precision; this is the only
// rounding of the measured state. Then Z = T e is computed one row per clock
// with four multipliers and a three-adder tree. Next the surfaces
//   s1 = z3 - lambda1 z1,   s2 = z4 - lambda2 z2
// are formed, and finally the control law
//   u_i = -Ks sign(s_i)          when |s_i| > eps   (reaching mode, mode=1)
//   u_i = -(Ks / eps) s_i        otherwise           (boundary layer)
// with eps = 2^EPS_SHIFT = 128, the same value the fixed-point version uses. u is converted to the loop's Qm.n
// output word, rounded to nearest and saturated.
//
// Interface and timing: start samples x_in and ref_in; u_out and mode are
// valid when done pulses, 7 clocks after start. Starts must be at least 7
// clocks apart (the loop's FSM waits for done).
//
// A floating-point controller beside the fixed-point ones, with the same law,
// follows the source design. The single-precision format, the row-serial
// schedule and the fixed-point conversions at its ports are this design's
// choices.
module vsc_controller_fp
  import hil_pkg::*;
  import fp32_pkg::*;
#(
  parameter int unsigned M         = 9,
  parameter int unsigned N         = 9,
  parameter int          KS_GAIN   = KS,
  parameter int unsigned EPS_SHIFT = 7,
  parameter int          LAM1      = LAMBDA1,
  parameter int          LAM2      = LAMBDA2,
  localparam int unsigned W        = M + N
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  mfix_t               x_in   [NX],
  input  mfix_t               ref_in [NX],
  output logic signed [W-1:0] u_out  [NU],
  output logic [NU-1:0]       mode,
  output logic                done
);

  // Constants in single precision.
  localparam real  EPS_R   = real'(2 ** EPS_SHIFT);
  localparam f32_t EPS_F   = real_to_f32(EPS_R);
  localparam f32_t NL1_F   = real_to_f32(real'(-LAM1));
  localparam f32_t NL2_F   = real_to_f32(real'(-LAM2));
  localparam f32_t KLIN_F  = real_to_f32(-real'(KS_GAIN) / EPS_R);
  localparam logic signed [W-1:0] KS_Q = (W)'(KS_GAIN) <<< N;

  f32_t t_f [NX][NX];
  for (genvar r = 0; r < NX; r++) begin : g_t
    for (genvar c = 0; c < NX; c++) begin : g_c
      assign t_f[r][c] = real_to_f32(T_R[r][c]);
    end
  end

  f32_t       e [NX];
  f32_t       z [NX];
  f32_t       s [NU];
  logic [1:0] row;
  logic       st_rows, st_s, st_u;   // Z rows in progress, S next, U next

  // One row of Z = T e per clock.
  f32_t p0, p1, p2, p3, z_row;
  always_comb begin
    p0    = f32_mul(t_f[row][0], e[0]);
    p1    = f32_mul(t_f[row][1], e[1]);
    p2    = f32_mul(t_f[row][2], e[2]);
    p3    = f32_mul(t_f[row][3], e[3]);
    z_row = f32_add(f32_add(p0, p1), f32_add(p2, p3));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_rows <= 1'b0;
      st_s    <= 1'b0;
      st_u    <= 1'b0;
      row     <= '0;
      done    <= 1'b0;
      mode    <= '0;
      for (int i = 0; i < NX; i++) begin
        e[i] <= F32_ZERO;
        z[i] <= F32_ZERO;
      end
      for (int i = 0; i < NU; i++) begin
        s[i]     <= F32_ZERO;
        u_out[i] <= '0;
      end
    end else begin
      done <= 1'b0;
      // 1. error, exact in fixed point, then rounded once
      if (start) begin
        for (int i = 0; i < NX; i++)
          e[i] <= fix_to_f32({x_in[i][MODEL_W-1], x_in[i]} - {ref_in[i][MODEL_W-1], ref_in[i]},
                             MODEL_F);
        row     <= '0;
        st_rows <= 1'b1;
      end else if (st_rows && row == 2'd3) begin
        st_rows <= 1'b0;
      end
      st_s <= st_rows && row == 2'd3;
      st_u <= st_s;
      // 2. Z = T e, rows 0..3
      if (st_rows) begin
        z[row] <= z_row;
        row    <= row + 2'd1;
      end
      // 3. S = C Z
      if (st_s) begin
        s[0] <= f32_add(z[2], f32_mul(NL1_F, z[0]));
        s[1] <= f32_add(z[3], f32_mul(NL2_F, z[1]));
      end
      // 4. control law
      if (st_u) begin
        for (int i = 0; i < NU; i++) begin
          if (s[i][30:0] > EPS_F[30:0]) begin
            u_out[i] <= s[i][31] ? KS_Q : -KS_Q;
            mode[i]  <= 1'b1;
          end else begin
            u_out[i] <= sat_q(f32_to_fix(f32_mul(KLIN_F, s[i]), N));
            mode[i]  <= 1'b0;
          end
        end
        done <= 1'b1;
      end
    end
  end

  function automatic logic signed [W-1:0] sat_q(logic signed [31:0] v);
    if (v > 32'(2 ** (W - 1) - 1))       return {1'b0, {(W-1){1'b1}}};
    else if (v < -32'(2 ** (W - 1)))     return {1'b1, {(W-1){1'b0}}};
    else                                 return (W)'(v);
  endfunction

endmodule
