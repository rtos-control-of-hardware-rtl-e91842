// vsc_controller: two-input variable structure (sliding-mode) attitude
// controller for the roll/yaw axes, in Qm.n fixed point.
//
// How it works, one computation per `start`, four pipeline steps:
//   1. e = x - ref, the measured state minus the reference, converted from
//      the emulator's Q8.24 to Qm.n (arithmetic shift, saturation).
//   2. Z = T e, the state in the controllable canonical form.
//   3. S = C Z, the two switching functions
//        s1 = -LAMBDA1*z1 + z3,  s2 = -LAMBDA2*z2 + z4.
//   4. The control law, per axis:
//        |s_i| >  eps : u_i = -Ks * sign(s_i)      (reaching mode)
//        |s_i| <= eps : u_i = -(Ks/eps) * s_i       (linear law in the layer)
//      The linear law is -Kn*Z with Kn = (Ks/eps)*C, which makes u continuous
//      at the layer's edge; eps = 2^EPS_SHIFT so Ks/eps is a shift.
// Inputs e and outputs u are Qm.n words (m = M, n = N, W = M+N bits); the
// coefficients of T carry N fraction bits. Products and sums inside are kept
// at full width and only the output is saturated to Qm.n, so the integer
// range m limits the state and control words, not the intermediate Z.
//
// Interface and timing: `start` samples x_in and ref_in; u_out, mode and s
// are valid with the `done` pulse 4 cycles later. mode[i] = 1 means axis i is
// in reaching mode.
// Following the model: T, the two surfaces, lambda = -1 and -2, Ks = 30 and
// the sign law. This design's choices: the Q8.24 input format, the boundary
// layer width 2^7, full-width intermediates, and the surface written as
// z3 - LAMBDA1*z1, the form whose sliding motion z1' = LAMBDA1*z1 is stable.
module vsc_controller
  import hil_pkg::*;
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

  localparam int unsigned CW = 14 + N;          // coefficient width
  localparam int unsigned ZW = W + CW + 3;      // width of Z (2N fraction bits)
  localparam int unsigned SW = ZW + 4;          // width of S (2N fraction bits)
  localparam int unsigned UW = SW + 8;          // width of Ks*S

  typedef logic signed [W-1:0]  qfix_t;
  typedef logic signed [CW-1:0] coef_t;
  typedef logic signed [ZW-1:0] zfix_t;
  typedef logic signed [SW-1:0] sfix_t;
  typedef logic signed [UW-1:0] ufix_t;

  // T with N fraction bits.
  coef_t t_q [NX][NX];
  for (genvar r = 0; r < NX; r++) begin : g_t
    for (genvar c = 0; c < NX; c++) begin : g_c
      assign t_q[r][c] = coef_t'(to_fixn(T_R[r][c], N));
    end
  end

  // Q8.24 -> Qm.n with saturation.
  function automatic qfix_t to_q(logic signed [MODEL_W:0] v);
    logic signed [MODEL_W:0] sh;
    sh = v >>> (MODEL_F - N);
    if (sh > (MODEL_W+1)'(2 ** (W - 1) - 1))      return {1'b0, {(W-1){1'b1}}};
    else if (sh < -(MODEL_W+1)'(2 ** (W - 1)))    return {1'b1, {(W-1){1'b0}}};
    else                                          return qfix_t'(sh);
  endfunction

  function automatic qfix_t sat_u(ufix_t v);
    if (v > ufix_t'(2 ** (W - 1) - 1))            return {1'b0, {(W-1){1'b1}}};
    else if (v < -ufix_t'(2 ** (W - 1)))          return {1'b1, {(W-1){1'b0}}};
    else                                          return qfix_t'(v);
  endfunction

  qfix_t       e [NX];
  zfix_t       z [NX];
  sfix_t       s [NU];
  logic [2:0]  stage;

  // Z = T e, one dot product per row.
  zfix_t z_comb [NX];
  always_comb
    for (int i = 0; i < NX; i++) begin
      z_comb[i] = '0;
      for (int j = 0; j < NX; j++) z_comb[i] += zfix_t'(t_q[i][j]) * zfix_t'(e[j]);
    end

  localparam int    NL1  = -LAM1;
  localparam int    NL2  = -LAM2;
  localparam sfix_t EPS  = sfix_t'(1) <<< (EPS_SHIFT + 2 * N);
  localparam qfix_t KS_Q = qfix_t'(KS_GAIN) <<< N;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stage <= '0;
      done  <= 1'b0;
      mode  <= '0;
      for (int i = 0; i < NX; i++) begin
        e[i] <= '0;
        z[i] <= '0;
      end
      for (int i = 0; i < NU; i++) begin
        s[i]     <= '0;
        u_out[i] <= '0;
      end
    end else begin
      stage <= {stage[1:0], start};
      done  <= stage[2];
      // 1. error in Qm.n
      if (start)
        for (int i = 0; i < NX; i++)
          e[i] <= to_q({x_in[i][MODEL_W-1], x_in[i]} - {ref_in[i][MODEL_W-1], ref_in[i]});
      // 2. Z = T e
      if (stage[0])
        for (int i = 0; i < NX; i++) z[i] <= z_comb[i];
      // 3. S = C Z
      if (stage[1]) begin
        s[0] <= sfix_t'(NL1) * sfix_t'(z[0]) + sfix_t'(z[2]);
        s[1] <= sfix_t'(NL2) * sfix_t'(z[1]) + sfix_t'(z[3]);
      end
      // 4. control law
      if (stage[2])
        for (int i = 0; i < NU; i++) begin
          if (s[i] > EPS) begin
            u_out[i] <= -KS_Q;
            mode[i]  <= 1'b1;
          end else if (s[i] < -EPS) begin
            u_out[i] <= KS_Q;
            mode[i]  <= 1'b1;
          end else begin
            u_out[i] <= sat_u(-((ufix_t'(KS_GAIN) * ufix_t'(s[i])) >>> (EPS_SHIFT + N)));
            mode[i]  <= 1'b0;
          end
        end
    end
  end

endmodule
