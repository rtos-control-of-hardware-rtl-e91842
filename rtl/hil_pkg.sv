// hil_pkg: types and constants shared by the satellite hardware-in-the-loop
// (HiL) emulator and the sliding-mode attitude controller.
//
// The emulator works in 32-bit two's-complement fixed point. The split of
// those 32 bits is this design's choice: Q8.24 (8 integer bits including the
// sign, 24 fraction bits), which keeps the smallest input coefficient of the
// discretised plant (5e-7) representable. The controller works in Qm.n with
// m = n = 9 by default, the representation that tracked floating point best.
//
// The constants are the discretised roll/yaw model for a 1 ms step and the
// canonical-form transformation T used by the controller. They are written
// as real numbers and converted to fixed point at elaboration time.
package hil_pkg;

  // ---- emulator number format -------------------------------------------
  localparam int unsigned MODEL_W = 32;   // word width
  localparam int unsigned MODEL_F = 24;   // fraction bits (Q8.24)
  typedef logic signed [MODEL_W-1:0] mfix_t;

  // Number of states (yaw angle, roll angle, yaw rate, roll rate) and inputs.
  localparam int unsigned NX = 4;
  localparam int unsigned NU = 2;

  // Real value to Q8.24, rounded to nearest.
  function automatic mfix_t to_mfix(real v);
    real s;
    s = v * 16777216.0;
    return mfix_t'($rtoi(s < 0.0 ? s - 0.5 : s + 0.5));
  endfunction

  // ---- discretised plant, 1 ms step --------------------------------------
  // Ad: identity plus the 1 ms integration of the rates into the angles.
  localparam real AD_R [NX][NX] = '{
    '{1.0, 0.0, 0.001, 0.0},
    '{0.0, 1.0, 0.0,   0.001},
    '{0.0, 0.0, 1.0,   0.0},
    '{0.0, 0.0, 0.0,   1.0}};

  // Bd: magnitudes dt^2/2 = 5e-7 and dt = 1e-3. The sign follows the
  // continuous input matrix (-1/I1, -1/I3 on the rate rows): a positive
  // control moment decelerates the axis.
  localparam real BD_R [NX][NU] = '{
    '{-5.0e-7, 0.0},
    '{0.0, -5.0e-7},
    '{-0.001, 0.0},
    '{0.0, -0.001}};

  // ---- controller constants ----------------------------------------------
  // Transformation to the controllable canonical form, Z = T X.
  localparam real T_R [NX][NX] = '{
    '{-1980.0,    0.0,     0.0,    0.0},
    '{    0.0, -407.0,     0.0,    0.0},
    '{    0.0,   -8.4, -1989.0,    0.0},
    '{    1.7,    0.0,     0.0, -407.0}};

  // Desired sliding-surface eigenvalues.
  localparam int LAMBDA1 = -1;
  localparam int LAMBDA2 = -2;

  // Switching gain Ks of the reaching law.
  localparam int KS = 30;

  // Real value to a signed integer with f fraction bits, rounded to nearest.
  function automatic int to_fixn(real v, int unsigned f);
    real s;
    s = v * (2.0 ** f);
    return $rtoi(s < 0.0 ? s - 0.5 : s + 0.5);
  endfunction

endpackage
