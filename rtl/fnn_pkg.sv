// fnn_pkg: number format, activation-type encoding and the default activation
// table shared by every block of the FNN T-H (Takagi-Hayashi fuzzy neural network).
//
// All data are 16-bit two's-complement fixed point. The word width follows the
// published design; the split into 4 integer and 11 fraction bits (Q4.11, range
// -16 .. +15.9995, step 1/2048) is this implementation's choice.
//
// The tangent-sigmoid table has 21 points, as published. The published points were
// tuned by a genetic algorithm and are not available, so the defaults here are
//   LUT_X[k] = (-5 + 0.5*k) * 2048            (breakpoints, k = 0..20)
//   LUT_Y[k] = round(2048 * tanh(-5 + 0.5*k))  (function values)
// Breakpoints are evenly spaced 2^LUT_STEP_SH LSBs apart, so interpolation needs
// only a shift; any other table with that spacing can be passed as a parameter.
package fnn_pkg;

  localparam int FX_W    = 16;
  localparam int FX_FRAC = 11;
  localparam int PROD_W  = 2 * FX_W;

  typedef logic signed [FX_W-1:0]   fx_t;
  typedef logic signed [PROD_W-1:0] prod_t;

  localparam fx_t FX_ONE  = fx_t'(1 <<< FX_FRAC);
  localparam fx_t FX_HALF = fx_t'(1 <<< (FX_FRAC - 1));
  localparam fx_t FX_MAX  = fx_t'({1'b0, {(FX_W-1){1'b1}}});
  localparam fx_t FX_MIN  = fx_t'({1'b1, {(FX_W-1){1'b0}}});

  // TYPE input of the neuron (2 bits).
  typedef enum logic [1:0] {
    ACT_PURELIN  = 2'd0,
    ACT_TANSIG   = 2'd1,
    ACT_LOGSIG   = 2'd2,
    ACT_PURELIN2 = 2'd3
  } act_t;

  localparam int LUT_POINTS  = 21;
  localparam int LUT_STEP_SH = 10;   // 0.5 in Q4.11

  typedef fx_t lut_t [LUT_POINTS];

  localparam lut_t LUT_X_DEF = '{
    -16'sd10240, -16'sd9216, -16'sd8192, -16'sd7168, -16'sd6144, -16'sd5120,
    -16'sd4096,  -16'sd3072, -16'sd2048, -16'sd1024,  16'sd0,     16'sd1024,
     16'sd2048,   16'sd3072,  16'sd4096,  16'sd5120,  16'sd6144,  16'sd7168,
     16'sd8192,   16'sd9216,  16'sd10240};

  localparam lut_t LUT_Y_DEF = '{
    -16'sd2048, -16'sd2047, -16'sd2047, -16'sd2044, -16'sd2038, -16'sd2021,
    -16'sd1974, -16'sd1854, -16'sd1560, -16'sd946,   16'sd0,     16'sd946,
     16'sd1560,  16'sd1854,  16'sd1974,  16'sd2021,  16'sd2038,  16'sd2044,
     16'sd2047,  16'sd2047,  16'sd2048};

  // Clamp a wide signed value into the 16-bit data word.
  function automatic fx_t sat_fx(input logic signed [63:0] v);
    if (v > 64'(FX_MAX))      return FX_MAX;
    else if (v < 64'(FX_MIN)) return FX_MIN;
    else                      return fx_t'(v);
  endfunction

endpackage
