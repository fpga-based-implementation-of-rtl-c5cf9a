// act_lut: activation function of a neuron (the FNET lookup table).
//
// The tangent sigmoid is represented by 21 points joined by straight lines. Two
// parallel 21 x 16-bit ROMs hold the breakpoints (LUT_X) and the function values
// (LUT_Y). A comparator bank compares the input with every inner breakpoint; the
// number of breakpoints at or below the input is the segment index k. The output is
//   y = LUT_Y[k] + ((x - LUT_X[k]) * (LUT_Y[k+1] - LUT_Y[k])) >>> LUT_STEP_SH
// and is clamped to LUT_Y[0] / LUT_Y[20] outside the table span. The breakpoints
// must be evenly spaced 2^LUT_STEP_SH LSBs apart (a design choice that turns the
// division of the interpolation into a shift).
//
// act_type (the neuron's 2-bit TYPE input) selects the function:
//   ACT_TANSIG  tanh(x) from the table
//   ACT_LOGSIG  0.5 + 0.5*tanh(x/2), the logistic sigmoid, from the same table
//   ACT_PURELIN / ACT_PURELIN2  y = x
// The encoding of TYPE is this design's choice. Purely combinational; the neuron
// registers the result.
module act_lut
  import fnn_pkg::*;
#(
  parameter lut_t LUT_X = LUT_X_DEF,
  parameter lut_t LUT_Y = LUT_Y_DEF
) (
  input  fx_t  x,
  input  act_t act_type,
  output fx_t  y
);

  localparam int N = LUT_POINTS;

  fx_t tx;          // table input
  fx_t ty;          // table output
  logic [N-2:0] ge; // comparator bank: tx >= LUT_X[j], j = 1..N-1
  int unsigned k;
  logic signed [FX_W:0]     dx;
  logic signed [FX_W:0]     dy;
  logic signed [2*FX_W+1:0] step;

  always_comb begin
    tx = (act_type == ACT_LOGSIG) ? fx_t'(x >>> 1) : x;
    for (int j = 1; j < N; j++) ge[j-1] = (tx >= LUT_X[j]);
    k = 0;
    for (int j = 0; j < N - 1; j++) k += 32'(ge[j]);
    dx   = '0;
    dy   = '0;
    step = '0;
    if (tx <= LUT_X[0]) begin
      ty = LUT_Y[0];
    end else if (k >= N - 1) begin
      ty = LUT_Y[N-1];
    end else begin
      dx   = (FX_W+1)'(tx) - (FX_W+1)'(LUT_X[k]);
      dy   = (FX_W+1)'(LUT_Y[k+1]) - (FX_W+1)'(LUT_Y[k]);
      step = (dx * dy) >>> LUT_STEP_SH;
      ty   = sat_fx(64'(LUT_Y[k]) + 64'(step));
    end
    unique case (act_type)
      ACT_TANSIG: y = ty;
      ACT_LOGSIG: y = fx_t'((ty >>> 1) + FX_HALF);
      default:    y = x;
    endcase
  end

endmodule
