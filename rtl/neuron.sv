// neuron: sigmoidal neuron, a NET linear combiner followed by an FNET activation.
//
// NET: one multiplier per input forms x[i]*w[i] at full 32-bit precision and the
// products are registered (the REG after each MULT). An adder then sums the
// registered products with the bias, the sum is shifted back to Q4.11 (floor) and
// saturated to 16 bits.
// FNET: the sum goes through the activation table (act_lut), whose function is
// chosen by the 2-bit TYPE input, and the result is registered.
//
// Timing: free-running two-stage pipeline. x and w are registered (as products)
// at one clock edge and the result appears on y after the next edge, so inputs
// applied in clock c are on y in clock c+2. bias and TYPE are used in the second
// stage and are sampled at that second edge.
// rst is synchronous and active high and clears both register stages.
// The structure (multipliers, product registers, adder with bias, table, output
// register, TYPE input) follows the published neuron; widths, rounding,
// saturation and reset style are this design's choices.
module neuron
  import fnn_pkg::*;
#(
  parameter int   N_IN  = 2,
  parameter lut_t LUT_X = LUT_X_DEF,
  parameter lut_t LUT_Y = LUT_Y_DEF
) (
  input  logic clk,
  input  logic rst,
  input  fx_t  x    [N_IN],
  input  fx_t  w    [N_IN],
  input  fx_t  bias,
  input  act_t act_type,
  output fx_t  y
);

  fx_t net;
  fx_t act;

  neuron_net #(.N_IN(N_IN)) u_net (
    .clk (clk),
    .rst (rst),
    .x   (x),
    .w   (w),
    .bias(bias),
    .net (net)
  );

  act_lut #(.LUT_X(LUT_X), .LUT_Y(LUT_Y)) u_fnet (
    .x       (net),
    .act_type(act_type),
    .y       (act)
  );

  always_ff @(posedge clk) begin
    if (rst) y <= '0;
    else     y <= act;
  end

endmodule
