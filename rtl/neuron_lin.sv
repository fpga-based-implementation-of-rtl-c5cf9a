// neuron_lin: linear (purelin) neuron used in the output layer of the LINEAR MLP.
//
// It is the NET part of the sigmoidal neuron (multipliers, product registers,
// adder with bias, shift back to Q4.11 with saturation) followed directly by the
// output register: no activation table, which saves area. Keeping the output
// register gives it the same two-clock latency as the sigmoidal neuron, so both
// kinds of output layer deliver their result in the same clock.
// rst is synchronous and active high.
module neuron_lin
  import fnn_pkg::*;
#(
  parameter int N_IN = 7
) (
  input  logic clk,
  input  logic rst,
  input  fx_t  x    [N_IN],
  input  fx_t  w    [N_IN],
  input  fx_t  bias,
  output fx_t  y
);

  fx_t net;

  neuron_net #(.N_IN(N_IN)) u_net (
    .clk (clk),
    .rst (rst),
    .x   (x),
    .w   (w),
    .bias(bias),
    .net (net)
  );

  always_ff @(posedge clk) begin
    if (rst) y <= '0;
    else     y <= net;
  end

endmodule
