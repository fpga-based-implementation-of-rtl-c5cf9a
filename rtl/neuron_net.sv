// neuron_net: the NET part of a neuron (linear combiner).
//
// Each input is multiplied by its weight; the 32-bit products are registered.
// Combinationally after that register, the products and the bias (aligned to the
// product scale) are added in a wide accumulator, and the sum is shifted right by
// FX_FRAC (floor) and saturated to a 16-bit Q4.11 word on net.
// Latency: net reflects x and w of the previous clock and bias of the current one.
// rst (synchronous, active high) clears the product registers.
module neuron_net
  import fnn_pkg::*;
#(
  parameter int N_IN = 2
) (
  input  logic clk,
  input  logic rst,
  input  fx_t  x    [N_IN],
  input  fx_t  w    [N_IN],
  input  fx_t  bias,
  output fx_t  net
);

  localparam int ACC_W = PROD_W + $clog2(N_IN + 1) + 1;

  prod_t prod_q [N_IN];
  logic signed [ACC_W-1:0] acc;

  always_ff @(posedge clk) begin
    for (int i = 0; i < N_IN; i++) begin
      if (rst) prod_q[i] <= '0;
      else     prod_q[i] <= prod_t'(x[i]) * prod_t'(w[i]);
    end
  end

  always_comb begin
    acc = ACC_W'(bias) <<< FX_FRAC;
    for (int i = 0; i < N_IN; i++) acc += ACC_W'(prod_q[i]);
    net = sat_fx(64'(acc >>> FX_FRAC));
  end

endmodule
