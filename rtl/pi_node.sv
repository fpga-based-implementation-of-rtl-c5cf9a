// pi_node: multiplier node (pi) of the fuzzy inference.
//
// Forms the T-norm of its N_IN inputs as their algebraic product, which weights a
// rule's consequent by the rule's membership degree (mu_s * u_s). The product is
// built left to right; after each multiplication the Q8.22 result is shifted back
// to Q4.11 (floor) and saturated. Inputs that a rule does not use are tied to
// 1.0 (FX_ONE) by the instantiating block.
// Timing: the product is registered when en is high; valid pulses in the next
// clock together with the new y. rst is synchronous and active high.
// The product T-norm and the per-step truncation are this design's choices.
module pi_node
  import fnn_pkg::*;
#(
  parameter int N_IN = 4
) (
  input  logic clk,
  input  logic rst,
  input  logic en,
  input  fx_t  a [N_IN],
  output fx_t  y,
  output logic valid
);

  fx_t p [N_IN];

  always_comb begin
    p[0] = a[0];
    for (int i = 1; i < N_IN; i++)
      p[i] = sat_fx(64'((prod_t'(p[i-1]) * prod_t'(a[i])) >>> FX_FRAC));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      y     <= '0;
      valid <= 1'b0;
    end else begin
      if (en) y <= p[N_IN-1];
      valid <= en;
    end
  end

endmodule
