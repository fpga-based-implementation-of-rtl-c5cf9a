// out_adder: output adder (add_RFN) of the FNN T-H network.
//
// Adds the weighted rule outputs from the pi nodes into one network output,
// saturated to 16 bits. Unused inputs are tied to 0 by the instantiating block.
// Timing: the sum is registered when en is high; valid pulses in the next clock
// together with the new y. rst is synchronous and active high.
// The published design shows only this adder after the pi nodes, so the output is
// the plain sum of mu_s * u_s, without a division by the sum of the memberships.
module out_adder
  import fnn_pkg::*;
#(
  parameter int N_IN = 9
) (
  input  logic clk,
  input  logic rst,
  input  logic en,
  input  fx_t  a [N_IN],
  output fx_t  y,
  output logic valid
);

  logic signed [FX_W+$clog2(N_IN+1):0] sum;

  always_comb begin
    sum = '0;
    for (int i = 0; i < N_IN; i++) sum += $bits(sum)'(a[i]);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      y     <= '0;
      valid <= 1'b0;
    end else begin
      if (en) y <= sat_fx(64'(sum));
      valid <= en;
    end
  end

endmodule
