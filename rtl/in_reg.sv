// in_reg: single input register with replicated outputs (reg_4).
//
// One 16-bit word is captured when load is high and driven unchanged on N_COPY
// outputs, one per block that consumes it (for a network input: the SIG MLP and
// every LINEAR MLP; for a membership degree: every pi node of that rule). The
// value holds until the next load. valid (out_sinal) pulses for one clock, the
// clock after a load, when the new value is first on the outputs.
// rst is synchronous and active high and clears the word and the flag.
// The replicated-output register follows the published block diagram; the load
// enable and the meaning of the flag are this design's choices.
module in_reg
  import fnn_pkg::*;
#(
  parameter int N_COPY = 4
) (
  input  logic clk,
  input  logic rst,
  input  logic load,
  input  fx_t  d,
  output fx_t  q [N_COPY],
  output logic valid
);

  fx_t word;

  always_ff @(posedge clk) begin
    if (rst) begin
      word  <= '0;
      valid <= 1'b0;
    end else begin
      if (load) word <= d;
      valid <= load;
    end
  end

  for (genvar c = 0; c < N_COPY; c++) begin : g_copy
    assign q[c] = word;
  end

endmodule
