// out_ctrl: output controller of an MLP.
//
// The neurons form a free-running pipeline, so the MLP itself does not know which
// clock's output belongs to which input set. The output controller carries a start
// token through a LATENCY-stage shift register alongside the data and raises done
// (the out_sinal flag) in the clock the output layer holds the result for the
// input set that was presented with start. Several tokens may be in flight.
// LATENCY is 2 clocks per neuron layer; rst is synchronous and active high.
module out_ctrl #(
  parameter int LATENCY = 4
) (
  input  logic clk,
  input  logic rst,
  input  logic start,
  output logic done
);

  logic [LATENCY-1:0] token;

  always_ff @(posedge clk) begin
    if (rst) token <= '0;
    else     token <= {token[LATENCY-2:0], start};
  end

  assign done = token[LATENCY-1];

endmodule
