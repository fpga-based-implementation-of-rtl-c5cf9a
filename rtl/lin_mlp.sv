// lin_mlp: LINEAR MLP: the network that gives the consequent of one fuzzy rule.
//
// N_HL hidden layers (default 1) of N_HID tangent-sigmoid neurons (mlp_hidden):
// the first sees all N_IN inputs (w_hid, b_hid), each further one all outputs of
// the layer before (w_hh, b_hh, unused when N_HL = 1). The last feeds an output
// layer of N_OUT linear neurons (neuron_lin) without activation table. All neurons
// of a layer work in parallel. Weights and biases are ports, so the same hardware
// can hold any trained network of this size; unused hidden neurons are disabled by
// giving them zero outgoing weights.
//
// Timing: each layer takes 2 clocks, so y holds the result for the inputs
// presented with start exactly 2*(N_HL+1) clocks later (4 with one hidden layer),
// in the clock where done (out_sinal) is high. x is sampled at the first clock
// edge after start, so a new input set may follow every clock; weights and biases
// are meant to stay static while input sets are in flight. rst is synchronous
// and active high. The layer structure and the output-layer function follow the
// published network; the port-based weights are this design's choice.
module lin_mlp
  import fnn_pkg::*;
#(
  parameter int N_IN  = 4,
  parameter int N_HID = 7,
  parameter int N_OUT = 1,
  parameter int N_HL  = 1,
  localparam int N_HH = (N_HL > 1) ? N_HL - 1 : 1
) (
  input  logic clk,
  input  logic rst,
  input  logic start,
  input  fx_t  x     [N_IN],
  input  fx_t  w_hid [N_HID][N_IN],
  input  fx_t  b_hid [N_HID],
  input  fx_t  w_hh  [N_HH][N_HID][N_HID],
  input  fx_t  b_hh  [N_HH][N_HID],
  input  fx_t  w_out [N_OUT][N_HID],
  input  fx_t  b_out [N_OUT],
  output fx_t  y     [N_OUT],
  output logic done
);

  fx_t h [N_HID];

  mlp_hidden #(.N_IN(N_IN), .N_HID(N_HID), .N_HL(N_HL)) u_hid (
    .clk (clk),
    .rst (rst),
    .x   (x),
    .w_in(w_hid),
    .b_in(b_hid),
    .w_hh(w_hh),
    .b_hh(b_hh),
    .h   (h)
  );

  for (genvar o = 0; o < N_OUT; o++) begin : g_out
    neuron_lin #(.N_IN(N_HID)) u_n (
      .clk (clk),
      .rst (rst),
      .x   (h),
      .w   (w_out[o]),
      .bias(b_out[o]),
      .y   (y[o])
    );
  end

  out_ctrl #(.LATENCY(2 * (N_HL + 1))) u_octl (
    .clk  (clk),
    .rst  (rst),
    .start(start),
    .done (done)
  );

endmodule
