// mlp_hidden: the hidden part of an MLP, N_HL layers of N_HID tangent-sigmoid
// neurons each.
//
// Layer 1 sees the N_IN network inputs (weights w_in, biases b_in); every further
// layer sees all N_HID outputs of the layer before it (weights w_hh[l], biases
// b_hh[l] for layer l+2). All neurons of a layer work in parallel, each layer
// adds 2 clocks of latency, so h follows x after 2*N_HL clocks. With N_HL = 1 the
// w_hh/b_hh ports (kept at size 1) are not used.
// rst is synchronous and active high.
module mlp_hidden
  import fnn_pkg::*;
#(
  parameter int N_IN  = 4,
  parameter int N_HID = 10,
  parameter int N_HL  = 1,
  localparam int N_HH = (N_HL > 1) ? N_HL - 1 : 1
) (
  input  logic clk,
  input  logic rst,
  input  fx_t  x    [N_IN],
  input  fx_t  w_in [N_HID][N_IN],
  input  fx_t  b_in [N_HID],
  input  fx_t  w_hh [N_HH][N_HID][N_HID],
  input  fx_t  b_hh [N_HH][N_HID],
  output fx_t  h    [N_HID]
);

  fx_t lay [N_HL][N_HID];

  for (genvar j = 0; j < N_HID; j++) begin : g_first
    neuron #(.N_IN(N_IN)) u_n (
      .clk     (clk),
      .rst     (rst),
      .x       (x),
      .w       (w_in[j]),
      .bias    (b_in[j]),
      .act_type(ACT_TANSIG),
      .y       (lay[0][j])
    );
  end

  for (genvar l = 1; l < N_HL; l++) begin : g_layer
    for (genvar j = 0; j < N_HID; j++) begin : g_n
      neuron #(.N_IN(N_HID)) u_n (
        .clk     (clk),
        .rst     (rst),
        .x       (lay[l-1]),
        .w       (w_hh[l-1][j]),
        .bias    (b_hh[l-1][j]),
        .act_type(ACT_TANSIG),
        .y       (lay[l][j])
      );
    end
  end

  assign h = lay[N_HL-1];

endmodule
