// fnn_th_top: fuzzy neural network in the Takagi-Hayashi form (FNN T-H).
//
// One SIG MLP maps the inputs to R membership degrees mu_s (one per fuzzy rule);
// R LINEAR MLPs map the same inputs to the rule consequents u_s; one pi node per
// rule and output forms mu_s * u_s; an adder per output sums the R products.
//
//   x --> in_reg (per input, replicated) --+--> sig_mlp --> in_reg (per rule) --+
//                                          +--> lin_mlp[0..R-1] ----------------+--> pi_node[s] --> out_adder --> y
//
// The network inputs fill the first N_X of the MLP_IN inputs of every MLP; the
// remaining MLP inputs are tied to 0. fnn_ctrl sequences the work (INIT once, then
// LOAD, PROCESS, SYNC per input set) and task_flags tells it when all MLPs are done.
//
// SIG_HL and LIN_HL set the number of hidden layers of the MLPs (default 1); the
// sig_w_hh/lin_w_hh weights of the further hidden layers are unused when 1.
//
// Interface: present x with in_valid; it is taken in a clock where in_ready is
// high. y is valid in the clock y_valid pulses, 6 + 2*max(SIG_HL, LIN_HL) clocks
// after the input was taken (8 at the defaults), and holds until the next result. Weights and biases are static inputs
// (trained off-line). rst is synchronous and active high.
// Default sizes are those of the published two-tank controller (2 inputs, SIG MLP
// 4/10/3, three LINEAR MLPs 4/7/1, one output). The output is the plain sum of
// the weighted consequents, as in the published hardware; no division by the sum
// of the memberships is performed.
module fnn_th_top
  import fnn_pkg::*;
#(
  parameter int N_X     = 2,
  parameter int MLP_IN  = 4,
  parameter int R       = 3,
  parameter int SIG_HID = 10,
  parameter int LIN_HID = 7,
  parameter int N_Y     = 1,
  parameter int SIG_HL  = 1,
  parameter int LIN_HL  = 1,
  localparam int SIG_HH = (SIG_HL > 1) ? SIG_HL - 1 : 1,
  localparam int LIN_HH = (LIN_HL > 1) ? LIN_HL - 1 : 1
) (
  input  logic clk,
  input  logic rst,
  input  fx_t  x         [N_X],
  input  logic in_valid,
  output logic in_ready,
  input  fx_t  sig_w_hid [SIG_HID][MLP_IN],
  input  fx_t  sig_b_hid [SIG_HID],
  input  fx_t  sig_w_hh  [SIG_HH][SIG_HID][SIG_HID],
  input  fx_t  sig_b_hh  [SIG_HH][SIG_HID],
  input  fx_t  sig_w_out [R][SIG_HID],
  input  fx_t  sig_b_out [R],
  input  fx_t  lin_w_hid [R][LIN_HID][MLP_IN],
  input  fx_t  lin_b_hid [R][LIN_HID],
  input  fx_t  lin_w_hh  [R][LIN_HH][LIN_HID][LIN_HID],
  input  fx_t  lin_b_hh  [R][LIN_HH][LIN_HID],
  input  fx_t  lin_w_out [R][N_Y][LIN_HID],
  input  fx_t  lin_b_out [R][N_Y],
  output fx_t  y         [N_Y],
  output logic y_valid,
  output logic [1:0] state
);

  // ---- control ------------------------------------------------------------
  logic in_load, flags_clear, all_done, mu_load;
  logic [R:0] mlp_done;   // [0] SIG MLP, [1..R] LINEAR MLPs
  logic [N_X-1:0] in_vld;
  logic [N_Y-1:0] add_vld;

  fnn_ctrl u_ctrl (
    .clk        (clk),
    .rst        (rst),
    .in_valid   (in_valid),
    .in_ready   (in_ready),
    .in_load    (in_load),
    .flags_clear(flags_clear),
    .all_done   (all_done),
    .mu_load    (mu_load),
    .out_valid  (add_vld[0]),
    .state      (state)
  );

  task_flags #(.N_TASK(R + 1)) u_flags (
    .clk     (clk),
    .rst     (rst),
    .clear   (flags_clear),
    .flag_in (mlp_done),
    .all_done(all_done)
  );

  // ---- input registers: one per input, one copy per MLP ---------------------
  fx_t xr [N_X][R+1];

  for (genvar i = 0; i < N_X; i++) begin : g_in
    in_reg #(.N_COPY(R + 1)) u_reg (
      .clk  (clk),
      .rst  (rst),
      .load (in_load),
      .d    (x[i]),
      .q    (xr[i]),
      .valid(in_vld[i])
    );
  end

  fx_t mlp_x [R+1][MLP_IN];
  always_comb begin
    for (int m = 0; m <= R; m++)
      for (int i = 0; i < MLP_IN; i++)
        mlp_x[m][i] = (i < N_X) ? xr[i][m] : '0;
  end

  // ---- SIG MLP: membership degrees ------------------------------------------
  fx_t mu [R];

  sig_mlp #(.N_IN(MLP_IN), .N_HID(SIG_HID), .N_OUT(R), .N_HL(SIG_HL)) u_sig (
    .clk  (clk),
    .rst  (rst),
    .start(&in_vld),
    .x    (mlp_x[0]),
    .w_hid(sig_w_hid),
    .b_hid(sig_b_hid),
    .w_hh (sig_w_hh),
    .b_hh (sig_b_hh),
    .w_out(sig_w_out),
    .b_out(sig_b_out),
    .y    (mu),
    .done (mlp_done[0])
  );

  // ---- LINEAR MLPs: rule consequents ----------------------------------------
  fx_t u [R][N_Y];

  for (genvar s = 0; s < R; s++) begin : g_rule
    lin_mlp #(.N_IN(MLP_IN), .N_HID(LIN_HID), .N_OUT(N_Y), .N_HL(LIN_HL)) u_lin (
      .clk  (clk),
      .rst  (rst),
      .start(&in_vld),
      .x    (mlp_x[s+1]),
      .w_hid(lin_w_hid[s]),
      .b_hid(lin_b_hid[s]),
      .w_hh (lin_w_hh[s]),
      .b_hh (lin_b_hh[s]),
      .w_out(lin_w_out[s]),
      .b_out(lin_b_out[s]),
      .y    (u[s]),
      .done (mlp_done[s+1])
    );
  end

  // ---- membership registers: one per rule, one copy per output --------------
  fx_t mur [R][N_Y];
  logic [R-1:0] mu_vld;

  for (genvar s = 0; s < R; s++) begin : g_mu
    in_reg #(.N_COPY(N_Y)) u_reg (
      .clk  (clk),
      .rst  (rst),
      .load (mu_load),
      .d    (mu[s]),
      .q    (mur[s]),
      .valid(mu_vld[s])
    );
  end

  // ---- pi nodes and output adders --------------------------------------------
  for (genvar o = 0; o < N_Y; o++) begin : g_out
    fx_t pi_y [R];
    logic [R-1:0] pi_vld;

    for (genvar s = 0; s < R; s++) begin : g_pi
      fx_t pa [4];
      assign pa[0] = mur[s][o];
      assign pa[1] = FX_ONE;
      assign pa[2] = FX_ONE;
      assign pa[3] = u[s][o];

      pi_node #(.N_IN(4)) u_pi (
        .clk  (clk),
        .rst  (rst),
        .en   (mu_vld[s]),
        .a    (pa),
        .y    (pi_y[s]),
        .valid(pi_vld[s])
      );
    end

    out_adder #(.N_IN(R)) u_add (
      .clk  (clk),
      .rst  (rst),
      .en   (&pi_vld),
      .a    (pi_y),
      .y    (y[o]),
      .valid(add_vld[o])
    );
  end

  assign y_valid = add_vld[0];

  // A result only appears while the controller is in SYNC, and all MLPs finish
  // only after the inputs were taken (PROCESS).
  a_result_in_sync: assert property (@(posedge clk) disable iff (rst)
    y_valid |-> state == 2'd3);
  a_done_in_process: assert property (@(posedge clk) disable iff (rst)
    |mlp_done |-> state == 2'd2);

endmodule
