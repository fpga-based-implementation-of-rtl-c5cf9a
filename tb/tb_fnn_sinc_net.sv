// tb_fnn_sinc_net: the second evaluated network size (1 input, SIG MLP 1/5/2, two
// LINEAR MLPs 1/5/1, as used for interpolating sinc(x)) run two ways:
//   dut_small  fnn_th_top built at exactly that size;
//   dut_full   fnn_th_top at its default size, holding the small network by
//              zero-padding: unused inputs, hidden neurons and the third rule get
//              zero weights (the third rule's consequent is 0, so it adds nothing).
// The trained weights are not available, so random weights are used; both
// instances must match the reference model of the small network for inputs
// swept over [-4, 4], and both must produce each result 8 clocks after input.
module tb_fnn_sinc_net;
  import fnn_pkg::*;
  import fnn_model_pkg::*;

  // small network
  localparam int R2 = 2, SH2 = 5, LH2 = 5;
  // default hardware
  localparam int NX = 2, MI = 4, R = 3, SH = 10, LH = 7;

  logic clk = 0, rst = 1, in_valid = 0;
  logic rdy_s, rdy_f, yv_s, yv_f;
  logic [1:0] st_s, st_f;

  fx_t xs [1], ys [1];
  fx_t s_wh [SH2][1], s_bh [SH2], s_wo [R2][SH2], s_bo [R2];
  fx_t l_wh [R2][LH2][1], l_bh [R2][LH2], l_wo [R2][1][LH2], l_bo [R2][1];

  fx_t s_whh [1][SH2][SH2], s_bhh [1][SH2], l_whh [R2][1][LH2][LH2], l_bhh [R2][1][LH2];
  fx_t xf [NX], yf [1];
  fx_t f_s_whh [1][SH][SH], f_s_bhh [1][SH], f_l_whh [R][1][LH][LH], f_l_bhh [R][1][LH];
  fx_t f_s_wh [SH][MI], f_s_bh [SH], f_s_wo [R][SH], f_s_bo [R];
  fx_t f_l_wh [R][LH][MI], f_l_bh [R][LH], f_l_wo [R][1][LH], f_l_bo [R][1];

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  fnn_th_top #(.N_X(1), .MLP_IN(1), .R(R2), .SIG_HID(SH2), .LIN_HID(LH2), .N_Y(1)) dut_small (
    .clk(clk), .rst(rst), .x(xs), .in_valid(in_valid), .in_ready(rdy_s),
    .sig_w_hid(s_wh), .sig_b_hid(s_bh), .sig_w_hh(s_whh), .sig_b_hh(s_bhh), .sig_w_out(s_wo), .sig_b_out(s_bo),
    .lin_w_hid(l_wh), .lin_b_hid(l_bh), .lin_w_hh(l_whh), .lin_b_hh(l_bhh), .lin_w_out(l_wo), .lin_b_out(l_bo),
    .y(ys), .y_valid(yv_s), .state(st_s));

  fnn_th_top dut_full (
    .clk(clk), .rst(rst), .x(xf), .in_valid(in_valid), .in_ready(rdy_f),
    .sig_w_hid(f_s_wh), .sig_b_hid(f_s_bh), .sig_w_hh(f_s_whh), .sig_b_hh(f_s_bhh), .sig_w_out(f_s_wo), .sig_b_out(f_s_bo),
    .lin_w_hid(f_l_wh), .lin_b_hid(f_l_bh), .lin_w_hh(f_l_whh), .lin_b_hh(f_l_bhh), .lin_w_out(f_l_wo), .lin_b_out(f_l_bo),
    .y(yf), .y_valid(yv_f), .state(st_f));

  function automatic fx_t rnd(int range);
    return fx_t'(int'($urandom_range(2 * range)) - range);
  endfunction

  task automatic load_weights();
    // single hidden layer: further-layer weights unused
    foreach (s_whh[l, j, i]) s_whh[l][j][i] = '0;
    foreach (s_bhh[l, j])    s_bhh[l][j]    = '0;
    foreach (l_whh[s, l, j, i]) l_whh[s][l][j][i] = '0;
    foreach (l_bhh[s, l, j])    l_bhh[s][l][j]    = '0;
    foreach (f_s_whh[l, j, i]) f_s_whh[l][j][i] = '0;
    foreach (f_s_bhh[l, j])    f_s_bhh[l][j]    = '0;
    foreach (f_l_whh[s, l, j, i]) f_l_whh[s][l][j][i] = '0;
    foreach (f_l_bhh[s, l, j])    f_l_bhh[s][l][j]    = '0;
    foreach (s_wh[j, i]) s_wh[j][i] = rnd(3000);
    foreach (s_bh[j])    s_bh[j]    = rnd(3000);
    foreach (s_wo[s, j]) s_wo[s][j] = rnd(3000);
    foreach (s_bo[s])    s_bo[s]    = rnd(1500);
    foreach (l_wh[s, j, i]) l_wh[s][j][i] = rnd(3000);
    foreach (l_bh[s, j])    l_bh[s][j]    = rnd(3000);
    foreach (l_wo[s, o, j]) l_wo[s][o][j] = rnd(3000);
    foreach (l_bo[s, o])    l_bo[s][o]    = rnd(1500);
    // zero-padded copy for the default-size hardware
    foreach (f_s_wh[j, i]) f_s_wh[j][i] = (j < SH2 && i == 0) ? s_wh[j][0] : '0;
    foreach (f_s_bh[j])    f_s_bh[j]    = (j < SH2) ? s_bh[j] : '0;
    foreach (f_s_wo[s, j]) f_s_wo[s][j] = (s < R2 && j < SH2) ? s_wo[s][j] : '0;
    foreach (f_s_bo[s])    f_s_bo[s]    = (s < R2) ? s_bo[s] : '0;
    foreach (f_l_wh[s, j, i]) f_l_wh[s][j][i] = (s < R2 && j < LH2 && i == 0) ? l_wh[s][j][0] : '0;
    foreach (f_l_bh[s, j])    f_l_bh[s][j]    = (s < R2 && j < LH2) ? l_bh[s][j] : '0;
    foreach (f_l_wo[s, o, j]) f_l_wo[s][o][j] = (s < R2 && j < LH2) ? l_wo[s][o][j] : '0;
    foreach (f_l_bo[s, o])    f_l_bo[s][o]    = (s < R2) ? l_bo[s][o] : '0;
  endtask

  function automatic longint model(longint xin);
    longint xv[], hv[], w[], p[], pa[];
    longint mu, u;
    xv = new[1]; hv = new[SH2]; w = new[1]; p = new[R2]; pa = new[4];
    xv[0] = xin;
    for (int s = 0; s < R2; s++) begin
      hv = new[SH2]; w = new[1];
      for (int j = 0; j < SH2; j++) begin w[0] = s_wh[j][0]; hv[j] = act(net(xv, w, s_bh[j]), 1); end
      w = new[SH2];
      foreach (w[j]) w[j] = s_wo[s][j];
      mu = act(net(hv, w, s_bo[s]), 1);
      hv = new[LH2]; w = new[1];
      for (int j = 0; j < LH2; j++) begin w[0] = l_wh[s][j][0]; hv[j] = act(net(xv, w, l_bh[s][j]), 1); end
      w = new[LH2];
      foreach (w[j]) w[j] = l_wo[s][0][j];
      u = net(hv, w, l_bo[s][0]);
      pa[0] = mu; pa[1] = 2048; pa[2] = 2048; pa[3] = u;
      p[s] = pi_prod(pa);
    end
    return add(p);
  endfunction

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint e;
    int lat;
    xs[0] = '0; xf[0] = '0; xf[1] = '0;
    load_weights();
    repeat (3) @(posedge clk);
    #1;
    rst = 0;
    for (int set = 0; set < 4; set++) begin
      load_weights();
      for (int v = -8192; v <= 8192; v += 256) begin
        while (!(rdy_s && rdy_f)) begin @(posedge clk); #1; end
        xs[0] = fx_t'(v); xf[0] = fx_t'(v);
        e = model(v);
        in_valid = 1;
        @(posedge clk); #1;
        in_valid = 0;
        lat = 1;
        while (!(yv_s && yv_f) && lat < 30) begin @(posedge clk); #1; lat++; end
        checks += 3;
        if (lat != 8) begin failures++; $display("FAIL latency %0d", lat); end
        if (longint'(ys[0]) != e) begin
          failures++;
          if (failures < 10) $display("FAIL small x %0d: %0d expected %0d", v, ys[0], e);
        end
        if (longint'(yf[0]) != e) begin
          failures++;
          if (failures < 10) $display("FAIL padded x %0d: %0d expected %0d", v, yf[0], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
