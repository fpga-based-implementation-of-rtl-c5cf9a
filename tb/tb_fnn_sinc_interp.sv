// tb_fnn_sinc_interp: the sinc-interpolation workload. fnn_th_top is built at the
// sinc network's size (1 input, SIG MLP 1/5/2, two LINEAR MLPs 1/5/1) and loaded
// with a trained weight set (Q4.11 integers below). The weights were fitted
// off-line to sinc(x) = sin(pi*x)/(pi*x) on [-10, 10] by the Takagi-Hayashi steps
// (cluster |x| < 1.5 versus the rest, train the membership MLP to 0/1, train each
// consequent MLP on its cluster, then fine-tune all weights together), using the
// same 21-point tanh table as the hardware. The real-valued fit has an RMS error
// of 0.011 and a maximum error of 0.029.
// For 801 inputs over [-10, 10] the test checks:
//   * y equals the bit-exact reference model;
//   * |y - sinc(x)| <= 0.04 at every point, and the RMS error is <= 0.015;
//   * the 8-clock latency.
module tb_fnn_sinc_interp;
  import fnn_pkg::*;
  import fnn_model_pkg::*;

  localparam int R = 2, SH = 5, LH = 5;

  logic clk = 0, rst = 1, in_valid = 0, in_ready, y_valid;
  logic [1:0] state;
  fx_t x [1], y [1];
  fx_t sig_w_hid [SH][1], sig_b_hid [SH], sig_w_out [R][SH], sig_b_out [R];
  fx_t sig_w_hh [1][SH][SH], sig_b_hh [1][SH];
  fx_t lin_w_hid [R][LH][1], lin_b_hid [R][LH], lin_w_out [R][1][LH], lin_b_out [R][1];
  fx_t lin_w_hh [R][1][LH][LH], lin_b_hh [R][1][LH];

  // trained weights, Q4.11
  localparam int SW1 [SH]    = '{201, 5923, -9096, 10103, 8091};
  localparam int SB1 [SH]    = '{2774, -10825, -15743, -13175, 11263};
  localparam int SW2 [R][SH] = '{'{-1615, -398, -7817, -7070, 229},
                                 '{5857, 7687, -2835, -2932, -7995}};
  localparam int SB2 [R]     = '{728, 5494};
  localparam int LW1 [R][LH] = '{'{294, 2928, -824, 2247, 944},
                                 '{-605, 3375, 520, -521, 1781}};
  localparam int LB1 [R][LH] = '{'{3167, 991, -2454, -621, 2083},
                                 '{-1468, -3300, 233, 248, -6228}};
  localparam int LW2 [R][LH] = '{'{1768, 4307, -2340, -4617, -2564},
                                 '{-4678, 796, -13234, -7734, 118}};
  localparam int LB2 [R]     = '{-2523, -260};

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  fnn_th_top #(.N_X(1), .MLP_IN(1), .R(R), .SIG_HID(SH), .LIN_HID(LH), .N_Y(1)) dut (
    .clk(clk), .rst(rst), .x(x), .in_valid(in_valid), .in_ready(in_ready),
    .sig_w_hid(sig_w_hid), .sig_b_hid(sig_b_hid), .sig_w_hh(sig_w_hh), .sig_b_hh(sig_b_hh),
    .sig_w_out(sig_w_out), .sig_b_out(sig_b_out),
    .lin_w_hid(lin_w_hid), .lin_b_hid(lin_b_hid), .lin_w_hh(lin_w_hh), .lin_b_hh(lin_b_hh),
    .lin_w_out(lin_w_out), .lin_b_out(lin_b_out),
    .y(y), .y_valid(y_valid), .state(state));

  function automatic longint model(longint xin);
    longint xv[], hv[], w[], p[], pa[];
    longint mu, u;
    xv = new[1]; p = new[R]; pa = new[4];
    xv[0] = xin;
    for (int s = 0; s < R; s++) begin
      hv = new[SH]; w = new[1];
      for (int j = 0; j < SH; j++) begin w[0] = SW1[j]; hv[j] = act(net(xv, w, SB1[j]), 1); end
      w = new[SH];
      foreach (w[j]) w[j] = SW2[s][j];
      mu = act(net(hv, w, SB2[s]), 1);
      hv = new[LH]; w = new[1];
      for (int j = 0; j < LH; j++) begin w[0] = LW1[s][j]; hv[j] = act(net(xv, w, LB1[s][j]), 1); end
      w = new[LH];
      foreach (w[j]) w[j] = LW2[s][j];
      u = net(hv, w, LB2[s]);
      pa[0] = mu; pa[1] = 2048; pa[2] = 2048; pa[3] = u;
      p[s] = pi_prod(pa);
    end
    return add(p);
  endfunction

  function automatic real sinc(real v);
    real pv;
    pv = 3.14159265358979 * v;
    return (v == 0.0) ? 1.0 : $sin(pv) / pv;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint e;
    int lat, n;
    real xr, err, max_err, sq;
    foreach (sig_w_hid[j]) sig_w_hid[j][0] = fx_t'(SW1[j]);
    foreach (sig_b_hid[j]) sig_b_hid[j] = fx_t'(SB1[j]);
    foreach (sig_w_out[s, j]) sig_w_out[s][j] = fx_t'(SW2[s][j]);
    foreach (sig_b_out[s]) sig_b_out[s] = fx_t'(SB2[s]);
    foreach (lin_w_hid[s, j]) lin_w_hid[s][j][0] = fx_t'(LW1[s][j]);
    foreach (lin_b_hid[s, j]) lin_b_hid[s][j] = fx_t'(LB1[s][j]);
    foreach (LW2[s, j]) lin_w_out[s][0][j] = fx_t'(LW2[s][j]);
    foreach (lin_b_out[s]) lin_b_out[s][0] = fx_t'(LB2[s]);
    foreach (sig_w_hh[l, j, k]) sig_w_hh[l][j][k] = '0;
    foreach (sig_b_hh[l, j]) sig_b_hh[l][j] = '0;
    foreach (lin_w_hh[s, l, j, k]) lin_w_hh[s][l][j][k] = '0;
    foreach (lin_b_hh[s, l, j]) lin_b_hh[s][l][j] = '0;
    x[0] = '0;
    max_err = 0.0;
    sq = 0.0;
    n = 0;
    repeat (3) @(posedge clk);
    #1;
    rst = 0;
    for (int i = 0; i <= 800; i++) begin
      // x = -10 + 0.025*i, rounded to Q4.11
      xr = -10.0 + 0.025 * i;
      while (!in_ready) begin @(posedge clk); #1; end
      x[0] = fx_t'($rtoi(xr * 2048.0 + ((xr < 0.0) ? -0.5 : 0.5)));
      e = model(longint'(x[0]));
      in_valid = 1;
      @(posedge clk); #1;
      in_valid = 0;
      lat = 1;
      while (!y_valid && lat < 30) begin @(posedge clk); #1; lat++; end
      checks += 3;
      if (lat != 8) begin failures++; $display("FAIL latency %0d", lat); end
      if (longint'(y[0]) != e) begin
        failures++;
        if (failures < 10) $display("FAIL x %f: y %0d model %0d", xr, y[0], e);
      end
      err = real'(y[0]) / 2048.0 - sinc(real'(x[0]) / 2048.0);
      if (err < 0.0) err = -err;
      if (err > max_err) max_err = err;
      sq += err * err;
      n++;
      if (err > 0.04) begin
        failures++;
        if (failures < 10) $display("FAIL x %f: y %f sinc %f", xr, real'(y[0]) / 2048.0, sinc(xr));
      end
    end
    checks++;
    $display("sinc interpolation over [-10, 10]: %0d points, max error %f, RMS error %f",
             n, max_err, $sqrt(sq / n));
    if ($sqrt(sq / n) > 0.015) begin failures++; $display("FAIL RMS error too large"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
