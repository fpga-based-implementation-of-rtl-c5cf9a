// tb_fnn_deep: the network with MLPs of different depth, so that they finish at
// different clocks and the task flags must hold the early finisher until the
// last one is done, and with two outputs (two inputs, two rules, two outputs as
// in the basic two-input/two-output arrangement). Sizes: SIG MLP 2/6/2 with 2
// hidden layers, two LINEAR MLPs 2/4/2 with 3 hidden layers. Every result is compared with the
// reference model; the latency must be 6 + 2*3 = 12 clocks, and the clocks in
// which some but not all MLPs had finished are counted (must be > 0).
module tb_fnn_deep;
  import fnn_pkg::*;
  import fnn_model_pkg::*;

  localparam int NX = 2, MI = 2, R = 2, SH = 6, LH = 4, SHL = 2, LHL = 3, NY = 2;

  logic clk = 0, rst = 1, in_valid = 0, in_ready, y_valid;
  logic [1:0] state;
  fx_t x [NX], y [NY];
  fx_t sig_w_hid [SH][MI], sig_b_hid [SH], sig_w_out [R][SH], sig_b_out [R];
  fx_t sig_w_hh [SHL-1][SH][SH], sig_b_hh [SHL-1][SH];
  fx_t lin_w_hid [R][LH][MI], lin_b_hid [R][LH], lin_w_out [R][NY][LH], lin_b_out [R][NY];
  fx_t lin_w_hh [R][LHL-1][LH][LH], lin_b_hh [R][LHL-1][LH];

  int checks = 0, failures = 0, n_partial = 0;

  always #5 clk = ~clk;

  fnn_th_top #(.N_X(NX), .MLP_IN(MI), .R(R), .SIG_HID(SH), .LIN_HID(LH), .N_Y(NY),
               .SIG_HL(SHL), .LIN_HL(LHL)) dut (
    .clk(clk), .rst(rst), .x(x), .in_valid(in_valid), .in_ready(in_ready),
    .sig_w_hid(sig_w_hid), .sig_b_hid(sig_b_hid), .sig_w_hh(sig_w_hh), .sig_b_hh(sig_b_hh),
    .sig_w_out(sig_w_out), .sig_b_out(sig_b_out),
    .lin_w_hid(lin_w_hid), .lin_b_hid(lin_b_hid), .lin_w_hh(lin_w_hh), .lin_b_hh(lin_b_hh),
    .lin_w_out(lin_w_out), .lin_b_out(lin_b_out),
    .y(y), .y_valid(y_valid), .state(state));

  // the SIG MLP has finished, the deeper LINEAR MLPs not yet
  always @(posedge clk) if (state == 2'd2 && dut.u_flags.flags == 3'b001) n_partial++;

  function automatic fx_t rnd(int range);
    return fx_t'(int'($urandom_range(2 * range)) - range);
  endfunction

  task automatic randomise_weights();
    foreach (sig_w_hid[j, i]) sig_w_hid[j][i] = rnd(3000);
    foreach (sig_b_hid[j])    sig_b_hid[j]    = rnd(1500);
    foreach (sig_w_hh[l, j, i]) sig_w_hh[l][j][i] = rnd(2500);
    foreach (sig_b_hh[l, j])    sig_b_hh[l][j]    = rnd(1500);
    foreach (sig_w_out[s, j]) sig_w_out[s][j] = rnd(2500);
    foreach (sig_b_out[s])    sig_b_out[s]    = rnd(1500);
    foreach (lin_w_hid[s, j, i]) lin_w_hid[s][j][i] = rnd(3000);
    foreach (lin_b_hid[s, j])    lin_b_hid[s][j]    = rnd(1500);
    foreach (lin_w_hh[s, l, j, i]) lin_w_hh[s][l][j][i] = rnd(2500);
    foreach (lin_b_hh[s, l, j])    lin_b_hh[s][l][j]    = rnd(1500);
    foreach (lin_w_out[s, o, j]) lin_w_out[s][o][j] = rnd(3000);
    foreach (lin_b_out[s, o])    lin_b_out[s][o]    = rnd(1500);
  endtask

  function automatic void model(input longint xin [NX], output longint e [NY]);
    longint xv[], hv[], nv[], w[], p[], pa[];
    longint mu [R];
    longint u [R][NY];
    p = new[R]; pa = new[4];
    xv = new[MI];
    foreach (xv[i]) xv[i] = xin[i];
    for (int s = 0; s < R; s++) begin
      // membership of rule s
      hv = new[SH]; w = new[MI];
      for (int j = 0; j < SH; j++) begin
        foreach (w[i]) w[i] = sig_w_hid[j][i];
        hv[j] = act(net(xv, w, sig_b_hid[j]), 1);
      end
      w = new[SH]; nv = new[SH];
      for (int l = 0; l < SHL - 1; l++) begin
        for (int j = 0; j < SH; j++) begin
          foreach (w[k]) w[k] = sig_w_hh[l][j][k];
          nv[j] = act(net(hv, w, sig_b_hh[l][j]), 1);
        end
        hv = nv; nv = new[SH];
      end
      foreach (w[j]) w[j] = sig_w_out[s][j];
      mu[s] = act(net(hv, w, sig_b_out[s]), 1);
      // consequent of rule s
      hv = new[LH]; w = new[MI];
      for (int j = 0; j < LH; j++) begin
        foreach (w[i]) w[i] = lin_w_hid[s][j][i];
        hv[j] = act(net(xv, w, lin_b_hid[s][j]), 1);
      end
      w = new[LH]; nv = new[LH];
      for (int l = 0; l < LHL - 1; l++) begin
        for (int j = 0; j < LH; j++) begin
          foreach (w[k]) w[k] = lin_w_hh[s][l][j][k];
          nv[j] = act(net(hv, w, lin_b_hh[s][l][j]), 1);
        end
        hv = nv; nv = new[LH];
      end
      for (int o = 0; o < NY; o++) begin
        foreach (w[j]) w[j] = lin_w_out[s][o][j];
        u[s][o] = net(hv, w, lin_b_out[s][o]);
      end
    end
    for (int o = 0; o < NY; o++) begin
      for (int s = 0; s < R; s++) begin
        pa[0] = mu[s]; pa[1] = 2048; pa[2] = 2048; pa[3] = u[s][o];
        p[s] = pi_prod(pa);
      end
      e[o] = add(p);
    end
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint xin [NX];
    longint e [NY];
    int lat;
    foreach (x[i]) x[i] = '0;
    randomise_weights();
    repeat (3) @(posedge clk);
    #1;
    rst = 0;
    for (int t = 0; t < 300; t++) begin
      if (t % 30 == 0) randomise_weights();
      while (!in_ready) begin @(posedge clk); #1; end
      foreach (x[i]) begin x[i] = rnd(6000); xin[i] = x[i]; end
      model(xin, e);
      in_valid = 1;
      @(posedge clk); #1;
      in_valid = 0;
      lat = 1;
      while (!y_valid && lat < 40) begin @(posedge clk); #1; lat++; end
      checks++;
      if (lat != 12) begin failures++; $display("FAIL latency %0d", lat); end
      for (int o = 0; o < NY; o++) begin
        checks++;
        if (longint'(y[o]) != e[o]) begin
          failures++;
          if (failures < 10) $display("FAIL input %0d out %0d: y %0d expected %0d", t, o, y[o], e[o]);
        end
      end
    end
    checks++;
    if (n_partial == 0) begin failures++; $display("FAIL flags never held a partial set"); end
    $display("clocks with only the SIG MLP finished: %0d", n_partial);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
