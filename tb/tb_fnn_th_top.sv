// tb_fnn_th_top: end-to-end test of the FNN T-H network at its default size
// (2 inputs, SIG MLP 4/10/3, three LINEAR MLPs 4/7/1, one output).
// Several random weight sets are loaded; for each, input sets are offered with
// random gaps and, at times, while the network is still busy. Every result is
// compared with the reference model, the input-to-output latency must be 8 clocks
// and the accepted-input interval at least 9. Mechanisms counted (each must occur):
// INIT after reset, LOAD/PROCESS/SYNC per result, an input held back while busy,
// an idle LOAD with no input offered, a table input beyond the table ends, a
// saturated neuron sum, and a negative membership-weighted consequent.
module tb_fnn_th_top;
  import fnn_pkg::*;
  import fnn_model_pkg::*;

  localparam int NX = 2, MI = 4, R = 3, SH = 10, LH = 7, NY = 1;

  logic clk = 0, rst = 1, in_valid = 0, in_ready, y_valid;
  logic [1:0] state;
  fx_t x [NX], y [NY];
  fx_t sig_w_hid [SH][MI], sig_b_hid [SH], sig_w_out [R][SH], sig_b_out [R];
  fx_t sig_w_hh [1][SH][SH], sig_b_hh [1][SH];
  fx_t lin_w_hh [R][1][LH][LH], lin_b_hh [R][1][LH];
  fx_t lin_w_hid [R][LH][MI], lin_b_hid [R][LH], lin_w_out [R][NY][LH], lin_b_out [R][NY];

  int checks = 0, failures = 0;
  int n_init = 0, n_load = 0, n_proc = 0, n_sync = 0, n_held = 0, n_idle = 0;
  int n_clamp = 0, n_sat = 0, n_neg = 0, n_results = 0;

  always #5 clk = ~clk;

  fnn_th_top dut (
    .clk(clk), .rst(rst), .x(x), .in_valid(in_valid), .in_ready(in_ready),
    .sig_w_hid(sig_w_hid), .sig_b_hid(sig_b_hid), .sig_w_hh(sig_w_hh), .sig_b_hh(sig_b_hh), .sig_w_out(sig_w_out), .sig_b_out(sig_b_out),
    .lin_w_hid(lin_w_hid), .lin_b_hid(lin_b_hid), .lin_w_hh(lin_w_hh), .lin_b_hh(lin_b_hh), .lin_w_out(lin_w_out), .lin_b_out(lin_b_out),
    .y(y), .y_valid(y_valid), .state(state));

  function automatic fx_t rnd(int range);
    return fx_t'(int'($urandom_range(2 * range)) - range);
  endfunction

  task automatic randomise_weights(int scale);
    // one hidden layer: the further-layer weights are unused, given random values
    foreach (sig_w_hh[l, j, i]) sig_w_hh[l][j][i] = rnd(scale);
    foreach (sig_b_hh[l, j])    sig_b_hh[l][j]    = rnd(scale);
    foreach (lin_w_hh[s, l, j, i]) lin_w_hh[s][l][j][i] = rnd(scale);
    foreach (lin_b_hh[s, l, j])    lin_b_hh[s][l][j]    = rnd(scale);
    foreach (sig_w_hid[j, i]) sig_w_hid[j][i] = rnd(scale);
    foreach (sig_b_hid[j])    sig_b_hid[j]    = rnd(1500);
    foreach (sig_w_out[s, j]) sig_w_out[s][j] = rnd(scale);
    foreach (sig_b_out[s])    sig_b_out[s]    = rnd(1500);
    foreach (lin_w_hid[s, j, i]) lin_w_hid[s][j][i] = rnd(scale);
    foreach (lin_b_hid[s, j])    lin_b_hid[s][j]    = rnd(1500);
    foreach (lin_w_out[s, o, j]) lin_w_out[s][o][j] = rnd(scale);
    foreach (lin_b_out[s, o])    lin_b_out[s][o]    = rnd(1500);
  endtask

  // Reference: y_o = sum_s mu_s * u_s,o with every step in Q4.11.
  function automatic void model(input longint xin [NX], output longint e [NY]);
    longint xv[], hv[], w[], p[], pa[];
    longint mu [R];
    longint u [R][NY];
    xv = new[MI]; p = new[R]; pa = new[4];
    foreach (xv[i]) xv[i] = (i < NX) ? xin[i] : 0;
    // SIG MLP
    hv = new[SH]; w = new[MI];
    for (int j = 0; j < SH; j++) begin
      foreach (w[i]) w[i] = sig_w_hid[j][i];
      hv[j] = net(xv, w, sig_b_hid[j]);
      if (clamps(hv[j])) n_clamp++;
      if (hv[j] == 32767 || hv[j] == -32768) n_sat++;
      hv[j] = act(hv[j], 1);
    end
    w = new[SH];
    for (int s = 0; s < R; s++) begin
      foreach (w[j]) w[j] = sig_w_out[s][j];
      mu[s] = act(net(hv, w, sig_b_out[s]), 1);
    end
    // LINEAR MLPs
    for (int s = 0; s < R; s++) begin
      hv = new[LH]; w = new[MI];
      for (int j = 0; j < LH; j++) begin
        foreach (w[i]) w[i] = lin_w_hid[s][j][i];
        hv[j] = act(net(xv, w, lin_b_hid[s][j]), 1);
      end
      w = new[LH];
      for (int o = 0; o < NY; o++) begin
        foreach (w[j]) w[j] = lin_w_out[s][o][j];
        u[s][o] = net(hv, w, lin_b_out[s][o]);
      end
    end
    for (int o = 0; o < NY; o++) begin
      for (int s = 0; s < R; s++) begin
        pa[0] = mu[s]; pa[1] = 2048; pa[2] = 2048; pa[3] = u[s][o];
        p[s] = pi_prod(pa);
        if (p[s] < 0) n_neg++;
      end
      e[o] = add(p);
    end
  endfunction

  // state coverage
  logic [1:0] prev_state = 2'd0;
  always @(posedge clk) begin
    if (!rst && state != prev_state || (!rst && state == 2'd1 && prev_state == 2'd3)) begin
      case (state)
        2'd0: ;
        2'd1: n_load++;
        2'd2: n_proc++;
        2'd3: n_sync++;
      endcase
    end
    if (!rst && state == 2'd0) n_init++;
    prev_state <= state;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint xin [NX];
    longint e [NY];
    int t_acc, t_prev_acc, cyc;
    t_prev_acc = -100;
    cyc = 0;
    foreach (x[i]) x[i] = '0;
    randomise_weights(2500);
    repeat (3) @(posedge clk);
    #1;
    rst = 0;
    for (int set = 0; set < 20; set++) begin
      randomise_weights((set % 4 == 3) ? 12000 : 2500);
      for (int t = 0; t < 30; t++) begin
        // random idle clocks before the input is offered
        repeat ($urandom_range(2)) begin
          if (in_ready) n_idle++;
          @(posedge clk); #1; cyc++;
        end
        foreach (x[i]) begin x[i] = rnd(6000); xin[i] = x[i]; end
        in_valid = 1;
        while (!in_ready) begin
          n_held++;
          @(posedge clk); #1; cyc++;
        end
        t_acc = cyc;
        model(xin, e);
        @(posedge clk); #1; cyc++;
        in_valid = ($urandom_range(1) == 0);   // sometimes keep offering while busy
        if (in_valid) foreach (x[i]) x[i] = rnd(6000);
        while (!y_valid && cyc - t_acc < 30) begin
          if (in_valid && !in_ready) n_held++;
          @(posedge clk); #1; cyc++;
        end
        in_valid = 0;
        checks += 2;
        if (cyc - t_acc != 8) begin failures++; $display("FAIL latency %0d", cyc - t_acc); end
        if (t_acc - t_prev_acc < 9) begin failures++; $display("FAIL interval %0d", t_acc - t_prev_acc); end
        t_prev_acc = t_acc;
        for (int o = 0; o < NY; o++) begin
          checks++;
          if (longint'(y[o]) != e[o]) begin
            failures++;
            if (failures < 10) $display("FAIL set %0d input %0d: y %0d expected %0d", set, t, y[o], e[o]);
          end
        end
        n_results++;
      end
    end
    @(posedge clk); #1;
    $display("results %0d, INIT %0d, LOAD %0d, PROCESS %0d, SYNC %0d, held %0d, idle %0d, clamp %0d, sat %0d, neg %0d",
             n_results, n_init, n_load, n_proc, n_sync, n_held, n_idle, n_clamp, n_sat, n_neg);
    checks += 8;
    if (n_init != 1)           begin failures++; $display("FAIL INIT seen %0d times", n_init); end
    if (n_proc != n_results)   begin failures++; $display("FAIL PROCESS entries %0d", n_proc); end
    if (n_sync != n_results)   begin failures++; $display("FAIL SYNC entries %0d", n_sync); end
    if (n_load < n_results)    begin failures++; $display("FAIL LOAD entries %0d", n_load); end
    if (n_held == 0)           begin failures++; $display("FAIL no input held back"); end
    if (n_idle == 0)           begin failures++; $display("FAIL no idle LOAD"); end
    if (n_clamp == 0)          begin failures++; $display("FAIL no table clamp"); end
    if (n_sat == 0 || n_neg == 0) begin failures++; $display("FAIL no saturation or no negative product"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
