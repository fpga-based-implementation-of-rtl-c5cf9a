// tb_lin_mlp: lin_mlp at its default size (one hidden layer, dut) and with three hidden
// layers (dut3), both with random weights and the same inputs. Part 1 presents one
// input set at a time and checks each result and that done arrives exactly 4
// (dut) and 8 (dut3) clocks after start. Part 2 streams a new input set every
// clock and checks each result as its done pulse comes out of the pipeline.
module tb_lin_mlp;
  import fnn_pkg::*;
  import fnn_model_pkg::*;
  localparam int NI = 4, NH = 7, NO = 1, HL3 = 3;

  logic clk = 0, rst = 1, start = 0, done, done3;
  fx_t x [NI], w_hid [NH][NI], b_hid [NH], w_out [NO][NH], b_out [NO], y [NO], y3 [NO];
  fx_t w_hh1 [1][NH][NH], b_hh1 [1][NH];
  fx_t w_hh [HL3-1][NH][NH], b_hh [HL3-1][NH];
  int checks = 0, failures = 0, n_stream = 0, n_stream3 = 0;
  longint expq [$];    // expected outputs, NO entries per input set
  longint expq3 [$];

  always #5 clk = ~clk;

  lin_mlp #(.N_IN(NI), .N_HID(NH), .N_OUT(NO)) dut (
    .clk(clk), .rst(rst), .start(start), .x(x), .w_hid(w_hid), .b_hid(b_hid),
    .w_hh(w_hh1), .b_hh(b_hh1), .w_out(w_out), .b_out(b_out), .y(y), .done(done));

  lin_mlp #(.N_IN(NI), .N_HID(NH), .N_OUT(NO), .N_HL(HL3)) dut3 (
    .clk(clk), .rst(rst), .start(start), .x(x), .w_hid(w_hid), .b_hid(b_hid),
    .w_hh(w_hh), .b_hh(b_hh), .w_out(w_out), .b_out(b_out), .y(y3), .done(done3));

  function automatic fx_t rnd(int range);
    return fx_t'(int'($urandom_range(2 * range)) - range);
  endfunction

  task automatic randomise_weights();
    foreach (w_hid[j, i]) w_hid[j][i] = rnd(3000);
    foreach (b_hid[j])    b_hid[j]    = rnd(1500);
    foreach (w_hh[l, j, i]) w_hh[l][j][i] = rnd(2000);
    foreach (b_hh[l, j])    b_hh[l][j]    = rnd(1500);
    foreach (w_hh1[l, j, i]) w_hh1[l][j][i] = rnd(2000);
    foreach (b_hh1[l, j])    b_hh1[l][j]    = rnd(1500);
    foreach (w_out[o, j]) w_out[o][j] = rnd(2500);
    foreach (b_out[o])    b_out[o]    = rnd(1500);
  endtask

  // nl = number of hidden layers
  function automatic void model(input int nl, output longint e [NO]);
    longint xv[], hv[], nv[], wh[], wo[];
    xv = new[NI]; hv = new[NH]; nv = new[NH]; wh = new[NI]; wo = new[NH];
    foreach (x[i]) xv[i] = x[i];
    for (int j = 0; j < NH; j++) begin
      foreach (wh[i]) wh[i] = w_hid[j][i];
      hv[j] = act(net(xv, wh, b_hid[j]), 1);
    end
    for (int l = 1; l < nl; l++) begin
      for (int j = 0; j < NH; j++) begin
        foreach (wo[k]) wo[k] = w_hh[l-1][j][k];
        nv[j] = act(net(hv, wo, b_hh[l-1][j]), 1);
      end
      hv = nv;
      nv = new[NH];
    end
    for (int o = 0; o < NO; o++) begin
      foreach (wo[j]) wo[j] = w_out[o][j];
      e[o] = net(hv, wo, b_out[o]);
    end
  endfunction

  task automatic compare(string tag, int t, fx_t got [NO], longint e [NO]);
    for (int o = 0; o < NO; o++) begin
      checks++;
      if (longint'(got[o]) != e[o]) begin
        failures++;
        if (failures < 10) $display("FAIL %s %0d out %0d: %0d expected %0d", tag, t, o, got[o], e[o]);
      end
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint e [NO];
    longint e3 [NO];
    int lat, lat3;
    foreach (x[i]) x[i] = '0;
    randomise_weights();
    repeat (3) @(posedge clk);
    #1;
    rst = 0;
    // part 1: one input set at a time
    for (int t = 0; t < 200; t++) begin
      randomise_weights();
      foreach (x[i]) x[i] = rnd(4000);
      model(1, e);
      model(HL3, e3);
      start = 1;
      @(posedge clk);
      #1;
      start = 0;
      lat = 0;
      lat3 = 0;
      for (int c = 1; c <= 12; c++) begin
        if (done) begin
          if (lat == 0) lat = c;
          compare("test", t, y, e);
        end
        if (done3) begin
          if (lat3 == 0) lat3 = c;
          compare("test3", t, y3, e3);
        end
        @(posedge clk);
        #1;
      end
      checks += 2;
      if (lat != 4)  begin failures++; $display("FAIL test %0d: latency %0d", t, lat); end
      if (lat3 != 8) begin failures++; $display("FAIL test %0d: latency %0d with 3 hidden layers", t, lat3); end
    end
    // part 2: a new input set every clock, fixed weights
    randomise_weights();
    for (int t = 0; t < 300; t++) begin
      foreach (x[i]) x[i] = rnd(4000);
      start = (t < 290);
      if (start) begin
        model(1, e); foreach (e[o]) expq.push_back(e[o]);
        model(HL3, e3); foreach (e3[o]) expq3.push_back(e3[o]);
      end
      @(posedge clk);
      #1;
      if (done) begin
        n_stream++;
        foreach (e[o]) e[o] = expq.pop_front();
        compare("stream", t, y, e);
      end
      if (done3) begin
        n_stream3++;
        foreach (e3[o]) e3[o] = expq3.pop_front();
        compare("stream3", t, y3, e3);
      end
    end
    checks++;
    if (n_stream != 290 || n_stream3 != 290) begin
      failures++;
      $display("FAIL %0d / %0d streamed results", n_stream, n_stream3);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
