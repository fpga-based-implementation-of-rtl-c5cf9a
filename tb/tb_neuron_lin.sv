// tb_neuron_lin: streams a new random input set into neuron_lin every clock and checks that
// each output equals the reference model of the set presented two clocks
// earlier (bias and TYPE are sampled one clock later), which pins the 2-clock latency.
// Weights up to +/-8 drive the sum into saturation.
module tb_neuron_lin;
  import fnn_pkg::*;
  import fnn_model_pkg::*;

  localparam int N = 7;
  localparam int STEPS = 3000;

  logic clk = 0, rst = 1;
  fx_t  x [N], w [N], bias, y;
  act_t t;
  int checks = 0, failures = 0, n_sat = 0;
  longint hx [$][N];
  longint hw [$][N];
  longint hb [$];
  int     ht [$];

  always #5 clk = ~clk;

  neuron_lin #(.N_IN(N)) dut (.clk(clk), .rst(rst), .x(x), .w(w), .bias(bias), .y(y));

  function automatic fx_t rnd(int range);
    return fx_t'(int'($urandom_range(2 * range)) - range);
  endfunction

  initial begin
    repeat (STEPS + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint xs[], ws[];
    longint n, e;
    xs = new[N];
    ws = new[N];
    foreach (x[i]) begin x[i] = '0; w[i] = '0; end
    bias = '0;
    t = ACT_TANSIG;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int s = 0; s < STEPS; s++) begin
      // new stimulus for this clock
      for (int i = 0; i < N; i++) begin
        x[i] = rnd((s % 3 == 0) ? 16000 : 3000);
        w[i] = rnd((s % 5 == 0) ? 16000 : 2500);
      end
      bias = rnd(4000);
      t    = act_t'($urandom_range(3));
      begin
        longint xv[N], wv[N];
        foreach (xv[i]) begin xv[i] = x[i]; wv[i] = w[i]; end
        hx.push_back(xv);
        hw.push_back(wv);
      end
      hb.push_back(bias);
      ht.push_back(int'(t));
      @(posedge clk);
      #1;
      // y now holds x/w of the previous stimulus with bias/TYPE of this one
      if (hx.size() == 2) begin
        foreach (xs[i]) begin xs[i] = hx[0][i]; ws[i] = hw[0][i]; end
        n = net(xs, ws, hb[1]);
        e = n;
        if (n == 32767 || n == -32768) n_sat++;
        checks++;
        if (longint'(y) != e) begin
          failures++;
          if (failures < 10) $display("FAIL step %0d: y %0d expected %0d", s, y, e);
        end
        void'(hx.pop_front());
        void'(hw.pop_front());
        void'(hb.pop_front());
        void'(ht.pop_front());
      end
    end
    checks++;
    if (n_sat == 0)   begin failures++; $display("FAIL saturation never exercised"); end
    $display("saturated sums %0d", n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
