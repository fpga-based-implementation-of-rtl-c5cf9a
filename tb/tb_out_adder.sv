// tb_out_adder: random operands (large enough to saturate) with random enables; y must be
// the reference result of the operands present at the last enabled edge and
// valid must pulse one clock after each enable.
module tb_out_adder;
  import fnn_pkg::*;
  import fnn_model_pkg::*;
  localparam int N = 9;
  logic clk = 0, rst = 1, en = 0, valid;
  fx_t a [N], y;
  longint exp_y = 0;
  logic exp_v = 0;
  int checks = 0, failures = 0, n_sat = 0;

  always #5 clk = ~clk;

  out_adder #(.N_IN(N)) dut (.clk(clk), .rst(rst), .en(en), .a(a), .y(y), .valid(valid));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint av[];
    av = new[N];
    foreach (a[i]) a[i] = '0;
    repeat (2) @(posedge clk);
    #1;
    rst = 0;
    for (int s = 0; s < 2000; s++) begin
      en = ($urandom_range(3) != 0);
      for (int i = 0; i < N; i++) begin
        a[i] = fx_t'(int'($urandom_range(2 * 9000)) - 9000);
        av[i] = a[i];
      end
      @(posedge clk);
      if (en) begin
        exp_y = add(av);
        if (exp_y == 32767 || exp_y == -32768) n_sat++;
      end
      exp_v = en;
      #1;
      checks += 2;
      if (longint'(y) != exp_y) begin
        failures++;
        if (failures < 10) $display("FAIL step %0d: y %0d expected %0d", s, y, exp_y);
      end
      if (valid != exp_v) failures++;
    end
    checks++;
    if (n_sat == 0) begin failures++; $display("FAIL saturation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
