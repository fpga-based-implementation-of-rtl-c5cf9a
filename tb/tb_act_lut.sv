// tb_act_lut: checks the activation table against the reference model for every
// TYPE over a sweep wider than the table span, and checks that the tansig output
// stays within 0.03 of the true tanh.
module tb_act_lut;
  import fnn_pkg::*;
  import fnn_model_pkg::*;

  fx_t  x, y;
  act_t t;
  int checks = 0, failures = 0;
  int n_clamp = 0;

  act_lut dut (.x(x), .act_type(t), .y(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ti = 0; ti < 4; ti++) begin
      for (int v = -14000; v <= 14000; v += 13) begin
        t = act_t'(ti);
        x = fx_t'(v);
        #1;
        checks++;
        if (longint'(y) != act(v, ti)) begin
          failures++;
          if (failures < 10) $display("FAIL type %0d x %0d: y %0d expected %0d", ti, v, y, act(v, ti));
        end
        if (ti == 1) begin
          real e;
          e = $tanh(real'(v) / 2048.0) - real'(y) / 2048.0;
          checks++;
          if (e > 0.03 || e < -0.03) begin
            failures++;
            if (failures < 10) $display("FAIL tansig accuracy x %0d: error %f", v, e);
          end
          if (clamps(v)) n_clamp++;
        end
      end
    end
    checks++;
    if (n_clamp == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
