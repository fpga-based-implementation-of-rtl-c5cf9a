// tb_in_reg: random loads and idle clocks; every copy must hold the last loaded
// word, valid must pulse exactly in the clock after a load, and reset must clear.
module tb_in_reg;
  import fnn_pkg::*;
  localparam int NC = 4;
  logic clk = 0, rst = 1, load = 0, valid;
  fx_t d, q [NC];
  fx_t exp_q = '0;
  logic exp_v = 0;
  int checks = 0, failures = 0, n_hold = 0;

  always #5 clk = ~clk;

  in_reg #(.N_COPY(NC)) dut (.clk(clk), .rst(rst), .load(load), .d(d), .q(q), .valid(valid));

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = '0;
    repeat (2) @(posedge clk);
    #1;
    for (int s = 0; s < 1000; s++) begin
      rst  = (s == 500);
      load = ($urandom_range(2) == 0);
      d    = fx_t'($urandom);
      @(posedge clk);
      if (rst) begin exp_q = '0; exp_v = 0; end
      else begin
        if (load) exp_q = d; else n_hold++;
        exp_v = load;
      end
      #1;
      for (int c = 0; c < NC; c++) begin
        checks++;
        if (q[c] != exp_q) begin failures++; $display("FAIL step %0d copy %0d", s, c); end
      end
      checks++;
      if (valid != exp_v) begin failures++; $display("FAIL step %0d valid", s); end
    end
    checks++;
    if (n_hold == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
