// tb_out_ctrl: random start pulses, several in flight at once; done must repeat
// start exactly LATENCY (4) clocks later.
module tb_out_ctrl;
  logic clk = 0, rst = 1, start = 0, done;
  logic hist [$];
  int checks = 0, failures = 0, n_overlap = 0;

  always #5 clk = ~clk;

  out_ctrl #(.LATENCY(4)) dut (.clk(clk), .rst(rst), .start(start), .done(done));

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 4; i++) hist.push_back(1'b0);
    for (int s = 0; s < 1000; s++) begin
      start = ($urandom_range(2) == 0);
      hist.push_back(start);
      if (start && (hist[1] || hist[2] || hist[3] || hist[4 - 1])) n_overlap++;
      #1;
      checks++;
      if (done != hist[0]) begin
        failures++;
        if (failures < 10) $display("FAIL step %0d: done %0b expected %0b", s, done, hist[0]);
      end
      void'(hist.pop_front());
      @(posedge clk);
      #1;
    end
    checks++;
    if (n_overlap == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
