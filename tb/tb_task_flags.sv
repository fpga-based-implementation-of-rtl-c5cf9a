// tb_task_flags: random done pulses and clears against a model of sticky flags;
// all_done must rise in the clock the last outstanding task pulses.
module tb_task_flags;
  localparam int N = 4;
  logic clk = 0, rst = 1, clear = 0, all_done;
  logic [N-1:0] fin, model = '0;
  int checks = 0, failures = 0, n_done = 0;

  always #5 clk = ~clk;

  task_flags #(.N_TASK(N)) dut (.clk(clk), .rst(rst), .clear(clear), .flag_in(fin), .all_done(all_done));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fin = '0;
    repeat (2) @(posedge clk);
    #1;
    rst = 0;
    for (int s = 0; s < 2000; s++) begin
      clear = ($urandom_range(7) == 0);
      for (int i = 0; i < N; i++) fin[i] = ($urandom_range(5) == 0);
      #1;
      checks++;
      if (all_done != ((model | fin) == '1)) begin
        failures++;
        if (failures < 10) $display("FAIL step %0d: all_done %0b flags %b in %b", s, all_done, model, fin);
      end
      if (all_done) n_done++;
      @(posedge clk);
      model = clear ? '0 : (model | fin);
      #1;
    end
    checks++;
    if (n_done == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
