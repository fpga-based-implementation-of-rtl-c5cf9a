// tb_fnn_ctrl: random in_valid, all_done and out_valid against a reference model
// of the sequence INIT (once after reset) -> LOAD -> PROCESS -> SYNC -> LOAD, with
// in_ready/in_load/flags_clear only in LOAD and mu_load only when PROCESS ends.
module tb_fnn_ctrl;
  logic clk = 0, rst = 1;
  logic in_valid = 0, in_ready, in_load, flags_clear, all_done = 0, mu_load, out_valid = 0;
  logic [1:0] state;
  int m_st = 0;   // 0 INIT, 1 LOAD, 2 PROCESS, 3 SYNC
  int checks = 0, failures = 0;
  int visits [4] = '{0, 0, 0, 0};

  always #5 clk = ~clk;

  fnn_ctrl dut (
    .clk(clk), .rst(rst), .in_valid(in_valid), .in_ready(in_ready), .in_load(in_load),
    .flags_clear(flags_clear), .all_done(all_done), .mu_load(mu_load),
    .out_valid(out_valid), .state(state));

  task automatic check(string what, logic got, logic exp, int s);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL step %0d %s: %0b expected %0b", s, what, got, exp);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1;
    for (int s = 0; s < 2000; s++) begin
      rst       = (s == 0) || (s == 1000);
      in_valid  = ($urandom_range(2) == 0);
      all_done  = ($urandom_range(3) == 0);
      out_valid = ($urandom_range(3) == 0);
      #1;
      if (!rst) begin
        checks++;
        if (int'(state) != m_st) begin failures++; $display("FAIL step %0d state %0d expected %0d", s, state, m_st); end
        check("in_ready",    in_ready,    m_st == 1, s);
        check("in_load",     in_load,     m_st == 1 && in_valid, s);
        check("flags_clear", flags_clear, m_st == 1 && in_valid, s);
        check("mu_load",     mu_load,     m_st == 2 && all_done, s);
        visits[m_st]++;
      end
      @(posedge clk);
      if (rst) m_st = 0;
      else case (m_st)
        0: m_st = 1;
        1: if (in_valid) m_st = 2;
        2: if (all_done) m_st = 3;
        3: if (out_valid) m_st = 1;
        default: m_st = 0;
      endcase
      #1;
    end
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (visits[i] == 0) begin failures++; $display("FAIL state %0d never visited", i); end
    end
    checks++;
    if (visits[0] != 2) begin failures++; $display("FAIL INIT visited %0d times, expected once per reset", visits[0]); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
