// tb_envelope_det: a 2 MHz burst (6 clocks per cycle at 12 MHz) gives one
// continuous envelope that starts three flip-flop stages after the first
// carrier high and ends HOLD clocks later than that after the last one.
module tb_envelope_det;
  logic clk = 0, rst_n = 0, line = 0, env;
  int checks = 0, failures = 0;
  int t = 0, t_first = -1, t_last = -1, env_rise = -1, env_fall = -1, env_drops = 0;
  logic env_q = 0;

  envelope_det #(.HOLD(8)) dut (.*);

  always #5 clk = !clk;

  always @(negedge clk) begin
    t++;
    if (env && !env_q) env_rise = t;
    if (!env && env_q) begin env_fall = t; env_drops++; end
    env_q = env;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (10) @(negedge clk);
    chk(!env, "quiet line");
    for (int c = 0; c < 10; c++) begin
      for (int k = 0; k < 6; k++) begin
        @(negedge clk);
        line = (k < 3);
        if (c == 0 && k == 0) t_first = t;
        if (line) t_last = t;
      end
    end
    @(negedge clk); line = 0;
    repeat (30) @(negedge clk);
    chk(env_drops == 1, "one envelope for the whole burst");
    chk(env_rise - t_first >= 3 && env_rise - t_first <= 4, $sformatf("rise delay %0d", env_rise - t_first));
    chk(env_fall - t_last == (env_rise - t_first) + 8, $sformatf("fall %0d clocks after the last high", env_fall - t_last));
    chk(!env, "low after the burst");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
