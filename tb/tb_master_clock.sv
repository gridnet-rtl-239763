// tb_master_clock: 100 kHz Clock period and duty, 10 us Clear pulse with one
// Clock rise inside it, 2 MHz carrier inside the bursts, and stop.
// Runs at the default 12 MHz board clock (1 clock = 83.3 ns).
module tb_master_clock;
  logic clk = 0, rst_n = 0, cmd_start = 0, cmd_stop = 0;
  logic clock_line, clear_line, clock_env, clear_env, running;
  int checks = 0, failures = 0;
  int t = 0, last_rise = -1, rises = 0, rises_in_clear = 0, clear_len = 0;
  int period_bad = 0, carrier_edges = 0, line_outside = 0;
  logic clock_env_q = 0, clock_line_q = 0;

  master_clock dut (.*);

  always #5 clk = !clk;

  always @(negedge clk) begin
    t++;
    if (clock_env && !clock_env_q) begin
      if (last_rise >= 0 && t - last_rise != 120) period_bad++;
      last_rise = t; rises++;
      if (clear_env) rises_in_clear++;
    end
    if (clear_env) clear_len++;
    if (clock_line != clock_line_q) carrier_edges++;
    if ((clock_line && !clock_env) || (clear_line && !clear_env)) line_outside++;
    clock_env_q = clock_env; clock_line_q = clock_line;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int hi;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (20) @(negedge clk);
    chk(!clock_line && !clear_line, "quiet before start");
    cmd_start = 1; @(negedge clk); cmd_start = 0;
    repeat (120 * 10) @(negedge clk);
    chk(running, "running");
    chk(rises == 10, $sformatf("10 Clock rises in 100 us, got %0d", rises));
    chk(period_bad == 0, "every period is 120 clocks (10 us)");
    chk(clear_len == 120, $sformatf("Clear lasts 10 us, got %0d clocks", clear_len));
    chk(rises_in_clear == 1, "one Clock rise inside Clear");
    // each 60-clock high half holds 10 carrier periods = 20 edges
    chk(carrier_edges == 10 * 20, $sformatf("2 MHz bursts: %0d edges", carrier_edges));
    chk(line_outside == 0, "no carrier outside the envelopes");
    hi = 0;
    for (int i = 0; i < 120; i++) begin @(negedge clk); if (clock_env) hi++; end
    chk(hi == 60, "50% duty");
    cmd_stop = 1; @(negedge clk); cmd_stop = 0;
    rises = 0;
    repeat (500) @(negedge clk);
    chk(rises == 0 && !running && !clock_line, "stopped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
