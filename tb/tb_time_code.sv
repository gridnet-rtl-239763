// tb_time_code: the Time Code Board driven by the Master Clock Board model
// in the design (master_clock), both at the default 12 MHz clock. Checks the
// clear to zero, counting of 100 kHz rises, the frozen latch during a
// two-half read, the latch updating again after both halves, and the
// missing pulse interrupt when the Clock stops.
module tb_time_code;
  logic clk = 0, rst_n = 0, cmd_start = 0, cmd_stop = 0;
  logic clock_line, clear_line, clock_env, clear_env, running;
  logic rd = 0, rd_hi = 0, irq_ack = 0, missing_irq;
  logic [15:0] rdata;
  logic [31:0] count;
  int checks = 0, failures = 0;
  int master_rises = 0;
  logic env_q = 0;

  master_clock mc (.clk, .rst_n, .cmd_start, .cmd_stop, .clock_line, .clear_line,
                   .clock_env, .clear_env, .running);
  time_code dut (.clk, .rst_n, .clock_line, .clear_line, .rd, .rd_hi, .rdata,
                 .missing_irq, .irq_ack, .count);

  always #5 clk = !clk;
  // independent reference: Master Clock rises after the Clear pulse
  always @(negedge clk) begin
    if (clock_env && !env_q && !clear_env) master_rises++;
    env_q = clock_env;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic rdh(input bit hi, output logic [15:0] d);
    @(negedge clk); rd = 1; rd_hi = hi; @(negedge clk); rd = 0; d = rdata;
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] lo, hi, lo2;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    cmd_start = 1; @(negedge clk); cmd_start = 0;
    repeat (130) @(negedge clk);
    chk(count == 0, "cleared by the rise inside Clear");
    repeat (120 * 50) @(negedge clk);
    chk(count == 32'(master_rises), $sformatf("count %0d = rises %0d", count, master_rises));
    // two-half read: latch frozen between the halves
    rdh(0, lo);
    repeat (120 * 3) @(negedge clk);
    rdh(1, hi);
    chk({hi, lo} == 32'(master_rises - 3) || {hi, lo} == 32'(master_rises - 4),
        $sformatf("frozen value %0d, rises now %0d", {hi, lo}, master_rises));
    repeat (130) @(negedge clk);
    rdh(0, lo2);
    chk(lo2 > lo + 2, "latch follows the counter again after both halves");
    rdh(1, hi);
    chk(!missing_irq, "no missing pulse while running");
    // stop the Master Clock: pulses go missing
    cmd_stop = 1; @(negedge clk); cmd_stop = 0;
    repeat (120 * 2) @(negedge clk);
    chk(missing_irq, "missing pulse interrupt");
    @(negedge clk); irq_ack = 1; @(negedge clk); irq_ack = 0;
    repeat (300) @(negedge clk);
    chk(!missing_irq, "acknowledged, stays low");
    // restart clears the count again
    cmd_start = 1; @(negedge clk); cmd_start = 0;
    master_rises = 0;
    repeat (120 * 5 + 70) @(negedge clk);
    chk(count == 32'(master_rises), $sformatf("restart: count %0d = rises %0d", count, master_rises));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
