// tb_rx_timers: checks the loop-delay and byte-dropout timers.
// Clock scaled to 1 MHz in the test so the timeouts are short: loop timeout
// 40 clocks, byte timeout 10 clocks. Scenarios: both copies normal; one loop
// silent (loop error exactly at the timeout); a copy that stops (byte error
// exactly at the byte timeout).
module tb_rx_timers;
  localparam int LOOPC = 40, BYTEC = 10;
  logic clk = 0, rst_n = 0, enable = 0, pkt_clear = 0;
  logic [1:0] byte_stb = 0, eop = 0;
  logic [1:0] started, done, loop_err, byte_err;
  logic pkt_active;
  int checks = 0, failures = 0;

  rx_timers #(.CLK_HZ(1_000_000), .LOOP_TIMEOUT_US(LOOPC), .BYTE_TIMEOUT_US(BYTEC)) dut (.*);

  always #5 clk = !clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic pulse(input logic [1:0] s, input logic [1:0] e);
    @(negedge clk); byte_stb = s; eop = e; @(negedge clk); byte_stb = 0; eop = 0;
  endtask

  task automatic clear();
    @(negedge clk); pkt_clear = 1; @(negedge clk); pkt_clear = 0;
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    repeat (3) @(posedge clk);
    rst_n <= 1; enable <= 1;
    // 1: normal packet, CCW 3 clocks behind CW, bytes every 4 clocks
    for (int i = 0; i < 5; i++) begin
      pulse(2'b01, 2'b00); pulse(2'b00, 2'b00); pulse(2'b10, 2'b00); @(negedge clk);
    end
    pulse(2'b01, 2'b01); pulse(2'b10, 2'b10);
    @(negedge clk);
    chk(done == 2'b11 && loop_err == 0 && byte_err == 0, "normal packet ends clean");
    chk(pkt_active, "active until cleared");
    clear();
    chk(!pkt_active && done == 0, "cleared");
    // 2: only CW delivers; CCW silent -> loop error after LOOPC clocks
    @(negedge clk); byte_stb = 2'b01; @(negedge clk); byte_stb = 0;
    n = 1;
    while (!loop_err[1] && n < 200) begin
      if (n % 4 == 0) begin byte_stb = 2'b01; end
      @(negedge clk); byte_stb = 0; n++;
    end
    chk(loop_err == 2'b10, "loop error on CCW only");
    chk(n >= LOOPC && n <= LOOPC + 2, $sformatf("loop error after %0d clocks, expected %0d", n, LOOPC));
    chk(done[1] && !done[0], "CCW ended, CW still running");
    pulse(2'b01, 2'b01);
    chk(done == 2'b11 && byte_err == 0, "CW ends normally");
    clear();
    // 3: both start, CW stops -> byte error after BYTEC clocks
    pulse(2'b11, 2'b00);
    n = 0;
    while (!byte_err[0] && n < 100) begin
      if (n % 4 == 0) byte_stb = 2'b10;
      @(negedge clk); byte_stb = 0; n++;
    end
    chk(byte_err == 2'b01, "byte error on CW");
    chk(n >= BYTEC - 2 && n <= BYTEC + 1, $sformatf("byte error after %0d clocks, expected about %0d", n, BYTEC));
    pulse(2'b10, 2'b10);
    chk(done == 2'b11 && loop_err == 0, "CCW ends, no loop error");
    clear();
    // 4: receive mode off: nothing happens
    enable = 0;
    pulse(2'b01, 2'b00);
    chk(started == 0, "disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
