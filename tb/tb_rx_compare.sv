// tb_rx_compare: checks pairing, comparison, the mismatch latch and the
// single-copy drain of the compare stage, with FIFO contents modelled in the
// testbench as queues.
module tb_rx_compare;
  logic clk = 0, rst_n = 0, clear = 0, hold = 0;
  logic cw_empty, ccw_empty, cw_done = 0, ccw_done = 0, cw_lost = 0, ccw_lost = 0;
  logic [7:0] cw_data, ccw_data;
  logic cw_pop, ccw_pop, wr_cw, wr_ccw, drained, mismatch;
  logic [7:0] wr_data_cw, wr_data_ccw;
  int checks = 0, failures = 0;
  byte unsigned qcw[$], qccw[$], got_cw[$], got_ccw[$];

  rx_compare dut (.*);

  assign cw_empty  = qcw.size() == 0;
  assign ccw_empty = qccw.size() == 0;
  assign cw_data   = cw_empty ? 8'h00 : qcw[0];
  assign ccw_data  = ccw_empty ? 8'h00 : qccw[0];

  always #5 clk = !clk;

  always @(posedge clk) begin
    if (wr_cw)  got_cw.push_back(wr_data_cw);
    if (wr_ccw) got_ccw.push_back(wr_data_ccw);
    if (cw_pop)  void'(qcw.pop_front());
    if (ccw_pop) void'(qccw.pop_front());
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic reset_case();
    @(negedge clk); clear = 1; cw_done = 0; ccw_done = 0; cw_lost = 0; ccw_lost = 0;
    got_cw.delete(); got_ccw.delete();
    @(negedge clk); clear = 0;
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
    // 1: equal copies, CW arrives first; nothing popped until CCW comes
    @(negedge clk);
    for (int i = 0; i < 6; i++) qcw.push_back(8'(i * 7));
    repeat (3) @(negedge clk);
    chk(qcw.size() == 6 && got_cw.size() == 0, "CW waits for its partner");
    for (int i = 0; i < 6; i++) qccw.push_back(8'(i * 7));
    cw_done = 1; ccw_done = 1;
    repeat (10) @(negedge clk);
    chk(got_cw.size() == 6 && got_ccw.size() == 6, "six pairs stored");
    chk(got_cw == got_ccw, "copies stored alike");
    chk(!mismatch, "no mismatch for equal copies");
    chk(drained, "drained");
    // 2: one bit differs in byte 3
    reset_case();
    for (int i = 0; i < 5; i++) begin qcw.push_back(8'(i)); qccw.push_back(8'(i ^ (i == 3 ? 8'h10 : 0))); end
    cw_done = 1; ccw_done = 1;
    repeat (8) @(negedge clk);
    chk(mismatch, "single bit difference latched");
    chk(got_ccw[3] == 8'h13 && got_cw[3] == 8'h03, "both versions stored");
    reset_case();
    chk(!mismatch, "clear resets latch");
    // 3: CCW lost (loop error): CW drains alone, no mismatch
    for (int i = 0; i < 4; i++) qcw.push_back(8'(i + 1));
    repeat (3) @(negedge clk);
    chk(got_cw.size() == 0, "waiting while CCW not ended");
    ccw_done = 1; ccw_lost = 1; cw_done = 1;
    repeat (6) @(negedge clk);
    chk(got_cw.size() == 4 && got_ccw.size() == 0, "CW stored alone");
    chk(!mismatch, "lost copy gives no mismatch");
    // 4: CCW ended normally but shorter -> mismatch
    reset_case();
    for (int i = 0; i < 4; i++) qcw.push_back(8'(i));
    for (int i = 0; i < 2; i++) qccw.push_back(8'(i));
    cw_done = 1; ccw_done = 1;
    repeat (6) @(negedge clk);
    chk(mismatch, "length difference is a mismatch");
    chk(got_cw.size() == 4 && got_ccw.size() == 2, "lengths kept");
    // 5: hold stops popping
    reset_case();
    hold = 1; qcw.push_back(8'h1); qccw.push_back(8'h1);
    repeat (3) @(negedge clk);
    chk(got_cw.size() == 0, "hold");
    hold = 0; repeat (2) @(negedge clk);
    chk(got_cw.size() == 1, "resumes after hold");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
