// tb_bus_priority: daisy-chain priority and bus holding among three masters.
module tb_bus_priority;
  logic clk = 0, rst_n = 0;
  logic [2:0] breq = 0, grant, bpro;
  int checks = 0, failures = 0;

  bus_priority #(.N(3)) dut (.*);

  always #5 clk = !clk;

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
    @(negedge clk);
    chk(grant == 0 && bpro == 3'b111, "idle: priority passes through");
    breq = 3'b110;
    #1 chk(bpro == 3'b001, "slot 1 requesting blocks the chain above it");
    @(negedge clk);
    chk(grant == 3'b010, "slot 1 wins over slot 2");
    breq = 3'b111;
    @(negedge clk);
    chk(grant == 3'b010, "owner keeps the bus although slot 0 asks");
    breq = 3'b101;
    @(negedge clk);
    chk(grant == 3'b001, "on release slot 0 (FE processor board) wins over slot 2");
    breq = 3'b100;
    @(negedge clk); @(negedge clk);
    chk(grant == 3'b100, "slot 2 gets the bus when alone");
    breq = 3'b000;
    @(negedge clk);
    chk(grant == 3'b000, "free");
    // random: grant always one-hot, never to a non-requester
    for (int i = 0; i < 200; i++) begin
      @(negedge clk); breq = 3'($urandom);
      chk($onehot0(grant), "one owner at most");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
