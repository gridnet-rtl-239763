// tb_ucode_ram: writes random words, reads them back (one clock read
// latency, instruction / control split), and checks that writes are refused
// while the store is locked.
module tb_ucode_ram;
  logic clk = 0, lock = 0, we = 0;
  logic [10:0] waddr = 0, raddr = 0;
  logic [47:0] wdata = 0;
  logic [15:0] inst;
  logic [31:0] ctrl;
  logic [47:0] model [64];
  int checks = 0, failures = 0;

  ucode_ram #(.DEPTH(2048), .W(48)) dut (.*);

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
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      model[i] = {16'($urandom), $urandom};
      we = 1; waddr = 11'(i * 31); wdata = model[i];
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 64; i++) begin
      raddr = 11'(i * 31);
      @(negedge clk);
      chk({inst, ctrl} == model[i], $sformatf("word %0d", i));
      chk(inst == model[i][47:32], "instruction field");
    end
    lock = 1;
    @(negedge clk); we = 1; waddr = 0; wdata = ~model[0];
    @(negedge clk); we = 0; raddr = 0;
    @(negedge clk);
    chk({inst, ctrl} == model[0], "locked store is read-only");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
