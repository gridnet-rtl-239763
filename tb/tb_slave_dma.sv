// tb_slave_dma: download of microcode words through three 16-bit writes,
// the run/wait control register, the start pulse, and refusal of downloads
// while running, and the interrupt acknowledge pulse.
module tb_slave_dma;
  logic clk = 0, rst_n = 0, sel = 0, wr = 0;
  logic [13:0] addr = 0;
  logic [15:0] wdata = 0;
  logic ram_we, run, start, irq_ack;
  logic [10:0] ram_waddr;
  logic [47:0] ram_wdata;
  int checks = 0, failures = 0, we_count = 0, start_count = 0, ack_count = 0;
  logic [47:0] last_w;
  logic [10:0] last_a;

  slave_dma dut (.*);

  always #5 clk = !clk;
  always @(negedge clk) begin
    if (ram_we) begin we_count++; last_w = ram_wdata; last_a = ram_waddr; end
    if (start) start_count++;
    if (irq_ack) ack_count++;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic bw(logic [13:0] a, logic [15:0] d);
    @(negedge clk); sel = 1; wr = 1; addr = a; wdata = d;
    @(negedge clk); sel = 0; wr = 0;
  endtask

  task automatic word(int w, logic [47:0] v);
    bw(14'({w[10:0], 2'd0}), v[15:0]);
    bw(14'({w[10:0], 2'd1}), v[31:16]);
    bw(14'({w[10:0], 2'd2}), v[47:32]);
    @(negedge clk);
    @(negedge clk);
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
    chk(!run, "FE waits after reset");
    for (int i = 0; i < 20; i++) begin
      logic [47:0] v;
      v = {16'($urandom), $urandom};
      word(i * 97 % 2048, v);
      chk(we_count == i + 1, $sformatf("one RAM write per word %0d %0d", we_count, i));
      chk(last_w == v && last_a == 11'(i * 97 % 2048), $sformatf("word %0d", i));
    end
    bw(14'h2000, 16'h0001);
    @(negedge clk);
    chk(run && start_count == 1, "run set, one start pulse");
    word(5, 48'h123456789abc);
    chk(we_count == 20, "no download while running");
    bw(14'h2000, 16'h0001);
    chk(start_count == 1, "no second start while running");
    chk(ack_count == 0, "no acknowledge without bit 1");
    bw(14'h2000, 16'h0003);
    @(negedge clk);
    chk(ack_count == 1 && run && start_count == 1, "bit 1 gives one acknowledge pulse");
    bw(14'h2000, 16'h0000);
    chk(!run, "back to wait");
    word(5, 48'h123456789abc);
    chk(we_count == 21 && last_w == 48'h123456789abc, "download allowed again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
