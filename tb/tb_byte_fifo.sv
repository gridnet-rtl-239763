// tb_byte_fifo: self-checking test of the resynchronising FIFO.
// Random pushes and pops against a queue model, then fill to full, check
// that a push into a full FIFO is refused, and check flush.
module tb_byte_fifo;
  logic clk = 0, rst_n = 0, flush = 0, wr_en = 0, rd_en = 0;
  logic [7:0] wr_data = 0, rd_data;
  logic empty, full;
  int checks = 0, failures = 0;
  byte unsigned model[$];

  byte_fifo #(.DEPTH(8), .W(8)) dut (.*);

  always #5 clk = !clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    chk(empty && !full, "empty after reset");
    for (int i = 0; i < 600; i++) begin
      bit w, r;
      w = 1'($urandom_range(0, 1));
      r = $urandom_range(0, 1);
      @(negedge clk);
      if (r && model.size() > 0) chk(rd_data == model[0], $sformatf("head %0d", i));
      chk(empty == (model.size() == 0), "empty flag");
      chk(full == (model.size() == 8), $sformatf("full flag %0d size %0d cnt %0d", i, model.size(), dut.count));
      wr_en = w; rd_en = r; wr_data = 8'($urandom);
      @(posedge clk);
      #1;
      begin
        bit can_w;
        can_w = model.size() < 8;
        if (r && model.size() > 0) void'(model.pop_front());
        if (w && can_w) model.push_back(wr_data);
      end
      wr_en = 0; rd_en = 0;
    end
    // fill to full, then one more push is dropped
    @(negedge clk); flush = 1; @(negedge clk); flush = 0; model.delete();
    for (int i = 0; i < 9; i++) begin
      @(negedge clk); wr_en = 1; wr_data = 8'(i + 100);
    end
    @(negedge clk); wr_en = 0;
    chk(full, "full after 9 pushes");
    for (int i = 0; i < 8; i++) begin
      chk(rd_data == 8'(i + 100), $sformatf("fill order %0d", i));
      rd_en = 1; @(negedge clk); rd_en = 0;
    end
    chk(empty, "empty after draining, 9th push refused");
    @(negedge clk); wr_en = 1; wr_data = 8'h55; @(negedge clk); wr_en = 0; flush = 1;
    @(negedge clk); flush = 0;
    chk(empty, "flush empties");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
