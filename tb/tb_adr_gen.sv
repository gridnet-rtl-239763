// tb_adr_gen: base register loading, base + constant, base + counter with
// reset and post-increment, and wrap-around of the 12-bit sum.
module tb_adr_gen;
  logic clk = 0, rst_n = 0;
  logic base_wr = 0, base_hi = 0, use_cnt = 0, cnt_rst = 0, cnt_inc = 0;
  logic [2:0] base_wsel = 0, base_sel = 0;
  logic [7:0] wdata = 0, offset = 0;
  logic [11:0] addr;
  logic [11:0] base_m [8];
  int checks = 0, failures = 0;

  adr_gen #(.NBASE(8), .AW(12)) dut (.*);

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
    for (int i = 0; i < 8; i++) begin
      base_m[i] = 12'($urandom);
      @(negedge clk); base_wr = 1; base_wsel = 3'(i); base_hi = 0; wdata = base_m[i][7:0];
      @(negedge clk); base_hi = 1; wdata = {4'h0, base_m[i][11:8]};
    end
    @(negedge clk); base_wr = 0;
    // base + constant
    for (int i = 0; i < 40; i++) begin
      base_sel = 3'($urandom); offset = 8'($urandom); use_cnt = 0;
      #1 chk(addr == 12'(base_m[base_sel] + offset), $sformatf("base+const %0d", i));
    end
    // counter: reset, then post-increment
    @(negedge clk); base_sel = 3; use_cnt = 1; cnt_rst = 1; cnt_inc = 1;
    #1 chk(addr == base_m[3], "counter reset reads 0");
    for (int i = 1; i < 10; i++) begin
      @(negedge clk); cnt_rst = 0; cnt_inc = 1;
      #1 chk(addr == 12'(base_m[3] + i), $sformatf("post-increment %0d", i));
    end
    @(negedge clk); cnt_inc = 0;
    #1 chk(addr == 12'(base_m[3] + 10), "counter holds without increment");
    @(negedge clk);
    #1 chk(addr == 12'(base_m[3] + 10), "still holds");
    use_cnt = 0; offset = 8'hFF;
    #1 chk(addr == 12'(base_m[3] + 8'hFF), "constant path again");
    @(negedge clk); cnt_rst = 1; use_cnt = 1;
    #1 chk(addr == base_m[3], "reset reads as zero in the same cycle");
    @(negedge clk); cnt_rst = 0;
    #1 chk(addr == base_m[3], "reset without increment clears");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
