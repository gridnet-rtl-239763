// tb_data_ram: random writes and reads of the 4K x 8 data RAM against a
// model, with the one-clock read latency.
module tb_data_ram;
  logic clk = 0, we = 0, re = 0;
  logic [11:0] addr = 0;
  logic [7:0] wdata = 0, rdata;
  logic [7:0] model [4096];
  int checks = 0, failures = 0;

  data_ram #(.DEPTH(4096), .W(8)) dut (.*);

  always #5 clk = !clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4096; i++) begin
      @(negedge clk); we = 1; addr = 12'(i); wdata = 8'(i * 13 + 5); model[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      addr = 12'($urandom);
      if ($urandom_range(0, 1)) begin
        we = 1; re = 0; wdata = 8'($urandom); model[addr] = wdata;
      end else begin
        we = 0; re = 1;
        @(negedge clk); re = 0;
        chk(rdata == model[addr], $sformatf("read %03h", addr));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
