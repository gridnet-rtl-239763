// tb_master_dma: block fetch (SBC memory -> data RAM) and block store (data
// RAM or I/O buffer -> SBC memory), with bus grant delay, a data RAM that is
// busy on random clocks (the 8x305 has priority) and the status register.
module tb_master_dma;
  import gridnet_pkg::*;
  logic clk = 0, rst_n = 0;
  logic cfg_wr = 0, cfg_rd = 0;
  logic [3:0] cfg_reg = 0;
  logic [7:0] cfg_wdata = 0, cfg_rdata;
  logic busy, done, breq, grant = 0;
  logic [19:0] bus_addr;
  logic bus_rd, bus_wr, bus_xack;
  logic [7:0] bus_wdata, bus_rdata;
  logic ram_req, ram_we, ram_gnt, io_rd, io_ack;
  logic [11:0] ram_addr;
  logic [7:0] ram_wdata, ram_rdata = 0, io_rdata = 0;
  logic [7:0] lram [4096];
  logic [7:0] io_byte = 0;
  logic cpu_busy = 0;
  int checks = 0, failures = 0, cycles = 0;

  master_dma #(.BUS_AW(20)) dut (.*);
  sbc_mem_model #(.LAT(3)) mem (.clk, .addr(bus_addr), .rd(bus_rd), .wr(bus_wr),
    .wdata(bus_wdata), .rdata(bus_rdata), .xack(bus_xack));

  always #5 clk = !clk;

  // bus grant two clocks after request; local RAM busy on random clocks
  logic breq_q;
  always @(posedge clk) begin
    breq_q <= breq;
    grant  <= breq && breq_q;
    cpu_busy <= ($urandom_range(0, 3) == 0);
    if (ram_req && ram_gnt) begin
      if (ram_we) lram[ram_addr] <= ram_wdata;
      else        ram_rdata <= lram[ram_addr];
    end
    if (io_rd && io_ack) begin io_rdata <= io_byte; io_byte <= io_byte + 1; end
    if (busy) cycles++;
  end
  assign ram_gnt = !cpu_busy;
  assign io_ack  = io_rd && !cpu_busy;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic cw(logic [3:0] r, logic [7:0] d);
    @(negedge clk); cfg_wr = 1; cfg_reg = r; cfg_wdata = d;
    @(negedge clk); cfg_wr = 0;
  endtask

  task automatic run(logic [19:0] ba, logic [11:0] la, int n, logic [7:0] go);
    cw(DMA_BA0, ba[7:0]); cw(DMA_BA1, ba[15:8]); cw(DMA_BA2, 8'(ba[19:16]));
    cw(DMA_LA0, la[7:0]); cw(DMA_LA1, 8'(la[11:8]));
    cw(DMA_CNT0, 8'(n)); cw(DMA_CNT1, 8'(n >> 8));
    cycles = 0;
    cw(DMA_GO, go);
    while (busy) @(negedge clk);
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] st;
    for (int i = 0; i < 131072; i++) mem.mem[i] = 8'(i * 7 + 3);
    for (int i = 0; i < 4096; i++) lram[i] = 8'hEE;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    // fetch 300 bytes from 0x01234 into local 0x400
    run(20'h01234, 12'h400, 300, 8'h01);
    chk(done, "fetch done");
    for (int i = 0; i < 300; i++)
      chk(lram[12'h400 + i] == 8'((20'h01234 + i) * 7 + 3), $sformatf("fetched byte %0d", i));
    chk(lram[12'h3FF] == 8'hEE && lram[12'h400 + 300] == 8'hEE, "nothing outside the block");
    chk(cycles >= 300 * 5, $sformatf("bus cycles take their time: %0d clocks", cycles));
    chk(!breq, "bus released");
    @(negedge clk); cfg_rd = 1; cfg_reg = DMA_STAT; @(negedge clk); cfg_rd = 0;
    chk(cfg_rdata == 8'h02, "status reports done");
    chk(!done, "done cleared by the read");
    // store 100 bytes from local 0x400 to 0x10000
    run(20'h10000, 12'h400, 100, 8'h00);
    for (int i = 0; i < 100; i++)
      chk(mem.mem[17'h10000 + i] == lram[12'h400 + i], $sformatf("stored byte %0d", i));
    // store 50 bytes from the I/O board buffer to 0x00100
    run(20'h00100, 12'h000, 50, 8'h02);
    for (int i = 0; i < 50; i++)
      chk(mem.mem[17'h00100 + i] == 8'(i), $sformatf("buffer byte %0d", i));
    chk(mem.mem[17'h00100 + 50] == 8'((17'h00100 + 50) * 7 + 3), "buffer store stops at count");
    // zero count completes at once
    run(20'h0, 12'h0, 0, 8'h01);
    chk(done, "empty block done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
