// tb_fe_board: the FE processor board with the testbench acting as the SBC
// (download through the slave port, memory model on the bus) and as the
// 8x305 (presenting instruction addresses and local bus data). The
// downloaded micro-instructions load base registers, write and read the data
// RAM through base + constant and base + counter addresses, strobe the I/O
// cable, and program a DMA fetch of 16 bytes from SBC memory into the data
// RAM, which is then read back through micro-instructions. Last, a
// micro-instruction raises the interrupt to the SBC, which clears it
// through the slave port.
module tb_fe_board;
  import gridnet_pkg::*;
  logic clk = 0, rst_n = 0;
  logic slv_sel = 0, slv_wr = 0;
  logic [13:0] slv_addr = 0;
  logic [15:0] slv_wdata = 0;
  logic [10:0] pc = 11'd2047;
  logic [15:0] instr;
  logic run, start;
  logic [7:0] lb_wdata = 0, lb_rdata;
  logic io_rd, io_wr, dma_io_rd, dma_io_ack;
  logic [3:0] io_reg;
  logic [7:0] io_wdata, io_rdata, dma_io_rdata;
  logic sbc_irq;
  logic breq, grant = 0, bus_rd, bus_wr, bus_xack, dma_busy, dma_done;
  logic [19:0] bus_addr;
  logic [7:0] bus_wdata, bus_rdata;
  int checks = 0, failures = 0, io_wr_seen = 0;
  logic [7:0] io_last;

  fe_board dut (.*);
  sbc_mem_model #(.LAT(2)) mem (.clk, .addr(bus_addr), .rd(bus_rd), .wr(bus_wr),
    .wdata(bus_wdata), .rdata(bus_rdata), .xack(bus_xack));

  // I/O board stand-in: register reads return 0x40 + register number
  logic [7:0] io_q = 0;
  always @(posedge clk) begin
    grant <= breq;
    if (io_rd) io_q <= 8'h40 + 8'(io_reg);
  end
  always @(posedge clk) if (io_wr) begin io_wr_seen++; io_last = io_wdata; end
  assign io_rdata = io_q;
  assign dma_io_ack = 1'b0;
  assign dma_io_rdata = 8'h00;

  always #5 clk = !clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic bw(logic [13:0] a, logic [15:0] d);
    @(negedge clk); slv_sel = 1; slv_wr = 1; slv_addr = a; slv_wdata = d;
    @(negedge clk); slv_sel = 0; slv_wr = 0;
  endtask

  task automatic load(int w, logic [15:0] inst, uctrl_t c);
    logic [47:0] v;
    v = {inst, 32'(c)};
    bw(14'({w[10:0], 2'd0}), v[15:0]);
    bw(14'({w[10:0], 2'd1}), v[31:16]);
    bw(14'({w[10:0], 2'd2}), v[47:32]);
  endtask

  // execute microcode word k with local bus data d; returns lb_rdata
  task automatic step(input int k, input logic [7:0] d, output logic [7:0] r);
    @(negedge clk); pc = 11'(k);
    @(negedge clk); pc = 11'd2047; lb_wdata = d;
    @(negedge clk); r = lb_rdata;
  endtask

  uctrl_t prog [32];

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] r;
    for (int i = 0; i < 131072; i++) mem.mem[i] = 8'(i ^ 8'h5A);
    foreach (prog[i]) prog[i] = '0;
    // 0,1: base 1 = 0x400
    prog[0].base_wr = 1; prog[0].base_sel = 1;
    prog[1].base_wr = 1; prog[1].base_sel = 1; prog[1].base_hi = 1;
    // 2: RAM[base1 + 5] <= data
    prog[2].ram_wr = 1; prog[2].base_sel = 1; prog[2].offset = 5;
    // 3: RAM[base1 + cnt(reset)] <= data, cnt++
    prog[3].ram_wr = 1; prog[3].base_sel = 1; prog[3].use_cnt = 1; prog[3].cnt_rst = 1; prog[3].cnt_inc = 1;
    // 4: RAM[base1 + cnt] <= data, cnt++
    prog[4].ram_wr = 1; prog[4].base_sel = 1; prog[4].use_cnt = 1; prog[4].cnt_inc = 1;
    // 5: read RAM[base1 + 5]; 6: read RAM[base1 + 1]
    prog[5].ram_rd = 1; prog[5].base_sel = 1; prog[5].offset = 5;
    prog[6].ram_rd = 1; prog[6].base_sel = 1; prog[6].offset = 1;
    // 7: I/O write IO_CTRL; 8: I/O read IO_STATUS
    prog[7].io_wr = 1; prog[7].io_dev = DEV_IO; prog[7].io_reg = IO_CTRL;
    prog[8].io_rd = 1; prog[8].io_dev = DEV_IO; prog[8].io_reg = IO_STATUS;
    // 9..16: DMA registers and GO
    for (int i = 0; i < 8; i++) begin
      prog[9 + i].io_wr = 1; prog[9 + i].io_dev = DEV_DMA; prog[9 + i].io_reg = 4'(i);
    end
    // 17: DMA status read
    prog[17].io_rd = 1; prog[17].io_dev = DEV_DMA; prog[17].io_reg = DMA_STAT;
    // 20: raise the interrupt to the SBC
    prog[20].io_wr = 1; prog[20].io_dev = DEV_DMA; prog[20].io_reg = SBC_IRQ;
    // 18: read RAM[base1 + cnt(reset)], cnt++
    prog[18].ram_rd = 1; prog[18].base_sel = 1; prog[18].use_cnt = 1; prog[18].cnt_rst = 1; prog[18].cnt_inc = 1;
    // 19: read RAM[base1 + cnt], cnt++
    prog[19].ram_rd = 1; prog[19].base_sel = 1; prog[19].use_cnt = 1; prog[19].cnt_inc = 1;

    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 32; i++) load(i, 16'hC000 + 16'(i), prog[i]);
    load(2047, 16'h0000, '0);
    chk(!run, "FE waits during download");
    bw(14'h2000, 16'h0001);
    @(negedge clk);
    chk(run, "FE runs after the start write");
    @(negedge clk); pc = 11'd21; @(negedge clk);
    chk(instr == 16'hC015, "instruction field reaches the 8x305");
    step(0, 8'h00, r); step(1, 8'h04, r);
    step(2, 8'hAB, r); step(3, 8'h11, r); step(4, 8'h22, r);
    step(5, 8'h00, r); chk(r == 8'hAB, "RAM via base + constant");
    step(6, 8'h00, r); chk(r == 8'h22, "RAM via base + counter");
    chk(dut.u_dram.mem[12'h400] == 8'h11 && dut.u_dram.mem[12'h405] == 8'hAB, "RAM addresses 0x400 and 0x405");
    step(7, 8'h01, r); chk(io_wr_seen == 1 && io_last == 8'h01, "I/O write over the cable");
    step(8, 8'h00, r); chk(r == 8'h41, "I/O read over the cable");
    // DMA fetch: bus 0x00020 -> local 0x400, 16 bytes
    step(9, 8'h20, r); step(10, 8'h00, r); step(11, 8'h00, r);
    step(12, 8'h00, r); step(13, 8'h04, r);
    step(14, 8'd16, r); step(15, 8'h00, r);
    step(16, 8'h01, r);
    chk(dma_busy, "DMA started");
    begin
      int n = 0;
      // the 8x305 keeps using the RAM while the DMA runs
      while (dma_busy && n < 2000) begin step(5, 8'h00, r); n++; end
    end
    step(17, 8'h00, r); chk(r == 8'h02, "DMA status: done");
    step(18, 8'h00, r); chk(r == 8'(12'h020 ^ 8'h5A), "fetched byte 0");
    for (int i = 1; i < 16; i++) begin
      step(19, 8'h00, r); chk(r == 8'((12'h020 + i) ^ 8'h5A), $sformatf("fetched byte %0d", i));
    end
    chk(!sbc_irq, "no interrupt before it is raised");
    step(20, 8'h00, r);
    chk(sbc_irq, "micro-instruction raises the interrupt to the SBC");
    bw(14'h2000, 16'h0001);
    @(negedge clk);
    chk(sbc_irq && run, "a control write without bit 1 leaves it");
    bw(14'h2000, 16'h0003);
    @(negedge clk);
    chk(!sbc_irq && run, "SBC acknowledge clears it, FE keeps running");
    bw(14'h2000, 16'h0000);
    @(negedge clk);
    chk(!run, "FE back in wait");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
