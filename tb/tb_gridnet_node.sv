// tb_gridnet_node: end-to-end run of one GRIDNET node at its default
// parameters (12 MHz clock, 1 Mbit/s loops, 1K-byte packets).
// The testbench plays the outside parts: the SBC (microcode download, its
// memory on the bus, a competing bus request), the 8x305 (stepping through
// downloaded micro-instructions), the two ADCCP chips (bytes every 8 us) and
// the host commanding the Master Clock. Sequence:
//   1. download microcode, start the FE, start the time system
//   2. receive a full 1024-byte packet on both loops with 10 bytes of skew,
//      check it and store it to SBC memory by DMA from the receive buffer,
//      while the SBC also asks for the bus
//   3. receive packets with a one-bit mismatch, a cut CCW loop, a byte
//      dropout and a CRC error, and an overrun with both pairs full
//   4. fetch a 32-byte packet from SBC memory by DMA and transmit it to both
//      ADCCP chips through the data RAM, while the DMA stores the last
//      received packet (the report's interleaved transmit-transfer); each
//      DMA is followed by the FE's interrupt to the SBC; then the response
//      timer runs out because no answer comes
//   5. read the timestamp, stop the Master Clock, see the missing pulse
//      interrupt; exercise the by-pass gates
// Every mechanism is counted; one that never happened counts as a failure.
module tb_gridnet_node;
  import gridnet_pkg::*;
  localparam int BYTE_CLK = 96;   // 8 us at 12 MHz
  logic clk = 0, rst_n = 0;
  logic slv_sel = 0, slv_wr = 0;
  logic [13:0] slv_addr = 0;
  logic [15:0] slv_wdata = 0;
  logic [10:0] pc = 11'd2047;
  logic [15:0] instr;
  logic fe_run, fe_start;
  logic [7:0] lb_wdata = 0, lb_rdata;
  logic [19:0] mbus_addr;
  logic mbus_rd, mbus_wr, mbus_xack, dma_busy, dma_done;
  logic [7:0] mbus_wdata, mbus_rdata;
  logic sbc_irq;
  logic sbc_breq = 0, sbc_grant, iob_breq = 0, iob_grant;
  logic [2:0] bus_bpro;
  logic cw_rx_stb = 0, cw_rx_eop = 0, cw_rx_crc_ok = 1;
  logic ccw_rx_stb = 0, ccw_rx_eop = 0, ccw_rx_crc_ok = 1;
  logic [7:0] cw_rx_data = 0, ccw_rx_data = 0, tx_data;
  logic tx_stb, rx_mode, tx_mode, tx_eom, pkt_ready;
  logic mc_start = 0, mc_stop = 0, mc_clock_line, mc_clear_line, mc_clock_env, mc_clear_env, mc_running;
  logic tc_rd = 0, tc_rd_hi = 0, tc_missing_irq, tc_irq_ack = 0;
  logic [15:0] tc_rdata;
  logic [31:0] tc_count;
  logic power_good = 1;
  logic [3:0] bypass_fail = 0, bypass_fail_en = 0;
  logic bypass_cw_actuate, bypass_ccw_actuate;

  gridnet_node dut (.*);
  sbc_mem_model #(.LAT(3)) mem (.clk, .addr(mbus_addr), .rd(mbus_rd), .wr(mbus_wr),
    .wdata(mbus_wdata), .rdata(mbus_rdata), .xack(mbus_xack));

  always #5 clk = !clk;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_mismatch = 0, n_loop_err = 0, n_byte_err = 0, n_crc_err = 0, n_overrun = 0;
  int n_dma_fetch = 0, n_dma_store = 0, n_bus_wait = 0, n_tx = 0, n_time_clear = 0;
  int n_missing = 0, n_bypass = 0, n_pkt = 0, n_irq = 0, n_tx_during_dma = 0, n_resp_timeout = 0, n_eom = 0;
  byte unsigned tx_got[$];

  always @(posedge clk) begin
    if (tx_eom) n_eom++;
    if (tx_stb) begin n_tx++; tx_got.push_back(tx_data); if (dma_busy) n_tx_during_dma++; end
    if (sbc_breq && !sbc_grant && dut.grant[0]) n_bus_wait++;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- SBC: download ----------------
  task automatic bw(logic [13:0] a, logic [15:0] d);
    @(negedge clk); slv_sel = 1; slv_wr = 1; slv_addr = a; slv_wdata = d;
    @(negedge clk); slv_sel = 0; slv_wr = 0;
  endtask

  task automatic load(int w, uctrl_t c);
    logic [47:0] v;
    v = {16'h0000, 32'(c)};
    bw(14'({w[10:0], 2'd0}), v[15:0]);
    bw(14'({w[10:0], 2'd1}), v[31:16]);
    bw(14'({w[10:0], 2'd2}), v[47:32]);
  endtask

  // ---------------- 8x305: one micro-instruction ----------------
  task automatic step(input int k, input logic [7:0] d, output logic [7:0] r);
    @(negedge clk); pc = 11'(k);
    @(negedge clk); pc = 11'd2047; lb_wdata = d;
    @(negedge clk); r = lb_rdata;
  endtask

  localparam int U_B1LO = 0, U_B1HI = 1, U_RAMRD0 = 2, U_RAMRD = 3, U_TX = 4, U_CTRL = 5;
  localparam int U_STAT = 6, U_ERR = 7, U_LEN = 8, U_PTRL = 12, U_PTRH = 13, U_DATA = 14;
  localparam int U_DMA = 15, U_DSTAT = 23, U_IRQ = 24;

  task automatic dma_start(logic [19:0] ba, logic [11:0] la, int n, logic [7:0] go);
    logic [7:0] r;
    step(U_DMA + 0, ba[7:0], r);  step(U_DMA + 1, ba[15:8], r); step(U_DMA + 2, 8'(ba[19:16]), r);
    step(U_DMA + 3, la[7:0], r);  step(U_DMA + 4, 8'(la[11:8]), r);
    step(U_DMA + 5, 8'(n), r);    step(U_DMA + 6, 8'(n >> 8), r);
    step(U_DMA + 7, go, r);
  endtask

  task automatic dma_wait();
    logic [7:0] r;
    r = 0;
    for (int i = 0; i < 100000 && !r[1]; i++) step(U_DSTAT, 0, r);
    chk(r[1], "DMA completes");
  endtask

  task automatic dma(logic [19:0] ba, logic [11:0] la, int n, logic [7:0] go);
    dma_start(ba, la, n, go);
    dma_wait();
  endtask

  // the FE alerts the SBC, which acknowledges through the slave port
  task automatic alert_sbc();
    logic [7:0] r;
    step(U_IRQ, 0, r);
    chk(sbc_irq, "interrupt to the SBC raised");
    if (sbc_irq) n_irq++;
    bw(14'h2000, 16'h0003);
    @(negedge clk);
    chk(!sbc_irq && fe_run, "SBC acknowledge clears the interrupt");
  endtask

  // ---------------- ADCCP chips ----------------
  task automatic send(bit ccw, int n, int seed, int delay, int flip_at, int stop_at, bit crc_ok);
    repeat (delay * BYTE_CLK) @(negedge clk);
    for (int i = 0; i < n; i++) begin
      if (i == stop_at) return;
      @(negedge clk);
      if (ccw) begin ccw_rx_stb = 1; ccw_rx_data = 8'(seed + i * 3) ^ (i == flip_at ? 8'h80 : 8'h00); end
      else     begin cw_rx_stb = 1;  cw_rx_data  = 8'(seed + i * 3) ^ (i == flip_at ? 8'h80 : 8'h00); end
      @(negedge clk); ccw_rx_stb = 0; cw_rx_stb = 0;
      repeat (BYTE_CLK - 2) @(negedge clk);
    end
    @(negedge clk);
    if (ccw) begin ccw_rx_eop = 1; ccw_rx_crc_ok = crc_ok; end
    else     begin cw_rx_eop = 1;  cw_rx_crc_ok = crc_ok; end
    @(negedge clk); ccw_rx_eop = 0; cw_rx_eop = 0; ccw_rx_crc_ok = 1; cw_rx_crc_ok = 1;
  endtask

  // read and classify the packet in the read pair, then release it
  task automatic take_pkt(string name, int len_cw, int len_ccw, logic [7:0] err_exp);
    logic [7:0] r, e, l0, l1, l2, l3;
    int n = 0;
    r = 0;
    while (!r[0] && n < 20000) begin step(U_STAT, 0, r); n++; end
    chk(r[0], $sformatf("%s: packet ready", name));
    step(U_ERR, 0, e);
    step(U_LEN + 0, 0, l0); step(U_LEN + 1, 0, l1); step(U_LEN + 2, 0, l2); step(U_LEN + 3, 0, l3);
    chk(e == err_exp, $sformatf("%s: error word %02h expected %02h", name, e, err_exp));
    chk({l1[2:0], l0} == 11'(len_cw) && {l3[2:0], l2} == 11'(len_ccw),
        $sformatf("%s: lengths %0d/%0d", name, {l1[2:0], l0}, {l3[2:0], l2}));
    n_pkt++;
    if (e[0]) n_mismatch++;
    if (e[2:1] != 0) n_loop_err++;
    if (e[4:3] != 0) n_byte_err++;
    if (e[6:5] != 0) n_crc_err++;
    if (e[7]) n_overrun++;
  endtask

  task automatic release_pair();
    logic [7:0] r;
    step(U_CTRL, 8'h05, r);
  endtask

  initial begin
    #2_000_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    uctrl_t p [32];
    logic [7:0] r;
    logic [15:0] lo, hi;
    for (int i = 0; i < 131072; i++) mem.mem[i] = 8'(i * 5 + 1);
    foreach (p[i]) p[i] = '0;
    p[U_B1LO].base_wr = 1; p[U_B1LO].base_sel = 1;
    p[U_B1HI].base_wr = 1; p[U_B1HI].base_sel = 1; p[U_B1HI].base_hi = 1;
    p[U_RAMRD0].ram_rd = 1; p[U_RAMRD0].base_sel = 1; p[U_RAMRD0].use_cnt = 1;
    p[U_RAMRD0].cnt_rst = 1; p[U_RAMRD0].cnt_inc = 1;
    p[U_RAMRD].ram_rd = 1; p[U_RAMRD].base_sel = 1; p[U_RAMRD].use_cnt = 1; p[U_RAMRD].cnt_inc = 1;
    p[U_TX].io_wr = 1;   p[U_TX].io_reg = IO_TXDATA;
    p[U_CTRL].io_wr = 1; p[U_CTRL].io_reg = IO_CTRL;
    p[U_STAT].io_rd = 1; p[U_STAT].io_reg = IO_STATUS;
    p[U_ERR].io_rd = 1;  p[U_ERR].io_reg = IO_ERR;
    for (int i = 0; i < 4; i++) begin p[U_LEN + i].io_rd = 1; p[U_LEN + i].io_reg = IO_LENCW_L + 4'(i); end
    p[U_PTRL].io_wr = 1; p[U_PTRL].io_reg = IO_PTR_L;
    p[U_PTRH].io_wr = 1; p[U_PTRH].io_reg = IO_PTR_H;
    p[U_DATA].io_rd = 1; p[U_DATA].io_reg = IO_DATA;
    for (int i = 0; i < 8; i++) begin
      p[U_DMA + i].io_wr = 1; p[U_DMA + i].io_dev = DEV_DMA; p[U_DMA + i].io_reg = 4'(i);
    end
    p[U_DSTAT].io_rd = 1; p[U_DSTAT].io_dev = DEV_DMA; p[U_DSTAT].io_reg = DMA_STAT;
    p[U_IRQ].io_wr = 1;   p[U_IRQ].io_dev = DEV_DMA;   p[U_IRQ].io_reg = SBC_IRQ;

    repeat (3) @(posedge clk);
    rst_n <= 1;
    // ---- 1. download and start
    for (int i = 0; i < 32; i++) load(i, p[i]);
    load(2047, '0);
    bw(14'h2000, 16'h0001);
    @(negedge clk);
    chk(fe_run, "FE running");
    @(negedge clk); mc_start = 1; @(negedge clk); mc_start = 0;
    repeat (200) @(negedge clk);
    step(U_CTRL, 8'h01, r);
    chk(rx_mode, "receive mode");

    // ---- 2. full-size packet, CCW 10 bytes behind
    fork
      send(0, 1024, 8'h11, 0, -1, 9999, 1);
      send(1, 1024, 8'h11, 10, -1, 9999, 1);
    join
    take_pkt("full packet", 1024, 1024, 8'h00);
    // spot-check the CCW copy through the local bus
    step(U_PTRL, 8'hFF, r); step(U_PTRH, 8'h07, r);   // CCW, index 1023
    step(U_DATA, 0, r);
    chk(r == 8'(8'h11 + 1023 * 3), "last CCW byte via local bus");
    // store the CW copy to SBC memory 0x08000 by DMA, while the SBC wants the bus
    step(U_PTRL, 8'h00, r); step(U_PTRH, 8'h00, r);
    fork
      dma(20'h08000, 12'h000, 1024, 8'h02);
      begin repeat (300) @(negedge clk); sbc_breq = 1; end
    join
    n_dma_store++;
    alert_sbc();
    repeat (3) @(negedge clk);
    chk(sbc_grant, "SBC gets the bus after the FE");
    sbc_breq = 0;
    begin
      int bad = 0;
      for (int i = 0; i < 1024; i++) if (mem.mem[17'h08000 + i] != 8'(8'h11 + i * 3)) bad++;
      chk(bad == 0, $sformatf("packet in SBC memory, %0d bad bytes", bad));
    end
    release_pair();

    // ---- 3. error cases
    fork
      send(0, 40, 8'h22, 0, 17, 9999, 1);
      send(1, 40, 8'h22, 3, -1, 9999, 1);
    join
    take_pkt("mismatch", 40, 40, 8'h01);
    release_pair();
    send(0, 25, 8'h33, 0, -1, 9999, 1);
    take_pkt("CCW loop cut", 25, 0, 8'h04);
    release_pair();
    fork
      send(0, 30, 8'h44, 0, -1, 9999, 1);
      send(1, 30, 8'h44, 2, -1, 12, 1);
    join
    take_pkt("CCW byte dropout", 30, 12, 8'h10);
    release_pair();
    fork
      send(0, 20, 8'h55, 1, -1, 9999, 1);
      send(1, 20, 8'h55, 0, -1, 9999, 0);
    join
    take_pkt("CCW CRC", 20, 20, 8'h40);
    // keep this pair, fill the other, then a third packet overruns
    fork
      send(0, 10, 8'h66, 0, -1, 9999, 1);
      send(1, 10, 8'h66, 0, -1, 9999, 1);
    join
    fork
      send(0, 10, 8'h77, 0, -1, 9999, 1);
      send(1, 10, 8'h77, 0, -1, 9999, 1);
    join
    release_pair();
    take_pkt("second of two", 10, 10, 8'h00);
    release_pair();
    fork
      send(0, 10, 8'h88, 0, -1, 9999, 1);
      send(1, 10, 8'h88, 0, -1, 9999, 1);
    join
    take_pkt("after overrun", 10, 10, 8'h80);

    // ---- 4. transmit-transfer: fetch 32 bytes into data RAM 0x400, then
    // send them while the DMA stores the received packet (CW copy) to SBC
    // memory 0x09000, interleaved
    dma(20'h01000, 12'h400, 32, 8'h01);
    n_dma_fetch++;
    alert_sbc();
    step(U_PTRL, 8'h00, r); step(U_PTRH, 8'h00, r);
    dma_start(20'h09000, 12'h000, 10, 8'h02);
    step(U_B1LO, 8'h00, r); step(U_B1HI, 8'h04, r);
    step(U_CTRL, 8'h02, r);
    chk(tx_mode && !rx_mode, "transmit mode");
    tx_got.delete();
    step(U_RAMRD0, 0, r); step(U_TX, r, r);
    for (int i = 1; i < 32; i++) begin step(U_RAMRD, 0, r); step(U_TX, r, r); end
    step(U_CTRL, 8'h12, r);   // end of message
    chk(n_eom == 1, "end of message sent once");
    dma_wait();
    n_dma_store++;
    begin
      int bad = 0;
      for (int i = 0; i < 10; i++) if (mem.mem[17'h09000 + i] != 8'(8'h88 + i * 3)) bad++;
      chk(bad == 0, "received packet stored during the transmission");
    end
    step(U_CTRL, 8'h04, r);   // release the pair
    // the packet sent expects an answer: arm the response timer, none comes
    step(U_CTRL, 8'h09, r);
    repeat (12100) @(negedge clk);
    step(U_STAT, 0, r);
    if (r[5]) n_resp_timeout++;
    chk(r[5] && !r[6], "response timeout after 1 ms without an answer");
    begin
      int bad = 0;
      for (int i = 0; i < 32; i++) if (tx_got[i] != 8'((17'h01000 + i) * 5 + 1)) bad++;
      chk(tx_got.size() == 32 && bad == 0, "32 bytes sent to both ADCCP chips");
    end

    // ---- 5. time system and by-pass
    chk(tc_count > 100, $sformatf("time counter ran during the test (%0d)", tc_count));
    // a second start sends Clear again: the counter must go back to zero
    @(negedge clk); mc_start = 1; @(negedge clk); mc_start = 0;
    repeat (130) @(negedge clk);
    if (tc_count == 0) n_time_clear++;
    chk(tc_count == 0, "Clear zeroes the time counter");
    repeat (10 * 120) @(negedge clk);
    @(negedge clk); tc_rd = 1; tc_rd_hi = 0; @(negedge clk); tc_rd = 0; lo = tc_rdata;
    repeat (500) @(negedge clk);   // a Clock edge passes between the halves
    @(negedge clk); tc_rd = 1; tc_rd_hi = 1; @(negedge clk); tc_rd = 0; hi = tc_rdata;
    chk({hi, lo} == 32'd10, $sformatf("timestamp %0d ticks, expected 10", {hi, lo}));
    @(negedge clk); mc_stop = 1; @(negedge clk); mc_stop = 0;
    repeat (3000) @(negedge clk);
    if (tc_missing_irq) n_missing++;
    chk(tc_missing_irq, "missing pulse interrupt after stop");
    @(negedge clk); tc_irq_ack = 1; @(negedge clk); tc_irq_ack = 0;
    chk(bypass_cw_actuate && bypass_ccw_actuate, "node in the loops");
    bypass_fail = 4'b0010; bypass_fail_en = 4'b0010;
    #1;
    if (!bypass_cw_actuate && !bypass_ccw_actuate) n_bypass++;
    chk(!bypass_cw_actuate && !bypass_ccw_actuate, "selected failure by-passes the node");

    // ---- mechanism summary
    $display("mechanisms: packets=%0d mismatch=%0d loop_err=%0d byte_err=%0d crc_err=%0d overrun=%0d",
             n_pkt, n_mismatch, n_loop_err, n_byte_err, n_crc_err, n_overrun);
    $display("            dma_fetch=%0d dma_store=%0d bus_wait=%0d tx_bytes=%0d tx_during_dma=%0d irq=%0d resp_timeout=%0d time_clear=%0d missing=%0d bypass=%0d",
             n_dma_fetch, n_dma_store, n_bus_wait, n_tx, n_tx_during_dma, n_irq, n_resp_timeout, n_time_clear, n_missing, n_bypass);
    chk(n_mismatch > 0, "mismatch happened");
    chk(n_loop_err > 0, "loop error happened");
    chk(n_byte_err > 0, "byte dropout happened");
    chk(n_crc_err > 0, "CRC error happened");
    chk(n_overrun > 0, "overrun happened");
    chk(n_dma_fetch > 0 && n_dma_store > 0, "DMA both ways");
    chk(n_bus_wait > 0, "bus priority made the SBC wait");
    chk(n_tx > 0, "transmit happened");
    chk(n_tx_during_dma > 0, "transmit interleaved with a DMA store");
    chk(n_irq > 0, "interrupt to the SBC happened");
    chk(n_resp_timeout > 0, "response timeout happened");
    chk(n_time_clear > 0, "time counter cleared");
    chk(n_missing > 0, "missing pulse detected");
    chk(n_bypass > 0, "by-pass happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
