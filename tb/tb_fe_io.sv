// tb_fe_io: end-to-end test of the FE I/O board.
// The two ADCCP chips are modelled by tasks that deliver a packet byte by
// byte (one byte per 8 us at 1 Mbit/s; the board clock is scaled to 2 MHz,
// so the loop timeout is 400 clocks and the byte timeout 32 clocks). The
// testbench plays the 8x305 through the register interface and checks the
// stored copies, lengths and error word for: a clean packet with skew, a
// one-bit mismatch, a cut CCW loop, a byte dropout, a CRC error, an
// overrun, the transmit fan-out, the DMA read port and the response timer
// (1000 us = 2000 clocks: it must expire after exactly that long, and not at
// all when a packet starts in time).
module tb_fe_io;
  import gridnet_pkg::*;
  localparam int BYTE_CLK = 16;
  logic clk = 0, rst_n = 0;
  logic io_rd = 0, io_wr = 0, dma_rd = 0, dma_ack;
  logic [3:0] io_reg = 0;
  logic [7:0] io_wdata = 0, io_rdata, dma_rdata;
  logic cw_rx_stb = 0, cw_rx_eop = 0, cw_rx_crc_ok = 1;
  logic ccw_rx_stb = 0, ccw_rx_eop = 0, ccw_rx_crc_ok = 1;
  logic [7:0] cw_rx_data = 0, ccw_rx_data = 0, tx_data;
  logic tx_stb, rx_mode, tx_mode, tx_eom, pkt_ready;
  int checks = 0, failures = 0, tx_seen = 0;
  logic [7:0] last_tx;

  fe_io #(.CLK_HZ(2_000_000), .FIFO_DEPTH(32), .PKT_BYTES(64)) dut (.*);

  always #5 clk = !clk;
  always @(posedge clk) if (tx_stb) begin tx_seen++; last_tx = tx_data; end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr(logic [3:0] r, logic [7:0] d);
    @(negedge clk); io_wr = 1; io_reg = r; io_wdata = d;
    @(negedge clk); io_wr = 0;
  endtask

  task automatic rd(input logic [3:0] r, output logic [7:0] d);
    @(negedge clk); io_rd = 1; io_reg = r;
    @(negedge clk); io_rd = 0; #1 d = io_rdata;
  endtask

  // one ADCCP chip delivering a packet: n bytes, data[i] = seed + i (xor flip at flip_at),
  // delay in byte times before the first byte, stop_at < n drops the rest (no eop)
  task automatic send(bit ccw, int n, int seed, int delay, int flip_at, int stop_at, bit crc_ok);
    repeat (delay * BYTE_CLK) @(negedge clk);
    for (int i = 0; i < n; i++) begin
      if (i == stop_at) return;
      @(negedge clk);
      if (ccw) begin ccw_rx_stb = 1; ccw_rx_data = 8'(seed + i) ^ (i == flip_at ? 8'h04 : 8'h00); end
      else     begin cw_rx_stb = 1;  cw_rx_data  = 8'(seed + i) ^ (i == flip_at ? 8'h04 : 8'h00); end
      @(negedge clk); ccw_rx_stb = 0; cw_rx_stb = 0;
      repeat (BYTE_CLK - 2) @(negedge clk);
    end
    @(negedge clk);
    if (ccw) begin ccw_rx_eop = 1; ccw_rx_crc_ok = crc_ok; end
    else     begin cw_rx_eop = 1;  cw_rx_crc_ok = crc_ok; end
    @(negedge clk); ccw_rx_eop = 0; cw_rx_eop = 0; ccw_rx_crc_ok = 1; cw_rx_crc_ok = 1;
  endtask

  task automatic wait_ready();
    int n = 0;
    while (!pkt_ready && n < 5000) begin @(negedge clk); n++; end
    chk(pkt_ready, "packet becomes ready");
  endtask

  // check the read pair against the expected packet
  task automatic check_pkt(string name, int len_cw, int len_ccw, int seed, int flip_at, logic [7:0] err);
    logic [7:0] d, lo, hi;
    rd(IO_ERR, d);      chk(d == err, $sformatf("%s: error word %02h, expected %02h", name, d, err));
    rd(IO_LENCW_L, lo); rd(IO_LENCW_H, hi);
    chk({hi[2:0], lo} == 11'(len_cw), $sformatf("%s: CW length %0d", name, {hi[2:0], lo}));
    rd(IO_LENCC_L, lo); rd(IO_LENCC_H, hi);
    chk({hi[2:0], lo} == 11'(len_ccw), $sformatf("%s: CCW length %0d", name, {hi[2:0], lo}));
    wr(IO_PTR_L, 0); wr(IO_PTR_H, 0);
    for (int i = 0; i < len_cw; i++) begin
      rd(IO_DATA, d); chk(d == 8'(seed + i), $sformatf("%s: CW byte %0d", name, i));
    end
    wr(IO_PTR_L, 0); wr(IO_PTR_H, 8'h04);
    for (int i = 0; i < len_ccw; i++) begin
      rd(IO_DATA, d);
      chk(d == (8'(seed + i) ^ (i == flip_at ? 8'h04 : 8'h00)), $sformatf("%s: CCW byte %0d", name, i));
    end
  endtask

  task automatic release_pair();
    wr(IO_CTRL, 8'h05);   // rx_mode stays on, release
  endtask

  initial begin
    #20_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] d;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    wr(IO_CTRL, 8'h01);
    chk(rx_mode && !tx_mode, "receive mode");
    // 1: clean packet, CCW five bytes behind
    fork
      send(0, 20, 8'h10, 0, -1, 99, 1);
      send(1, 20, 8'h10, 5, -1, 99, 1);
    join
    wait_ready();
    check_pkt("clean", 20, 20, 8'h10, -1, 8'h00);
    release_pair();
    // 2: one bit differs in CCW byte 7
    fork
      send(0, 12, 8'h40, 2, -1, 99, 1);
      send(1, 12, 8'h40, 0, 7, 99, 1);
    join
    wait_ready();
    check_pkt("mismatch", 12, 12, 8'h40, 7, 8'h01);
    release_pair();
    // 3: CCW loop cut: only CW arrives
    send(0, 30, 8'h60, 0, -1, 99, 1);
    wait_ready();
    check_pkt("loop cut", 30, 0, 8'h60, -1, 8'h04);
    release_pair();
    // 4: CW stops after 6 bytes (byte dropout); CCW complete
    fork
      send(0, 15, 8'h20, 0, -1, 6, 1);
      send(1, 15, 8'h20, 1, -1, 99, 1);
    join
    wait_ready();
    check_pkt("dropout", 6, 15, 8'h20, -1, 8'h08);
    release_pair();
    // 5: CRC error reported on the CW copy
    fork
      send(0, 8, 8'h30, 0, -1, 99, 0);
      send(1, 8, 8'h30, 0, -1, 99, 1);
    join
    wait_ready();
    check_pkt("crc", 8, 8, 8'h30, -1, 8'h20);
    // 6: overrun - pair 1 still unread, pair 2 filled, a third packet is dropped
    fork
      send(0, 5, 8'h50, 0, -1, 99, 1);
      send(1, 5, 8'h50, 0, -1, 99, 1);
    join
    repeat (50) @(negedge clk);
    rd(IO_STATUS, d);
    chk(d[0] && d[1], "both pairs full: ready and fill_busy");
    fork
      send(0, 5, 8'h70, 0, -1, 99, 1);
      send(1, 5, 8'h70, 0, -1, 99, 1);
    join
    release_pair();            // crc packet done
    check_pkt("second stored", 5, 5, 8'h50, -1, 8'h00);
    release_pair();
    rd(IO_STATUS, d);
    chk(!d[0], "dropped packet was not stored");
    fork
      send(0, 4, 8'h90, 0, -1, 99, 1);
      send(1, 4, 8'h90, 0, -1, 99, 1);
    join
    wait_ready();
    check_pkt("after overrun", 4, 4, 8'h90, -1, 8'h80);
    // 7: DMA read port, and a clash with an 8x305 read
    wr(IO_PTR_L, 1); wr(IO_PTR_H, 0);
    @(negedge clk); dma_rd = 1; #1 chk(dma_ack, "DMA granted");
    @(negedge clk); dma_rd = 0; chk(dma_rdata == 8'h91, "DMA reads byte 1");
    @(negedge clk); dma_rd = 1; io_rd = 1; io_reg = IO_DATA; #1 chk(!dma_ack, "8x305 wins the clash");
    @(negedge clk); dma_rd = 0; io_rd = 0; #1 chk(io_rdata == 8'h92, "8x305 reads byte 2");
    release_pair();
    // 8: response timer - no answer
    wr(IO_CTRL, 8'h09);
    repeat (1990) @(negedge clk);
    rd(IO_STATUS, d);
    chk(d[6] && !d[5], "response timer running, not expired at 1990 clocks");
    repeat (20) @(negedge clk);
    rd(IO_STATUS, d);
    chk(!d[6] && d[5], "response timeout after 2000 clocks");
    // an answer in time stops it and clears the flag
    wr(IO_CTRL, 8'h09);
    rd(IO_STATUS, d);
    chk(!d[5], "re-arming clears the timeout");
    fork
      send(0, 4, 8'hB0, 20, -1, 99, 1);
      send(1, 4, 8'hB0, 22, -1, 99, 1);
    join
    repeat (2100) @(negedge clk);
    rd(IO_STATUS, d);
    chk(!d[6] && !d[5], "answer arrived: no timeout");
    wait_ready();
    check_pkt("answer", 4, 4, 8'hB0, -1, 8'h00);
    release_pair();
    // 9: transmit fan-out
    wr(IO_CTRL, 8'h02);
    chk(tx_mode && !rx_mode, "transmit mode");
    wr(IO_TXDATA, 8'hA5);
    chk(tx_seen == 1 && last_tx == 8'hA5, "byte to both ADCCP chips");
    @(negedge clk); io_wr = 1; io_reg = IO_CTRL; io_wdata = 8'h12;
    #1 chk(tx_eom && !tx_stb, "end of message strobe");
    @(negedge clk); io_wr = 0;
    #1 chk(!tx_eom && tx_mode, "one clock, transmit mode kept");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
