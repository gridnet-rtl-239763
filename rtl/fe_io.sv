// fe_io: the FE I/O board - dual-loop receive path and transmit fan-out.
//
// Every packet reaches the node twice: once from the ADCCP chip on the CW
// loop and once from the chip on the CCW loop, skewed in time. Each chip's
// bytes go into a FIFO of their own (byte_fifo); the compare stage
// (rx_compare) removes matching bytes of both copies together, compares
// them and stores both in the ping-pong buffer (pingpong_buffer). The timers
// (rx_timers) detect a loop that never delivers its copy and byte dropouts.
// When both copies have ended and been stored, the packet is closed with its
// two lengths and an error word (rx_err_t), and the 8x305 can read it. This
// structure follows the report. The register map, the ADCCP byte interface
// and the overrun handling are this design's choices.
//
// Response timer: armed through IO_CTRL bit 3 and stopped by the first byte
// received on either loop; if RESP_TIMEOUT_US passes first, resp_timeout is
// set in IO_STATUS. The report lists "response intervals" among the FE's
// timers; the arming, stopping and the 1 ms default are this design's.
//
// Transmit: a write to IO_TXDATA sends the byte to both ADCCP chips in the
// same clock (tx_stb, tx_data); IO_CTRL sets their receive/transmit mode,
// and IO_CTRL bit 4 tells both chips that the message is complete (tx_eom),
// so that they append the CRC and the closing flag. The 8x305 must pace its
// byte writes to the line rate (one byte per 8 us at 1 Mbit/s).
//
// Local bus (8x305 side): io_rd / io_wr with io_reg, see gridnet_pkg for the
// map. Read data appears on io_rdata the clock after io_rd. IO_DATA reads the
// read pair at the buffer pointer and advances the pointer.
// DMA side: dma_rd asks for the byte at the pointer; dma_ack grants it (the
// 8x305 wins a clash) and the byte is on dma_rdata the next clock; the
// pointer advances.
// A packet that starts while both pairs are full is dropped; the overrun bit
// is set in the error word of the next stored packet.
module fe_io
  import gridnet_pkg::*;
#(
  parameter int CLK_HZ     = 12_000_000,
  parameter int FIFO_DEPTH = 32,
  parameter int PKT_BYTES  = 1024,
  parameter int LOOP_TIMEOUT_US = 200,
  parameter int BYTE_TIMEOUT_US = 16,
  parameter int RESP_TIMEOUT_US = 1000
) (
  input  logic       clk,
  input  logic       rst_n,
  // local bus
  input  logic       io_rd,
  input  logic       io_wr,
  input  logic [3:0] io_reg,
  input  logic [7:0] io_wdata,
  output logic [7:0] io_rdata,
  // master DMA read port
  input  logic       dma_rd,
  output logic       dma_ack,
  output logic [7:0] dma_rdata,
  // ADCCP chips, receive side
  input  logic       cw_rx_stb,
  input  logic [7:0] cw_rx_data,
  input  logic       cw_rx_eop,
  input  logic       cw_rx_crc_ok,
  input  logic       ccw_rx_stb,
  input  logic [7:0] ccw_rx_data,
  input  logic       ccw_rx_eop,
  input  logic       ccw_rx_crc_ok,
  // ADCCP chips, transmit side and mode
  output logic       tx_stb,
  output logic [7:0] tx_data,
  output logic       rx_mode,
  output logic       tx_mode,
  output logic       tx_eom,
  // packet ready for the 8x305 (status bit, also for observation)
  output logic       pkt_ready
);
  localparam int IW = $clog2(PKT_BYTES);

  // ---------------- receive gating and overrun ----------------
  logic       fill_busy;
  logic [1:0] in_drop;
  logic       overrun_pend;
  logic [1:0] stb, eop;
  logic [1:0] crc_ok;
  logic [1:0] accept;

  assign stb    = {ccw_rx_stb, cw_rx_stb} & {2{rx_mode}};
  assign eop    = {ccw_rx_eop, cw_rx_eop} & {2{rx_mode}};
  assign crc_ok = {ccw_rx_crc_ok, cw_rx_crc_ok};

  for (genvar i = 0; i < 2; i++) begin : g_acc
    assign accept[i] = !fill_busy && !in_drop[i];
  end

  logic pkt_done;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      in_drop      <= '0;
      overrun_pend <= 1'b0;
    end else begin
      for (int i = 0; i < 2; i++) begin
        if (stb[i] && fill_busy) begin
          in_drop[i]   <= 1'b1;
          overrun_pend <= 1'b1;
        end
        if (eop[i] && (in_drop[i] || fill_busy)) in_drop[i] <= 1'b0;
      end
      if (pkt_done) overrun_pend <= 1'b0;
    end
  end

  // ---------------- FIFOs ----------------
  logic       cw_empty, ccw_empty, cw_full, ccw_full;
  logic [7:0] cw_head, ccw_head;
  logic       cw_pop, ccw_pop;

  byte_fifo #(.DEPTH(FIFO_DEPTH), .W(8)) u_fifo_cw (
    .clk, .rst_n, .flush(!rx_mode),
    .wr_en(stb[0] && accept[0]), .wr_data(cw_rx_data),
    .rd_en(cw_pop), .rd_data(cw_head), .empty(cw_empty), .full(cw_full));

  byte_fifo #(.DEPTH(FIFO_DEPTH), .W(8)) u_fifo_ccw (
    .clk, .rst_n, .flush(!rx_mode),
    .wr_en(stb[1] && accept[1]), .wr_data(ccw_rx_data),
    .rd_en(ccw_pop), .rd_data(ccw_head), .empty(ccw_empty), .full(ccw_full));

  // ---------------- timers ----------------
  logic [1:0] started, done, loop_err, byte_err;
  logic       pkt_active;

  rx_timers #(.CLK_HZ(CLK_HZ), .LOOP_TIMEOUT_US(LOOP_TIMEOUT_US),
              .BYTE_TIMEOUT_US(BYTE_TIMEOUT_US)) u_timers (
    .clk, .rst_n, .enable(rx_mode),
    .byte_stb(stb & accept), .eop(eop & accept),
    .pkt_clear(pkt_done),
    .started, .done, .loop_err, .byte_err, .pkt_active);

  // ---------------- compare ----------------
  logic       wr_cw, wr_ccw, drained, mismatch;
  logic [7:0] wd_cw, wd_ccw;

  rx_compare u_cmp (
    .clk, .rst_n, .clear(pkt_done),
    .cw_empty, .ccw_empty, .cw_data(cw_head), .ccw_data(ccw_head),
    .cw_done(done[0]), .ccw_done(done[1]),
    .cw_lost(loop_err[0] || byte_err[0]), .ccw_lost(loop_err[1] || byte_err[1]),
    .hold(fill_busy),
    .cw_pop, .ccw_pop, .wr_cw, .wr_ccw,
    .wr_data_cw(wd_cw), .wr_data_ccw(wd_ccw),
    .drained, .mismatch);

  // ---------------- CRC status of the current packet ----------------
  logic [1:0] crc_err;
  always_ff @(posedge clk) begin
    if (!rst_n || pkt_done) crc_err <= '0;
    else
      for (int i = 0; i < 2; i++)
        if (eop[i] && accept[i] && !done[i] && !crc_ok[i]) crc_err[i] <= 1'b1;
  end

  // packet closed when both copies ended and everything is stored
  assign pkt_done = rx_mode && (&done) && drained && !fill_busy;

  rx_err_t err_word;
  always_comb begin
    err_word          = '0;
    err_word.mismatch = mismatch;
    err_word.loop_cw  = loop_err[0];
    err_word.loop_ccw = loop_err[1];
    err_word.byte_cw  = byte_err[0];
    err_word.byte_ccw = byte_err[1];
    err_word.crc_cw   = crc_err[0];
    err_word.crc_ccw  = crc_err[1];
    err_word.overrun  = overrun_pend;
  end

  // ---------------- ping-pong buffer and register interface ----------------
  logic [9:0]  ptr;        // byte index, register view (1K bytes)
  logic        ptr_ccw;    // copy select
  logic [IW:0] len_cw, len_ccw;
  logic [10:0] len_cw_x, len_ccw_x;
  rx_err_t     err_out;
  logic [7:0]  buf_rdata;
  logic        release_pair;

  wire cpu_data_rd = io_rd && (io_reg == IO_DATA);
  assign dma_ack   = dma_rd && !cpu_data_rd;
  wire buf_rd      = cpu_data_rd || dma_ack;

  pingpong_buffer #(.PKT_BYTES(PKT_BYTES)) u_buf (
    .clk, .rst_n,
    .wr_cw, .wr_ccw, .wr_data_cw(wd_cw), .wr_data_ccw(wd_ccw),
    .complete(pkt_done), .err_in(err_word), .fill_busy,
    .rd_en(buf_rd), .rd_addr({ptr_ccw, ptr[IW-1:0]}), .rd_data(buf_rdata),
    .ready(pkt_ready), .release_pair,
    .len_cw, .len_ccw, .err_out);

  assign len_cw_x  = 11'(len_cw);
  assign len_ccw_x = 11'(len_ccw);
  assign release_pair = io_wr && (io_reg == IO_CTRL) && io_wdata[2];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ptr     <= '0;
      ptr_ccw <= 1'b0;
      rx_mode <= 1'b0;
      tx_mode <= 1'b0;
    end else begin
      if (io_wr) begin
        unique case (io_reg)
          IO_CTRL:  begin rx_mode <= io_wdata[0]; tx_mode <= io_wdata[1]; end
          IO_PTR_L: ptr[7:0] <= io_wdata;
          IO_PTR_H: begin ptr_ccw <= io_wdata[2]; ptr[9:8] <= io_wdata[1:0]; end
          default: ;
        endcase
      end
      if (buf_rd) ptr <= ptr + 1'b1;
    end
  end

  // ---------------- response timer ----------------
  // Armed by the 8x305 (IO_CTRL bit 3) after it has sent a packet that
  // expects an answer; stopped by the first byte of a received packet on
  // either loop. If it runs out first, resp_timeout is set (no response:
  // the addressed node is down, cut off or does not exist).
  localparam int RESP_CYC = (CLK_HZ / 1_000_000) * RESP_TIMEOUT_US;
  localparam int RW = $clog2(RESP_CYC + 1);
  logic [RW-1:0] resp_cnt;
  logic          resp_run, resp_timeout;
  wire resp_arm = io_wr && (io_reg == IO_CTRL) && io_wdata[3];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      resp_cnt     <= '0;
      resp_run     <= 1'b0;
      resp_timeout <= 1'b0;
    end else if (resp_arm) begin
      resp_cnt     <= '0;
      resp_run     <= 1'b1;
      resp_timeout <= 1'b0;
    end else if (resp_run) begin
      if (|started) begin
        resp_run <= 1'b0;
      end else if (resp_cnt == RW'(RESP_CYC - 1)) begin
        resp_run     <= 1'b0;
        resp_timeout <= 1'b1;
      end else begin
        resp_cnt <= resp_cnt + 1'b1;
      end
    end
  end

  assign tx_stb  = io_wr && (io_reg == IO_TXDATA);
  assign tx_eom  = io_wr && (io_reg == IO_CTRL) && io_wdata[4];
  assign tx_data = io_wdata;

  // registered read data; IO_DATA takes the buffer's registered output
  logic [7:0] reg_q;
  logic       data_sel_q;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      reg_q      <= '0;
      data_sel_q <= 1'b0;
    end else begin
      data_sel_q <= cpu_data_rd;
      if (io_rd) begin
        unique case (io_reg)
          IO_STATUS:  reg_q <= {1'b0, resp_run, resp_timeout, started, pkt_active, fill_busy, pkt_ready};
          IO_ERR:     reg_q <= err_out;
          IO_LENCW_L: reg_q <= len_cw_x[7:0];
          IO_LENCW_H: reg_q <= {5'b0, len_cw_x[10:8]};
          IO_LENCC_L: reg_q <= len_ccw_x[7:0];
          IO_LENCC_H: reg_q <= {5'b0, len_ccw_x[10:8]};
          default:    reg_q <= '0;
        endcase
      end
    end
  end

  assign io_rdata  = data_sel_q ? buf_rdata : reg_q;
  assign dma_rdata = buf_rdata;

  // a FIFO must never overflow: the loop timer bounds the skew
  ap_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    !(stb[0] && accept[0] && cw_full && !cw_pop) && !(stb[1] && accept[1] && ccw_full && !ccw_pop));

endmodule
