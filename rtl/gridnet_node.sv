// gridnet_node: custom hardware of one GRIDNET node, with its time reference.
//
// A GRIDNET node sits on a CROSSFIRE dual fiber loop. Every packet is sent
// on both loops at once, in opposite directions, and the receiver compares
// the two copies bit by bit; a single cut anywhere in the loop still leaves
// one copy. The node's front end (FE) does the time-critical link work: the
// processor board (fe_board: microcode store, address generator, data RAM,
// bus master DMA) and the I/O board (fe_io: FIFOs, compare, timers, ping-pong
// receive buffer) are joined by a cable, as in the report. The FE shares an
// IEEE-796 backplane with the node's 68000 single board computer, whose
// dual-ported memory the FE reaches by DMA; bus_priority resolves the
// backplane's daisy chain (slot 0 FE processor board, slot 1 SBC, slot 2 FE
// I/O board). The node's Time Code Board (time_code) timestamps events; it is
// driven here by the host's Master Clock Board (master_clock), which in the
// prototype serves all nodes. Two bypass_gate instances decide whether the
// CW and CCW optical by-pass switches keep the node in the loops.
//
// Outside parts, whose signals are ports: the 8x305 microcontroller (pc,
// instr, lb_*), the SBC and its memory (slv_* download writes, mbus_* master
// bus cycles, sbc_breq / sbc_grant, the FE's interrupt sbc_irq, tc_*
// timestamp reads), the two ADCCP link
// chips (cw_* / ccw_*, tx_*), the I/O board's own bus request (iob_breq), the
// host's commands to the Master Clock (mc_*), and the by-pass switch drive.
// One clock (CLK_HZ, 12 MHz by default) runs everything; that is this
// design's choice.
module gridnet_node
  import gridnet_pkg::*;
#(
  parameter int CLK_HZ = 12_000_000
) (
  input  logic        clk,
  input  logic        rst_n,
  // SBC -> FE slave writes (microcode download, run control)
  input  logic        slv_sel,
  input  logic        slv_wr,
  input  logic [13:0] slv_addr,
  input  logic [15:0] slv_wdata,
  // 8x305
  input  logic [10:0] pc,
  output logic [15:0] instr,
  output logic        fe_run,
  output logic        fe_start,
  input  logic [7:0]  lb_wdata,
  output logic [7:0]  lb_rdata,
  // IEEE-796 master cycles of the FE to SBC memory
  output logic [19:0] mbus_addr,
  output logic        mbus_rd,
  output logic        mbus_wr,
  output logic [7:0]  mbus_wdata,
  input  logic [7:0]  mbus_rdata,
  input  logic        mbus_xack,
  output logic        dma_busy,
  output logic        dma_done,
  output logic        sbc_irq,      // FE alerts the SBC (cleared by a slave write)
  // other masters on the backplane
  input  logic        sbc_breq,
  output logic        sbc_grant,
  input  logic        iob_breq,
  output logic        iob_grant,
  output logic [2:0]  bus_bpro,
  // ADCCP chips
  input  logic        cw_rx_stb,
  input  logic [7:0]  cw_rx_data,
  input  logic        cw_rx_eop,
  input  logic        cw_rx_crc_ok,
  input  logic        ccw_rx_stb,
  input  logic [7:0]  ccw_rx_data,
  input  logic        ccw_rx_eop,
  input  logic        ccw_rx_crc_ok,
  output logic        tx_stb,
  output logic [7:0]  tx_data,
  output logic        rx_mode,
  output logic        tx_mode,
  output logic        tx_eom,
  output logic        pkt_ready,
  // Master Clock commands from the host, and its lines (for other nodes)
  input  logic        mc_start,
  input  logic        mc_stop,
  output logic        mc_clock_line,
  output logic        mc_clear_line,
  output logic        mc_clock_env,
  output logic        mc_clear_env,
  output logic        mc_running,
  // Time Code Board bus reads
  input  logic        tc_rd,
  input  logic        tc_rd_hi,
  output logic [15:0] tc_rdata,
  output logic        tc_missing_irq,
  output logic [31:0] tc_count,
  input  logic        tc_irq_ack,
  // by-pass switch gates
  input  logic        power_good,
  input  logic [3:0]  bypass_fail,
  input  logic [3:0]  bypass_fail_en,
  output logic        bypass_cw_actuate,
  output logic        bypass_ccw_actuate
);
  // ---------------- backplane priority chain ----------------
  logic       fe_breq;
  logic [2:0] grant;

  bus_priority #(.N(3)) u_prio (
    .clk, .rst_n, .breq({iob_breq, sbc_breq, fe_breq}), .grant, .bpro(bus_bpro));

  assign sbc_grant = grant[1];
  assign iob_grant = grant[2];

  // ---------------- FE processor board ----------------
  logic       io_rd, io_wr, dma_io_rd, dma_io_ack;
  logic [3:0] io_reg;
  logic [7:0] io_wdata, io_rdata, dma_io_rdata;

  fe_board #(.BUS_AW(20)) u_board (
    .clk, .rst_n,
    .slv_sel, .slv_wr, .slv_addr, .slv_wdata,
    .pc, .instr, .run(fe_run), .start(fe_start), .lb_wdata, .lb_rdata,
    .io_rd, .io_wr, .io_reg, .io_wdata, .io_rdata,
    .dma_io_rd, .dma_io_ack, .dma_io_rdata,
    .breq(fe_breq), .grant(grant[0]),
    .bus_addr(mbus_addr), .bus_rd(mbus_rd), .bus_wr(mbus_wr),
    .bus_wdata(mbus_wdata), .bus_rdata(mbus_rdata), .bus_xack(mbus_xack),
    .dma_busy, .dma_done, .sbc_irq);

  // ---------------- FE I/O board ----------------
  fe_io #(.CLK_HZ(CLK_HZ)) u_io (
    .clk, .rst_n,
    .io_rd, .io_wr, .io_reg, .io_wdata, .io_rdata,
    .dma_rd(dma_io_rd), .dma_ack(dma_io_ack), .dma_rdata(dma_io_rdata),
    .cw_rx_stb, .cw_rx_data, .cw_rx_eop, .cw_rx_crc_ok,
    .ccw_rx_stb, .ccw_rx_data, .ccw_rx_eop, .ccw_rx_crc_ok,
    .tx_stb, .tx_data, .rx_mode, .tx_mode, .tx_eom, .pkt_ready);

  // ---------------- time distribution ----------------
  master_clock #(.CLK_HZ(CLK_HZ)) u_mclk (
    .clk, .rst_n, .cmd_start(mc_start), .cmd_stop(mc_stop),
    .clock_line(mc_clock_line), .clear_line(mc_clear_line),
    .clock_env(mc_clock_env), .clear_env(mc_clear_env), .running(mc_running));

  time_code #(.CLK_HZ(CLK_HZ)) u_tc (
    .clk, .rst_n, .clock_line(mc_clock_line), .clear_line(mc_clear_line),
    .rd(tc_rd), .rd_hi(tc_rd_hi), .rdata(tc_rdata),
    .missing_irq(tc_missing_irq), .irq_ack(tc_irq_ack), .count(tc_count));

  // ---------------- by-pass switch gates ----------------
  bypass_gate #(.NCOND(4)) u_byp_cw (
    .power_good, .fail(bypass_fail), .fail_en(bypass_fail_en), .actuate(bypass_cw_actuate));
  bypass_gate #(.NCOND(4)) u_byp_ccw (
    .power_good, .fail(bypass_fail), .fail_en(bypass_fail_en), .actuate(bypass_ccw_actuate));

endmodule
