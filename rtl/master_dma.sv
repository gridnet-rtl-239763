// master_dma: the FE's IEEE-796 bus master, a block DMA engine.
//
// The FE moves every packet and status message between itself and the SBC's
// dual-ported memory by DMA, without the 68000's help. The 8x305 loads a bus
// address, a local address and a byte count, then starts the engine with the
// direction:
//   fetch (GO bit 0 = 1): SBC memory -> local data RAM (packet to transmit)
//   store (GO bit 0 = 0): local data RAM, or the I/O board's receive buffer
//                         when GO bit 1 = 1, -> SBC memory (received packet)
// The engine requests the bus from the daisy chain, holds it for the whole
// block and moves one byte per bus cycle: it raises bus_rd or bus_wr and
// waits for bus_xack. On the local side it shares the data RAM with the
// 8x305, which always wins (ram_gnt low means retry), and reads the receive
// buffer through the I/O board's DMA port (io_rd / io_ack, data the clock
// after io_ack). The block transfer and its register map are this design's
// choice; the report only states that the FE reaches the SBC's memory by DMA.
//
// Registers (cfg_wr / cfg_rd with cfg_reg, see gridnet_pkg DMA_*): a status
// read returns {busy, done} in the clock after cfg_rd and clears done.
module master_dma
  import gridnet_pkg::*;
#(
  parameter int BUS_AW = 20
) (
  input  logic              clk,
  input  logic              rst_n,
  // 8x305 side
  input  logic              cfg_wr,
  input  logic              cfg_rd,
  input  logic [3:0]        cfg_reg,
  input  logic [7:0]        cfg_wdata,
  output logic [7:0]        cfg_rdata,
  output logic              busy,
  output logic              done,
  // IEEE-796 master side
  output logic              breq,
  input  logic              grant,
  output logic [BUS_AW-1:0] bus_addr,
  output logic              bus_rd,
  output logic              bus_wr,
  output logic [7:0]        bus_wdata,
  input  logic [7:0]        bus_rdata,
  input  logic              bus_xack,
  // local data RAM
  output logic              ram_req,
  output logic              ram_we,
  output logic [11:0]       ram_addr,
  output logic [7:0]        ram_wdata,
  input  logic              ram_gnt,
  input  logic [7:0]        ram_rdata,
  // I/O board receive buffer
  output logic              io_rd,
  input  logic              io_ack,
  input  logic [7:0]        io_rdata
);
  typedef enum logic [2:0] {
    S_IDLE, S_REQ, S_BUS_RD, S_RAM_WR, S_LOC_RD, S_LOC_WAIT, S_BUS_WR, S_NEXT
  } state_e;

  state_e      state;
  logic [BUS_AW-1:0] ba;
  logic [11:0] la;
  logic [10:0] cnt;
  logic        fetch, src_io;
  logic [7:0]  byte_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      ba     <= '0;
      la     <= '0;
      cnt    <= '0;
      fetch  <= 1'b0;
      src_io <= 1'b0;
      byte_q <= '0;
      done   <= 1'b0;
      cfg_rdata <= '0;
    end else begin
      if (cfg_rd && cfg_reg == DMA_STAT) begin
        cfg_rdata <= {6'b0, done, busy};
        done      <= 1'b0;
      end
      if (cfg_wr && state == S_IDLE) begin
        unique case (cfg_reg)
          DMA_BA0:  ba[7:0]   <= cfg_wdata;
          DMA_BA1:  ba[15:8]  <= cfg_wdata;
          DMA_BA2:  ba[BUS_AW-1:16] <= cfg_wdata[BUS_AW-17:0];
          DMA_LA0:  la[7:0]   <= cfg_wdata;
          DMA_LA1:  la[11:8]  <= cfg_wdata[3:0];
          DMA_CNT0: cnt[7:0]  <= cfg_wdata;
          DMA_CNT1: cnt[10:8] <= cfg_wdata[2:0];
          DMA_GO: begin
            fetch  <= cfg_wdata[0];
            src_io <= cfg_wdata[1];
            state  <= S_REQ;
          end
          default: ;
        endcase
      end
      unique case (state)
        S_IDLE: ;
        S_REQ:
          if (cnt == 0) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else if (grant) begin
            state <= fetch ? S_BUS_RD : S_LOC_RD;
          end
        S_BUS_RD:
          if (bus_xack) begin
            byte_q <= bus_rdata;
            state  <= S_RAM_WR;
          end
        S_RAM_WR:
          if (ram_gnt) state <= S_NEXT;
        S_LOC_RD:
          if (src_io ? io_ack : ram_gnt) state <= S_LOC_WAIT;
        S_LOC_WAIT: begin
          byte_q <= src_io ? io_rdata : ram_rdata;
          state  <= S_BUS_WR;
        end
        S_BUS_WR:
          if (bus_xack) state <= S_NEXT;
        S_NEXT: begin
          ba  <= ba + 1'b1;
          la  <= la + 1'b1;
          cnt <= cnt - 1'b1;
          if (cnt == 11'd1) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            state <= fetch ? S_BUS_RD : S_LOC_RD;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy      = (state != S_IDLE);
  assign breq      = (state != S_IDLE) && !(state == S_REQ && cnt == 0);
  assign bus_addr  = ba;
  assign bus_rd    = (state == S_BUS_RD);
  assign bus_wr    = (state == S_BUS_WR);
  assign bus_wdata = byte_q;
  assign ram_req   = (state == S_RAM_WR) || (state == S_LOC_RD && !src_io);
  assign ram_we    = (state == S_RAM_WR);
  assign ram_addr  = la;
  assign ram_wdata = byte_q;
  assign io_rd     = (state == S_LOC_RD) && src_io;

  ap_cmd_granted: assert property (@(posedge clk) disable iff (!rst_n)
    (bus_rd || bus_wr) |-> grant);

endmodule
