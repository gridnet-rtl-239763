// fe_board: the FE processor board around the local 8-bit bus.
//
// The board carries the slave port through which the SBC loads the microcode
// (slave_dma), the 2K x 48 microcode RAM (ucode_ram), the address generator
// (adr_gen), the 4K x 8 local data RAM (data_ram) and the bus master DMA
// engine (master_dma); the I/O board hangs off a cable (io_*). The 8x305
// itself is outside: it presents its instruction address on pc and gets the
// 16-bit instruction back on instr, and it drives / reads the local bus with
// lb_wdata / lb_rdata. The 32-bit control field of the same microcode word
// steers everything else on the board in that instruction cycle. This
// arrangement follows the report's block diagram; the field layout
// (gridnet_pkg::uctrl_t) and the bus read multiplexing are this design's.
//
// The FE cannot be interrupted, but it can interrupt the SBC (sbc_irq), as
// the report describes for finished fetches, transmissions and received
// packets; the register that raises it is this design's choice.
//
// Timing: pc is sampled on a clock edge; instr and the control field act
// during the next clock. Data the control field reads (data RAM, an I/O
// register or the DMA status) is on lb_rdata one clock after that. Control
// strobes act only while the FE runs (run high, after the SBC's start).
// The DMA uses the data RAM only in clocks where the micro-instruction does
// not.
module fe_board
  import gridnet_pkg::*;
#(
  parameter int BUS_AW = 20
) (
  input  logic              clk,
  input  logic              rst_n,
  // IEEE-796 slave (download)
  input  logic              slv_sel,
  input  logic              slv_wr,
  input  logic [13:0]       slv_addr,
  input  logic [15:0]       slv_wdata,
  // 8x305
  input  logic [10:0]       pc,
  output logic [15:0]       instr,
  output logic              run,
  output logic              start,
  input  logic [7:0]        lb_wdata,
  output logic [7:0]        lb_rdata,
  // cable to the I/O board
  output logic              io_rd,
  output logic              io_wr,
  output logic [3:0]        io_reg,
  output logic [7:0]        io_wdata,
  input  logic [7:0]        io_rdata,
  output logic              dma_io_rd,
  input  logic              dma_io_ack,
  input  logic [7:0]        dma_io_rdata,
  // IEEE-796 master (DMA)
  output logic              breq,
  input  logic              grant,
  output logic [BUS_AW-1:0] bus_addr,
  output logic              bus_rd,
  output logic              bus_wr,
  output logic [7:0]        bus_wdata,
  input  logic [7:0]        bus_rdata,
  input  logic              bus_xack,
  output logic              dma_busy,
  output logic              dma_done,
  // interrupt to the SBC
  output logic              sbc_irq
);
  // ---------------- download and microcode store ----------------
  logic        u_we;
  logic [10:0] u_waddr;
  logic [47:0] u_wdata;
  logic [31:0] ctrl_raw;
  logic        run_q;     // a word fetched while running is valid
  logic        irq_ack;

  slave_dma u_slave (
    .clk, .rst_n, .sel(slv_sel), .wr(slv_wr), .addr(slv_addr), .wdata(slv_wdata),
    .ram_we(u_we), .ram_waddr(u_waddr), .ram_wdata(u_wdata), .run, .start, .irq_ack);

  ucode_ram #(.DEPTH(2048), .W(48)) u_ucode (
    .clk, .lock(run), .we(u_we), .waddr(u_waddr), .wdata(u_wdata),
    .raddr(pc), .inst(instr), .ctrl(ctrl_raw));

  always_ff @(posedge clk) begin
    if (!rst_n) run_q <= 1'b0;
    else        run_q <= run;
  end

  uctrl_t uc;
  assign uc = (run && run_q) ? uctrl_t'(ctrl_raw) : '0;

  // ---------------- address generation and data RAM ----------------
  logic [11:0] cpu_addr;
  adr_gen #(.NBASE(8), .AW(12)) u_adr (
    .clk, .rst_n,
    .base_wr(uc.base_wr), .base_hi(uc.base_hi), .base_wsel(uc.base_sel), .wdata(lb_wdata),
    .base_sel(uc.base_sel), .use_cnt(uc.use_cnt), .offset(uc.offset),
    .cnt_rst(uc.cnt_rst), .cnt_inc(uc.cnt_inc), .addr(cpu_addr));

  logic        dma_ram_req, dma_ram_we;
  logic [11:0] dma_ram_addr;
  logic [7:0]  dma_ram_wdata, ram_rdata;
  wire cpu_ram = uc.ram_rd || uc.ram_wr;
  wire dma_gnt = dma_ram_req && !cpu_ram;

  data_ram #(.DEPTH(4096), .W(8)) u_dram (
    .clk,
    .we   (cpu_ram ? uc.ram_wr : (dma_gnt && dma_ram_we)),
    .re   (cpu_ram ? uc.ram_rd : (dma_gnt && !dma_ram_we)),
    .addr (cpu_ram ? cpu_addr : dma_ram_addr),
    .wdata(cpu_ram ? lb_wdata : dma_ram_wdata),
    .rdata(ram_rdata));

  // ---------------- master DMA ----------------
  logic [7:0] dma_cfg_rdata;
  master_dma #(.BUS_AW(BUS_AW)) u_dma (
    .clk, .rst_n,
    .cfg_wr(uc.io_wr && uc.io_dev == DEV_DMA), .cfg_rd(uc.io_rd && uc.io_dev == DEV_DMA),
    .cfg_reg(uc.io_reg), .cfg_wdata(lb_wdata), .cfg_rdata(dma_cfg_rdata),
    .busy(dma_busy), .done(dma_done),
    .breq, .grant, .bus_addr, .bus_rd, .bus_wr, .bus_wdata, .bus_rdata, .bus_xack,
    .ram_req(dma_ram_req), .ram_we(dma_ram_we), .ram_addr(dma_ram_addr),
    .ram_wdata(dma_ram_wdata), .ram_gnt(dma_gnt), .ram_rdata,
    .io_rd(dma_io_rd), .io_ack(dma_io_ack), .io_rdata(dma_io_rdata));

  // ---------------- interrupt to the SBC ----------------
  // The FE has no interrupt input of its own, but it alerts the SBC: a
  // micro-instruction writing register SBC_IRQ of the DMA device sets the
  // request; the SBC clears it through the slave port's control register.
  always_ff @(posedge clk) begin
    if (!rst_n)                                                   sbc_irq <= 1'b0;
    else if (uc.io_wr && uc.io_dev == DEV_DMA && uc.io_reg == SBC_IRQ) sbc_irq <= 1'b1;
    else if (irq_ack)                                             sbc_irq <= 1'b0;
  end

  // ---------------- I/O board strobes ----------------
  assign io_rd    = uc.io_rd && uc.io_dev == DEV_IO;
  assign io_wr    = uc.io_wr && uc.io_dev == DEV_IO;
  assign io_reg   = uc.io_reg;
  assign io_wdata = lb_wdata;

  // ---------------- local bus read multiplexing ----------------
  typedef enum logic [1:0] { RD_NONE, RD_RAM, RD_IO, RD_DMA } rd_src_e;
  rd_src_e rd_src_q;
  always_ff @(posedge clk) begin
    if (!rst_n)                                rd_src_q <= RD_NONE;
    else if (uc.ram_rd)                        rd_src_q <= RD_RAM;
    else if (uc.io_rd && uc.io_dev == DEV_IO)  rd_src_q <= RD_IO;
    else if (uc.io_rd && uc.io_dev == DEV_DMA) rd_src_q <= RD_DMA;
    else                                       rd_src_q <= RD_NONE;
  end

  always_comb begin
    unique case (rd_src_q)
      RD_RAM:  lb_rdata = ram_rdata;
      RD_IO:   lb_rdata = io_rdata;
      RD_DMA:  lb_rdata = dma_cfg_rdata;
      default: lb_rdata = '0;
    endcase
  end

endmodule
