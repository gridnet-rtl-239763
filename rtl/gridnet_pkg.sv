// gridnet_pkg: types and constants shared by the GRIDNET node front end.
//
// The front end (FE) of a node is run by an external 8x305 microcontroller
// from a 2K x 48 microcode RAM. Each 48-bit word holds the 16-bit 8x305
// instruction and a 32-bit control field that steers the FE hardware (the
// address generator, the local data RAM and the I/O board). The sizes of the
// RAMs, the word and the 1K-byte maximum packet follow the report; the bit
// layout of the control field, the receive error word and the register maps
// are this design's own choice, since the report does not give them.
package gridnet_pkg;

  // Microcode store
  localparam int UCODE_DEPTH = 2048;  // 2K words
  localparam int UCODE_AW    = 11;    // "ADR 11"
  localparam int UCODE_W     = 48;
  localparam int INST_W      = 16;    // 8x305 instruction
  localparam int CTRL_W      = 32;    // control field

  // Local data RAM and packets
  localparam int DRAM_DEPTH  = 4096;  // 4K x 8
  localparam int DRAM_AW     = 12;
  localparam int MAX_PKT     = 1024;  // largest data packet in bytes
  localparam int LEN_W       = 11;    // holds 0..1024

  // Loop rate (bits per second) on the fiber
  localparam int LOOP_BPS    = 1_000_000;

  // I/O device addressed by a local bus strobe
  typedef enum logic [0:0] {
    DEV_IO  = 1'b0,   // FE I/O board registers
    DEV_DMA = 1'b1    // master DMA registers on the processor board
  } io_dev_e;

  // Control field of a micro-instruction (bits [31:0] of the word).
  // 25 bits are assigned; 7 are spare.
  typedef struct packed {
    logic [6:0] spare;
    io_dev_e    io_dev;    // which device io_rd / io_wr address
    logic [3:0] io_reg;    // register number on that device
    logic       io_wr;     // 8x305 writes lb_wdata to the device
    logic       io_rd;     // device register drives lb_rdata
    logic       base_hi;   // base register write: 1 = high nibble
    logic       base_wr;   // write lb_wdata into base register base_sel
    logic       ram_wr;    // write lb_wdata to the data RAM
    logic       ram_rd;    // read the data RAM onto lb_rdata
    logic [7:0] offset;    // constant added to the base register
    logic       cnt_inc;   // post-increment the address counter
    logic       cnt_rst;   // counter reads as 0 and is cleared
    logic       use_cnt;   // add the counter instead of the constant
    logic [2:0] base_sel;  // base register
  } uctrl_t;

  // Receiver error word, one per received packet
  typedef struct packed {
    logic overrun;     // packet arrived while both buffer pairs were full
    logic crc_ccw;     // ADCCP reported a CRC error on the CCW copy
    logic crc_cw;      // ADCCP reported a CRC error on the CW copy
    logic byte_ccw;    // byte dropout on the CCW copy
    logic byte_cw;     // byte dropout on the CW copy
    logic loop_ccw;    // CCW copy never arrived (loop error)
    logic loop_cw;     // CW copy never arrived (loop error)
    logic mismatch;    // the two copies differ
  } rx_err_t;

  // FE I/O board registers (io_reg when io_dev = DEV_IO)
  localparam logic [3:0] IO_TXDATA  = 4'd0;  // W: byte to both ADCCP chips
  localparam logic [3:0] IO_STATUS  = 4'd1;  // R: {1'b0, resp_run, resp_timeout, started[1:0], pkt_active, fill_busy, ready}
  localparam logic [3:0] IO_ERR     = 4'd2;  // R: error word of the read pair
  localparam logic [3:0] IO_CTRL    = 4'd3;  // W: b0 rx_mode b1 tx_mode b2 release b3 arm response timer b4 end of message
  localparam logic [3:0] IO_LENCW_L = 4'd4;  // R: CW length [7:0]
  localparam logic [3:0] IO_LENCW_H = 4'd5;  // R: CW length [10:8]
  localparam logic [3:0] IO_LENCC_L = 4'd6;  // R: CCW length [7:0]
  localparam logic [3:0] IO_LENCC_H = 4'd7;  // R: CCW length [10:8]
  localparam logic [3:0] IO_PTR_L   = 4'd8;  // W: buffer pointer [7:0]
  localparam logic [3:0] IO_PTR_H   = 4'd9;  // W: b1:0 pointer [9:8], b2 copy (1 = CCW)
  localparam logic [3:0] IO_DATA    = 4'd10; // R: buffer byte, pointer += 1

  // Master DMA registers (io_reg when io_dev = DEV_DMA)
  localparam logic [3:0] DMA_BA0    = 4'd0;  // W: bus address [7:0]
  localparam logic [3:0] DMA_BA1    = 4'd1;  // W: bus address [15:8]
  localparam logic [3:0] DMA_BA2    = 4'd2;  // W: bus address [19:16]
  localparam logic [3:0] DMA_LA0    = 4'd3;  // W: local address [7:0]
  localparam logic [3:0] DMA_LA1    = 4'd4;  // W: local address [11:8]
  localparam logic [3:0] DMA_CNT0   = 4'd5;  // W: byte count [7:0]
  localparam logic [3:0] DMA_CNT1   = 4'd6;  // W: byte count [10:8]
  localparam logic [3:0] DMA_GO     = 4'd7;  // W: b0 fetch, b1 source = I/O buffer; starts
  localparam logic [3:0] DMA_STAT   = 4'd8;  // R: b0 busy, b1 done (cleared on read)
  localparam logic [3:0] SBC_IRQ    = 4'd9;  // W: raise the interrupt to the SBC (same device)

endpackage
