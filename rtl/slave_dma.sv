// slave_dma: IEEE-796 slave port of the FE, used only to download microcode.
//
// The SBC writes the FE program as 16-bit bus writes. A 48-bit microcode
// word is sent as three writes to consecutive 16-bit parts (part 0 = bits
// [15:0], 1 = [31:16], 2 = [47:32]); the write of part 2 stores the whole
// word into the instruction RAM. After download the SBC writes the control
// register with bit 0 set: the FE leaves its wait state and the 8x305 starts
// at location zero (start pulse). Writing bit 0 clear puts the FE back into
// the wait state, for example to load new code. While the FE runs, microcode
// writes are ignored. The download-then-start sequence follows the report;
// the address map is this design's choice:
//   addr[13] = 0 : microcode, word = addr[12:2], part = addr[1:0] (0..2)
//   addr[13] = 1 : control register, bit 0 = run, bit 1 = acknowledge the
//                  FE's interrupt (write the run bit unchanged with it)
//
// Timing: one write per clock when sel && wr; no wait states. start and
// irq_ack are one-clock pulses in the clock after the control write.
module slave_dma (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        sel,
  input  logic        wr,
  input  logic [13:0] addr,
  input  logic [15:0] wdata,
  output logic        ram_we,
  output logic [10:0] ram_waddr,
  output logic [47:0] ram_wdata,
  output logic        run,
  output logic        start,
  output logic        irq_ack
);
  logic [31:0] part_q;     // parts 0 and 1 of the word being loaded

  wire wr_ucode = sel && wr && !addr[13] && !run;
  wire wr_ctrl  = sel && wr &&  addr[13];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      part_q    <= '0;
      ram_we    <= 1'b0;
      ram_waddr <= '0;
      ram_wdata <= '0;
      run       <= 1'b0;
      start     <= 1'b0;
      irq_ack   <= 1'b0;
    end else begin
      ram_we  <= 1'b0;
      start   <= 1'b0;
      irq_ack <= 1'b0;
      if (wr_ucode) begin
        unique case (addr[1:0])
          2'd0: part_q[15:0]  <= wdata;
          2'd1: part_q[31:16] <= wdata;
          2'd2: begin
            ram_we    <= 1'b1;
            ram_waddr <= addr[12:2];
            ram_wdata <= {wdata, part_q};
          end
          default: ;
        endcase
      end
      if (wr_ctrl) begin
        run <= wdata[0];
        if (wdata[0] && !run) start <= 1'b1;
        irq_ack <= wdata[1];
      end
    end
  end

endmodule
