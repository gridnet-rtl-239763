// sbc_mem_model: behavioural model of the SBC's dual-ported memory as seen
// from the IEEE-796 bus (not synthesizable, testbench use only).
// A byte read (rd) or write (wr) is acknowledged with a one-clock xack LAT
// clocks after the command appears; read data is valid with xack. The
// memory is 128K bytes; higher address bits are ignored.
module sbc_mem_model #(
  parameter int LAT = 3
) (
  input  logic        clk,
  input  logic [19:0] addr,
  input  logic        rd,
  input  logic        wr,
  input  logic [7:0]  wdata,
  output logic [7:0]  rdata,
  output logic        xack
);
  logic [7:0] mem [131072];
  int wait_cnt = 0;

  initial xack = 0;
  initial rdata = 0;

  always @(posedge clk) begin
    xack <= 1'b0;
    if ((rd || wr) && !xack) begin
      if (wait_cnt == LAT - 1) begin
        wait_cnt <= 0;
        xack     <= 1'b1;
        if (wr) mem[addr[16:0]] <= wdata;
        else    rdata <= mem[addr[16:0]];
      end else begin
        wait_cnt <= wait_cnt + 1;
      end
    end else begin
      wait_cnt <= 0;
    end
  end
endmodule
