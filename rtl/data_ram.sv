// data_ram: the FE's local 4K x 8 data RAM.
//
// Holds the 8x305's variables and three packets (two outgoing, one incoming
// overflow packet), as in the report. Single port: a write stores wdata at
// addr on the clock edge; a read (re) returns the byte at addr on rdata from
// the next clock on. The synchronous single-port form is this design's choice.
module data_ram #(
  parameter int DEPTH = 4096,
  parameter int W     = 8
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic                     re,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic [W-1:0]             wdata,
  output logic [W-1:0]             rdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    if (re) rdata <= mem[addr];
  end

endmodule
