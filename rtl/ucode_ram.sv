// ucode_ram: the FE's 2K x 48 microcode instruction store.
//
// Each word holds the 16-bit 8x305 instruction (bits [47:32]) and the 32-bit
// control field that drives the rest of the FE (bits [31:0]). The SBC loads
// the store through the slave bus port; once the FE runs (lock high) the store
// is read-only, so the 8x305 can never change its own program. Sizes follow
// the report; the split of the word into fields is this design's choice.
//
// Timing: raddr is sampled on the clock edge and inst/ctrl hold the word from
// the next clock on (synchronous read). Writes (we, waddr, wdata) take effect
// on the clock edge and are refused while lock is high.
module ucode_ram #(
  parameter int DEPTH = 2048,
  parameter int W     = 48
) (
  input  logic                     clk,
  input  logic                     lock,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [W-1:0]             wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [15:0]              inst,
  output logic [W-17:0]            ctrl
);
  logic [W-1:0] mem [DEPTH];
  logic [W-1:0] q;

  always_ff @(posedge clk) begin
    if (we && !lock) mem[waddr] <= wdata;
    q <= mem[raddr];
  end

  assign inst = q[W-1 -: 16];
  assign ctrl = q[W-17:0];

endmodule
