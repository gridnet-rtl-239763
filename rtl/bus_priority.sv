// bus_priority: daisy-chain (serial) priority resolution on the IEEE-796 bus.
//
// The masters of one backplane are chained by slot. A slot passes priority to
// the next slot up (bpro) only when it is itself not requesting, so the
// bottom slot [0] has the highest priority, as in the report's node: FE
// processor board first, then the SBC, then the FE I/O board. When the bus is
// free, the requesting slot that holds priority takes it; the owner keeps the
// bus until it drops its request (no pre-emption, this design's choice,
// matching a master holding the bus busy for its transfer).
//
// Timing: grant is registered; it rises the clock after the request is seen
// on a free bus and falls the clock after the owner's request drops.
module bus_priority #(
  parameter int N = 3
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] breq,
  output logic [N-1:0] grant,
  output logic [N-1:0] bpro
);
  logic [N-1:0] bprn;   // priority in of each slot

  assign bprn[0] = 1'b1;
  for (genvar i = 0; i < N; i++) begin : g_chain
    assign bpro[i] = bprn[i] && !breq[i];
    if (i + 1 < N) begin : g_link
      assign bprn[i+1] = bpro[i];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      grant <= '0;
    end else if ((grant & breq) == '0) begin
      grant <= breq & bprn;     // at most one slot both requests and has priority
    end
  end

  ap_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant));

endmodule
