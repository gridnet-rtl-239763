// byte_fifo: resynchronising FIFO for one loop's copy of a received packet.
//
// The FE receives every packet twice, once on the clockwise (CW) loop and
// once on the counter-clockwise (CCW) loop, at different times because the
// two paths have different lengths. Each copy is pushed byte by byte into a
// FIFO of its own, so that the compare stage can take the matching bytes of
// the two copies together once both have arrived (as in the report).
// The depth is this design's choice: it covers the byte skew the loop timer
// allows (see rx_timers).
//
// Interface: wr_en pushes wr_data (ignored when full); rd_en pops. The head
// byte is visible on rd_data while empty is low (first-word fall-through).
// flush empties the FIFO in one clock. All signals are synchronous to clk.
module byte_fifo #(
  parameter int DEPTH = 32,
  parameter int W     = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         flush,
  input  logic         wr_en,
  input  logic [W-1:0] wr_data,
  input  logic         rd_en,
  output logic [W-1:0] rd_data,
  output logic         empty,
  output logic         full
);
  localparam int AW = $clog2(DEPTH);

  logic [W-1:0] mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic [AW:0]   count;

  wire do_wr = wr_en && !full;
  wire do_rd = rd_en && !empty;

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n || flush) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (do_wr) wp <= (wp == AW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      if (do_rd) rp <= (rp == AW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end

  assign rd_data = mem[rp];
  assign empty   = (count == 0);
  assign full    = (count == (AW+1)'(DEPTH));

endmodule
