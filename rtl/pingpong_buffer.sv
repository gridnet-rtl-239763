// pingpong_buffer: the FE's double-buffered receive store.
//
// Four buffers of PKT_BYTES bytes form two pairs; each pair holds both copies
// (CW and CCW) of one received packet, as the report describes. The receive
// side fills one pair while the 8x305 reads the other over the local bus, so
// a second packet can arrive before the first has been processed. Both copies
// are kept because only after both have arrived (and their CRC and the
// comparison are known) can the FE pick a good one.
//
// Operation: wr_cw / wr_ccw append a byte to the copy of the fill pair (bytes
// past PKT_BYTES are dropped). complete closes the fill pair, records the two
// lengths and the error word err_in, marks the pair full and moves filling to
// the other pair. The read pair is the oldest full pair; ready shows that it
// holds a packet, and release frees it and moves reading to the other pair.
// fill_busy is high when the fill pair is still full (both pairs hold
// unread packets); the caller must not write then.
//
// Read port: rd_addr = {copy (1 = CCW), byte index}; rd_data is registered
// (valid the clock after rd_en). The pair hand-over order is this design's
// choice.
module pingpong_buffer #(
  parameter int PKT_BYTES = 1024
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         wr_cw,
  input  logic                         wr_ccw,
  input  logic [7:0]                   wr_data_cw,
  input  logic [7:0]                   wr_data_ccw,
  input  logic                         complete,
  input  gridnet_pkg::rx_err_t         err_in,
  output logic                         fill_busy,
  input  logic                         rd_en,
  input  logic [$clog2(PKT_BYTES):0]   rd_addr,
  output logic [7:0]                   rd_data,
  output logic                         ready,
  input  logic                         release_pair,
  output logic [$clog2(PKT_BYTES):0]   len_cw,
  output logic [$clog2(PKT_BYTES):0]   len_ccw,
  output gridnet_pkg::rx_err_t         err_out
);
  localparam int IW = $clog2(PKT_BYTES);

  logic [7:0] mem_cw  [2*PKT_BYTES];
  logic [7:0] mem_ccw [2*PKT_BYTES];

  logic         fill_sel, read_sel;
  logic [1:0]   full;
  logic [IW:0]  idx_cw, idx_ccw;             // bytes stored in the fill pair
  logic [IW:0]  meta_len_cw  [2];
  logic [IW:0]  meta_len_ccw [2];
  gridnet_pkg::rx_err_t meta_err [2];

  wire room_cw  = idx_cw  < (IW+1)'(PKT_BYTES);
  wire room_ccw = idx_ccw < (IW+1)'(PKT_BYTES);

  always_ff @(posedge clk) begin
    if (wr_cw  && room_cw)  mem_cw [{fill_sel, idx_cw[IW-1:0]}]  <= wr_data_cw;
    if (wr_ccw && room_ccw) mem_ccw[{fill_sel, idx_ccw[IW-1:0]}] <= wr_data_ccw;
    if (rd_en)
      rd_data <= rd_addr[IW] ? mem_ccw[{read_sel, rd_addr[IW-1:0]}]
                             : mem_cw [{read_sel, rd_addr[IW-1:0]}];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      fill_sel <= 1'b0;
      read_sel <= 1'b0;
      full     <= '0;
      idx_cw   <= '0;
      idx_ccw  <= '0;
      meta_len_cw  <= '{default: '0};
      meta_len_ccw <= '{default: '0};
      meta_err     <= '{default: '0};
    end else begin
      if (complete) begin
        meta_len_cw [fill_sel] <= idx_cw;
        meta_len_ccw[fill_sel] <= idx_ccw;
        meta_err    [fill_sel] <= err_in;
        full[fill_sel]         <= 1'b1;
        fill_sel               <= !fill_sel;
        idx_cw                 <= '0;
        idx_ccw                <= '0;
      end else begin
        if (wr_cw  && room_cw)  idx_cw  <= idx_cw  + 1'b1;
        if (wr_ccw && room_ccw) idx_ccw <= idx_ccw + 1'b1;
      end
      if (release_pair && full[read_sel]) begin
        full[read_sel] <= 1'b0;
        read_sel       <= !read_sel;
      end
    end
  end

  assign fill_busy = full[fill_sel];
  assign ready     = full[read_sel];
  assign len_cw    = meta_len_cw [read_sel];
  assign len_ccw   = meta_len_ccw[read_sel];
  assign err_out   = meta_err    [read_sel];

endmodule
