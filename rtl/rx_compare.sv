// rx_compare: bitwise comparison of the CW and CCW copies of a packet.
//
// When the corresponding byte of each copy is at the head of its FIFO, both
// are popped in the same clock, compared, and written to the receive buffer
// (CW byte to the CW buffer, CCW byte to the CCW buffer). Any difference sets
// an accumulative mismatch latch that holds until clear. This follows the
// report. This design adds the single-copy case: when one copy has ended
// (its done input is high and its FIFO is empty) the other copy is still
// drained and stored alone, so a loop cut in one place still delivers one
// copy. If the ended copy was not lost (lost_* low) the two copies differ in
// length, which also sets the mismatch latch.
//
// Timing: one byte pair (or single byte) per clock; pops and buffer writes
// are combinational from the FIFO status, the latch updates on the clock.
module rx_compare (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear,
  input  logic       cw_empty,
  input  logic       ccw_empty,
  input  logic [7:0] cw_data,
  input  logic [7:0] ccw_data,
  input  logic       cw_done,     // CW copy ended
  input  logic       ccw_done,    // CCW copy ended
  input  logic       cw_lost,     // CW copy ended by a loop or byte error
  input  logic       ccw_lost,
  input  logic       hold,        // buffer cannot accept bytes
  output logic       cw_pop,
  output logic       ccw_pop,
  output logic       wr_cw,
  output logic       wr_ccw,
  output logic [7:0] wr_data_cw,
  output logic [7:0] wr_data_ccw,
  output logic       drained,     // both copies ended and both FIFOs empty
  output logic       mismatch
);
  wire cw_gone  = cw_done  && cw_empty;
  wire ccw_gone = ccw_done && ccw_empty;

  always_comb begin
    cw_pop  = 1'b0;
    ccw_pop = 1'b0;
    if (!hold) begin
      if (!cw_empty && !ccw_empty) begin
        cw_pop  = 1'b1;
        ccw_pop = 1'b1;
      end else if (!cw_empty && ccw_gone) begin
        cw_pop  = 1'b1;
      end else if (!ccw_empty && cw_gone) begin
        ccw_pop = 1'b1;
      end
    end
  end

  assign wr_cw       = cw_pop;
  assign wr_ccw      = ccw_pop;
  assign wr_data_cw  = cw_data;
  assign wr_data_ccw = ccw_data;
  assign drained     = cw_gone && ccw_gone;

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      mismatch <= 1'b0;
    end else begin
      if (cw_pop && ccw_pop && (cw_data != ccw_data)) mismatch <= 1'b1;
      if (cw_pop && !ccw_pop && !ccw_lost)            mismatch <= 1'b1;
      if (ccw_pop && !cw_pop && !cw_lost)             mismatch <= 1'b1;
    end
  end

endmodule
