// rx_timers: receive framing and error timers of the FE I/O board.
//
// A packet is in progress from the first byte seen on either loop until both
// copies have ended. A copy ends at the ADCCP end-of-packet strobe, by a byte
// dropout, or by a loop error. Two kinds of timer guard the reception, as the
// report describes:
//  * loop timer: started by the first byte on either loop and set to the
//    longest propagation delay of a loop. If it expires before the other loop
//    has delivered a byte, the other loop is declared broken (loop error) and
//    its copy is treated as ended.
//  * byte timers, one per loop: restarted by every byte of a started copy.
//    If a copy stops delivering bytes before its end of packet, a byte
//    (dropout) error is raised and that copy is ended.
// The timeout values are this design's choice (the report gives none):
// 200 us for the loop (the Phase I loop's 32 km of fiber at about 5 us/km,
// plus up to 8 us of repeat delay in each node passed, with margin)
// and two byte times (16 us at 1 Mbit/s) for a dropout.
//
// Interface, index [0] = CW, [1] = CCW: byte_stb and eop come from the two
// ADCCP chips; started/done give the state of each copy; loop_err and
// byte_err are levels that hold until pkt_clear. pkt_clear rearms the timers
// for the next packet once the FE has stored the present one. Nothing is
// timed while enable (receive mode) is low.
module rx_timers #(
  parameter int CLK_HZ          = 12_000_000,
  parameter int LOOP_TIMEOUT_US = 200,
  parameter int BYTE_TIMEOUT_US = 16
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       enable,
  input  logic [1:0] byte_stb,
  input  logic [1:0] eop,
  input  logic       pkt_clear,
  output logic [1:0] started,
  output logic [1:0] done,
  output logic [1:0] loop_err,
  output logic [1:0] byte_err,
  output logic       pkt_active
);
  localparam int LOOP_CYC = (CLK_HZ / 1_000_000) * LOOP_TIMEOUT_US;
  localparam int BYTE_CYC = (CLK_HZ / 1_000_000) * BYTE_TIMEOUT_US;
  localparam int TW = $clog2(LOOP_CYC > BYTE_CYC ? LOOP_CYC + 1 : BYTE_CYC + 1);

  logic [TW-1:0] loop_cnt;
  logic [TW-1:0] byte_cnt [2];

  assign pkt_active = |started || |done;

  always_ff @(posedge clk) begin
    if (!rst_n || pkt_clear || !enable) begin
      started  <= '0;
      done     <= '0;
      loop_err <= '0;
      byte_err <= '0;
      loop_cnt <= '0;
      byte_cnt <= '{default: '0};
    end else begin
      // loop timer: runs while exactly one loop has started and the other is silent
      if (|started && !(&started)) begin
        if (loop_cnt == TW'(LOOP_CYC - 1)) begin
          for (int i = 0; i < 2; i++)
            if (!started[i] && !done[i]) begin
              loop_err[i] <= 1'b1;
              done[i]     <= 1'b1;
            end
        end else begin
          loop_cnt <= loop_cnt + 1'b1;
        end
      end
      for (int i = 0; i < 2; i++) begin
        if (!done[i]) begin
          if (byte_stb[i]) begin
            started[i]  <= 1'b1;
            byte_cnt[i] <= '0;
          end else if (started[i]) begin
            if (byte_cnt[i] == TW'(BYTE_CYC - 1)) begin
              byte_err[i] <= 1'b1;
              done[i]     <= 1'b1;
            end else begin
              byte_cnt[i] <= byte_cnt[i] + 1'b1;
            end
          end
          if (eop[i] && (started[i] || byte_stb[i])) done[i] <= 1'b1;
        end
      end
    end
  end

endmodule
