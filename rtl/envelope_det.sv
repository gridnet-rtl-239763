// envelope_det: recovers a baseband signal from a line that carries bursts.
//
// The time distribution lines carry 2 MHz bursts rather than levels; on each
// Time Code Board an envelope detector turns them back into levels, as the
// report describes. On the board this is an analog circuit; here it is a
// sampled, retriggerable hold: env goes high when the line is seen high and
// stays high until the line has been low for HOLD clocks. HOLD must exceed
// the carrier's low half period and be short against the envelope (this
// design's choice: 8 clocks at 12 MHz, where the carrier is low for 3).
// The line input is first passed through two flip-flops, so env lags the
// line by three clocks.
module envelope_det #(
  parameter int HOLD = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  logic line,
  output logic env
);
  localparam int HW = $clog2(HOLD + 1);
  logic [1:0]    sync;
  logic [HW-1:0] hold_cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sync     <= '0;
      hold_cnt <= '0;
      env      <= 1'b0;
    end else begin
      sync <= {sync[0], line};
      if (sync[1]) begin
        hold_cnt <= HW'(HOLD);
        env      <= 1'b1;
      end else if (hold_cnt != 0) begin
        hold_cnt <= hold_cnt - 1'b1;
        if (hold_cnt == 1) env <= 1'b0;
      end
    end
  end

endmodule
