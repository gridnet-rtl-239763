// master_clock: the Master Clock Board of the time distribution system.
//
// One Master Clock in the host drives the Time Code Boards of all nodes with
// two lines, Clock and Clear. As in the report, the 100 kHz Clock is divided
// from a 2 MHz oscillator; a clear/start command gates the Clock on and sends
// one 10 us Clear pulse, and a stop command halts the Clock. Because the lines
// are transformer coupled, each is sent as bursts of the 2 MHz carrier: the
// line carries the carrier while its baseband signal (clock_env, clear_env)
// is active and is quiet otherwise.
//
// Here the 2 MHz oscillator is made by dividing the board clock (CLK_HZ must
// be an even multiple of OSC_HZ); the command interface to the host's bus is
// reduced to two strobes. Both are this design's choices. Sequence after
// cmd_start: the Clock runs at once, low for the first half and high for the
// second half of each 10 us period, so it rises 5 us into each period; the
// Clear envelope is high for the first 10 us period only, so that exactly one
// Clock rise (the first) falls inside Clear. cmd_stop ends the Clock at once
// (low).
module master_clock #(
  parameter int CLK_HZ  = 12_000_000,
  parameter int OSC_HZ  = 2_000_000,
  parameter int TICK_HZ = 100_000
) (
  input  logic clk,
  input  logic rst_n,
  input  logic cmd_start,
  input  logic cmd_stop,
  output logic clock_line,
  output logic clear_line,
  output logic clock_env,
  output logic clear_env,
  output logic running
);
  localparam int OSC_HALF  = CLK_HZ / OSC_HZ / 2;   // board clocks per carrier half period
  localparam int TICK_CYC  = CLK_HZ / TICK_HZ;      // board clocks per Clock period
  localparam int OW = $clog2(OSC_HALF + 1);
  localparam int TW = $clog2(TICK_CYC + 1);

  logic [OW-1:0] osc_cnt;
  logic          osc;          // 2 MHz carrier
  logic [TW-1:0] tick_cnt;
  logic          clearing;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      osc_cnt <= '0;
      osc     <= 1'b0;
    end else if (osc_cnt == OW'(OSC_HALF - 1)) begin
      osc_cnt <= '0;
      osc     <= !osc;
    end else begin
      osc_cnt <= osc_cnt + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      running  <= 1'b0;
      clearing <= 1'b0;
      tick_cnt <= '0;
    end else if (cmd_start) begin
      running  <= 1'b1;
      clearing <= 1'b1;
      tick_cnt <= '0;
    end else if (cmd_stop) begin
      running  <= 1'b0;
      clearing <= 1'b0;
      tick_cnt <= '0;
    end else if (running) begin
      if (tick_cnt == TW'(TICK_CYC - 1)) begin
        tick_cnt <= '0;
        clearing <= 1'b0;
      end else begin
        tick_cnt <= tick_cnt + 1'b1;
      end
    end
  end

  assign clear_env  = running && clearing;
  assign clock_env  = running && (tick_cnt >= TW'(TICK_CYC / 2));
  assign clock_line = clock_env && osc;
  assign clear_line = clear_env && osc;

endmodule
