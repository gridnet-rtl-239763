// time_code: the Time Code Board of a node (32-bit network timestamp).
//
// Every node reads a common time from its Time Code Board to timestamp
// events for the prototype's performance statistics. The board receives the
// Master Clock's two burst-coded lines, recovers Clock (100 kHz, 10 us
// resolution) and Clear with envelope detectors, and counts Clock rises in a
// 32-bit counter: a rise while Clear is active resets the count to zero,
// any other rise increments it. On every fall of Clock the count is copied
// into an output latch, except while the processor is in the middle of
// reading it: the bus reads 16 bits at a time, so the latch is frozen from
// the first half read until both halves have been read. A missing pulse
// detector raises an interrupt when no Clock rise arrives within 1.5 periods
// of the previous one. All of this follows the report except the missing
// pulse timeout and the read protocol details, which are this design's.
//
// Interface: rd with rd_hi (0 = bits [15:0], 1 = [31:16]) returns the half on
// rdata in the next clock. missing_irq holds until irq_ack. The four
// cascaded 8-bit counter chips of the board are one 32-bit counter here.
// Clock edges are found by sampling the recovered envelope with clk, so clk
// must be much faster than the 2 MHz carrier (12 MHz by default).
module time_code #(
  parameter int CLK_HZ  = 12_000_000,
  parameter int TICK_HZ = 100_000,
  parameter int CNT_W   = 32,
  parameter int HOLD    = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clock_line,
  input  logic        clear_line,
  input  logic        rd,
  input  logic        rd_hi,
  output logic [15:0] rdata,
  output logic        missing_irq,
  input  logic        irq_ack,
  output logic [CNT_W-1:0] count
);
  localparam int MISS_CYC = (CLK_HZ / TICK_HZ) * 3 / 2;
  localparam int MW = $clog2(MISS_CYC + 1);

  logic tclk, tclr, tclk_q;
  envelope_det #(.HOLD(HOLD)) u_env_clk (.clk, .rst_n, .line(clock_line), .env(tclk));
  envelope_det #(.HOLD(HOLD)) u_env_clr (.clk, .rst_n, .line(clear_line), .env(tclr));

  wire rise = tclk && !tclk_q;
  wire fall = !tclk && tclk_q;

  logic [CNT_W-1:0] latch_q;
  logic             frozen, got_lo, got_hi;
  logic [MW-1:0]    miss_cnt;
  logic             armed;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      tclk_q      <= 1'b0;
      count       <= '0;
      latch_q     <= '0;
      frozen      <= 1'b0;
      got_lo      <= 1'b0;
      got_hi      <= 1'b0;
      rdata       <= '0;
      miss_cnt    <= '0;
      armed       <= 1'b0;
      missing_irq <= 1'b0;
    end else begin
      tclk_q <= tclk;
      // counter
      if (rise) count <= tclr ? '0 : count + 1'b1;
      // output latch and read sequence
      if (fall && !frozen) latch_q <= count;
      if (rd) begin
        rdata <= rd_hi ? latch_q[CNT_W-1 -: 16] : latch_q[15:0];
        if ((rd_hi ? got_lo : got_hi)) begin
          frozen <= 1'b0;
          got_lo <= 1'b0;
          got_hi <= 1'b0;
        end else begin
          frozen <= 1'b1;
          if (rd_hi) got_hi <= 1'b1;
          else       got_lo <= 1'b1;
        end
      end
      // missing pulse detector
      if (rise) begin
        miss_cnt <= '0;
        armed    <= !tclr;
      end else if (tclr) begin
        armed <= 1'b0;
      end else if (armed) begin
        if (miss_cnt == MW'(MISS_CYC - 1)) begin
          missing_irq <= 1'b1;
          armed       <= 1'b0;
        end else begin
          miss_cnt <= miss_cnt + 1'b1;
        end
      end
      if (irq_ack) missing_irq <= 1'b0;
    end
  end

endmodule
