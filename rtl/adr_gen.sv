// adr_gen: data RAM address generation of the FE (the base register unit).
//
// The 8x305 has 8-bit data paths but the local data RAM needs a 12-bit
// address. As in the report, the address is a base register (a set of base
// registers the 8x305 can rewrite at any time) plus one of two values chosen
// by the micro-instruction: a constant from the micro-instruction, or a
// dedicated counter with optional reset and post-increment. The number of
// base registers (8), their loading as a low byte and a high nibble, and the
// counter width are this design's choices.
//
// Interface: base_wr writes wdata into base register base_wsel (low byte, or
// the high nibble when base_hi). addr is combinational from base_sel,
// use_cnt, offset and the counter. cnt_rst makes the counter read as zero in
// this access and clears it; cnt_inc increments it after the access.
module adr_gen #(
  parameter int NBASE = 8,
  parameter int AW    = 12
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     base_wr,
  input  logic                     base_hi,
  input  logic [$clog2(NBASE)-1:0] base_wsel,
  input  logic [7:0]               wdata,
  input  logic [$clog2(NBASE)-1:0] base_sel,
  input  logic                     use_cnt,
  input  logic [7:0]               offset,
  input  logic                     cnt_rst,
  input  logic                     cnt_inc,
  output logic [AW-1:0]            addr
);
  logic [AW-1:0] base [NBASE];
  logic [AW-1:0] cnt;
  logic [AW-1:0] cnt_now;

  assign cnt_now = cnt_rst ? '0 : cnt;
  assign addr    = base[base_sel] + (use_cnt ? cnt_now : AW'(offset));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      base <= '{default: '0};
      cnt  <= '0;
    end else begin
      if (base_wr) begin
        if (base_hi) base[base_wsel][AW-1:8] <= wdata[AW-9:0];
        else         base[base_wsel][7:0]    <= wdata;
      end
      if (cnt_inc)      cnt <= cnt_now + 1'b1;
      else if (cnt_rst) cnt <= '0;
    end
  end

endmodule
