// tb_pingpong_buffer: fills both buffer pairs, checks hand-over order,
// lengths, error words, the read port, fill_busy when both pairs are full,
// and that a released pair is reused.
module tb_pingpong_buffer;
  import gridnet_pkg::*;
  localparam int PB = 16;
  logic clk = 0, rst_n = 0;
  logic wr_cw = 0, wr_ccw = 0, complete = 0, rd_en = 0, release_pair = 0;
  logic [7:0] wr_data_cw = 0, wr_data_ccw = 0, rd_data;
  rx_err_t err_in = '0, err_out;
  logic fill_busy, ready;
  logic [4:0] rd_addr = 0, len_cw, len_ccw;
  int checks = 0, failures = 0;

  pingpong_buffer #(.PKT_BYTES(PB)) dut (.*);

  always #5 clk = !clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // store a packet: n_cw / n_ccw bytes, byte value = tag*16 + index (+0x80 for CCW)
  task automatic store(int tag, int n_cw, int n_ccw, logic [7:0] err);
    for (int i = 0; i < (n_cw > n_ccw ? n_cw : n_ccw); i++) begin
      @(negedge clk);
      wr_cw = i < n_cw;   wr_data_cw  = 8'(tag * 16 + i);
      wr_ccw = i < n_ccw; wr_data_ccw = 8'(tag * 16 + i + 8'h80);
    end
    @(negedge clk); wr_cw = 0; wr_ccw = 0; complete = 1; err_in = rx_err_t'(err);
    @(negedge clk); complete = 0;
  endtask

  task automatic rd(input bit ccw, input int idx, output logic [7:0] d);
    @(negedge clk); rd_en = 1; rd_addr = {ccw, 4'(idx)};
    @(negedge clk); rd_en = 0; d = rd_data;
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] d;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    chk(!ready && !fill_busy, "empty after reset");
    store(1, 10, 10, 8'h00);
    chk(ready && !fill_busy, "packet 1 ready, other pair free");
    store(2, 7, 5, 8'h01);
    chk(ready && fill_busy, "both pairs full");
    chk(len_cw == 10 && len_ccw == 10 && err_out == 8'h00, "packet 1 metadata");
    for (int i = 0; i < 10; i++) begin
      rd(0, i, d); chk(d == 8'(16 + i), $sformatf("p1 CW byte %0d", i));
      rd(1, i, d); chk(d == 8'(16 + i + 8'h80), $sformatf("p1 CCW byte %0d", i));
    end
    @(negedge clk); release_pair = 1; @(negedge clk); release_pair = 0;
    chk(ready && !fill_busy, "packet 2 now read, pair 1 free");
    chk(len_cw == 7 && len_ccw == 5 && err_out == 8'h01, "packet 2 metadata");
    rd(0, 6, d); chk(d == 8'(32 + 6), "p2 CW last byte");
    rd(1, 4, d); chk(d == 8'(32 + 4 + 8'h80), "p2 CCW last byte");
    store(3, 20, 16, 8'h80);     // longer than the buffer: capped
    @(negedge clk); release_pair = 1; @(negedge clk); release_pair = 0;
    chk(ready && len_cw == 16 && len_ccw == 16 && err_out == 8'h80, "packet 3 capped at buffer size");
    rd(0, 0, d); chk(d == 8'(48), "p3 first byte in reused pair");
    @(negedge clk); release_pair = 1; @(negedge clk); release_pair = 0;
    chk(!ready, "all read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
