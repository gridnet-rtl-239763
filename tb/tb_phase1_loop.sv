// tb_phase1_loop: the Phase I CROSSFIRE loop - four nodes on a dual fiber
// ring at 1 Mbit/s, every node a full gridnet_node at its default sizes.
//
// Node 0 is the Primary, nodes 1..3 are Secondaries. The ring follows the
// Phase I layout: 16 km from node 0 to node 1, 10 m from 1 to 2, 16 km from
// 2 to 3 (counting the two 10 m runs of the layout as one hop each) and
// 10 m from 3 back to 0, about 32 km in all. The testbench models what is
// outside the RTL:
//  * the fiber: 5 ns per metre of delay per hop, a CW and a CCW fiber per
//    hop, each of which can be cut;
//  * each powered node's transmitter and receiver acting as a repeater that
//    adds one byte time (8 us); an unpowered node is by-passed optically
//    (its by-pass switch drive drops, the light passes straight on);
//  * the ADCCP chips: a transmit queue sent one byte per 8 us followed by an
//    end of packet, and address recognition on receive (a packet is passed
//    to the FE only if its first byte is the node's address or FF);
//    the sender removes its own packet when it comes round;
//  * each node's 8x305, stepping through downloaded micro-instructions.
// Scenarios: a poll of node 1 and its answer; a broadcast to all; a cut CW
// fiber, which the Primary locates from the nodes' error words; both fibers
// cut at one place, where every node still gets one copy; a node without
// power, which is by-passed and whose poll runs into the response timeout.
// The loop timer here is the default 200 us and the skew between the two
// copies at any node stays below it. Each mechanism is counted; one that
// never occurs is a failure.
module tb_phase1_loop;
  import gridnet_pkg::*;
  localparam int N = 4;
  localparam int BYTE_CLK = 96;                 // 8 us at 12 MHz
  // fiber delay of hop i (node i -> node i+1 on CW) in clocks, 5 ns/m
  localparam int HOP_M [N] = '{16000, 10, 16000, 10};

  logic clk = 0, rst_n = 0;
  logic        slv_sel [N], slv_wr [N];
  logic [13:0] slv_addr [N];
  logic [15:0] slv_wdata [N];
  logic [10:0] pc [N];
  logic [15:0] instr [N];
  logic        fe_run [N], fe_start [N];
  logic [7:0]  lb_wdata [N], lb_rdata [N];
  logic [19:0] mbus_addr [N];
  logic        mbus_rd [N], mbus_wr [N], mbus_xack [N], dma_busy [N], dma_done [N], sbc_irq [N];
  logic [7:0]  mbus_wdata [N], mbus_rdata [N];
  logic        sbc_grant [N], iob_grant [N];
  logic [2:0]  bus_bpro [N];
  logic        cw_rx_stb [N], cw_rx_eop [N], ccw_rx_stb [N], ccw_rx_eop [N];
  logic [7:0]  cw_rx_data [N], ccw_rx_data [N], tx_data [N];
  logic        tx_stb [N], rx_mode [N], tx_mode [N], tx_eom [N], pkt_ready [N];
  logic        mc_start = 0;
  logic        mc_clock_line [N], mc_clear_line [N], mc_clock_env [N], mc_clear_env [N], mc_running [N];
  logic [15:0] tc_rdata [N];
  logic        tc_missing_irq [N];
  logic [31:0] tc_count [N];
  logic        power_good [N];
  logic        act_cw [N], act_ccw [N];

  for (genvar g = 0; g < N; g++) begin : g_node
    gridnet_node u_node (
      .clk, .rst_n,
      .slv_sel(slv_sel[g]), .slv_wr(slv_wr[g]), .slv_addr(slv_addr[g]), .slv_wdata(slv_wdata[g]),
      .pc(pc[g]), .instr(instr[g]), .fe_run(fe_run[g]), .fe_start(fe_start[g]),
      .lb_wdata(lb_wdata[g]), .lb_rdata(lb_rdata[g]),
      .mbus_addr(mbus_addr[g]), .mbus_rd(mbus_rd[g]), .mbus_wr(mbus_wr[g]),
      .mbus_wdata(mbus_wdata[g]), .mbus_rdata(mbus_rdata[g]), .mbus_xack(mbus_xack[g]),
      .dma_busy(dma_busy[g]), .dma_done(dma_done[g]), .sbc_irq(sbc_irq[g]),
      .sbc_breq(1'b0), .sbc_grant(sbc_grant[g]), .iob_breq(1'b0), .iob_grant(iob_grant[g]),
      .bus_bpro(bus_bpro[g]),
      .cw_rx_stb(cw_rx_stb[g]), .cw_rx_data(cw_rx_data[g]), .cw_rx_eop(cw_rx_eop[g]), .cw_rx_crc_ok(1'b1),
      .ccw_rx_stb(ccw_rx_stb[g]), .ccw_rx_data(ccw_rx_data[g]), .ccw_rx_eop(ccw_rx_eop[g]), .ccw_rx_crc_ok(1'b1),
      .tx_stb(tx_stb[g]), .tx_data(tx_data[g]), .rx_mode(rx_mode[g]), .tx_mode(tx_mode[g]),
      .tx_eom(tx_eom[g]), .pkt_ready(pkt_ready[g]),
      .mc_start, .mc_stop(1'b0),
      .mc_clock_line(mc_clock_line[g]), .mc_clear_line(mc_clear_line[g]),
      .mc_clock_env(mc_clock_env[g]), .mc_clear_env(mc_clear_env[g]), .mc_running(mc_running[g]),
      .tc_rd(1'b0), .tc_rd_hi(1'b0), .tc_rdata(tc_rdata[g]), .tc_missing_irq(tc_missing_irq[g]),
      .tc_count(tc_count[g]), .tc_irq_ack(1'b0),
      .power_good(power_good[g]), .bypass_fail(4'b0), .bypass_fail_en(4'b0),
      .bypass_cw_actuate(act_cw[g]), .bypass_ccw_actuate(act_ccw[g]));
    sbc_mem_model #(.LAT(3)) u_mem (.clk, .addr(mbus_addr[g]), .rd(mbus_rd[g]), .wr(mbus_wr[g]),
      .wdata(mbus_wdata[g]), .rdata(mbus_rdata[g]), .xack(mbus_xack[g]));
  end

  always #5 clk = !clk;

  int checks = 0, failures = 0;
  int n_clean = 0, n_filtered = 0, n_loop_err = 0, n_located = 0, n_single_copy = 0;
  int n_bypassed = 0, n_resp_timeout = 0, n_answer = 0;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- fiber ring and ADCCP models ----------------
  bit cut [2][N];                 // [0] CW fiber, [1] CCW fiber of hop i (node i - node i+1)
  bit acc [N][2];                 // receiver of node/loop accepted the current frame
  int frames_seen [N];            // frames whose first byte reached the node's ADCCP

  function automatic bit powered(int n);
    return act_cw[n] && act_ccw[n];
  endfunction

  // deliver one event to node r on loop dir after d clocks
  task automatic deliver(int r, int dir, logic [7:0] b, bit first, bit eop, int d);
    fork
      begin
        repeat (d) @(negedge clk);
        if (first) begin
          acc[r][dir] = (b == 8'(r) || b == 8'hFF);
          if (dir == 0) frames_seen[r]++;
          if (!acc[r][dir] && dir == 0) n_filtered++;
        end
        if (acc[r][dir]) begin
          if (dir == 0) begin
            if (eop) cw_rx_eop[r] = 1; else begin cw_rx_stb[r] = 1; cw_rx_data[r] = b; end
          end else begin
            if (eop) ccw_rx_eop[r] = 1; else begin ccw_rx_stb[r] = 1; ccw_rx_data[r] = b; end
          end
          @(negedge clk);
          if (dir == 0) begin cw_rx_stb[r] = 0; cw_rx_eop[r] = 0; end
          else          begin ccw_rx_stb[r] = 0; ccw_rx_eop[r] = 0; end
        end
      end
    join_none
  endtask

  // one byte (or the end of packet) leaves node s on both loops
  task automatic launch(int s, logic [7:0] b, bit first, bit eop);
    for (int dir = 0; dir < 2; dir++) begin
      int d, cur, hop;
      d = 0; cur = s;
      for (int k = 1; k < N; k++) begin
        hop = (dir == 0) ? cur : (cur + N - 1) % N;
        if (cut[dir][hop]) break;
        d += HOP_M[hop] * 3 / 50 + 1;           // 5 ns/m = 0.06 clocks/m at 12 MHz
        cur = (dir == 0) ? (cur + 1) % N : (cur + N - 1) % N;
        if (powered(cur)) begin
          deliver(cur, dir, b, first, eop, d);
          d += BYTE_CLK;                        // repeater in the node
        end
      end
    end
  endtask

  // ADCCP transmit side of each node: bytes queued by the FE leave one per
  // byte time; the end-of-message strobe queues the closing flag
  logic [8:0] txq [N][$];
  for (genvar g = 0; g < N; g++) begin : g_tx
    always @(posedge clk) begin
      if (tx_stb[g]) txq[g].push_back({1'b0, tx_data[g]});
      if (tx_eom[g]) txq[g].push_back(9'h100);
    end
    initial begin
      bit first;
      first = 1;
      forever begin
        @(negedge clk);
        if (txq[g].size() > 0) begin
          logic [8:0] e;
          e = txq[g].pop_front();
          if (e[8]) begin launch(g, 8'h00, 0, 1); first = 1; end
          else begin launch(g, e[7:0], first, 0); first = 0; end
          repeat (BYTE_CLK - 1) @(negedge clk);
        end
      end
    end
  end

  // ---------------- SBC and 8x305 of each node ----------------
  task automatic bw(int n, logic [13:0] a, logic [15:0] d);
    @(negedge clk); slv_sel[n] = 1; slv_wr[n] = 1; slv_addr[n] = a; slv_wdata[n] = d;
    @(negedge clk); slv_sel[n] = 0; slv_wr[n] = 0;
  endtask

  task automatic load(int n, int w, uctrl_t c);
    logic [47:0] v;
    v = {16'h0000, 32'(c)};
    bw(n, 14'({w[10:0], 2'd0}), v[15:0]);
    bw(n, 14'({w[10:0], 2'd1}), v[31:16]);
    bw(n, 14'({w[10:0], 2'd2}), v[47:32]);
  endtask

  task automatic step(input int n, input int k, input logic [7:0] d, output logic [7:0] r);
    @(negedge clk); pc[n] = 11'(k);
    @(negedge clk); pc[n] = 11'd2047; lb_wdata[n] = d;
    @(negedge clk); r = lb_rdata[n];
  endtask

  localparam int U_TX = 0, U_CTRL = 1, U_STAT = 2, U_ERR = 3, U_LEN = 4, U_PTRL = 8, U_PTRH = 9, U_DATA = 10;

  function automatic logic [7:0] pbyte(int i, int seed, int dst);
    return (i == 0) ? 8'(dst) : 8'(seed + i * 7);
  endfunction

  // node n sends a packet of len bytes (first byte = destination address),
  // paced to the line, then returns to receive mode (arming the response
  // timer if an answer is expected)
  task automatic send_pkt(int n, int dst, int len, int seed, bit expect_answer);
    logic [7:0] r;
    step(n, U_CTRL, 8'h02, r);
    for (int i = 0; i < len; i++) begin
      step(n, U_TX, pbyte(i, seed, dst), r);
      repeat (BYTE_CLK - 3) @(negedge clk);
    end
    step(n, U_CTRL, 8'h12, r);
    repeat (2 * BYTE_CLK) @(negedge clk);
    step(n, U_CTRL, expect_answer ? 8'h09 : 8'h01, r);
  endtask

  // node n takes the packet in its read pair: error word, lengths, and the
  // stored bytes of the copies that arrived
  task automatic recv_pkt(input int n, input int len, input int seed, input int dst,
                          output logic [7:0] err, output int lcw, output int lccw);
    logic [7:0] r, l0, l1, l2, l3;
    int bad;
    r = 0;
    for (int i = 0; i < 3000 && !r[0]; i++) step(n, U_STAT, 0, r);
    chk(r[0], $sformatf("node %0d: packet ready", n));
    step(n, U_ERR, 0, err);
    step(n, U_LEN, 0, l0); step(n, U_LEN + 1, 0, l1); step(n, U_LEN + 2, 0, l2); step(n, U_LEN + 3, 0, l3);
    lcw = int'({l1[2:0], l0}); lccw = int'({l3[2:0], l2});
    bad = 0;
    for (int c = 0; c < 2; c++) begin
      if ((c == 0 ? lcw : lccw) == len) begin
        step(n, U_PTRL, 0, r); step(n, U_PTRH, c ? 8'h04 : 8'h00, r);
        for (int i = 0; i < len; i++) begin
          step(n, U_DATA, 0, r);
          if (r != pbyte(i, seed, dst)) bad++;
        end
      end
    end
    chk(bad == 0, $sformatf("node %0d: stored copies hold the packet (%0d bad)", n, bad));
    step(n, U_CTRL, 8'h05, r);
  endtask

  task automatic expect_clean(int n, int len, int seed, int dst);
    logic [7:0] e;
    int a, b;
    recv_pkt(n, len, seed, dst, e, a, b);
    chk(e == 8'h00 && a == len && b == len, $sformatf("node %0d: clean, err %02h lengths %0d/%0d", n, e, a, b));
    if (e == 8'h00 && a == len && b == len) n_clean++;
  endtask

  initial begin
    #3_000_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    uctrl_t p [16];
    logic [7:0] r, e [N];
    int lc [N], lcc [N];
    for (int n = 0; n < N; n++) begin
      slv_sel[n] = 0; slv_wr[n] = 0; slv_addr[n] = 0; slv_wdata[n] = 0;
      pc[n] = 11'd2047; lb_wdata[n] = 0; power_good[n] = 1;
      cw_rx_stb[n] = 0; cw_rx_eop[n] = 0; ccw_rx_stb[n] = 0; ccw_rx_eop[n] = 0;
      cw_rx_data[n] = 0; ccw_rx_data[n] = 0; frames_seen[n] = 0;
      acc[n][0] = 0; acc[n][1] = 0; cut[0][n] = 0; cut[1][n] = 0;
    end
    foreach (p[i]) p[i] = '0;
    p[U_TX].io_wr = 1;   p[U_TX].io_reg = IO_TXDATA;
    p[U_CTRL].io_wr = 1; p[U_CTRL].io_reg = IO_CTRL;
    p[U_STAT].io_rd = 1; p[U_STAT].io_reg = IO_STATUS;
    p[U_ERR].io_rd = 1;  p[U_ERR].io_reg = IO_ERR;
    for (int i = 0; i < 4; i++) begin p[U_LEN + i].io_rd = 1; p[U_LEN + i].io_reg = IO_LENCW_L + 4'(i); end
    p[U_PTRL].io_wr = 1; p[U_PTRL].io_reg = IO_PTR_L;
    p[U_PTRH].io_wr = 1; p[U_PTRH].io_reg = IO_PTR_H;
    p[U_DATA].io_rd = 1; p[U_DATA].io_reg = IO_DATA;

    repeat (3) @(posedge clk);
    rst_n <= 1;
    // every SBC downloads the same FE code and starts its FE
    for (int n = 0; n < N; n++) fork
      automatic int nn = n;
      begin
        for (int i = 0; i < 16; i++) load(nn, i, p[i]);
        load(nn, 2047, '0);
        bw(nn, 14'h2000, 16'h0001);
        step(nn, U_CTRL, 8'h01, r);
      end
    join_none
    wait fork;
    for (int n = 0; n < N; n++) chk(fe_run[n] && rx_mode[n] && powered(n), $sformatf("node %0d up", n));

    // ---- 1. Primary polls node 1, node 1 answers
    send_pkt(0, 1, 24, 8'h10, 1);
    expect_clean(1, 24, 8'h10, 1);
    chk(!pkt_ready[2] && !pkt_ready[3], "nodes 2 and 3 filtered the poll by address");
    send_pkt(1, 0, 40, 8'h20, 0);
    expect_clean(0, 40, 8'h20, 0);
    step(0, U_STAT, 0, r);
    chk(!r[5] && !r[6], "Primary: answer stopped the response timer");
    if (!r[5]) n_answer++;

    // ---- 2. broadcast to all Secondaries
    send_pkt(0, 8'hFF, 32, 8'h30, 0);
    for (int n = 1; n < N; n++) fork
      automatic int nn = n;
      expect_clean(nn, 32, 8'h30, 8'hFF);
    join_none
    wait fork;

    // ---- 3. CW fiber cut between nodes 1 and 2: locate it
    cut[0][1] = 1;
    send_pkt(0, 8'hFF, 20, 8'h40, 0);
    for (int n = 1; n < N; n++) fork
      automatic int nn = n;
      recv_pkt(nn, 20, 8'h40, 8'hFF, e[nn], lc[nn], lcc[nn]);
    join_none
    wait fork;
    chk(e[1] == 8'h00, "node 1 (before the cut) clean");
    chk(e[2] == 8'h02 && e[3] == 8'h02 && lc[2] == 0 && lcc[2] == 20, "nodes 2, 3: CW loop error, CCW copy intact");
    for (int n = 1; n < N; n++) if (e[n][1]) n_loop_err++;
    begin
      int first_bad;
      first_bad = 0;
      for (int n = N - 1; n >= 1; n--) if (e[n][1]) first_bad = n;
      chk(first_bad == 2, $sformatf("CW break located before node %0d", first_bad));
      if (first_bad == 2) n_located++;
    end
    cut[0][1] = 0;

    // ---- 4. both fibers cut between nodes 2 and 3: everyone still gets one copy
    cut[0][2] = 1; cut[1][2] = 1;
    send_pkt(0, 8'hFF, 20, 8'h50, 0);
    for (int n = 1; n < N; n++) fork
      automatic int nn = n;
      recv_pkt(nn, 20, 8'h50, 8'hFF, e[nn], lc[nn], lcc[nn]);
    join_none
    wait fork;
    chk(e[1] == 8'h04 && e[2] == 8'h04 && e[3] == 8'h02, $sformatf("single copies: %02h %02h %02h", e[1], e[2], e[3]));
    for (int n = 1; n < N; n++) if ((e[n] == 8'h04 && lc[n] == 20) || (e[n] == 8'h02 && lcc[n] == 20)) n_single_copy++;
    cut[0][2] = 0; cut[1][2] = 0;

    // ---- 5. node 2 loses power: by-passed, and its poll times out
    power_good[2] = 0;
    @(negedge clk);
    chk(!act_cw[2] && !act_ccw[2], "unpowered node 2 drops its by-pass switches");
    begin
      int seen2;
      seen2 = frames_seen[2];
      send_pkt(0, 8'hFF, 16, 8'h60, 0);
      fork
        expect_clean(1, 16, 8'h60, 8'hFF);
        expect_clean(3, 16, 8'h60, 8'hFF);
      join
      chk(frames_seen[2] == seen2, "by-passed node 2 saw nothing");
      if (frames_seen[2] == seen2) n_bypassed++;
    end
    send_pkt(0, 2, 16, 8'h70, 1);
    repeat (12100) @(negedge clk);
    step(0, U_STAT, 0, r);
    chk(r[5], "Primary: no answer from node 2, response timeout");
    if (r[5]) n_resp_timeout++;

    $display("mechanisms: clean=%0d filtered=%0d loop_err=%0d located=%0d single_copy=%0d bypassed=%0d resp_timeout=%0d answer=%0d",
             n_clean, n_filtered, n_loop_err, n_located, n_single_copy, n_bypassed, n_resp_timeout, n_answer);
    chk(n_clean > 0, "clean deliveries happened");
    chk(n_filtered > 0, "address filtering happened");
    chk(n_loop_err > 0, "loop errors happened");
    chk(n_located > 0, "a break was located");
    chk(n_single_copy == 3, "single-copy delivery at every node");
    chk(n_bypassed > 0, "a node was by-passed");
    chk(n_resp_timeout > 0, "a response timeout happened");
    chk(n_answer > 0, "an answer arrived in time");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
