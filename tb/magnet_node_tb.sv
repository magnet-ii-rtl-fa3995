// magnet_node_tb: end-to-end test of a four-station ring at the default
// (full-size) parameters: 1024-bit cells, 16-packet buffers, four bus users
// per station. Station 0 is the Headend. The T3 links are wired 1<->2 and
// 0<->3.
//
// Every mechanism below is counted while the test runs; a mechanism that
// never happened is a failure of its own:
//   delivery      a unicast packet is removed at its destination and read
//   multicast     one multicast packet is received by two enabled stations
//   source_rm     the multicast packet is removed by its source (never
//                 discarded by the Cell Generator)
//   reuse         a station removes a packet and fills the same cell
//   limit_hold    a free class-I cell passes a station that has class-I
//                 packets but has used its LIMIT for the cycle
//   boundary      the Headend moves a subcycle boundary
//   transfer      the Headend's Cell Generator transfers a packet
//   discard       the Cell Generator discards an unremoved packet
//   ib_loss       a packet is lost because an Input Buffer is full
//   link          a packet crosses a T3 link and its header is translated
//   bus_err       a write without the destination grant is refused
//   dst_irq       a queued bus user is granted with an interrupt
//   hou           every station's HOU holds I-Records
module magnet_node_tb;
  import magnet_pkg::*;
  localparam int N = 4, NU = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic t3_bit_en = 0, cfg_we = 0;
  logic [7:0] cfg_station = 0; logic [11:0] cfg_addr = 0; logic [15:0] cfg_wdata = 0;
  logic [NU-1:0] usr_bus_req [N], usr_bus_gnt [N];
  logic [NU-1:0] usr_dst_req [N][4], usr_dst_gnt [N][4], usr_dst_irq [N][4];
  logic bus_valid [N], bus_last [N], bus_err [N];
  logic [2:0] bus_target [N];
  logic [31:0] bus_wdata [N], bus_rdata [N];
  logic [3:0] ob_full [N]; logic [1:0] ib_avail [N];
  logic t3_tx_bit [N], t3_tx_sf_start [N], t3_rx_bit [N], t3_rx_sf_start [N];
  logic [9:0] hou_rd_addr [N]; logic [63:0] hou_rd_data [N]; logic [31:0] hou_rec_count [N];
  logic locked [N], ev_rx_pkt [N], ev_tx_pkt [N], ev_rx_lost [N];
  logic ev_link_tx [N], ev_link_rx [N], ev_link_lost [N];
  logic [4:0] iob_count [N][4];
  logic ev_cg_transfer, ev_cg_discard, ev_cg_boundary;

  magnet_node dut (.*);

  always @(posedge clk) t3_bit_en <= ~t3_bit_en;
  // T3 wiring: 1<->2, 0<->3
  always_comb begin
    for (int i = 0; i < N; i++) begin
      t3_rx_bit[i]      = t3_tx_bit[N - 1 - i];
      t3_rx_sf_start[i] = t3_tx_sf_start[N - 1 - i];
    end
  end

  // ---------------- mechanism counters ----------------
  int n_delivery = 0, n_multicast = 0, n_source_rm = 0, n_reuse = 0, n_limit_hold = 0;
  int n_boundary = 0, n_transfer = 0, n_discard = 0, n_ib_loss = 0, n_link = 0;
  int n_bus_err = 0, n_dst_irq = 0, n_hou = 0;
  int n_rx [N], n_tx [N], n_lost [N];
  int cyc_sent = 0, max_cyc_sent = 0;

  always @(posedge clk) if (rst_n) begin
    n_transfer += int'(ev_cg_transfer);
    n_discard  += int'(ev_cg_discard);
    n_boundary += int'(ev_cg_boundary);
    for (int i = 0; i < N; i++) begin
      n_rx[i]   += int'(ev_rx_pkt[i]);
      n_tx[i]   += int'(ev_tx_pkt[i]);
      n_lost[i] += int'(ev_rx_lost[i]);
      n_ib_loss += int'(ev_rx_lost[i]);
      n_bus_err += int'(bus_err[i]);
      if (ev_rx_pkt[i] && ev_tx_pkt[i]) n_reuse++;
      for (int t = 0; t < 4; t++) n_dst_irq += $countones(usr_dst_irq[i][t]);
    end
  end

  // LIMIT observation at station 1 (class I); sampled mid-clock so that the
  // combinational decision signals are settled
  always @(negedge clk) if (rst_n) begin
    if (dut.g_st[1].u_station.u_iob.head) begin
      if (dut.g_st[1].u_station.u_iob.new_cycle) cyc_sent = 0;
      if (dut.g_st[1].u_station.u_iob.do_tx && dut.g_st[1].u_station.u_iob.tx_class == 2'd0)
        cyc_sent++;
      if (cyc_sent > max_cyc_sent) max_cyc_sent = cyc_sent;
      if (dut.g_st[1].u_station.u_iob.empty_now &&
          dut.g_st[1].u_station.u_iob.w0.mac.ac[0] &&
          dut.g_st[1].u_station.u_iob.ob_avail[0] &&
          !dut.g_st[1].u_station.u_iob.can_send[0])
        n_limit_hold++;
    end
  end

  // ---------------- bus helpers ----------------
  typedef logic [15:0] pkt_t [64];

  task automatic cfg(input int s, input logic [11:0] a, input logic [15:0] d);
    cfg_station = 8'(s); cfg_we = 1; cfg_addr = a; cfg_wdata = d;
    @(posedge clk); #1; cfg_we = 0;
  endtask

  task automatic bus_put(input int s, input int u, input int tgt, input pkt_t p,
                         input bit with_dst);
    int nw;
    nw = int'(size_words(p[0][1:0]));
    usr_bus_req[s][u] = 1;
    do @(posedge clk); while (!usr_bus_gnt[s][u]);
    #1;
    if (with_dst) begin
      usr_dst_req[s][tgt][u] = 1;
      do @(posedge clk); while (!usr_dst_gnt[s][tgt][u]);
      #1;
      usr_dst_req[s][tgt][u] = 0;
    end
    for (int w = 0; w < nw; w += 2) begin
      bus_valid[s] = 1; bus_target[s] = 3'(tgt); bus_last[s] = (w + 2 >= nw);
      bus_wdata[s] = {p[w], p[w+1]};
      @(posedge clk); #1;
    end
    bus_valid[s] = 0; bus_last[s] = 0;
    usr_bus_req[s][u] = 0;
    @(posedge clk); #1;
  endtask

  // reads one packet; its length comes from the SIZE field of word 0
  task automatic bus_get(input int s, input int u, input int tgt, output pkt_t p);
    int nw;
    usr_bus_req[s][u] = 1;
    do @(posedge clk); while (!usr_bus_gnt[s][u]);
    #1;
    p = '{default: 16'h0};
    nw = 2;
    for (int w = 0; w < nw; w += 2) begin
      bus_valid[s] = 1; bus_target[s] = 3'(tgt); bus_last[s] = 0;
      #1; {p[w], p[w+1]} = bus_rdata[s];
      if (w == 0) nw = int'(size_words(p[0][1:0]));
      bus_last[s] = (w + 2 >= nw);
      @(posedge clk); #1;
    end
    bus_valid[s] = 0; bus_last[s] = 0;
    usr_bus_req[s][u] = 0;
    @(posedge clk); #1;
  endtask

  function automatic pkt_t mkpkt(input logic [1:0] mode, input logic [1:0] size,
      input logic [7:0] route, input logic [7:0] dest, input logic [7:0] src);
    pkt_t p;
    for (int w = 0; w < 64; w++) p[w] = 16'($urandom);
    p[0] = {SYNC_PATTERN, 8'h00, mode, size};
    p[1] = {route, dest};
    p[2] = {src, 8'h00};
    return p;
  endfunction

  function automatic bit same(input pkt_t a, input pkt_t b);
    int nw;
    nw = int'(size_words(a[0][1:0]));
    if (a[0][3:0] != b[0][3:0]) return 0;
    for (int w = 1; w < nw; w++) if (a[w] != b[w]) return 0;
    return 1;
  endfunction

  task automatic wait_cells(input int n);
    repeat (n * CELL_BITS) @(posedge clk);
  endtask

  // ---------------- watchdog ----------------
  initial begin
    #20000000;
    $display("FAIL: watchdog");
    for (int i = 0; i < N; i++)
      $display("st%0d rx=%0d tx=%0d lost=%0d ib=%0d ob=%0d/%0d/%0d avail=%b", i, n_rx[i], n_tx[i], n_lost[i],
               iob_count[i][0], iob_count[i][1], iob_count[i][2], iob_count[i][3], ib_avail[i]);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- test sequence ----------------
  initial begin
    pkt_t p, q, a [8], b [8];
    bit ok;
    int d0, cnt;
    for (int i = 0; i < N; i++) begin
      usr_bus_req[i] = '0; bus_valid[i] = 0; bus_last[i] = 0; bus_target[i] = 0;
      bus_wdata[i] = 0; hou_rd_addr[i] = 0; n_rx[i] = 0; n_tx[i] = 0; n_lost[i] = 0;
      for (int t = 0; t < 4; t++) usr_dst_req[i][t] = '0;
    end
    repeat (3) @(posedge clk); #1 rst_n = 1;

    fork
      begin
        for (int i = 0; i < N; i++) wait (locked[i]);
      end
      wait_cells(40);
    join_any
    disable fork;
    ok = 1;
    for (int i = 0; i < N; i++) if (!locked[i]) ok = 0;
    check(ok == 1, "all stations locked");

    // 1. delivery: 1 -> 3, class I, and a refused write without grant
    p = mkpkt(MODE_DG, SZ_512, 8'd3, 8'd3, 8'd1);
    bus_put(1, 2, 1, p, 0);
    check(n_bus_err > 0, "write without destination grant refused");
    bus_put(1, 0, 0, p, 1);
    wait (ib_avail[3][0]);
    bus_get(3, 0, 4, q);
    check(same(p, q), "unicast packet 1->3 delivered intact");
    if (same(p, q)) n_delivery++;

    // 2. multicast from 2 to group 5, enabled at stations 1 and 3
    cfg(1, 12'h005, 16'd1);
    cfg(3, 12'h005, 16'd1);
    d0 = n_discard;
    p = mkpkt(MODE_MC, SZ_256, 8'd5, 8'd5, 8'd2);
    bus_put(2, 1, 1, p, 1);
    wait (ib_avail[1][0] && ib_avail[3][0]);
    bus_get(1, 0, 4, q); ok = same(p, q);
    bus_get(3, 0, 4, q); ok = ok && same(p, q);
    check(ok == 1, "multicast received by both members");
    if (ok) n_multicast++;
    wait_cells(12);
    check(n_discard == d0, "multicast packet removed by its source, not discarded");
    if (n_discard == d0 && ok) n_source_rm++;

    // 3. destination-scheduler queueing with interrupt at station 3
    usr_dst_req[3][0][0] = 1; usr_dst_req[3][0][1] = 1;
    do @(posedge clk); while (!usr_dst_gnt[3][0][0]);
    #1 usr_dst_req[3][0][0] = 0;
    fork
      begin
        p = mkpkt(MODE_DG, SZ_128, 8'd1, 8'd1, 8'd3);
        bus_put(3, 0, 0, p, 0);
      end
      begin
        do @(posedge clk); while (!usr_dst_gnt[3][0][1]);
        #1 usr_dst_req[3][0][1] = 0;
        q = mkpkt(MODE_DG, SZ_128, 8'd1, 8'd1, 8'd3);
        bus_put(3, 1, 0, q, 0);
      end
    join
    check(n_dst_irq > 0, "queued user granted with interrupt");
    cnt = 0;
    while (cnt < 2) begin
      wait (ib_avail[1][0]);
      bus_get(1, 0, 4, b[cnt]);
      cnt++;
    end
    check(same(b[0], p) && same(b[1], q), "queued writes delivered in order");

    // 4. reuse: 1 and 3 exchange packets in both directions
    for (int k = 0; k < 6; k++) begin
      a[k] = mkpkt(MODE_DG, SZ_1024, 8'd3, 8'd3, 8'd1);
      b[k] = mkpkt(MODE_DG, SZ_1024, 8'd1, 8'd1, 8'd3);
    end
    fork
      for (int k = 0; k < 6; k++) bus_put(1, 1, 0, a[k], 1);
      for (int k = 0; k < 6; k++) bus_put(3, 1, 0, b[k], 1);
    join
    ok = 1;
    fork
      for (int k = 0; k < 6; k++) begin
        pkt_t r;
        wait (ib_avail[3][0]);
        bus_get(3, 2, 4, r);
        if (!same(r, a[k])) ok = 0;
      end
      for (int k = 0; k < 6; k++) begin
        pkt_t r;
        wait (ib_avail[1][0]);
        bus_get(1, 2, 4, r);
        if (!same(r, b[k])) ok = 0;
      end
    join
    check(ok == 1, "bidirectional traffic delivered in order");
    if (ok) n_delivery++;

    // 5. LIMIT I = 1 at station 1, several class-I packets queued
    cfg(1, 12'h100, 16'd1);
    max_cyc_sent = 0; cyc_sent = 0;
    for (int k = 0; k < 5; k++) begin
      a[k] = mkpkt(MODE_DG, SZ_128, 8'd2, 8'd2, 8'd1);
      bus_put(1, 3, 0, a[k], 1);
    end
    ok = 1;
    for (int k = 0; k < 5; k++) begin
      wait (ib_avail[2][0]);
      bus_get(2, 0, 4, q);
      if (!same(q, a[k])) ok = 0;
    end
    check(ok == 1, "LIMIT-paced packets delivered");
    check(max_cyc_sent <= 1, "no more than LIMIT packets per cycle");
    cfg(1, 12'h100, 16'h100);

    // 6. discard: packet for an absent address
    d0 = n_discard;
    p = mkpkt(MODE_DG, SZ_128, 8'd200, 8'd200, 8'd2);
    bus_put(2, 0, 2, p, 1);
    wait_cells(12);
    check(n_discard > d0, "unremoved packet discarded by the Cell Generator");

    // 7. link 1 -> 2: Router Output Buffer of 1, DG table of 2 maps 0x40 -> 0x02
    cfg(2, 12'h440, 16'h0002);
    p = mkpkt(MODE_DG, SZ_1024, 8'h40, 8'h00, 8'h00);
    bus_put(1, 0, 3, p, 1);
    wait (ib_avail[2][1]);
    bus_get(2, 0, 5, q);
    ok = (q[1] == 16'h4002) && (q[2][15:8] == 8'd2) && (q[0] == p[0]);
    for (int w = 3; w < 64; w++) if (q[w] != p[w]) ok = 0;
    check(ok == 1, "link packet translated and intact");
    if (ok) n_link++;

    // 8. Input Buffer loss at station 3: 20 packets, never read until the end
    for (int k = 0; k < 10; k++) begin
      p = mkpkt(MODE_DG, SZ_128, 8'd3, 8'd3, 8'd1);
      bus_put(1, 0, 0, p, 1);
      p = mkpkt(MODE_DG, SZ_128, 8'd3, 8'd3, 8'd2);
      bus_put(2, 0, 1, p, 1);
    end
    wait_cells(60);
    check(n_lost[3] > 0 && iob_count[3][0] == 5'd16, "full Input Buffer loses packets");
    cnt = 0;
    while (ib_avail[3][0]) begin bus_get(3, 0, 4, q); cnt++; end
    check(cnt == 16, "16 packets held by the Input Buffer");

    // 9. HOU
    n_hou = 0;
    for (int i = 0; i < N; i++) if (hou_rec_count[i] > 0) n_hou++;

    // ---------------- mechanism tally ----------------
    check(n_delivery   > 0, "mechanism delivery");
    check(n_multicast  > 0, "mechanism multicast");
    check(n_source_rm  > 0, "mechanism source removal");
    check(n_reuse      > 0, "mechanism cell reuse");
    check(n_limit_hold > 0, "mechanism LIMIT hold-off");
    check(n_boundary   > 0, "mechanism moveable boundary");
    check(n_transfer   > 0, "mechanism Cell Generator transfer");
    check(n_discard    > 0, "mechanism Cell Generator discard");
    check(n_ib_loss    > 0, "mechanism Input Buffer loss");
    check(n_link       > 0, "mechanism T3 link with translation");
    check(n_bus_err    > 0, "mechanism bus refusal");
    check(n_dst_irq    > 0, "mechanism destination interrupt");
    check(n_hou == N,       "mechanism HOU records");
    $display("mechanisms: delivery=%0d multicast=%0d source_rm=%0d reuse=%0d limit_hold=%0d boundary=%0d transfer=%0d discard=%0d ib_loss=%0d link=%0d bus_err=%0d dst_irq=%0d hou=%0d",
             n_delivery, n_multicast, n_source_rm, n_reuse, n_limit_hold, n_boundary,
             n_transfer, n_discard, n_ib_loss, n_link, n_bus_err, n_dst_irq, n_hou);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
