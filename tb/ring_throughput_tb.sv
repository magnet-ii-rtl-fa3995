// ring_throughput_tb: destination-removal throughput of a four-station
// ring at the default parameters. Every station keeps its three class Output
// Buffers supplied with full-size (1024-bit) packets for uniformly random
// other stations, while a second bus user drains its Input Buffer. Because a
// cell freed at a packet's destination can be refilled there, one cell can
// carry several packets per trip round the ring; with uniform destinations
// among four stations the mean path is two of four hops, so the delivered
// packets per generated cell should approach two.
//
// Checks: every packet arrives intact and exactly once (classes may overtake
// each other, so no order is expected across them), nothing is
// discarded or lost, and the measured packets per cell exceed 1.5 (the bound
// for this pattern is 2). The measured figure is printed.
module ring_throughput_tb;
  import magnet_pkg::*;
  localparam int N = 4, NU = 4;
  localparam int WARM_CELLS = 30, RUN_CELLS = 300;
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

  int n_rx_win = 0, n_cells_win = 0, n_discard = 0, n_lost = 0;
  bit measuring = 0;
  always @(posedge clk) if (rst_n) begin
    n_discard += int'(ev_cg_discard);
    for (int i = 0; i < N; i++) begin
      n_lost += int'(ev_rx_lost[i]);
      if (measuring) n_rx_win += int'(ev_rx_pkt[i]);
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

  // payload word w of packet number seq from station s
  function automatic logic [15:0] pattern(input int s, input int seq, input int w);
    return 16'((s * 40503 + seq * 977 + w * 131) ^ (seq << 7));
  endfunction

  int sent [N][N], rcvd [N][N];
  bit seen [N][N][int];   // sequence numbers received per source and destination
  bit stop = 0;

  task automatic writer(input int s);
    pkt_t p;
    int d, c, seq;
    seq = 0;
    while (!stop) begin
      d = (s + 1 + int'($urandom_range(0, N - 2))) % N;
      c = int'($urandom_range(0, 2));
      if (ob_full[s][c]) begin
        @(posedge clk); #1;
        continue;
      end
      for (int w = 0; w < 64; w++) p[w] = pattern(s, sent[s][d], w);
      p[0] = {SYNC_PATTERN, 8'h00, MODE_DG, SZ_1024};
      p[1] = {8'(d), 8'(d)};
      p[2] = {8'(s), 2'(c), 6'h0};
      p[3] = 16'(sent[s][d]);
      sent[s][d]++;
      seq++;
      bus_put(s, 0, c, p, 1);
    end
  endtask

  task automatic reader(input int s);
    pkt_t q;
    int src, n;
    bit ok;
    forever begin
      wait (ib_avail[s][0]);
      bus_get(s, 1, 4, q);
      src = int'(q[2][15:8]);
      ok = (src < N) && (q[1][7:0] == 8'(s));
      if (ok) begin
        n = int'(q[3]);
        ok = (n < sent[src][s]) && !seen[src][s][n];
        for (int w = 4; w < 64; w++) if (q[w] != pattern(src, n, w)) ok = 0;
        if (ok) begin seen[src][s][n] = 1; rcvd[src][s]++; end
      end
      check(ok, $sformatf("packet at station %0d from %0d intact and new", s, src));
    end
  endtask

  initial begin
    #40000000;
    $display("FAIL: watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int total_sent, total_rcvd;
    real per_cell;
    for (int i = 0; i < N; i++) begin
      usr_bus_req[i] = '0; bus_valid[i] = 0; bus_last[i] = 0; bus_target[i] = 0;
      bus_wdata[i] = 0; hou_rd_addr[i] = 0;
      for (int t = 0; t < 4; t++) usr_dst_req[i][t] = '0;
      for (int j = 0; j < N; j++) begin sent[i][j] = 0; rcvd[i][j] = 0; end
    end
    repeat (3) @(posedge clk); #1 rst_n = 1;
    for (int i = 0; i < N; i++) wait (locked[i]);
    fork
      writer(0); writer(1); writer(2); writer(3);
      reader(0); reader(1); reader(2); reader(3);
    join_none
    repeat (WARM_CELLS * CELL_BITS) @(posedge clk);
    measuring = 1;
    repeat (RUN_CELLS * CELL_BITS) @(posedge clk);
    measuring = 0;
    stop = 1;
    for (int k = 0; k < 300; k++) begin
      repeat (CELL_BITS) @(posedge clk);
      total_sent = 0; total_rcvd = 0;
      for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) begin
        total_sent += sent[i][j]; total_rcvd += rcvd[i][j];
      end
      if (total_rcvd == total_sent) break;
    end
    per_cell = real'(n_rx_win) / real'(RUN_CELLS);
    $display("delivered %0d packets in %0d cells: %f packets per cell", n_rx_win, RUN_CELLS, per_cell);
    check(total_rcvd == total_sent, $sformatf("all %0d packets delivered (got %0d)", total_sent, total_rcvd));
    check(n_discard == 0, "no packet discarded by the Headend");
    check(n_lost == 0, "no packet lost");
    check(per_cell > 1.5, "throughput above 1.5 packets per cell");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
