// mesh_tb: two switching nodes (A and B, four stations each, default
// parameters) joined by one T3 link between station 1 of A and station 2 of
// B. A datagram crosses both rings and the link:
//   A.2 --ring A--> A.1 --(bus user forwards to the Router)--> T3 link
//   --> B.2 Router: the DG table maps the final destination 0x33 to the
//   next destination 3 and the source becomes 2 --(bus user forwards into
//   the IOB Output Buffer of the packet's class)--> ring B --> B.3
// Checks that the packet reaches B.3 intact with the translated header and
// that the link and the Headend of ring A (which the packet passes on its
// way from A.2 to A.1) took part.
module mesh_tb;
  import magnet_pkg::*;
  localparam int N = 4, NU = 4;
  logic clk = 0, rst_n = 0, t3_bit_en = 0;
  always #5 clk = ~clk;
  always @(posedge clk) t3_bit_en <= ~t3_bit_en;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic cfg_we_a = 0;
  logic [7:0] cfg_station_a = 0; logic [11:0] cfg_addr_a = 0; logic [15:0] cfg_wdata_a = 0;
  logic [NU-1:0] usr_bus_req_a [N], usr_bus_gnt_a [N];
  logic [NU-1:0] usr_dst_req_a [N][4], usr_dst_gnt_a [N][4], usr_dst_irq_a [N][4];
  logic bus_valid_a [N], bus_last_a [N], bus_err_a [N];
  logic [2:0] bus_target_a [N];
  logic [31:0] bus_wdata_a [N], bus_rdata_a [N];
  logic [3:0] ob_full_a [N]; logic [1:0] ib_avail_a [N];
  logic t3_tx_bit_a [N], t3_tx_sf_start_a [N], t3_rx_bit_a [N], t3_rx_sf_start_a [N];
  logic [9:0] hou_rd_addr_a [N]; logic [63:0] hou_rd_data_a [N]; logic [31:0] hou_rec_count_a [N];
  logic locked_a [N], ev_rx_pkt_a [N], ev_tx_pkt_a [N], ev_rx_lost_a [N];
  logic ev_link_tx_a [N], ev_link_rx_a [N], ev_link_lost_a [N];
  logic [4:0] iob_count_a [N][4];
  logic ev_cg_transfer_a, ev_cg_discard_a, ev_cg_boundary_a;

  logic cfg_we_b = 0;
  logic [7:0] cfg_station_b = 0; logic [11:0] cfg_addr_b = 0; logic [15:0] cfg_wdata_b = 0;
  logic [NU-1:0] usr_bus_req_b [N], usr_bus_gnt_b [N];
  logic [NU-1:0] usr_dst_req_b [N][4], usr_dst_gnt_b [N][4], usr_dst_irq_b [N][4];
  logic bus_valid_b [N], bus_last_b [N], bus_err_b [N];
  logic [2:0] bus_target_b [N];
  logic [31:0] bus_wdata_b [N], bus_rdata_b [N];
  logic [3:0] ob_full_b [N]; logic [1:0] ib_avail_b [N];
  logic t3_tx_bit_b [N], t3_tx_sf_start_b [N], t3_rx_bit_b [N], t3_rx_sf_start_b [N];
  logic [9:0] hou_rd_addr_b [N]; logic [63:0] hou_rd_data_b [N]; logic [31:0] hou_rec_count_b [N];
  logic locked_b [N], ev_rx_pkt_b [N], ev_tx_pkt_b [N], ev_rx_lost_b [N];
  logic ev_link_tx_b [N], ev_link_rx_b [N], ev_link_lost_b [N];
  logic [4:0] iob_count_b [N][4];
  logic ev_cg_transfer_b, ev_cg_discard_b, ev_cg_boundary_b;


  magnet_node node_a (.clk, .rst_n, .t3_bit_en, .cfg_we(cfg_we_a), .cfg_station(cfg_station_a), .cfg_addr(cfg_addr_a), .cfg_wdata(cfg_wdata_a), .usr_bus_req(usr_bus_req_a), .usr_bus_gnt(usr_bus_gnt_a), .usr_dst_req(usr_dst_req_a), .usr_dst_gnt(usr_dst_gnt_a), .usr_dst_irq(usr_dst_irq_a), .bus_valid(bus_valid_a), .bus_last(bus_last_a), .bus_err(bus_err_a), .bus_target(bus_target_a), .bus_wdata(bus_wdata_a), .bus_rdata(bus_rdata_a), .ob_full(ob_full_a), .ib_avail(ib_avail_a), .t3_tx_bit(t3_tx_bit_a), .t3_tx_sf_start(t3_tx_sf_start_a), .t3_rx_bit(t3_rx_bit_a), .t3_rx_sf_start(t3_rx_sf_start_a), .hou_rd_addr(hou_rd_addr_a), .hou_rd_data(hou_rd_data_a), .hou_rec_count(hou_rec_count_a), .locked(locked_a), .ev_rx_pkt(ev_rx_pkt_a), .ev_tx_pkt(ev_tx_pkt_a), .ev_rx_lost(ev_rx_lost_a), .ev_link_tx(ev_link_tx_a), .ev_link_rx(ev_link_rx_a), .ev_link_lost(ev_link_lost_a), .iob_count(iob_count_a), .ev_cg_transfer(ev_cg_transfer_a), .ev_cg_discard(ev_cg_discard_a), .ev_cg_boundary(ev_cg_boundary_a));
  magnet_node node_b (.clk, .rst_n, .t3_bit_en, .cfg_we(cfg_we_b), .cfg_station(cfg_station_b), .cfg_addr(cfg_addr_b), .cfg_wdata(cfg_wdata_b), .usr_bus_req(usr_bus_req_b), .usr_bus_gnt(usr_bus_gnt_b), .usr_dst_req(usr_dst_req_b), .usr_dst_gnt(usr_dst_gnt_b), .usr_dst_irq(usr_dst_irq_b), .bus_valid(bus_valid_b), .bus_last(bus_last_b), .bus_err(bus_err_b), .bus_target(bus_target_b), .bus_wdata(bus_wdata_b), .bus_rdata(bus_rdata_b), .ob_full(ob_full_b), .ib_avail(ib_avail_b), .t3_tx_bit(t3_tx_bit_b), .t3_tx_sf_start(t3_tx_sf_start_b), .t3_rx_bit(t3_rx_bit_b), .t3_rx_sf_start(t3_rx_sf_start_b), .hou_rd_addr(hou_rd_addr_b), .hou_rd_data(hou_rd_data_b), .hou_rec_count(hou_rec_count_b), .locked(locked_b), .ev_rx_pkt(ev_rx_pkt_b), .ev_tx_pkt(ev_tx_pkt_b), .ev_rx_lost(ev_rx_lost_b), .ev_link_tx(ev_link_tx_b), .ev_link_rx(ev_link_rx_b), .ev_link_lost(ev_link_lost_b), .iob_count(iob_count_b), .ev_cg_transfer(ev_cg_transfer_b), .ev_cg_discard(ev_cg_discard_b), .ev_cg_boundary(ev_cg_boundary_b));

  // T3 link A.1 <-> B.2; the other lines idle
  always_comb begin
    for (int i = 0; i < N; i++) begin
      t3_rx_bit_a[i] = 1'b0; t3_rx_sf_start_a[i] = 1'b0;
      t3_rx_bit_b[i] = 1'b0; t3_rx_sf_start_b[i] = 1'b0;
    end
    t3_rx_bit_b[2] = t3_tx_bit_a[1]; t3_rx_sf_start_b[2] = t3_tx_sf_start_a[1];
    t3_rx_bit_a[1] = t3_tx_bit_b[2]; t3_rx_sf_start_a[1] = t3_tx_sf_start_b[2];
  end

  typedef logic [15:0] pkt_t [64];
  task automatic cfg_a(input int s, input logic [11:0] a, input logic [15:0] d);
    cfg_station_a = 8'(s); cfg_we_a = 1; cfg_addr_a = a; cfg_wdata_a = d;
    @(posedge clk); #1; cfg_we_a = 0;
  endtask

  task automatic cfg_b(input int s, input logic [11:0] a, input logic [15:0] d);
    cfg_station_b = 8'(s); cfg_we_b = 1; cfg_addr_b = a; cfg_wdata_b = d;
    @(posedge clk); #1; cfg_we_b = 0;
  endtask

  task automatic bus_put_a(input int s, input int u, input int tgt, input pkt_t p,
                         input bit with_dst);
    int nw;
    nw = int'(size_words(p[0][1:0]));
    usr_bus_req_a[s][u] = 1;
    do @(posedge clk); while (!usr_bus_gnt_a[s][u]);
    #1;
    if (with_dst) begin
      usr_dst_req_a[s][tgt][u] = 1;
      do @(posedge clk); while (!usr_dst_gnt_a[s][tgt][u]);
      #1;
      usr_dst_req_a[s][tgt][u] = 0;
    end
    for (int w = 0; w < nw; w += 2) begin
      bus_valid_a[s] = 1; bus_target_a[s] = 3'(tgt); bus_last_a[s] = (w + 2 >= nw);
      bus_wdata_a[s] = {p[w], p[w+1]};
      @(posedge clk); #1;
    end
    bus_valid_a[s] = 0; bus_last_a[s] = 0;
    usr_bus_req_a[s][u] = 0;
    @(posedge clk); #1;
  endtask

  // reads one packet; its length comes from the SIZE field of word 0
  task automatic bus_get_a(input int s, input int u, input int tgt, output pkt_t p);
    int nw;
    usr_bus_req_a[s][u] = 1;
    do @(posedge clk); while (!usr_bus_gnt_a[s][u]);
    #1;
    p = '{default: 16'h0};
    nw = 2;
    for (int w = 0; w < nw; w += 2) begin
      bus_valid_a[s] = 1; bus_target_a[s] = 3'(tgt); bus_last_a[s] = 0;
      #1; {p[w], p[w+1]} = bus_rdata_a[s];
      if (w == 0) nw = int'(size_words(p[0][1:0]));
      bus_last_a[s] = (w + 2 >= nw);
      @(posedge clk); #1;
    end
    bus_valid_a[s] = 0; bus_last_a[s] = 0;
    usr_bus_req_a[s][u] = 0;
    @(posedge clk); #1;
  endtask

  task automatic bus_put_b(input int s, input int u, input int tgt, input pkt_t p,
                         input bit with_dst);
    int nw;
    nw = int'(size_words(p[0][1:0]));
    usr_bus_req_b[s][u] = 1;
    do @(posedge clk); while (!usr_bus_gnt_b[s][u]);
    #1;
    if (with_dst) begin
      usr_dst_req_b[s][tgt][u] = 1;
      do @(posedge clk); while (!usr_dst_gnt_b[s][tgt][u]);
      #1;
      usr_dst_req_b[s][tgt][u] = 0;
    end
    for (int w = 0; w < nw; w += 2) begin
      bus_valid_b[s] = 1; bus_target_b[s] = 3'(tgt); bus_last_b[s] = (w + 2 >= nw);
      bus_wdata_b[s] = {p[w], p[w+1]};
      @(posedge clk); #1;
    end
    bus_valid_b[s] = 0; bus_last_b[s] = 0;
    usr_bus_req_b[s][u] = 0;
    @(posedge clk); #1;
  endtask

  // reads one packet; its length comes from the SIZE field of word 0
  task automatic bus_get_b(input int s, input int u, input int tgt, output pkt_t p);
    int nw;
    usr_bus_req_b[s][u] = 1;
    do @(posedge clk); while (!usr_bus_gnt_b[s][u]);
    #1;
    p = '{default: 16'h0};
    nw = 2;
    for (int w = 0; w < nw; w += 2) begin
      bus_valid_b[s] = 1; bus_target_b[s] = 3'(tgt); bus_last_b[s] = 0;
      #1; {p[w], p[w+1]} = bus_rdata_b[s];
      if (w == 0) nw = int'(size_words(p[0][1:0]));
      bus_last_b[s] = (w + 2 >= nw);
      @(posedge clk); #1;
    end
    bus_valid_b[s] = 0; bus_last_b[s] = 0;
    usr_bus_req_b[s][u] = 0;
    @(posedge clk); #1;
  endtask


  int n_xfer_a = 0, n_link = 0;
  always @(posedge clk) if (rst_n) begin
    n_xfer_a += int'(ev_cg_transfer_a);
    n_link   += int'(ev_link_rx_b[2]);
  end

  initial begin
    #20000000;
    $display("FAIL: watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pkt_t p, q, r;
    bit ok;
    for (int i = 0; i < N; i++) begin
      usr_bus_req_a[i] = '0; bus_valid_a[i] = 0; bus_last_a[i] = 0; bus_target_a[i] = 0;
      bus_wdata_a[i] = 0; hou_rd_addr_a[i] = 0;
      usr_bus_req_b[i] = '0; bus_valid_b[i] = 0; bus_last_b[i] = 0; bus_target_b[i] = 0;
      bus_wdata_b[i] = 0; hou_rd_addr_b[i] = 0;
      for (int t = 0; t < 4; t++) begin usr_dst_req_a[i][t] = '0; usr_dst_req_b[i][t] = '0; end
    end
    cfg_we_a = 0; cfg_we_b = 0; cfg_station_a = 0; cfg_station_b = 0;
    cfg_addr_a = 0; cfg_addr_b = 0; cfg_wdata_a = 0; cfg_wdata_b = 0;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    for (int i = 0; i < N; i++) begin wait (locked_a[i]); wait (locked_b[i]); end
    cfg_b(2, 12'h433, 16'h0003);          // node B, station 2: DG 0x33 -> station 3

    // source at A.2: class II datagram, ring destination A.1, final 0x33
    for (int w = 0; w < 64; w++) p[w] = 16'($urandom);
    p[0] = {SYNC_PATTERN, 8'h00, MODE_DG, SZ_1024};
    p[1] = {8'h33, 8'd1};
    p[2] = {8'd2, 2'd1, 6'h0};
    bus_put_a(2, 0, 1, p, 1);

    // A.1: forward from the IOB Input Buffer to the Router Output Buffer
    wait (ib_avail_a[1][0]);
    bus_get_a(1, 0, 4, q);
    check(q[1] == p[1] && q[2] == p[2], "A.1 received the packet from ring A");
    bus_put_a(1, 0, 3, q, 1);

    // B.2: forward from the Router Input Buffer into the class Output Buffer
    wait (ib_avail_b[2][1]);
    bus_get_b(2, 0, 5, r);
    check(r[1] == {8'h33, 8'h03} && r[2][15:8] == 8'd2, "B.2 Router translated the header");
    bus_put_b(2, 0, int'(r[2][7:6]), r, 1);

    // B.3: final delivery
    wait (ib_avail_b[3][0]);
    bus_get_b(3, 0, 4, q);
    ok = (q[0][3:0] == p[0][3:0]) && (q[1] == {8'h33, 8'h03}) && (q[2] == {8'd2, 2'd1, 6'h0});
    for (int w = 3; w < 64; w++) if (q[w] != p[w]) ok = 0;
    check(ok, "packet delivered at B.3 intact with the translated header");
    check(n_link == 1, "one packet crossed the link");
    check(n_xfer_a > 0, "Headend of ring A transferred the packet (A.2 to A.1 passes it)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
