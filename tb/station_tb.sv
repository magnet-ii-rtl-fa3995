// station_tb: a Headend Station whose ring output is looped to its own ring
// input and whose T3 output is looped to its own T3 input. Checks:
//  * the MIU locks onto the Cell Generator's cells;
//  * a class-I packet addressed to the station itself, written over the bus
//    after bus and destination grants, is inserted, passes the Cell
//    Generator once (transfer), comes back, and is received intact;
//  * a packet for an absent station comes back with T=1 and is discarded;
//  * a write to an Output Buffer without its destination grant is refused;
//  * unused cells move the subcycle boundary;
//  * a packet written to the Router Output Buffer crosses the T3 loop and
//    arrives in the Router Input Buffer with a translated header;
//  * the HOU writes I-Records.
module station_tb;
  import magnet_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  localparam int NU = 2;
  logic t3_bit_en = 0, ring, cfg_we = 0;
  logic [11:0] cfg_addr = 0; logic [15:0] cfg_wdata = 0;
  logic [NU-1:0] usr_bus_req = 0, usr_bus_gnt;
  logic [NU-1:0] usr_dst_req [4], usr_dst_gnt [4], usr_dst_irq [4];
  logic bus_valid = 0, bus_last = 0, bus_err;
  logic [2:0] bus_target = 0;
  logic [31:0] bus_wdata = 0, bus_rdata;
  logic [3:0] ob_full; logic [1:0] ib_avail;
  logic t3_bit, t3_sf;
  logic [9:0] hou_rd_addr = 0; logic [63:0] hou_rd_data; logic [31:0] hou_rec_count;
  logic locked, ev_rx_pkt, ev_tx_pkt, ev_rx_lost, ev_cg_transfer, ev_cg_discard, ev_cg_boundary;
  logic ev_link_tx, ev_link_rx, ev_link_lost;
  logic [4:0] iob_count [4];

  station #(.IS_HEADEND(1'b1), .ADDR(8'd0), .N_USERS(NU)) dut (
    .clk, .rst_n, .t3_bit_en, .ring_in(ring), .ring_out(ring),
    .cfg_we, .cfg_addr, .cfg_wdata, .usr_bus_req, .usr_bus_gnt, .usr_dst_req, .usr_dst_gnt,
    .usr_dst_irq, .bus_valid, .bus_target, .bus_last, .bus_wdata, .bus_rdata, .bus_err,
    .ob_full, .ib_avail, .t3_tx_bit(t3_bit), .t3_tx_sf_start(t3_sf), .t3_rx_bit(t3_bit),
    .t3_rx_sf_start(t3_sf), .hou_rd_addr, .hou_rd_data, .hou_rec_count, .locked,
    .ev_rx_pkt, .ev_tx_pkt, .ev_rx_lost, .ev_cg_transfer, .ev_cg_discard, .ev_cg_boundary,
    .ev_link_tx, .ev_link_rx, .ev_link_lost, .iob_count);

  always @(posedge clk) t3_bit_en <= ~t3_bit_en;

  int n_rx = 0, n_tx = 0, n_transfer = 0, n_discard = 0, n_bound = 0, n_err = 0, n_ltx = 0, n_lrx = 0;
  always @(posedge clk) if (rst_n) begin
    n_rx += int'(ev_rx_pkt); n_tx += int'(ev_tx_pkt); n_transfer += int'(ev_cg_transfer);
    n_discard += int'(ev_cg_discard); n_bound += int'(ev_cg_boundary); n_err += int'(bus_err);
    n_ltx += int'(ev_link_tx); n_lrx += int'(ev_link_rx);
  end

  typedef logic [15:0] pkt_t [64];

  task automatic cfg(input logic [11:0] a, input logic [15:0] d);
    cfg_we = 1; cfg_addr = a; cfg_wdata = d; @(posedge clk); #1; cfg_we = 0;
  endtask

  task automatic bus_put(input int u, input int tgt, input pkt_t p, input int nwords16,
                         input bit with_dst);
    usr_bus_req[u] = 1;
    do @(posedge clk); while (!usr_bus_gnt[u]);
    #1;
    if (with_dst) begin
      usr_dst_req[tgt][u] = 1;
      do @(posedge clk); while (!usr_dst_gnt[tgt][u]);
      #1;
      usr_dst_req[tgt][u] = 0;
    end
    for (int w = 0; w < nwords16; w += 2) begin
      bus_valid = 1; bus_target = 3'(tgt); bus_last = (w + 2 >= nwords16);
      bus_wdata = {p[w], p[w+1]};
      @(posedge clk); #1;
    end
    bus_valid = 0; bus_last = 0;
    usr_bus_req[u] = 0;
    @(posedge clk); #1;
  endtask

  task automatic bus_get(input int u, input int tgt, input int nwords16, output pkt_t p);
    usr_bus_req[u] = 1;
    do @(posedge clk); while (!usr_bus_gnt[u]);
    #1;
    p = '{default: 16'h0};
    for (int w = 0; w < nwords16; w += 2) begin
      bus_valid = 1; bus_target = 3'(tgt); bus_last = (w + 2 >= nwords16);
      #1; {p[w], p[w+1]} = bus_rdata;
      @(posedge clk); #1;
    end
    bus_valid = 0; bus_last = 0;
    usr_bus_req[u] = 0;
    @(posedge clk); #1;
  endtask

  function automatic pkt_t mkpkt(input logic [1:0] mode, input logic [1:0] size,
      input logic [7:0] route, input logic [7:0] dest, input logic [7:0] src, input int seed);
    pkt_t p;
    for (int w = 0; w < 64; w++) p[w] = 16'(seed * 1013 + w * 37);
    p[0] = {SYNC_PATTERN, 8'h00, mode, size};
    p[1] = {route, dest};
    p[2] = {src, 2'd0, 6'h0};
    return p;
  endfunction

  initial begin
    #400000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pkt_t p, q, r;
    bit ok;
    for (int t = 0; t < 4; t++) usr_dst_req[t] = '0;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    wait (locked);
    check(locked, "MIU locked on the Cell Generator's cells");
    cfg(12'h110, 16'd2); cfg(12'h111, 16'd3); cfg(12'h112, 16'd5);

    // refused write: no destination grant
    p = mkpkt(MODE_DG, SZ_128, 8'd0, 8'd0, 8'd0, 1);
    bus_put(1, 0, p, 8, 0);
    check(n_err > 0 && iob_count[1] == 0, "write without destination grant refused");

    // packet to itself
    n_err = 0;
    bus_put(0, 0, p, 8, 1);
    check(n_err == 0, "granted write accepted");
    wait (ib_avail[0]);
    bus_get(1, 4, 8, q);
    ok = 1;
    for (int w = 1; w < 8; w++) if (q[w] != p[w]) ok = 0;
    check(ok && q[0][3:0] == p[0][3:0], "self-addressed packet received intact");
    check(q[0][6:4] == 3'b111, "it was carried in a transfer cell (BC=BR=T=1)");
    check(n_transfer >= 1 && n_tx >= 1 && n_rx >= 1, "transfer, tx and rx events");

    // packet for an absent station: discarded on its second return
    p = mkpkt(MODE_DG, SZ_256, 8'd77, 8'd77, 8'd0, 2);
    bus_put(0, 1, p, 16, 1);
    repeat (8 * 1024) @(posedge clk);
    check(n_discard >= 1, "packet for absent station discarded");
    check(n_bound >= 1, "moveable boundary used");

    // link: Router Output Buffer -> T3 loop -> Router Input Buffer
    cfg(12'h430, 16'h0000);   // DG: final destination 0x30 -> next hop 0x00
    p = mkpkt(MODE_DG, SZ_1024, 8'h30, 8'h99, 8'h55, 3);
    bus_put(1, 3, p, 64, 1);
    wait (ib_avail[1]);
    bus_get(0, 5, 64, r);
    ok = 1;
    for (int w = 3; w < 64; w++) if (r[w] != p[w]) ok = 0;
    check(ok && r[0] == p[0], "link packet payload intact");
    check(r[1] == {8'h30, 8'h00} && r[2][15:8] == 8'h00, "link packet header translated");
    check(n_ltx == 1 && n_lrx == 1, "one link envelope each way");
    check(hou_rec_count > 10, "HOU records written");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
