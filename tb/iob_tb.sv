// iob_tb: self-checking test of the IOB ring access logic (station address 7).
// Cells are fed word by word; the output cells are collected and compared
// with cells built by the testbench. Covered: transmission into an empty cell
// of the right class (BC=BR=1, T=0, words after the packet zero), no
// transmission into a cell of another class, receive-and-remove of a packet
// for this station with immediate reuse of the emptied cell, the per-cycle
// LIMIT and its restart at the next cycle, multicast reception without
// removal, multicast removal by the source, a packet lost on a full Input
// Buffer, pass-through of other stations' packets, and the Input Buffer
// contents read over the 32-bit bus side.
module iob_tb;
  import magnet_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  typedef logic [15:0] cell_t [64];

  logic [7:0] my_addr = 8'd7;
  logic [LIMIT_BITS-1:0] limit [3];
  logic [1:0] thr_out [3];
  logic [1:0] thr_in = 2'd3;
  logic mc_we = 0, mc_wdata = 0;
  logic [7:0] mc_addr = 0;
  logic in_word_en = 0, out_word_en;
  logic [15:0] in_word = 0, out_word;
  logic [5:0] in_idx = 0, out_idx;
  logic [2:0] ob_wr_en = 0, ob_full;
  logic ob_wr_last = 0, ib_avail, ib_rd_en = 0, ib_rd_done = 0;
  logic [31:0] ob_wr_data = 0, ib_rd_data;
  logic [4:0] buf_count [4];
  logic [3:0] arrival, departure;
  logic rx_lost, tx_pkt, rx_pkt;

  iob dut (.clk, .rst_n, .my_addr, .limit, .thr_out, .thr_in, .mc_we, .mc_addr, .mc_wdata,
    .in_word_en, .in_word, .in_idx, .out_word_en, .out_word, .out_idx,
    .ob_wr_en, .ob_wr_last, .ob_wr_data, .ob_full, .ib_avail, .ib_rd_data, .ib_rd_en,
    .ib_rd_done, .buf_count, .arrival, .departure, .rx_lost, .tx_pkt, .rx_pkt);

  // ---------------- output capture ----------------
  cell_t outc [64];
  int n_out = -1;
  int n_lost = 0, n_tx = 0, n_rx = 0;
  always @(posedge clk) begin
    if (rst_n && out_word_en) begin
      if (out_idx == 0) n_out++;
      outc[n_out][out_idx] = out_word;
    end
    if (rst_n && rx_lost) n_lost++;
    if (rst_n && tx_pkt) n_tx++;
    if (rst_n && rx_pkt) n_rx++;
  end

  function automatic cell_t make_pkt(input logic [3:0] ac, input logic cs, input logic bc,
      input logic br, input logic t, input logic [1:0] mode, input logic [1:0] size,
      input logic [7:0] route, input logic [7:0] dest, input logic [7:0] src,
      input logic [1:0] cls, input int seed);
    cell_t c;
    int n;
    n = int'(size_words(size));
    for (int w = 0; w < 64; w++) c[w] = (w < n) ? 16'(seed * 977 + w * 131 + 5) : 16'h0;
    c[0] = {SYNC_PATTERN, ac, cs, bc, br, t, mode, size};
    c[1] = {route, dest};
    c[2] = {src, cls, 6'h0};
    return c;
  endfunction

  function automatic cell_t empty_cell(input logic [3:0] ac, input logic cs);
    cell_t c;
    for (int w = 0; w < 64; w++) c[w] = 16'h0;
    c[0] = {SYNC_PATTERN, ac, cs, 3'b000, 4'b0000};
    return c;
  endfunction

  // expected output when `p` (as written into an Output Buffer) is placed in `inc`
  function automatic cell_t placed(input cell_t inc, input cell_t p);
    cell_t c;
    int n;
    n = int'(size_words(p[0][1:0]));
    for (int w = 0; w < 64; w++) c[w] = (w < n) ? p[w] : 16'h0;
    c[0] = {inc[0][15:7], 3'b110, p[0][3:0]};
    return c;
  endfunction

  task automatic send(input cell_t c);
    for (int w = 0; w < 64; w++) begin
      in_word_en = 1; in_word = c[w]; in_idx = 6'(w);
      @(posedge clk); #1;
      in_word_en = 0;
      @(posedge clk); #1;
    end
  endtask

  task automatic bus_write(input int cls, input cell_t p);
    int n;
    n = int'(size_words(p[0][1:0]));
    for (int w = 0; w < n; w += 2) begin
      ob_wr_en = 3'b001 << cls; ob_wr_last = (w + 2 >= n);
      ob_wr_data = {p[w], p[w+1]};
      @(posedge clk); #1;
    end
    ob_wr_en = 0; ob_wr_last = 0;
  endtask

  task automatic bus_read_check(input cell_t p, input string what);
    int n;
    n = int'(size_words(p[0][1:0]));
    check(ib_avail, {what, ": input buffer has a packet"});
    for (int w = 0; w < n; w += 2) begin
      check(ib_rd_data == {p[w], p[w+1]},
            $sformatf("%s: ib word %0d got %h exp %h", what, w, ib_rd_data, {p[w], p[w+1]}));
      ib_rd_en = (w + 2 < n); ib_rd_done = (w + 2 >= n);
      @(posedge clk); #1;
    end
    ib_rd_en = 0; ib_rd_done = 0;
  endtask

  task automatic cmp(input int k, input cell_t e, input string what);
    bit ok;
    ok = 1;
    for (int w = 0; w < 64; w++) if (outc[k][w] !== e[w]) begin
      ok = 0;
      $display("  %s: word %0d got %h exp %h", what, w, outc[k][w], e[w]);
    end
    check(ok, what);
  endtask

  initial begin
    #20000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  cell_t sent [64];
  int ns = 0;
  task automatic feed(input cell_t c);
    sent[ns] = c; ns++;
    send(c);
  endtask

  initial begin
    cell_t p1, p2, p3, p4a, p4b, rxa, mc1, mc2, mc3, lost_c, other, e;
    limit = '{default: 9'h100};
    thr_out = '{default: 2'd3};
    repeat (3) @(posedge clk); #1 rst_n = 1;
    // multicast table: number 0x21 enabled
    mc_we = 1; mc_addr = 8'h21; mc_wdata = 1; @(posedge clk); #1; mc_we = 0;

    p1 = make_pkt(4'b0001, 0, 0, 0, 0, MODE_DG, SZ_128, 8'd3, 8'd3, 8'd7, CLASS_I, 1);
    p2 = make_pkt(4'b0010, 0, 0, 0, 0, MODE_DG, SZ_256, 8'd9, 8'd9, 8'd7, CLASS_II, 2);
    p3 = make_pkt(4'b0100, 0, 0, 0, 0, MODE_VC, SZ_1024, 8'd5, 8'd4, 8'd7, CLASS_III, 3);
    bus_write(0, p1);
    bus_write(1, p2);
    bus_write(2, p3);
    check(buf_count[1] == 1 && buf_count[2] == 1 && buf_count[3] == 1, "three Output Buffers loaded");

    // 0: empty class-I cell, cycle start -> p1 placed
    feed(empty_cell(4'b0001, 1));
    // 1: empty class-I cell -> nothing left for class I, stays empty
    feed(empty_cell(4'b0001, 0));
    // 2: busy class-II cell for station 7 -> received, removed, reused by p2
    rxa = make_pkt(4'b0010, 1, 1, 1, 0, MODE_DG, SZ_256, 8'd7, 8'd7, 8'd2, CLASS_II, 10);
    feed(rxa);
    // 3: empty class-III cell -> p3 placed
    feed(empty_cell(4'b0100, 1));
    // 4: busy cell for another station passes unchanged
    other = make_pkt(4'b0001, 1, 1, 1, 0, MODE_DG, SZ_512, 8'd3, 8'd3, 8'd2, CLASS_I, 11);
    feed(other);

    // LIMIT I = 1: two class-I packets, one per cycle
    limit[0] = 9'd1;
    p4a = make_pkt(4'b0001, 0, 0, 0, 0, MODE_DG, SZ_128, 8'd1, 8'd1, 8'd7, CLASS_I, 4);
    p4b = make_pkt(4'b0001, 0, 0, 0, 0, MODE_DG, SZ_128, 8'd1, 8'd1, 8'd7, CLASS_I, 5);
    bus_write(0, p4a);
    bus_write(0, p4b);
    feed(empty_cell(4'b0001, 1));   // 5: new cycle, p4a
    feed(empty_cell(4'b0001, 0));   // 6: limit reached, empty
    feed(empty_cell(4'b0010, 1));   // 7: subcycle II, nothing
    feed(empty_cell(4'b0001, 1));   // 8: new cycle, p4b

    // multicast
    mc1 = make_pkt(4'b0100, 1, 1, 1, 0, MODE_MC, SZ_128, 8'h40, 8'h21, 8'd4, CLASS_III, 20);
    mc2 = make_pkt(4'b0100, 0, 1, 1, 0, MODE_MC, SZ_128, 8'h41, 8'h22, 8'd4, CLASS_III, 21);
    mc3 = make_pkt(4'b0100, 0, 1, 1, 0, MODE_MC, SZ_128, 8'h40, 8'h21, 8'd7, CLASS_III, 22);
    feed(mc1);   // 9: received, stays on ring
    feed(mc2);   // 10: not in table, passes
    feed(mc3);   // 11: own multicast returns: removed
    // Input Buffer threshold 2: it holds rxa and mc1 -> next packet for us is lost
    thr_in = 2'd0;
    lost_c = make_pkt(4'b0100, 0, 1, 1, 0, MODE_DG, SZ_128, 8'd7, 8'd7, 8'd2, CLASS_III, 30);
    feed(lost_c); // 12
    feed(empty_cell(4'b0010, 0));   // 13: flushes the delay line
    feed(empty_cell(4'b0010, 0));   // 14

    // ---------------- compare ----------------
    cmp(0, placed(sent[0], p1), "p1 placed in class-I cell");
    cmp(1, sent[1], "class-I cell stays empty");
    cmp(2, placed(sent[2], p2), "received cell reused by p2");
    cmp(3, placed(sent[3], p3), "p3 placed in class-III cell");
    cmp(4, sent[4], "other station's packet passes");
    cmp(5, placed(sent[5], p4a), "p4a placed at new cycle");
    cmp(6, sent[6], "LIMIT holds p4b back");
    cmp(7, sent[7], "class-II cell unused");
    cmp(8, placed(sent[8], p4b), "p4b placed in next cycle");
    cmp(9, sent[9], "multicast received but not removed");
    cmp(10, sent[10], "multicast for other group passes");
    e = sent[11]; e[0][6] = 1'b0;
    cmp(11, e, "own multicast removed");
    e = sent[12]; e[0][6] = 1'b0;
    cmp(12, e, "lost packet still removed");
    check(n_tx == 5, $sformatf("tx count %0d", n_tx));
    check(n_rx == 2, $sformatf("rx count %0d", n_rx));
    check(n_lost == 1, $sformatf("lost count %0d", n_lost));
    check(buf_count[0] == 2, "two packets in Input Buffer");
    bus_read_check(rxa, "rxa");
    bus_read_check(mc1, "mc1");
    check(!ib_avail && buf_count[1] == 0 && buf_count[2] == 0 && buf_count[3] == 0,
          "all buffers empty");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
