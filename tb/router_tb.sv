// router_tb: packets arriving from the link (bytes) are translated and stored
// in the Input Buffer; checks the rewritten DEST (datagram and virtual
// circuit tables) and SRC, the unchanged payload read over the 32-bit bus
// side, the drop of a whole packet when the Input Buffer is at its THRESHOLD
// of 2 with RNR low, and the Output Buffer path from 32-bit bus writes to
// link bytes.
module router_tb;
  import magnet_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [7:0] my_addr = 8'h11;
  logic [1:0] thr_in = 2'd0, thr_out = 2'd3;
  logic tbl_we = 0; logic [1:0] tbl_sel = 0; logic [7:0] tbl_addr = 0, tbl_wdata = 0;
  logic rx_valid = 0, rx_sop = 0, rx_eop = 0; logic [7:0] rx_byte = 0;
  logic tx_avail, tx_rd_en = 0, tx_rd_done = 0, rnr_n, tnr_n;
  logic [7:0] tx_data;
  logic ob_wr_en = 0, ob_wr_last = 0, ob_full, ib_avail, ib_rd_en = 0, ib_rd_done = 0;
  logic [31:0] ob_wr_data = 0, ib_rd_data;
  logic [4:0] ib_count, ob_count;
  logic [1:0] arrival, departure;
  logic rx_lost, translated;

  router dut (.clk, .rst_n, .my_addr, .thr_in, .thr_out, .tbl_we, .tbl_sel, .tbl_addr,
    .tbl_wdata, .rx_valid, .rx_sop, .rx_eop, .rx_byte, .tx_avail, .tx_data, .tx_rd_en,
    .tx_rd_done, .rnr_n, .tnr_n, .ob_wr_en, .ob_wr_last, .ob_wr_data, .ob_full, .ib_avail,
    .ib_rd_data, .ib_rd_en, .ib_rd_done, .ib_count, .ob_count, .arrival, .departure,
    .rx_lost, .translated);

  int n_lost = 0;
  always @(posedge clk) if (rst_n && rx_lost) n_lost++;

  logic [7:0] pk [3][128];

  task automatic link_in(input int p);
    for (int b = 0; b < 128; b++) begin
      rx_valid = 1; rx_sop = (b == 0); rx_eop = (b == 127); rx_byte = pk[p][b];
      @(posedge clk); #1;
      rx_valid = 0; rx_sop = 0; rx_eop = 0;
      repeat (3) @(posedge clk); #1;
    end
  endtask

  initial begin
    #10000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk); #1 rst_n = 1;
    // DG: final destination 0x40 -> next hop 0x05;  VC 0x09 -> 0x06
    tbl_we = 1; tbl_sel = 0; tbl_addr = 8'h40; tbl_wdata = 8'h05; @(posedge clk); #1;
    tbl_sel = 1; tbl_addr = 8'h09; tbl_wdata = 8'h06; @(posedge clk); #1;
    tbl_we = 0;
    for (int p = 0; p < 3; p++) for (int b = 0; b < 128; b++) pk[p][b] = 8'($urandom);
    pk[0][1] = {4'h0, MODE_DG, SZ_1024}; pk[0][2] = 8'h40;
    pk[1][1] = {4'h0, MODE_VC, SZ_1024}; pk[1][2] = 8'h09;
    pk[2][1] = {4'h0, MODE_DG, SZ_1024}; pk[2][2] = 8'h40;
    check(rnr_n && !tnr_n, "ready, nothing to send");
    link_in(0);
    link_in(1);
    check(ib_count == 2 && !rnr_n, "Input Buffer at threshold, RNR low");
    link_in(2);
    check(n_lost == 1 && ib_count == 2, "third packet dropped");
    for (int p = 0; p < 2; p++) begin
      bit ok; ok = 1;
      for (int w = 0; w < 32; w++) begin
        logic [31:0] e;
        for (int k = 0; k < 4; k++) e[31 - 8*k -: 8] = pk[p][4*w + k];
        if (w == 0) begin
          e[7:0]  = (p == 0) ? 8'h05 : 8'h06;   // byte 3: DEST
        end
        if (w == 1) e[31:24] = my_addr;         // byte 4: SRC
        if (ib_rd_data != e) begin
          ok = 0; $display("  pkt %0d word %0d got %h exp %h", p, w, ib_rd_data, e);
        end
        ib_rd_en = (w != 31); ib_rd_done = (w == 31);
        @(posedge clk); #1;
      end
      ib_rd_en = 0; ib_rd_done = 0;
      check(ok, $sformatf("translated packet %0d", p));
    end
    check(!ib_avail && rnr_n, "Input Buffer drained");

    // Output Buffer: 32-bit writes, byte reads
    for (int w = 0; w < 32; w++) begin
      ob_wr_en = 1; ob_wr_last = (w == 31); ob_wr_data = {8'(4*w), 8'(4*w+1), 8'(4*w+2), 8'(4*w+3)};
      @(posedge clk); #1;
    end
    ob_wr_en = 0; ob_wr_last = 0;
    check(tx_avail && tnr_n && ob_count == 1, "Output Buffer holds a packet");
    begin
      bit ok; ok = 1;
      for (int b = 0; b < 128; b++) begin
        if (tx_data != 8'(b)) ok = 0;
        tx_rd_en = (b != 127); tx_rd_done = (b == 127);
        @(posedge clk); #1;
      end
      tx_rd_en = 0; tx_rd_done = 0;
      check(ok && !tx_avail, "Output Buffer bytes in order");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
