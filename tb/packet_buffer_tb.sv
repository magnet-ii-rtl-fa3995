// packet_buffer_tb: self-checking test of packet_buffer.
// Two instances with small slots: a 32-bit-in/16-bit-out buffer (the IOB
// Output Buffer shape) and an 8-bit-in/32-bit-out buffer (the Router Input
// Buffer shape). Checks word order across the width change, the THRESHOLD
// codes (2 and 4 packets), the count, and the arrival/departure pulses.
module packet_buffer_tb;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // A: 32 -> 16, 4 slots of 128 bits
  logic [1:0] thr_a;
  logic a_wr_en, a_wr_last, a_full, a_avail, a_rd_en, a_rd_done, a_arr, a_dep;
  logic [31:0] a_wr_data;
  logic [15:0] a_rd_data;
  logic [2:0] a_count;
  packet_buffer #(.DEPTH(4), .PKT_BITS(128), .WR_W(32), .RD_W(16)) dut_a (
    .clk, .rst_n, .threshold(thr_a), .wr_en(a_wr_en), .wr_last(a_wr_last),
    .wr_data(a_wr_data), .full(a_full), .pkt_avail(a_avail), .rd_data(a_rd_data),
    .rd_en(a_rd_en), .rd_done(a_rd_done), .count(a_count), .arrival(a_arr),
    .departure(a_dep));

  // B: 8 -> 32, 2 slots of 64 bits
  logic b_wr_en, b_wr_last, b_full, b_avail, b_rd_en, b_rd_done, b_arr, b_dep;
  logic [7:0] b_wr_data;
  logic [31:0] b_rd_data;
  logic [1:0] b_count;
  packet_buffer #(.DEPTH(2), .PKT_BITS(64), .WR_W(8), .RD_W(32)) dut_b (
    .clk, .rst_n, .threshold(2'd3), .wr_en(b_wr_en), .wr_last(b_wr_last),
    .wr_data(b_wr_data), .full(b_full), .pkt_avail(b_avail), .rd_data(b_rd_data),
    .rd_en(b_rd_en), .rd_done(b_rd_done), .count(b_count), .arrival(b_arr),
    .departure(b_dep));

  int arr_seen = 0, dep_seen = 0;
  always @(posedge clk) begin
    if (a_arr) arr_seen++;
    if (a_dep) dep_seen++;
  end

  function automatic logic [31:0] pat(input int p, input int w);
    return 32'hA000_0000 + p * 32'h100 + w;
  endfunction

  task automatic write_a(input int p);
    for (int w = 0; w < 4; w++) begin
      a_wr_en = 1; a_wr_last = (w == 3); a_wr_data = pat(p, w);
      @(posedge clk); #1;
    end
    a_wr_en = 0; a_wr_last = 0;
  endtask

  task automatic read_a(input int p);
    for (int w = 0; w < 8; w++) begin
      logic [31:0] exp32;
      exp32 = pat(p, w / 2);
      check(a_rd_data == ((w % 2 == 0) ? exp32[31:16] : exp32[15:0]),
            $sformatf("A pkt %0d word %0d got %h", p, w, a_rd_data));
      a_rd_en = (w != 7); a_rd_done = (w == 7);
      @(posedge clk); #1;
    end
    a_rd_en = 0; a_rd_done = 0;
  endtask

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    thr_a = 2'd0; a_wr_en = 0; a_wr_last = 0; a_wr_data = 0; a_rd_en = 0; a_rd_done = 0;
    b_wr_en = 0; b_wr_last = 0; b_wr_data = 0; b_rd_en = 0; b_rd_done = 0;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    check(!a_avail && !a_full && a_count == 0, "A empty after reset");
    // threshold code 0: 2 packets
    write_a(0);
    check(a_avail && !a_full && a_count == 1, "A one packet");
    write_a(1);
    check(a_full && a_count == 2, "A full at threshold 2");
    // raising the threshold to 4 frees space
    thr_a = 2'd1; #1;
    check(!a_full, "A not full at threshold 4");
    write_a(2); write_a(3);
    check(a_full && a_count == 4, "A full at 4 packets");
    read_a(0); read_a(1);
    check(a_count == 2 && !a_full, "A count after two reads");
    write_a(4);   // wraps around the slots
    read_a(2); read_a(3); read_a(4);
    check(!a_avail && a_count == 0, "A empty at end");
    check(arr_seen == 5 && dep_seen == 5, $sformatf("A arrivals %0d departures %0d", arr_seen, dep_seen));

    // B: 8 bytes in, two 32-bit words out
    for (int p = 0; p < 2; p++) begin
      for (int k = 0; k < 8; k++) begin
        b_wr_en = 1; b_wr_last = (k == 7); b_wr_data = 8'(16 * p + k + 1);
        @(posedge clk); #1;
      end
    end
    b_wr_en = 0; b_wr_last = 0;
    check(b_count == 2, "B two packets");
    for (int p = 0; p < 2; p++) begin
      for (int w = 0; w < 2; w++) begin
        logic [31:0] e;
        for (int k = 0; k < 4; k++) e[31 - 8*k -: 8] = 8'(16 * p + 4 * w + k + 1);
        check(b_rd_data == e, $sformatf("B pkt %0d word %0d got %h exp %h", p, w, b_rd_data, e));
        b_rd_en = (w == 0); b_rd_done = (w == 1);
        @(posedge clk); #1;
      end
    end
    b_rd_en = 0; b_rd_done = 0;
    check(!b_avail, "B empty");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
