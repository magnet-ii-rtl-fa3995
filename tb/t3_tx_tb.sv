// t3_tx_tb: captures the T3 transmitter's bit stream (bit_en every other
// clock) and parses it Short Frame by Short Frame, independently of the
// design: 85-bit frames with the control-bit slot marked, idle Link Headers
// (PSF 1111 plus the TNR/RNR status), zero vacant bits, and two packets each
// carried in 13 frames (LH with PSF 0000 and 76 bits, 11 x 84 bits, 24 bits
// and 60 unused bits) whose bits equal the bytes supplied. A packet is held
// back while the far end reports RNR low. 1105 bit times per packet.
module t3_tx_tb;
  import magnet_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic bit_en = 0, bit_en_q = 0, pkt_avail = 0, rd_en, rd_done, ser_out, sf_start, pkt_start;
  logic tnr_n = 1, rnr_n = 0, peer_rnr_n = 0;
  logic [7:0] rd_data;
  logic [5:0] mf_pos;
  t3_tx dut (.clk, .rst_n, .bit_en, .pkt_avail, .rd_data, .rd_en, .rd_done, .tnr_n, .rnr_n,
    .peer_rnr_n, .ser_out, .sf_start, .mf_pos, .pkt_start);

  // byte source: two packets of 128 bytes
  logic [7:0] pkts [2][128];
  int pk = 0, by = 0;
  assign rd_data = pkts[pk % 2][by];
  always @(posedge clk) begin
    bit_en   <= ~bit_en;
    bit_en_q <= bit_en;
    if (rst_n && rd_en) by <= by + 1;
    if (rst_n && rd_done) begin by <= 0; pk <= pk + 1; end
  end

  // capture
  bit   bits [$];
  bit   marks [$];
  bit   cap_on = 0;
  always @(posedge clk) if (rst_n && bit_en_q && (cap_on || sf_start)) begin
    cap_on = 1;
    bits.push_back(ser_out);
    marks.push_back(sf_start);
  end

  initial begin
    #20000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] get8(input int at);
    logic [7:0] v;
    for (int k = 0; k < 8; k++) v[7-k] = bits[at + k];
    return v;
  endfunction

  int n_start = 0;
  always @(posedge clk) if (rst_n && pkt_start) n_start++;

  initial begin
    int first, sf, npk, pbit, frames_in_pkt, start_sf [2];
    bit ok_marks, ok_idle, in_pkt;
    for (int p = 0; p < 2; p++) for (int b = 0; b < 128; b++) pkts[p][b] = 8'($urandom);
    repeat (4) @(posedge clk); #1 rst_n = 1;
    pkt_avail = 1;                          // a packet waits, but the far end is not ready
    repeat (2 * 85 * 4) @(posedge clk); #1;
    check(pk == 0 && n_start == 0, "held back while far end reports RNR low");
    peer_rnr_n = 1;
    wait (pk == 1);
    pkt_avail = 1;
    wait (pk == 2);
    pkt_avail = 0;
    repeat (2 * 85 * 3) @(posedge clk); #1;

    // ---- parse ----
    first = -1;
    foreach (marks[i]) if (first < 0 && marks[i]) first = i;
    check(first == 0, "stream starts at a control-bit slot");
    ok_marks = 1;
    for (int i = 0; i < bits.size(); i++) if (marks[i] != ((i % 85) == 0)) ok_marks = 0;
    check(ok_marks, "control-bit slot every 85 bits");
    npk = 0; in_pkt = 0; ok_idle = 1; frames_in_pkt = 0; pbit = 0;
    for (sf = 0; (sf + 1) * 85 <= bits.size(); sf++) begin
      int b0;
      b0 = sf * 85;
      check(bits[b0] == 0, "control bit slot sent as 0");
      if (!in_pkt) begin
        logic [7:0] lh;
        lh = get8(b0 + 1);
        if (lh[7:4] == 4'b0000) begin
          in_pkt = 1; frames_in_pkt = 1; pbit = 0;
          start_sf[npk] = sf;
          check(lh[3:0] == {tnr_n, rnr_n, 2'b00}, "status bits in start LH");
          for (int k = 9; k < 85; k++) begin
            check(bits[b0 + k] == pkts[npk][pbit / 8][7 - pbit % 8], "SF1 packet bit");
            pbit++;
          end
        end else begin
          if (lh != {4'b1111, tnr_n, rnr_n, 2'b00}) ok_idle = 0;
          for (int k = 9; k < 85; k++) if (bits[b0 + k]) ok_idle = 0;
        end
      end else begin
        frames_in_pkt++;
        if (frames_in_pkt < 13) begin
          for (int k = 1; k < 85; k++) begin
            check(bits[b0 + k] == pkts[npk][pbit / 8][7 - pbit % 8], "SF2-12 packet bit");
            pbit++;
          end
        end else begin
          for (int k = 1; k < 25; k++) begin
            check(bits[b0 + k] == pkts[npk][pbit / 8][7 - pbit % 8], $sformatf("SF13 packet %0d bit %0d", npk, pbit));
            pbit++;
          end
          for (int k = 25; k < 85; k++) check(bits[b0 + k] == 0, "SF13 unused bits zero");
          check(pbit == 1024, $sformatf("1024 packet bits, got %0d", pbit));
          in_pkt = 0; npk++;
        end
      end
    end
    check(ok_idle, "idle Short Frames: PSF 1111, status, vacant zero");
    check(npk == 2, $sformatf("two packets found, %0d", npk));
    check(start_sf[1] - start_sf[0] == 13, "back-to-back packets 13 frames (1105 bits) apart");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
