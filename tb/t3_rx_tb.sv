// t3_rx_tb: builds a DS3 Short Frame stream in the testbench (random control
// bits, idle frames with various XX11 Packet Start Flags and status bits,
// three packet envelopes, one starting right after another) and checks that
// the receiver delivers exactly the three packets' bytes with first/last
// markers, and tracks the far end's TNR/RNR bits.
module t3_rx_tb;
  import magnet_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic bit_en = 0, ser_in = 0, sf_start = 0;
  logic byte_valid, byte_sop, byte_eop, peer_tnr_n, peer_rnr_n, pkt_start;
  logic [7:0] byte_data;
  t3_rx dut (.clk, .rst_n, .bit_en, .ser_in, .sf_start, .byte_valid, .byte_sop, .byte_eop,
    .byte_data, .peer_tnr_n, .peer_rnr_n, .pkt_start);

  logic [7:0] pkts [3][128];
  logic [7:0] got [$];
  int n_sop = 0, n_eop = 0, n_start = 0;
  always @(posedge clk) if (rst_n) begin
    if (byte_valid) got.push_back(byte_data);
    if (byte_valid && byte_sop) begin
      n_sop++;
      check(got.size() % 128 == 1, "sop on first byte");
    end
    if (byte_valid && byte_eop) begin
      n_eop++;
      check(got.size() % 128 == 0, "eop on last byte");
    end
    if (pkt_start) n_start++;
  end

  task automatic send_bit(input bit b, input bit mark);
    ser_in = b; sf_start = mark; bit_en = 1;
    @(posedge clk); #1;
    bit_en = 0; sf_start = 0;
    @(posedge clk); #1;
  endtask

  task automatic idle_sf(input logic [3:0] psf, input bit tnr, input bit rnr);
    logic [7:0] lh;
    lh = {psf, tnr, rnr, 2'b00};
    send_bit($urandom % 2, 1);
    for (int k = 7; k >= 0; k--) send_bit(lh[k], 0);
    for (int k = 0; k < 76; k++) send_bit($urandom % 2, 0);   // vacant bits: any value
  endtask

  task automatic packet_env(input int p, input bit rnr);
    int pb;
    logic [7:0] lh;
    pb = 0;
    lh = {4'b0000, 1'b1, rnr, 2'b00};
    for (int sf = 0; sf < 13; sf++) begin
      send_bit($urandom % 2, 1);
      if (sf == 0) for (int k = 7; k >= 0; k--) send_bit(lh[k], 0);
      for (int k = (sf == 0 ? 9 : 1); k < 85; k++) begin
        if (pb < 1024) begin
          send_bit(pkts[p][pb / 8][7 - pb % 8], 0);
          pb++;
        end else send_bit($urandom % 2, 0);
      end
    end
  endtask

  initial begin
    #50000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < 3; p++) for (int b = 0; b < 128; b++) pkts[p][b] = 8'($urandom);
    repeat (3) @(posedge clk); #1 rst_n = 1;
    idle_sf(4'b1111, 1, 1);
    idle_sf(4'b0011, 1, 0);
    check(peer_rnr_n == 0 && peer_tnr_n == 1, "far end RNR low seen");
    idle_sf(4'b1011, 0, 1);
    check(peer_rnr_n == 1 && peer_tnr_n == 0, "far end status updated");
    check(got.size() == 0, "no bytes from idle frames");
    packet_env(0, 1);
    packet_env(1, 1);
    idle_sf(4'b0111, 1, 1);
    packet_env(2, 0);
    check(peer_rnr_n == 0, "status taken from the start Link Header");
    idle_sf(4'b1111, 1, 1);
    repeat (10) @(posedge clk); #1;
    check(got.size() == 3 * 128, $sformatf("byte count %0d", got.size()));
    check(n_sop == 3 && n_eop == 3 && n_start == 3, "three packets");
    for (int p = 0; p < 3; p++) begin
      bit ok; ok = 1;
      for (int b = 0; b < 128; b++) if (got[p * 128 + b] != pkts[p][b]) ok = 0;
      check(ok, $sformatf("packet %0d bytes", p));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
