// magnet_pkg_tb: checks the shared definitions against independently
// written values: packet lengths in ring words for the four sizes
// (128..1024 bits), THRESHOLD codes (2, 4, 8, 16 packets), the bit positions
// of the cell header fields in word 0, and the DS3 envelope arithmetic
// (13 Short Frames of 85 bits carry 1024 bits: 76 + 11 x 84 + 24).
module magnet_pkg_tb;
  import magnet_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int bits [4];
    int thr [4];
    word0_t w;
    bits = '{128, 256, 512, 1024};
    thr  = '{2, 4, 8, 16};
    @(posedge clk);
    for (int s = 0; s < 4; s++) begin
      check(int'(size_words(2'(s))) * WORD_BITS == bits[s],
            $sformatf("size code %0d is %0d bits", s, bits[s]));
      check(int'(threshold_packets(2'(s))) == thr[s],
            $sformatf("threshold code %0d is %0d packets", s, thr[s]));
    end
    check(CELL_WORDS * WORD_BITS == 1024, "cell is 1024 bits");
    // header field positions
    w = word0_t'(16'hB000 | 16'h0100 | 16'h0080 | 16'h0040 | 16'h0010 | 16'h0008 | 16'h0002);
    check(w.sync == SYNC_PATTERN, "SYNC in bits 15:12");
    check(w.mac.ac == 4'b0001, "AC in bits 11:8");
    check(w.mac.cs && w.mac.bc && !w.mac.br && w.mac.t, "CS/BC/BR/T in bits 7:4");
    check(w.mode == MODE_MC, "MODE in bits 3:2");
    check(w.size == SZ_512, "SIZE in bits 1:0");
    // DS3 envelope
    check((SF_BITS - 1 - LH_BITS) + 11 * (SF_BITS - 1) + 24 == 1024, "13 Short Frames carry 1024 bits");
    check(SF_PER_PKT * SF_BITS == 1105, "1105 bit times per packet");
    check(PSF_IDLE[1:0] == 2'b11 && PSF_START == 4'b0000, "PSF codes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
