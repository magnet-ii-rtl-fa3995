// miu_tb: drives a serial stream of 1024-bit cells (SYNC in the top four bits
// of word 0, random payload) with an arbitrary bit offset into the MIU.
// Checks that the receiver locks after one confirming cell, that every later
// word comes out with the right value and index, that a damaged SYNC drops
// the lock and that it locks again; and that the transmitter shifts loaded
// words out MSB first, one bit per clock.
module miu_tb;
  import magnet_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic ser_in = 0, rx_word_en, rx_cell_start, locked, tx_word_en = 0, ser_out;
  logic [15:0] rx_word, tx_word = 0;
  logic [5:0] rx_idx;
  miu dut (.clk, .rst_n, .ser_in, .rx_word_en, .rx_word, .rx_idx, .rx_cell_start, .locked,
           .tx_word_en, .tx_word, .ser_out);

  localparam int NCELLS = 8;
  logic [15:0] cells [NCELLS][64];
  int rx_cell = -1;         // index of the cell being received (by the TB)
  int words_ok = 0, words_seen = 0;
  bit corrupt_cell5 = 1;

  // monitor: each received word is compared with the cell the TB sent
  int cur_cell;
  always @(posedge clk) begin
    if (rx_word_en) begin
      words_seen++;
      if (rx_cell_start) cur_cell = cur_cell + 1;
      if (rx_word == cells[cur_cell % NCELLS][rx_idx]) words_ok++;
      else begin
        failures++;
        $display("FAIL: cell %0d word %0d got %h exp %h", cur_cell, rx_idx, rx_word,
                 cells[cur_cell % NCELLS][rx_idx]);
      end
    end
  end

  initial begin
    #3000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send_cell(input int c, input bit bad_sync);
    for (int w = 0; w < 64; w++) begin
      logic [15:0] v;
      v = cells[c][w];
      if (w == 0 && bad_sync) v[15:12] = ~SYNC_PATTERN;
      for (int b = 15; b >= 0; b--) begin
        ser_in = v[b];
        @(posedge clk); #1;
      end
    end
  endtask

  initial begin
    for (int c = 0; c < NCELLS; c++) begin
      for (int w = 0; w < 64; w++) cells[c][w] = 16'($urandom);
      cells[c][0][15:12] = SYNC_PATTERN;
    end
    // cells 5..7 carry no payload so that re-locking cannot meet a false SYNC
    for (int c = 5; c < NCELLS; c++) for (int w = 1; w < 64; w++) cells[c][w] = 0;
    for (int c = 5; c < NCELLS; c++) cells[c][0][11:0] = 12'h000;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    repeat (23) @(posedge clk); #1;        // arbitrary phase, zeros before the first cell
    cur_cell = 0;                          // cell 0 is used for confirmation only
    send_cell(0, 0);
    check(!locked, "not locked during the confirming cell");
    send_cell(1, 0);
    check(locked, "locked after the confirming cell");
    for (int c = 2; c < 5; c++) send_cell(c, 0);
    check(locked && words_seen >= 4 * 64 - 1, $sformatf("words seen %0d", words_seen));
    check(words_ok == words_seen, "all words correct");
    // damaged SYNC: lock is lost
    send_cell(5, 1);
    check(!locked, "lock lost on bad SYNC");
    cur_cell = 5;
    send_cell(6, 0);
    send_cell(7, 0);
    send_cell(6, 0);
    check(locked, "locked again");
    repeat (20) @(posedge clk); #1;

    // transmitter: three words back to back
    begin
      logic [15:0] tw [3];
      tw[0] = 16'hB5A3; tw[1] = 16'h0F0F; tw[2] = 16'h8001;
      for (int w = 0; w < 3; w++) begin
        tx_word = tw[w]; tx_word_en = 1;
        @(posedge clk); #1; tx_word_en = 0;
        for (int b = 15; b >= 0; b--) begin
          check(ser_out == tw[w][b], $sformatf("tx word %0d bit %0d", w, b));
          if (b != 0) begin @(posedge clk); #1; end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
