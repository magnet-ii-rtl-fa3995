// hou_tb: feeds the HOU a stream of cells on the IOB input and output sides
// and some buffer events. In Continuous Mode every cell gives an I-Record
// with consecutive cell numbers, the input and output MAC fields and the
// header word; in Event Mode only cells with an arrival or departure give a
// record, carrying the event flags. Records are read back through the
// Processing Unit port.
module hou_tb;
  import magnet_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic enable = 1, mode = 0, in_word_en = 0, out_word_en = 0;
  logic [15:0] in_word = 0, out_word = 0;
  logic [5:0] in_idx = 0, out_idx = 0;
  logic [3:0] arrival = 0, departure = 0;
  logic [5:0] rd_addr = 0;
  logic [63:0] rd_data;
  logic [5:0] wr_ptr;
  logic [31:0] rec_count;
  hou #(.REC_DEPTH(64)) dut (.clk, .rst_n, .enable, .mode, .in_word_en, .in_word, .in_idx,
    .out_word_en, .out_word, .out_idx, .arrival, .departure, .rd_addr, .rd_data, .wr_ptr,
    .rec_count);

  // cell c: input word0/1 and output word0 derived from c; the output side
  // lags the input by three words like the IOB
  function automatic logic [15:0] iw0(input int c); return {SYNC_PATTERN, 8'(c * 3 + 1), 4'(c)}; endfunction
  function automatic logic [15:0] iw1(input int c); return 16'(c * 257 + 9); endfunction
  function automatic logic [15:0] iw2(input int c); return {8'(c * 7 + 3), 2'(c), 6'h0}; endfunction
  function automatic logic [15:0] ow0(input int c); return {SYNC_PATTERN, 8'(c * 5 + 2), 4'(c)}; endfunction

  task automatic run_cells(input int first, input int n, input int ev_cell, input logic [3:0] ev);
    for (int c = first; c < first + n + 1; c++) begin
      for (int w = 0; w < 64; w++) begin
        in_word_en = (c < first + n); in_idx = 6'(w);
        in_word = (w == 0) ? iw0(c) : (w == 1) ? iw1(c) : (w == 2) ? iw2(c) : 16'($urandom);
        // output side: word w-3 of the cell (or of the previous cell)
        out_word_en = (c > first) || (w >= 3);
        out_idx = 6'((w + 61) % 64);
        out_word = (out_idx == 0) ? ow0(w >= 3 ? c : c - 1) : 16'($urandom);
        if (c >= first + n && w >= 3) out_word_en = 0;
        arrival   = (c == ev_cell && w == 20) ? ev : 4'h0;
        departure = (c == ev_cell && w == 30) ? ev : 4'h0;
        @(posedge clk); #1;
        in_word_en = 0; out_word_en = 0; arrival = 0; departure = 0;
        @(posedge clk); #1;
      end
    end
  endtask

  task automatic read_rec(input int a, output logic [63:0] r);
    rd_addr = 6'(a); @(posedge clk); #1; r = rd_data;
  endtask

  initial begin
    #10000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] r;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    // Continuous Mode: 4 cells, events during cell 1 (reported by the record
    // written at the start of the next cell)
    run_cells(0, 4, 1, 4'b0010);
    repeat (3) @(posedge clk); #1;
    check(rec_count == 4, $sformatf("CM: 4 records, got %0d", rec_count));
    for (int c = 0; c < 4; c++) begin
      logic [63:0] e;
      read_rec(c, r);
      e = {16'(c), iw0(c)[11:4], ow0(c)[11:4], iw1(c)[7:0], iw2(c)[15:8], iw0(c)[3:0],
           (c == 2) ? 4'b0010 : 4'b0000, (c == 2) ? 4'b0010 : 4'b0000, iw2(c)[7:6], 2'b00};
      check(r == e, $sformatf("CM record %0d got %h exp %h", c, r, e));
    end
    // Event Mode: 4 cells, events only during cell 6 (record numbered 7)
    mode = 1;
    run_cells(4, 4, 6, 4'b1001);
    repeat (3) @(posedge clk); #1;
    check(rec_count == 5, $sformatf("EM: one more record, got %0d", rec_count));
    read_rec(4, r);
    check(r[63:48] == 16'd7 && r[11:8] == 4'b1001 && r[7:4] == 4'b1001 && r[0],
          $sformatf("EM record %h", r));
    // disabled: nothing recorded
    enable = 0; mode = 0;
    run_cells(8, 2, 99, 4'h0);
    repeat (3) @(posedge clk); #1;
    check(rec_count == 5, "disabled: no records");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
