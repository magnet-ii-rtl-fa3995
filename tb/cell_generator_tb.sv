// cell_generator_tb: runs the Cell Generator and checks
//  * the header sequence for MAX I/II/III = 2/3/5 (AC one-hot class, CS on
//    each subcycle start, BC=BR=T=0, zero payload) and 16 clocks per word;
//  * a returning busy packet with T=0 is put into a later new cell with
//    BC=BR=T=1 and identical data (transfer);
//  * a returning busy packet with T=1 is discarded;
//  * a returning unused cell (BR=0) of the current subcycle ends the
//    subcycle early (moveable boundary), and is ignored when disabled.
module cell_generator_tb;
  import magnet_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  typedef logic [15:0] cell_t [64];

  logic [7:0] max_i = 2, max_ii = 3, max_iii = 5;
  logic moveable_en = 0, in_word_en = 0, out_word_en, transfer, discard, moved;
  logic [15:0] in_word = 0, out_word;
  logic [5:0] in_idx = 0, out_idx;
  logic [1:0] sub_now;
  cell_generator dut (.clk, .rst_n, .max_i, .max_ii, .max_iii, .moveable_en,
    .in_word_en, .in_word, .in_idx, .out_word_en, .out_word, .out_idx,
    .transfer, .discard, .boundary_moved(moved), .subcycle_now(sub_now));

  cell_t oc [256];
  int n_out = -1, n_transfer = 0, n_discard = 0, n_moved = 0;
  longint last_en = -1;
  bit spacing_ok = 1;
  longint cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && out_word_en) begin
      if (out_idx == 0) n_out++;
      if (n_out >= 0) oc[n_out][out_idx] = out_word;
      if (last_en >= 0 && cyc - last_en != 16) spacing_ok = 0;
      last_en = cyc;
    end
    if (rst_n && transfer) n_transfer++;
    if (rst_n && discard) n_discard++;
    if (rst_n && moved) n_moved++;
  end

  task automatic feed(input cell_t c);
    for (int w = 0; w < 64; w++) begin
      in_word_en = 1; in_word = c[w]; in_idx = 6'(w);
      @(posedge clk); #1; in_word_en = 0;
      repeat (15) @(posedge clk); #1;
    end
  endtask

  function automatic logic [1:0] sub_of(input logic [15:0] w0);
    return w0[8] ? 2'd0 : (w0[9] ? 2'd1 : 2'd2);
  endfunction

  initial begin
    #50000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cell_t p, e;
    int k0, found;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    wait (n_out == 11);
    // ---- header sequence ----
    for (int k = 0; k < 10; k++) begin
      int pos; logic [1:0] es; logic ecs; bit zero;
      pos = k % 5;
      es  = (pos < 2) ? 2'd0 : (pos < 3) ? 2'd1 : 2'd2;
      ecs = (pos == 0) || (pos == 2) || (pos == 3);
      zero = 1;
      for (int w = 1; w < 64; w++) if (oc[k][w] != 0) zero = 0;
      check(oc[k][0] == {SYNC_PATTERN, 1'b0, 3'b001 << es, ecs, 3'b000, 4'h0} && zero,
            $sformatf("cell %0d header %h", k, oc[k][0]));
    end
    check(spacing_ok, "one word every 16 clocks");

    // ---- transfer of a T=0 packet ----
    for (int w = 0; w < 64; w++) p[w] = (w < 32) ? 16'($urandom) : 16'h0;
    p[0] = {SYNC_PATTERN, 4'b0100, 1'b0, 1'b1, 1'b1, 1'b0, MODE_DG, SZ_512};
    k0 = n_out;
    feed(p);
    wait (n_transfer == 1);
    wait (n_out == k0 + 4);
    for (int k = k0 + 3; k >= k0; k--) if (oc[k][0][6]) k0 = k;
    e = p;
    e[0] = {SYNC_PATTERN, oc[k0][0][11:7], 3'b111, p[0][3:0]};
    begin
      bit ok; ok = 1;
      for (int w = 0; w < 64; w++) if (oc[k0][w] != e[w]) ok = 0;
      check(ok, $sformatf("transferred packet in cell %0d (word0 %h)", k0, oc[k0][0]));
    end

    // ---- discard of a T=1 packet ----
    p[0][4] = 1'b1;
    k0 = n_out;
    feed(p);
    repeat (4 * 1024) @(posedge clk);
    check(n_discard == 1 && n_transfer == 1, "T=1 packet discarded");
    found = 0;
    for (int k = k0; k < n_out; k++) if (oc[k][0][6]) found = 1;
    check(!found, "no busy cell after discard");

    // ---- moveable boundary ----
    max_i = 20; max_ii = 40; max_iii = 60;
    // disabled: an unused cell of the current subcycle changes nothing
    do @(posedge clk); while (!(out_word_en && out_idx == 1 && oc[n_out][0][7] &&
                               sub_of(oc[n_out][0]) == 0));
    #1;
    p = '{default: 16'h0};
    p[0] = {SYNC_PATTERN, 4'b0001, 1'b0, 3'b000, 4'h0};
    feed(p);
    check(n_moved == 0, "no boundary move when disabled");
    moveable_en = 1;
    k0 = n_out;
    feed(p);
    check(n_moved == 1, "boundary moved");
    wait (n_out == k0 + 3);
    found = 0;
    for (int k = k0; k <= k0 + 2; k++)
      if (sub_of(oc[k][0]) == 1 && oc[k][0][7]) found = 1;
    check(found, "subcycle II started early");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
