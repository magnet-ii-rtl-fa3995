// ring_scheduler_tb: checks the maximum-length subcycle sequence for
// MAX I/II/III = 5/9/15 (5 class-I, 4 class-II, 6 class-III cells, CS on the
// first cell of each subcycle), the moveable-boundary skip from subcycle I
// and from subcycle II, that a skip for another subcycle is ignored, and that
// a disabled procedure ignores skips.
module ring_scheduler_tb;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [7:0] max_i = 5, max_ii = 9, max_iii = 15;
  logic moveable_en = 1, next = 0, skip = 0, cs, cyc;
  logic [1:0] skip_sub = 0, sub, cur;
  ring_scheduler dut (.clk, .rst_n, .max_i, .max_ii, .max_iii, .moveable_en, .next,
    .skip, .skip_subcycle(skip_sub), .subcycle(sub), .cs, .cycle_start(cyc), .cur_subcycle(cur));

  // generate one cell, return its subcycle and cs
  task automatic gen_cell(output logic [1:0] s, output logic c);
    next = 1; #1; s = sub; c = cs;
    @(posedge clk); #1; next = 0;
    repeat (2) @(posedge clk); #1;
  endtask

  task automatic do_skip(input logic [1:0] which);
    skip = 1; skip_sub = which; @(posedge clk); #1; skip = 0;
  endtask

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] s; logic c;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    // two full cycles by the maximum-length rule
    for (int cyc_n = 0; cyc_n < 2; cyc_n++) begin
      for (int p = 0; p < 15; p++) begin
        logic [1:0] es; logic ec;
        es = (p < 5) ? 2'd0 : (p < 9) ? 2'd1 : 2'd2;
        ec = (p == 0) || (p == 5) || (p == 9);
        gen_cell(s, c);
        check(s == es && c == ec, $sformatf("cycle %0d pos %0d: sub %0d cs %0d", cyc_n, p, s, c));
      end
    end
    // moveable boundary: 2 cells of subcycle I, then an unused I cell returns
    gen_cell(s, c); gen_cell(s, c);
    do_skip(2'd1);                      // wrong subcycle: ignored
    gen_cell(s, c);
    check(s == 0 && !c, "skip for another subcycle ignored");
    do_skip(2'd0);
    gen_cell(s, c);
    check(s == 1 && c, "skip moves to subcycle II");
    gen_cell(s, c);
    do_skip(2'd1);
    gen_cell(s, c);
    check(s == 2 && c, "skip moves to subcycle III");
    do_skip(2'd2);
    gen_cell(s, c);
    check(s == 0 && c, "skip from III starts a new cycle");
    // disabled
    moveable_en = 0;
    do_skip(2'd0);
    gen_cell(s, c);
    check(s == 0 && !c, "disabled procedure ignores skip");
    // new MAX values: I=0 gives cycles starting in subcycle II
    moveable_en = 1;
    max_i = 0; max_ii = 2; max_iii = 3;
    rst_n = 0; @(posedge clk); #1 rst_n = 1;
    for (int k = 0; k < 6; k++) begin
      logic [1:0] es;
      gen_cell(s, c);
      es = ((k % 3) < 2) ? 2'd1 : 2'd2;
      check(s == es, $sformatf("MAX I=0 cell %0d sub %0d", k, s));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
