// dest_scheduler_tb: users 2, 0 and 3 request an Output Buffer in that order
// (user 0 and 3 in the same clock: lower index queued first), each holding
// its request until granted. Checks that the grants follow arrival order, one
// packet each, with an interrupt pulse on every grant, that a held request is
// queued only once, and that the queue empties.
module dest_scheduler_tb;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [3:0] req = 0, grant, irq;
  logic done = 0, busy;
  logic [1:0] owner;
  dest_scheduler #(.N_USERS(4)) dut (.clk, .rst_n, .req, .done, .grant, .irq, .busy, .owner);

  int irq_count [4] = '{default: 0};
  always @(posedge clk) if (rst_n) for (int u = 0; u < 4; u++) if (irq[u]) irq_count[u]++;

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic serve(input int u);
    repeat (2) @(posedge clk); #1;
    check(grant == (4'b1 << u) && busy && owner == 2'(u),
          $sformatf("grant to user %0d (grant %b)", u, grant));
    req[u] = 1'b0;                       // a granted user drops its request
    done = 1; @(posedge clk); #1; done = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk); #1 rst_n = 1;
    check(grant == 0 && !busy, "idle after reset");
    req = 4'b0100; @(posedge clk); #1;
    req = 4'b1101;                       // user 2 still holds its request
    repeat (3) @(posedge clk); #1;
    serve(2);
    serve(0);
    serve(3);
    repeat (3) @(posedge clk); #1;
    check(grant == 0 && !busy, "queue empty");
    check(irq_count[2] == 1 && irq_count[0] == 1 && irq_count[3] == 1 && irq_count[1] == 0,
          "one interrupt per grant");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
