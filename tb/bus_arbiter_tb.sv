// bus_arbiter_tb: checks prioritized arbitration (lowest requester wins,
// grant held while requested) and round-robin arbitration (each of three
// constant requesters gets the bus in turn), and that grants stay one-hot.
module bus_arbiter_tb;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic rr = 0;
  logic [3:0] req = 0, grant;
  bus_arbiter #(.N_USERS(4)) dut (.clk, .rst_n, .round_robin(rr), .req, .grant);

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk); #1 rst_n = 1;
    req = 4'b1010; @(posedge clk); #1;
    check(grant == 4'b0010, "priority: user 1 wins");
    req = 4'b1011; @(posedge clk); #1;
    check(grant == 4'b0010, "grant held while requested");
    req = 4'b1001; @(posedge clk); #1;
    check(grant == 4'b0001, "released and passed to user 0");
    req = 0; @(posedge clk); #1; @(posedge clk); #1;
    // round robin: users 0, 2, 3 request; each drops its request once granted
    rr = 1;
    begin
      int order [6];
      for (int k = 0; k < 6; k++) begin
        req = 4'b1101;
        do begin @(posedge clk); #1; end while (grant == 0);
        order[k] = (grant == 4'b0001) ? 0 : (grant == 4'b0100) ? 2 : (grant == 4'b1000) ? 3 : 9;
        req = req & ~grant; @(posedge clk); #1;
      end
      // user 0 had the bus last, so the search starts at user 1
      check(order[0] == 2 && order[1] == 3 && order[2] == 0 && order[3] == 2 &&
            order[4] == 3 && order[5] == 0,
            $sformatf("round robin order %0d %0d %0d %0d %0d %0d", order[0], order[1],
                      order[2], order[3], order[4], order[5]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
