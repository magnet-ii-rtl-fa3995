// addr_translator_tb: loads the DG, VC and MC tables, streams one header of
// each routing mode plus a reserved-mode header, and checks that DEST is
// replaced by the right table's entry, SRC by the station address and that
// all other bytes pass unchanged.
module addr_translator_tb;
  import magnet_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic tbl_we = 0, in_valid = 0, in_sop = 0, out_valid, out_sop, translated;
  logic [1:0] tbl_sel = 0;
  logic [7:0] tbl_addr = 0, tbl_wdata = 0, in_byte = 0, out_byte;
  logic [7:0] my_addr = 8'h2C;
  addr_translator dut (.clk, .rst_n, .my_addr, .tbl_we, .tbl_sel, .tbl_addr, .tbl_wdata,
    .in_valid, .in_sop, .in_byte, .out_valid, .out_sop, .out_byte, .translated);

  function automatic logic [7:0] entry(input int sel, input int a);
    return 8'(a * 7 + sel * 50 + 3);
  endfunction

  task automatic packet(input logic [1:0] mode, input logic [7:0] route);
    logic [7:0] b [16];
    for (int k = 0; k < 16; k++) b[k] = 8'($urandom);
    b[1] = {4'b0110, mode, SZ_128};
    b[2] = route;
    for (int k = 0; k < 16; k++) begin
      logic [7:0] e;
      e = b[k];
      if (mode != MODE_RSV && k == 3) e = entry(int'(mode), int'(route));
      if (mode != MODE_RSV && k == 4) e = my_addr;
      in_valid = 1; in_sop = (k == 0); in_byte = b[k];
      #1;
      check(out_valid && out_byte == e, $sformatf("mode %0d byte %0d got %h exp %h",
                                                 mode, k, out_byte, e));
      @(posedge clk); #1;
    end
    in_valid = 0; in_sop = 0;
    repeat (2) @(posedge clk); #1;
  endtask

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int sel = 0; sel < 3; sel++)
      for (int a = 0; a < 256; a++) begin
        tbl_we = 1; tbl_sel = 2'(sel); tbl_addr = 8'(a); tbl_wdata = entry(sel, a);
        @(posedge clk); #1;
      end
    tbl_we = 0;
    packet(MODE_DG, 8'd17);
    packet(MODE_VC, 8'd200);
    packet(MODE_MC, 8'd33);
    packet(MODE_RSV, 8'd5);
    packet(MODE_DG, 8'd255);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
