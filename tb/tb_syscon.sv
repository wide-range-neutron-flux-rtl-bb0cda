// tb_syscon: checks that the WISHBONE reset asserts with the board reset and
// is released exactly two clock edges after the board reset rises.
module tb_syscon;
  logic clk = 0, rst_n = 1, clk_o, rst_o;
  int checks = 0, failures = 0;
  syscon dut (.clk_i(clk), .rst_ni(rst_n), .clk_o, .rst_o);
  always #5 clk = ~clk;
  task automatic chk(input logic c, input string what);
    checks++; if (!c) begin failures++; $display("FAIL %s", what); end
  endtask
  initial begin
    #1 rst_n = 0;
    #1 chk(rst_o === 1'b1, "reset asserted");
    repeat (3) @(posedge clk);
    #1 chk(rst_o === 1'b1, "reset held");
    rst_n = 1;
    @(posedge clk); #1 chk(rst_o === 1'b1, "still in reset after 1 edge");
    @(posedge clk); #1 chk(rst_o === 1'b0, "released after 2 edges");
    repeat (4) @(posedge clk);
    #2 rst_n = 0;
    #1 chk(rst_o === 1'b1, "asynchronous assertion");
    #1 chk(clk_o === clk, "clock passed through");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
