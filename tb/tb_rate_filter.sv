// tb_rate_filter: rate = difference of successive samples times RATE_SCALE,
// zero on the first sample, saturated at the 32-bit limits.
module tb_rate_filter;
  localparam int RS = 200;
  logic clk = 0, rst = 1, valid = 0, rate_valid;
  logic signed [31:0] x = 0, rate;
  int checks = 0, failures = 0;
  longint prev;
  bit primed = 0;
  rate_filter #(.RATE_SCALE(RS)) dut (.clk, .rst, .valid, .x, .rate, .rate_valid);
  always #5 clk = ~clk;

  task automatic sample(input logic signed [31:0] v);
    longint e;
    @(posedge clk);
    x <= v; valid <= 1;
    @(posedge clk);
    valid <= 0;
    e = primed ? (longint'(v) - prev) * RS : 0;
    if (e > 64'sh7FFF_FFFF) e = 64'sh7FFF_FFFF;
    if (e < -64'sh8000_0000) e = -64'sh8000_0000;
    prev = v; primed = 1;
    #1;
    checks++;
    if (!rate_valid || rate !== 32'(e)) begin
      failures++; $display("FAIL x=%0d rate=%0d exp=%0d", v, rate, e);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    sample(32'sh0003_0000);
    sample(32'sh0003_0148);    // +0.005 decades in 5 ms -> 1 decade/s
    checks++; if (rate < 32'sh0000_FF00 || rate > 32'sh0001_0100) failures++;
    sample(32'sh7FFF_0000);    // saturates
    sample(32'sh8000_0000);
    for (int i = 0; i < 200; i++) sample($signed($urandom) >>> $urandom_range(4, 20));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
