// tb_lowpass_filter: a step and random samples through the filter, compared
// with an independent integer model (48-bit state, 16 guard bits), plus the
// first-sample preload and one-clock latency.
module tb_lowpass_filter;
  logic clk = 0, rst = 1, valid = 0, y_valid;
  logic signed [31:0] x = 0, y;
  logic [3:0] k = 3;
  int checks = 0, failures = 0;
  longint model;
  bit primed = 0;
  lowpass_filter dut (.clk, .rst, .valid, .x, .k, .y, .y_valid);
  always #5 clk = ~clk;

  task automatic sample(input logic signed [31:0] v);
    longint xe;
    @(posedge clk);
    x <= v; valid <= 1;
    @(posedge clk);
    valid <= 0;
    xe = longint'(v) * 65536;
    if (!primed) model = xe;
    else model = model + ((xe - model) >>> k);
    primed = 1;
    #1;
    checks++;
    if (!y_valid || y !== 32'(model >>> 16)) begin
      failures++; $display("FAIL x=%0d y=%0d exp=%0d v=%b", v, y, model >>> 16, y_valid);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    sample(32'sh0002_0000);
    checks++; if (y !== 32'sh0002_0000) failures++;   // preload
    for (int i = 0; i < 80; i++) sample(32'sh0005_0000); // step up
    checks++; if (y < 32'sh0004_FF00) failures++;       // settled
    k = 1;
    for (int i = 0; i < 200; i++) begin
      if (i == 100) k = 6;
      sample($signed($urandom) >>> 8);
    end
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
