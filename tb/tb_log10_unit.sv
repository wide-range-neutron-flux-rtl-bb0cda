// tb_log10_unit: log10 of random integers against the real-valued $log10,
// within 2^-14 decades, and the latency of FRAC_BITS + 2 clocks.
module tb_log10_unit;
  localparam int FB = 20;
  logic clk = 0, rst = 1, start = 0, busy, done;
  logic [31:0] x = 0;
  logic signed [31:0] y;
  int checks = 0, failures = 0;
  log10_unit #(.FRAC_BITS(FB)) dut (.clk, .rst, .start, .x, .busy, .done, .y);
  always #5 clk = ~clk;

  task automatic run(input logic [31:0] v);
    int lat = 0;
    real exp_r, got, err;
    @(posedge clk);
    x <= v; start <= 1;
    @(posedge clk);
    start <= 0;
    do begin @(posedge clk); lat++; end while (!done && lat < 100);
    exp_r = (v == 0) ? 0.0 : $log10(real'(v));
    got = real'(y) / 65536.0;
    err = exp_r - got; if (err < 0) err = -err;
    checks++;
    if (err > 1.0 / 16384.0) begin
      failures++; $display("FAIL x=%0d exp=%f got=%f", v, exp_r, got);
    end
    checks++;
    if (lat != FB + 2) begin   // clocks from the one after start to done
      failures++; $display("FAIL latency %0d", lat + 1);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    run(1); run(10); run(1000); run(0); run(2); run(32'hFFFF_FFFF); run(1234567);
    for (int i = 0; i < 200; i++) run($urandom >> $urandom_range(0, 31));
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
