// tb_trip_logic: random conditions and masks; trip_request must equal the OR
// of the enabled conditions one clock later.
module tb_trip_logic;
  logic clk = 0, rst = 1, fr = 0, hp = 0, hr = 0, trip_request;
  logic [1:0] rv = 0;
  logic [7:0] mask = 0;
  int checks = 0, failures = 0, trips = 0;
  trip_logic dut (.clk, .rst, .fr, .hp, .hr, .rv, .mask, .trip_request);
  always #5 clk = ~clk;
  initial begin
    logic exp;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 500; i++) begin
      logic [4:0] c; logic [7:0] m;
      c = 5'($urandom); m = 8'($urandom);
      {fr, rv[1], rv[0], hr, hp} <= c; mask <= m;
      exp = (c[0] & m[0]) | (c[1] & m[1]) | (c[2] & m[2]) | (c[3] & m[3]) | (c[4] & m[4]);
      @(posedge clk); #1;
      checks++;
      if (trip_request !== exp) begin failures++; $display("FAIL c=%b m=%b", c, m); end
      if (exp) trips++;
    end
    if (trips == 0) failures++;
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
