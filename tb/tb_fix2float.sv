// tb_fix2float: converts random and edge-case Q16.16 values and decodes the
// float fields back to a real number, which must match the fixed-point value
// to within the 24-bit significand (truncation).
module tb_fix2float;
  logic signed [31:0] fx;
  logic [31:0] fl;
  int checks = 0, failures = 0;
  fix2float dut (.fx, .fl);

  // widen the single-precision fields into a double and read it as a real
  function automatic real decode(input logic [31:0] f);
    logic [63:0] d;
    d = {f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'b0};
    if (f[30:23] == 8'd0) d = 64'b0;
    return $bitstoreal(d);
  endfunction

  task automatic check(input logic signed [31:0] v);
    real exp_r, got, err;
    fx = v; #1;
    exp_r = $itor(v) / 65536.0;
    got = decode(fl);
    err = exp_r - got;
    if (err < 0) err = -err;
    checks++;
    if ((v == 0 && fl != 0) || (v != 0 && err > ((exp_r < 0 ? -exp_r : exp_r) / 8388608.0) * 1.0001)) begin
      failures++;
      $display("FAIL fx=%h fl=%h exp=%f got=%f", v, fl, exp_r, got);
    end
  endtask

  initial begin
    check(32'sh0001_0000);   // 1.0 -> 3F800000
    checks++; if (fl != 32'h3F80_0000) failures++;
    check(-32'sh0002_8000);  // -2.5 -> C0200000
    checks++; if (fl != 32'hC020_0000) failures++;
    check(0);
    check(1);
    check(32'sh7FFF_FFFF);
    check(32'sh8000_0001);
    for (int i = 0; i < 2000; i++) check($signed($urandom) >>> $urandom_range(0, 30));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
