// fix2float: signed Q16.16 fixed point to IEEE-754 single precision.
//
// The processing results (log10 flux, rate) leave the processing section as
// 32-bit floating-point words, as the design specifies. Combinational: take
// the magnitude, find its leading one at bit p, exponent = 127 + p - 16, and
// left-align the bits below the leading one as the 23-bit fraction. Bits
// beyond the 24th significant bit are truncated (rounding is not specified;
// truncation is this implementation's choice). Zero maps to +0.0.
module fix2float (
  input  logic signed [31:0] fx,
  output logic        [31:0] fl
);
  logic [31:0] mag;
  logic [31:0] norm;
  int          p;

  always_comb begin
    mag = fx[31] ? 32'(-fx) : 32'(fx);
    p = 0;
    for (int i = 0; i < 32; i++)
      if (mag[i]) p = i;
    norm = mag << (31 - p);
    if (mag == 0) fl = 32'h0;
    else          fl = {fx[31], 8'(127 + p - 16), norm[30:8]};
  end
endmodule
