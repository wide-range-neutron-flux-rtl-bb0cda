// rate_filter: rate of change of the filtered log flux.
//
// On each `valid` sample x (signed Q16.16 decades) the output is
// rate = (x - x_prev) * RATE_SCALE, with RATE_SCALE the sampling frequency in
// Hz (200 for the 5 ms sampling period), so the rate is in decades per second,
// Q16.16, saturated to the 32-bit range. The first sample after reset gives a
// rate of zero. The result appears one clock after `valid` (`rate_valid`).
// The design implements rate as a digital filter; the first difference is
// this implementation's choice.
module rate_filter #(
  parameter int RATE_SCALE = 200
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               valid,
  input  logic signed [31:0] x,
  output logic signed [31:0] rate,
  output logic               rate_valid
);
  logic signed [31:0] prev;
  logic               primed;
  logic signed [63:0] prod;

  assign prod = (64'(x) - 64'(prev)) * 64'(RATE_SCALE);

  always_ff @(posedge clk) begin
    if (rst) begin
      prev       <= '0;
      primed     <= 1'b0;
      rate       <= '0;
      rate_valid <= 1'b0;
    end else begin
      rate_valid <= valid;
      if (valid) begin
        prev   <= x;
        primed <= 1'b1;
        if (!primed)                      rate <= '0;
        else if (prod > 64'sh7FFF_FFFF)   rate <= 32'sh7FFF_FFFF;
        else if (prod < -64'sh8000_0000)  rate <= 32'sh8000_0000;
        else                              rate <= prod[31:0];
      end
    end
  end
endmodule
