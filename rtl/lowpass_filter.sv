// lowpass_filter: first-order IIR low-pass between the logarithm stage and the
// rate stage.
//
// On each `valid` sample x (signed Q16.16): y <= y + (x - y) / 2^k, where the
// shift k (0..15) comes from the configuration. The state carries 16 extra
// fraction bits so that small steps are not lost. The first sample after reset
// preloads the state, so the filter does not ramp up from zero. y is updated
// one clock after `valid`, and `y_valid` marks that cycle.
// The design asks for a low-pass filter here because the log stream is noisy;
// its form and the preload are this implementation's choices.
module lowpass_filter (
  input  logic               clk,
  input  logic               rst,
  input  logic               valid,
  input  logic signed [31:0] x,
  input  logic        [3:0]  k,
  output logic signed [31:0] y,
  output logic               y_valid
);
  logic signed [47:0] acc;
  logic signed [47:0] xe;
  logic               primed;

  assign xe = {x, 16'h0};
  assign y  = acc[47:16];

  always_ff @(posedge clk) begin
    if (rst) begin
      acc     <= '0;
      primed  <= 1'b0;
      y_valid <= 1'b0;
    end else begin
      y_valid <= valid;
      if (valid) begin
        primed <= 1'b1;
        if (!primed) acc <= xe;
        else         acc <= acc + ((xe - acc) >>> k);
      end
    end
  end
endmodule
