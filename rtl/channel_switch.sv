// channel_switch: data stream switching between the pulse and Campbell
// channels, with hysteresis.
//
// The Campbell channel value is always the reference. Above VMAX only the
// Campbell channel is used and the flag remembers "above"; at or below VMIN
// only the pulse channel is used and the flag remembers "below"; between the
// two limits the flag, i.e. the side the value last left the overlap
// through, decides. This follows the switching flow diagram of the design
// exactly. The decision is taken when `evaluate` is high; `use_camp` (the
// flag, also the Fluctuation Range indication) is a register that holds its
// value between samples. After reset the pulse channel is selected
// (this implementation's choice).
module channel_switch #(
  parameter int W = 24
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         evaluate,
  input  logic [W-1:0] camp,
  input  logic [W-1:0] vmin,
  input  logic [W-1:0] vmax,
  output logic         use_camp
);
  always_ff @(posedge clk) begin
    if (rst)
      use_camp <= 1'b0;
    else if (evaluate) begin
      if (camp > vmax)       use_camp <= 1'b1;
      else if (camp <= vmin) use_camp <= 1'b0;
    end
  end
endmodule
