// syscon: WISHBONE system controller of one bus segment.
//
// Passes the 20 MHz system clock through and turns the asynchronous board
// reset (active low) into the synchronous, active-high WISHBONE reset: the
// reset asserts at once and is released two clock edges after rst_n rises,
// so every flip-flop on the bus leaves reset on the same edge.
// The design only names this block; the two-flop release is this
// implementation's choice.
module syscon (
  input  logic clk_i,
  input  logic rst_ni,
  output logic clk_o,
  output logic rst_o
);
  logic [1:0] sync_q;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) sync_q <= 2'b11;
    else         sync_q <= {sync_q[0], 1'b0};
  end

  assign clk_o = clk_i;
  assign rst_o = sync_q[1];
endmodule
