// trip_logic: trip request from the processing results and external status.
//
// Inputs are the Fluctuation Range (FR) and High Power (HP) flags, the High
// Rate (HR) flag from the signal processor and two one-bit reactor variables.
// The design says only that predefined conditions on these produce a Boolean
// trip call; here each input is one condition, enabled by a bit of `mask`
// (bit0 HP, bit1 HR, bit2 rv[0], bit3 rv[1], bit4 FR), and trip_request is
// the registered OR of the enabled conditions (one cycle latency, not
// latched: it falls when the conditions clear).
module trip_logic (
  input  logic       clk,
  input  logic       rst,
  input  logic       fr,
  input  logic       hp,
  input  logic       hr,
  input  logic [1:0] rv,
  input  logic [7:0] mask,
  output logic       trip_request
);
  logic [4:0] cond;
  assign cond = {fr, rv[1], rv[0], hr, hp};

  always_ff @(posedge clk) begin
    if (rst) trip_request <= 1'b0;
    else     trip_request <= |(cond & mask[4:0]);
  end
endmodule
