// watchdog: watch dog timer for a hard-wired sequencer.
//
// The counter restarts whenever `kick` is high. If it reaches TIMEOUT clock
// cycles without a kick, `bite` is high for one cycle and the counter starts
// again; the owner resets its sequencer on `bite`. The design states that both
// processors use watch dog timers; the timeout value is this implementation's
// choice (2^20 cycles, 52 ms at 20 MHz).
module watchdog #(
  parameter int unsigned TIMEOUT = 1 << 20
) (
  input  logic clk,
  input  logic rst,
  input  logic kick,
  output logic bite
);
  logic [$clog2(TIMEOUT+1)-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst || kick) begin
      cnt  <= '0;
      bite <= 1'b0;
    end else if (cnt == $bits(cnt)'(TIMEOUT - 1)) begin
      cnt  <= '0;
      bite <= 1'b1;
    end else begin
      cnt  <= cnt + 1'b1;
      bite <= 1'b0;
    end
  end
endmodule
