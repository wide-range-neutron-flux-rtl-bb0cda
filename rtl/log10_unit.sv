// log10_unit: decimal logarithm of an unsigned 32-bit integer.
//
// Method: log2(x) = p + log2(m), where p is the position of the leading one
// and m = x / 2^p lies in [1, 2). The fraction bits of log2(m) are found one
// per clock by repeated squaring: square m; if the square is 2 or more the
// next bit is 1 and the square is halved. After FRAC_BITS steps the result is
// multiplied by log10(2) = 0.30102999566 (Q0.32 constant 0x4D104D42).
// Interface: pulse `start` with `x` valid; `busy` is high while working;
// `done` pulses for one clock with `y` (signed Q16.16 decades) valid, and y
// holds until the next start. Latency FRAC_BITS + 2 clocks.
// The design calls for the decimal logarithm of the flux stream; the
// algorithm is this implementation's choice. log10(0) is returned as 0,
// the same as log10(1).
module log10_unit #(
  parameter int FRAC_BITS = 20
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               start,
  input  logic [31:0]        x,
  output logic               busy,
  output logic               done,
  output logic signed [31:0] y
);
  localparam logic [31:0] LOG10_2 = 32'h4D10_4D42;

  logic [31:0]          m;
  logic [4:0]           p;
  logic [FRAC_BITS-1:0] frac;
  logic [$clog2(FRAC_BITS+1)-1:0] step;
  logic [63:0]          sq;
  logic [4:0]           lead;
  logic [5+FRAC_BITS-1:0] log2v;
  logic [5+FRAC_BITS+32-1:0] prod;

  always_comb begin
    lead = '0;
    for (int i = 0; i < 32; i++)
      if (x[i]) lead = 5'(i);
  end

  assign sq    = 64'(m) * 64'(m);
  assign log2v = {p, frac};
  assign prod  = (5+FRAC_BITS+32)'(log2v) * (5+FRAC_BITS+32)'(LOG10_2);

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0;
      done <= 1'b0;
      y    <= '0;
      m    <= '0;
      p    <= '0;
      frac <= '0;
      step <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1;
        p    <= lead;
        m    <= (x == 0) ? 32'h8000_0000 : (x << (5'd31 - lead));
        frac <= '0;
        step <= '0;
      end else if (busy) begin
        if (step == FRAC_BITS[$bits(step)-1:0]) begin
          busy <= 1'b0;
          done <= 1'b1;
          y    <= 32'(prod >> (FRAC_BITS + 16));
        end else begin
          step <= step + 1'b1;
          if (sq[63]) begin
            m    <= sq[63:32];
            frac <= {frac[FRAC_BITS-2:0], 1'b1};
          end else begin
            m    <= sq[62:31];
            frac <= {frac[FRAC_BITS-2:0], 1'b0};
          end
        end
      end
    end
  end
endmodule
