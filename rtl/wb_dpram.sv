// wb_dpram: one port of the WISHBONE/WISHBONE bridge.
//
// A dual-port RAM of DEPTH bytes with a WISHBONE slave on each side: side A
// (the section that owns the data) can only write, side B (the other
// section) can only read, which makes the port unidirectional as the design
// describes. Each side has its own clock, so the two sections may run from
// separate clocks. Both slaves answer one clock after stb; a read of B
// returns the byte stored before any write of A in the same cycle.
// Addresses wrap modulo DEPTH (the bus decoder selects the window). Reads
// from side A and writes to side B are acknowledged and ignored. The RAM is
// cleared to zero at start (initial contents are not specified in the
// design; the initial block is for simulation and FPGA power-up).
module wb_dpram
  import wrnd_pkg::*;
#(
  parameter int DEPTH = 64
) (
  input  logic    clk_a,
  input  logic    rst_a,
  input  wb_m2s_t a_i,
  output wb_s2m_t a_o,
  input  logic    clk_b,
  input  logic    rst_b,
  input  wb_m2s_t b_i,
  output wb_s2m_t b_o
);
  localparam int AW = $clog2(DEPTH);
  logic [7:0] mem [DEPTH];

  initial for (int i = 0; i < DEPTH; i++) mem[i] = 8'h00;

  wire a_req = a_i.cyc & a_i.stb & ~a_o.ack;
  wire b_req = b_i.cyc & b_i.stb & ~b_o.ack;

  always_ff @(posedge clk_a) begin
    if (a_req && a_i.we) mem[a_i.adr[AW-1:0]] <= a_i.dat;
  end

  always_ff @(posedge clk_a) begin
    if (rst_a) a_o.ack <= 1'b0;
    else       a_o.ack <= a_req;
  end
  assign a_o.dat = 8'h00;

  always_ff @(posedge clk_b) begin
    if (rst_b) b_o.ack <= 1'b0;
    else       b_o.ack <= b_req;
    if (b_req) b_o.dat <= mem[b_i.adr[AW-1:0]];
  end
endmodule
