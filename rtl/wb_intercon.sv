// wb_intercon: shared WISHBONE bus for one master and NS slaves.
//
// The master's request is broadcast to every slave; only the slave whose
// address window matches (adr & MASK[i]) == BASE[i] sees cyc/stb. Its ack and
// read data are returned to the master. An access to an address no slave owns
// is acknowledged on the next cycle with data 0, so a master can never hang.
// The bus is "shared type, 8-bit data, 8-bit address" as the design states;
// the decoding by base and mask is this implementation's choice. Windows are
// packed 8 bits per slave, slave 0 in the low byte.
module wb_intercon
  import wrnd_pkg::*;
#(
  parameter int          NS   = 4,
  parameter logic [NS*8-1:0] BASE = '0,
  parameter logic [NS*8-1:0] MASK = '0
) (
  input  logic              clk,
  input  logic              rst,
  input  wb_m2s_t           m2s,
  output wb_s2m_t           s2m,
  output wb_m2s_t [NS-1:0]  slv_m2s,
  input  wb_s2m_t [NS-1:0]  slv_s2m
);
  logic [NS-1:0] sel;
  logic          miss_ack;

  always_comb begin
    for (int i = 0; i < NS; i++) begin
      sel[i] = ((m2s.adr & MASK[8*i +: 8]) == BASE[8*i +: 8]);
      slv_m2s[i]     = m2s;
      slv_m2s[i].cyc = m2s.cyc & sel[i];
      slv_m2s[i].stb = m2s.stb & sel[i];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) miss_ack <= 1'b0;
    else     miss_ack <= m2s.cyc & m2s.stb & ~(|sel) & ~miss_ack;
  end

  always_comb begin
    s2m = WB_S2M_IDLE;
    for (int i = 0; i < NS; i++)
      if (sel[i]) s2m = slv_s2m[i];
    if (~(|sel)) s2m.ack = miss_ack;
  end
endmodule
