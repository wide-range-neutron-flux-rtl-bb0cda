// tb_wb_master: WISHBONE master bus-functional model for testbenches.
// wr(adr, dat) and rd(adr, dat) run one classic single cycle each and wait
// for ack (with a 1000-clock limit that sets `timeouts`).
module tb_wb_master
  import wrnd_pkg::*;
(
  input  logic    clk,
  output wb_m2s_t m2s,
  input  wb_s2m_t s2m
);
  int timeouts = 0;
  initial m2s = WB_M2S_IDLE;

  task automatic wr(input logic [7:0] adr, input logic [7:0] dat);
    int n = 0;
    @(posedge clk);
    m2s <= '{cyc: 1'b1, stb: 1'b1, we: 1'b1, adr: adr, dat: dat};
    do begin @(posedge clk); n++; end while (!s2m.ack && n < 1000);
    if (n >= 1000) timeouts++;
    m2s <= WB_M2S_IDLE;
  endtask

  task automatic rd(input logic [7:0] adr, output logic [7:0] dat);
    int n = 0;
    @(posedge clk);
    m2s <= '{cyc: 1'b1, stb: 1'b1, we: 1'b0, adr: adr, dat: 8'h00};
    do begin @(posedge clk); n++; end while (!s2m.ack && n < 1000);
    if (n >= 1000) timeouts++;
    dat = s2m.dat;
    m2s <= WB_M2S_IDLE;
  endtask
endmodule
