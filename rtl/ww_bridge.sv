// ww_bridge: WISHBONE/WISHBONE bridge between the communication section
// (bus II) and the processing section (bus I).
//
// Two unidirectional ports, each a wb_dpram:
//  - CP port (CP_DEPTH = 32 bytes): written by the communication section,
//    read by the processing section. It carries the configuration block.
//  - PC port (PC_DEPTH = 64 bytes): written by the processing section, read
//    by the communication section. It carries the configuration echo, the
//    log10 flux and rate as 32-bit floats and status (layout in wrnd_pkg).
// Each bus sees the ports at CP_BASE and PCP_BASE through its decoder; the
// bridge exposes one slave pair per bus. The two-port structure follows the
// design; the depths and layout are this implementation's choice.
module ww_bridge
  import wrnd_pkg::*;
#(
  parameter int CP_DEPTH = 32,
  parameter int PC_DEPTH = 64
) (
  input  logic    clk_p,     // processing section
  input  logic    rst_p,
  input  wb_m2s_t p_cp_i,    // bus I -> CP port (read side)
  output wb_s2m_t p_cp_o,
  input  wb_m2s_t p_pc_i,    // bus I -> PC port (write side)
  output wb_s2m_t p_pc_o,
  input  logic    clk_c,     // communication section
  input  logic    rst_c,
  input  wb_m2s_t c_cp_i,    // bus II -> CP port (write side)
  output wb_s2m_t c_cp_o,
  input  wb_m2s_t c_pc_i,    // bus II -> PC port (read side)
  output wb_s2m_t c_pc_o
);
  wb_dpram #(.DEPTH(CP_DEPTH)) u_cp_port (
    .clk_a(clk_c), .rst_a(rst_c), .a_i(c_cp_i), .a_o(c_cp_o),
    .clk_b(clk_p), .rst_b(rst_p), .b_i(p_cp_i), .b_o(p_cp_o)
  );

  wb_dpram #(.DEPTH(PC_DEPTH)) u_pc_port (
    .clk_a(clk_p), .rst_a(rst_p), .a_i(p_pc_i), .a_o(p_pc_o),
    .clk_b(clk_c), .rst_b(rst_c), .b_i(c_pc_i), .b_o(c_pc_o)
  );
endmodule
