// tb_ww_bridge: configuration bytes written on the communication side come out
// of the CP port on the processing side; results written on the processing
// side come out of the PC port on the communication side.
module tb_ww_bridge;
  import wrnd_pkg::*;
  logic clk_p = 0, clk_c = 0, rst = 1;
  wb_m2s_t pcp_m, ppc_m, ccp_m, cpc_m;
  wb_s2m_t pcp_s, ppc_s, ccp_s, cpc_s;
  logic [7:0] cp_ref [32], pc_ref [64];
  int checks = 0, failures = 0;
  ww_bridge dut (.clk_p, .rst_p(rst), .p_cp_i(pcp_m), .p_cp_o(pcp_s), .p_pc_i(ppc_m), .p_pc_o(ppc_s),
                 .clk_c, .rst_c(rst), .c_cp_i(ccp_m), .c_cp_o(ccp_s), .c_pc_i(cpc_m), .c_pc_o(cpc_s));
  tb_wb_master m_pcp (.clk(clk_p), .m2s(pcp_m), .s2m(pcp_s));
  tb_wb_master m_ppc (.clk(clk_p), .m2s(ppc_m), .s2m(ppc_s));
  tb_wb_master m_ccp (.clk(clk_c), .m2s(ccp_m), .s2m(ccp_s));
  tb_wb_master m_cpc (.clk(clk_c), .m2s(cpc_m), .s2m(cpc_s));
  always #5 clk_p = ~clk_p;
  always #6 clk_c = ~clk_c;
  initial begin
    logic [7:0] d;
    repeat (3) @(posedge clk_c);
    rst <= 0;
    for (int i = 0; i < 32; i++) begin cp_ref[i] = 8'($urandom); m_ccp.wr(CP_BASE + 8'(i), cp_ref[i]); end
    for (int i = 0; i < 64; i++) begin pc_ref[i] = 8'($urandom); m_ppc.wr(PCP_BASE + 8'(i), pc_ref[i]); end
    for (int i = 0; i < 32; i++) begin
      m_pcp.rd(CP_BASE + 8'(i), d); checks++;
      if (d !== cp_ref[i]) begin failures++; $display("FAIL CP %0d", i); end
    end
    for (int i = 0; i < 64; i++) begin
      m_cpc.rd(PCP_BASE + 8'(i), d); checks++;
      if (d !== pc_ref[i]) begin failures++; $display("FAIL PC %0d", i); end
    end
    // the ports are one-way: writes from the reading side change nothing
    m_pcp.wr(CP_BASE + 8'd3, ~cp_ref[3]);
    m_cpc.wr(PCP_BASE + 8'd5, ~pc_ref[5]);
    m_pcp.rd(CP_BASE + 8'd3, d);  checks++; if (d !== cp_ref[3]) failures++;
    m_cpc.rd(PCP_BASE + 8'd5, d); checks++; if (d !== pc_ref[5]) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
