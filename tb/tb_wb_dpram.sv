// tb_wb_dpram: side A writes random bytes, side B (own clock, 3:2 ratio)
// reads them back; writes from side B must not change the memory.
module tb_wb_dpram;
  import wrnd_pkg::*;
  localparam int D = 64;
  logic clk_a = 0, clk_b = 0, rst = 1;
  wb_m2s_t a_m, b_m;
  wb_s2m_t a_s, b_s;
  logic [7:0] ref_mem [D];
  int checks = 0, failures = 0;
  wb_dpram #(.DEPTH(D)) dut (.clk_a, .rst_a(rst), .a_i(a_m), .a_o(a_s),
                             .clk_b, .rst_b(rst), .b_i(b_m), .b_o(b_s));
  tb_wb_master ma (.clk(clk_a), .m2s(a_m), .s2m(a_s));
  tb_wb_master mb (.clk(clk_b), .m2s(b_m), .s2m(b_s));
  always #5 clk_a = ~clk_a;
  always #7 clk_b = ~clk_b;
  initial begin
    logic [7:0] d;
    for (int i = 0; i < D; i++) ref_mem[i] = 0;
    repeat (3) @(posedge clk_b);
    rst <= 0;
    for (int i = 0; i < D; i++) begin
      mb.rd(8'(i), d); checks++; if (d !== 8'h00) failures++;   // cleared at start
    end
    for (int i = 0; i < 200; i++) begin
      logic [7:0] a, w;
      a = 8'($urandom_range(0, D-1)); w = 8'($urandom);
      ma.wr(a, w); ref_mem[a] = w;
      if (i % 3 == 0) mb.wr(a, ~w);                               // ignored
      a = 8'($urandom_range(0, D-1));
      mb.rd(a, d);
      checks++;
      if (d !== ref_mem[a]) begin failures++; $display("FAIL adr %0d got %h exp %h", a, d, ref_mem[a]); end
    end
    checks++; if (ma.timeouts + mb.timeouts != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
