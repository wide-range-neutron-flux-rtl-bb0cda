// tb_wb_intercon: three register slaves behind the shared-bus decoder. Each
// slave answers reads with its own tag XOR the address and records writes;
// the test checks routing, that unselected slaves see no strobe, and that an
// unmapped address is acknowledged with data 0.
module tb_wb_intercon;
  import wrnd_pkg::*;
  logic clk = 0, rst = 1;
  wb_m2s_t m2s;
  wb_s2m_t s2m;
  wb_m2s_t [2:0] sm;
  wb_s2m_t [2:0] ss;
  logic [7:0] lastw [3];
  int strobes [3];
  int checks = 0, failures = 0;

  wb_intercon #(.NS(3), .BASE({8'h80, 8'h40, 8'h00}), .MASK({8'hC0, 8'hE0, 8'hF0})) dut (
    .clk, .rst, .m2s, .s2m, .slv_m2s(sm), .slv_s2m(ss));
  tb_wb_master bfm (.clk, .m2s, .s2m);
  always #5 clk = ~clk;

  for (genvar g = 0; g < 3; g++) begin : g_slv
    always_ff @(posedge clk) begin
      ss[g].ack <= sm[g].cyc & sm[g].stb & ~ss[g].ack;
      ss[g].dat <= 8'(8'hA0 + g) ^ sm[g].adr;
      if (sm[g].cyc & sm[g].stb & ~ss[g].ack) begin
        strobes[g] <= strobes[g] + 1;
        if (sm[g].we) lastw[g] <= sm[g].dat;
      end
    end
  end

  task automatic chk(input logic c, input string what);
    checks++; if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    logic [7:0] d;
    int exp_s;
    for (int i = 0; i < 3; i++) begin strobes[i] = 0; lastw[i] = 0; end
    ss = '0;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 300; i++) begin
      logic [7:0] a, w;
      int prev_cnt [3];
      a = 8'($urandom); w = 8'($urandom);
      exp_s = (a[7:4] == 4'h0) ? 0 : (a[7:5] == 3'b010) ? 1 : (a[7:6] == 2'b10) ? 2 : -1;
      for (int j = 0; j < 3; j++) prev_cnt[j] = strobes[j];
      if (i % 2) begin
        bfm.rd(a, d);
        chk(d == ((exp_s < 0) ? 8'h00 : (8'(8'hA0 + exp_s) ^ a)), "read data routed");
      end else begin
        bfm.wr(a, w);
        @(posedge clk);
        if (exp_s >= 0) chk(lastw[exp_s] == w, "write routed");
      end
      @(posedge clk);
      for (int j = 0; j < 3; j++)
        chk((strobes[j] - prev_cnt[j]) == ((j == exp_s) ? 1 : 0), "only the addressed slave strobed");
    end
    chk(bfm.timeouts == 0, "no bus timeouts (unmapped addresses acknowledged)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
