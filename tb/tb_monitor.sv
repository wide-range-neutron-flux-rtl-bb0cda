// tb_monitor: writes LOG and RATE floats, starts a transfer, and decodes the
// two serial DAC frames at the rising clock edges, checking each 12-bit code
// against the scaling formula computed with real arithmetic, including
// clamping at both ends and that a start while busy is ignored.
module tb_monitor;
  import wrnd_pkg::*;
  logic clk = 0, rst = 1, dac_sclk, dac_din;
  logic [1:0] dac_cs_n;
  wb_m2s_t m2s; wb_s2m_t s2m;
  int checks = 0, failures = 0;
  logic [15:0] fr [2];
  int nbits [2];
  monitor dut (.clk, .rst, .wb_i(m2s), .wb_o(s2m), .dac_sclk, .dac_din, .dac_cs_n);
  tb_wb_master bfm (.clk, .m2s, .s2m);
  always #5 clk = ~clk;

  always @(posedge dac_sclk) begin
    if (!dac_cs_n[0]) begin fr[0] = {fr[0][14:0], dac_din}; nbits[0]++; end
    if (!dac_cs_n[1]) begin fr[1] = {fr[1][14:0], dac_din}; nbits[1]++; end
  end

  task automatic chk(input logic c, input string what);
    checks++; if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic [31:0] f32(input real v);
    logic [63:0] d;
    d = $realtobits(v);
    if (v == 0.0) return 32'h0;
    return {d[63], 8'(int'(d[62:52]) - 1023 + 127), d[51:29]};
  endfunction

  function automatic int clampc(input real v);
    int c;
    c = $rtoi(v);
    if (v < 0.0 && $itor(c) != v) c = c - 1;   // floor
    if (c < 0) c = 0;
    if (c > 4095) c = 4095;
    return c;
  endfunction

  task automatic xfer(input real lg, input real rt);
    logic [31:0] a, b;
    logic [7:0] st;
    int n = 0;
    a = f32(lg); b = f32(rt);
    for (int i = 0; i < 4; i++) bfm.wr(MON_BASE + 8'(i), a[8*i +: 8]);
    for (int i = 0; i < 4; i++) bfm.wr(MON_BASE + 8'(4 + i), b[8*i +: 8]);
    nbits[0] = 0; nbits[1] = 0;
    bfm.wr(MON_START, 8'h01);
    bfm.wr(MON_BASE + 8'd0, 8'hFF);       // changes input while busy
    bfm.wr(MON_START, 8'h01);             // ignored while busy
    do begin bfm.rd(MON_START + 8'd1, st); n++; end while (st[0] && n < 1000);
    chk(nbits[0] == 16 && nbits[1] == 16, $sformatf("one 16-bit frame per DAC (%0d,%0d)", nbits[0], nbits[1]));
    chk(fr[0][15:12] == 0 && fr[0][11:0] == 12'(clampc(lg * 409.0)),
        $sformatf("LOG code %0d exp %0d", fr[0][11:0], clampc(lg * 409.0)));
    chk(fr[1][11:0] == 12'(clampc(2048.0 + rt * 1023.0)),
        $sformatf("RATE code %0d exp %0d", fr[1][11:0], clampc(2048.0 + rt * 1023.0)));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    xfer(5.0, -0.5);
    xfer(0.0, 0.0);
    xfer(9.75, 1.25);
    xfer(12.5, 3.0);     // both clamp high
    xfer(-1.0, -4.0);    // both clamp low
    xfer(2.375, -0.125);
    xfer(0.001953125, 0.0078125);
    chk(bfm.timeouts == 0, "no bus timeouts");
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
