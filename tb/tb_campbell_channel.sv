// tb_campbell_channel: an ADC model answers each convert strobe three clocks
// later with a random signed 12-bit sample. After each poll the mean square
// read from the block must equal sum(x^2)/NSAMP of the samples sent, NSAMP
// conversions must have been requested, and the result must be ready within
// NSAMP*SAMPLE_CYCLES clocks plus a few.
module tb_campbell_channel;
  import wrnd_pkg::*;
  localparam int NS = 16, SC = 8;
  logic clk = 0, rst = 1, adc_convst, adc_drdy = 0;
  logic [11:0] adc_data = 0;
  logic [7:0] gain_dac;
  wb_m2s_t m2s; wb_s2m_t s2m;
  int checks = 0, failures = 0, nconv = 0, cyc = 0;
  longint sumsq = 0;
  int amp = 2047;
  campbell_channel #(.NSAMP(NS), .SAMPLE_CYCLES(SC), .ADC_W(12)) dut (
    .clk, .rst, .wb_i(m2s), .wb_o(s2m), .adc_convst, .adc_drdy, .adc_data, .gain_dac);
  tb_wb_master bfm (.clk, .m2s, .s2m);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  // ADC model
  always @(posedge clk) begin
    if (adc_convst) begin
      int v;
      nconv++;
      v = $urandom_range(0, 2 * amp) - amp;
      repeat (3) @(posedge clk);
      adc_data <= 12'(v); adc_drdy <= 1;
      sumsq += longint'(v) * v;
      @(posedge clk);
      adc_drdy <= 0;
    end
  end

  task automatic chk(input logic c, input string what);
    checks++; if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic one_estimate(input int a);
    logic [7:0] d, b0, b1, b2;
    int t0;
    amp = a; sumsq = 0; nconv = 0;
    bfm.wr(CAM_CTRL, 8'h01);
    t0 = cyc;
    do bfm.rd(CAM_STAT, d); while (!d[0] && cyc - t0 < 4 * NS * SC);
    chk(cyc - t0 <= NS * SC + 12, "estimate ready within NSAMP sample times");
    bfm.rd(CAM_MS0, b0); bfm.rd(CAM_MS1, b1); bfm.rd(CAM_MS2, b2);
    chk(nconv == NS, $sformatf("conversions %0d", nconv));
    chk({b2, b1, b0} == 24'(sumsq / NS), $sformatf("mean square %0d exp %0d", {b2, b1, b0}, sumsq / NS));
  endtask

  initial begin
    logic [7:0] d;
    repeat (3) @(posedge clk);
    rst <= 0;
    bfm.wr(CAM_GAIN, 8'h33);
    bfm.rd(CAM_GAIN, d); chk(d == 8'h33 && gain_dac == 8'h33, "gain register drives the DAC");
    one_estimate(2047);
    one_estimate(2048 - 1);
    one_estimate(100);
    one_estimate(5);
    one_estimate(0);
    for (int i = 0; i < 10; i++) one_estimate($urandom_range(1, 2047));
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
