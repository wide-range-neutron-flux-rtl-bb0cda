// tb_dsp_soc_full: the DSP system on chip at its real sizes (5 ms sampling,
// 1/256 s counting periods, 256-period history, 1024 Campbell samples,
// 115200 baud). After the start-up configuration it runs the pulse channel
// at a steady pulse rate, reads the flux over the serial link and checks it
// against the count rate, then raises the Campbell signal above the upper
// switching level and checks that the channel switches and that the reported
// flux follows the mean square of the samples. About 1.1 million clocks.
module tb_dsp_soc_full;
  import wrnd_pkg::*;
  localparam int DIV = 174, PER = 78125;
  logic clk = 0, rst_n = 0;
  logic pulse_in = 0, adc_convst, adc_drdy = 0, uart_rxd = 1, uart_txd;
  logic [11:0] adc_data = 0;
  logic [7:0] thr_dac, gain_dac;
  logic [1:0] reactor_var = 0;
  logic trip_request;
  logic [15:1] vme_addr = 0; logic [5:0] vme_am = 6'h29;
  logic vme_as_n = 1, vme_write_n = 1, vme_data_oe, vme_dtack_n;
  logic [1:0] vme_ds_n = 2'b11;
  logic [15:0] vme_data_i = 0, vme_data_o;
  logic dac_sclk, dac_din; logic [1:0] dac_cs_n;
  logic fr, hp, hr;

  dsp_soc dut (.*);
  always #25 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic chk(input logic c, input string what);
    checks++; if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  int pulse_gap = 100;
  always begin
    repeat (pulse_gap) @(posedge clk);
    pulse_in <= 1; repeat (2) @(posedge clk); pulse_in <= 0;
  end
  int amp = 20;
  always @(posedge clk) if (adc_convst) begin
    int v;
    v = $urandom_range(0, 2 * amp) - amp;
    repeat (3) @(posedge clk);
    adc_data <= 12'(v); adc_drdy <= 1;
    @(posedge clk); adc_drdy <= 0;
  end

  task automatic host_tx(input logic [7:0] b);
    uart_rxd <= 0; repeat (DIV) @(posedge clk);
    for (int i = 0; i < 8; i++) begin uart_rxd <= b[i]; repeat (DIV) @(posedge clk); end
    uart_rxd <= 1; repeat (2 * DIV) @(posedge clk);
  endtask
  task automatic host_rx(output logic [7:0] b);
    int t = 0;
    while (uart_txd && t < 400000) begin @(posedge clk); t++; end
    repeat (DIV / 2) @(posedge clk);
    for (int i = 0; i < 8; i++) begin repeat (DIV) @(posedge clk); b[i] = uart_txd; end
    repeat (DIV) @(posedge clk);
  endtask
  function automatic real f2r(input logic [31:0] f);
    logic [63:0] d;
    d = {f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'b0};
    if (f[30:23] == 0) d = 0;
    return $bitstoreal(d);
  endfunction
  task automatic uart_flux(output real lg, output logic [7:0] st);
    logic [7:0] b [9];
    fork
      host_tx(OP_FLUX);
      for (int i = 0; i < 9; i++) host_rx(b[i]);
    join
    lg = f2r({b[3], b[2], b[1], b[0]});
    st = b[8];
  endtask
  function automatic real absr(input real v); return v < 0 ? -v : v; endfunction

  initial begin
    real lg, e;
    logic [7:0] st;
    repeat (5) @(posedge clk);
    rst_n <= 1;
    repeat (400000) @(posedge clk);
    uart_flux(lg, st);
    e = $log10(real'(PER) / 102.0);
    chk(!st[0] && !fr, "pulse channel in use at low Campbell signal");
    chk(absr(lg - e) < 0.05, $sformatf("pulse log %f expected %f", lg, e));
    chk(thr_dac == 8'h40 && gain_dac == 8'h80, "start-up DAC codes");
    chk(!trip_request, $sformatf("no trip (hp=%0d hr=%0d rate=%h)", hp, hr, dut.u_sp.rate));
    amp = 400;
    repeat (400000) @(posedge clk);
    uart_flux(lg, st);
    e = $log10(400.0 * 400.0 / 3.0) - 1.0;
    chk(st[0] && fr, "Campbell channel above the upper level");
    chk(absr(lg - e) < 0.05, $sformatf("Campbell log %f expected %f", lg, e));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
