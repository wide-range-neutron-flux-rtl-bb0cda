// tb_dsp_soc_range: wide-range sweep of the DSP system on chip. One flux
// value f drives both detector models at once, as a fission chamber does:
// the pulse generator emits f pulses per counting period (a pile-up limit of
// one pulse per 4 clocks), and the Campbell ADC model produces uniformly
// distributed samples whose mean square is K*f. With the channel offsets
// set over the serial link (pulse 0, Campbell -log10 K) the reported log10
// flux must follow log10 f within 0.12 decade over four decades, going up
// and coming down. It also checks which channel is in use at each step:
// pulses at the low end, Campbell at the high end, and in the overlap the
// channel the sweep came from (hysteresis). Periods are shortened
// (3000-clock counting period, 256 Campbell samples every 8 clocks).
module tb_dsp_soc_range;
  import wrnd_pkg::*;
  localparam int POLL = 4000, PER = 3000, NM = 16, NS = 256, SC = 8, DIV = 16;
  localparam real K = 1024.0 / 30.0;   // mean square per unit flux
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

  dsp_soc #(.POLL_CYCLES(POLL), .PERIOD_CYCLES(PER), .NMAX(NM), .NSAMP(NS), .SAMPLE_CYCLES(SC),
            .CLK_DIV(DIV), .COMM_WDT(30000)) dut (.*);
  always #25 clk = ~clk;

  int checks = 0, failures = 0, n_camp = 0, n_pulse = 0, n_switch = 0;
  task automatic chk(input logic c, input string what);
    checks++; if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  real flux = 1.0;
  // pulse generator: mean spacing PER/f clocks, at least 4 (pile-up)
  always begin
    int gap;
    gap = int'(real'(PER) / flux);
    if (gap < 4) gap = 4;
    repeat (gap - 2) @(posedge clk);
    pulse_in <= 1; repeat (2) @(posedge clk); pulse_in <= 0;
  end
  // Campbell ADC: uniform samples in [-a, a], mean square a^2/3 = K*f
  always @(posedge clk) if (adc_convst) begin
    int a, v;
    a = int'($sqrt(3.0 * K * flux));
    if (a > 2047) a = 2047;
    v = $urandom_range(0, 2 * a) - a;
    repeat (2) @(posedge clk);
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
    while (uart_txd && t < 200000) begin @(posedge clk); t++; end
    repeat (DIV / 2) @(posedge clk);
    for (int i = 0; i < 8; i++) begin repeat (DIV) @(posedge clk); b[i] = uart_txd; end
    repeat (DIV) @(posedge clk);
  endtask
  task automatic uart_write(input int a, input logic [7:0] d);
    logic [7:0] r;
    fork
      begin host_tx(OP_WRITE); host_tx(8'(a)); host_tx(d); end
      host_rx(r);
    join
    chk(r == RSP_OK, "parameter write acknowledged");
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

  // one sweep step: set flux, let the window settle, read and compare
  task automatic step(input real f, input int want_camp);
    real lg, e; logic [7:0] st; logic was;
    was = fr;
    flux = f;
    repeat ((NM + 3) * POLL) @(posedge clk);
    uart_flux(lg, st);
    e = $log10(f);
    $display("flux %8.1f  log %7.3f  expected %7.3f  channel %s", f, lg, e, st[0] ? "Campbell" : "pulse");
    chk(absr(lg - e) < 0.12, $sformatf("log flux at f=%0.1f", f));
    chk(st[0] == want_camp[0], $sformatf("channel at f=%0.1f", f));
    if (st[0]) n_camp++; else n_pulse++;
    if (st[0] != was) n_switch++;
  endtask

  initial begin
    logic [31:0] cofs;
    repeat (5) @(posedge clk);
    rst_n <= 1;
    repeat (200) @(posedge clk);
    cofs = 32'(longint'(-$log10(K) * 65536.0));
    for (int i = 0; i < 4; i++) uart_write(CFG_COFS + i, cofs[8*i +: 8]);
    uart_write(CFG_TGT, 8'd100);
    uart_write(CFG_TRIPMSK, 8'h00);
    // up: pulse channel until the mean square passes VMAX (f = 480)
    step(1.0, 0);  step(3.0, 0);  step(10.0, 0); step(30.0, 0);
    step(100.0, 0); step(300.0, 0);
    step(1000.0, 1); step(3000.0, 1); step(10000.0, 1);
    // down: Campbell channel until the mean square reaches VMIN (f = 30)
    step(3000.0, 1); step(300.0, 1); step(100.0, 1);
    step(10.0, 0); step(1.0, 0);
    chk(n_switch >= 2, "channel switched up and down");
    $display("steps on pulse channel %0d, on Campbell channel %0d, switches %0d", n_pulse, n_camp, n_switch);
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
