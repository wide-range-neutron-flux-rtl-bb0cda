// tb_dsp_soc: end-to-end test of the DSP system on chip at shortened periods.
// A pulse generator feeds the discriminator input, an ADC model answers the
// convert strobes with uniformly distributed samples of a chosen amplitude,
// a serial host talks to the UART, a VME master reads the result words and a
// DAC model decodes the LOG/RATE frames. The flux is taken from low (pulse
// channel) through the overlap to high (Campbell channel) and back. Checked:
// log10 flux against the expected value of each region, channel choice with
// hysteresis, front-end settings written from the host, HP, HR and
// reactor-variable trips, UART and VME commands, DAC refresh and the
// communication watchdog. Each mechanism must occur at least once.
module tb_dsp_soc;
  import wrnd_pkg::*;
  localparam int POLL = 4000, PER = 3000, NM = 16, NS = 32, SC = 16, DIV = 16;
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
  always #25 clk = ~clk;   // 20 MHz

  int checks = 0, failures = 0;
  // mechanism counters
  int m_to_camp = 0, m_to_pulse = 0, m_hold = 0, m_multi = 0, m_one = 0, m_hp = 0, m_hr = 0;
  int m_trip = 0, m_rv_trip = 0, m_uart_w = 0, m_uart_r = 0, m_uart_f = 0, m_vme = 0, m_dac = 0, m_wdt = 0;

  task automatic chk(input logic c, input string what);
    checks++; if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------- stimulus models ----------------
  int pulse_gap = 0;          // clocks between pulses, 0 = none
  always begin
    if (pulse_gap == 0) @(posedge clk);
    else begin
      repeat (pulse_gap) @(posedge clk);
      pulse_in <= 1; repeat (2) @(posedge clk); pulse_in <= 0;
    end
  end

  int amp = 0;
  always @(posedge clk) if (adc_convst) begin
    int v;
    v = (amp == 0) ? 0 : $urandom_range(0, 2 * amp) - amp;
    repeat (3) @(posedge clk);
    adc_data <= 12'(v); adc_drdy <= 1;
    @(posedge clk); adc_drdy <= 0;
  end

  // DAC frames
  int dac_bits = 0;
  always @(posedge dac_sclk) if (!dac_cs_n[1]) begin
    dac_bits++;
    if (dac_bits % 16 == 0) m_dac++;
  end

  // mechanism watchers
  logic fr_q = 0; int cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (dut.u_sp.pass_done) begin
        if (dut.u_sp.fr && !fr_q) m_to_camp++;
        if (!dut.u_sp.fr && fr_q) m_to_pulse++;
        if (dut.u_sp.cms > dut.u_sp.vmin && dut.u_sp.cms <= dut.u_sp.vmax) m_hold++;
        if (!dut.u_sp.fr && dut.u_sp.nper != 0) m_multi++;
        if (!dut.u_sp.fr && dut.u_sp.nper == 0 && dut.u_sp.psum != 0) m_one++;
        if (hp) m_hp++;
        if (hr) m_hr++;
        fr_q <= dut.u_sp.fr;
      end
      if (dut.u_cp.wdt_reset) m_wdt++;
    end
  end

  // ---------------- serial host ----------------
  task automatic host_tx(input logic [7:0] b);
    uart_rxd <= 0; repeat (DIV) @(posedge clk);
    for (int i = 0; i < 8; i++) begin uart_rxd <= b[i]; repeat (DIV) @(posedge clk); end
    uart_rxd <= 1; repeat (2 * DIV) @(posedge clk);
  endtask
  task automatic host_rx(output logic [7:0] b, output logic ok);
    int t = 0;
    while (uart_txd && t < 200000) begin @(posedge clk); t++; end
    ok = !uart_txd;
    repeat (DIV / 2) @(posedge clk);
    for (int i = 0; i < 8; i++) begin repeat (DIV) @(posedge clk); b[i] = uart_txd; end
    repeat (DIV) @(posedge clk);
  endtask
  task automatic uart_write(input int a, input logic [7:0] d);
    logic [7:0] r; logic ok;
    fork
      begin host_tx(OP_WRITE); host_tx(8'(a)); host_tx(d); end
      host_rx(r, ok);
    join
    chk(ok && r == RSP_OK, "UART parameter write answered K");
    m_uart_w++;
  endtask
  task automatic uart_read(input int a, output logic [7:0] d);
    logic ok;
    fork
      begin host_tx(OP_READ); host_tx(8'(a)); end
      host_rx(d, ok);
    join
    chk(ok, "UART parameter read answered");
    m_uart_r++;
  endtask
  function automatic real f2r(input logic [31:0] f);
    logic [63:0] d;
    d = {f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'b0};
    if (f[30:23] == 0) d = 0;
    return $bitstoreal(d);
  endfunction
  task automatic uart_flux(output real lg, output real rt, output logic [7:0] st);
    logic [7:0] b [9]; logic ok;
    fork
      host_tx(OP_FLUX);
      for (int i = 0; i < 9; i++) host_rx(b[i], ok);
    join
    lg = f2r({b[3], b[2], b[1], b[0]});
    rt = f2r({b[7], b[6], b[5], b[4]});
    st = b[8];
    m_uart_f++;
  endtask

  // ---------------- VME master ----------------
  task automatic vme(input logic wr, input logic [15:0] a, input logic [15:0] wd, output logic [15:0] rdat);
    int n = 0;
    @(posedge clk); vme_addr <= a[15:1]; vme_write_n <= ~wr; vme_data_i <= wd;
    @(posedge clk); vme_as_n <= 0;
    @(posedge clk); vme_ds_n <= 2'b00;
    while (vme_dtack_n && n < 200) begin @(posedge clk); n++; end
    chk(!vme_dtack_n, "VME DTACK*");
    rdat = vme_data_o;
    vme_ds_n <= 2'b11; vme_as_n <= 1;
    n = 0;
    while (!vme_dtack_n && n < 200) begin @(posedge clk); n++; end
  endtask

  task automatic settle(input int passes);
    repeat (passes * POLL) @(posedge clk);
  endtask

  function automatic real absr(input real v); return v < 0 ? -v : v; endfunction

  initial begin
    real lg, rt, exp_lg;
    logic [7:0] st, d;
    logic [15:0] w0, w1, w2;
    int t;
    repeat (5) @(posedge clk);
    rst_n <= 1;
    repeat (200) @(posedge clk);
    // host configuration: HP at 3.0 decades, HR at 20 decades/s, target 60
    // counts, Campbell offset -1 decade, threshold/gain codes
    uart_write(CFG_HP + 2, 8'h03);
    uart_write(CFG_HR + 2, 8'd20);
    uart_write(CFG_TGT, 8'd60);
    uart_write(CFG_TGT + 1, 8'd0);
    uart_write(CFG_THR, 8'h5C);
    uart_write(CFG_GAIN, 8'h61);
    settle(2);
    chk(thr_dac == 8'h5C && gain_dac == 8'h61, "front-end DAC codes follow the host");
    uart_read(CFG_TGT, d);
    chk(d == 8'd60, "configuration echo read back");

    // ---- low flux: few pulses per period, multi-period window
    pulse_gap = 300; amp = 10;
    settle(NM + 4);
    uart_flux(lg, rt, st);
    exp_lg = $log10(real'(PER) / 302.0);
    chk(!st[0] && !fr, "low flux uses the pulse channel");
    chk(absr(lg - exp_lg) < 0.15, $sformatf("low flux log %f exp %f", lg, exp_lg));
    chk(dut.u_sp.nper > 0, "multi-period window at low count rate");
    chk(!trip_request, "no trip at low flux");

    // ---- medium: more pulses, Campbell in the overlap (stays on pulse)
    pulse_gap = 20; amp = 100;
    settle(NM + 4);
    uart_flux(lg, rt, st);
    exp_lg = $log10(real'(PER) / 22.0);
    chk(!st[0], "overlap region keeps the pulse channel when entered from below");
    chk(absr(lg - exp_lg) < 0.15, $sformatf("medium flux log %f exp %f", lg, exp_lg));
    chk(dut.u_sp.nper == 0, "one-period window at high count rate");

    // ---- high flux: Campbell above VMAX
    amp = 400; pulse_gap = 4;
    settle(6);
    uart_flux(lg, rt, st);
    exp_lg = $log10(400.0 * 400.0 / 3.0) - 1.0;
    chk(st[0] && fr, "high flux switches to the Campbell channel");
    chk(absr(lg - exp_lg) < 0.1, $sformatf("high flux log %f exp %f", lg, exp_lg));
    chk(hp && st[1], "high power flag above 3 decades");
    chk(trip_request, "trip requested on high power");
    if (trip_request) m_trip++;

    // VME flux reading through the mailbox
    vme(1, 16'hC000, {OP_FLUX, 8'h00}, w0);
    t = 0;
    do begin vme(0, 16'hC002, 0, w0); t++; end while (w0[8] && t < 100);
    vme(0, 16'hC004, 0, w1); vme(0, 16'hC006, 0, w2);
    chk(w0[7:0] == RSP_OK && absr(f2r({w1, w2}) - exp_lg) < 0.1, "VME flux reading");
    m_vme++;

    // ---- back to the overlap: Campbell is kept
    amp = 100; pulse_gap = 20;
    settle(6);
    uart_flux(lg, rt, st);
    chk(st[0], "overlap region keeps the Campbell channel when entered from above");
    exp_lg = $log10(100.0 * 100.0 / 3.0) - 1.0;
    chk(absr(lg - exp_lg) < 0.1, $sformatf("overlap Campbell log %f exp %f", lg, exp_lg));

    // ---- low again: pulse channel
    amp = 10; pulse_gap = 300;
    settle(NM + 4);
    uart_flux(lg, rt, st);
    chk(!st[0], "low flux switches back to the pulse channel");
    chk(!trip_request, "trip clears when conditions clear");

    // reactor variable trip
    reactor_var <= 2'b01;
    repeat (5) @(posedge clk);
    chk(trip_request, "reactor variable 0 trips");
    if (trip_request) m_rv_trip++;
    reactor_var <= 2'b00;
    repeat (5) @(posedge clk);
    chk(!trip_request, "trip released with the reactor variable");
    // mask out reactor variable 0, keep variable 1
    uart_write(CFG_TRIPMSK, 8'h0B);
    settle(2);
    reactor_var <= 2'b01;
    repeat (5) @(posedge clk);
    chk(!trip_request, "masked reactor variable 0 does not trip");
    reactor_var <= 2'b10;
    repeat (5) @(posedge clk);
    chk(trip_request, "reactor variable 1 trips");
    if (trip_request) m_rv_trip++;
    reactor_var <= 2'b00;
    repeat (5) @(posedge clk);

    // communication watchdog: a write command missing its data byte
    host_tx(OP_WRITE); host_tx(8'h00);
    t = 0; while (m_wdt == 0 && t < 100000) begin @(posedge clk); t++; end
    chk(m_wdt > 0, "communication watchdog recovers from an unfinished command");
    uart_read(CFG_THR, d);
    chk(d == 8'h5C, "host commands work after the watchdog");

    // mechanisms
    chk(m_to_camp > 0, "switch to Campbell");
    chk(m_to_pulse > 0, "switch to pulse");
    chk(m_hold > 0, "hysteresis hold in the overlap");
    chk(m_multi > 0, "multi-period mode");
    chk(m_one > 0, "one-period mode");
    chk(m_hp > 0, "high power");
    chk(m_hr > 0, "high rate");
    chk(m_dac > 0, "DAC refresh");
    $display("mechanisms: to_camp=%0d to_pulse=%0d hold=%0d multi=%0d one=%0d hp=%0d hr=%0d trip=%0d rv_trip=%0d uart_w=%0d uart_r=%0d uart_f=%0d vme=%0d dac_frames=%0d wdt=%0d",
      m_to_camp, m_to_pulse, m_hold, m_multi, m_one, m_hp, m_hr, m_trip, m_rv_trip, m_uart_w, m_uart_r, m_uart_f, m_vme, m_dac, m_wdt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
