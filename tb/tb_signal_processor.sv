// tb_signal_processor: the processing sequencer against a memory model of
// bus I (front-end registers, CP port and PC port in one 256-byte array).
// Each pass, the test loads new front-end results and checks what the
// sequencer wrote: both front ends polled and configured, the configuration
// echo, the channel choice with hysteresis (FR), log10 flux and rate as
// floats against real-valued models, the HP/HR flags, and the pass period.
module tb_signal_processor;
  import wrnd_pkg::*;
  localparam int POLL = 3000;
  logic clk = 0, rst = 1, fr, hp, hr, pass_done, trip_in = 0;
  logic [7:0] trip_mask;
  wb_m2s_t m2s; wb_s2m_t s2m;
  logic [7:0] mem [256];
  int checks = 0, failures = 0, cyc = 0, last_done = -1, period = 0;
  int n_camp = 0, n_pulse = 0, n_hold = 0;

  signal_processor #(.POLL_CYCLES(POLL), .RATE_SCALE(200)) dut (
    .clk, .rst, .wb_o(m2s), .wb_i(s2m), .trip_in, .fr, .hp, .hr, .trip_mask, .pass_done);
  always #5 clk = ~clk;

  // bus I memory model, one wait state
  always @(posedge clk) begin
    cyc <= cyc + 1;
    s2m.ack <= m2s.cyc & m2s.stb & ~s2m.ack;
    if (m2s.cyc & m2s.stb & ~s2m.ack) begin
      s2m.dat <= mem[m2s.adr];
      if (m2s.we) mem[m2s.adr] <= m2s.dat;
    end
    if (pass_done) begin
      if (last_done >= 0) period <= cyc - last_done;
      last_done <= cyc;
    end
  end

  task automatic chk(input logic c, input string what);
    checks++; if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic real f2r(input logic [31:0] f);
    logic [63:0] d;
    d = {f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'b0};
    if (f[30:23] == 0) d = 0;
    return $bitstoreal(d);
  endfunction

  function automatic real absr(input real v); return v < 0 ? -v : v; endfunction

  task automatic put(input int a, input int n, input longint v);
    for (int i = 0; i < n; i++) mem[a + i] = 8'(v >> (8 * i));
  endtask

  real lprev = 0.0;
  bit  first = 1;
  logic model_fr = 0;

  task automatic pass(input int psum, input int nper, input int cms);
    real lexp, rexp, lgot, rgot;
    logic [7:0] st;
    put(PUL_SUM0, 3, psum); mem[PUL_NPER] = 8'(nper); put(CAM_MS0, 3, cms);
    mem[PUL_CTRL] = 0; mem[CAM_CTRL] = 0;
    mem[PUL_TGT0] = 0; mem[PUL_TGT1] = 0; mem[PUL_THR] = 0; mem[CAM_GAIN] = 0;
    @(posedge pass_done); @(posedge clk);
    // model of the switching flow
    if (cms > 5000) begin if (!model_fr) n_camp++; model_fr = 1; end
    else if (cms <= 1000) begin if (model_fr) n_pulse++; model_fr = 0; end
    else n_hold++;
    if (model_fr) lexp = $log10($itor(cms)) + 1.0;
    else          lexp = $log10($itor(psum == 0 ? 1 : psum)) - $log10($itor(nper + 1)) + 0.25;
    rexp = first ? 0.0 : (lexp - lprev) * 200.0;
    first = 0; lprev = lexp;
    lgot = f2r({mem[PCP_BASE+PCP_LOG+3], mem[PCP_BASE+PCP_LOG+2], mem[PCP_BASE+PCP_LOG+1], mem[PCP_BASE+PCP_LOG]});
    rgot = f2r({mem[PCP_BASE+PCP_RATE+3], mem[PCP_BASE+PCP_RATE+2], mem[PCP_BASE+PCP_RATE+1], mem[PCP_BASE+PCP_RATE]});
    st = mem[PCP_BASE + PCP_STAT];
    chk(mem[PUL_CTRL] == 8'h01 && mem[CAM_CTRL] == 8'h01, "both front ends polled");
    chk(mem[PUL_TGT0] == 8'd144 && mem[PUL_TGT1] == 8'd1 && mem[PUL_THR] == 8'h3C && mem[CAM_GAIN] == 8'h99,
        "front-end settings written");
    chk(fr == model_fr && st[0] == model_fr, $sformatf("channel choice fr=%0b exp %0b (cms %0d)", fr, model_fr, cms));
    chk(absr(lgot - lexp) < 1e-4, $sformatf("log %f exp %f", lgot, lexp));
    chk(absr(rgot - rexp) < 0.05, $sformatf("rate %f exp %f", rgot, rexp));
    chk(hp == (lexp > 4.5) && st[1] == hp, "high power flag");
    chk(hr == (rexp > 100.0) && st[2] == hr, "high rate flag");
    chk(mem[PCP_BASE + PCP_NPER] == 8'(nper) && mem[PCP_BASE + PCP_PRAW] == 8'(psum), "raw values published");
    for (int i = 0; i < CFG_BYTES; i++)
      if (mem[PCP_BASE + i] != mem[CP_BASE + i]) begin chk(0, "configuration echo"); break; end
  endtask

  initial begin
    for (int i = 0; i < 256; i++) mem[i] = 0;
    s2m = '0;
    put(CP_BASE + CFG_VMIN, 3, 1000);
    put(CP_BASE + CFG_VMAX, 3, 5000);
    put(CP_BASE + CFG_POFS, 4, 32'h0000_4000);   // +0.25
    put(CP_BASE + CFG_COFS, 4, 32'h0001_0000);   // +1
    put(CP_BASE + CFG_HP, 4, 32'h0004_8000);     // 4.5 decades
    put(CP_BASE + CFG_HR, 4, 32'h0064_0000);     // 100 decades/s
    mem[CP_BASE + CFG_LPF] = 0;                  // no smoothing: rate model exact
    mem[CP_BASE + CFG_TRIPMSK] = 8'h1B;
    mem[CP_BASE + CFG_GAIN] = 8'h99;
    put(CP_BASE + CFG_TGT, 2, 400);
    mem[CP_BASE + CFG_THR] = 8'h3C;
    repeat (3) @(posedge clk);
    rst <= 0;
    pass(1000, 3, 500);      // pulse channel, 4 periods
    chk(trip_mask == 8'h1B, "trip mask taken from the configuration");
    pass(100000, 0, 3000);   // in the overlap: stays on pulse; big step -> HP, HR
    pass(100000, 0, 8000);   // above VMAX: Campbell
    pass(50, 7, 3000);       // in the overlap: stays on Campbell
    pass(51, 7, 1000);       // at VMIN: back to pulse
    pass(0, 255, 900);       // no counts
    for (int i = 0; i < 12; i++) pass($urandom_range(0, 200000), $urandom_range(0, 255), $urandom_range(0, 9000));
    chk(period == POLL, $sformatf("one pass every POLL_CYCLES (%0d)", period));
    chk(n_camp > 0 && n_pulse > 0 && n_hold > 0, "switch up, switch down and hold all seen");
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
