// tb_pulse_channel: polls the pulse front end period after period while a
// generator sends a chosen number of pulses inside each integration period.
// A model keeps the history of period counts and picks the smallest window
// reaching the target; sum, window length, mode bit and the integration time
// (PERIOD cycles after the poll) are checked. Both one-period and
// multi-period results, and the NMAX limit, occur.
module tb_pulse_channel;
  import wrnd_pkg::*;
  localparam int P = 200, NM = 8, TGT = 20;
  logic clk = 0, rst = 1, pulse_in = 0;
  logic [7:0] thr_dac;
  wb_m2s_t m2s; wb_s2m_t s2m;
  int checks = 0, failures = 0, n_one = 0, n_multi = 0, n_full = 0;
  int hist[$];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  pulse_channel #(.PERIOD_CYCLES(P), .NMAX(NM)) dut (.clk, .rst, .wb_i(m2s), .wb_o(s2m), .pulse_in, .thr_dac);
  tb_wb_master bfm (.clk, .m2s, .s2m);
  always #5 clk = ~clk;

  task automatic chk(input logic c, input string what);
    checks++; if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic one_period(input int npulses);
    logic [7:0] d, s0, s1, s2, np;
    int t0, sum, n, waitc;
    bfm.wr(PUL_CTRL, 8'h01);
    t0 = cyc;
    fork
      begin
        repeat (10) @(posedge clk);
        for (int i = 0; i < npulses; i++) begin
          pulse_in <= 1; repeat (2) @(posedge clk);
          pulse_in <= 0; repeat (3) @(posedge clk);
        end
      end
    join
    // wait for ready
    do bfm.rd(PUL_STAT, d); while (!d[0] && cyc - t0 < 4 * P);
    waitc = cyc - t0;
    chk(waitc >= P - 5 && waitc <= P + NM + 20, "integration lasts one period");
    bfm.rd(PUL_SUM0, s0); bfm.rd(PUL_SUM1, s1); bfm.rd(PUL_SUM2, s2); bfm.rd(PUL_NPER, np);
    // model
    hist.push_front(npulses);
    if (hist.size() > NM) void'(hist.pop_back());
    sum = 0; n = 0;
    for (int i = 0; i < hist.size(); i++) begin
      sum += hist[i]; n = i + 1;
      if (sum >= TGT) break;
    end
    chk({s2, s1, s0} == 24'(sum), $sformatf("windowed sum %0d exp %0d", {s2, s1, s0}, sum));
    chk(np == 8'(n - 1), $sformatf("window length %0d exp %0d", np + 1, n));
    chk(d[1] == (n > 1), "multi-period mode flag");
    if (n == 1) n_one++; else n_multi++;
    if (n == NM) n_full++;
  endtask

  initial begin
    logic [7:0] d;
    repeat (3) @(posedge clk);
    rst <= 0;
    bfm.wr(PUL_TGT0, 8'(TGT)); bfm.wr(PUL_TGT1, 8'h00);
    bfm.wr(PUL_THR, 8'h5A);
    bfm.rd(PUL_THR, d); chk(d == 8'h5A && thr_dac == 8'h5A, "threshold register drives the DAC");
    one_period(3);                       // only one period known
    one_period(25);                      // one-period mode
    for (int i = 0; i < 5; i++) one_period(5);   // multi-period
    for (int i = 0; i < 10; i++) one_period(0);  // window grows to NMAX
    one_period(30);                      // back to one period
    for (int i = 0; i < 20; i++) one_period($urandom_range(0, 12));
    chk(n_one > 0 && n_multi > 0 && n_full > 0, "both modes and the NMAX limit seen");
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
