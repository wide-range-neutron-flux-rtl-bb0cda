// tb_watchdog: kicks keep the watchdog quiet; without kicks it bites after
// exactly TIMEOUT clocks and then again every TIMEOUT clocks; random kick
// pauses give floor(pause/TIMEOUT) bites (one clock of slack).
module tb_watchdog;
  localparam int T = 10;
  logic clk = 0, rst = 1, kick = 0, bite;
  int checks = 0, failures = 0, cyc = 0, last_bite = -1, bites = 0;
  watchdog #(.TIMEOUT(T)) dut (.clk, .rst, .kick, .bite);
  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (bite && !rst) begin bites <= bites + 1; last_bite <= cyc; end
  end
  task automatic chk(input logic c, input string what);
    checks++; if (!c) begin failures++; $display("FAIL %s", what); end
  endtask
  initial begin
    int t0;
    repeat (2) @(posedge clk);
    rst <= 0;
    // kick every 5 clocks for 50 clocks: no bite
    repeat (10) begin
      repeat (4) @(posedge clk);
      kick <= 1; @(posedge clk); kick <= 0;
    end
    chk(bites == 0, "no bite while kicked");
    // stop kicking: the counter started from 0 the clock after the last kick
    t0 = cyc;
    repeat (3*T + 3) @(posedge clk);
    chk(bites == 3, "three bites in 3*TIMEOUT clocks");
    chk(last_bite - t0 == 3*T || last_bite - t0 == 3*T + 1, "bite period is TIMEOUT");
    // random kick spacing: below TIMEOUT never bites; a longer pause bites
    // exactly once per TIMEOUT clocks
    repeat (100) begin
      int gap, b0;
      kick <= 1; repeat (2) @(posedge clk); kick <= 0;
      @(negedge clk);
      b0  = bites;
      gap = $urandom_range(1, 3*T);
      repeat (gap) @(posedge clk);
      @(negedge clk);
      chk(bites - b0 >= (gap - 1) / T && bites - b0 <= (gap + 1) / T,
          $sformatf("bites %0d after a pause of %0d clocks", bites - b0, gap));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
