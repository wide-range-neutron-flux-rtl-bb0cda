// tb_comm_processor: the communication sequencer against a model of bus II:
// a UART model (receive queue, transmit log), the VME mailbox registers, the
// monitor registers and the two bridge ports as memory. Checks the start-up
// configuration, the output refresh, parameter writing, parameter reading and
// flux reading from both the UART and the VME mailbox, the NAK for an unknown
// command, and the watchdog recovery from a command that never completes.
module tb_comm_processor;
  import wrnd_pkg::*;
  localparam int WDT = 4000;
  logic clk = 0, rst = 1, cmd_done, refreshed, wdt_reset;
  wb_m2s_t m2s; wb_s2m_t s2m;
  logic [7:0] mem [256];
  logic [7:0] rxq[$], txq[$];
  int checks = 0, failures = 0, n_cmd = 0, n_ref = 0, n_wdt = 0, mon_starts = 0;

  comm_processor #(.WDT_CYCLES(WDT)) dut (.clk, .rst, .wb_o(m2s), .wb_i(s2m), .cmd_done, .refreshed, .wdt_reset);
  always #5 clk = ~clk;

  always @(posedge clk) begin
    s2m.ack <= m2s.cyc & m2s.stb & ~s2m.ack;
    if (cmd_done && !rst) n_cmd++;
    if (refreshed && !rst) n_ref++;
    if (wdt_reset && !rst) n_wdt++;
    if (m2s.cyc & m2s.stb & ~s2m.ack) begin
      if (m2s.adr == UART_STAT) s2m.dat <= {6'b0, 1'b0, rxq.size() > 0};
      else if (m2s.adr == UART_DATA) begin
        if (m2s.we) txq.push_back(m2s.dat);
        else s2m.dat <= (rxq.size() > 0) ? rxq.pop_front() : 8'h00;
      end else begin
        s2m.dat <= mem[m2s.adr];
        if (m2s.we) begin
          mem[m2s.adr] <= m2s.dat;
          if (m2s.adr == VME_DONE) mem[VME_STAT] <= 8'h00;
          if (m2s.adr == MON_START) mon_starts++;
        end
      end
    end
  end

  task automatic chk(input logic c, input string what);
    checks++; if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wait_cmd();
    int n0 = n_cmd, t = 0;
    while (n_cmd == n0 && t < 20000) begin @(posedge clk); t++; end
    chk(n_cmd > n0, "command finished");
    repeat (2) @(posedge clk);
  endtask

  task automatic vme_cmd(input logic [7:0] op, input logic [7:0] a, input logic [7:0] d);
    mem[VME_OP] = op; mem[VME_ADR] = a; mem[VME_DAT] = d; mem[VME_RESP] = 8'h00;
    mem[VME_STAT] = 8'h01;
    wait_cmd();
    chk(mem[VME_STAT] == 8'h00, "VME command acknowledged with done");
  endtask

  initial begin
    int t;
    for (int i = 0; i < 256; i++) mem[i] = 8'h00;
    for (int i = 0; i < 64; i++) mem[PCP_BASE + i] = 8'(8'hC0 ^ i);
    s2m = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    // start-up configuration and first refresh
    t = 0; while (n_ref == 0 && t < 5000) begin @(posedge clk); t++; end
    for (int i = 0; i < CFG_BYTES; i++)
      chk(mem[CP_BASE + i] == cfg_default(i), $sformatf("initial configuration byte %0d", i));
    for (int i = 0; i < 8; i++) begin
      chk(mem[MON_BASE + i] == mem[PCP_BASE + PCP_LOG + i], "monitor refreshed from PC port");
      chk(mem[VME_OUT0 + i] == mem[PCP_BASE + PCP_LOG + i], "VME words refreshed from PC port");
    end
    chk(mon_starts > 0, "monitor transfer started");
    // UART parameter writing, arguments arriving late
    rxq.push_back(OP_WRITE);
    repeat (300) @(posedge clk);
    rxq.push_back(8'h05);
    repeat (300) @(posedge clk);
    rxq.push_back(8'hAB);
    wait_cmd();
    chk(mem[CP_BASE + 5] == 8'hAB, "UART parameter write reaches the CP port");
    chk(txq.size() == 1 && txq[0] == RSP_OK, "UART write answered K");
    txq.delete();
    // UART parameter reading
    rxq.push_back(OP_READ); rxq.push_back(8'h21);
    wait_cmd();
    chk(txq.size() == 1 && txq[0] == mem[PCP_BASE + 8'h21], "UART parameter read");
    txq.delete();
    // UART flux reading
    rxq.push_back(OP_FLUX);
    wait_cmd();
    chk(txq.size() == 9, "flux reading returns 9 bytes");
    for (int i = 0; i < 9 && i < txq.size(); i++) chk(txq[i] == mem[PCP_BASE + PCP_LOG + i], "flux byte");
    txq.delete();
    // unknown command
    rxq.push_back(8'h3F);
    wait_cmd();
    chk(txq.size() == 1 && txq[0] == RSP_NAK, "unknown command answered NAK");
    txq.delete();
    // VME commands
    vme_cmd(OP_WRITE, 8'h07, 8'h3C);
    chk(mem[CP_BASE + 7] == 8'h3C && mem[VME_RESP] == RSP_OK, "VME parameter write");
    vme_cmd(OP_READ, 8'h2A, 8'h00);
    chk(mem[VME_RESP] == mem[PCP_BASE + 8'h2A], "VME parameter read");
    for (int i = 0; i < 8; i++) mem[PCP_BASE + PCP_LOG + i] = 8'(8'h5A + i);
    for (int i = 0; i < 8; i++) mem[VME_OUT0 + i] = 8'h00;
    vme_cmd(OP_FLUX, 8'h00, 8'h00);
    for (int i = 0; i < 8; i++) chk(mem[VME_OUT0 + i] == 8'(8'h5A + i), "VME flux words updated");
    chk(mem[VME_RESP] == RSP_OK, "VME flux answered K");
    chk(txq.size() == 0, "VME answers do not go to the UART");
    // incomplete UART command: the watchdog must restart the sequencer
    rxq.push_back(OP_WRITE); rxq.push_back(8'h01);
    t = 0; while (n_wdt == 0 && t < 3 * WDT) begin @(posedge clk); t++; end
    chk(n_wdt == 1, "watchdog fired on the stuck command");
    chk(t > WDT - 1200 && t < WDT + 100, $sformatf("watchdog time %0d", t));
    rxq.push_back(OP_READ); rxq.push_back(8'h00);
    wait_cmd();
    chk(txq.size() == 1 && txq[0] == mem[PCP_BASE], "commands work after the watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
