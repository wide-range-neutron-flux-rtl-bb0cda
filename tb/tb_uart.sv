// tb_uart: serial bytes (8N1, CLK_DIV clocks per bit) are driven into rxd and
// read back over WISHBONE; bytes written over WISHBONE are decoded from txd
// and checked, including the bit time. A frame with a bad stop bit must be
// dropped and a second byte before the first is read must flag overrun.
module tb_uart;
  import wrnd_pkg::*;
  localparam int DIV = 16;
  logic clk = 0, rst = 1, rxd = 1, txd;
  wb_m2s_t m2s; wb_s2m_t s2m;
  int checks = 0, failures = 0;
  uart #(.CLK_DIV(DIV)) dut (.clk, .rst, .wb_i(m2s), .wb_o(s2m), .rxd, .txd);
  tb_wb_master bfm (.clk, .m2s, .s2m);
  always #5 clk = ~clk;

  task automatic chk(input logic c, input string what);
    checks++; if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic send(input logic [7:0] b, input logic stop = 1'b1);
    rxd <= 0; repeat (DIV) @(posedge clk);
    for (int i = 0; i < 8; i++) begin rxd <= b[i]; repeat (DIV) @(posedge clk); end
    rxd <= stop; repeat (DIV) @(posedge clk);
    rxd <= 1; repeat (DIV) @(posedge clk);
  endtask

  task automatic recv_byte(output logic [7:0] b);
    while (txd) @(posedge clk);
    repeat (DIV / 2) @(posedge clk);
    chk(!txd, "start bit");
    for (int i = 0; i < 8; i++) begin repeat (DIV) @(posedge clk); b[i] = txd; end
    repeat (DIV) @(posedge clk);
    chk(txd, "stop bit");
  endtask

  initial begin
    logic [7:0] d, st, b;
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (5) @(posedge clk);
    // receive
    for (int i = 0; i < 8; i++) begin
      logic [7:0] v;
      v = (i == 0) ? 8'h55 : (i == 1) ? 8'h00 : (i == 2) ? 8'hFF : 8'($urandom);
      send(v);
      bfm.rd(UART_STAT, st); chk(st[0], "byte waiting");
      bfm.rd(UART_DATA, d);  chk(d == v, $sformatf("rx %h exp %h", d, v));
      bfm.rd(UART_STAT, st); chk(!st[0], "flag cleared by read");
    end
    send(8'hA5, 1'b0);   // bad stop bit
    bfm.rd(UART_STAT, st); chk(!st[0], "bad frame dropped");
    send(8'h11); send(8'h22);
    bfm.rd(UART_STAT, st); chk(st[0] && st[2], "overrun flagged");
    bfm.rd(UART_DATA, d);  chk(d == 8'h22, "newest byte kept");
    // transmit
    for (int i = 0; i < 6; i++) begin
      logic [7:0] v;
      int t0;
      v = (i == 0) ? 8'h01 : 8'($urandom);
      fork
        bfm.wr(UART_DATA, v);
        recv_byte(b);
      join
      chk(b == v, $sformatf("tx %h exp %h", b, v));
      bfm.rd(UART_STAT, st);
      t0 = 0;
      while (st[1] && t0 < 100) begin bfm.rd(UART_STAT, st); t0++; end
      chk(!st[1], "transmitter idle after stop bit");
    end
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
