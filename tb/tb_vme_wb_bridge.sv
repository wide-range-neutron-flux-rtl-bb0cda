// tb_vme_wb_bridge: a VME master model runs D16 and D08 cycles (address
// strobe, data strobes, wait for DTACK*, release). A command written from
// VME must appear in the WISHBONE mailbox registers with "pending" set; the
// response and "done" written over WISHBONE must be readable from VME; result
// bytes written over WISHBONE must be readable as VME words. Accesses with a
// wrong address modifier or outside the window get no DTACK*.
module tb_vme_wb_bridge;
  import wrnd_pkg::*;
  localparam logic [15:0] BASE = 16'hC000;
  logic clk = 0, rst = 1;
  logic [15:1] vme_addr = 0;
  logic [5:0]  vme_am = 6'h29;
  logic vme_as_n = 1, vme_write_n = 1, vme_data_oe, vme_dtack_n;
  logic [1:0] vme_ds_n = 2'b11;
  logic [15:0] vme_data_i = 0, vme_data_o;
  wb_m2s_t m2s; wb_s2m_t s2m;
  int checks = 0, failures = 0;
  vme_wb_bridge #(.BASE(BASE)) dut (.clk, .rst, .wb_i(m2s), .wb_o(s2m), .vme_addr, .vme_am, .vme_as_n,
    .vme_ds_n, .vme_write_n, .vme_data_i, .vme_data_o, .vme_data_oe, .vme_dtack_n);
  tb_wb_master bfm (.clk, .m2s, .s2m);
  always #5 clk = ~clk;

  task automatic chk(input logic c, input string what);
    checks++; if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  // one VME cycle; returns whether DTACK* came
  task automatic vme(input logic wr, input logic [15:0] a, input logic [1:0] ds,
                     input logic [15:0] wd, output logic [15:0] rdat, output logic acked);
    int n = 0;
    #2 vme_addr = a[15:1]; vme_write_n = ~wr; vme_data_i = wd;
    #20 vme_as_n = 0;
    #20 vme_ds_n = ~ds;
    while (vme_dtack_n && n < 50) begin #10; n++; end
    acked = !vme_dtack_n;
    rdat = vme_data_o;
    if (acked && !wr) chk(vme_data_oe, "data driven during read");
    #10 vme_ds_n = 2'b11; vme_as_n = 1;
    n = 0;
    while (!vme_dtack_n && n < 50) begin #10; n++; end
    chk(vme_dtack_n, "DTACK* released after the strobes");
    #20;
  endtask

  initial begin
    logic [15:0] r; logic ak; logic [7:0] d;
    repeat (3) @(posedge clk);
    rst <= 0;
    // D16 command write: opcode 'W', address 0x1A, data via word 1 (D08 low)
    vme(1, BASE + 16'h2, 2'b01, 16'h0077, r, ak); chk(ak, "D08 write acknowledged");
    vme(1, BASE + 16'h0, 2'b11, {OP_WRITE, 8'h1A}, r, ak); chk(ak, "D16 write acknowledged");
    bfm.rd(VME_STAT, d); chk(d[0], "command pending");
    bfm.rd(VME_OP, d);   chk(d == OP_WRITE, "opcode");
    bfm.rd(VME_ADR, d);  chk(d == 8'h1A, "parameter address");
    bfm.rd(VME_DAT, d);  chk(d == 8'h77, "command data");
    vme(0, BASE + 16'h2, 2'b11, 0, r, ak); chk(ak && r[8] == 1'b1, "pending visible from VME");
    bfm.wr(VME_RESP, 8'h4B);
    bfm.wr(VME_DONE, 8'h01);
    bfm.rd(VME_STAT, d); chk(!d[0], "done clears pending");
    vme(0, BASE + 16'h2, 2'b11, 0, r, ak); chk(ak && r == 16'h004B, "response word");
    vme(0, BASE + 16'h0, 2'b11, 0, r, ak); chk(r == {OP_WRITE, 8'h1A}, "command readback");
    // result words
    for (int i = 0; i < 8; i++) bfm.wr(VME_OUT0 + 8'(i), 8'h10 + 8'(i));
    vme(0, BASE + 16'h4, 2'b11, 0, r, ak); chk(r == 16'h1312, "log high half");
    vme(0, BASE + 16'h6, 2'b11, 0, r, ak); chk(r == 16'h1110, "log low half");
    vme(0, BASE + 16'h8, 2'b11, 0, r, ak); chk(r == 16'h1716, "rate high half");
    vme(0, BASE + 16'hA, 2'b11, 0, r, ak); chk(r == 16'h1514, "rate low half");
    // D08 write of only the high byte leaves the low byte
    vme(1, BASE + 16'h0, 2'b10, 16'h5200, r, ak);
    bfm.rd(VME_OP, d);  chk(d == OP_READ, "high byte lane written");
    bfm.rd(VME_ADR, d); chk(d == 8'h1A, "low byte lane kept");
    // not for this board
    vme_am = 6'h39;
    vme(0, BASE + 16'h0, 2'b11, 0, r, ak); chk(!ak, "wrong address modifier ignored");
    vme_am = 6'h2D;
    vme(0, 16'h8000, 2'b11, 0, r, ak); chk(!ak, "outside the window ignored");
    vme(0, BASE + 16'h2, 2'b11, 0, r, ak); chk(ak, "supervisory modifier accepted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #2000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
