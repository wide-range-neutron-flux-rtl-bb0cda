// comm_processor: sequencer of the communication section (WISHBONE master of
// bus II).
//
// After reset it writes the start-up configuration (wrnd_pkg::cfg_default)
// into the CP port. It then loops: scan the UART status, scan the VME/WB
// bridge mailbox; if neither holds a command, refresh the analogue outputs
// (monitor) and the VME result words from the PC port and scan again.
// Commands, the same from both sources:
//   'W' a d  parameter writing: CP port byte a <= d, answer 'K'
//   'R' a    parameter reading: answer PC port byte a (0..31 is the echo of
//            the configuration the processing section is using)
//   'F'      neutron flux values reading: answer log10 flux (float32,
//            4 bytes LE), rate (float32, 4 bytes LE) and status; a VME
//            command instead updates the VME result words and answers 'K'
//   other    answer NAK (0x15)
// UART answers go out byte by byte on the UART; VME answers go to the
// mailbox response register, followed by "done".
// The loop and the three command types follow the communication flow of the
// design, which runs it as software; the byte format of the commands is this
// implementation's choice. A watchdog returns the sequencer to scanning if a
// command is not finished within WDT_CYCLES clocks (for example a UART
// command whose argument bytes never arrive).
module comm_processor
  import wrnd_pkg::*;
#(
  parameter int unsigned WDT_CYCLES = 1 << 20
) (
  input  logic    clk,
  input  logic    rst,
  output wb_m2s_t wb_o,
  input  wb_s2m_t wb_i,
  output logic    cmd_done,   // one-clock pulse per executed command
  output logic    refreshed,  // one-clock pulse per output refresh
  output logic    wdt_reset   // one-clock pulse when the watchdog fires
);
  typedef enum logic [4:0] {
    C_INIT, C_SCAN_U, C_U_OP, C_U_WAIT, C_U_ARG, C_SCAN_V, C_V_RD, C_EXEC,
    C_X_WR, C_X_RD, C_X_FLUX, C_V_OUT, C_T_WAIT, C_T_WR, C_V_RESP, C_V_DONE,
    C_REF_RD, C_REF_MON, C_REF_VME
  } state_t;
  state_t state;

  logic       issued;
  logic [5:0] idx;
  logic [7:0] op, arg0, arg1, resp1;
  logic [1:0] nargs, argi;
  logic       src_vme;
  logic [7:0] fbuf [9];
  logic       kick, bite;

  logic       req_we;
  logic [7:0] req_adr, req_dat;

  wire ack = wb_i.ack & issued;
  wire [7:0] rd = wb_i.dat;
  wire uart_reply_multi = (op == OP_FLUX) && !src_vme;

  watchdog #(.TIMEOUT(WDT_CYCLES)) u_wdt (.clk, .rst, .kick, .bite);
  assign wdt_reset = bite;

  // request of the current state
  always_comb begin
    req_we  = 1'b0;
    req_adr = 8'h00;
    req_dat = 8'h00;
    unique case (state)
      C_INIT:    begin req_we = 1'b1; req_adr = CP_BASE + 8'(idx); req_dat = cfg_default(int'(idx)); end
      C_SCAN_U, C_U_WAIT, C_T_WAIT: req_adr = UART_STAT;
      C_U_OP, C_U_ARG: req_adr = UART_DATA;
      C_SCAN_V:  req_adr = VME_STAT;
      C_V_RD:    req_adr = VME_OP + 8'(idx);
      C_X_WR:    begin req_we = 1'b1; req_adr = CP_BASE + {3'b0, arg0[4:0]}; req_dat = arg1; end
      C_X_RD:    req_adr = PCP_BASE + {2'b0, arg0[5:0]};
      C_X_FLUX, C_REF_RD: req_adr = PCP_BASE + 8'(PCP_LOG) + 8'(idx);
      C_V_OUT, C_REF_VME: begin req_we = 1'b1; req_adr = VME_OUT0 + 8'(idx); req_dat = fbuf[idx[3:0]]; end
      C_T_WR:    begin req_we = 1'b1; req_adr = UART_DATA;
                       req_dat = uart_reply_multi ? fbuf[idx[3:0]] : resp1; end
      C_V_RESP:  begin req_we = 1'b1; req_adr = VME_RESP; req_dat = resp1; end
      C_V_DONE:  begin req_we = 1'b1; req_adr = VME_DONE; req_dat = 8'h01; end
      C_REF_MON: begin req_we = 1'b1; req_adr = MON_BASE + 8'(idx);
                       req_dat = (idx == 6'd8) ? 8'h01 : fbuf[idx[3:0]]; end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst || bite) begin
      state     <= rst ? C_INIT : C_SCAN_U;
      wb_o      <= WB_M2S_IDLE;
      issued    <= 1'b0;
      idx       <= '0;
      kick      <= 1'b0;
      cmd_done  <= 1'b0;
      refreshed <= 1'b0;
      if (rst) begin
        op <= '0; arg0 <= '0; arg1 <= '0; resp1 <= '0;
        nargs <= '0; argi <= '0; src_vme <= 1'b0;
        for (int i = 0; i < 9; i++) fbuf[i] <= '0;
      end
    end else begin
      kick      <= 1'b0;
      cmd_done  <= 1'b0;
      refreshed <= 1'b0;
      if (state != C_EXEC && !issued) begin
        wb_o   <= '{cyc: 1'b1, stb: 1'b1, we: req_we, adr: req_adr, dat: req_dat};
        issued <= 1'b1;
      end
      if (ack) begin
        wb_o   <= WB_M2S_IDLE;
        issued <= 1'b0;
      end
      unique case (state)
        C_INIT: if (ack) begin
          if (idx == 6'(CFG_BYTES - 1)) begin idx <= '0; state <= C_SCAN_U; end
          else idx <= idx + 1'b1;
        end
        C_SCAN_U: if (ack) state <= rd[0] ? C_U_OP : C_SCAN_V;
        C_U_OP: if (ack) begin
          op      <= rd;
          src_vme <= 1'b0;
          argi    <= '0;
          if (rd == OP_WRITE)     begin nargs <= 2'd2; state <= C_U_WAIT; end
          else if (rd == OP_READ) begin nargs <= 2'd1; state <= C_U_WAIT; end
          else                    begin nargs <= 2'd0; state <= C_EXEC;   end
        end
        C_U_WAIT: if (ack && rd[0]) state <= C_U_ARG;
        C_U_ARG: if (ack) begin
          if (argi == 0) arg0 <= rd; else arg1 <= rd;
          argi <= argi + 1'b1;
          state <= (argi + 1'b1 == nargs) ? C_EXEC : C_U_WAIT;
        end
        C_SCAN_V: if (ack) begin
          idx   <= '0;
          state <= rd[0] ? C_V_RD : C_REF_RD;
        end
        C_V_RD: if (ack) begin
          unique case (idx)
            6'd0:    op   <= rd;
            6'd1:    arg0 <= rd;
            default: arg1 <= rd;
          endcase
          src_vme <= 1'b1;
          if (idx == 6'd2) begin idx <= '0; state <= C_EXEC; end
          else idx <= idx + 1'b1;
        end
        C_EXEC: begin
          idx <= '0;
          if (op == OP_WRITE)     state <= C_X_WR;
          else if (op == OP_READ) state <= C_X_RD;
          else if (op == OP_FLUX) state <= C_X_FLUX;
          else begin
            resp1 <= RSP_NAK;
            state <= src_vme ? C_V_RESP : C_T_WAIT;
          end
        end
        C_X_WR: if (ack) begin
          resp1 <= RSP_OK;
          state <= src_vme ? C_V_RESP : C_T_WAIT;
        end
        C_X_RD: if (ack) begin
          resp1 <= rd;
          state <= src_vme ? C_V_RESP : C_T_WAIT;
        end
        C_X_FLUX: if (ack) begin
          fbuf[idx[3:0]] <= rd;
          if (idx == 6'd8) begin
            idx   <= '0;
            resp1 <= RSP_OK;
            state <= src_vme ? C_V_OUT : C_T_WAIT;
          end else idx <= idx + 1'b1;
        end
        C_V_OUT: if (ack) begin
          if (idx == 6'd7) begin idx <= '0; state <= C_V_RESP; end
          else idx <= idx + 1'b1;
        end
        C_T_WAIT: if (ack && !rd[1]) state <= C_T_WR;
        C_T_WR: if (ack) begin
          if (!uart_reply_multi || idx == 6'd8) begin
            idx      <= '0;
            cmd_done <= 1'b1;
            kick     <= 1'b1;
            state    <= C_SCAN_U;
          end else begin
            idx   <= idx + 1'b1;
            state <= C_T_WAIT;
          end
        end
        C_V_RESP: if (ack) state <= C_V_DONE;
        C_V_DONE: if (ack) begin
          cmd_done <= 1'b1;
          kick     <= 1'b1;
          state    <= C_SCAN_U;
        end
        C_REF_RD: if (ack) begin
          fbuf[idx[3:0]] <= rd;
          if (idx == 6'd8) begin idx <= '0; state <= C_REF_MON; end
          else idx <= idx + 1'b1;
        end
        C_REF_MON: if (ack) begin
          if (idx == 6'd8) begin idx <= '0; state <= C_REF_VME; end
          else idx <= idx + 1'b1;
        end
        C_REF_VME: if (ack) begin
          if (idx == 6'd7) begin
            idx       <= '0;
            refreshed <= 1'b1;
            kick      <= 1'b1;
            state     <= C_SCAN_U;
          end else idx <= idx + 1'b1;
        end
        default: state <= C_SCAN_U;
      endcase
    end
  end
endmodule
