// signal_processor: sequencer of the processing section (WISHBONE master of
// bus I).
//
// Every POLL_CYCLES clocks (5 ms at 20 MHz, the sampling period of the
// design) it runs one pass of the processing flow:
//   1. read the 32-byte configuration block from the CP port;
//   2. read the last results of the pulse and Campbell front ends, write
//      their settings (target count, discriminator threshold, amplifier
//      gain) and poll both, which starts their next integration;
//   3. choose the data stream with channel_switch (Campbell value against
//      VMIN/VMAX with hysteresis, flag = Fluctuation Range FR);
//   4. take log10 of the chosen value; for the pulse channel subtract
//      log10 of the number of counting periods, so both channels become a
//      rate; add the channel's calibration offset (scaling done in the log
//      domain);
//   5. low-pass filter the log stream and derive the rate (decades/s) from
//      the filtered stream;
//   6. compare: High Power HP = log10 flux > HP threshold, High Rate
//      HR = rate > HR threshold; FR, HP, HR go to the trip logic;
//   7. write the configuration echo, log10 flux and rate as float32, status
//      and raw values to the PC port.
// The flow (front ends, flux calculation with channel switching, logarithm,
// rate, status refresh, threshold comparisons) follows the design; the design
// runs it as software on a processor, here it is a hard-wired sequencer.
// The first pass after reset stops after step 2: no integration has run yet,
// and a zero result would preload the filter and give a false rate at start.
// A watchdog restarts the sequence if a pass does not finish within
// WDT_CYCLES (for example a slave that never acknowledges).
// One pass takes roughly 300 clocks, far less than the poll period.
module signal_processor
  import wrnd_pkg::*;
#(
  parameter int unsigned POLL_CYCLES = 100000,
  parameter int          RATE_SCALE  = 200,
  parameter int unsigned WDT_CYCLES  = 4 * POLL_CYCLES
) (
  input  logic       clk,
  input  logic       rst,
  output wb_m2s_t    wb_o,
  input  wb_s2m_t    wb_i,
  input  logic       trip_in,     // current trip request, reported in status
  output logic       fr,
  output logic       hp,
  output logic       hr,
  output logic [7:0] trip_mask,
  output logic       pass_done    // one-clock pulse at the end of each pass
);
  typedef enum logic [3:0] {
    S_IDLE, S_CFG_RD, S_FE_RD, S_FE_WR, S_SW_WAIT, S_SWITCH, S_LOG_A, S_LOG_N,
    S_SCALE, S_FILT, S_CMP, S_PC_WR
  } state_t;
  state_t state;

  logic [31:0] poll_cnt;
  logic        tick;
  logic [7:0]  cfg [CFG_BYTES];
  logic [7:0]  rawb [7];
  logic [5:0]  idx;
  logic        issued;
  logic [7:0]  seq;
  logic        wdt_bite, kick;

  // decoded configuration
  logic [23:0]        vmin, vmax;
  logic signed [31:0] pofs, cofs, hp_th, hr_th;
  logic [23:0]        psum, cms;
  logic [7:0]         nper;
  always_comb begin
    vmin  = {cfg[CFG_VMIN+2], cfg[CFG_VMIN+1], cfg[CFG_VMIN]};
    vmax  = {cfg[CFG_VMAX+2], cfg[CFG_VMAX+1], cfg[CFG_VMAX]};
    pofs  = {cfg[CFG_POFS+3], cfg[CFG_POFS+2], cfg[CFG_POFS+1], cfg[CFG_POFS]};
    cofs  = {cfg[CFG_COFS+3], cfg[CFG_COFS+2], cfg[CFG_COFS+1], cfg[CFG_COFS]};
    hp_th = {cfg[CFG_HP+3], cfg[CFG_HP+2], cfg[CFG_HP+1], cfg[CFG_HP]};
    hr_th = {cfg[CFG_HR+3], cfg[CFG_HR+2], cfg[CFG_HR+1], cfg[CFG_HR]};
    psum  = {rawb[2], rawb[1], rawb[0]};
    nper  = rawb[3];
    cms   = {rawb[6], rawb[5], rawb[4]};
  end
  assign trip_mask = cfg[CFG_TRIPMSK];

  // ---------------- arithmetic units ----------------
  logic               sw_eval, use_camp;
  logic               log_start, log_busy, log_done;
  logic [31:0]        log_x;
  logic signed [31:0] log_y;
  logic signed [31:0] la, lval;
  logic               lpf_valid, lpf_yv, rate_v;
  logic signed [31:0] lpf_y, rate;
  logic primed;   // a front-end poll has been issued since reset
  logic [31:0]        log_f, rate_f;

  channel_switch #(.W(24)) u_switch (
    .clk, .rst, .evaluate(sw_eval), .camp(cms), .vmin, .vmax, .use_camp
  );

  log10_unit u_log (
    .clk, .rst, .start(log_start), .x(log_x), .busy(log_busy), .done(log_done), .y(log_y)
  );

  lowpass_filter u_lpf (
    .clk, .rst, .valid(lpf_valid), .x(lval), .k(cfg[CFG_LPF][3:0]), .y(lpf_y), .y_valid(lpf_yv)
  );

  rate_filter #(.RATE_SCALE(RATE_SCALE)) u_rate (
    .clk, .rst, .valid(lpf_yv), .x(lpf_y), .rate, .rate_valid(rate_v)
  );

  fix2float u_f_log  (.fx(lval), .fl(log_f));
  fix2float u_f_rate (.fx(rate), .fl(rate_f));

  watchdog #(.TIMEOUT(WDT_CYCLES)) u_wdt (.clk, .rst, .kick, .bite(wdt_bite));

  // ---------------- bus transfer tables ----------------
  function automatic logic [7:0] fe_rd_adr(input logic [5:0] i);
    unique case (i)
      6'd0: return PUL_SUM0;
      6'd1: return PUL_SUM1;
      6'd2: return PUL_SUM2;
      6'd3: return PUL_NPER;
      6'd4: return CAM_MS0;
      6'd5: return CAM_MS1;
      default: return CAM_MS2;
    endcase
  endfunction

  logic [7:0] fe_wr_adr, fe_wr_dat;
  always_comb begin
    unique case (idx)
      6'd0:    begin fe_wr_adr = PUL_TGT0; fe_wr_dat = cfg[CFG_TGT];   end
      6'd1:    begin fe_wr_adr = PUL_TGT1; fe_wr_dat = cfg[CFG_TGT+1]; end
      6'd2:    begin fe_wr_adr = PUL_THR;  fe_wr_dat = cfg[CFG_THR];   end
      6'd3:    begin fe_wr_adr = CAM_GAIN; fe_wr_dat = cfg[CFG_GAIN];  end
      6'd4:    begin fe_wr_adr = PUL_CTRL; fe_wr_dat = 8'h01;          end
      default: begin fe_wr_adr = CAM_CTRL; fe_wr_dat = 8'h01;          end
    endcase
  end

  logic [8*(PCP_USED-PCP_LOG)-1:0] res_img;
  logic [7:0] pc_dat;
  always_comb begin
    res_img = {seq, cms, psum, nper, {4'b0, trip_in, hr, hp, fr}, rate_f, log_f};
    if (idx < 6'(CFG_BYTES)) pc_dat = cfg[idx[4:0]];
    else                     pc_dat = res_img[8*(idx - 6'(PCP_LOG)) +: 8];
  end

  // ---------------- sequencer ----------------
  wire ack = wb_i.ack & issued;

  always_ff @(posedge clk) begin
    if (rst) begin
      poll_cnt <= '0;
      tick     <= 1'b0;
    end else if (poll_cnt == POLL_CYCLES - 1) begin
      poll_cnt <= '0;
      tick     <= 1'b1;
    end else begin
      poll_cnt <= poll_cnt + 1'b1;
      tick     <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (rst || wdt_bite) begin
      state       <= S_IDLE;
      wb_o        <= WB_M2S_IDLE;
      issued      <= 1'b0;
      idx         <= '0;
      sw_eval     <= 1'b0;
      log_start   <= 1'b0;
      log_x       <= '0;
      lpf_valid   <= 1'b0;
      kick        <= 1'b0;
      pass_done   <= 1'b0;
      if (rst) begin
        for (int i = 0; i < CFG_BYTES; i++) cfg[i] <= cfg_default(i);
        for (int i = 0; i < 7; i++) rawb[i] <= '0;
        la   <= '0;
        lval <= '0;
        fr   <= 1'b0;
        hp   <= 1'b0;
        hr   <= 1'b0;
        seq  <= '0;
        primed <= 1'b0;
      end
    end else begin
      sw_eval   <= 1'b0;
      log_start <= 1'b0;
      lpf_valid <= 1'b0;
      kick      <= 1'b0;
      pass_done <= 1'b0;
      // default bus handling: drop the request on ack
      if (ack) begin
        wb_o   <= WB_M2S_IDLE;
        issued <= 1'b0;
      end
      unique case (state)
        S_IDLE: if (tick) begin
          kick  <= 1'b1;
          idx   <= '0;
          state <= S_CFG_RD;
        end

        S_CFG_RD: begin
          if (!issued) begin
            wb_o   <= '{cyc: 1'b1, stb: 1'b1, we: 1'b0, adr: CP_BASE + 8'(idx), dat: 8'h00};
            issued <= 1'b1;
          end else if (ack) begin
            cfg[idx[4:0]] <= wb_i.dat;
            if (idx == 6'(CFG_BYTES - 1)) begin
              idx <= '0; state <= S_FE_RD;
            end else idx <= idx + 1'b1;
          end
        end

        S_FE_RD: begin
          if (!issued) begin
            wb_o   <= '{cyc: 1'b1, stb: 1'b1, we: 1'b0, adr: fe_rd_adr(idx), dat: 8'h00};
            issued <= 1'b1;
          end else if (ack) begin
            rawb[idx[2:0]] <= wb_i.dat;
            if (idx == 6'd6) begin
              idx <= '0; state <= S_FE_WR;
            end else idx <= idx + 1'b1;
          end
        end

        S_FE_WR: begin
          if (!issued) begin
            wb_o   <= '{cyc: 1'b1, stb: 1'b1, we: 1'b1, adr: fe_wr_adr, dat: fe_wr_dat};
            issued <= 1'b1;
          end else if (ack) begin
            if (idx == 6'd5) begin
              idx    <= '0;
              primed <= 1'b1;
              // the first pass only starts the front ends: nothing to process
              if (primed) begin sw_eval <= 1'b1; state <= S_SW_WAIT; end
              else state <= S_IDLE;
            end else idx <= idx + 1'b1;
          end
        end

        S_SW_WAIT: state <= S_SWITCH;   // channel_switch registers its decision

        S_SWITCH: begin
          log_x       <= use_camp ? 32'(cms) : 32'(psum);
          log_start   <= 1'b1;
          state       <= S_LOG_A;
        end

        S_LOG_A: if (log_done) begin
          la <= log_y;
          if (use_camp) state <= S_SCALE;
          else begin
            log_x     <= 32'(nper) + 32'd1;
            log_start <= 1'b1;
            state     <= S_LOG_N;
          end
        end

        S_LOG_N: if (log_done) begin
          la    <= la - log_y;
          state <= S_SCALE;
        end

        S_SCALE: begin
          lval      <= la + (use_camp ? cofs : pofs);
          lpf_valid <= 1'b1;
          state     <= S_FILT;
        end

        S_FILT: if (rate_v) state <= S_CMP;

        S_CMP: begin
          fr    <= use_camp;
          hp    <= lval > hp_th;
          hr    <= rate > hr_th;
          seq   <= seq + 1'b1;
          idx   <= '0;
          state <= S_PC_WR;
        end

        S_PC_WR: begin
          if (!issued) begin
            wb_o   <= '{cyc: 1'b1, stb: 1'b1, we: 1'b1, adr: PCP_BASE + 8'(idx), dat: pc_dat};
            issued <= 1'b1;
          end else if (ack) begin
            if (idx == 6'(PCP_USED - 1)) begin
              idx       <= '0;
              pass_done <= 1'b1;
              state     <= S_IDLE;
            end else idx <= idx + 1'b1;
          end
        end

        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
