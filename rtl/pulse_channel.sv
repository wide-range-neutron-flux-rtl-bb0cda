// pulse_channel: pulse channel front end.
//
// Counts the rectangular pulses from the energy discriminator during an
// integration period of PERIOD_CYCLES clocks (1/256 s = 78125 cycles at
// 20 MHz). An integration starts each time the signal processor polls the
// block (a write of bit0 to PUL_CTRL) and ends one period later.
// Each finished period count is kept in a history of the last NMAX periods.
// The published result is the sum over the newest N periods, where N is the
// smallest number (1..NMAX) whose sum reaches the target count: at high count
// rates one period is enough (one-period mode), at low rates the window grows
// up to NMAX periods (multi-period mode; 256 periods = 1 s). N-1 is
// published too, so the processor can divide by the counting time.
// The period, the 1 to 256 period range and the two modes follow the design;
// the rule used to pick N (reach a target count, which bounds the relative
// statistical uncertainty at 1/sqrt(target)) is this implementation's choice,
// as the design does not give its control algorithm.
// Interface: WISHBONE slave, registers at wrnd_pkg PUL_*, ack one clock after
// stb. pulse_in is asynchronous and synchronised with two flip-flops; each
// rising edge counts once. Result ready about NMAX+3 clocks after the period
// ends; status bit0 then reads 1 until the next poll.
module pulse_channel
  import wrnd_pkg::*;
#(
  parameter int unsigned PERIOD_CYCLES = 78125,
  parameter int unsigned NMAX          = 256
) (
  input  logic       clk,
  input  logic       rst,
  input  wb_m2s_t    wb_i,
  output wb_s2m_t    wb_o,
  input  logic       pulse_in,
  output logic [7:0] thr_dac
);
  localparam int HW = $clog2(NMAX);

  logic [2:0]  sync_q;
  logic        pulse_edge;
  logic [31:0] timer;
  logic [15:0] cnt;
  logic [15:0] hist [NMAX];
  logic [HW-1:0] wptr;
  logic [HW:0]   nvalid;
  logic [HW-1:0] k;
  logic [23:0]   acc, acc_next;
  logic [23:0]   sum_q;
  logic [7:0]    nper_q;
  logic [15:0]   target;
  logic          ready, multi;

  typedef enum logic [1:0] {IDLE, COUNT, SCAN} state_t;
  state_t state;

  wire wb_req = wb_i.cyc & wb_i.stb & ~wb_o.ack;
  wire poll   = wb_req & wb_i.we & (wb_i.adr[3:0] == PUL_CTRL[3:0]) & wb_i.dat[0];

  assign pulse_edge = sync_q[1] & ~sync_q[2];
  assign acc_next   = acc + 24'(hist[wptr - HW'(1) - k]);

  always_ff @(posedge clk) begin
    if (rst) sync_q <= '0;
    else     sync_q <= {sync_q[1:0], pulse_in};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= IDLE;
      timer  <= '0;
      cnt    <= '0;
      wptr   <= '0;
      nvalid <= '0;
      k      <= '0;
      acc    <= '0;
      sum_q  <= '0;
      nper_q <= '0;
      ready  <= 1'b0;
      multi  <= 1'b0;
    end else begin
      if (poll) begin
        state <= COUNT;
        timer <= '0;
        cnt   <= '0;
        ready <= 1'b0;
      end else begin
        unique case (state)
          IDLE: ;
          COUNT: begin
            if (pulse_edge && cnt != 16'hFFFF) cnt <= cnt + 1'b1;
            if (timer == PERIOD_CYCLES - 1) begin
              hist[wptr] <= (pulse_edge && cnt != 16'hFFFF) ? cnt + 1'b1 : cnt;
              wptr   <= wptr + 1'b1;
              if (nvalid != (HW+1)'(NMAX)) nvalid <= nvalid + 1'b1;
              k      <= '0;
              acc    <= '0;
              state  <= SCAN;
            end else
              timer <= timer + 1'b1;
          end
          SCAN: begin
            acc <= acc_next;
            if (acc_next >= 24'(target) || (HW+1)'(k) == nvalid - 1'b1) begin
              sum_q  <= acc_next;
              nper_q <= 8'(k);
              multi  <= (k != 0);
              ready  <= 1'b1;
              state  <= IDLE;
            end else
              k <= k + 1'b1;
          end
          default: state <= IDLE;
        endcase
      end
    end
  end

  // register file and bus response
  always_ff @(posedge clk) begin
    if (rst) begin
      wb_o    <= WB_S2M_IDLE;
      target  <= 16'd400;
      thr_dac <= 8'h40;
    end else begin
      wb_o.ack <= wb_req;
      if (wb_req && wb_i.we) begin
        unique case (wb_i.adr[3:0])
          PUL_TGT0[3:0]: target[7:0]  <= wb_i.dat;
          PUL_TGT1[3:0]: target[15:8] <= wb_i.dat;
          PUL_THR[3:0]:  thr_dac      <= wb_i.dat;
          default: ;
        endcase
      end
      if (wb_req) begin
        unique case (wb_i.adr[3:0])
          PUL_STAT[3:0]: wb_o.dat <= {6'b0, multi, ready};
          PUL_SUM0[3:0]: wb_o.dat <= sum_q[7:0];
          PUL_SUM1[3:0]: wb_o.dat <= sum_q[15:8];
          PUL_SUM2[3:0]: wb_o.dat <= sum_q[23:16];
          PUL_NPER[3:0]: wb_o.dat <= nper_q;
          PUL_TGT0[3:0]: wb_o.dat <= target[7:0];
          PUL_TGT1[3:0]: wb_o.dat <= target[15:8];
          PUL_THR[3:0]:  wb_o.dat <= thr_dac;
          default:       wb_o.dat <= 8'h00;
        endcase
      end
    end
  end
endmodule
