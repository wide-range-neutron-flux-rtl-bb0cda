// campbell_channel: Campbell (fluctuation) channel front end.
//
// After each poll by the signal processor (a write of bit0 to CAM_CTRL) the
// block takes NSAMP = 1024 samples of the band-pass filtered fluctuation
// signal and computes their mean square (sum of x^2 / NSAMP), the second-order
// estimate of the signal that Campbell's theorem relates to neutron flux.
// The result goes to an output register, status bit0 is set, and the block
// waits for the next poll. The band-pass filter removes the DC part before
// the ADC, so the mean square is the variance.
// ADC interface (this implementation's choice; the design does not specify
// it): `adc_convst` pulses every SAMPLE_CYCLES clocks while integrating; the
// converter answers with `adc_drdy` high for one clock with a two's
// complement sample on `adc_data`. At 64 cycles per sample, 1024 samples take
// 3.28 ms, within the 1/256 s the design allows.
// The block also holds the gain code of the variable gain amplifier DAC
// (CAM_GAIN), written from the configuration. WISHBONE slave, ack one clock
// after stb.
module campbell_channel
  import wrnd_pkg::*;
#(
  parameter int unsigned NSAMP         = 1024,
  parameter int unsigned SAMPLE_CYCLES = 64,
  parameter int unsigned ADC_W         = 12
) (
  input  logic             clk,
  input  logic             rst,
  input  wb_m2s_t          wb_i,
  output wb_s2m_t          wb_o,
  output logic             adc_convst,
  input  logic             adc_drdy,
  input  logic [ADC_W-1:0] adc_data,
  output logic [7:0]       gain_dac
);
  localparam int SW = 2*ADC_W + $clog2(NSAMP);
  localparam int NW = $clog2(NSAMP+1);

  logic                  active, ready;
  logic [15:0]           tick;
  logic [NW-1:0]         nreq, ndone;
  logic [SW-1:0]         sumsq;
  logic [23:0]           ms_q;
  logic signed [ADC_W-1:0] xs;
  logic [2*ADC_W-1:0]    sq;
  logic [SW-1:0]         total;

  wire wb_req = wb_i.cyc & wb_i.stb & ~wb_o.ack;
  wire poll   = wb_req & wb_i.we & (wb_i.adr[3:0] == CAM_CTRL[3:0]) & wb_i.dat[0];

  assign xs    = adc_data;
  assign sq    = (2*ADC_W)'(xs * xs);
  assign total = sumsq + SW'(sq);

  always_ff @(posedge clk) begin
    if (rst) begin
      active     <= 1'b0;
      ready      <= 1'b0;
      tick       <= '0;
      nreq       <= '0;
      ndone      <= '0;
      sumsq      <= '0;
      ms_q       <= '0;
      adc_convst <= 1'b0;
    end else begin
      adc_convst <= 1'b0;
      if (poll) begin
        active <= 1'b1;
        ready  <= 1'b0;
        tick   <= '0;
        nreq   <= '0;
        ndone  <= '0;
        sumsq  <= '0;
      end else if (active) begin
        if (tick == 16'(SAMPLE_CYCLES - 1)) tick <= '0;
        else                                tick <= tick + 1'b1;
        if (tick == 0 && nreq != NW'(NSAMP)) begin
          adc_convst <= 1'b1;
          nreq       <= nreq + 1'b1;
        end
        if (adc_drdy) begin
          sumsq <= total;
          ndone <= ndone + 1'b1;
          if (ndone == NW'(NSAMP - 1)) begin
            ms_q   <= 24'(total >> $clog2(NSAMP));
            ready  <= 1'b1;
            active <= 1'b0;
          end
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wb_o     <= WB_S2M_IDLE;
      gain_dac <= 8'h80;
    end else begin
      wb_o.ack <= wb_req;
      if (wb_req && wb_i.we && wb_i.adr[3:0] == CAM_GAIN[3:0]) gain_dac <= wb_i.dat;
      if (wb_req) begin
        unique case (wb_i.adr[3:0])
          CAM_STAT[3:0]: wb_o.dat <= {7'b0, ready};
          CAM_MS0[3:0]:  wb_o.dat <= ms_q[7:0];
          CAM_MS1[3:0]:  wb_o.dat <= ms_q[15:8];
          CAM_MS2[3:0]:  wb_o.dat <= ms_q[23:16];
          CAM_GAIN[3:0]: wb_o.dat <= gain_dac;
          default:       wb_o.dat <= 8'h00;
        endcase
      end
    end
  end
endmodule
