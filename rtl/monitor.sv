// monitor: driver for the two analogue debug outputs, LOG and RATE.
//
// The communication processor writes the log10 flux and the rate, each a
// little-endian float32, to MON_BASE+0..3 and +4..7, then writes MON_START.
// The block converts each float to signed Q16.16 and then to a 12-bit DAC
// code:
//   LOG  code = (log10 - LOG_MIN) * LOG_GAIN, clamped to 0..4095
//   RATE code = 2048 + rate * RATE_GAIN, clamped to 0..4095
// (gains in codes per decade and per decade/s; defaults cover 0..10 decades
// and -2..+2 decades/s). The codes are shifted out MSB first as 16-bit frames
// {4'b0000, code}, first to the LOG DAC (dac_cs_n[0] low), then to the RATE
// DAC (dac_cs_n[1] low). dac_sclk runs at clk / (2*SCLK_DIV); data changes
// after the falling edge and is stable at the rising edge. MON_BASE+9 bit0
// reads "busy"; a start while busy is ignored.
// The design provides a digital driver for two analogue outputs (LOG and
// RATE) on a serial DAC; the DAC frame, scaling and clock are this
// implementation's choices.
module monitor
  import wrnd_pkg::*;
#(
  parameter int              SCLK_DIV  = 2,
  parameter logic signed [31:0] LOG_MIN   = 32'sh0000_0000,
  parameter int              LOG_GAIN  = 409,
  parameter int              RATE_GAIN = 1023
) (
  input  logic       clk,
  input  logic       rst,
  input  wb_m2s_t    wb_i,
  output wb_s2m_t    wb_o,
  output logic       dac_sclk,
  output logic       dac_din,
  output logic [1:0] dac_cs_n
);
  logic [7:0]  fbyte [8];
  logic        busy;
  logic        chan;
  logic [4:0]  bitn;
  logic [15:0] shreg;
  logic [15:0] div;
  logic [11:0] code_rate_q;

  wire wb_req = wb_i.cyc & wb_i.stb & ~wb_o.ack;
  wire start  = wb_req & wb_i.we & (wb_i.adr == MON_START) & ~busy;

  // float32 -> signed Q16.16, saturating
  function automatic logic signed [31:0] float2fix(input logic [31:0] f);
    logic [7:0]  e;
    logic [55:0] m;
    int          sh;
    logic [31:0] mag;
    e  = f[30:23];
    m  = {32'b0, 1'b1, f[22:0]};
    sh = int'(e) - 127 - 7;   // value = m * 2^(e-127-23), Q16.16 needs *2^16
    if (e == 0)           mag = 32'h0;
    else if (sh >= 8)     mag = 32'h7FFF_FFFF;
    else if (sh >= 0)     mag = 32'(m << sh);
    else if (sh > -32)    mag = 32'(m >> (-sh));
    else                  mag = 32'h0;
    return f[31] ? -$signed(mag) : $signed(mag);
  endfunction

  function automatic logic [11:0] clamp12(input logic signed [63:0] v);
    if (v < 0)        return 12'd0;
    else if (v > 4095) return 12'd4095;
    else              return 12'(v);
  endfunction

  logic signed [31:0] log_fx, rate_fx;
  logic [11:0]        code_log, code_rate;

  always_comb begin
    log_fx    = float2fix({fbyte[3], fbyte[2], fbyte[1], fbyte[0]});
    rate_fx   = float2fix({fbyte[7], fbyte[6], fbyte[5], fbyte[4]});
    code_log  = clamp12(((64'(log_fx) - 64'(LOG_MIN)) * 64'(LOG_GAIN)) >>> 16);
    code_rate = clamp12(64'sd2048 + ((64'(rate_fx) * 64'(RATE_GAIN)) >>> 16));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wb_o <= WB_S2M_IDLE;
      for (int i = 0; i < 8; i++) fbyte[i] <= '0;
    end else begin
      wb_o.ack <= wb_req;
      if (wb_req && wb_i.we && wb_i.adr[7:3] == MON_BASE[7:3])
        fbyte[wb_i.adr[2:0]] <= wb_i.dat;
      if (wb_req)
        wb_o.dat <= (wb_i.adr == MON_START + 8'd1) ? {7'b0, busy} : 8'h00;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy        <= 1'b0;
      chan        <= 1'b0;
      bitn        <= '0;
      shreg       <= '0;
      div         <= '0;
      dac_sclk    <= 1'b0;
      dac_din     <= 1'b0;
      dac_cs_n    <= 2'b11;
      code_rate_q <= '0;
    end else if (start) begin
      busy        <= 1'b1;
      chan        <= 1'b0;
      bitn        <= '0;
      shreg       <= {4'b0, code_log};
      code_rate_q <= code_rate;
      div         <= '0;
      dac_sclk    <= 1'b0;
      dac_din     <= 1'b0;   // bit 15 of the first frame
      dac_cs_n    <= 2'b10;
    end else if (busy) begin
      if (div != 16'(SCLK_DIV - 1)) div <= div + 1'b1;
      else begin
        div <= '0;
        if (!dac_sclk) dac_sclk <= 1'b1;          // DAC samples dac_din here
        else begin
          dac_sclk <= 1'b0;
          if (bitn == 5'd15) begin
            bitn <= '0;
            if (!chan) begin
              chan     <= 1'b1;
              shreg    <= {4'b0, code_rate_q};
              dac_din  <= 1'b0;
              dac_cs_n <= 2'b01;
            end else begin
              busy     <= 1'b0;
              dac_cs_n <= 2'b11;
            end
          end else begin
            bitn    <= bitn + 1'b1;
            shreg   <= {shreg[14:0], 1'b0};
            dac_din <= shreg[14];
          end
        end
      end
    end
  end
endmodule
