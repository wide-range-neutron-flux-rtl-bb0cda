// dsp_soc: DSP system on chip of the wide range neutron flux measuring
// channel.
//
// A fission chamber gives pulses at low neutron flux and a fluctuating
// (Campbell) current at high flux. This chip counts the discriminated pulses
// (pulse channel) and takes the mean square of the sampled fluctuation signal
// (Campbell channel), switches between the two with hysteresis across their
// overlap, and produces log10 of the flux and its rate as 32-bit floats, a
// trip request, and two analogue debug outputs, under control of a host
// through a UART or the VME bus.
// Structure (two sections, each on its own 8-bit WISHBONE bus with a SYSCON):
//   processing section, bus I: signal_processor (master), pulse_channel
//     0x00, campbell_channel 0x10, CP port (read) 0x40, PC port (write) 0x80;
//     trip_logic beside the bus.
//   communication section, bus II: comm_processor (master), uart 0x00,
//     vme_wb_bridge 0x10, monitor 0x20, CP port (write) 0x40, PC port
//     (read) 0x80.
//   ww_bridge joins the two: the CP port carries configuration to the
//   processing section, the PC port carries results back.
// Both sections run from the one clock `clk` (20 MHz) here; the bridge ports
// have separate clock inputs, so the sections could be split across two
// devices as the design does. All parameter defaults are the design's
// numbers or this implementation's documented choices; the parameters exist
// so that simulations can shorten the long periods.
module dsp_soc
  import wrnd_pkg::*;
#(
  parameter int unsigned POLL_CYCLES   = 100000, // 5 ms sampling period
  parameter int unsigned PERIOD_CYCLES = 78125,  // 1/256 s pulse counting period
  parameter int unsigned NMAX          = 256,    // up to 1 s of counting
  parameter int unsigned NSAMP         = 1024,   // Campbell samples per estimate
  parameter int unsigned SAMPLE_CYCLES = 64,
  parameter int unsigned CLK_DIV       = 174,    // UART bit time
  parameter int unsigned COMM_WDT      = 1 << 20
) (
  input  logic        clk,
  input  logic        rst_n,
  // pulse channel: discriminator output and its threshold DAC
  input  logic        pulse_in,
  output logic [7:0]  thr_dac,
  // Campbell channel: ADC and gain DAC
  output logic        adc_convst,
  input  logic        adc_drdy,
  input  logic [11:0] adc_data,
  output logic [7:0]  gain_dac,
  // trip
  input  logic [1:0]  reactor_var,
  output logic        trip_request,
  // RS422 serial port
  input  logic        uart_rxd,
  output logic        uart_txd,
  // VME bus
  input  logic [15:1] vme_addr,
  input  logic [5:0]  vme_am,
  input  logic        vme_as_n,
  input  logic [1:0]  vme_ds_n,
  input  logic        vme_write_n,
  input  logic [15:0] vme_data_i,
  output logic [15:0] vme_data_o,
  output logic        vme_data_oe,
  output logic        vme_dtack_n,
  // serial DACs for LOG and RATE
  output logic        dac_sclk,
  output logic        dac_din,
  output logic [1:0]  dac_cs_n,
  // status
  output logic        fr,
  output logic        hp,
  output logic        hr
);
  logic clk_p, rst_p, clk_c, rst_c;

  syscon u_syscon_p (.clk_i(clk), .rst_ni(rst_n), .clk_o(clk_p), .rst_o(rst_p));
  syscon u_syscon_c (.clk_i(clk), .rst_ni(rst_n), .clk_o(clk_c), .rst_o(rst_c));

  // ---------------- processing section (bus I) ----------------
  wb_m2s_t          sp_m2s;
  wb_s2m_t          sp_s2m;
  wb_m2s_t [3:0]    p_m2s;
  wb_s2m_t [3:0]    p_s2m;
  logic [7:0]       trip_mask;
  logic             sp_pass_done;

  wb_intercon #(
    .NS(4),
    .BASE({PCP_BASE, CP_BASE, 8'h10, 8'h00}),
    .MASK({8'hC0,    8'hE0,   8'hF0, 8'hF0})
  ) u_bus_i (
    .clk(clk_p), .rst(rst_p), .m2s(sp_m2s), .s2m(sp_s2m), .slv_m2s(p_m2s), .slv_s2m(p_s2m)
  );

  signal_processor #(.POLL_CYCLES(POLL_CYCLES)) u_sp (
    .clk(clk_p), .rst(rst_p), .wb_o(sp_m2s), .wb_i(sp_s2m), .trip_in(trip_request),
    .fr, .hp, .hr, .trip_mask, .pass_done(sp_pass_done)
  );

  pulse_channel #(.PERIOD_CYCLES(PERIOD_CYCLES), .NMAX(NMAX)) u_pulse (
    .clk(clk_p), .rst(rst_p), .wb_i(p_m2s[0]), .wb_o(p_s2m[0]), .pulse_in, .thr_dac
  );

  campbell_channel #(.NSAMP(NSAMP), .SAMPLE_CYCLES(SAMPLE_CYCLES), .ADC_W(12)) u_campbell (
    .clk(clk_p), .rst(rst_p), .wb_i(p_m2s[1]), .wb_o(p_s2m[1]),
    .adc_convst, .adc_drdy, .adc_data, .gain_dac
  );

  trip_logic u_trip (
    .clk(clk_p), .rst(rst_p), .fr, .hp, .hr, .rv(reactor_var), .mask(trip_mask), .trip_request
  );

  // ---------------- communication section (bus II) ----------------
  wb_m2s_t          cp_m2s;
  wb_s2m_t          cp_s2m;
  wb_m2s_t [4:0]    c_m2s;
  wb_s2m_t [4:0]    c_s2m;
  logic             cmd_done, refreshed, wdt_reset;

  wb_intercon #(
    .NS(5),
    .BASE({PCP_BASE, CP_BASE, MON_BASE, VME_BASE, 8'h00}),
    .MASK({8'hC0,    8'hE0,   8'hF0,    8'hF0,    8'hFE})
  ) u_bus_ii (
    .clk(clk_c), .rst(rst_c), .m2s(cp_m2s), .s2m(cp_s2m), .slv_m2s(c_m2s), .slv_s2m(c_s2m)
  );

  comm_processor #(.WDT_CYCLES(COMM_WDT)) u_cp (
    .clk(clk_c), .rst(rst_c), .wb_o(cp_m2s), .wb_i(cp_s2m),
    .cmd_done, .refreshed, .wdt_reset
  );

  uart #(.CLK_DIV(CLK_DIV)) u_uart (
    .clk(clk_c), .rst(rst_c), .wb_i(c_m2s[0]), .wb_o(c_s2m[0]), .rxd(uart_rxd), .txd(uart_txd)
  );

  vme_wb_bridge u_vme (
    .clk(clk_c), .rst(rst_c), .wb_i(c_m2s[1]), .wb_o(c_s2m[1]),
    .vme_addr, .vme_am, .vme_as_n, .vme_ds_n, .vme_write_n, .vme_data_i,
    .vme_data_o, .vme_data_oe, .vme_dtack_n
  );

  monitor u_monitor (
    .clk(clk_c), .rst(rst_c), .wb_i(c_m2s[2]), .wb_o(c_s2m[2]), .dac_sclk, .dac_din, .dac_cs_n
  );

  // ---------------- WISHBONE/WISHBONE bridge ----------------
  ww_bridge #(.CP_DEPTH(CFG_BYTES), .PC_DEPTH(PCP_BYTES)) u_ww (
    .clk_p(clk_p), .rst_p(rst_p), .p_cp_i(p_m2s[2]), .p_cp_o(p_s2m[2]),
    .p_pc_i(p_m2s[3]), .p_pc_o(p_s2m[3]),
    .clk_c(clk_c), .rst_c(rst_c), .c_cp_i(c_m2s[3]), .c_cp_o(c_s2m[3]),
    .c_pc_i(c_m2s[4]), .c_pc_o(c_s2m[4])
  );
endmodule
