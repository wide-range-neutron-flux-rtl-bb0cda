// wrnd_pkg: types and constants shared by the wide range neutron detector
// DSP system on chip.
//
// Both on-chip buses are WISHBONE, shared type, with an 8-bit address and an
// 8-bit data bus, clocked at 20 MHz (as the design specifies). A master drives
// a wb_m2s_t and a slave answers with a wb_s2m_t. Classic single cycles: the
// master holds cyc/stb until the slave raises ack for one clock.
//
// The register maps of the two buses and the layout of the configuration block
// are this implementation's own choice; the design names the blocks but does
// not publish addresses. Fixed-point values are signed Q16.16 (log10 in
// decades, rate in decades per second).
package wrnd_pkg;

  localparam int WB_AW = 8;
  localparam int WB_DW = 8;

  typedef struct packed {
    logic             cyc;
    logic             stb;
    logic             we;
    logic [WB_AW-1:0] adr;
    logic [WB_DW-1:0] dat;
  } wb_m2s_t;

  typedef struct packed {
    logic             ack;
    logic [WB_DW-1:0] dat;
  } wb_s2m_t;

  localparam wb_m2s_t WB_M2S_IDLE = '{default: '0};
  localparam wb_s2m_t WB_S2M_IDLE = '{default: '0};

  // ---------------- Bus I (processing section) ----------------
  // pulse channel front end, 0x00..0x0F
  localparam logic [7:0] PUL_CTRL  = 8'h00; // W: bit0 = poll (restart integration)
  localparam logic [7:0] PUL_STAT  = 8'h01; // R: bit0 = result ready, bit1 = multi-period
  localparam logic [7:0] PUL_SUM0  = 8'h02; // R: windowed count, bits 7:0
  localparam logic [7:0] PUL_SUM1  = 8'h03; //    bits 15:8
  localparam logic [7:0] PUL_SUM2  = 8'h04; //    bits 23:16
  localparam logic [7:0] PUL_NPER  = 8'h05; // R: number of periods in window minus 1
  localparam logic [7:0] PUL_TGT0  = 8'h06; // R/W: target count, bits 7:0
  localparam logic [7:0] PUL_TGT1  = 8'h07; //      bits 15:8
  localparam logic [7:0] PUL_THR   = 8'h08; // R/W: discriminator threshold DAC code
  // Campbell channel front end, 0x10..0x1F
  localparam logic [7:0] CAM_CTRL  = 8'h10; // W: bit0 = poll (restart integration)
  localparam logic [7:0] CAM_STAT  = 8'h11; // R: bit0 = result ready
  localparam logic [7:0] CAM_MS0   = 8'h12; // R: mean square, bits 7:0
  localparam logic [7:0] CAM_MS1   = 8'h13; //    bits 15:8
  localparam logic [7:0] CAM_MS2   = 8'h14; //    bits 23:16
  localparam logic [7:0] CAM_GAIN  = 8'h15; // R/W: amplifier gain DAC code
  // bridge windows (same offsets on both buses)
  localparam logic [7:0] CP_BASE   = 8'h40; // CP port, 32 bytes
  localparam logic [7:0] PCP_BASE  = 8'h80; // PC port, 64 bytes

  // ---------------- Bus II (communication section) ----------------
  localparam logic [7:0] UART_DATA = 8'h00; // R: received byte (pops), W: send byte
  localparam logic [7:0] UART_STAT = 8'h01; // R: bit0 = rx byte waiting, bit1 = tx busy
  localparam logic [7:0] VME_BASE  = 8'h10; // VME/WB bridge registers 0x10..0x1F
  localparam logic [7:0] VME_STAT  = 8'h10; // R: bit0 = command pending
  localparam logic [7:0] VME_OP    = 8'h11; // R: command opcode
  localparam logic [7:0] VME_ADR   = 8'h12; // R: command parameter address
  localparam logic [7:0] VME_DAT   = 8'h13; // R: command data
  localparam logic [7:0] VME_RESP  = 8'h14; // W: response byte
  localparam logic [7:0] VME_DONE  = 8'h15; // W: any value = command finished
  localparam logic [7:0] VME_OUT0  = 8'h18; // W: 0x18..0x1F result bytes seen by VME
  localparam logic [7:0] MON_BASE  = 8'h20; // monitor 0x20..0x2F
  localparam logic [7:0] MON_START = 8'h28; // W: send both codes to the DACs

  // ---------------- configuration block (CP port offsets) ----------------
  localparam int CFG_BYTES   = 32;
  localparam int CFG_VMIN    = 0;  // 3 bytes, Campbell mean-square units
  localparam int CFG_VMAX    = 4;  // 3 bytes
  localparam int CFG_POFS    = 8;  // 4 bytes Q16.16, pulse channel log offset
  localparam int CFG_COFS    = 12; // 4 bytes Q16.16, Campbell channel log offset
  localparam int CFG_HP      = 16; // 4 bytes Q16.16, high power threshold (decades)
  localparam int CFG_HR      = 20; // 4 bytes Q16.16, high rate threshold (decades/s)
  localparam int CFG_LPF     = 24; // low-pass shift k
  localparam int CFG_TRIPMSK = 25; // bit0 HP, bit1 HR, bit2 rv0, bit3 rv1, bit4 FR
  localparam int CFG_GAIN    = 26; // Campbell amplifier gain
  localparam int CFG_TGT     = 27; // 2 bytes, pulse target count
  localparam int CFG_THR     = 29; // discriminator threshold

  // ---------------- PC port layout ----------------
  localparam int PCP_BYTES   = 64;
  localparam int PCP_CFG     = 0;  // 32-byte echo of the configuration in use
  localparam int PCP_LOG     = 32; // float32 log10 flux, little-endian
  localparam int PCP_RATE    = 36; // float32 rate, decades/s
  localparam int PCP_STAT    = 40; // bit0 FR, bit1 HP, bit2 HR, bit3 trip
  localparam int PCP_NPER    = 41; // pulse window periods minus 1
  localparam int PCP_PRAW    = 42; // 3 bytes pulse sum
  localparam int PCP_CRAW    = 45; // 3 bytes Campbell mean square
  localparam int PCP_SEQ     = 48; // sample counter
  localparam int PCP_USED    = 49;

  // Command opcodes (UART and VME)
  localparam logic [7:0] OP_WRITE = 8'h57; // 'W' addr data  -> 'K'
  localparam logic [7:0] OP_READ  = 8'h52; // 'R' addr       -> value
  localparam logic [7:0] OP_FLUX  = 8'h46; // 'F'            -> log(4) rate(4) status(1)
  localparam logic [7:0] RSP_OK   = 8'h4B; // 'K'
  localparam logic [7:0] RSP_NAK  = 8'h15;

  // Configuration written at start-up by the communication processor.
  function automatic logic [7:0] cfg_default(input int i);
    logic [8*CFG_BYTES-1:0] img;
    img = '0;
    img[8*CFG_VMIN +: 24]   = 24'h000400;     // VMIN
    img[8*CFG_VMAX +: 24]   = 24'h004000;     // VMAX
    img[8*CFG_POFS +: 32]   = 32'h0000_0000;  // pulse offset 0 decades
    img[8*CFG_COFS +: 32]   = 32'hFFFF_0000;  // Campbell offset -1 decade
    img[8*CFG_HP   +: 32]   = 32'h0009_0000;  // HP at 9 decades
    img[8*CFG_HR   +: 32]   = 32'h0001_0000;  // HR at 1 decade/s
    img[8*CFG_LPF  +: 8]    = 8'd2;
    img[8*CFG_TRIPMSK +: 8] = 8'h0F;
    img[8*CFG_GAIN +: 8]    = 8'h80;
    img[8*CFG_TGT  +: 16]   = 16'd400;
    img[8*CFG_THR  +: 8]    = 8'h40;
    return img[8*i +: 8];
  endfunction

endpackage
