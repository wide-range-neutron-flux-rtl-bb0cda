// vme_wb_bridge: VME slave that gives the board's host (the SBC) access to the
// DSP system on chip, with data words up to 16 bits wide.
//
// VME side: A16 slave (address modifiers 0x29 and 0x2D), D16 and D08 byte
// lanes (DS1* = D15..D8, DS0* = D7..D0). The strobes are synchronised with
// two flip-flops; address and data are sampled once a data strobe is seen
// low, as VME guarantees they are stable by then. DTACK* is driven low once
// the access is done and released when both data strobes go high.
// Window: 16 words at BASE (A15..A5 must match). Word offsets:
//   0  command: D15..8 opcode, D7..0 parameter address; a write sets
//      "pending". Read returns the same fields.
//   1  D7..0 command data (write); read gives {7'b0, pending, response}.
//   2,3  log10 flux float32, high then low half
//   4,5  rate float32, high then low half
// WISHBONE side (bus II slave, registers VME_* in wrnd_pkg): the
// communication processor polls VME_STAT, reads the command, executes it,
// writes VME_RESP and then VME_DONE, which clears "pending". It also
// refreshes the result words through VME_OUT0..7 (little-endian bytes).
// The design specifies a VME/WISHBONE bridge for 16-bit words whose internal
// registers the communication processor inspects; the A16 window and this
// mailbox layout are this implementation's choices.
module vme_wb_bridge
  import wrnd_pkg::*;
#(
  parameter logic [15:0] BASE = 16'hC000
) (
  input  logic        clk,
  input  logic        rst,
  input  wb_m2s_t     wb_i,
  output wb_s2m_t     wb_o,
  input  logic [15:1] vme_addr,
  input  logic [5:0]  vme_am,
  input  logic        vme_as_n,
  input  logic [1:0]  vme_ds_n,
  input  logic        vme_write_n,
  input  logic [15:0] vme_data_i,
  output logic [15:0] vme_data_o,
  output logic        vme_data_oe,
  output logic        vme_dtack_n
);
  logic [1:0] as_s, ds0_s, ds1_s;
  logic [7:0] cmd_op, cmd_adr, cmd_dat, resp;
  logic       pending;
  logic [7:0] outb [8];

  typedef enum logic [1:0] {V_IDLE, V_ACK, V_WAIT} vstate_t;
  vstate_t vstate;

  wire as_l   = as_s[1];
  wire [1:0] ds_l = {ds1_s[1], ds0_s[1]};
  wire am_ok  = (vme_am == 6'h29) || (vme_am == 6'h2D);
  wire hit    = as_l && (|ds_l) && am_ok && (vme_addr[15:5] == BASE[15:5]);
  wire [3:0] woff = vme_addr[4:1];

  wire wb_req = wb_i.cyc & wb_i.stb & ~wb_o.ack;
  wire wb_done = wb_req & wb_i.we & (wb_i.adr == VME_DONE);

  always_ff @(posedge clk) begin
    if (rst) begin
      as_s  <= '0;
      ds0_s <= '0;
      ds1_s <= '0;
    end else begin
      as_s  <= {as_s[0],  ~vme_as_n};
      ds0_s <= {ds0_s[0], ~vme_ds_n[0]};
      ds1_s <= {ds1_s[0], ~vme_ds_n[1]};
    end
  end

  function automatic logic [15:0] vme_read(input logic [3:0] w);
    unique case (w)
      4'd0:    return {cmd_op, cmd_adr};
      4'd1:    return {7'b0, pending, resp};
      4'd2:    return {outb[3], outb[2]};
      4'd3:    return {outb[1], outb[0]};
      4'd4:    return {outb[7], outb[6]};
      4'd5:    return {outb[5], outb[4]};
      default: return 16'h0000;
    endcase
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      vstate      <= V_IDLE;
      vme_dtack_n <= 1'b1;
      vme_data_oe <= 1'b0;
      vme_data_o  <= '0;
      cmd_op      <= '0;
      cmd_adr     <= '0;
      cmd_dat     <= '0;
      pending     <= 1'b0;
    end else begin
      if (wb_done) pending <= 1'b0;
      unique case (vstate)
        V_IDLE: if (hit) begin
          if (!vme_write_n) begin
            if (woff == 4'd0) begin
              if (ds_l[1]) cmd_op  <= vme_data_i[15:8];
              if (ds_l[0]) cmd_adr <= vme_data_i[7:0];
              pending <= 1'b1;
            end else if (woff == 4'd1 && ds_l[0]) begin
              cmd_dat <= vme_data_i[7:0];
            end
          end else begin
            vme_data_o  <= vme_read(woff);
            vme_data_oe <= 1'b1;
          end
          vstate <= V_ACK;
        end
        V_ACK: begin
          vme_dtack_n <= 1'b0;
          vstate      <= V_WAIT;
        end
        V_WAIT: if (ds_l == 2'b00) begin
          vme_dtack_n <= 1'b1;
          vme_data_oe <= 1'b0;
          vstate      <= V_IDLE;
        end
        default: vstate <= V_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wb_o <= WB_S2M_IDLE;
      resp <= '0;
      for (int i = 0; i < 8; i++) outb[i] <= '0;
    end else begin
      wb_o.ack <= wb_req;
      if (wb_req && wb_i.we) begin
        if (wb_i.adr == VME_RESP) resp <= wb_i.dat;
        if (wb_i.adr[7:3] == VME_OUT0[7:3]) outb[wb_i.adr[2:0]] <= wb_i.dat;
      end
      if (wb_req) begin
        unique case (wb_i.adr)
          VME_STAT: wb_o.dat <= {7'b0, pending};
          VME_OP:   wb_o.dat <= cmd_op;
          VME_ADR:  wb_o.dat <= cmd_adr;
          VME_DAT:  wb_o.dat <= cmd_dat;
          VME_RESP: wb_o.dat <= resp;
          default:  wb_o.dat <= 8'h00;
        endcase
      end
    end
  end
endmodule
