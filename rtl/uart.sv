// uart: fixed-format serial port of the communication section (RS422 line
// drivers are outside the chip).
//
// The format is fixed at build time, as the design asks, to save logic:
// 8 data bits, no parity, 1 stop bit, CLK_DIV clocks per bit (174 gives
// 115 200 baud from 20 MHz; the rate itself is this implementation's choice).
// Receiver: waits for a falling edge, checks the start bit half a bit later,
// then samples each bit in its middle; a byte with a bad stop bit is dropped.
// One received byte is held; status bit0 says it is waiting, reading
// UART_DATA returns it and clears the flag; status bit2 reports an overrun.
// Transmitter: writing UART_DATA while status bit1 (busy) is low sends the
// byte. WISHBONE slave, ack one clock after stb.
module uart
  import wrnd_pkg::*;
#(
  parameter int unsigned CLK_DIV = 174
) (
  input  logic    clk,
  input  logic    rst,
  input  wb_m2s_t wb_i,
  output wb_s2m_t wb_o,
  input  logic    rxd,
  output logic    txd
);
  localparam int CW = $clog2(CLK_DIV + 1);

  // ---------------- receiver ----------------
  logic [2:0]    rx_sync;
  logic          rx_busy;
  logic [CW-1:0] rx_cnt;
  logic [3:0]    rx_bit;
  logic [7:0]    rx_shift, rx_data;
  logic          rx_valid, rx_ovr;
  wire           rx_in = rx_sync[2];

  // ---------------- transmitter ----------------
  logic          tx_busy;
  logic [CW-1:0] tx_cnt;
  logic [3:0]    tx_bit;
  logic [9:0]    tx_shift;

  wire wb_req = wb_i.cyc & wb_i.stb & ~wb_o.ack;
  wire rd_pop = wb_req & ~wb_i.we & (wb_i.adr[0] == UART_DATA[0]);
  wire wr_tx  = wb_req &  wb_i.we & (wb_i.adr[0] == UART_DATA[0]) & ~tx_busy;

  always_ff @(posedge clk) begin
    if (rst) begin
      rx_sync  <= 3'b111;
      rx_busy  <= 1'b0;
      rx_cnt   <= '0;
      rx_bit   <= '0;
      rx_shift <= '0;
      rx_data  <= '0;
      rx_valid <= 1'b0;
      rx_ovr   <= 1'b0;
    end else begin
      rx_sync <= {rx_sync[1:0], rxd};
      if (rd_pop) begin
        rx_valid <= 1'b0;
        rx_ovr   <= 1'b0;
      end
      if (!rx_busy) begin
        if (!rx_in) begin
          rx_busy <= 1'b1;
          rx_cnt  <= CW'(CLK_DIV / 2);
          rx_bit  <= '0;
        end
      end else if (rx_cnt != 0) begin
        rx_cnt <= rx_cnt - 1'b1;
      end else begin
        rx_cnt <= CW'(CLK_DIV - 1);
        rx_bit <= rx_bit + 1'b1;
        if (rx_bit == 0) begin
          if (rx_in) rx_busy <= 1'b0;          // false start
        end else if (rx_bit <= 8) begin
          rx_shift <= {rx_in, rx_shift[7:1]};
        end else begin
          rx_busy <= 1'b0;
          if (rx_in) begin                      // good stop bit
            rx_data  <= rx_shift;
            rx_valid <= 1'b1;
            if (rx_valid && !rd_pop) rx_ovr <= 1'b1;
          end
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      tx_busy  <= 1'b0;
      tx_cnt   <= '0;
      tx_bit   <= '0;
      tx_shift <= '1;
      txd      <= 1'b1;
    end else if (wr_tx) begin
      tx_busy  <= 1'b1;
      tx_shift <= {1'b1, wb_i.dat, 1'b0};
      tx_cnt   <= CW'(CLK_DIV - 1);
      tx_bit   <= '0;
      txd      <= 1'b0;
    end else if (tx_busy) begin
      if (tx_cnt != 0) tx_cnt <= tx_cnt - 1'b1;
      else begin
        tx_cnt   <= CW'(CLK_DIV - 1);
        tx_shift <= {1'b1, tx_shift[9:1]};
        txd      <= tx_shift[1];
        if (tx_bit == 9) begin
          tx_busy <= 1'b0;
          txd     <= 1'b1;
        end
        tx_bit <= tx_bit + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) wb_o <= WB_S2M_IDLE;
    else begin
      wb_o.ack <= wb_req;
      if (wb_req) begin
        if (wb_i.adr[0] == UART_DATA[0]) wb_o.dat <= rx_data;
        else                             wb_o.dat <= {5'b0, rx_ovr, tx_busy, rx_valid};
      end
    end
  end
endmodule
