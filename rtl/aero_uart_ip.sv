// UART IP with a transmit buffer and receive sampling ports.
//
// Serial format 8N1, CLKS_PER_BIT clock cycles per bit (434 = 50 MHz /
// 115200 bit/s).
// Transmit: the processor writes 32-bit words (tx_we/tx_data) into a buffer
// of TXBUF_DEPTH words; each word is sent as four bytes, least significant
// first. A word written while the buffer is full is dropped and counted in
// tx_dropped, which is how a processor that writes faster than the line
// rate loses packets.
// Receive: the line carries packets of five bytes, a port index followed by
// a 32-bit sample, least significant byte first. When the fifth byte arrives
// the sample overwrites sampling port (index mod NPORTS). Ports are never
// consumed by a read: every partition may read any port, and a port only
// changes when a new sample for it arrives, so one partition cannot empty
// data meant for another. rx_count counts completed samples.
// Sampling ports, the buffer overflow and the baud rate follow the
// published description; the packet format, byte order, buffer depth and
// port count are this design's choices.
module aero_uart_ip
  import aero_pkg::*;
#(
  parameter int unsigned CLKS_PER_BIT = 434,
  parameter int unsigned TXBUF_DEPTH  = 4,
  parameter int unsigned NPORTS       = 4
) (
  input  logic        clk,
  input  logic        rst,
  // processor side
  input  logic        tx_we,
  input  word_t       tx_data,
  output logic        tx_full,
  output logic [15:0] tx_dropped,
  output word_t       port_data [NPORTS],
  output logic [15:0] rx_count,
  // serial lines
  output logic        txd,
  input  logic        rxd
);

  localparam int unsigned BW  = $clog2(CLKS_PER_BIT + 1);
  localparam int unsigned QW  = (TXBUF_DEPTH > 1) ? $clog2(TXBUF_DEPTH) : 1;

  // ---------------- transmit buffer ----------------
  word_t        txq [TXBUF_DEPTH];
  logic [QW-1:0] q_rd, q_wr;
  logic [QW:0]   q_cnt;
  logic          q_pop;

  assign tx_full = (q_cnt == (QW+1)'(TXBUF_DEPTH));

  always_ff @(posedge clk) begin
    if (rst) begin
      q_rd       <= '0;
      q_wr       <= '0;
      q_cnt      <= '0;
      tx_dropped <= '0;
    end else begin
      if (tx_we && !tx_full) begin
        txq[q_wr] <= tx_data;
        q_wr      <= (q_wr == QW'(TXBUF_DEPTH - 1)) ? '0 : q_wr + 1'b1;
      end
      if (tx_we && tx_full) tx_dropped <= tx_dropped + 1'b1;
      if (q_pop) q_rd <= (q_rd == QW'(TXBUF_DEPTH - 1)) ? '0 : q_rd + 1'b1;
      q_cnt <= q_cnt + (QW+1)'(tx_we && !tx_full) - (QW+1)'(q_pop);
    end
  end

  // ---------------- transmitter ----------------
  logic          tx_busy;
  word_t         tx_word;
  logic [1:0]    tx_byte;    // byte of the word being sent
  logic [3:0]    tx_bit;     // 0 start, 1..8 data, 9 stop
  logic [BW-1:0] tx_clk;

  assign q_pop = !tx_busy && q_cnt != '0;

  always_ff @(posedge clk) begin
    if (rst) begin
      tx_busy <= 1'b0;
      tx_word <= '0;
      tx_byte <= '0;
      tx_bit  <= '0;
      tx_clk  <= '0;
      txd     <= 1'b1;
    end else if (!tx_busy) begin
      txd <= 1'b1;
      if (q_pop) begin
        tx_busy <= 1'b1;
        tx_word <= txq[q_rd];
        tx_byte <= '0;
        tx_bit  <= '0;
        tx_clk  <= '0;
        txd     <= 1'b0;
      end
    end else if (tx_clk != BW'(CLKS_PER_BIT - 1)) begin
      tx_clk <= tx_clk + 1'b1;
    end else begin
      tx_clk <= '0;
      if (tx_bit == 4'd9) begin
        if (tx_byte == 2'd3) begin
          tx_busy <= 1'b0;
          txd     <= 1'b1;
        end else begin
          tx_byte <= tx_byte + 1'b1;
          tx_bit  <= '0;
          txd     <= 1'b0;
        end
      end else begin
        tx_bit <= tx_bit + 1'b1;
        txd    <= (tx_bit == 4'd8) ? 1'b1 : tx_word[8*tx_byte + 32'(tx_bit)];
      end
    end
  end

  // ---------------- receiver ----------------
  logic          rxd_s1, rxd_s2;
  logic          rx_busy;
  logic [3:0]    rx_bit;
  logic [BW-1:0] rx_clk;
  logic [7:0]    rx_shift;
  logic [2:0]    rx_nbyte;   // bytes of the current packet received
  logic [7:0]    rx_port;
  word_t         rx_sample;

  always_ff @(posedge clk) begin
    if (rst) begin
      rxd_s1    <= 1'b1;
      rxd_s2    <= 1'b1;
      rx_busy   <= 1'b0;
      rx_bit    <= '0;
      rx_clk    <= '0;
      rx_shift  <= '0;
      rx_nbyte  <= '0;
      rx_port   <= '0;
      rx_sample <= '0;
      rx_count  <= '0;
      for (int p = 0; p < NPORTS; p++) port_data[p] <= '0;
    end else begin
      rxd_s1 <= rxd;
      rxd_s2 <= rxd_s1;
      if (!rx_busy) begin
        if (!rxd_s2) begin            // start bit edge
          rx_busy <= 1'b1;
          rx_bit  <= '0;
          rx_clk  <= BW'(CLKS_PER_BIT / 2);
        end
      end else if (rx_clk != BW'(CLKS_PER_BIT - 1)) begin
        rx_clk <= rx_clk + 1'b1;
      end else begin
        rx_clk <= '0;              // now at the middle of bit rx_bit
        if (rx_bit == 4'd0) begin
          if (rxd_s2) rx_busy <= 1'b0;   // false start
          else        rx_bit  <= 4'd1;
        end else if (rx_bit != 4'd9) begin
          rx_shift <= {rxd_s2, rx_shift[7:1]};
          rx_bit   <= rx_bit + 1'b1;
        end else begin
          rx_busy <= 1'b0;
          if (rxd_s2) begin               // valid stop bit: byte complete
            if (rx_nbyte == 3'd0) begin
              rx_port  <= rx_shift;
              rx_nbyte <= 3'd1;
            end else begin
              rx_sample <= {rx_shift, rx_sample[31:8]};
              if (rx_nbyte == 3'd4) begin
                port_data[32'(rx_port) % NPORTS] <= {rx_shift, rx_sample[31:8]};
                rx_count <= rx_count + 1'b1;
                rx_nbyte <= 3'd0;
              end else begin
                rx_nbyte <= rx_nbyte + 1'b1;
              end
            end
          end
        end
      end
    end
  end

endmodule
