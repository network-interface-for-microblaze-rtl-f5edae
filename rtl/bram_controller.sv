// bram_controller: moves frames between the flow controller and the
// processor's frame buffers in the dual-port RAM.
//
// Frames of varying size cannot be read by the processor straight from a
// FIFO, so each direction has a 2 KB buffer in the dual-port RAM, which the
// processor reaches through port B as ordinary memory. This controller
// owns port A.
//
// Receive: as soon as the ETH-UB FIFO holds a frame, its bytes are written
// one per cycle to the receive buffer (byte 0 at RX_BASE). After the last
// byte rx_ready rises (the processor's receive interrupt) and rx_len gives
// the frame length. The next frame is loaded only after the processor
// pulses rx_ack. Bytes beyond the buffer size are not stored.
// Transmit: the processor writes a frame into the transmit buffer (byte 0 at
// TX_BASE), puts its length on tx_len and pulses tx_ready (data ready). The
// controller reads the buffer word by word and pushes the bytes, the last
// one flagged, into the UB-ETH FIFO, waiting while the FIFO is full, then
// commits the frame and pulses tx_ack; the processor may then load the next
// frame. tx_busy is high from tx_ready to tx_ack.
//
// Port A is shared: a transmit word read takes the port for one cycle, and
// the receive side waits that cycle. Receive writes put the FIFO byte on
// all four lanes of a_din and let a_we pick the lane, so a_din is the FIFO
// data replicated; wr_drop is held low because a transmit frame, once
// requested, is always completed (the controller waits on wr_full). Byte i of a buffer is in word i/4, lane
// i%4, with lane 0 in bits [31:24]. The handshakes follow the source design;
// rx_len/tx_len, the buffer bases and the byte order are this design's own.
// All signals are synchronous to clk (the processor clock); reset is
// synchronous, active low.
module bram_controller
  import eth_pkg::*;
#(
  parameter int unsigned ADDR_W    = 10,
  parameter int unsigned BUF_BYTES = FRAME_BUF_BYTES,
  parameter int unsigned RX_BASE   = 0,
  parameter int unsigned TX_BASE   = FRAME_BUF_BYTES
) (
  input  logic              clk,
  input  logic              rst_n,
  // ETH-UB FIFO read port (show-ahead)
  output logic              rd_en,
  input  fifo_word_t        rd_data,
  input  logic              rd_empty,
  // UB-ETH FIFO write port
  output logic              wr_en,
  output fifo_word_t        wr_data,
  output logic              wr_commit,
  output logic              wr_drop,
  input  logic              wr_full,
  // dual-port RAM, port A
  output logic              a_en,
  output logic [3:0]        a_we,
  output logic [ADDR_W-1:0] a_addr,
  output logic [31:0]       a_din,
  input  logic [31:0]       a_dout,
  // processor handshakes
  output logic              rx_ready,
  output logic [11:0]       rx_len,
  input  logic              rx_ack,
  input  logic              tx_ready,
  input  logic [11:0]       tx_len,
  output logic              tx_ack,
  output logic              tx_busy
);

  localparam int unsigned BA_W = ADDR_W + 2;  // byte address width

  typedef enum logic {R_FILL, R_WAIT} rx_state_t;
  typedef enum logic [1:0] {T_IDLE, T_READ, T_LATCH, T_PUSH} tx_state_t;

  rx_state_t   rx_state;
  tx_state_t   tx_state;
  logic [11:0] rx_cnt;
  logic [11:0] tx_idx, tx_total;
  logic [31:0] tx_word;

  logic [BA_W-1:0] rx_baddr, tx_baddr;
  logic            rx_write, tx_read, tx_push;
  logic [1:0]      tx_lane;

  assign rx_baddr = BA_W'(RX_BASE) + BA_W'(rx_cnt);
  assign tx_baddr = BA_W'(TX_BASE) + BA_W'(tx_idx);
  assign tx_lane  = tx_baddr[1:0];

  always_comb begin
    tx_read  = (tx_state == T_READ);
    rx_write = (rx_state == R_FILL) && !rd_empty && !tx_read;
    rd_en    = rx_write;

    a_en   = tx_read || rx_write;
    a_we   = '0;
    a_addr = tx_baddr[BA_W-1:2];
    a_din  = {4{rd_data.data}};
    if (rx_write) begin
      a_addr = rx_baddr[BA_W-1:2];
      if (rx_cnt < 12'(BUF_BYTES)) a_we = 4'b1000 >> rx_baddr[1:0];
    end

    tx_push        = (tx_state == T_PUSH) && !wr_full;
    wr_en          = tx_push;
    wr_data.data   = tx_word[31 - 8*tx_lane -: 8];
    wr_data.last   = (tx_idx == tx_total - 12'd1);
    wr_commit      = tx_push && wr_data.last;
    wr_drop        = 1'b0;
  end

  assign tx_busy = (tx_state != T_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rx_state <= R_FILL;
      rx_cnt   <= '0;
      rx_ready <= 1'b0;
      rx_len   <= '0;
    end else begin
      unique case (rx_state)
        R_FILL: if (rx_write) begin
          rx_cnt <= rx_cnt + 12'd1;
          if (rd_data.last) begin
            rx_len   <= (rx_cnt < 12'(BUF_BYTES)) ? rx_cnt + 12'd1 : 12'(BUF_BYTES);
            rx_ready <= 1'b1;
            rx_state <= R_WAIT;
          end
        end
        R_WAIT: if (rx_ack) begin
          rx_ready <= 1'b0;
          rx_cnt   <= '0;
          rx_state <= R_FILL;
        end
        default: rx_state <= R_FILL;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      tx_state <= T_IDLE;
      tx_idx   <= '0;
      tx_total <= '0;
      tx_word  <= '0;
      tx_ack   <= 1'b0;
    end else begin
      tx_ack <= 1'b0;
      unique case (tx_state)
        T_IDLE: if (tx_ready) begin
          tx_idx   <= '0;
          tx_total <= (tx_len > 12'(BUF_BYTES)) ? 12'(BUF_BYTES) : tx_len;
          if (tx_len == '0) tx_ack <= 1'b1;
          else tx_state <= T_READ;
        end
        T_READ:  tx_state <= T_LATCH;
        T_LATCH: begin
          tx_word  <= a_dout;
          tx_state <= T_PUSH;
        end
        T_PUSH: if (tx_push) begin
          tx_idx <= tx_idx + 12'd1;
          if (wr_data.last) begin
            tx_ack   <= 1'b1;
            tx_state <= T_IDLE;
          end else if (tx_lane == 2'd3) begin
            tx_state <= T_READ;
          end
        end
        default: tx_state <= T_IDLE;
      endcase
    end
  end

endmodule
