// sfp_mac_tx: transmit half of the simplified SFP-side MAC.
//
// It turns frames from a MAC client transmit interface into a stream of
// 8b/10b characters for enc_8b10b, one per clock. Between frames it sends
// idle ordered sets, K28.5 followed by D16.2 (/I2/), or by D5.6 (/I1/) when
// the running disparity has to be brought back to negative. A frame is
// sent as /S/ (K27.7, in place of the first preamble byte), six preamble
// bytes 0x55, the start-of-frame delimiter 0xD5, the client's bytes, then
// /T/ (K29.7) and /R/ (K23.7), plus a second /R/ when needed so that the
// next ordered set starts at an even position. A new frame starts only at
// an even position and after at least IFG_MIN characters counted from /T/.
// No frame check sequence is added: frames cross the optical link as the
// Ethernet MAC delivered them. The framing follows 1000BASE-X practice and
// is this design's choice; the source design asks only for frame
// synchronization and 8b/10b conversion.
//
// Client timing: tx_dv rises with the first byte; tx_ack is high in the
// cycle that byte is sent as a character; the client then presents one byte
// per cycle and drops tx_dv after the last one. Reset is synchronous,
// active low.
module sfp_mac_tx
  import eth_pkg::*;
#(
  parameter int unsigned IFG_MIN = 12
) (
  input  logic       clk,
  input  logic       rst_n,
  // client transmit interface
  input  logic       tx_dv,
  input  logic [7:0] tx_data,
  output logic       tx_ack,
  // toward the 8b/10b encoder
  output logic [7:0] enc_data,
  output logic       enc_k,
  input  logic       enc_rd,
  // statistics
  output logic [15:0] frames_sent
);

  typedef enum logic [2:0] {
    T_IDLE, T_PRE, T_SFD, T_DATA, T_R1, T_R2
  } state_t;

  state_t     state;
  logic       odd;        // current character is at an odd position
  logic [2:0] pre_cnt;
  logic       first;      // next data character is the frame's first byte
  logic [4:0] ifg_cnt;
  logic       start;

  assign start = (state == T_IDLE) && tx_dv && !odd && (ifg_cnt >= 5'(IFG_MIN));

  always_comb begin
    enc_data = K28_5;
    enc_k    = 1'b1;
    tx_ack   = 1'b0;
    unique case (state)
      T_IDLE: begin
        if (start) begin
          enc_data = K27_7;
        end else if (odd) begin
          enc_k    = 1'b0;
          enc_data = enc_rd ? D16_2 : D5_6;
        end
      end
      T_PRE: begin
        enc_k    = 1'b0;
        enc_data = PREAMBLE_BYTE;
      end
      T_SFD: begin
        enc_k    = 1'b0;
        enc_data = SFD_BYTE;
      end
      T_DATA: begin
        if (tx_dv) begin
          enc_k    = 1'b0;
          enc_data = tx_data;
          tx_ack   = first;
        end else begin
          enc_data = K29_7;
        end
      end
      T_R1, T_R2: enc_data = K23_7;
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state       <= T_IDLE;
      odd         <= 1'b0;
      pre_cnt     <= '0;
      first       <= 1'b0;
      ifg_cnt     <= 5'(IFG_MIN);
      frames_sent <= '0;
    end else begin
      odd <= ~odd;
      if (ifg_cnt != 5'h1F) ifg_cnt <= ifg_cnt + 5'd1;
      unique case (state)
        T_IDLE: if (start) begin
          state   <= T_PRE;
          pre_cnt <= '0;
        end
        T_PRE: begin
          pre_cnt <= pre_cnt + 3'd1;
          if (pre_cnt == 3'd5) state <= T_SFD;
        end
        T_SFD: begin
          state <= T_DATA;
          first <= 1'b1;
        end
        T_DATA: begin
          first <= 1'b0;
          if (!tx_dv) begin
            state       <= T_R1;
            ifg_cnt     <= 5'd1;
            frames_sent <= frames_sent + 16'd1;
          end
        end
        // /T/ was at the position before; /T/R/ ends on an odd position
        // when /T/ was even, otherwise one more /R/ is needed.
        T_R1: state <= odd ? T_IDLE : T_R2;
        T_R2: state <= T_IDLE;
        default: state <= T_IDLE;
      endcase
    end
  end

endmodule
