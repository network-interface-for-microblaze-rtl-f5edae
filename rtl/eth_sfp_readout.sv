// eth_sfp_readout: read-out state machine ("R") of the ETH-SFP FIFO.
//
// Every frame received on the Ethernet side passes through the ETH-SFP
// FIFO. This state machine reads the first six bytes of a committed frame
// (the destination MAC address) into a small header buffer and lets the MAC
// compare unit check them against the MAC address register. A frame whose
// destination equals the register goes to the ETH-UB FIFO, toward the
// processor; every other frame goes to the SFP-side MAC. The header bytes
// are replayed from the buffer before the rest of the frame is taken from
// the FIFO, so the frame leaves unchanged. Matching frames are not also
// sent to the SFP side, and frames shorter than six bytes never match;
// both are this design's own reading.
//
// SFP side: MAC client transmit interface. tx_dv rises with the first byte
// and the byte is held until tx_ack; from the cycle after tx_ack one byte
// is sent per cycle and tx_dv falls after the last byte. Because the FIFO
// only shows committed (complete) frames, the stream cannot underrun.
// ETH-UB side: frame FIFO write port; if the ETH-UB FIFO fills during a
// frame, that frame is dropped and the rest of it is drained from the
// ETH-SFP FIFO.
//
// Timing: the header takes one cycle per byte plus one decision cycle;
// afterwards one byte per cycle. Reset is synchronous, active low.
module eth_sfp_readout
  import eth_pkg::*;
#(
  parameter int unsigned CNT_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  // ETH-SFP FIFO read port (show-ahead)
  output logic             rd_en,
  input  fifo_word_t       rd_data,
  input  logic             rd_empty,
  // MAC address register
  input  logic [47:0]      mac_addr,
  // SFP MAC client transmit interface
  output logic             tx_dv,
  output logic [7:0]       tx_data,
  input  logic             tx_ack,
  // ETH-UB FIFO write port
  output logic             ub_wr_en,
  output fifo_word_t       ub_wr_data,
  output logic             ub_commit,
  output logic             ub_drop,
  input  logic             ub_full,
  // statistics
  output logic [CNT_W-1:0] frames_to_sfp,
  output logic [CNT_W-1:0] frames_to_ub,
  output logic [CNT_W-1:0] frames_ub_dropped
);

  typedef enum logic [2:0] {
    S_IDLE, S_HDR, S_DECIDE, S_TX_FIRST, S_TX_STREAM, S_UB_COPY
  } state_t;

  state_t state;

  logic [MAC_ADDR_BYTES-1:0][7:0] hdr;
  logic [2:0]  hdr_cnt;     // bytes in the header buffer
  logic        hdr_last;    // the frame ended inside the header
  logic [2:0]  rep_idx;     // next header byte to replay
  logic        ub_ovf;
  logic        match;

  mac_compare u_cmp (
    .hdr       (hdr),
    .hdr_count (hdr_cnt),
    .mac_addr  (mac_addr),
    .match     (match)
  );

  // Byte source: header buffer first, then the FIFO.
  logic       in_hdr, src_valid, src_last, consume;
  logic [7:0] src_data;

  always_comb begin
    in_hdr    = rep_idx < hdr_cnt;
    src_valid = in_hdr || !rd_empty;
    src_data  = in_hdr ? hdr[rep_idx] : rd_data.data;
    src_last  = in_hdr ? (hdr_last && (rep_idx == hdr_cnt - 3'd1)) : rd_data.last;
  end

  always_comb begin
    consume    = 1'b0;
    tx_dv      = 1'b0;
    tx_data    = src_data;
    ub_wr_en   = 1'b0;
    ub_wr_data = '{last: src_last, data: src_data};
    ub_commit  = 1'b0;
    ub_drop    = 1'b0;
    unique case (state)
      S_TX_FIRST: begin
        tx_dv   = 1'b1;
        consume = tx_ack;
      end
      S_TX_STREAM: begin
        tx_dv   = 1'b1;
        consume = 1'b1;
      end
      S_UB_COPY: begin
        consume  = src_valid;
        ub_wr_en = src_valid && !ub_ovf;
        if (src_valid && src_last) begin
          if (ub_ovf || ub_full) ub_drop = 1'b1;
          else ub_commit = 1'b1;
        end
      end
      default: ;
    endcase
  end

  assign rd_en = (state == S_HDR) ? (!rd_empty)
                                  : (consume && !in_hdr);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state             <= S_IDLE;
      hdr               <= '0;
      hdr_cnt           <= '0;
      hdr_last          <= 1'b0;
      rep_idx           <= '0;
      ub_ovf            <= 1'b0;
      frames_to_sfp     <= '0;
      frames_to_ub      <= '0;
      frames_ub_dropped <= '0;
    end else begin
      if (consume && in_hdr) rep_idx <= rep_idx + 3'd1;
      unique case (state)
        S_IDLE: begin
          hdr_cnt  <= '0;
          hdr_last <= 1'b0;
          rep_idx  <= '0;
          ub_ovf   <= 1'b0;
          if (!rd_empty) state <= S_HDR;
        end
        S_HDR: begin
          if (!rd_empty) begin
            hdr[hdr_cnt] <= rd_data.data;
            hdr_cnt      <= hdr_cnt + 3'd1;
            if (rd_data.last) hdr_last <= 1'b1;
            if (rd_data.last || hdr_cnt == 3'(MAC_ADDR_BYTES - 1)) state <= S_DECIDE;
          end
        end
        S_DECIDE: state <= match ? S_UB_COPY : S_TX_FIRST;
        S_TX_FIRST: begin
          if (tx_ack) begin
            if (src_last) begin
              state         <= S_IDLE;
              frames_to_sfp <= frames_to_sfp + 1'b1;
            end else begin
              state <= S_TX_STREAM;
            end
          end
        end
        S_TX_STREAM: begin
          if (src_last) begin
            state         <= S_IDLE;
            frames_to_sfp <= frames_to_sfp + 1'b1;
          end
        end
        S_UB_COPY: begin
          if (src_valid && ub_full) ub_ovf <= 1'b1;
          if (src_valid && src_last) begin
            state <= S_IDLE;
            if (ub_drop) frames_ub_dropped <= frames_ub_dropped + 1'b1;
            else frames_to_ub <= frames_to_ub + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A committed frame is complete, so streaming to the MAC never starves.
  a_no_underrun: assert property (@(posedge clk) disable iff (!rst_n)
                                  (state == S_TX_STREAM) |-> src_valid);

endmodule
