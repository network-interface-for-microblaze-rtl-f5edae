// sfp_eth_readout: read-out state machine ("R") toward the Ethernet MAC.
//
// Two frame sources share the Ethernet transmit path: the SFP-ETH FIFO
// (main data line, from the optical side) and the UB-ETH FIFO (frames sent
// by the processor). Between frames the state machine polls the SFP-ETH
// FIFO first and takes a processor frame only when the SFP-ETH FIFO holds
// no committed frame, so the main data line always has priority. A long
// unbroken stream from the optical side therefore holds processor frames
// back; with FAIR = 1 the state machine instead alternates between the two
// sources whenever both are waiting (1:1 aggregation). Strict priority is
// the default, as in the source design; the FAIR option is offered there
// only as a remedy.
//
// Ethernet side: MAC client transmit interface. tx_dv rises with the first
// byte, which is held until tx_ack; from the cycle after tx_ack one byte per
// cycle follows, and tx_dv falls after the byte flagged last. Frames are
// sent whole, so the source FIFO never underruns.
// ub_deferred counts frame starts at which a processor frame was waiting
// but the SFP-ETH FIFO was served. Reset is synchronous, active low.
module sfp_eth_readout
  import eth_pkg::*;
#(
  parameter bit          FAIR  = 1'b0,
  parameter int unsigned CNT_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  // SFP-ETH FIFO read port (show-ahead)
  output logic             sfp_rd_en,
  input  fifo_word_t       sfp_rd_data,
  input  logic             sfp_rd_empty,
  // UB-ETH FIFO read port (show-ahead)
  output logic             ub_rd_en,
  input  fifo_word_t       ub_rd_data,
  input  logic             ub_rd_empty,
  // Ethernet MAC client transmit interface
  output logic             tx_dv,
  output logic [7:0]       tx_data,
  input  logic             tx_ack,
  // statistics
  output logic [CNT_W-1:0] frames_from_sfp,
  output logic [CNT_W-1:0] frames_from_ub,
  output logic [CNT_W-1:0] ub_deferred
);

  typedef enum logic [1:0] {S_IDLE, S_FIRST, S_STREAM} state_t;
  typedef enum logic {SRC_SFP, SRC_UB} src_t;

  state_t     state;
  src_t       src, last_src;
  fifo_word_t cur;
  logic       cur_empty, consume;

  always_comb begin
    cur       = (src == SRC_UB) ? ub_rd_data  : sfp_rd_data;
    cur_empty = (src == SRC_UB) ? ub_rd_empty : sfp_rd_empty;
    tx_dv     = (state != S_IDLE);
    tx_data   = cur.data;
    consume   = (state == S_STREAM) || (state == S_FIRST && tx_ack);
    sfp_rd_en = consume && (src == SRC_SFP);
    ub_rd_en  = consume && (src == SRC_UB);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state           <= S_IDLE;
      src             <= SRC_SFP;
      last_src        <= SRC_UB;
      frames_from_sfp <= '0;
      frames_from_ub  <= '0;
      ub_deferred     <= '0;
    end else begin
      unique case (state)
        S_IDLE: begin
          if (!sfp_rd_empty && !ub_rd_empty && FAIR && last_src == SRC_SFP) begin
            src   <= SRC_UB;
            state <= S_FIRST;
          end else if (!sfp_rd_empty) begin
            src   <= SRC_SFP;
            state <= S_FIRST;
            if (!ub_rd_empty) ub_deferred <= ub_deferred + 1'b1;
          end else if (!ub_rd_empty) begin
            src   <= SRC_UB;
            state <= S_FIRST;
          end
        end
        S_FIRST, S_STREAM: begin
          if (consume) begin
            state <= S_STREAM;
            if (cur.last) begin
              state    <= S_IDLE;
              last_src <= src;
              if (src == SRC_UB) frames_from_ub <= frames_from_ub + 1'b1;
              else frames_from_sfp <= frames_from_sfp + 1'b1;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_no_underrun: assert property (@(posedge clk) disable iff (!rst_n)
                                  (state != S_IDLE) |-> !cur_empty);

endmodule
