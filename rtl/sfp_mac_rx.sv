// sfp_mac_rx: receive half of the simplified SFP-side MAC.
//
// It takes decoded characters from dec_8b10b and recovers frames for a MAC
// client receive interface. A frame starts with /S/ (K27.7); preamble bytes
// 0x55 are skipped up to the start-of-frame delimiter 0xD5, after which
// every data character is passed on with rx_dv. /T/ (K29.7) ends the frame:
// one cycle later rx_good pulses, or rx_bad when the frame held a code or
// disparity error or an unexpected control character. A comma (K28.5)
// inside a frame, or loss of alignment, also ends it with rx_bad. Anything
// unexpected before the delimiter abandons the frame without a report,
// since no byte has been passed on yet. The framing is this design's
// choice, matching sfp_mac_tx.
//
// Timing: rx_data follows the decoded character by one clock; rx_good or
// rx_bad comes in the cycle after the last rx_dv (the ending character
// takes that slot). Reset is synchronous, active low.
module sfp_mac_rx
  import eth_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // from the decoder
  input  logic       dec_valid,
  input  logic [7:0] dec_data,
  input  logic       dec_k,
  input  logic       dec_code_err,
  input  logic       dec_disp_err,
  input  logic       aligned,
  // client receive interface
  output logic       rx_dv,
  output logic [7:0] rx_data,
  output logic       rx_good,
  output logic       rx_bad,
  // statistics
  output logic [15:0] char_errors
);

  typedef enum logic [1:0] {R_IDLE, R_PRE, R_DATA} state_t;

  state_t state;
  logic   err;
  logic   bad_char;

  assign bad_char = dec_code_err || dec_disp_err;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state       <= R_IDLE;
      err         <= 1'b0;
      rx_dv       <= 1'b0;
      rx_data     <= '0;
      rx_good     <= 1'b0;
      rx_bad      <= 1'b0;
      char_errors <= '0;
    end else begin
      rx_dv   <= 1'b0;
      rx_good <= 1'b0;
      rx_bad  <= 1'b0;
      if (dec_valid && bad_char) char_errors <= char_errors + 16'd1;
      if (!aligned) begin
        if (state == R_DATA) rx_bad <= 1'b1;
        state <= R_IDLE;
      end else if (dec_valid) begin
        unique case (state)
          R_IDLE: begin
            err <= 1'b0;
            if (dec_k && dec_data == K27_7 && !bad_char) state <= R_PRE;
          end
          R_PRE: begin
            if (bad_char || dec_k) state <= R_IDLE;
            else if (dec_data == SFD_BYTE) state <= R_DATA;
            else if (dec_data != PREAMBLE_BYTE) state <= R_IDLE;
          end
          R_DATA: begin
            if (dec_k && dec_data == K29_7 && !bad_char) begin
              rx_good <= !err;
              rx_bad  <= err;
              state   <= R_IDLE;
            end else if (dec_k && dec_data == K28_5) begin
              rx_bad <= 1'b1;
              state  <= R_IDLE;
            end else if (bad_char || dec_k) begin
              err <= 1'b1;
            end else begin
              rx_dv   <= 1'b1;
              rx_data <= dec_data;
            end
          end
          default: state <= R_IDLE;
        endcase
      end
    end
  end

endmodule
