// sfp_mac: simplified MAC of the optical (SFP) side.
//
// The optical side needs no address handling, flow control or statistics of
// a full Ethernet MAC; it only has to frame the bytes, code them for the
// serial line and find the frames again on the far side. Transmit: the
// client transmit interface feeds sfp_mac_tx, which adds /S/, preamble,
// delimiter, /T/R/ and idles, and enc_8b10b turns each character into a
// 10-bit code group on txd (one per clock, bit 9 first on the line).
// Receive: raw 10-bit words from the deserializer on rxd are aligned to
// code-group boundaries by comma_align, decoded by dec_8b10b and turned into
// client receive signals (rx_dv, rx_data, rx_good, rx_bad) by sfp_mac_rx.
// Both directions run on clk; the serializer and deserializer (and any
// clock correction between the recovered clock and clk) are outside.
//
// Latency: a client byte appears on txd two clocks after it is taken; a
// code group on rxd reaches rx_data four clocks later. Reset is
// synchronous, active low.
module sfp_mac #(
  parameter int unsigned IFG_MIN = 12
) (
  input  logic        clk,
  input  logic        rst_n,
  // client transmit interface
  input  logic        tx_dv,
  input  logic [7:0]  tx_data,
  output logic        tx_ack,
  // client receive interface
  output logic        rx_dv,
  output logic [7:0]  rx_data,
  output logic        rx_good,
  output logic        rx_bad,
  // serializer / deserializer
  output logic [9:0]  txd,
  input  logic [9:0]  rxd,
  // status
  output logic        aligned,
  output logic [7:0]  realign_cnt,
  output logic [15:0] frames_sent,
  output logic [15:0] char_errors
);

  logic [7:0] enc_data;
  logic       enc_k, enc_rd;

  sfp_mac_tx #(.IFG_MIN (IFG_MIN)) u_tx (
    .clk (clk), .rst_n (rst_n),
    .tx_dv (tx_dv), .tx_data (tx_data), .tx_ack (tx_ack),
    .enc_data (enc_data), .enc_k (enc_k), .enc_rd (enc_rd),
    .frames_sent (frames_sent)
  );

  enc_8b10b u_enc (
    .clk (clk), .rst_n (rst_n), .en (1'b1),
    .din (enc_data), .k (enc_k), .dout (txd), .rd (enc_rd)
  );

  logic [9:0] al_word;
  logic [7:0] dec_data;
  logic       dec_k, dec_cerr, dec_derr, dec_valid;

  comma_align u_align (
    .clk (clk), .rst_n (rst_n), .din (rxd),
    .dout (al_word), .aligned (aligned), .realign_cnt (realign_cnt)
  );

  dec_8b10b u_dec (
    .clk (clk), .rst_n (rst_n), .en (aligned), .din (al_word),
    .dout (dec_data), .k (dec_k), .code_err (dec_cerr),
    .disp_err (dec_derr), .valid (dec_valid)
  );

  sfp_mac_rx u_rx (
    .clk (clk), .rst_n (rst_n),
    .dec_valid (dec_valid), .dec_data (dec_data), .dec_k (dec_k),
    .dec_code_err (dec_cerr), .dec_disp_err (dec_derr), .aligned (aligned),
    .rx_dv (rx_dv), .rx_data (rx_data), .rx_good (rx_good), .rx_bad (rx_bad),
    .char_errors (char_errors)
  );

endmodule
