// fso_bridge_top: Ethernet-to-optical bridge with a processor port.
//
// The bridge passes full-duplex gigabit Ethernet frames between a copper
// Ethernet MAC (client interface on the eth_* ports) and an optical link
// (8b/10b code groups on sfp_txd/sfp_rxd), and lets a soft processor send
// and receive its own frames over the same Ethernet port without a second
// MAC. The parts:
//   flow_controller  four frame FIFOs between the three clock regions; it
//                    drops bad frames, sends frames addressed to the
//                    processor's MAC address to the processor, and merges
//                    processor frames into the Ethernet transmit path when
//                    the optical side is idle;
//   sfp_mac          simplified MAC of the optical side (framing, 8b/10b,
//                    comma alignment);
//   bram_controller  copies frames between the flow controller and the
//                    processor's 2 KB receive and transmit buffers;
//   dp_bram          the dual-port RAM holding those buffers; its port B is
//                    the processor's memory port (ub_b_*).
// The processor side (ub_clk) sees: port B of the RAM, the receive
// interrupt rx_ready with rx_len and rx_ack, the transmit handshake
// tx_ready/tx_len/tx_ack, and the MAC address register.
// The Ethernet MAC, the PHYs, the serializer and the processor itself are
// outside this module.
//
// Clocks: eth_clk (Ethernet MAC client side), sfp_clk (optical side),
// ub_clk (processor). Each has a synchronous, active-low reset.
// Timing: a frame is stored completely in a FIFO before it is forwarded
// (store and forward), so the bridge delay is one frame time plus a few
// tens of clocks; the sustained rate is one byte per clock each way.
//
// The split into these blocks, the four FIFOs, routing by destination MAC
// address, the optical-first priority toward Ethernet and the BRAM
// handshakes follow the source design. Which clock each FIFO side runs on,
// the FIFO depths, the port widths and the optical framing are this
// design's own choices.
module fso_bridge_top
  import eth_pkg::*;
#(
  parameter int unsigned ETH_SFP_AW = 12,
  parameter int unsigned SFP_ETH_AW = 12,
  parameter int unsigned ETH_UB_AW  = 11,
  parameter int unsigned UB_ETH_AW  = 11,
  parameter int unsigned BRAM_AW    = 10,
  parameter bit          FAIR       = 1'b0,
  parameter int unsigned IFG_MIN    = 12,
  parameter logic [47:0] MAC_RESET  = 48'h02_00_00_00_00_01
) (
  input  logic              eth_clk,
  input  logic              eth_rst_n,
  input  logic              sfp_clk,
  input  logic              sfp_rst_n,
  input  logic              ub_clk,
  input  logic              ub_rst_n,
  // Ethernet MAC client interface
  input  logic              eth_rx_dv,
  input  logic [7:0]        eth_rx_data,
  input  logic              eth_rx_good,
  input  logic              eth_rx_bad,
  output logic              eth_tx_dv,
  output logic [7:0]        eth_tx_data,
  input  logic              eth_tx_ack,
  // optical side serializer / deserializer
  output logic [9:0]        sfp_txd,
  input  logic [9:0]        sfp_rxd,
  output logic              sfp_aligned,
  // processor: RAM port B
  input  logic              ub_b_en,
  input  logic [3:0]        ub_b_we,
  input  logic [BRAM_AW-1:0] ub_b_addr,
  input  logic [31:0]       ub_b_din,
  output logic [31:0]       ub_b_dout,
  // processor: frame handshakes
  output logic              ub_rx_ready,
  output logic [11:0]       ub_rx_len,
  input  logic              ub_rx_ack,
  input  logic              ub_tx_ready,
  input  logic [11:0]       ub_tx_len,
  output logic              ub_tx_ack,
  output logic              ub_tx_busy,
  // processor: MAC address register
  input  logic              ub_mac_wr_en,
  input  logic [47:0]       ub_mac_wr_data,
  output logic [47:0]       ub_mac_addr,
  // counters
  output flow_stats_t       stats,
  output logic [15:0]       sfp_frames_sent,
  output logic [15:0]       sfp_char_errors,
  output logic [7:0]        sfp_realign_cnt
);

  logic       sfp_tx_dv, sfp_tx_ack, sfp_rx_dv, sfp_rx_good, sfp_rx_bad;
  logic [7:0] sfp_tx_data, sfp_rx_data;

  logic       ethub_rd_en, ethub_empty, ubeth_wr_en, ubeth_commit, ubeth_drop, ubeth_full;
  fifo_word_t ethub_rd_data, ubeth_wr_data;

  flow_controller #(
    .ETH_SFP_AW (ETH_SFP_AW), .SFP_ETH_AW (SFP_ETH_AW),
    .ETH_UB_AW (ETH_UB_AW), .UB_ETH_AW (UB_ETH_AW),
    .FAIR (FAIR), .MAC_RESET (MAC_RESET)
  ) u_flow (
    .eth_clk (eth_clk), .eth_rst_n (eth_rst_n),
    .sfp_clk (sfp_clk), .sfp_rst_n (sfp_rst_n),
    .ub_clk (ub_clk), .ub_rst_n (ub_rst_n),
    .eth_rx_dv (eth_rx_dv), .eth_rx_data (eth_rx_data),
    .eth_rx_good (eth_rx_good), .eth_rx_bad (eth_rx_bad),
    .eth_tx_dv (eth_tx_dv), .eth_tx_data (eth_tx_data), .eth_tx_ack (eth_tx_ack),
    .sfp_rx_dv (sfp_rx_dv), .sfp_rx_data (sfp_rx_data),
    .sfp_rx_good (sfp_rx_good), .sfp_rx_bad (sfp_rx_bad),
    .sfp_tx_dv (sfp_tx_dv), .sfp_tx_data (sfp_tx_data), .sfp_tx_ack (sfp_tx_ack),
    .ethub_rd_en (ethub_rd_en), .ethub_rd_data (ethub_rd_data), .ethub_rd_empty (ethub_empty),
    .ubeth_wr_en (ubeth_wr_en), .ubeth_wr_data (ubeth_wr_data),
    .ubeth_commit (ubeth_commit), .ubeth_drop (ubeth_drop), .ubeth_full (ubeth_full),
    .mac_wr_en (ub_mac_wr_en), .mac_wr_data (ub_mac_wr_data), .mac_addr (ub_mac_addr),
    .stats (stats)
  );

  sfp_mac #(.IFG_MIN (IFG_MIN)) u_sfp_mac (
    .clk (sfp_clk), .rst_n (sfp_rst_n),
    .tx_dv (sfp_tx_dv), .tx_data (sfp_tx_data), .tx_ack (sfp_tx_ack),
    .rx_dv (sfp_rx_dv), .rx_data (sfp_rx_data),
    .rx_good (sfp_rx_good), .rx_bad (sfp_rx_bad),
    .txd (sfp_txd), .rxd (sfp_rxd),
    .aligned (sfp_aligned), .realign_cnt (sfp_realign_cnt),
    .frames_sent (sfp_frames_sent), .char_errors (sfp_char_errors)
  );

  logic              a_en;
  logic [3:0]        a_we;
  logic [BRAM_AW-1:0] a_addr;
  logic [31:0]       a_din, a_dout;

  bram_controller #(
    .ADDR_W (BRAM_AW),
    .BUF_BYTES ((4 << BRAM_AW) / 2),
    .RX_BASE (0),
    .TX_BASE ((4 << BRAM_AW) / 2)
  ) u_bram_ctrl (
    .clk (ub_clk), .rst_n (ub_rst_n),
    .rd_en (ethub_rd_en), .rd_data (ethub_rd_data), .rd_empty (ethub_empty),
    .wr_en (ubeth_wr_en), .wr_data (ubeth_wr_data),
    .wr_commit (ubeth_commit), .wr_drop (ubeth_drop), .wr_full (ubeth_full),
    .a_en (a_en), .a_we (a_we), .a_addr (a_addr), .a_din (a_din), .a_dout (a_dout),
    .rx_ready (ub_rx_ready), .rx_len (ub_rx_len), .rx_ack (ub_rx_ack),
    .tx_ready (ub_tx_ready), .tx_len (ub_tx_len), .tx_ack (ub_tx_ack),
    .tx_busy (ub_tx_busy)
  );

  dp_bram #(.ADDR_W (BRAM_AW)) u_bram (
    .a_clk (ub_clk), .a_en (a_en), .a_we (a_we), .a_addr (a_addr),
    .a_din (a_din), .a_dout (a_dout),
    .b_clk (ub_clk), .b_en (ub_b_en), .b_we (ub_b_we), .b_addr (ub_b_addr),
    .b_din (ub_b_din), .b_dout (ub_b_dout)
  );

endmodule
