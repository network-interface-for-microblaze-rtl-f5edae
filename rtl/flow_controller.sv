// flow_controller: frame buffer, frame router and frame filter of the bridge.
//
// The flow controller sits between the Ethernet MAC, the SFP-side MAC and
// the processor's frame buffer, and is the only place where the three clock
// regions meet. It holds four frame FIFOs:
//   ETH-SFP  written by the Ethernet write-in FSM (eth_clk), read by the
//            ETH-SFP read-out FSM (sfp_clk), which routes each frame either
//            to the SFP MAC or, when its destination MAC address equals the
//            MAC address register, to the ETH-UB FIFO;
//   ETH-UB   read by the processor-side frame buffer controller (ub_clk);
//   SFP-ETH  written by the SFP write-in FSM (sfp_clk), read by the
//            SFP-ETH read-out FSM (eth_clk);
//   UB-ETH   written by the frame buffer controller (ub_clk), read by the
//            SFP-ETH read-out FSM, which sends processor frames only when
//            the SFP-ETH FIFO is empty (FAIR = 1 alternates instead).
// The write-in FSMs drop frames that the MAC marks bad. The MAC address
// register is written from the processor side (ub_clk).
//
// Interfaces: MAC client receive (rx_dv, rx_data, rx_good, rx_bad) and
// transmit (tx_dv, tx_data, tx_ack) on both line sides; a frame FIFO read
// port and write port on the processor side; frame counters in stats
// (each counter in the clock domain of the FSM that keeps it).
// The FIFO sizes are this design's choice: the line FIFOs hold two
// largest frames, the processor FIFOs one frame buffer (2 KB).
// Each clock domain has its own synchronous, active-low reset.
module flow_controller
  import eth_pkg::*;
#(
  parameter int unsigned ETH_SFP_AW = 12,
  parameter int unsigned SFP_ETH_AW = 12,
  parameter int unsigned ETH_UB_AW  = 11,
  parameter int unsigned UB_ETH_AW  = 11,
  parameter bit          FAIR       = 1'b0,
  parameter logic [47:0] MAC_RESET  = 48'h02_00_00_00_00_01
) (
  input  logic        eth_clk,
  input  logic        eth_rst_n,
  input  logic        sfp_clk,
  input  logic        sfp_rst_n,
  input  logic        ub_clk,
  input  logic        ub_rst_n,
  // Ethernet MAC client interface
  input  logic        eth_rx_dv,
  input  logic [7:0]  eth_rx_data,
  input  logic        eth_rx_good,
  input  logic        eth_rx_bad,
  output logic        eth_tx_dv,
  output logic [7:0]  eth_tx_data,
  input  logic        eth_tx_ack,
  // SFP MAC client interface
  input  logic        sfp_rx_dv,
  input  logic [7:0]  sfp_rx_data,
  input  logic        sfp_rx_good,
  input  logic        sfp_rx_bad,
  output logic        sfp_tx_dv,
  output logic [7:0]  sfp_tx_data,
  input  logic        sfp_tx_ack,
  // processor side (ub_clk): ETH-UB FIFO read port
  input  logic        ethub_rd_en,
  output fifo_word_t  ethub_rd_data,
  output logic        ethub_rd_empty,
  // processor side (ub_clk): UB-ETH FIFO write port
  input  logic        ubeth_wr_en,
  input  fifo_word_t  ubeth_wr_data,
  input  logic        ubeth_commit,
  input  logic        ubeth_drop,
  output logic        ubeth_full,
  // processor side (ub_clk): MAC address register
  input  logic        mac_wr_en,
  input  logic [47:0] mac_wr_data,
  output logic [47:0] mac_addr,
  // frame counters
  output flow_stats_t stats
);

  // ---------------- Ethernet -> SFP / processor ----------------
  logic       es_wr_en, es_commit, es_drop, es_full, es_rd_en, es_empty;
  fifo_word_t es_wr_data, es_rd_data;

  frame_writer u_eth_w (
    .clk (eth_clk), .rst_n (eth_rst_n),
    .rx_dv (eth_rx_dv), .rx_data (eth_rx_data),
    .rx_good (eth_rx_good), .rx_bad (eth_rx_bad),
    .fifo_wr_en (es_wr_en), .fifo_wr_data (es_wr_data),
    .fifo_commit (es_commit), .fifo_drop (es_drop), .fifo_full (es_full),
    .frames_ok (stats.eth_rx_ok), .frames_dropped (stats.eth_rx_dropped)
  );

  async_frame_fifo #(.DATA_W (FIFO_WORD_W), .ADDR_W (ETH_SFP_AW)) u_eth_sfp_fifo (
    .wr_clk (eth_clk), .wr_rst_n (eth_rst_n),
    .wr_en (es_wr_en), .wr_data (es_wr_data),
    .wr_commit (es_commit), .wr_drop (es_drop), .wr_full (es_full),
    .rd_clk (sfp_clk), .rd_rst_n (sfp_rst_n),
    .rd_en (es_rd_en), .rd_data (es_rd_data), .rd_empty (es_empty)
  );

  logic [47:0] mac_addr_sfp;

  mac_addr_reg #(.RESET_ADDR (MAC_RESET)) u_mac_reg (
    .src_clk (ub_clk), .src_rst_n (ub_rst_n),
    .wr_en (mac_wr_en), .wr_data (mac_wr_data), .mac_addr_src (mac_addr),
    .dst_clk (sfp_clk), .dst_rst_n (sfp_rst_n), .mac_addr_dst (mac_addr_sfp)
  );

  logic       eu_wr_en, eu_commit, eu_drop, eu_full;
  fifo_word_t eu_wr_data;

  eth_sfp_readout u_eth_sfp_r (
    .clk (sfp_clk), .rst_n (sfp_rst_n),
    .rd_en (es_rd_en), .rd_data (es_rd_data), .rd_empty (es_empty),
    .mac_addr (mac_addr_sfp),
    .tx_dv (sfp_tx_dv), .tx_data (sfp_tx_data), .tx_ack (sfp_tx_ack),
    .ub_wr_en (eu_wr_en), .ub_wr_data (eu_wr_data),
    .ub_commit (eu_commit), .ub_drop (eu_drop), .ub_full (eu_full),
    .frames_to_sfp (stats.to_sfp), .frames_to_ub (stats.to_ub),
    .frames_ub_dropped (stats.ub_dropped)
  );

  async_frame_fifo #(.DATA_W (FIFO_WORD_W), .ADDR_W (ETH_UB_AW)) u_eth_ub_fifo (
    .wr_clk (sfp_clk), .wr_rst_n (sfp_rst_n),
    .wr_en (eu_wr_en), .wr_data (eu_wr_data),
    .wr_commit (eu_commit), .wr_drop (eu_drop), .wr_full (eu_full),
    .rd_clk (ub_clk), .rd_rst_n (ub_rst_n),
    .rd_en (ethub_rd_en), .rd_data (ethub_rd_data), .rd_empty (ethub_rd_empty)
  );

  // ---------------- SFP / processor -> Ethernet ----------------
  logic       se_wr_en, se_commit, se_drop, se_full, se_rd_en, se_empty;
  fifo_word_t se_wr_data, se_rd_data;
  logic       ue_rd_en, ue_empty;
  fifo_word_t ue_rd_data;

  frame_writer u_sfp_w (
    .clk (sfp_clk), .rst_n (sfp_rst_n),
    .rx_dv (sfp_rx_dv), .rx_data (sfp_rx_data),
    .rx_good (sfp_rx_good), .rx_bad (sfp_rx_bad),
    .fifo_wr_en (se_wr_en), .fifo_wr_data (se_wr_data),
    .fifo_commit (se_commit), .fifo_drop (se_drop), .fifo_full (se_full),
    .frames_ok (stats.sfp_rx_ok), .frames_dropped (stats.sfp_rx_dropped)
  );

  async_frame_fifo #(.DATA_W (FIFO_WORD_W), .ADDR_W (SFP_ETH_AW)) u_sfp_eth_fifo (
    .wr_clk (sfp_clk), .wr_rst_n (sfp_rst_n),
    .wr_en (se_wr_en), .wr_data (se_wr_data),
    .wr_commit (se_commit), .wr_drop (se_drop), .wr_full (se_full),
    .rd_clk (eth_clk), .rd_rst_n (eth_rst_n),
    .rd_en (se_rd_en), .rd_data (se_rd_data), .rd_empty (se_empty)
  );

  async_frame_fifo #(.DATA_W (FIFO_WORD_W), .ADDR_W (UB_ETH_AW)) u_ub_eth_fifo (
    .wr_clk (ub_clk), .wr_rst_n (ub_rst_n),
    .wr_en (ubeth_wr_en), .wr_data (ubeth_wr_data),
    .wr_commit (ubeth_commit), .wr_drop (ubeth_drop), .wr_full (ubeth_full),
    .rd_clk (eth_clk), .rd_rst_n (eth_rst_n),
    .rd_en (ue_rd_en), .rd_data (ue_rd_data), .rd_empty (ue_empty)
  );

  sfp_eth_readout #(.FAIR (FAIR)) u_sfp_eth_r (
    .clk (eth_clk), .rst_n (eth_rst_n),
    .sfp_rd_en (se_rd_en), .sfp_rd_data (se_rd_data), .sfp_rd_empty (se_empty),
    .ub_rd_en (ue_rd_en), .ub_rd_data (ue_rd_data), .ub_rd_empty (ue_empty),
    .tx_dv (eth_tx_dv), .tx_data (eth_tx_data), .tx_ack (eth_tx_ack),
    .frames_from_sfp (stats.from_sfp), .frames_from_ub (stats.from_ub),
    .ub_deferred (stats.ub_deferred)
  );

endmodule
