// eth_pkg: constants and types shared by the Ethernet-to-optical bridge.
//
// Frame FIFOs carry one byte per entry together with an end-of-frame flag
// (fifo_word_t). The frame-size constants follow the largest Ethernet frame
// the bridge must buffer (1530 bytes) and the 2 KB frame buffer that holds
// one frame per direction on the processor side. The 8b/10b control
// characters and the preamble bytes are the standard 1000BASE-X values used
// by the simplified SFP-side MAC.
package eth_pkg;

  // Largest frame the bridge has to buffer, in bytes.
  localparam int unsigned MAX_FRAME_BYTES = 1530;
  // Frame buffer in the dual-port RAM, one per direction, in bytes.
  localparam int unsigned FRAME_BUF_BYTES = 2048;
  // Destination MAC address length, in bytes.
  localparam int unsigned MAC_ADDR_BYTES  = 6;

  // One FIFO entry: a frame byte and a flag marking the last byte.
  typedef struct packed {
    logic       last;
    logic [7:0] data;
  } fifo_word_t;

  localparam int unsigned FIFO_WORD_W = $bits(fifo_word_t);

  // 8b/10b control characters (K = 1) and data code groups used in
  // ordered sets (K = 0).
  localparam logic [7:0] K28_5 = 8'hBC;  // comma, first octet of /I/
  localparam logic [7:0] K27_7 = 8'hFB;  // /S/ start of packet
  localparam logic [7:0] K29_7 = 8'hFD;  // /T/ end of packet
  localparam logic [7:0] K23_7 = 8'hF7;  // /R/ carrier extend
  localparam logic [7:0] D5_6  = 8'hC5;  // second octet of /I1/
  localparam logic [7:0] D16_2 = 8'h50;  // second octet of /I2/

  // Frame counters of the flow controller.
  typedef struct packed {
    logic [15:0] eth_rx_ok;       // frames accepted from the Ethernet MAC
    logic [15:0] eth_rx_dropped;  // ... dropped (bad frame or FIFO full)
    logic [15:0] sfp_rx_ok;       // frames accepted from the SFP MAC
    logic [15:0] sfp_rx_dropped;  // ... dropped (bad frame or FIFO full)
    logic [15:0] to_sfp;          // frames forwarded to the SFP side
    logic [15:0] to_ub;           // frames routed to the processor
    logic [15:0] ub_dropped;      // processor-bound frames dropped (FIFO full)
    logic [15:0] from_sfp;        // frames sent to Ethernet from the SFP side
    logic [15:0] from_ub;         // frames sent to Ethernet from the processor
    logic [15:0] ub_deferred;     // processor frames held back by priority
  } flow_stats_t;

  localparam logic [7:0] PREAMBLE_BYTE = 8'h55;
  localparam logic [7:0] SFD_BYTE      = 8'hD5;

endpackage
