// tb_bram_controller: self-checking test of bram_controller with dp_bram.
//
// A show-ahead frame source stands in for the ETH-UB FIFO, a frame sink
// with a random full flag for the UB-ETH FIFO, and a processor model
// drives port B of the RAM and the ready/ACK handshakes.
// Receive: each frame must appear in the receive buffer (byte i in word
// i/4, lane i%4 from the top) with the right rx_len when rx_ready rises; a
// second frame already waiting must not overwrite the buffer before rx_ack.
// Transmit: frames written through port B and announced with tx_ready must
// reach the sink whole, with the last flag on the final byte, followed by a
// tx_ack pulse, also while the sink keeps signalling full.
module tb_bram_controller;
  import eth_pkg::*;

  localparam int AW = 10;

  logic          clk = 0, rst_n = 0;
  logic          rd_en, rd_empty;
  fifo_word_t    rd_data;
  logic          wr_en, wr_commit, wr_drop;
  logic          wr_full = 0;
  fifo_word_t    wr_data;
  logic          a_en;
  logic [3:0]    a_we;
  logic [AW-1:0] a_addr;
  logic [31:0]   a_din, a_dout;
  logic          b_en = 0;
  logic [3:0]    b_we = 0;
  logic [AW-1:0] b_addr = 0;
  logic [31:0]   b_din = 0, b_dout;
  logic          rx_ready, rx_ack = 0, tx_ready = 0, tx_ack, tx_busy;
  logic [11:0]   rx_len, tx_len = 0;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  bram_controller #(.ADDR_W (AW)) dut (.*);
  dp_bram #(.ADDR_W (AW)) ram (
    .a_clk (clk), .a_en, .a_we, .a_addr, .a_din, .a_dout,
    .b_clk (clk), .b_en, .b_we, .b_addr, .b_din, .b_dout
  );
  tb_frame_source src (.clk, .rd_en, .rd_data, .rd_empty);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- UB-ETH FIFO sink ----
  fifo_word_t pend [$], sunk [$];
  always @(posedge clk) begin
    if (wr_en && !wr_full) pend.push_back(wr_data);
    if (wr_drop) pend.delete();
    else if (wr_commit && !wr_full) begin
      foreach (pend[i]) sunk.push_back(pend[i]);
      pend.delete();
    end
  end

  // ---- processor model: port B accesses ----
  task automatic b_read(input int byte_addr, output logic [7:0] v);
    @(negedge clk);
    b_en = 1; b_we = 0; b_addr = AW'(byte_addr / 4);
    @(negedge clk);
    b_en = 0;
    v = b_dout[31 - 8*(byte_addr % 4) -: 8];
  endtask

  task automatic b_write(input int byte_addr, input logic [7:0] v);
    @(negedge clk);
    b_en = 1; b_we = 4'b1000 >> (byte_addr % 4); b_addr = AW'(byte_addr / 4);
    b_din = {4{v}};
    @(negedge clk);
    b_en = 0; b_we = 0;
  endtask

  typedef logic [7:0] frame_t [$];

  function automatic frame_t make(input int len);
    frame_t f;
    for (int i = 0; i < len; i++) f.push_back(8'($urandom));
    return f;
  endfunction

  task automatic rx_frame(input frame_t f, input bit check_hold, input frame_t next);
    int n;
    n = 0;
    while (!rx_ready && n < 5000) begin
      @(negedge clk);
      n++;
    end
    check(rx_ready, "rx_ready (receive interrupt) rises");
    check(rx_len == 12'(f.size()), $sformatf("rx_len %0d expected %0d", rx_len, f.size()));
    if (check_hold) repeat (3 * next.size() + 20) @(negedge clk);
    begin
      int bad;
      bad = 0;
      foreach (f[i]) begin
        logic [7:0] v;
        b_read(i, v);
        if (v != f[i]) bad++;
      end
      check(bad == 0, $sformatf("receive buffer holds the frame (%0d bad bytes)", bad));
    end
    @(negedge clk);
    rx_ack = 1;
    @(negedge clk);
    rx_ack = 0;
    @(negedge clk);
    check(!rx_ready, "rx_ready falls after rx_ack");
  endtask

  int n_rx = 0, n_tx_stall = 0;
  bit stall_on = 0;

  always @(negedge clk) wr_full = stall_on && ($urandom_range(2) == 0);
  always @(posedge clk) if (wr_full && tx_busy) n_tx_stall++;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // ---- receive ----
    begin
      frame_t f1, f2, f3;
      f1 = make(64);
      f2 = make(1530);
      f3 = make(1);
      src.push(f1);
      src.push(f2);
      rx_frame(f1, 1, f2);
      rx_frame(f2, 0, f1);
      src.push(f3);
      rx_frame(f3, 0, f1);
      for (int i = 0; i < 5; i++) begin
        f1 = make($urandom_range(1, 300));
        src.push(f1);
        rx_frame(f1, 0, f1);
      end
    end
    // ---- transmit ----
    for (int t = 0; t < 6; t++) begin
      frame_t f;
      int n;
      f = (t == 0) ? make(1530) : make($urandom_range(1, 200));
      stall_on = (t % 2 == 1);
      foreach (f[i]) b_write(FRAME_BUF_BYTES + i, f[i]);
      sunk.delete();
      @(negedge clk);
      tx_len = 12'(f.size());
      tx_ready = 1;
      @(negedge clk);
      tx_ready = 0;
      check(tx_busy, "tx_busy after tx_ready");
      n = 0;
      while (!tx_ack && n < 20000) begin
        @(negedge clk);
        n++;
      end
      check(tx_ack, "tx_ack pulse");
      @(negedge clk);
      check(!tx_ack && !tx_busy, "tx_ack is one pulse, controller idle");
      check(sunk.size() == f.size(), $sformatf("frame %0d: %0d bytes sent, expected %0d",
                                                t, sunk.size(), f.size()));
      begin
        int bad;
        bad = 0;
        for (int i = 0; i < sunk.size() && i < f.size(); i++)
          if (sunk[i].data != f[i] || sunk[i].last != (i == f.size() - 1)) bad++;
        check(bad == 0, $sformatf("frame %0d: %0d bytes wrong", t, bad));
      end
    end
    stall_on = 0;
    check(n_tx_stall > 0, "transmit stalled on a full FIFO");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
