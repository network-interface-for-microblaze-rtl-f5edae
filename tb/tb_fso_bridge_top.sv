// tb_fso_bridge_top: end-to-end test of fso_bridge_top at its default sizes.
//
// Surroundings: a MAC client model on the Ethernet side (8 ns clock); the
// far end of the optical link, built from a second sfp_mac with its own
// client models (the line is cut 7 bits late, so the receivers have to
// align); and a processor model on ub_clk (10 ns) that serves the receive
// interrupt by reading the frame through RAM port B and answering rx_ack,
// and sends frames by writing the transmit buffer and pulsing tx_ready.
//
// Traffic and what is checked:
//   Ethernet -> optical      frames to other stations cross the bridge and
//                            the link and arrive unchanged at the far end;
//   Ethernet -> processor    frames to the MAC register arrive in the
//                            receive buffer, with an interrupt and length;
//   optical -> Ethernet      far-end frames arrive unchanged;
//   processor -> Ethernet    frames from the transmit buffer arrive;
//   line rate                a burst of 20 frames of 1000 bytes crosses
//                            Ethernet -> optical at one byte per clock plus
//                            at most 24 clocks of framing per frame;
// and each mechanism must happen at least once: bad frame dropped,
// processor frame held back by optical traffic (priority), ETH-UB FIFO
// overflow while the processor sits on its buffer, transmit stalled on a
// full UB-ETH FIFO, MAC register rewritten, code-group alignment, line
// error on the optical link reported as a bad frame.
module tb_fso_bridge_top;
  import eth_pkg::*;

  logic eth_clk = 0, sfp_clk = 0, ub_clk = 0;
  logic eth_rst_n = 0, sfp_rst_n = 0, ub_rst_n = 0;
  always #4 eth_clk = ~eth_clk;
  always #4 sfp_clk = ~sfp_clk;
  always #5 ub_clk = ~ub_clk;

  logic        eth_rx_dv, eth_rx_good, eth_rx_bad, eth_tx_dv, eth_tx_ack;
  logic [7:0]  eth_rx_data, eth_tx_data;
  logic [9:0]  sfp_txd, sfp_rxd;
  logic        sfp_aligned;
  logic        ub_b_en = 0;
  logic [3:0]  ub_b_we = 0;
  logic [9:0]  ub_b_addr = 0;
  logic [31:0] ub_b_din = 0, ub_b_dout;
  logic        ub_rx_ready, ub_rx_ack = 0, ub_tx_ready = 0, ub_tx_ack, ub_tx_busy;
  logic [11:0] ub_rx_len, ub_tx_len = 0;
  logic        ub_mac_wr_en = 0;
  logic [47:0] ub_mac_wr_data = 0, ub_mac_addr;
  flow_stats_t stats;
  logic [15:0] sfp_frames_sent, sfp_char_errors;
  logic [7:0]  sfp_realign_cnt;

  fso_bridge_top dut (.*);

  // ---- Ethernet MAC client ----
  tb_client_driver eth_drv (.clk (eth_clk), .rx_dv (eth_rx_dv), .rx_data (eth_rx_data),
                            .rx_good (eth_rx_good), .rx_bad (eth_rx_bad));
  tb_client_sink eth_sink (.clk (eth_clk), .rst_n (eth_rst_n), .tx_dv (eth_tx_dv),
                           .tx_data (eth_tx_data), .tx_ack (eth_tx_ack));

  // ---- far end of the optical link ----
  logic        far_tx_dv, far_tx_ack, far_rx_dv, far_rx_good, far_rx_bad, far_aligned;
  logic [7:0]  far_tx_data, far_rx_data, far_realign;
  logic [9:0]  far_txd, far_rxd;
  logic [15:0] far_sent, far_cerr;
  sfp_mac far (
    .clk (sfp_clk), .rst_n (sfp_rst_n),
    .tx_dv (far_tx_dv), .tx_data (far_tx_data), .tx_ack (far_tx_ack),
    .rx_dv (far_rx_dv), .rx_data (far_rx_data), .rx_good (far_rx_good), .rx_bad (far_rx_bad),
    .txd (far_txd), .rxd (far_rxd), .aligned (far_aligned), .realign_cnt (far_realign),
    .frames_sent (far_sent), .char_errors (far_cerr)
  );
  tb_client_driver far_drv (.clk (sfp_clk), .rx_dv (far_tx_dv), .rx_data (far_tx_data),
                            .rx_good (), .rx_bad ());

  // line in both directions, 7 bits late; one bit can be flipped toward the
  // bridge
  logic [9:0] p_near = 0, p_far = 0;
  bit flip = 0;
  always @(posedge sfp_clk) begin
    p_near <= sfp_txd;
    p_far  <= far_txd;
  end
  assign far_rxd = {p_near, sfp_txd}[12 -: 10];
  assign sfp_rxd = {p_far, far_txd}[12 -: 10] ^ (flip ? 10'b0001000000 : 10'b0);

  // far-end transmitter: tb_client_driver drives tx_dv/tx_data, but the
  // transmit handshake needs the byte held until tx_ack, so a small task
  // is used instead of far_drv.send
  typedef logic [7:0] frame_t [$];
  logic       ftx_dv = 0;
  logic [7:0] ftx_data = 0;
  task automatic far_send(input frame_t f);
    @(negedge sfp_clk);
    ftx_dv = 1;
    ftx_data = f[0];
    while (!far_tx_ack) @(negedge sfp_clk);
    for (int i = 1; i < f.size(); i++) begin
      @(negedge sfp_clk);
      ftx_data = f[i];
    end
    @(negedge sfp_clk);
    ftx_dv = 0;
  endtask

  // far-end receiver
  frame_t far_rx [$];
  logic [7:0] far_cur [$];
  int far_bad = 0;
  always @(posedge sfp_clk) begin
    if (far_rx_dv) far_cur.push_back(far_rx_data);
    if (far_rx_good) begin
      far_rx.push_back(far_cur);
      far_cur.delete();
    end
    if (far_rx_bad) begin
      far_bad++;
      far_cur.delete();
    end
  end

  int checks = 0, failures = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #60000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- processor model ----
  frame_t ub_rx [$];
  frame_t ub_tx_q [$];
  bit     ub_hold = 0;   // processor busy: leave the receive buffer alone

  task automatic b_read_word(input int word, output logic [31:0] v);
    @(negedge ub_clk);
    ub_b_en = 1; ub_b_we = 0; ub_b_addr = 10'(word);
    @(negedge ub_clk);
    ub_b_en = 0;
    v = ub_b_dout;
  endtask

  task automatic b_write_word(input int word, input logic [31:0] v);
    @(negedge ub_clk);
    ub_b_en = 1; ub_b_we = 4'hF; ub_b_addr = 10'(word); ub_b_din = v;
    @(negedge ub_clk);
    ub_b_en = 0; ub_b_we = 0;
  endtask

  initial begin
    wait (ub_rst_n);
    forever begin
      @(negedge ub_clk);
      if (ub_rx_ready && !ub_hold) begin
        frame_t f;
        int len;
        f.delete();
        len = int'(ub_rx_len);
        for (int w = 0; w < (len + 3) / 4; w++) begin
          logic [31:0] v;
          b_read_word(w, v);
          for (int l = 0; l < 4; l++) if (w * 4 + l < len) f.push_back(v[31 - 8*l -: 8]);
        end
        ub_rx.push_back(f);
        @(negedge ub_clk);
        ub_rx_ack = 1;
        @(negedge ub_clk);
        ub_rx_ack = 0;
      end else if (ub_tx_q.size() > 0) begin
        frame_t f;
        f = ub_tx_q.pop_front();
        for (int w = 0; w < (f.size() + 3) / 4; w++) begin
          logic [31:0] v;
          for (int l = 0; l < 4; l++) v[31 - 8*l -: 8] = (w * 4 + l < f.size()) ? f[w*4 + l] : 8'h00;
          b_write_word(FRAME_BUF_BYTES / 4 + w, v);
        end
        @(negedge ub_clk);
        ub_tx_len = 12'(f.size());
        ub_tx_ready = 1;
        @(negedge ub_clk);
        ub_tx_ready = 0;
        while (!ub_tx_ack) @(negedge ub_clk);
      end
    end
  end

  // ---- priority rule: a processor frame may only start when the SFP-ETH
  // FIFO showed no frame at the decision edge ----
  bit sfp_waiting_at_decision = 0;
  int prio_violations = 0;
  bit was_idle = 0;
  always @(posedge eth_clk) begin
    if (dut.u_flow.u_sfp_eth_r.state == 2'd1 && sfp_waiting_at_decision &&
        dut.u_flow.u_sfp_eth_r.src != 1'b0 && was_idle) prio_violations++;
    was_idle = (dut.u_flow.u_sfp_eth_r.state == 2'd0);
    sfp_waiting_at_decision = !dut.u_flow.se_empty;
  end

  // ---- mechanism counters ----
  int n_tx_stall = 0;
  always @(posedge ub_clk) if (dut.u_bram_ctrl.tx_state == 2'd3 && dut.u_bram_ctrl.wr_full) n_tx_stall++;

  function automatic frame_t make(input logic [47:0] dst, input int len, input logic [7:0] tag);
    frame_t f;
    for (int i = 0; i < 6; i++) f.push_back(dst[47 - 8*i -: 8]);
    f.push_back(tag);
    for (int i = 7; i < len; i++) f.push_back(8'($urandom));
    return f;
  endfunction

  localparam logic [47:0] OWN  = 48'h02_00_00_00_00_01;
  localparam logic [47:0] OWN2 = 48'h02_00_5E_10_20_30;
  localparam logic [47:0] PEER = 48'h00_1B_21_AA_BB_CC;

  frame_t exp_far [$], exp_ub [$], exp_eth_sfp [$], exp_eth_ub [$];

  task automatic settle(input int n);
    repeat (n) @(negedge eth_clk);
    while (eth_sink.busy() || ub_rx_ready || ub_tx_busy || ub_tx_q.size() > 0 ||
           dut.u_flow.u_eth_sfp_r.state != 0 || !dut.u_flow.es_empty ||
           !dut.u_flow.ethub_rd_empty || !dut.u_flow.se_empty || !dut.u_flow.ue_empty ||
           dut.u_bram_ctrl.rx_cnt != 0 || dut.u_sfp_mac.u_tx.state != 0 ||
           far.u_tx.state != 0 || far_cur.size() != 0) @(negedge eth_clk);
    repeat (n) @(negedge eth_clk);
  endtask

  assign far_tx_dv   = ftx_dv;
  assign far_tx_data = ftx_data;

  int ub_dropped_frames = 0;

  localparam int RATE_FRAMES = 20, RATE_BYTES = 1000;
  time last_far_good_t = 0;
  time first_far_dv_t = 0;
  bit  rate_arm = 0;
  always @(posedge sfp_clk) begin
    if (far_rx_good) last_far_good_t = $time;
    if (rate_arm && far_rx_dv) begin
      first_far_dv_t = $time;
      rate_arm = 0;
    end
  end

  initial begin
    repeat (4) @(negedge ub_clk);
    eth_rst_n = 1; sfp_rst_n = 1; ub_rst_n = 1;
    repeat (40) @(negedge sfp_clk);
    check(sfp_aligned && far_aligned, "both ends of the optical link aligned");

    // 1. Ethernet -> optical and Ethernet -> processor, one bad frame
    for (int n = 0; n < 12; n++) begin
      frame_t f;
      f = make((n % 3 == 2) ? OWN : PEER, (n == 0) ? 1518 : $urandom_range(60, 400), 8'(n));
      if (n == 4) eth_drv.send(f, 1);
      else begin
        eth_drv.send(f, 0);
        if (n % 3 == 2) exp_ub.push_back(f);
        else exp_far.push_back(f);
      end
      repeat (12) @(negedge eth_clk);
    end
    settle(400);

    // 2. processor busy: one frame waits in the receive buffer, two fill
    // the ETH-UB FIFO, the fourth does not fit and is dropped
    ub_hold = 1;
    for (int n = 0; n < 4; n++) begin
      frame_t f;
      f = make(OWN, 1000, 8'(50 + n));
      eth_drv.send(f, 0);
      if (n < 3) exp_ub.push_back(f);
      repeat (12) @(negedge eth_clk);
    end
    repeat (3000) @(negedge eth_clk);
    ub_hold = 0;
    settle(400);

    // 3. MAC register rewritten: frames to the new address go to the processor
    @(negedge ub_clk);
    ub_mac_wr_en = 1;
    ub_mac_wr_data = OWN2;
    @(negedge ub_clk);
    ub_mac_wr_en = 0;
    repeat (20) @(negedge ub_clk);
    begin
      frame_t f;
      f = make(OWN2, 100, 8'd60); eth_drv.send(f, 0); exp_ub.push_back(f);
      repeat (12) @(negedge eth_clk);
      f = make(OWN, 100, 8'd61);  eth_drv.send(f, 0); exp_far.push_back(f);
    end
    settle(400);

    // 4. optical stream with processor frames waiting (priority, stall)
    fork
      for (int n = 0; n < 10; n++) begin
        frame_t f;
        f = make(PEER, 1200, 8'(100 + n));
        far_send(f);
        exp_eth_sfp.push_back(f);
      end
      begin
        repeat (400) @(negedge ub_clk);
        for (int n = 0; n < 3; n++) begin
          frame_t f;
          f = make(PEER, 1200, 8'(200 + n));
          ub_tx_q.push_back(f);
          exp_eth_ub.push_back(f);
        end
      end
    join
    settle(2000);

    // 5. a line error on the optical link
    begin
      frame_t f;
      f = make(PEER, 200, 8'd150);
      fork
        far_send(f);
        begin
          @(negedge sfp_clk);
          while (!far_tx_ack) @(negedge sfp_clk);
          repeat (40) @(negedge sfp_clk);
          flip = 1;
          @(negedge sfp_clk);
          flip = 0;
        end
      join
      f = make(PEER, 80, 8'd151);
      far_send(f);
      exp_eth_sfp.push_back(f);
    end
    settle(2000);

    // 6. line rate: a burst of frames from the Ethernet side, as close
    // together as the client allows, must leave the far end at one byte per
    // clock (1 Gb/s at 125 MHz) plus the per-frame overhead of the optical
    // framing (/S/, preamble, delimiter, /T/R/ and the interframe gap)
    begin
      int unsigned cycles, bound;
      rate_arm = 1;
      for (int n = 0; n < RATE_FRAMES; n++) begin
        frame_t f;
        f = make(PEER, RATE_BYTES, 8'(170 + n));
        eth_drv.send(f, 0);
        exp_far.push_back(f);
        repeat (12) @(negedge eth_clk);
      end
      settle(400);
      // measured from the first byte at the far end: the first frame's
      // store-and-forward delay is excluded, the sustained rate is not
      cycles = int'((last_far_good_t - first_far_dv_t) / 8);
      bound  = RATE_FRAMES * (RATE_BYTES + 24) + 200;
      $display("line rate: %0d frames of %0d bytes in %0d cycles (bound %0d)",
               RATE_FRAMES, RATE_BYTES, cycles, bound);
      check(cycles <= bound, "Ethernet->optical burst at line rate");
    end

    // ---- results ----
    check(far_rx.size() == exp_far.size(), $sformatf("far end got %0d frames, expected %0d",
                                                      far_rx.size(), exp_far.size()));
    foreach (exp_far[i]) if (i < far_rx.size())
      check(far_rx[i] == exp_far[i], $sformatf("Ethernet->optical frame %0d", i));
    check(ub_rx.size() == exp_ub.size(), $sformatf("processor got %0d frames, expected %0d",
                                                    ub_rx.size(), exp_ub.size()));
    foreach (exp_ub[i]) if (i < ub_rx.size())
      check(ub_rx[i] == exp_ub[i], $sformatf("Ethernet->processor frame %0d", i));
    begin
      int si, ui;
      si = 0; ui = 0;
      check(eth_sink.frames.size() == exp_eth_sfp.size() + exp_eth_ub.size(),
            $sformatf("Ethernet side got %0d frames", eth_sink.frames.size()));
      foreach (eth_sink.frames[i]) begin
        if (eth_sink.frames[i][6] >= 8'd200) begin
          if (ui < exp_eth_ub.size())
            check(eth_sink.frames[i] == exp_eth_ub[ui], $sformatf("processor->Ethernet frame %0d", ui));
          ui++;
        end else begin
          if (si < exp_eth_sfp.size())
            check(eth_sink.frames[i] == exp_eth_sfp[si], $sformatf("optical->Ethernet frame %0d", si));
          si++;
        end
      end
    end
    // mechanisms
    $display("mechanisms: bad_drop=%0d deferred=%0d ub_overflow=%0d tx_stall=%0d mac_write=1 realign=%0d line_err=%0d",
             stats.eth_rx_dropped, stats.ub_deferred, stats.ub_dropped, n_tx_stall,
             sfp_realign_cnt, stats.sfp_rx_dropped);
    check(stats.eth_rx_dropped == 16'd1, "bad Ethernet frame dropped");
    check(stats.ub_deferred > 0, "priority: processor frame deferred");
    check(prio_violations == 0, "processor frames only start when the SFP-ETH FIFO is empty");
    check(stats.ub_dropped == 16'd1, "ETH-UB overflow drop");
    check(n_tx_stall > 0, "transmit stalled on a full UB-ETH FIFO");
    check(ub_mac_addr == OWN2, "MAC register rewritten");
    check(sfp_realign_cnt >= 1 && far_realign >= 1, "code-group alignment");
    check(stats.sfp_rx_dropped == 16'd1 && sfp_char_errors > 0, "line error reported as bad frame");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
