// tb_flow_controller: self-checking test of flow_controller.
//
// Three unrelated clocks drive the Ethernet side (8 ns), the SFP side
// (8.4 ns) and the processor side (10 ns). MAC client models feed frames in
// on both line sides and accept frames on both; on the processor side the
// testbench reads the ETH-UB FIFO and writes frames into the UB-ETH FIFO.
// Checked: Ethernet frames reach the SFP side unless their destination is
// the MAC register, in which case they reach the processor; frames marked
// bad are dropped; SFP frames reach Ethernet; processor frames reach
// Ethernet, and while both are waiting the SFP frames go first; writing
// the MAC register moves the routing to the new address. All frames must
// arrive unchanged and in order per path, and the counters must agree.
module tb_flow_controller;
  import eth_pkg::*;

  logic eth_clk = 0, sfp_clk = 0, ub_clk = 0;
  logic eth_rst_n = 0, sfp_rst_n = 0, ub_rst_n = 0;
  always #4 eth_clk = ~eth_clk;
  always #4.2 sfp_clk = ~sfp_clk;
  always #5 ub_clk = ~ub_clk;

  logic        eth_rx_dv, eth_rx_good, eth_rx_bad, eth_tx_dv, eth_tx_ack;
  logic [7:0]  eth_rx_data, eth_tx_data;
  logic        sfp_rx_dv, sfp_rx_good, sfp_rx_bad, sfp_tx_dv, sfp_tx_ack;
  logic [7:0]  sfp_rx_data, sfp_tx_data;
  logic        ethub_rd_en = 0, ethub_rd_empty;
  fifo_word_t  ethub_rd_data;
  logic        ubeth_wr_en = 0, ubeth_commit = 0, ubeth_drop = 0, ubeth_full;
  fifo_word_t  ubeth_wr_data = '0;
  logic        mac_wr_en = 0;
  logic [47:0] mac_wr_data = 0, mac_addr;
  flow_stats_t stats;

  flow_controller dut (.*);

  tb_client_driver eth_drv (.clk (eth_clk), .rx_dv (eth_rx_dv), .rx_data (eth_rx_data),
                            .rx_good (eth_rx_good), .rx_bad (eth_rx_bad));
  tb_client_driver sfp_drv (.clk (sfp_clk), .rx_dv (sfp_rx_dv), .rx_data (sfp_rx_data),
                            .rx_good (sfp_rx_good), .rx_bad (sfp_rx_bad));
  tb_client_sink eth_sink (.clk (eth_clk), .rst_n (eth_rst_n), .tx_dv (eth_tx_dv),
                           .tx_data (eth_tx_data), .tx_ack (eth_tx_ack));
  tb_client_sink sfp_sink (.clk (sfp_clk), .rst_n (sfp_rst_n), .tx_dv (sfp_tx_dv),
                           .tx_data (sfp_tx_data), .tx_ack (sfp_tx_ack));

  int checks = 0, failures = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef logic [7:0] frame_t [$];

  function automatic frame_t make(input logic [47:0] dst, input int len, input logic [7:0] tag);
    frame_t f;
    for (int i = 0; i < 6; i++) f.push_back(dst[47 - 8*i -: 8]);
    f.push_back(tag);
    for (int i = 7; i < len; i++) f.push_back(8'($urandom));
    return f;
  endfunction

  // ---- processor side: read the ETH-UB FIFO ----
  frame_t ub_rx [$];
  logic [7:0] ub_cur [$];
  always @(negedge ub_clk) begin
    ethub_rd_en = !ethub_rd_empty && ub_rst_n;
  end
  always @(posedge ub_clk) if (ethub_rd_en && !ethub_rd_empty) begin
    ub_cur.push_back(ethub_rd_data.data);
    if (ethub_rd_data.last) begin
      ub_rx.push_back(ub_cur);
      ub_cur.delete();
    end
  end

  task automatic ub_send(input frame_t f);
    foreach (f[i]) begin
      @(negedge ub_clk);
      while (ubeth_full) @(negedge ub_clk);
      ubeth_wr_en   = 1;
      ubeth_wr_data = '{last: (i == f.size() - 1), data: f[i]};
      ubeth_commit  = (i == f.size() - 1);
    end
    @(negedge ub_clk);
    ubeth_wr_en  = 0;
    ubeth_commit = 0;
  endtask

  task automatic mac_write(input logic [47:0] a);
    @(negedge ub_clk);
    mac_wr_en = 1;
    mac_wr_data = a;
    @(negedge ub_clk);
    mac_wr_en = 0;
    repeat (10) @(negedge ub_clk);
  endtask

  localparam logic [47:0] OWN  = 48'h02_00_00_00_00_01;
  localparam logic [47:0] OWN2 = 48'h02_11_22_33_44_55;
  localparam logic [47:0] PEER = 48'h00_1B_21_AA_BB_CC;

  frame_t exp_sfp [$], exp_ub [$], exp_eth [$];

  task automatic wait_quiet();
    repeat (200) @(negedge eth_clk);
    while (eth_sink.busy() || sfp_sink.busy() || !ethub_rd_empty) @(negedge eth_clk);
    repeat (50) @(negedge eth_clk);
  endtask

  initial begin
    repeat (4) @(negedge ub_clk);
    eth_rst_n = 1; sfp_rst_n = 1; ub_rst_n = 1;
    repeat (4) @(negedge ub_clk);
    check(mac_addr == OWN, "MAC register reset value");

    // ---- Ethernet receive: forwarded, to processor, bad ----
    for (int n = 0; n < 40; n++) begin
      frame_t f;
      int k;
      k = $urandom_range(5);
      f = make((k < 3) ? PEER : (k == 5 && n % 2 == 0) ? OWN2 : OWN, $urandom_range(14, 120), 8'(n));
      if (k == 4) eth_drv.send(f, 1);
      else begin
        eth_drv.send(f, 0);
        if (k < 3 || (k == 5 && n % 2 == 0)) exp_sfp.push_back(f);
        else exp_ub.push_back(f);
      end
    end
    wait_quiet();

    // ---- change the MAC address: OWN2 now goes to the processor ----
    mac_write(OWN2);
    check(mac_addr == OWN2, "MAC register read-back");
    for (int n = 0; n < 6; n++) begin
      frame_t f;
      f = make((n % 2) ? OWN2 : OWN, 64, 8'(100 + n));
      eth_drv.send(f, 0);
      if (n % 2) exp_ub.push_back(f);
      else exp_sfp.push_back(f);
    end
    wait_quiet();

    // ---- SFP receive and processor transmit, both at once ----
    fork
      for (int n = 0; n < 20; n++) begin
        frame_t f;
        f = make(PEER, $urandom_range(20, 200), 8'(n));
        sfp_drv.send(f, n == 7);
        if (n != 7) exp_eth.push_back(f);
      end
      for (int n = 0; n < 5; n++) begin
        frame_t f;
        f = make(PEER, $urandom_range(20, 80), 8'(200 + n));
        repeat (100) @(negedge ub_clk);
        ub_send(f);
      end
    join
    wait_quiet();

    check(sfp_sink.frames.size() == exp_sfp.size(),
          $sformatf("SFP side: %0d frames, expected %0d", sfp_sink.frames.size(), exp_sfp.size()));
    foreach (exp_sfp[i]) if (i < sfp_sink.frames.size())
      check(sfp_sink.frames[i] == exp_sfp[i], $sformatf("SFP frame %0d unchanged", i));
    check(ub_rx.size() == exp_ub.size(),
          $sformatf("processor: %0d frames, expected %0d", ub_rx.size(), exp_ub.size()));
    foreach (exp_ub[i]) if (i < ub_rx.size())
      check(ub_rx[i] == exp_ub[i], $sformatf("processor frame %0d unchanged", i));
    // Ethernet side: SFP frames in order, processor frames anywhere
    begin
      int si, ui;
      si = 0; ui = 0;
      check(eth_sink.frames.size() == exp_eth.size() + 5,
            $sformatf("Ethernet side: %0d frames", eth_sink.frames.size()));
      foreach (eth_sink.frames[i]) begin
        if (eth_sink.frames[i][6] >= 8'd200) begin
          check(eth_sink.frames[i][6] == 8'(200 + ui), "processor frames in order");
          ui++;
        end else begin
          if (si < exp_eth.size()) check(eth_sink.frames[i] == exp_eth[si], $sformatf("SFP->ETH frame %0d", si));
          si++;
        end
      end
    end
    check(stats.eth_rx_dropped > 0 && stats.sfp_rx_dropped == 1, "bad frames dropped");
    check(int'(stats.to_sfp) == exp_sfp.size() && int'(stats.to_ub) == exp_ub.size(), "routing counters");
    check(stats.from_ub == 16'd5 && int'(stats.from_sfp) == exp_eth.size(), "Ethernet transmit counters");
    check(stats.ub_deferred > 0, "processor frames were held back by SFP traffic");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
