// tb_sfp_eth_readout: self-checking test of sfp_eth_readout.
//
// Two show-ahead frame sources stand in for the SFP-ETH and UB-ETH FIFOs;
// an Ethernet MAC client model acknowledges the first byte of each frame
// after a random delay and collects the bytes. Frames are tagged by their
// first byte (source and sequence number), so the order on the Ethernet
// side shows the arbitration: with frames waiting in both sources, every
// SFP frame must leave before any processor frame, and processor frames
// must still leave once the SFP source is empty. A long SFP stream that
// keeps arriving must hold processor frames back for its whole length.
// Frame contents, the no-gap streaming after tx_ack and the counters are
// checked too.
module tb_sfp_eth_readout;
  import eth_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic        sfp_rd_en, sfp_rd_empty, ub_rd_en, ub_rd_empty;
  fifo_word_t  sfp_rd_data, ub_rd_data;
  logic        tx_dv, tx_ack = 0;
  logic [7:0]  tx_data;
  logic [15:0] frames_from_sfp, frames_from_ub, ub_deferred;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sfp_eth_readout dut (.*);

  tb_frame_source src_sfp (.clk, .rd_en (sfp_rd_en), .rd_data (sfp_rd_data), .rd_empty (sfp_rd_empty));
  tb_frame_source src_ub  (.clk, .rd_en (ub_rd_en),  .rd_data (ub_rd_data),  .rd_empty (ub_rd_empty));

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

  // ---- Ethernet MAC client model ----
  typedef logic [7:0] frame_t [$];
  frame_t got [$];
  logic [7:0] cur [$];
  bit in_frame = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      if (tx_dv && !in_frame) begin
        if (tx_ack) begin
          in_frame = 1;
          cur.delete();
          cur.push_back(tx_data);
        end
      end else if (in_frame) begin
        if (tx_dv) cur.push_back(tx_data);
        else begin
          got.push_back(cur);
          in_frame = 0;
        end
      end
    end
  end
  initial begin
    forever begin
      @(negedge clk);
      tx_ack = 0;
      if (tx_dv && !in_frame) begin
        repeat ($urandom_range(2)) @(negedge clk);
        tx_ack = 1;
      end
    end
  end

  frame_t sent [$];   // every frame, by tag

  // tag byte: bit 7 = processor frame, bits 6:0 = sequence
  function automatic frame_t make(input bit ub, input int seq, input int len);
    frame_t f;
    f.push_back({ub, 7'(seq)});
    for (int i = 1; i < len; i++) f.push_back(8'($urandom));
    return f;
  endfunction

  task automatic wait_idle();
    while (src_sfp.size() != 0 || src_ub.size() != 0 || tx_dv || in_frame) @(negedge clk);
    repeat (3) @(negedge clk);
  endtask

  int n_sfp = 0, n_ub = 0;

  initial begin
    int base;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // ---- 1: both sources loaded at once ----
    base = got.size();
    for (int i = 0; i < 5; i++) begin
      frame_t f;
      f = make(0, i, $urandom_range(2, 40)); src_sfp.push(f); sent.push_back(f); n_sfp++;
      f = make(1, i, $urandom_range(2, 40)); src_ub.push(f);  sent.push_back(f); n_ub++;
    end
    wait_idle();
    check(got.size() == base + 10, "case 1: ten frames sent");
    for (int i = 0; i < 10 && base + i < got.size(); i++)
      check(got[base + i][0][7] == (i >= 5), $sformatf("case 1: frame %0d from %s", i,
                                                     got[base + i][0][7] ? "UB" : "SFP"));
    check(ub_deferred >= 16'd5, "case 1: processor frames were deferred");

    // ---- 2: processor frames alone ----
    base = got.size();
    for (int i = 0; i < 4; i++) begin
      frame_t f;
      f = make(1, 10 + i, $urandom_range(1, 30)); src_ub.push(f); sent.push_back(f); n_ub++;
    end
    wait_idle();
    check(got.size() == base + 4, "case 2: processor frames sent while SFP idle");

    // ---- 3: a long SFP stream holds processor frames back ----
    base = got.size();
    begin
      frame_t f;
      f = make(0, 20, 20); src_sfp.push(f); sent.push_back(f); n_sfp++;
      f = make(1, 30, 20); src_ub.push(f);  sent.push_back(f); n_ub++;
      for (int i = 1; i < 12; i++) begin
        // keep the SFP source from running dry
        while (src_sfp.size() > 10) @(negedge clk);
        f = make(0, 20 + i, 20); src_sfp.push(f); sent.push_back(f); n_sfp++;
      end
    end
    wait_idle();
    check(got.size() == base + 13, "case 3: all frames sent");
    if (got.size() == base + 13)
      check(got[base + 12][0] == {1'b1, 7'd30}, "case 3: processor frame waited for the stream to end");

    // ---- contents ----
    foreach (got[g]) begin
      bit found;
      found = 0;
      foreach (sent[s]) if (sent[s] == got[g]) found = 1;
      check(found, $sformatf("frame %0d arrived unchanged", g));
    end
    check(frames_from_sfp == 16'(n_sfp), "frames_from_sfp");
    check(frames_from_ub == 16'(n_ub), "frames_from_ub");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // tx_dv must not drop between tx_ack and the last byte
  always @(posedge clk) if (in_frame && !tx_dv) begin
    // the frame that just ended: compare with the source frame of its tag
    foreach (sent[s]) if (sent[s][0] == cur[0]) check(cur.size() == sent[s].size(),
                                                       "frame length on the MAC side");
  end

endmodule
