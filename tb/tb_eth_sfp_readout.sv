// tb_eth_sfp_readout: self-checking test of eth_sfp_readout.
//
// The ETH-SFP FIFO is modelled as a show-ahead queue of complete frames,
// the ETH-UB FIFO write port as a pending/committed list with a full flag
// the testbench controls, and the SFP MAC as a client that acknowledges the
// first byte after a random delay and then takes one byte per clock.
// Frames addressed to the register value must reach the ETH-UB side, all
// others (including frames too short to hold an address, and frames whose
// address differs in one byte) the SFP side, each unchanged and in order.
// A processor frame that meets a full ETH-UB FIFO must be dropped. After
// tx_ack the frame must stream without a gap: tx_dv stays high for exactly
// the remaining bytes.
module tb_eth_sfp_readout;
  import eth_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic        rd_en;
  logic        rd_empty = 1;
  fifo_word_t  rd_data = '0;
  logic [47:0] mac_addr = 48'h00_0A_35_01_02_03;
  logic        tx_dv, tx_ack = 0;
  logic [7:0]  tx_data;
  logic        ub_wr_en, ub_commit, ub_drop, ub_full = 0;
  fifo_word_t  ub_wr_data;
  logic [15:0] frames_to_sfp, frames_to_ub, frames_ub_dropped;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  eth_sfp_readout dut (.*);

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

  // ---- source FIFO model ----
  fifo_word_t src_q [$];
  // rd_empty/rd_data change like flop outputs after a pop (nonblocking),
  // and at once when the testbench adds a frame between clock edges
  always @(posedge clk) begin
    if (rd_en && !rd_empty) void'(src_q.pop_front());
    rd_empty <= (src_q.size() == 0);
    rd_data  <= (src_q.size() == 0) ? '0 : src_q[0];
  end
  function automatic void src_refresh();
    rd_empty = (src_q.size() == 0);
    rd_data  = rd_empty ? '0 : src_q[0];
  endfunction

  // ---- ETH-UB FIFO model ----
  fifo_word_t ub_pend [$], ub_got [$];
  always @(posedge clk) begin
    if (ub_wr_en && !ub_full) ub_pend.push_back(ub_wr_data);
    if (ub_drop) ub_pend.delete();
    else if (ub_commit) begin
      foreach (ub_pend[i]) ub_got.push_back(ub_pend[i]);
      ub_pend.delete();
    end
  end

  // ---- SFP MAC client model ----
  fifo_word_t sfp_got [$];
  int ack_wait = 0;
  int stream_left = 0;
  bit in_frame = 0;
  logic [7:0] cur [$];
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
          foreach (cur[i]) sfp_got.push_back('{last: (i == cur.size() - 1), data: cur[i]});
          in_frame = 0;
        end
      end
    end
  end
  // ack after a random delay once tx_dv is seen
  initial begin
    forever begin
      @(negedge clk);
      tx_ack = 0;
      if (tx_dv && !in_frame) begin
        repeat ($urandom_range(3)) @(negedge clk);
        tx_ack = 1;
      end
    end
  end

  fifo_word_t exp_sfp [$], exp_ub [$];
  int n_sfp = 0, n_ub = 0, n_drop = 0;

  // kind: 0 other address, 1 own address, 2 own address but ETH-UB full,
  // 3 too short, 4 one byte of the address differs
  task automatic make_frame(input int kind, input int len);
    logic [7:0] b [];
    b = new[len];
    foreach (b[i]) b[i] = 8'($urandom);
    if (kind == 1 || kind == 2 || kind == 4)
      for (int i = 0; i < 6 && i < len; i++) b[i] = mac_addr[47 - 8*i -: 8];
    if (kind == 4) b[$urandom_range(5)] ^= 8'h10;
    if (kind == 0) b[0] = ~mac_addr[47:40];
    foreach (b[i]) src_q.push_back('{last: (i == len - 1), data: b[i]});
    src_refresh();
    if (kind == 1) begin
      foreach (b[i]) exp_ub.push_back('{last: (i == len - 1), data: b[i]});
      n_ub++;
    end else if (kind == 2) begin
      n_drop++;
    end else begin
      foreach (b[i]) exp_sfp.push_back('{last: (i == len - 1), data: b[i]});
      n_sfp++;
    end
  endtask

  // tx_dv must stay high from the ack to the last byte
  int dv_after_ack = 0;
  int frame_len_q [$];
  bit counting = 0;
  always @(posedge clk) begin
    if (tx_dv && tx_ack && !in_frame) begin
      counting = 1;
      dv_after_ack = 0;
    end else if (counting) begin
      if (tx_dv) dv_after_ack++;
      else begin
        int l;
        counting = 0;
        l = frame_len_q.pop_front();
        check(dv_after_ack == l - 1, $sformatf("streamed %0d bytes after ack, expected %0d",
                                               dv_after_ack, l - 1));
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 150; f++) begin
      int kind, len;
      kind = $urandom_range(4);
      len  = (kind == 3) ? $urandom_range(1, 5) : $urandom_range(6, 70);
      if (kind != 1 && kind != 2) frame_len_q.push_back(len);
      // wait until the model FIFO is empty so ub_full applies to one frame
      while (src_q.size() != 0 || dut.state != 0) @(negedge clk);
      ub_full = (kind == 2);
      make_frame(kind, len);
      repeat (2) @(negedge clk);
    end
    while (src_q.size() != 0 || dut.state != 0) @(negedge clk);
    repeat (5) @(negedge clk);
    check(ub_got.size() == exp_ub.size(), $sformatf("ETH-UB got %0d bytes, expected %0d",
                                                    ub_got.size(), exp_ub.size()));
    for (int i = 0; i < ub_got.size() && i < exp_ub.size(); i++)
      check(ub_got[i] == exp_ub[i], $sformatf("ETH-UB byte %0d", i));
    check(sfp_got.size() == exp_sfp.size(), $sformatf("SFP got %0d bytes, expected %0d",
                                                      sfp_got.size(), exp_sfp.size()));
    for (int i = 0; i < sfp_got.size() && i < exp_sfp.size(); i++)
      check(sfp_got[i] == exp_sfp[i], $sformatf("SFP byte %0d", i));
    check(frames_to_sfp == 16'(n_sfp), "frames_to_sfp");
    check(frames_to_ub == 16'(n_ub), "frames_to_ub");
    check(frames_ub_dropped == 16'(n_drop), "frames_ub_dropped");
    check(n_sfp > 0 && n_ub > 0 && n_drop > 0, "every route exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
