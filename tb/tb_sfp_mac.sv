// tb_sfp_mac: self-checking test of sfp_mac in loopback.
//
// The transmit code groups are fed back to the receiver through a bit
// shifter, so the receiver sees the stream cut at an arbitrary bit
// position and must find the code-group boundary itself. A client model
// sends frames of random length using the transmit handshake (first byte
// held until tx_ack, then one byte per clock); the receive side must
// deliver each frame unchanged with rx_good. The character stream is
// checked for its framing: /S/ on an even position, six preamble bytes and
// the delimiter, /T/ after the last byte, and at least IFG_MIN characters
// from /T/ to the next /S/. One frame is corrupted on the line by a bit
// flip and must be reported with rx_bad and not delivered.
module tb_sfp_mac;
  import eth_pkg::*;

  localparam int SHIFT = 3;

  logic        clk = 0, rst_n = 0;
  logic        tx_dv = 0, tx_ack;
  logic [7:0]  tx_data = 0;
  logic        rx_dv, rx_good, rx_bad;
  logic [7:0]  rx_data;
  logic [9:0]  txd, rxd;
  logic        aligned;
  logic [7:0]  realign_cnt;
  logic [15:0] frames_sent, char_errors;

  int checks = 0, failures = 0;

  always #4 clk = ~clk;

  sfp_mac dut (.*);

  // line: previous and current word, cut SHIFT bits late; one bit can be
  // flipped on demand
  logic [9:0] prev_txd = 0;
  bit         flip = 0;
  always @(posedge clk) prev_txd <= txd;
  assign rxd = {prev_txd, txd}[19 - SHIFT -: 10] ^ (flip ? 10'b0000100000 : 10'b0);

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

  typedef logic [7:0] frame_t [$];
  frame_t rx_frames [$];
  logic [7:0] cur [$];
  int n_bad = 0;

  always @(posedge clk) if (rst_n) begin
    if (rx_dv) cur.push_back(rx_data);
    if (rx_good) begin
      rx_frames.push_back(cur);
      cur.delete();
    end
    if (rx_bad) begin
      n_bad++;
      cur.delete();
    end
  end

  // ---- character stream monitor (before the encoder) ----
  int pos = 0;            // character index since reset
  int last_t = -100;
  int phase = 0;          // 0 idle, 1 preamble, 2 data
  int pre_n = 0, data_n = 0, n_s = 0, ifg_fail = 0, frame_fail = 0;
  int data_lens [$];
  always @(posedge clk) if (rst_n) begin
    logic [7:0] d;
    logic       k;
    d = dut.enc_data;
    k = dut.enc_k;
    case (phase)
      0: if (k && d == K27_7) begin
           n_s++;
           if (pos % 2 != 0) frame_fail++;
           if (pos - last_t < 12) ifg_fail++;
           phase = 1;
           pre_n = 0;
         end
      1: if (!k && d == PREAMBLE_BYTE) pre_n++;
         else begin
           if (k || d != SFD_BYTE || pre_n != 6) frame_fail++;
           phase = 2;
           data_n = 0;
         end
      2: if (k) begin
           if (d != K29_7) frame_fail++;
           data_lens.push_back(data_n);
           last_t = pos;
           phase = 0;
         end else data_n++;
      default: ;
    endcase
    pos++;
  end

  task automatic send(input frame_t f);
    @(negedge clk);
    tx_dv = 1;
    tx_data = f[0];
    while (!tx_ack) @(negedge clk);
    for (int i = 1; i < f.size(); i++) begin
      @(negedge clk);
      tx_data = f[i];
    end
    @(negedge clk);
    tx_dv = 0;
  endtask

  initial begin
    frame_t sent [$];
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (20) @(negedge clk);
    check(aligned, "receiver aligned on idles");
    for (int n = 0; n < 30; n++) begin
      frame_t f;
      int len;
      len = (n == 0) ? 1530 : $urandom_range(1, 100);
      f.delete();
      for (int i = 0; i < len; i++) f.push_back(8'($urandom));
      sent.push_back(f);
      send(f);
      if (n % 3 == 0) repeat ($urandom_range(5)) @(negedge clk);
    end
    // a frame corrupted on the line
    begin
      frame_t f;
      f.delete();
      for (int i = 0; i < 40; i++) f.push_back(8'($urandom));
      fork
        send(f);
        begin
          @(negedge clk);
          while (!tx_ack) @(negedge clk);
          repeat (15) @(negedge clk);
          flip = 1;
          @(negedge clk);
          flip = 0;
        end
      join
    end
    repeat (60) @(negedge clk);
    check(rx_frames.size() == sent.size(), $sformatf("%0d frames received, %0d sent",
                                                      rx_frames.size(), sent.size()));
    foreach (sent[i]) if (i < rx_frames.size())
      check(rx_frames[i] == sent[i], $sformatf("frame %0d unchanged", i));
    check(n_bad == 1, $sformatf("corrupted frame reported bad (%0d)", n_bad));
    check(char_errors > 0, "code error counted");
    check(n_s == sent.size() + 1, "one /S/ per frame");
    check(frame_fail == 0, "framing of every frame");
    check(ifg_fail == 0, "inter-frame gap kept");
    foreach (sent[i]) if (i < data_lens.size())
      check(data_lens[i] == sent[i].size(), $sformatf("frame %0d length on the line", i));
    check(frames_sent == 16'(sent.size() + 1), "frames_sent counter");
    check(realign_cnt >= 1, "alignment found");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
