// tb_frame_writer: self-checking test of frame_writer.
//
// Frames are driven on a MAC client receive interface (rx_dv/rx_data, then
// a one-cycle rx_good or rx_bad). The FIFO write port is modelled in the
// testbench: written entries collect in a pending list that a commit
// appends to the committed list and a drop clears. Good frames must arrive
// whole with the last flag on the final byte only; bad frames and frames
// that met a full FIFO must be dropped; the counters must agree.
module tb_frame_writer;
  import eth_pkg::*;

  logic       clk = 0, rst_n = 0;
  logic       rx_dv = 0, rx_good = 0, rx_bad = 0;
  logic [7:0] rx_data = 0;
  logic       fifo_wr_en, fifo_commit, fifo_drop, fifo_full = 0;
  fifo_word_t fifo_wr_data;
  logic [15:0] frames_ok, frames_dropped;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  frame_writer dut (.*);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #3000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  fifo_word_t pend [$], committed [$], expect_q [$];
  int n_ok = 0, n_drop = 0;

  always @(posedge clk) begin
    if (fifo_wr_en && !fifo_full) pend.push_back(fifo_wr_data);
    if (fifo_drop) pend.delete();
    else if (fifo_commit) begin
      foreach (pend[i]) committed.push_back(pend[i]);
      pend.delete();
    end
  end

  // kind: 0 good, 1 bad, 2 FIFO full in the middle
  task automatic send(input int len, input int kind);
    byte unsigned b [];
    b = new[len];
    foreach (b[i]) b[i] = 8'($urandom);
    for (int i = 0; i < len; i++) begin
      @(negedge clk);
      rx_dv = 1; rx_data = b[i];
      fifo_full = (kind == 2 && i == len / 2);
    end
    @(negedge clk);
    rx_dv = 0;
    fifo_full = 0;
    // the MAC may take a few cycles before the status pulse
    repeat ($urandom_range(2)) @(negedge clk);
    rx_good = (kind != 1);
    rx_bad  = (kind == 1);
    @(negedge clk);
    rx_good = 0; rx_bad = 0;
    if (kind == 0) begin
      for (int i = 0; i < len; i++) expect_q.push_back('{last: (i == len - 1), data: b[i]});
      n_ok++;
    end else begin
      n_drop++;
    end
    repeat ($urandom_range(3)) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 200; f++) begin
      int k;
      k = $urandom_range(9);
      send($urandom_range(2, 80), (k < 6) ? 0 : (k < 8) ? 1 : 2);
    end
    send(1, 0);
    send(64, 2);
    send(64, 0);
    repeat (5) @(negedge clk);
    check(committed.size() == expect_q.size(),
          $sformatf("committed %0d entries, expected %0d", committed.size(), expect_q.size()));
    for (int i = 0; i < committed.size() && i < expect_q.size(); i++)
      check(committed[i] == expect_q[i], $sformatf("entry %0d: %h vs %h", i, committed[i], expect_q[i]));
    check(pend.size() == 0, "nothing left uncommitted");
    check(frames_ok == 16'(n_ok), $sformatf("frames_ok %0d vs %0d", frames_ok, n_ok));
    check(frames_dropped == 16'(n_drop), $sformatf("frames_dropped %0d vs %0d", frames_dropped, n_drop));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
