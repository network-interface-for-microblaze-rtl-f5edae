// tb_comma_align: self-checking test of comma_align.
//
// A stream of code groups (idle commas and data) is laid out as a bit
// stream and cut into raw 10-bit words starting at a chosen bit offset,
// as a deserializer would. After the first comma the aligner must return
// the original code groups, one clock late. Every offset 0..9 is tried, and
// a one-bit slip in the middle of a run must be followed by a realignment.
module tb_comma_align;

  logic       clk = 0;
  logic       rst_n = 0;
  logic [9:0] din = 0;
  logic [9:0] dout;
  logic       aligned;
  logic [7:0] realign_cnt;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  comma_align dut (.clk, .rst_n, .din, .dout, .aligned, .realign_cnt);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Code groups: K28.5 in both disparities and a few balanced data groups
  // (D21.5, D10.2, D16.2+ / D5.6) that contain no comma.
  localparam logic [9:0] K285N = 10'b0011111010;
  localparam logic [9:0] K285P = 10'b1100000101;
  logic [9:0] groups [$];
  bit         stream [$];

  initial begin
    #5000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [9:0] pool [4] = '{10'b1010101010, 10'b0101010101, 10'b1001000101, 10'b1010010110};
    for (int off = 0; off < 10; off++) begin
      groups.delete();
      stream.delete();
      for (int i = 0; i < 40; i++) begin
        if (i % 8 == 0) groups.push_back((i % 16 == 0) ? K285N : K285P);
        else groups.push_back(pool[$urandom_range(3)]);
      end
      // leading junk bits shift the code groups by off
      for (int b = 0; b < off; b++) stream.push_back(1'(b % 2));
      foreach (groups[g]) for (int b = 9; b >= 0; b--) stream.push_back(groups[g][b]);
      @(negedge clk);
      rst_n = 0;
      @(negedge clk);
      rst_n = 1;
      begin
        int nwords, matched;
        nwords  = stream.size() / 10;
        matched = 0;
        for (int w = 0; w < nwords; w++) begin
          for (int b = 0; b < 10; b++) din[9-b] = stream[w*10 + b];
          @(negedge clk);
          // dout now shows the group ending in the previous raw word
          if (aligned && w >= 2) begin
            // the group that starts at bit off in word w-1
            check(dout == groups[w-1], $sformatf("offset %0d word %0d: %b vs %b",
                                                 off, w, dout, groups[w-1]));
            matched++;
          end
        end
        check(matched > 25, $sformatf("offset %0d aligned early enough (%0d)", off, matched));
        check(realign_cnt == 8'd1, $sformatf("offset %0d one alignment (%0d)", off, realign_cnt));
      end
    end
    // bit slip: drop one bit in the middle of the stream
    begin
      int cnt_before;
      groups.delete();
      stream.delete();
      for (int i = 0; i < 60; i++) groups.push_back((i % 6 == 0) ? K285N : 10'b1010101010);
      foreach (groups[g]) for (int b = 9; b >= 0; b--) stream.push_back(groups[g][b]);
      stream.delete(300);  // lose one bit inside group 30
      @(negedge clk);
      rst_n = 0;
      @(negedge clk);
      rst_n = 1;
      for (int w = 0; w < stream.size() / 10; w++) begin
        for (int b = 0; b < 10; b++) din[9-b] = stream[w*10 + b];
        @(negedge clk);
        if (w == 20) cnt_before = realign_cnt;
        if (w >= 40 && w < 59) check(dout == groups[w], $sformatf("after slip word %0d", w));
      end
      check(realign_cnt == 8'(cnt_before + 1), "realigned after the slip");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
