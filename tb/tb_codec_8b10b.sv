// tb_codec_8b10b: self-checking test of enc_8b10b and dec_8b10b.
//
// Part 1 feeds the encoder a fixed sequence of characters and compares each
// code group with the value from the published 8b/10b code tables, for both
// running disparities; the expected disparity is tracked independently by
// counting ones. Part 2 chains encoder and decoder and sends every data
// byte and every valid control character in random order, checking that
// each comes back unchanged and without error flags, and that the line
// disparity never leaves +-1. Part 3 feeds the decoder invalid code groups
// and a code group of the wrong disparity and checks the error flags.
module tb_codec_8b10b;
  import eth_pkg::*;

  logic       clk = 0;
  logic       rst_n = 0;
  logic       en = 0;
  logic [7:0] din = 0;
  logic       k = 0;
  logic [9:0] code;
  logic       rd;

  logic       dsel = 0;        // 0: decoder gets encoder output
  logic [9:0] dforce = 0;
  logic [9:0] ddin;
  logic [7:0] dout;
  logic       dk, cerr, derr, dvalid;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  enc_8b10b u_enc (.clk, .rst_n, .en, .din, .k, .dout (code), .rd);

  assign ddin = dsel ? dforce : code;
  dec_8b10b u_dec (.clk, .rst_n, .en (1'b1), .din (ddin), .dout, .k (dk),
                   .code_err (cerr), .disp_err (derr), .valid (dvalid));

  function automatic int ones10(input logic [9:0] v);
    int n = 0;
    for (int i = 0; i < 10; i++) n += int'(v[i]);
    return n;
  endfunction

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Encode one character and compare with the table value.
  task automatic enc_check(input logic [7:0] d, input logic kk, input logic [9:0] exp_code);
    @(negedge clk);
    din = d; k = kk; en = 1;
    @(negedge clk);
    en = 0;
    check(code == exp_code, $sformatf("encode %s%02h: got %b exp %b",
                                      kk ? "K" : "D", d, code, exp_code));
  endtask

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Part 2 bookkeeping: expected decoder outputs, two cycles behind.
  logic [8:0] sent_q [$];
  int         disp;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    dsel  = 1;           // keep the decoder out of part 1
    dforce = 10'b0011111010;
    // ---------- part 1: table values ----------
    enc_check(K28_5, 1, 10'b1100000101);  // RD+ (state after reset)
    enc_check(K28_5, 1, 10'b0011111010);  // RD-
    enc_check(K28_5, 1, 10'b1100000101);  // RD+
    enc_check(8'h00, 0, 10'b1001110100);  // D0.0 RD-
    enc_check(D16_2, 0, 10'b0110110101);  // D16.2 RD-
    enc_check(D16_2, 0, 10'b1001000101);  // D16.2 RD+
    enc_check(K27_7, 1, 10'b1101101000);  // K27.7 RD-
    enc_check(K29_7, 1, 10'b1011101000);  // K29.7 RD-
    enc_check(K23_7, 1, 10'b1110101000);  // K23.7 RD-
    enc_check(D5_6,  0, 10'b1010010110);  // D5.6
    enc_check(8'hEB, 0, 10'b1101001110);  // D11.7 RD- (P7)
    enc_check(8'hEB, 0, 10'b1101001000);  // D11.7 RD+ (A7)
    enc_check(8'h07, 0, 10'b1110001011);  // D7.0 RD-
    enc_check(8'hF1, 0, 10'b1000110001);  // D17.7 RD+ (P7)
    enc_check(8'hF7, 0, 10'b1110100001);  // D23.7 RD- (P7)
    enc_check(8'hF1, 0, 10'b1000110111);  // D17.7 RD- (A7)
    enc_check(8'hF7, 0, 10'b0001011110);  // D23.7 RD+
    enc_check(8'hB5, 0, 10'b1010101010);  // D21.5
    enc_check(8'h3C, 1, 10'b1100000110);  // K28.1 RD+
    enc_check(8'h3C, 1, 10'b0011111001);  // K28.1 RD-
    enc_check(8'hDC, 1, 10'b1100001001);  // K28.6 RD+
    enc_check(8'hDC, 1, 10'b0011110110);  // K28.6 RD-
    enc_check(K29_7, 1, 10'b0100010111);  // K29.7 RD+
    enc_check(K23_7, 1, 10'b0001010111);  // K23.7 RD+
    enc_check(K27_7, 1, 10'b0010010111);  // K27.7 RD+
    check(rd == 1'b1, "running disparity after K27.7 RD+");

    // ---------- part 2: round trip ----------
    @(negedge clk);
    rst_n = 0;
    @(negedge clk);
    rst_n = 1;
    dsel = 0;
    disp = 0;
    begin
      logic [8:0] chars [$];
      int got = 0;
      for (int i = 0; i < 256; i++) chars.push_back({1'b0, 8'(i)});
      for (int i = 0; i < 8; i++) chars.push_back({1'b1, 3'(i), 5'd28});
      chars.push_back({1'b1, K23_7}); chars.push_back({1'b1, K27_7});
      chars.push_back({1'b1, K29_7}); chars.push_back({1'b1, 8'hFE});
      chars.shuffle();
      for (int n = 0; n < chars.size() + 2; n++) begin
        @(negedge clk);
        if (n < chars.size()) begin
          en = 1; k = chars[n][8]; din = chars[n][7:0];
          sent_q.push_back(chars[n]);
        end else begin
          en = 0;
        end
        // the decoder output of this cycle belongs to the character sent
        // two cycles earlier (encoder register, decoder register)
        if (n >= 2) begin
          logic [8:0] e;
          e = sent_q.pop_front();
          check({dk, dout} == e && !cerr && !derr,
                $sformatf("round trip %h: got k=%b d=%h cerr=%b derr=%b",
                          e, dk, dout, cerr, derr));
          got++;
        end
        if (n >= 1 && n <= chars.size()) begin
          disp += ones10(code) * 2 - 10;
          check(disp >= -2 && disp <= 2, "line disparity bounded");
        end
      end
      check(got == chars.size(), "all characters decoded");
    end

    // ---------- part 3: error detection ----------
    @(negedge clk);
    rst_n = 0;
    dsel = 1;
    @(negedge clk);
    rst_n = 1;
    dforce = 10'b1100000101;  // K28.5 RD+ while the decoder is at RD-
    @(negedge clk);
    check(derr && !cerr && dk && dout == K28_5, "disparity error flagged");
    dforce = 10'b0000000000;
    @(negedge clk);
    check(cerr, "all-zero group is a code error");
    dforce = 10'b1111110000;
    @(negedge clk);
    check(cerr, "111111 sub-block is a code error");
    dforce = 10'b1010101010;
    @(negedge clk);
    check(!cerr && !dk && dout == 8'hB5, "D21.5 after errors");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
