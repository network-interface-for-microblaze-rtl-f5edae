// dec_8b10b: registered 8b/10b decoder with error detection.
//
// Each cycle with en high, the aligned code group din (bit 9 = first bit on
// the line) is decoded and the result appears at the next edge: dout and k
// for the byte, code_err when the group is not a valid code group in either
// disparity, disp_err when an unbalanced sub-block has the wrong sign for
// the running disparity. The 6-bit and 4-bit sub-blocks are looked up by
// comparing them with both forms of every entry of the encoder tables in
// code8b10b_pkg, so the decoder is the exact inverse of enc_8b10b. The
// running disparity follows the received code groups, also after an error.
// Reset (synchronous, active low) sets negative disparity and clears the
// outputs. The 8b/10b conversion is named by the source design; the code
// itself is the standard one.
module dec_8b10b
  import code8b10b_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic [9:0] din,
  output logic [7:0] dout,
  output logic       k,
  output logic       code_err,
  output logic       disp_err,
  output logic       valid
);

  logic       rd;
  logic [5:0] c6;
  logic [3:0] c4;
  logic [4:0] x;
  logic [2:0] y;
  logic       x_ok, y_ok, k28, a7, is_k, cerr, derr, rd6, rd10;
  int         n6, n4;

  always_comb begin
    c6 = din[9:4];
    c4 = din[3:0];
    n6 = ones6(c6);
    n4 = ones4(c4);

    // 6b sub-block
    x    = '0;
    x_ok = 1'b0;
    k28  = (c6 == K28_6B_NEG) || (c6 == ~K28_6B_NEG);
    if (k28) begin
      x    = 5'd28;
      x_ok = 1'b1;
    end else begin
      for (int i = 0; i < 32; i++) begin
        if (c6 == enc6(5'(i), 1'b0, 1'b0) || c6 == enc6(5'(i), 1'b0, 1'b1)) begin
          x    = 5'(i);
          x_ok = 1'b1;
        end
      end
    end
    rd6 = rd_after(n6, 6, rd);

    // 4b sub-block
    y    = '0;
    y_ok = 1'b0;
    a7   = (c4 == A7_NEG) || (c4 == ~A7_NEG);
    for (int j = 0; j < 8; j++) begin
      // K28 fixes the disparity of its 6b part, which selects between
      // K28.1/K28.6 and K28.2/K28.5; a data 4b group only has a
      // complemented form when it is unbalanced or is D.x.3.
      if (k28) begin
        if (c4 == (rd6 ? ~enc4k_neg(3'(j)) : enc4k_neg(3'(j)))) begin
          y    = 3'(j);
          y_ok = 1'b1;
        end
      end else if (c4 == enc4d_neg(3'(j)) ||
                   ((ones4(enc4d_neg(3'(j))) != 2 || j == 3) &&
                    c4 == ~enc4d_neg(3'(j)))) begin
        y    = 3'(j);
        y_ok = 1'b1;
      end
    end
    is_k = k28;
    if (!k28 && a7) begin
      y    = 3'd7;
      y_ok = 1'b1;
      if (x == 5'd23 || x == 5'd27 || x == 5'd29 || x == 5'd30) is_k = 1'b1;
      else if (!(x == 5'd17 || x == 5'd18 || x == 5'd20 ||
                 x == 5'd11 || x == 5'd13 || x == 5'd14)) y_ok = 1'b0;
    end

    cerr = !x_ok || !y_ok || n6 < 2 || n6 > 4 || n4 < 1 || n4 > 3;
    derr = (n6 == 4 && rd) || (n6 == 2 && !rd) ||
           (n4 == 3 && rd6) || (n4 == 1 && !rd6);
    rd10 = rd_after(n4, 4, rd6);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd       <= 1'b0;
      dout     <= '0;
      k        <= 1'b0;
      code_err <= 1'b0;
      disp_err <= 1'b0;
      valid    <= 1'b0;
    end else begin
      valid <= en;
      if (en) begin
        rd       <= rd10;
        dout     <= {y, x};
        k        <= is_k;
        code_err <= cerr;
        disp_err <= derr;
      end
    end
  end

endmodule
