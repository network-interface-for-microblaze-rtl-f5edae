// code8b10b_pkg: the 8b/10b transmission code (IEEE 802.3 clause 36).
//
// A byte HGF EDCBA is sent as the 6-bit sub-block abcdei (from EDCBA) and
// the 4-bit sub-block fghj (from HGF). Each sub-block has a "negative"
// form, listed in the tables below, and a "positive" form, its complement;
// which one is sent depends on the running disparity (RD) so that the line
// stays DC-balanced. Code groups are written {a,b,c,d,e,i,f,g,h,j}, so bit 9
// is bit a, the first bit on the line.
//
// encode() returns the 10-bit code group and the RD after it; rd = 1 means
// positive. Control characters (k = 1) are K28.0-K28.7 and K23.7, K27.7,
// K29.7, K30.7; for other k inputs the data code group is returned.
package code8b10b_pkg;

  // 5b/6b, negative-disparity form (the form sent when RD is negative).
  function automatic logic [5:0] enc6_neg(input logic [4:0] x);
    unique case (x)
      5'd0:  return 6'b100111;  5'd1:  return 6'b011101;
      5'd2:  return 6'b101101;  5'd3:  return 6'b110001;
      5'd4:  return 6'b110101;  5'd5:  return 6'b101001;
      5'd6:  return 6'b011001;  5'd7:  return 6'b111000;
      5'd8:  return 6'b111001;  5'd9:  return 6'b100101;
      5'd10: return 6'b010101;  5'd11: return 6'b110100;
      5'd12: return 6'b001101;  5'd13: return 6'b101100;
      5'd14: return 6'b011100;  5'd15: return 6'b010111;
      5'd16: return 6'b011011;  5'd17: return 6'b100011;
      5'd18: return 6'b010011;  5'd19: return 6'b110010;
      5'd20: return 6'b001011;  5'd21: return 6'b101010;
      5'd22: return 6'b011010;  5'd23: return 6'b111010;
      5'd24: return 6'b110011;  5'd25: return 6'b100110;
      5'd26: return 6'b010110;  5'd27: return 6'b110110;
      5'd28: return 6'b001110;  5'd29: return 6'b101110;
      5'd30: return 6'b011110;  default: return 6'b101011;
    endcase
  endfunction

  localparam logic [5:0] K28_6B_NEG = 6'b001111;

  // 3b/4b for data, negative form; y = 7 gives the primary form P7.
  function automatic logic [3:0] enc4d_neg(input logic [2:0] y);
    unique case (y)
      3'd0: return 4'b1011;  3'd1: return 4'b1001;
      3'd2: return 4'b0101;  3'd3: return 4'b1100;
      3'd4: return 4'b1101;  3'd5: return 4'b1010;
      3'd6: return 4'b0110;  default: return 4'b1110;
    endcase
  endfunction

  localparam logic [3:0] A7_NEG = 4'b0111;

  // 3b/4b for control characters, negative form.
  function automatic logic [3:0] enc4k_neg(input logic [2:0] y);
    unique case (y)
      3'd0: return 4'b1011;  3'd1: return 4'b0110;
      3'd2: return 4'b1010;  3'd3: return 4'b1100;
      3'd4: return 4'b1101;  3'd5: return 4'b0101;
      3'd6: return 4'b1001;  default: return 4'b0111;
    endcase
  endfunction

  function automatic int ones6(input logic [5:0] v);
    return int'(v[0]) + int'(v[1]) + int'(v[2]) + int'(v[3]) + int'(v[4]) + int'(v[5]);
  endfunction

  function automatic int ones4(input logic [3:0] v);
    return int'(v[0]) + int'(v[1]) + int'(v[2]) + int'(v[3]);
  endfunction

  // Valid control character?
  function automatic logic is_valid_k(input logic [7:0] d);
    return (d[4:0] == 5'd28) ||
           (d[7:5] == 3'd7 && (d[4:0] == 5'd23 || d[4:0] == 5'd27 ||
                               d[4:0] == 5'd29 || d[4:0] == 5'd30));
  endfunction

  // Data byte x.y whose 4b sub-block uses the alternate form A7.
  function automatic logic use_a7(input logic [4:0] x, input logic rd6);
    return (!rd6 && (x == 5'd17 || x == 5'd18 || x == 5'd20)) ||
           ( rd6 && (x == 5'd11 || x == 5'd13 || x == 5'd14));
  endfunction

  // 6b sub-block for byte low bits x and RD rd.
  function automatic logic [5:0] enc6(input logic [4:0] x, input logic k28, input logic rd);
    logic [5:0] c;
    c = k28 ? K28_6B_NEG : enc6_neg(x);
    if (rd && (ones6(c) != 3 || (!k28 && x == 5'd7))) c = ~c;
    return c;
  endfunction

  // RD after a sub-block with n ones out of w bits.
  function automatic logic rd_after(input int n, input int w, input logic rd);
    return (2 * n > w) ? 1'b1 : (2 * n < w) ? 1'b0 : rd;
  endfunction

  // Encode one byte: returns {rd_out, code[9:0]}.
  function automatic logic [10:0] encode(input logic [7:0] d, input logic k, input logic rd);
    logic       kk, k28, rd6;
    logic [5:0] c6;
    logic [3:0] c4;
    kk  = k && is_valid_k(d);
    k28 = kk && d[4:0] == 5'd28;
    c6  = enc6(d[4:0], k28, rd);
    rd6 = rd_after(ones6(c6), 6, rd);
    if (kk) begin
      c4 = enc4k_neg(d[7:5]);
      if (rd6) c4 = ~c4;
    end else begin
      c4 = (d[7:5] == 3'd7 && use_a7(d[4:0], rd6)) ? A7_NEG : enc4d_neg(d[7:5]);
      if (rd6 && (ones4(c4) != 2 || d[7:5] == 3'd3)) c4 = ~c4;
    end
    return {rd_after(ones4(c4), 4, rd6), c6, c4};
  endfunction

endpackage
