// comma_align: code-group alignment of the received 10-bit stream.
//
// The deserializer delivers 10 bits per clock with no knowledge of where a
// code group starts. The comma, the 7-bit pattern 0011111 or 1100000 at
// the head of K28.5, only occurs at a code-group boundary in a valid
// 8b/10b stream. This block joins the previous and the current raw word
// into a 20-bit window (bit 19 = earliest bit), looks for a comma at each
// of the ten possible offsets, and from then on cuts every output word at
// the offset where the last comma was found. aligned rises with the first
// comma; realign_cnt counts commas found at a new offset. Frame
// synchronization on the optical side is named by the source design; the
// method is the usual one and this design's choice.
//
// Timing: dout is registered, one clock after the raw word that completes
// it. Reset is synchronous, active low.
module comma_align (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [9:0] din,
  output logic [9:0] dout,
  output logic       aligned,
  output logic [7:0] realign_cnt
);

  logic [9:0]  prev;
  logic [19:0] window;
  logic [3:0]  offset, found_off;
  logic        found;

  assign window = {prev, din};

  always_comb begin
    found     = 1'b0;
    found_off = '0;
    for (int o = 9; o >= 0; o--) begin
      if (window[19-o -: 7] == 7'b0011111 || window[19-o -: 7] == 7'b1100000) begin
        found     = 1'b1;
        found_off = 4'(o);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      prev        <= '0;
      offset      <= '0;
      aligned     <= 1'b0;
      realign_cnt <= '0;
      dout        <= '0;
    end else begin
      prev <= din;
      if (found) begin
        offset  <= found_off;
        aligned <= 1'b1;
        if (found_off != offset || !aligned) realign_cnt <= realign_cnt + 8'd1;
        dout <= window[19 - found_off -: 10];
      end else begin
        dout <= window[19 - offset -: 10];
      end
    end
  end

endmodule
