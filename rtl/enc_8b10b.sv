// enc_8b10b: registered 8b/10b encoder with running disparity.
//
// Each clock cycle with en high, the byte din (a control character when k
// is high) is turned into a 10-bit code group on dout at the next edge, and
// the running disparity moves to the value after that code group. rd shows
// the current running disparity (1 = positive); the SFP-side MAC looks at it
// to choose the idle ordered set that returns the line to negative
// disparity. The tables are those of code8b10b_pkg. dout bit 9 is sent
// first. Reset (synchronous, active low) puts K28.5 in its negative form on
// dout and sets the running disparity to positive, the state after that
// code group. The 8b/10b conversion is named by the source design;
// the code itself is the standard one.
module enc_8b10b
  import code8b10b_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic [7:0] din,
  input  logic       k,
  output logic [9:0] dout,
  output logic       rd
);

  logic [10:0] enc;

  assign enc = encode(din, k, rd);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd   <= 1'b1;
      dout <= 10'b0011111010;  // K28.5, negative form
    end else if (en) begin
      rd   <= enc[10];
      dout <= enc[9:0];
    end
  end

endmodule
