// dp_bram: true dual-port block RAM holding the processor's frame buffers.
//
// Two independent ports, A and B, each with its own clock, can read and
// write the same array at the same time, as the FPGA's block RAM cells do.
// Port A belongs to the frame buffer controller, port B to the processor's
// memory controller. Words are 32 bits with one write enable per byte;
// byte lane 0 is bits [31:24] (big-endian, the processor's byte order).
// With the default ADDR_W = 10 the RAM holds 4 KB: a 2 KB receive buffer and
// a 2 KB transmit buffer. The size follows the source design; the word width
// and byte order are this design's choice.
//
// Timing: synchronous. With en high the word at addr appears on dout after
// the clock edge (read-first: a write returns the old contents); bytes with
// we set are written at that edge. Writes to one address from both ports in
// the same cycle leave it undefined, as in the hardware. The array is
// written from two always_ff blocks, one per port clock, which is how a true
// dual-port RAM is described; the multiple-driver lint warning on it stands
// for that reason.
module dp_bram #(
  parameter int unsigned ADDR_W = 10
) (
  input  logic              a_clk,
  input  logic              a_en,
  input  logic [3:0]        a_we,
  input  logic [ADDR_W-1:0] a_addr,
  input  logic [31:0]       a_din,
  output logic [31:0]       a_dout,

  input  logic              b_clk,
  input  logic              b_en,
  input  logic [3:0]        b_we,
  input  logic [ADDR_W-1:0] b_addr,
  input  logic [31:0]       b_din,
  output logic [31:0]       b_dout
);

  logic [3:0][7:0] mem [1 << ADDR_W];

  always_ff @(posedge a_clk) begin
    if (a_en) begin
      a_dout <= mem[a_addr];
      for (int i = 0; i < 4; i++)
        if (a_we[i]) mem[a_addr][i] <= a_din[8*i +: 8];
    end
  end

  always_ff @(posedge b_clk) begin
    if (b_en) begin
      b_dout <= mem[b_addr];
      for (int i = 0; i < 4; i++)
        if (b_we[i]) mem[b_addr][i] <= b_din[8*i +: 8];
    end
  end

endmodule
