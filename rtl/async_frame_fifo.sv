// async_frame_fifo: dual-clock FIFO with frame commit and frame discard.
//
// The four FIFOs of the flow controller (ETH-SFP, SFP-ETH, ETH-UB, UB-ETH)
// each cross between two clock regions and must never hand a reader a frame
// that is later found to be corrupted. The writer therefore keeps two write
// pointers: a working pointer that advances with every written entry and a
// committed pointer that only the reader sees. wr_commit publishes every
// entry written so far (including one written in the same cycle); wr_drop
// rewinds the working pointer to the committed one, discarding the frame
// being written. Only the committed pointer crosses to the read clock, as a
// Gray code through a two-flop synchronizer; the read pointer crosses back
// the same way.
//
// Write side (wr_clk): wr_en/wr_data write one entry when not wr_full
// (a write while full is ignored; the writer is expected to drop the frame).
// wr_full is asserted when the working pointer is DEPTH entries ahead of the
// synchronized read pointer.
// Read side (rd_clk): first-word-fall-through. rd_data shows the oldest
// committed entry whenever rd_empty is low; rd_en consumes it.
// Resets are synchronous, one per clock domain, active low.
// Latency: a committed frame becomes visible to the reader three rd_clk
// edges after the commit edge.
//
// The FIFO depths are not given by the source design and are parameters;
// read data is taken combinationally from the array (distributed-RAM style)
// to give the read-out state machines a show-ahead view.
module async_frame_fifo #(
  parameter int unsigned DATA_W = 9,
  parameter int unsigned ADDR_W = 11
) (
  input  logic              wr_clk,
  input  logic              wr_rst_n,
  input  logic              wr_en,
  input  logic [DATA_W-1:0] wr_data,
  input  logic              wr_commit,
  input  logic              wr_drop,
  output logic              wr_full,

  input  logic              rd_clk,
  input  logic              rd_rst_n,
  input  logic              rd_en,
  output logic [DATA_W-1:0] rd_data,
  output logic              rd_empty
);

  localparam int unsigned DEPTH = 1 << ADDR_W;

  logic [DATA_W-1:0] mem [DEPTH];

  // Pointers carry one extra bit to tell full from empty.
  logic [ADDR_W:0] wptr_work, wptr_commit, wptr_commit_gray;
  logic [ADDR_W:0] rptr, rptr_gray;
  logic [ADDR_W:0] rptr_gray_s1, rptr_gray_s2, rptr_in_wr;
  logic [ADDR_W:0] wcg_s1, wcg_s2, wptr_in_rd;

  function automatic logic [ADDR_W:0] bin2gray(input logic [ADDR_W:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [ADDR_W:0] gray2bin(input logic [ADDR_W:0] g);
    logic [ADDR_W:0] b;
    b[ADDR_W] = g[ADDR_W];
    for (int i = int'(ADDR_W) - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // ---------------- write clock domain ----------------
  logic do_write;
  assign rptr_in_wr = gray2bin(rptr_gray_s2);
  assign wr_full    = (wptr_work - rptr_in_wr) == (ADDR_W + 1)'(DEPTH);
  assign do_write   = wr_en && !wr_full;

  always_ff @(posedge wr_clk) begin
    if (do_write) mem[wptr_work[ADDR_W-1:0]] <= wr_data;
  end

  always_ff @(posedge wr_clk) begin
    if (!wr_rst_n) begin
      wptr_work        <= '0;
      wptr_commit      <= '0;
      wptr_commit_gray <= '0;
      rptr_gray_s1     <= '0;
      rptr_gray_s2     <= '0;
    end else begin
      rptr_gray_s1 <= rptr_gray;
      rptr_gray_s2 <= rptr_gray_s1;
      if (wr_drop) begin
        wptr_work <= wptr_commit;
      end else begin
        logic [ADDR_W:0] next_work;
        next_work = wptr_work + (ADDR_W + 1)'(do_write);
        wptr_work <= next_work;
        if (wr_commit) begin
          wptr_commit      <= next_work;
          wptr_commit_gray <= bin2gray(next_work);
        end
      end
    end
  end

  // ---------------- read clock domain ----------------
  assign wptr_in_rd = gray2bin(wcg_s2);
  assign rd_empty   = (wptr_in_rd == rptr);
  assign rd_data    = mem[rptr[ADDR_W-1:0]];

  always_ff @(posedge rd_clk) begin
    if (!rd_rst_n) begin
      rptr      <= '0;
      rptr_gray <= '0;
      wcg_s1    <= '0;
      wcg_s2    <= '0;
    end else begin
      wcg_s1 <= wptr_commit_gray;
      wcg_s2 <= wcg_s1;
      if (rd_en && !rd_empty) begin
        rptr      <= rptr + 1'b1;
        rptr_gray <= bin2gray(rptr + 1'b1);
      end
    end
  end

  // A reader must not pop an empty FIFO.
  a_no_underflow: assert property (@(posedge rd_clk) disable iff (!rd_rst_n)
                                   rd_en |-> !rd_empty);

endmodule
