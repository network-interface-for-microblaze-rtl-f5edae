// tb_frame_source: testbench model of a show-ahead frame FIFO read port.
//
// Holds whole frames in a queue. rd_empty and rd_data change after a clock
// edge like the outputs of a flop, so the model behaves like the read side
// of async_frame_fifo as seen from its reader. push() adds a frame; it is
// meant to be called between clock edges.
module tb_frame_source
  import eth_pkg::*;
(
  input  logic       clk,
  input  logic       rd_en,
  output fifo_word_t rd_data,
  output logic       rd_empty
);

  fifo_word_t q [$];

  initial begin
    rd_empty = 1'b1;
    rd_data  = '0;
  end

  always @(posedge clk) begin
    if (rd_en && !rd_empty) void'(q.pop_front());
    rd_empty <= (q.size() == 0);
    rd_data  <= (q.size() == 0) ? '0 : q[0];
  end

  function automatic void push(input logic [7:0] b [$]);
    foreach (b[i]) q.push_back('{last: (i == b.size() - 1), data: b[i]});
    rd_empty = (q.size() == 0);
    rd_data  = q[0];
  endfunction

  function automatic int size();
    return q.size();
  endfunction

endmodule
