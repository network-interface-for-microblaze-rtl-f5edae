// tb_client_sink: testbench model of a MAC accepting frames on its client
// transmit interface.
//
// When tx_dv rises it waits a random 0..MAX_ACK_WAIT clocks, pulses tx_ack,
// and from then on takes one byte per clock until tx_dv falls. Each frame
// is stored in frames[].
module tb_client_sink #(
  parameter int MAX_ACK_WAIT = 3
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       tx_dv,
  input  logic [7:0] tx_data,
  output logic       tx_ack
);

  typedef logic [7:0] frame_t [$];
  frame_t frames [$];
  logic [7:0] cur [$];
  bit in_frame = 0;

  initial tx_ack = 1'b0;

  always @(posedge clk) begin
    if (rst_n) begin
      if (tx_dv && !in_frame) begin
        if (tx_ack) begin
          in_frame = 1;
          cur.delete();
          cur.push_back(tx_data);
        end
      end else if (in_frame) begin
        if (tx_dv) cur.push_back(tx_data);
        else begin
          frames.push_back(cur);
          in_frame = 0;
        end
      end
    end
  end

  initial begin
    forever begin
      @(negedge clk);
      tx_ack = 1'b0;
      if (tx_dv && !in_frame) begin
        repeat ($urandom_range(MAX_ACK_WAIT)) @(negedge clk);
        tx_ack = 1'b1;
      end
    end
  end

  function automatic bit busy();
    return in_frame || tx_dv;
  endfunction

endmodule
