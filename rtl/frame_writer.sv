// frame_writer: write-in state machine ("W") of a flow-controller FIFO.
//
// It takes frames from a MAC client receive interface and writes them, one
// byte per entry, into an async_frame_fifo. The client interface marks data
// bytes with rx_dv/rx_data and reports the frame's fate after its last byte
// with a one-cycle rx_good (GF) or rx_bad (BF) pulse. Because the last byte
// is only known when GF arrives, each byte is held for one cycle and
// written when the next byte arrives; on GF the held byte is written with
// its end-of-frame flag set and the frame is committed in the same cycle.
// On BF the frame is discarded, as it is when the FIFO was full for any
// byte of the frame (overflow). Dropping corrupted frames is the flow
// controller's job in the source design; dropping on overflow, the held
// byte and the statistics counters are this design's own choices.
//
// Timing: a byte enters the FIFO one cycle after it is presented; the
// frame is committed in the cycle of the GF pulse. All outputs are
// synchronous to clk; reset is synchronous, active low.
module frame_writer
  import eth_pkg::*;
#(
  parameter int unsigned CNT_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  // MAC client receive interface
  input  logic             rx_dv,
  input  logic [7:0]       rx_data,
  input  logic             rx_good,
  input  logic             rx_bad,
  // frame FIFO write port
  output logic             fifo_wr_en,
  output fifo_word_t       fifo_wr_data,
  output logic             fifo_commit,
  output logic             fifo_drop,
  input  logic             fifo_full,
  // statistics
  output logic [CNT_W-1:0] frames_ok,
  output logic [CNT_W-1:0] frames_dropped
);

  logic       held_valid;
  logic [7:0] held_data;
  logic       overflow;

  always_comb begin
    fifo_wr_en        = 1'b0;
    fifo_wr_data.data = held_data;
    fifo_wr_data.last = 1'b0;
    fifo_commit       = 1'b0;
    fifo_drop         = 1'b0;
    if (rx_bad) begin
      fifo_drop = 1'b1;
    end else if (rx_good) begin
      if (overflow || (held_valid && fifo_full)) begin
        fifo_drop = 1'b1;
      end else begin
        fifo_wr_en        = held_valid;
        fifo_wr_data.last = 1'b1;
        fifo_commit       = held_valid;
      end
    end else if (rx_dv && held_valid) begin
      fifo_wr_en = !overflow;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      held_valid     <= 1'b0;
      held_data      <= '0;
      overflow       <= 1'b0;
      frames_ok      <= '0;
      frames_dropped <= '0;
    end else begin
      if (rx_good || rx_bad) begin
        held_valid <= 1'b0;
        overflow   <= 1'b0;
        if (fifo_commit) frames_ok <= frames_ok + 1'b1;
        else if (fifo_drop) frames_dropped <= frames_dropped + 1'b1;
      end else if (rx_dv) begin
        held_valid <= 1'b1;
        held_data  <= rx_data;
        if (held_valid && fifo_full) overflow <= 1'b1;
      end
    end
  end

  // The client interface never reports a frame good and bad at once.
  a_gf_bf_exclusive: assert property (@(posedge clk) disable iff (!rst_n)
                                      !(rx_good && rx_bad));

endmodule
