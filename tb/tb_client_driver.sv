// tb_client_driver: testbench model of a MAC delivering frames on its
// client receive interface.
//
// send() presents the bytes of a frame on rx_dv/rx_data, one per clock,
// then after 0..2 idle clocks pulses rx_good, or rx_bad for a frame the
// MAC found corrupted.
module tb_client_driver (
  input  logic       clk,
  output logic       rx_dv,
  output logic [7:0] rx_data,
  output logic       rx_good,
  output logic       rx_bad
);

  initial begin
    rx_dv   = 1'b0;
    rx_data = '0;
    rx_good = 1'b0;
    rx_bad  = 1'b0;
  end

  task automatic send(input logic [7:0] f [$], input bit bad);
    foreach (f[i]) begin
      @(negedge clk);
      rx_dv   = 1'b1;
      rx_data = f[i];
    end
    @(negedge clk);
    rx_dv = 1'b0;
    repeat ($urandom_range(2)) @(negedge clk);
    rx_good = !bad;
    rx_bad  = bad;
    @(negedge clk);
    rx_good = 1'b0;
    rx_bad  = 1'b0;
  endtask

endmodule
