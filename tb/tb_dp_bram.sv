// tb_dp_bram: self-checking test of dp_bram.
//
// Both ports run random reads and byte-masked writes on their own clocks
// (10 ns and 14 ns) against a reference array. Each port only works on its
// own half of the addresses in the random phase, so collisions never make
// the result undefined; a directed phase then writes through one port and
// reads back through the other, and checks the one-clock read latency and
// the read-first behaviour of a write.
module tb_dp_bram;

  localparam int AW = 6;

  logic          a_clk = 0, b_clk = 0;
  logic          a_en = 0, b_en = 0;
  logic [3:0]    a_we = 0, b_we = 0;
  logic [AW-1:0] a_addr = 0, b_addr = 0;
  logic [31:0]   a_din = 0, b_din = 0, a_dout, b_dout;

  int checks = 0, failures = 0;

  always #5 a_clk = ~a_clk;
  always #7 b_clk = ~b_clk;

  dp_bram #(.ADDR_W (AW)) dut (.*);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #3000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] model [1 << AW];

  function automatic logic [31:0] merge(input logic [31:0] old, input logic [31:0] d, input logic [3:0] we);
    for (int i = 0; i < 4; i++) if (we[i]) old[8*i +: 8] = d[8*i +: 8];
    return old;
  endfunction

  // port A: lower half, port B: upper half
  task automatic port_a_ops(input int n);
    for (int i = 0; i < n; i++) begin
      logic [31:0] exp_q;
      logic [AW-1:0] ad;
      @(negedge a_clk);
      ad = AW'($urandom_range((1 << (AW - 1)) - 1));
      a_en = 1; a_addr = ad; a_we = 4'($urandom); a_din = $urandom;
      exp_q = model[ad];
      model[ad] = merge(model[ad], a_din, a_we);
      @(negedge a_clk);
      a_en = 0; a_we = 0;
      check(a_dout == exp_q, $sformatf("port A read-first at %0d", ad));
    end
  endtask

  task automatic port_b_ops(input int n);
    for (int i = 0; i < n; i++) begin
      logic [31:0] exp_q;
      logic [AW-1:0] ad;
      @(negedge b_clk);
      ad = AW'((1 << (AW - 1)) + $urandom_range((1 << (AW - 1)) - 1));
      b_en = 1; b_addr = ad; b_we = 4'($urandom); b_din = $urandom;
      exp_q = model[ad];
      model[ad] = merge(model[ad], b_din, b_we);
      @(negedge b_clk);
      b_en = 0; b_we = 0;
      check(b_dout == exp_q, $sformatf("port B read-first at %0d", ad));
    end
  endtask

  initial begin
    // initialise every word through port A
    for (int i = 0; i < (1 << AW); i++) begin
      @(negedge a_clk);
      a_en = 1; a_we = 4'hF; a_addr = AW'(i); a_din = 32'(i * 32'h01010101);
      model[i] = a_din;
    end
    @(negedge a_clk);
    a_en = 0; a_we = 0;
    fork
      port_a_ops(400);
      port_b_ops(400);
    join
    // cross-port: write on B, read on A, and the other way round
    for (int i = 0; i < 50; i++) begin
      logic [AW-1:0] ad;
      logic [31:0]   v;
      logic [3:0]    m;
      ad = AW'($urandom);
      v  = $urandom;
      m  = 4'($urandom);
      @(negedge b_clk);
      b_en = 1; b_we = m; b_addr = ad; b_din = v;
      model[ad] = merge(model[ad], v, m);
      @(negedge b_clk);
      b_en = 0; b_we = 0;
      @(negedge a_clk);
      a_en = 1; a_addr = ad;
      @(negedge a_clk);
      a_en = 0;
      check(a_dout == model[ad], "B write seen by A");
      a_addr = ~ad;
      @(negedge a_clk);
      check(a_dout == model[ad], "dout holds while en is low");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
