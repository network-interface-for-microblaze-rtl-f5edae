// tb_mac_addr_reg: self-checking test of mac_addr_reg.
//
// After reset both sides show the reset address. The processor side
// (10 ns clock) then writes random addresses with gaps; the read-back must
// change at once and the copy in the other clock domain (7 ns clock) must
// take the new value three of its clocks after the write edge and never show a value
// that was not written.
module tb_mac_addr_reg;

  localparam logic [47:0] RST = 48'h0A_1B_2C_3D_4E_5F;

  logic        src_clk = 0, dst_clk = 0, src_rst_n = 0, dst_rst_n = 0;
  logic        wr_en = 0;
  logic [47:0] wr_data = 0, mac_addr_src, mac_addr_dst;

  int checks = 0, failures = 0;

  always #5 src_clk = ~src_clk;
  always #3.5 dst_clk = ~dst_clk;

  mac_addr_reg #(.RESET_ADDR (RST)) dut (.*);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic [47:0] prev_val, cur_val;

  // the destination copy must only ever hold the old or the new value
  always @(posedge dst_clk) if (dst_rst_n && src_rst_n) begin
    checks++;
    if (mac_addr_dst !== prev_val && mac_addr_dst !== cur_val) begin
      failures++;
      $display("FAIL: destination shows %h", mac_addr_dst);
    end
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    prev_val = RST;
    cur_val  = RST;
    repeat (3) @(negedge src_clk);
    src_rst_n = 1;
    dst_rst_n = 1;
    @(negedge src_clk);
    check(mac_addr_src == RST && mac_addr_dst == RST, "reset value on both sides");
    for (int i = 0; i < 100; i++) begin
      logic [47:0] v;
      int n;
      v = {16'($urandom), 32'($urandom)};
      @(negedge src_clk);
      prev_val = cur_val;
      cur_val  = v;
      wr_en   = 1;
      wr_data = v;
      @(negedge src_clk);
      wr_en = 0;
      check(mac_addr_src == v, "read-back follows the write");
      n = 0;
      while (mac_addr_dst != v && n < 10) begin
        @(posedge dst_clk);
        n++;
      end
      // three destination clocks after the write edge; one of them may
      // already have passed when counting starts half a source clock later
      check(n <= 4 && mac_addr_dst == v, $sformatf("destination updated after %0d clocks", n));
      prev_val = v;
      repeat ($urandom_range(1, 4)) @(negedge src_clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
