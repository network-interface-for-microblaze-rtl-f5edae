// tb_mac_compare: self-checking test of mac_compare.
//
// Random and directed headers are compared with a random register value:
// exact matches, single-byte and single-bit differences at every position,
// and incomplete headers (fewer than six bytes) that must never match.
module tb_mac_compare;
  import eth_pkg::*;

  logic [5:0][7:0] hdr;
  logic [2:0]      hdr_count;
  logic [47:0]     mac_addr;
  logic            match;

  int checks = 0, failures = 0;

  mac_compare dut (.*);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // header bytes in wire order from a 48-bit address, first byte = [47:40]
  function automatic logic [5:0][7:0] to_hdr(input logic [47:0] a);
    logic [5:0][7:0] h;
    for (int i = 0; i < 6; i++) h[i] = a[47 - 8*i -: 8];
    return h;
  endfunction

  initial begin
    for (int t = 0; t < 500; t++) begin
      logic [47:0] a;
      a = {16'($urandom), 32'($urandom)};
      mac_addr  = a;
      hdr       = to_hdr(a);
      hdr_count = 3'd6;
      #1;
      check(match, "equal address matches");
      // one bit flipped anywhere
      begin
        int bit_i;
        bit_i = $urandom_range(47);
        hdr = to_hdr(a ^ (48'd1 << bit_i));
        #1;
        check(!match, $sformatf("bit %0d flipped must not match", bit_i));
      end
      // byte order: reversed address only matches a palindrome
      hdr = to_hdr({a[7:0], a[15:8], a[23:16], a[31:24], a[39:32], a[47:40]});
      #1;
      check(match == (a[47:40] == a[7:0] && a[39:32] == a[15:8] && a[31:24] == a[23:16]),
            "byte order of the comparison");
      // incomplete header
      hdr       = to_hdr(a);
      hdr_count = 3'($urandom_range(5));
      #1;
      check(!match, "short header must not match");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
