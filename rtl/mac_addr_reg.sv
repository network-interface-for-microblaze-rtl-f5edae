// mac_addr_reg: MAC address register written by the processor.
//
// The processor writes the 48-bit station address in its own clock domain
// (src_clk, wr_en/wr_data); mac_addr_src reads it back. The value is used by
// the MAC compare unit in another clock domain (dst_clk). A write toggles a
// flag that crosses to dst_clk through two flops; on seeing the toggle the
// destination side copies the source register, which has been stable since
// the write. A second write less than about four dst_clk cycles after the
// first may be missed until the next write; the processor writes the
// address rarely. Both sides reset to RESET_ADDR. The register and its
// software control follow the source design; the toggle crossing and the
// reset value are this design's own choices.
//
// Latency: mac_addr_dst changes three dst_clk edges after the write edge.
module mac_addr_reg #(
  parameter logic [47:0] RESET_ADDR = 48'h02_00_00_00_00_01
) (
  input  logic        src_clk,
  input  logic        src_rst_n,
  input  logic        wr_en,
  input  logic [47:0] wr_data,
  output logic [47:0] mac_addr_src,

  input  logic        dst_clk,
  input  logic        dst_rst_n,
  output logic [47:0] mac_addr_dst
);

  logic toggle_src;
  logic tog_s1, tog_s2, tog_s3;

  always_ff @(posedge src_clk) begin
    if (!src_rst_n) begin
      mac_addr_src <= RESET_ADDR;
      toggle_src   <= 1'b0;
    end else if (wr_en) begin
      mac_addr_src <= wr_data;
      toggle_src   <= ~toggle_src;
    end
  end

  always_ff @(posedge dst_clk) begin
    if (!dst_rst_n) begin
      tog_s1       <= 1'b0;
      tog_s2       <= 1'b0;
      tog_s3       <= 1'b0;
      mac_addr_dst <= RESET_ADDR;
    end else begin
      tog_s1 <= toggle_src;
      tog_s2 <= tog_s1;
      tog_s3 <= tog_s2;
      if (tog_s2 != tog_s3) mac_addr_dst <= mac_addr_src;
    end
  end

endmodule
