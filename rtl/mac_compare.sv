// mac_compare: MAC compare unit of the flow controller.
//
// The ETH-SFP read-out state machine collects the first six bytes of each
// frame, which hold the destination MAC address, and this unit compares
// them with the MAC address register. match is high when all six bytes are
// present (hdr_count >= 6) and equal to the register; the frame is then
// meant for the processor. The byte that arrives first on the wire is
// compared with mac_addr[47:40], the usual order of a MAC address.
// Purely combinational.
module mac_compare
  import eth_pkg::*;
(
  input  logic [MAC_ADDR_BYTES-1:0][7:0] hdr,       // hdr[0] = first byte
  input  logic [2:0]                     hdr_count, // bytes present in hdr
  input  logic [47:0]                    mac_addr,
  output logic                           match
);

  logic [MAC_ADDR_BYTES-1:0] byte_eq;

  always_comb begin
    for (int i = 0; i < int'(MAC_ADDR_BYTES); i++)
      byte_eq[i] = (hdr[i] == mac_addr[47 - 8*i -: 8]);
    match = (&byte_eq) && (hdr_count >= 3'(MAC_ADDR_BYTES));
  end

endmodule
