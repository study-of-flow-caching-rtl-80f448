// port_compare: the port-comparison module in front of the flow cache.
//
// The source port of a packet is compared with its destination port. Equal
// ports mark a server-to-server application (DNS, for example), whose flows
// are short-lived: such a packet goes straight to full header filtering and
// is never cached. Otherwise the larger of the two ports is taken to be the
// "unknown" (randomly assigned client) port and is passed on together with a
// one-bit identifier, 0 when it is the source port and 1 when it is the
// destination port. The function follows the document exactly; it is one
// 16-bit comparison and one bit setting.
//
// Purely combinational; no clock. The same module is used on the packet path
// and on the flow cache update path, so the port-matching counters are always
// indexed the same way.
module port_compare
  import fc_pkg::*;
(
  input  logic [PORT_W-1:0] src_port,
  input  logic [PORT_W-1:0] dst_port,
  output logic              ports_equal,   // server-to-server packet
  output logic [PORT_W-1:0] unknown_port,  // larger of the two ports
  output logic              unknown_is_dst // 0: source port, 1: destination port
);

  always_comb begin
    ports_equal    = (src_port == dst_port);
    unknown_is_dst = (dst_port > src_port);
    unknown_port   = unknown_is_dst ? dst_port : src_port;
  end

endmodule
