// fc_pkg: types and helper functions shared by the layer-4 flow processor.
//
// A flow is identified by the five header fields source address, destination
// address, source port, destination port and protocol type (flow_key_t,
// 104 bits). The forwarding information kept per flow is the output port, a
// priority level and a drop flag (fwd_info_t); the document names output port
// and priority, while the widths and the drop flag (for firewall denies) are
// this design's choice. A filtering rule (rule_t) matches addresses under a
// prefix mask, ports by inclusive range and the protocol exactly or by
// wildcard; the rule format is this design's choice.
//
// flow_hash() folds the 5-tuple into a bucket index for the flow cache. The
// document leaves the hash function open; an XOR fold of the key rotated by
// field is used here.
package fc_pkg;

  localparam int unsigned ADDR_W  = 32;
  localparam int unsigned PORT_W  = 16;
  localparam int unsigned PROTO_W = 8;

  // Forwarding information field widths (assumed).
  localparam int unsigned OUTP_W  = 4;   // up to 16 router output ports
  localparam int unsigned PRIO_W  = 3;   // 8 priority levels

  typedef struct packed {
    logic [ADDR_W-1:0]  src_addr;
    logic [ADDR_W-1:0]  dst_addr;
    logic [PORT_W-1:0]  src_port;
    logic [PORT_W-1:0]  dst_port;
    logic [PROTO_W-1:0] proto;
  } flow_key_t;

  typedef struct packed {
    logic              drop;
    logic [OUTP_W-1:0] out_port;
    logic [PRIO_W-1:0] prio;
  } fwd_info_t;

  typedef struct packed {
    logic [ADDR_W-1:0]  src_addr;
    logic [ADDR_W-1:0]  src_mask;
    logic [ADDR_W-1:0]  dst_addr;
    logic [ADDR_W-1:0]  dst_mask;
    logic [PORT_W-1:0]  sport_lo;
    logic [PORT_W-1:0]  sport_hi;
    logic [PORT_W-1:0]  dport_lo;
    logic [PORT_W-1:0]  dport_hi;
    logic [PROTO_W-1:0] proto;
    logic               proto_any;
    fwd_info_t          action;
  } rule_t;

  // How a packet left the flow processor.
  typedef enum logic [1:0] {
    PATH_CACHE_HIT  = 2'd0,  // fast path: flow cache hit
    PATH_PORT_EQUAL = 2'd1,  // port comparison: equal ports, filtered, not cached
    PATH_PORT_ZERO  = 2'd2,  // port matching: zero count, filtered, cached
    PATH_CACHE_MISS = 2'd3   // flow cache searched and missed, filtered, cached
  } path_e;

  // Rule match test used by the full header filter.
  function automatic logic rule_matches(rule_t r, flow_key_t k);
    return ((k.src_addr & r.src_mask) == (r.src_addr & r.src_mask)) &&
           ((k.dst_addr & r.dst_mask) == (r.dst_addr & r.dst_mask)) &&
           (k.src_port >= r.sport_lo) && (k.src_port <= r.sport_hi) &&
           (k.dst_port >= r.dport_lo) && (k.dst_port <= r.dport_hi) &&
           (r.proto_any || (k.proto == r.proto));
  endfunction

  // Bucket index of a flow: XOR fold of the key down to 32 bits, then of
  // the 32-bit word down to 16, keeping the low HASH_W bits (HASH_W <= 16).
  function automatic logic [15:0] flow_hash(flow_key_t k);
    logic [31:0] w;
    w = k.src_addr ^ {k.dst_addr[15:0], k.dst_addr[31:16]} ^
        {k.src_port, k.dst_port} ^ {k.proto, 24'h0} ^
        {8'h0, k.proto, 16'h0};
    w = w ^ (w >> 7);
    return w[31:16] ^ w[15:0];
  endfunction

endpackage
