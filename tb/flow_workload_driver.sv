// flow_workload_driver: drives one flow processor with synthetic traffic of
// a given flow cache size and mix, and checks every decision.
//
// Traffic: client-server flows (one well-known server port, one random client
// port above 1023) whose packets arrive in bursts, one-time flows of a single
// packet, and server-to-server packets with equal ports, in proportions set
// by the parameters. One tick (one second) passes every PKTS_PER_TICK
// packets, so idle flows are aged out and the adaptive timeout moves.
// Checks, with a reference written here: the forwarding information of every
// packet (first-match search over the loaded rules), equal-port packets
// always take the equal-port path, a flow never sent before never hits, the
// occupancy never exceeds the cache size, and the statistics registers
// agree with the paths seen. It reports the fraction of packets that needed
// full header filtering and the flow cache search miss ratio.
module flow_workload_driver
  import fc_pkg::*;
#(
  parameter string       NAME          = "workload",
  parameter int unsigned ENTRIES       = 332,
  parameter int unsigned BUCKETS       = 512,
  parameter int unsigned PACKETS       = 20000,
  parameter int unsigned PCT_S2S       = 1,     // % server-to-server packets
  parameter int unsigned PCT_ONE_TIME  = 5,     // % one-packet flows
  parameter int unsigned PCT_NEW       = 5,     // % packets starting a flow
  parameter int unsigned PKTS_PER_TICK = 200
) (
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int unsigned NUM_RULES = 64;
  localparam int unsigned RI_W      = $clog2(NUM_RULES);
  localparam int unsigned CNT_W     = $clog2(ENTRIES + 1);

  logic clk = 0, rst_n = 0, ready, tick = 0;
  logic hdr_valid = 0, hdr_ready;
  flow_key_t hdr_key = '0;
  logic dec_valid;
  flow_key_t dec_key;
  fwd_info_t dec_fwd;
  path_e dec_path;
  logic rw_valid = 0, rw_en = 0;
  logic [RI_W-1:0] rw_idx = '0;
  rule_t rw_rule = '0;
  logic [15:0] timeout;
  logic [CNT_W-1:0] occupancy;
  logic [CNT_W+15:0] util_filtered;
  logic [31:0] stat_pkts, stat_hit, stat_equal, stat_zero, stat_miss, stat_full;

  flow_processor #(.ENTRIES(ENTRIES), .BUCKETS(BUCKETS)) dut (.*);

  always #5 clk = ~clk;

  rule_t tb_rules [NUM_RULES];
  bit    tb_en    [NUM_RULES];
  bit    seen     [flow_key_t];
  flow_key_t active [$];
  int    n_path [4];
  int    n_aged = 0, n_to_up = 0, n_to_down = 0, max_occ = 0;

  function automatic fwd_info_t ref_fwd(flow_key_t k);
    for (int i = 0; i < NUM_RULES; i++) begin
      if (!tb_en[i]) continue;
      if ((k.src_addr & tb_rules[i].src_mask) != (tb_rules[i].src_addr & tb_rules[i].src_mask)) continue;
      if ((k.dst_addr & tb_rules[i].dst_mask) != (tb_rules[i].dst_addr & tb_rules[i].dst_mask)) continue;
      if (k.src_port < tb_rules[i].sport_lo || k.src_port > tb_rules[i].sport_hi) continue;
      if (k.dst_port < tb_rules[i].dport_lo || k.dst_port > tb_rules[i].dport_hi) continue;
      if (!tb_rules[i].proto_any && tb_rules[i].proto != k.proto) continue;
      return tb_rules[i].action;
    end
    return '{drop: 1'b1, out_port: '0, prio: '0};
  endfunction

  task automatic write_rule(int i, logic [31:0] da, logic [31:0] dm, int op, int pr);
    rule_t r;
    r = '0;
    r.dst_addr = da; r.dst_mask = dm;
    r.sport_hi = 16'hFFFF; r.dport_hi = 16'hFFFF;
    r.proto_any = 1'b1;
    r.action = '{drop: 1'b0, out_port: 4'(op), prio: 3'(pr)};
    tb_rules[i] = r; tb_en[i] = 1;
    rw_valid = 1; rw_idx = RI_W'(i); rw_rule = r; rw_en = 1;
    @(posedge clk); #1;
    rw_valid = 0;
  endtask

  function automatic flow_key_t new_flow();
    flow_key_t k;
    int srv_ports [4] = '{80, 443, 22, 25};
    k.src_addr = 32'h0a000000 | 32'($urandom_range(1, 60000));
    k.dst_addr = 32'hc0a80000 | 32'($urandom_range(0, 19) << 8) | 32'($urandom_range(1, 250));
    k.src_port = 16'($urandom_range(1024, 65535));
    k.dst_port = 16'(srv_ports[$urandom_range(0, 3)]);
    k.proto    = 8'd6;
    if ($urandom_range(0, 1) == 1) begin   // server-to-client direction
      k = '{src_addr: k.dst_addr, dst_addr: k.src_addr, src_port: k.dst_port,
            dst_port: k.src_port, proto: k.proto};
    end
    return k;
  endfunction

  task automatic send(flow_key_t k);
    bit first;
    first = !seen.exists(k);
    hdr_valid = 1; hdr_key = k;
    #1;
    while (!hdr_ready) begin @(posedge clk); #1; end
    @(posedge clk);
    hdr_valid <= 0;
    #1;
    while (!dec_valid) begin @(posedge clk); #1; end
    checks += 3;
    if (dec_fwd != ref_fwd(k)) begin
      failures++; if (failures < 10) $display("%s: FAIL forwarding info", NAME);
    end
    if ((k.src_port == k.dst_port) != (dec_path == PATH_PORT_EQUAL)) begin
      failures++; if (failures < 10) $display("%s: FAIL equal-port path", NAME);
    end
    if (first && dec_path == PATH_CACHE_HIT) begin
      failures++; if (failures < 10) $display("%s: FAIL hit on a new flow", NAME);
    end
    n_path[dec_path]++;
    seen[k] = 1;
    if (int'(occupancy) > max_occ) max_occ = int'(occupancy);
  endtask

  task automatic do_tick();
    logic [15:0] t0;
    int occ0;
    t0 = timeout; occ0 = int'(occupancy);
    tick = 1; @(posedge clk); #1; tick = 0;
    repeat (3 * ENTRIES) @(posedge clk);   // time for an ageing pass
    #1;
    if (timeout > t0) n_to_up++;
    if (timeout < t0) n_to_down++;
    if (int'(occupancy) < occ0) n_aged += occ0 - int'(occupancy);
  endtask

  initial begin
    done = 0; checks = 0; failures = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;
    for (int i = 0; i < 20; i++) write_rule(i, 32'hc0a80000 | 32'(i << 8), 32'hFFFFFF00, i % 16, i % 8);
    write_rule(30, 32'h0a000000, 32'hFF000000, 14, 2);
    write_rule(31, 32'hac100000, 32'hFFFF0000, 15, 7);
    while (!ready) begin @(posedge clk); #1; end
    for (int n = 0; n < PACKETS; n++) begin
      int r;
      flow_key_t k;
      r = int'($urandom_range(0, 99));
      if (r < int'(PCT_S2S)) begin
        int sp;
        sp = ($urandom_range(0, 1) == 1) ? 53 : 123;
        k = '{src_addr: 32'hac100000 | 32'($urandom_range(1, 4000)),
              dst_addr: 32'hac100000 | 32'($urandom_range(1, 4000)),
              src_port: 16'(sp), dst_port: 16'(sp), proto: 8'd17};
      end else if (r < int'(PCT_S2S + PCT_ONE_TIME)) begin
        k = new_flow();
      end else if (r < int'(PCT_S2S + PCT_ONE_TIME + PCT_NEW) || active.size() == 0) begin
        k = new_flow();
        active.push_back(k);
        if (active.size() > int'(2 * ENTRIES)) void'(active.pop_front());
      end else begin
        // recent flows are busier than old ones
        int hi, lo;
        hi = active.size() - 1;
        lo = ($urandom_range(0, 3) == 0) ? 0 : ((hi > int'(ENTRIES) / 2) ? hi - int'(ENTRIES) / 2 : 0);
        k = active[$urandom_range(lo, hi)];
      end
      send(k);
      if (n % PKTS_PER_TICK == PKTS_PER_TICK - 1) do_tick();
    end
    checks += 2;
    if (max_occ > int'(ENTRIES)) begin failures++; $display("%s: FAIL occupancy", NAME); end
    if (stat_hit != 32'(n_path[PATH_CACHE_HIT]) || stat_miss != 32'(n_path[PATH_CACHE_MISS]) ||
        stat_zero != 32'(n_path[PATH_PORT_ZERO]) || stat_equal != 32'(n_path[PATH_PORT_EQUAL])) begin
      failures++; $display("%s: FAIL statistics", NAME);
    end
    checks++;
    if (n_path[PATH_CACHE_HIT] == 0 || n_path[PATH_CACHE_MISS] == 0 || n_path[PATH_PORT_ZERO] == 0 ||
        (PCT_S2S > 0 && n_path[PATH_PORT_EQUAL] == 0) || n_aged == 0 || n_to_down + n_to_up == 0) begin
      failures++; $display("%s: FAIL a mechanism never occurred", NAME);
    end
    $display("%s: cache %0d entries, %0d packets: hit %0d, equal ports %0d, zero count %0d, search miss %0d, cache full %0d",
             NAME, ENTRIES, PACKETS, n_path[PATH_CACHE_HIT], n_path[PATH_PORT_EQUAL],
             n_path[PATH_PORT_ZERO], n_path[PATH_CACHE_MISS], stat_full);
    $display("%s: full header filtering for %0.1f%% of packets, flow cache searched for %0.1f%%, aged %0d, timeout now %0d (up %0d, down %0d), peak occupancy %0d",
             NAME, 100.0 * (PACKETS - n_path[PATH_CACHE_HIT]) / PACKETS,
             100.0 * (n_path[PATH_CACHE_HIT] + n_path[PATH_CACHE_MISS]) / PACKETS,
             n_aged, timeout, n_to_up, n_to_down, max_occ);
    done = 1;
  end
endmodule
