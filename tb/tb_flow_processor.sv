// tb_flow_processor: end-to-end test of the flow processor at its default
// size (4096-entry flow cache, 65536-row port-matching table, 64 rules).
//
// A reference model kept here predicts, for every packet, which of the four
// paths it must take: equal ports -> filtered, never cached; zero count for
// its unknown port -> filtered and cached; otherwise a flow cache search that
// hits (forwarded from the cache) or misses (filtered and cached). The model
// keeps its own set of cached flows and per-port counts, and classifies each
// packet with its own first-match search over the rules it loaded, so the
// forwarding decision is checked on every path. Latencies are checked
// (2 + T_f for equal ports, 3 + T_f after a zero count, 3 + P for a hit and
// 6 + P + T_f for a miss, P the entries compared). Phases:
//  1. mixed client-server and server-to-server traffic, with flows that share
//     a client port so that the cache search misses;
//  2. more flows than the cache holds: overflow is counted and such flows
//     stay uncached;
//  3. one-second ticks: the full cache drives the timeout down to its lower
//     bound, idle flows are aged out while a set of flows kept busy survives,
//     then the emptier cache drives the timeout up again.
// Each mechanism (the four paths, overflow, ageing, deletion from the middle
// of a chain, timeout up and down, a header waiting for the cache while it
// ages an entry) must occur at least once.
module tb_flow_processor;
  import fc_pkg::*;

  localparam int unsigned ENTRIES   = 4096;
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

  flow_processor dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_path [4];
  int n_full = 0, n_aged = 0, n_to_up = 0, n_to_down = 0;
  int n_stall = 0, n_mid_delete = 0;

  // internal events: a cache command held off by an ageing deletion, and a
  // deletion from the middle of a bucket chain
  always @(posedge clk) begin
    if (dut.fc_cmd_valid && !dut.fc_cmd_ready) n_stall++;
    if (dut.u_fc.dw_found && dut.u_fc.prev.valid) n_mid_delete++;
  end

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ reference
  rule_t tb_rules [NUM_RULES];
  bit    tb_en    [NUM_RULES];
  bit        cached [flow_key_t];
  fwd_info_t cfwd   [flow_key_t];
  int        pcount [int];         // unknown port * 2 + identifier

  function automatic int ref_rule(flow_key_t k);
    for (int i = 0; i < NUM_RULES; i++) begin
      if (!tb_en[i]) continue;
      if ((k.src_addr & tb_rules[i].src_mask) != (tb_rules[i].src_addr & tb_rules[i].src_mask)) continue;
      if ((k.dst_addr & tb_rules[i].dst_mask) != (tb_rules[i].dst_addr & tb_rules[i].dst_mask)) continue;
      if (k.src_port < tb_rules[i].sport_lo || k.src_port > tb_rules[i].sport_hi) continue;
      if (k.dst_port < tb_rules[i].dport_lo || k.dst_port > tb_rules[i].dport_hi) continue;
      if (!tb_rules[i].proto_any && tb_rules[i].proto != k.proto) continue;
      return i;
    end
    return -1;
  endfunction

  function automatic int unknown_slot(flow_key_t k);
    // larger port, identifier 1 when it is the destination port
    if (k.dst_port > k.src_port) return int'(k.dst_port) * 2 + 1;
    return int'(k.src_port) * 2;
  endfunction

  function automatic int get_count(int slot);
    return pcount.exists(slot) ? pcount[slot] : 0;
  endfunction

  // ------------------------------------------------------------ stimulus
  task automatic write_rule(int i, rule_t r, bit en);
    tb_rules[i] = r; tb_en[i] = en;
    // called just after a clock edge; the rule is written at the next one
    rw_valid = 1; rw_idx = RI_W'(i); rw_rule = r; rw_en = en;
    @(posedge clk); #1;
    rw_valid = 0;
  endtask

  function automatic rule_t mk_rule(logic [31:0] sa, int sl, logic [31:0] da, int dl,
                                    int splo, int sphi, int dplo, int dphi,
                                    int proto, int op, int prio, bit drop);
    rule_t r;
    r.src_addr = sa; r.src_mask = (sl == 0) ? 32'h0 : ~(32'hFFFF_FFFF >> sl);
    r.dst_addr = da; r.dst_mask = (dl == 0) ? 32'h0 : ~(32'hFFFF_FFFF >> dl);
    r.sport_lo = 16'(splo); r.sport_hi = 16'(sphi);
    r.dport_lo = 16'(dplo); r.dport_hi = 16'(dphi);
    r.proto = 8'(proto < 0 ? 0 : proto); r.proto_any = (proto < 0);
    r.action = '{drop: drop, out_port: 4'(op), prio: 3'(prio)};
    return r;
  endfunction

  task automatic load_rules();
    for (int i = 0; i < NUM_RULES; i++) write_rule(i, '0, 0);
    // rule 0: DNS to the name servers 192.168.53.0/24
    write_rule(0, mk_rule(0, 0, 32'hc0a83500, 24, 0, 65535, 53, 53, 17, 15, 7, 0), 1);
    // rules 1..16: one per server subnet 192.168.i.0/24, web and ssh ports
    for (int i = 1; i <= 16; i++) begin
      rule_t r;
      r = mk_rule(0, 0, 32'hc0a80000 | 32'(i << 8), 24, 0, 65535, 0, 1023,
                  6, i % 16, i % 8, (i == 13));
      write_rule(i, r, 1);
    end
    // rule 20: a firewall deny on one client subnet, in both directions
    write_rule(20, mk_rule(32'h0a630000, 16, 0, 0, 0, 65535, 0, 65535, -1, 0, 0, 1), 1);
    // rule 30: replies towards the clients 10.0.0.0/8
    write_rule(30, mk_rule(0, 0, 32'h0a000000, 8, 0, 1023, 1024, 65535, -1, 14, 2, 0), 1);
    // rule 63: catch-all for the rest of 192.168.0.0/16 (subnets 17..20)
    write_rule(63, mk_rule(0, 0, 32'hc0a80000, 16, 0, 65535, 0, 65535, -1, 12, 1, 0), 1);
    // rule 40 is loaded disabled and must never match
    write_rule(40, mk_rule(0, 0, 0, 0, 0, 65535, 0, 65535, -1, 9, 3, 0), 0);
  endtask

  task automatic send(flow_key_t k);
    int lat, ri, tf, slot;
    path_e exp_path;
    fwd_info_t exp_fwd;
    bit ok_lat;
    ri = ref_rule(k);
    tf = (ri >= 0) ? ri + 1 : NUM_RULES;
    exp_fwd = (ri >= 0) ? tb_rules[ri].action : '{drop: 1'b1, out_port: '0, prio: '0};
    slot = unknown_slot(k);
    if (k.src_port == k.dst_port)  exp_path = PATH_PORT_EQUAL;
    else if (get_count(slot) == 0) exp_path = PATH_PORT_ZERO;
    else if (cached.exists(k))     exp_path = PATH_CACHE_HIT;
    else                           exp_path = PATH_CACHE_MISS;
    if (exp_path == PATH_CACHE_HIT) exp_fwd = cfwd[k];

    hdr_valid = 1; hdr_key = k;
    #1;
    while (!hdr_ready) begin @(posedge clk); #1; end
    @(posedge clk);               // accepting edge
    hdr_valid <= 0;
    #1;
    lat = 0;
    while (!dec_valid && lat < 10000) begin @(posedge clk); #1; lat++; end

    checks += 3;
    if (dec_path != exp_path) begin
      failures++;
      if (failures < 40) $display("FAIL path got %s exp %s", dec_path.name(), exp_path.name());
    end
    if (dec_fwd != exp_fwd || dec_key != k) begin
      failures++;
      if (failures < 40) $display("FAIL decision got %p exp %p key %h path %s", dec_fwd, exp_fwd, k, exp_path.name());
    end
    unique case (exp_path)
      PATH_PORT_EQUAL: ok_lat = (lat == 2 + tf);
      PATH_PORT_ZERO:  ok_lat = (lat == 3 + tf);
      PATH_CACHE_HIT:  ok_lat = (lat >= 4 && lat <= 3 + 16);
      default:         ok_lat = (lat >= 6 + tf && lat <= 6 + 16 + tf);
    endcase
    if (!ok_lat) begin
      failures++;
      if (failures < 40) $display("FAIL latency %0d on %s (T_f %0d)", lat, exp_path.name(), tf);
    end
    n_path[exp_path]++;

    // model update: filtered flows other than equal-port ones get cached
    if (exp_path == PATH_PORT_ZERO || exp_path == PATH_CACHE_MISS) begin
      if (cached.num() < ENTRIES) begin
        cached[k] = 1; cfwd[k] = exp_fwd;
        pcount[slot] = get_count(slot) + 1;
      end else begin
        n_full++;
      end
    end
  endtask

  // flows
  function automatic flow_key_t client_flow(int c, int srv_net, int srv_port, bit reply);
    flow_key_t k;
    logic [31:0] cli = 32'h0a000000 | 32'(c * 7 + 1);
    logic [31:0] srv = 32'hc0a80000 | 32'(srv_net << 8) | 32'(c % 200 + 1);
    logic [15:0] cport = 16'(1024 + (c * 13) % 60000);
    if (srv_net == 99) cli = 32'h0a630000 | 32'(c);   // denied subnet
    if (!reply) begin
      k.src_addr = cli; k.dst_addr = srv; k.src_port = cport; k.dst_port = 16'(srv_port);
    end else begin
      k.src_addr = srv; k.dst_addr = cli; k.src_port = 16'(srv_port); k.dst_port = cport;
    end
    k.proto = 8'd6;
    return k;
  endfunction

  function automatic flow_key_t dns_packet(int c);
    flow_key_t k;
    k.src_addr = 32'hac100000 | 32'(c);
    k.dst_addr = 32'hc0a83500 | 32'(c % 4);
    k.src_port = 16'd53; k.dst_port = 16'd53; k.proto = 8'd17;
    return k;
  endfunction

  flow_key_t flows [$];
  flow_key_t live  [$];

  // one tick, then the busy flows send a packet each while the ageing scan
  // is running, then a quiet gap
  task automatic tick_once(int gap);
    logic [15:0] t0;
    t0 = timeout;
    tick = 1; @(posedge clk); #1; tick = 0;
    foreach (live[i]) if (cached.exists(live[i])) send(live[i]);
    repeat (gap) @(posedge clk);
    #1;
    if (timeout > t0) n_to_up++;
    if (timeout < t0) n_to_down++;
  endtask

  int occ_before;
  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    #1;
    load_rules();
    wait (ready);
    @(posedge clk); #1;

    // ---- phase 1: mixed traffic
    for (int c = 0; c < 300; c++) begin
      int net = (c % 23 == 0) ? 99 : (c % 20) + 1;
      int sp  = (c % 3 == 0) ? 22 : ((c % 3 == 1) ? 80 : 443);
      flows.push_back(client_flow(c, net, sp, 0));
      flows.push_back(client_flow(c, net, sp, 1));
      // a second flow from the same client port to another server: shares
      // the unknown port, so its first packet searches the cache and misses
      if (c % 5 == 0) flows.push_back(client_flow(c, (net % 16) + 1, 8080 % 1024, 0));
    end
    for (int n = 0; n < 6000; n++) begin
      if (n % 10 == 0) send(dns_packet(n));
      else send(flows[$urandom_range(0, flows.size() - 1)]);
    end
    foreach (flows[i]) send(flows[i]);

    // ---- phase 2: overflow the cache
    for (int c = 1000; c < 1000 + ENTRIES + 200; c++)
      send(client_flow(c, (c % 16) + 1, 80, 0));
    for (int c = 1000; c < 1100; c++) send(client_flow(c, (c % 16) + 1, 80, 0));
    #1;
    checks++;
    if (int'(occupancy) != cached.num()) begin
      failures++; $display("FAIL occupancy %0d exp %0d", occupancy, cached.num());
    end

    // ---- phase 3: ageing. A few flows stay busy; the rest go idle.
    for (int i = 0; i < 40; i++) live.push_back(flows[i * 7]);
    occ_before = int'(occupancy);
    for (int t = 0; t < 40; t++) tick_once(30000);
    #1;
    n_aged = occ_before - int'(occupancy);
    // the model: only the busy flows remain
    begin
      flow_key_t keep [$];
      foreach (live[i]) if (cached.exists(live[i])) keep.push_back(live[i]);
      cached.delete(); pcount.delete();
      foreach (keep[i]) begin
        cached[keep[i]] = 1;
        pcount[unknown_slot(keep[i])] = get_count(unknown_slot(keep[i])) + 1;
      end
    end
    checks++;
    if (int'(occupancy) != cached.num()) begin
      failures++; $display("FAIL after ageing occupancy %0d exp %0d", occupancy, cached.num());
    end
    // idle flows come back through port matching; busy ones still hit
    for (int i = 0; i < 300; i++) send(flows[i]);
    foreach (live[i]) send(live[i]);

    // ---- statistics registers against the model's counts
    checks++;
    if (stat_hit != 32'(n_path[PATH_CACHE_HIT]) || stat_equal != 32'(n_path[PATH_PORT_EQUAL]) ||
        stat_zero != 32'(n_path[PATH_PORT_ZERO]) || stat_miss != 32'(n_path[PATH_CACHE_MISS]) ||
        stat_full != 32'(n_full) ||
        stat_pkts != 32'(n_path[0] + n_path[1] + n_path[2] + n_path[3])) begin
      failures++; $display("FAIL statistics registers");
    end

    // ---- every mechanism must have happened
    $display("paths: hit=%0d equal=%0d zero=%0d miss=%0d; overflow=%0d aged=%0d (mid-chain %0d) timeout up=%0d down=%0d; cache busy stalls=%0d",
             n_path[PATH_CACHE_HIT], n_path[PATH_PORT_EQUAL], n_path[PATH_PORT_ZERO],
             n_path[PATH_CACHE_MISS], n_full, n_aged, n_mid_delete, n_to_up, n_to_down, n_stall);
    checks++;
    if (n_path[0] == 0 || n_path[1] == 0 || n_path[2] == 0 || n_path[3] == 0 ||
        n_full == 0 || n_aged == 0 || n_to_up == 0 || n_to_down == 0 ||
        n_mid_delete == 0 || n_stall == 0) begin
      failures++; $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
