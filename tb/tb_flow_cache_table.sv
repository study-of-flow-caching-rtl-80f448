// tb_flow_cache_table: self-checking test of the hashed flow cache.
// Runs with a small table (64 entries, 8 buckets) so that buckets hold long
// chains and the table fills. A reference kept here stores, per bucket, the
// keys in list order (new keys at the head), so it predicts hit/miss, the
// forwarding information and the number of entries a lookup compares, which
// sets the expected latency (P cycles for a hit, P + 1 for a miss). The
// bucket index is worked out here from the XOR-fold hash formula. Insertions
// beyond capacity must report full. Ageing: entries idle for more than the
// timeout must be deleted, each deletion reported once with its key on the
// update port, entries refreshed by a hit must survive, and the occupancy
// must follow.
module tb_flow_cache_table;
  import fc_pkg::*;

  localparam int unsigned ENTRIES = 64;
  localparam int unsigned BUCKETS = 8;
  localparam int unsigned TS_W = 16;
  localparam int unsigned CNT_W = $clog2(ENTRIES + 1);

  logic clk = 0, rst_n = 0, init_done;
  logic cmd_valid = 0, cmd_ready, cmd_insert = 0;
  flow_key_t cmd_key = '0;
  fwd_info_t cmd_fwd = '0;
  logic rsp_valid, rsp_insert, rsp_hit, rsp_full;
  fwd_info_t rsp_fwd;
  logic [CNT_W-1:0] rsp_probes, occupancy;
  logic [TS_W-1:0] now = '0, timeout = 16'd1000;
  logic age_en = 0;
  logic upd_valid, upd_inc;
  flow_key_t upd_key;

  int checks = 0, failures = 0;

  flow_cache_table #(.ENTRIES(ENTRIES), .BUCKETS(BUCKETS), .TS_W(TS_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ reference
  flow_key_t chain [BUCKETS][$];
  fwd_info_t ref_fwd [flow_key_t];
  int        ref_ts  [flow_key_t];
  int        n_ins = 0, n_del = 0;

  function automatic int bucket_of(flow_key_t k);
    logic [31:0] w;
    w = k.src_addr ^ {k.dst_addr[15:0], k.dst_addr[31:16]} ^ {k.src_port, k.dst_port}
        ^ {k.proto, 24'h0} ^ {8'h0, k.proto, 16'h0};
    w = w ^ (w >> 7);
    return int'((w[31:16] ^ w[15:0]) % BUCKETS);
  endfunction

  function automatic flow_key_t rand_key();
    flow_key_t k;
    k.src_addr = {8'd10, 24'($urandom)};
    k.dst_addr = {8'd172, 24'($urandom)};
    k.src_port = 16'($urandom);
    k.dst_port = 16'($urandom_range(0, 1023));
    k.proto    = 8'd6;
    return k;
  endfunction

  // update-port monitor: every report must match a reference change
  flow_key_t exp_upd [$];
  bit        exp_inc [$];
  always @(posedge clk) if (rst_n && upd_valid) begin
    checks++;
    if (exp_upd.size() == 0) begin
      failures++; $display("FAIL unexpected update");
    end else if (upd_key != exp_upd[0] || upd_inc != exp_inc[0]) begin
      // deletions happen in scan order, so search the expected list
      int found;
      found = -1;
      foreach (exp_upd[i]) if (exp_upd[i] == upd_key && exp_inc[i] == upd_inc) found = i;
      if (found < 0) begin failures++; $display("FAIL update key/direction"); end
      else begin exp_upd.delete(found); exp_inc.delete(found); end
    end else begin
      void'(exp_upd.pop_front()); void'(exp_inc.pop_front());
    end
  end

  // ------------------------------------------------------------ commands
  task automatic issue(bit ins, flow_key_t k, fwd_info_t f, output int cyc);
    // called just after a clock edge; the command is taken at the first
    // edge with cmd_ready high
    cmd_valid = 1; cmd_insert = ins; cmd_key = k; cmd_fwd = f;
    #1;
    while (!cmd_ready) begin @(posedge clk); #1; end
    @(posedge clk);
    cmd_valid <= 0;
    // cyc: edges after the accepting one until the edge that raises rsp_valid
    #1;
    cyc = 0;
    while (!rsp_valid && cyc < 1000) begin @(posedge clk); #1; cyc++; end
  endtask

  task automatic lookup(flow_key_t k);
    int cyc, b, pos, exp_probes, exp_cyc;
    b = bucket_of(k);
    pos = -1;
    for (int i = 0; i < chain[b].size(); i++) if (chain[b][i] == k) pos = i;
    exp_probes = (pos >= 0) ? pos + 1 : chain[b].size();
    exp_cyc    = (pos >= 0) ? exp_probes : exp_probes + 1;
    issue(0, k, '0, cyc);
    checks += 3;
    if (rsp_hit != (pos >= 0) || rsp_insert) begin
      failures++; $display("FAIL hit got %0b exp %0b", rsp_hit, pos >= 0);
    end else if (pos >= 0 && rsp_fwd != ref_fwd[k]) begin
      failures++; $display("FAIL fwd");
    end
    if (int'(rsp_probes) != exp_probes) begin
      failures++; $display("FAIL probes got %0d exp %0d", rsp_probes, exp_probes);
    end
    if (cyc != exp_cyc) begin
      failures++; $display("FAIL lookup latency got %0d exp %0d", cyc, exp_cyc);
    end
    if (pos >= 0) ref_ts[k] = int'(now);
  endtask

  task automatic insert(flow_key_t k, fwd_info_t f);
    int cyc;
    bit full;
    full = (ref_fwd.num() == ENTRIES);
    if (!full) begin
      exp_upd.push_back(k); exp_inc.push_back(1);
    end
    issue(1, k, f, cyc);
    checks += 2;
    if (rsp_full != full || !rsp_insert) begin
      failures++; $display("FAIL insert full got %0b exp %0b", rsp_full, full);
    end
    if (cyc != 0) begin failures++; $display("FAIL insert latency %0d", cyc); end
    if (!full) begin
      chain[bucket_of(k)].push_front(k);
      ref_fwd[k] = f;
      ref_ts[k]  = int'(now);
      n_ins++;
    end
  endtask

  function automatic void ref_delete(flow_key_t k);
    int b = bucket_of(k);
    for (int i = 0; i < chain[b].size(); i++) if (chain[b][i] == k) begin chain[b].delete(i); break; end
    ref_fwd.delete(k);
    ref_ts.delete(k);
    exp_upd.push_back(k); exp_inc.push_back(0);
    n_del++;
  endfunction

  task automatic check_occ();
    @(posedge clk); #1;
    checks++;
    if (int'(occupancy) != ref_fwd.num()) begin
      failures++; $display("FAIL occupancy got %0d exp %0d", occupancy, ref_fwd.num());
    end
  endtask

  flow_key_t keys [$];
  int hits_seen = 0;
  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    wait (init_done);
    @(posedge clk); #1;
    // fill to capacity with lookups in between
    for (int i = 0; i < ENTRIES; i++) begin
      flow_key_t k;
      fwd_info_t f;
      k = rand_key();
      f.drop = 1'($urandom); f.out_port = 4'($urandom); f.prio = 3'($urandom);
      lookup(k);
      insert(k, f);
      keys.push_back(k);
      lookup(keys[$urandom_range(0, keys.size() - 1)]);
    end
    check_occ();
    insert(rand_key(), '0);     // table full
    checks++;
    if (!rsp_full) begin failures++; $display("FAIL no full report"); end
    foreach (keys[i]) lookup(keys[i]);
    lookup(rand_key());

    // ageing: at time 20 refresh every third key, then move to time 30
    // with timeout 15: the others (idle 30) go, refreshed ones (idle 10) stay
    now = 16'd20;
    foreach (keys[i]) if (i % 3 == 0) begin lookup(keys[i]); hits_seen++; end
    now = 16'd30; timeout = 16'd15;
    foreach (keys[i]) if (i % 3 != 0) ref_delete(keys[i]);
    age_en = 1;
    repeat (ENTRIES * 12) @(posedge clk);
    age_en = 0;
    check_occ();
    checks++;
    if (exp_upd.size() != 0) begin
      failures++; $display("FAIL %0d deletions not reported", exp_upd.size());
      exp_upd.delete(); exp_inc.delete();
    end
    foreach (keys[i]) lookup(keys[i]);
    // freed entries are reused
    for (int i = 0; i < 20; i++) begin
      flow_key_t k;
      k = rand_key();
      insert(k, '{drop: 1'b0, out_port: 4'(i), prio: 3'd1});
      lookup(k);
    end
    // ageing while commands keep arriving: everything expires
    now = 16'd100; timeout = 16'd5;
    foreach (ref_fwd[k]) keys.push_back(k);
    begin
      flow_key_t all [$];
      foreach (ref_fwd[k]) all.push_back(k);
      foreach (all[i]) ref_delete(all[i]);
    end
    age_en = 1;
    for (int i = 0; i < 200; i++) begin
      int cyc;
      issue(0, rand_key(), '0, cyc);   // chains shrink meanwhile: check the miss only
      checks++;
      if (rsp_hit) begin failures++; $display("FAIL hit on a random key"); end
    end
    repeat (ENTRIES * 12) @(posedge clk);
    check_occ();
    checks++;
    if (exp_upd.size() != 0) begin failures++; $display("FAIL deletions missing"); end
    $display("inserted %0d, deleted %0d", n_ins, n_del);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
