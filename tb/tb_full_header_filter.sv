// tb_full_header_filter: self-checking test of the full header filter.
// Loads random rule tables (address prefixes, port ranges, exact or wildcard
// protocol, some slots disabled), classifies random headers biased towards
// the rules, and compares the forwarding information, the matching rule and
// the search time (first matching index + 1 cycles, NUM_RULES when nothing
// matches) with a first-match search written here.
module tb_full_header_filter;
  import fc_pkg::*;

  localparam int unsigned NUM_RULES = 64;
  localparam int unsigned RI_W = $clog2(NUM_RULES);

  logic clk = 0, rst_n = 0;
  logic rw_valid = 0, rw_en = 0;
  logic [RI_W-1:0] rw_idx = '0;
  rule_t rw_rule = '0;
  logic req_valid = 0, req_ready, resp_valid, resp_matched;
  flow_key_t req_key = '0;
  fwd_info_t resp_fwd;
  logic [RI_W-1:0] resp_rule;

  int checks = 0, failures = 0;
  rule_t tb_rules [NUM_RULES];
  bit    tb_en    [NUM_RULES];

  full_header_filter #(.NUM_RULES(NUM_RULES)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit in_prefix(logic [31:0] a, logic [31:0] base, int len);
    for (int b = 31; b > 31 - len; b--) if (a[b] != base[b]) return 0;
    return 1;
  endfunction

  function automatic int prefix_len(logic [31:0] mask);
    int n = 0;
    for (int b = 31; b >= 0; b--) if (mask[b]) n++;
    return n;
  endfunction

  // reference first-match search; returns index or -1
  function automatic int ref_search(flow_key_t k);
    for (int i = 0; i < NUM_RULES; i++) begin
      rule_t r = tb_rules[i];
      if (!tb_en[i]) continue;
      if (!in_prefix(k.src_addr, r.src_addr, prefix_len(r.src_mask))) continue;
      if (!in_prefix(k.dst_addr, r.dst_addr, prefix_len(r.dst_mask))) continue;
      if (int'(k.src_port) < int'(r.sport_lo) || int'(k.src_port) > int'(r.sport_hi)) continue;
      if (int'(k.dst_port) < int'(r.dport_lo) || int'(k.dst_port) > int'(r.dport_hi)) continue;
      if (!r.proto_any && k.proto != r.proto) continue;
      return i;
    end
    return -1;
  endfunction

  function automatic logic [31:0] mk_mask(int len);
    return (len == 0) ? 32'h0 : ~(32'hFFFF_FFFF >> len);
  endfunction

  task automatic load_rules();
    for (int i = 0; i < NUM_RULES; i++) begin
      rule_t r;
      int l1, l2, a, b;
      l1 = int'($urandom_range(0, 3)) * 8;
      l2 = int'($urandom_range(0, 4)) * 8;
      r.src_addr = {8'd10, 8'($urandom_range(0, 3)), 16'($urandom)};
      r.src_mask = mk_mask(l1);
      r.dst_addr = {8'd192, 8'd168, 8'($urandom_range(0, 3)), 8'($urandom)};
      r.dst_mask = mk_mask(l2);
      a = int'($urandom_range(0, 2000)); b = a + int'($urandom_range(0, 30000));
      r.sport_lo = 16'(a); r.sport_hi = 16'((b > 65535) ? 65535 : b);
      a = int'($urandom_range(0, 2000)); b = a + int'($urandom_range(0, 30000));
      r.dport_lo = 16'(a); r.dport_hi = 16'((b > 65535) ? 65535 : b);
      r.proto     = ($urandom_range(0, 1) == 1) ? 8'd6 : 8'd17;
      r.proto_any = ($urandom_range(0, 3) == 0);
      r.action.drop     = ($urandom_range(0, 4) == 0);
      r.action.out_port = 4'($urandom);
      r.action.prio     = 3'($urandom);
      tb_rules[i] = r;
      tb_en[i]    = ($urandom_range(0, 9) != 0);
      rw_valid <= 1; rw_idx <= RI_W'(i); rw_en <= tb_en[i]; rw_rule <= r;
      @(posedge clk);
    end
    rw_valid <= 0;
    @(posedge clk);
  endtask

  task automatic classify(flow_key_t k);
    int exp_idx, cyc, exp_cyc;
    fwd_info_t exp_fwd;
    exp_idx = ref_search(k);
    exp_fwd = (exp_idx >= 0) ? tb_rules[exp_idx].action : '{drop: 1'b1, out_port: '0, prio: '0};
    exp_cyc = (exp_idx >= 0) ? exp_idx + 1 : NUM_RULES;
    req_key <= k; req_valid <= 1;
    do @(posedge clk); while (!req_ready);
    req_valid <= 0;
    cyc = 0;
    do begin @(posedge clk); cyc++; #1; end while (!resp_valid && cyc < 1000);
    checks += 3;
    if (resp_fwd != exp_fwd || resp_matched != (exp_idx >= 0)) begin
      failures++; $display("FAIL action: got %p exp %p (rule %0d)", resp_fwd, exp_fwd, exp_idx);
    end
    if (exp_idx >= 0 && int'(resp_rule) != exp_idx) begin
      failures++; $display("FAIL rule: got %0d exp %0d", resp_rule, exp_idx);
    end
    if (cyc != exp_cyc) begin
      failures++; $display("FAIL T_f: got %0d exp %0d", cyc, exp_cyc);
    end
  endtask

  int hits = 0, nomatch = 0;
  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // empty table: every packet gets the no-match action after NUM_RULES cycles
    classify('{src_addr: 32'h0a000001, dst_addr: 32'hc0a80001, src_port: 16'd1234,
               dst_port: 16'd80, proto: 8'd6});
    for (int round = 0; round < 8; round++) begin
      load_rules();
      for (int n = 0; n < 300; n++) begin
        flow_key_t k;
        rule_t r;
        r = tb_rules[$urandom_range(0, NUM_RULES - 1)];
        k.src_addr = ($urandom_range(0, 3) != 0) ? (r.src_addr ^ 32'($urandom_range(0, 255)))
                                                 : $urandom;
        k.dst_addr = ($urandom_range(0, 3) != 0) ? (r.dst_addr ^ 32'($urandom_range(0, 255)))
                                                 : $urandom;
        k.src_port = 16'($urandom_range(0, 40000));
        k.dst_port = 16'($urandom_range(0, 40000));
        k.proto    = ($urandom_range(0, 1) == 1) ? 8'd6 : 8'd17;
        if (ref_search(k) >= 0) hits++; else nomatch++;
        classify(k);
      end
    end
    checks++;
    if (hits < 100 || nomatch < 10) begin
      failures++; $display("FAIL coverage hits=%0d nomatch=%0d", hits, nomatch);
    end
    $display("matched %0d, unmatched %0d", hits, nomatch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
