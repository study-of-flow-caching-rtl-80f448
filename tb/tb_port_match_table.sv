// tb_port_match_table: self-checking test of the port-matching counters.
// Checks the reset sweep time (one row per cycle, NUM_PORTS cycles), that
// every row reads zero afterwards, and then runs random increments,
// decrements and lookups against a reference count kept in an associative
// array, including lookups in the same cycle as an update of the same entry
// (forwarding) and of the other column of the same row.
module tb_port_match_table;
  import fc_pkg::*;

  localparam int unsigned NUM_PORTS = 65536;
  localparam int unsigned CNT_W     = 13;

  logic clk = 0, rst_n = 0;
  logic init_done;
  logic lk_valid = 0, lk_is_dst = 0, lk_rsp_valid, lk_nonzero;
  logic [PORT_W-1:0] lk_port = '0, upd_port = '0;
  logic [CNT_W-1:0] lk_count;
  logic upd_valid = 0, upd_is_dst = 0, upd_inc = 0;

  int checks = 0, failures = 0;
  int ref_cnt [int];   // key: port*2 + column

  port_match_table #(.NUM_PORTS(NUM_PORTS), .CNT_W(CNT_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int get_ref(int port, bit col);
    int k = port * 2 + int'(col);
    return ref_cnt.exists(k) ? ref_cnt[k] : 0;
  endfunction

  // one cycle: optional update and optional lookup, then check the lookup
  task automatic step(bit do_upd, int up, bit ucol, bit inc,
                      bit do_lk, int lp, bit lcol);
    int exp;
    upd_valid  <= do_upd; upd_port <= PORT_W'(up); upd_is_dst <= ucol; upd_inc <= inc;
    lk_valid   <= do_lk;  lk_port  <= PORT_W'(lp); lk_is_dst  <= lcol;
    @(posedge clk);
    if (do_upd) ref_cnt[up * 2 + int'(ucol)] = get_ref(up, ucol) + (inc ? 1 : -1);
    exp = get_ref(lp, lcol);
    upd_valid <= 0; lk_valid <= 0;
    #1;
    if (do_lk) begin
      checks++;
      if (!lk_rsp_valid || int'(lk_count) != exp || lk_nonzero != (exp != 0)) begin
        failures++;
        $display("FAIL lookup port=%0d col=%0d got %0d/%0b exp %0d", lp, lcol,
                 lk_count, lk_rsp_valid, exp);
      end
    end
  endtask

  int cyc, p, q;
  bit c;
  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    cyc = 0;
    while (!init_done) begin @(posedge clk); #1; cyc++; end
    checks++;
    if (cyc != NUM_PORTS) begin
      failures++; $display("FAIL init took %0d cycles", cyc);
    end
    // every row starts at zero (sample of rows plus the ends)
    for (int i = 0; i < 3000; i++) begin
      p = (i < 2) ? (i * (NUM_PORTS - 1)) : int'($urandom_range(0, NUM_PORTS - 1));
      step(0, 0, 0, 0, 1, p, i[0]);
    end
    // build up counts on a few ports, then random traffic
    for (int i = 0; i < 20000; i++) begin
      p = int'($urandom_range(1020, 1040));
      c = $urandom_range(0, 1) == 1;
      if (get_ref(p, c) == 0 || $urandom_range(0, 2) != 0) step(1, p, c, 1, 0, 0, 0);
      else                                                  step(1, p, c, 0, 0, 0, 0);
      q = (i % 3 == 0) ? p : int'($urandom_range(1018, 1042));
      step(0, 0, 0, 0, 1, q, $urandom_range(0, 1) == 1);
      // same-cycle update and lookup of one entry, then of the other column
      if (i % 7 == 0) begin
        step(1, p, c, 1, 1, p, c);
        step(1, p, c, 0, 1, p, !c);
      end
    end
    // drain everything back to zero and check the zero test
    foreach (ref_cnt[k]) begin
      while (ref_cnt[k] > 0) step(1, k / 2, k[0], 0, 0, 0, 0);
      step(0, 0, 0, 0, 1, k / 2, k[0]);
      checks++;
      if (lk_nonzero) begin failures++; $display("FAIL not zero after drain"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
