// tb_flow_workloads: the three cache sizes at which the campus and backbone
// traces were evaluated, run with synthetic traffic of similar character.
//  * 332 entries, campus mix (few server-to-server packets);
//  * 175 entries, campus mix;
//  * 3755 entries, backbone mix (about 20% server-to-server packets and
//    many one-time flows).
// The real traces are not available, so the traffic is generated; the
// numbers printed are those of this traffic, not of the traces. Each
// instance checks every forwarding decision (see flow_workload_driver).
module tb_flow_workloads;
  int c0, f0, c1, f1, c2, f2;
  logic d0, d1, d2;

  flow_workload_driver #(.NAME("campus-332"), .ENTRIES(332), .BUCKETS(512),
    .PACKETS(20000), .PCT_S2S(1), .PCT_ONE_TIME(3), .PCT_NEW(4), .PKTS_PER_TICK(150))
    u_w0 (.done(d0), .checks(c0), .failures(f0));
  flow_workload_driver #(.NAME("campus-175"), .ENTRIES(175), .BUCKETS(256),
    .PACKETS(20000), .PCT_S2S(1), .PCT_ONE_TIME(3), .PCT_NEW(4), .PKTS_PER_TICK(100))
    u_w1 (.done(d1), .checks(c1), .failures(f1));
  flow_workload_driver #(.NAME("backbone-3755"), .ENTRIES(3755), .BUCKETS(4096),
    .PACKETS(60000), .PCT_S2S(20), .PCT_ONE_TIME(15), .PCT_NEW(8), .PKTS_PER_TICK(600))
    u_w2 (.done(d2), .checks(c2), .failures(f2));

  initial begin
    #2000000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, f0 + f1 + f2 + 1);
    $finish;
  end

  initial begin
    wait (d0 && d1 && d2);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, f0 + f1 + f2);
    $finish;
  end
endmodule
