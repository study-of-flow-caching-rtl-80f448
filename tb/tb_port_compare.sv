// tb_port_compare: self-checking test of the port-comparison module.
// Drives corner cases (equal ports, 0, 1023/1024, 65535) and random port
// pairs, and compares the outputs with a reference worked out here: equal
// ports flag a server-to-server packet, otherwise the larger port is the
// unknown port and the identifier is 1 when it is the destination port.
module tb_port_compare;
  import fc_pkg::*;

  logic [PORT_W-1:0] sp, dp, up;
  logic              eq, is_dst;
  int checks = 0, failures = 0;

  port_compare dut (.src_port(sp), .dst_port(dp), .ports_equal(eq),
                    .unknown_port(up), .unknown_is_dst(is_dst));

  task automatic check_pair(input int s, input int d);
    int exp_port;
    bit exp_eq, exp_dst;
    sp = PORT_W'(s); dp = PORT_W'(d);
    #1;
    exp_eq   = (s == d);
    exp_dst  = (d > s);
    exp_port = (d > s) ? d : s;
    checks++;
    if (eq !== exp_eq) begin
      failures++; $display("FAIL equal s=%0d d=%0d got %0b", s, d, eq);
    end
    if (!exp_eq) begin
      checks += 2;
      if (is_dst !== exp_dst) begin
        failures++; $display("FAIL id s=%0d d=%0d got %0b", s, d, is_dst);
      end
      if (int'(up) != exp_port) begin
        failures++; $display("FAIL port s=%0d d=%0d got %0d", s, d, up);
      end
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check_pair(53, 53);        // DNS, server to server
    check_pair(80, 1025);      // client on the destination side
    check_pair(34567, 80);     // client on the source side
    check_pair(0, 65535);
    check_pair(65535, 0);
    check_pair(1023, 1024);
    check_pair(1024, 1023);
    check_pair(0, 0);
    check_pair(65535, 65535);
    for (int i = 0; i < 2000; i++) begin
      int s, d;
      s = int'($urandom_range(0, 65535));
      d = (i % 10 == 0) ? s : int'($urandom_range(0, 65535));
      check_pair(s, d);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
