// tb_adaptive_timeout: self-checking test of the adaptive flow timeout.
// A reference computed here in real arithmetic follows
//   rho_hat(n) = (1 - w) rho_hat(n-1) + w * occupancy / CAPACITY
//   T_n = T_{n-1} + dT if rho_hat(n-1) <= rho_min,
//         max(T_{n-1} - dT, T_min) if rho_hat(n-1) >= rho_max
// with w = 0.5, dT = 2, rho_min = 0.9, rho_max = 0.98. Phases of low, high,
// middle and random utilization are driven; the timeout is compared exactly
// after every update (except when the reference rho_hat lies within 1e-4 of
// a threshold, where fixed-point rounding may decide either way) and rho_hat
// within 1e-4 of the utilization. Cycles without `update` must change nothing.
module tb_adaptive_timeout;
  localparam int unsigned CAPACITY = 4096;
  localparam int unsigned T_W = 16;
  localparam int unsigned T_INIT = 32, T_MIN = 4, DELTA_T = 2;
  localparam int unsigned OCC_W = $clog2(CAPACITY + 1);

  logic clk = 0, rst_n = 0, update = 0;
  logic [OCC_W-1:0] occupancy = '0;
  logic [T_W-1:0] timeout;
  logic [OCC_W+15:0] rho_hat;

  int checks = 0, failures = 0, skipped = 0;
  int incs = 0, decs = 0, holds = 0, floors = 0;
  real ref_rho = 0.0;
  int  ref_t = T_INIT;

  adaptive_timeout #(.CAPACITY(CAPACITY), .T_W(T_W), .T_INIT(T_INIT),
                     .T_MIN(T_MIN), .DELTA_T(DELTA_T)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic do_update(int occ);
    bit near;
    int old_t = ref_t;
    near = (ref_rho > 0.9 - 1e-4 && ref_rho < 0.9 + 1e-4) ||
           (ref_rho > 0.98 - 1e-4 && ref_rho < 0.98 + 1e-4);
    if (ref_rho <= 0.9)       ref_t = ref_t + DELTA_T;
    else if (ref_rho >= 0.98) ref_t = (ref_t - int'(DELTA_T) < int'(T_MIN)) ? T_MIN : ref_t - DELTA_T;
    ref_rho = 0.5 * ref_rho + 0.5 * (real'(occ) / real'(CAPACITY));
    if (ref_t > old_t) incs++;
    else if (ref_t < old_t) decs++;
    else if (ref_t == int'(T_MIN) && ref_rho >= 0.98) floors++;
    else holds++;
    occupancy <= OCC_W'(occ); update <= 1;
    @(posedge clk);
    update <= 0;
    // idle cycles: nothing may change
    occupancy <= OCC_W'($urandom_range(0, CAPACITY));
    repeat (2) @(posedge clk);
    #1;
    if (near) begin
      skipped++;
      ref_t = int'(timeout);   // follow the design across an ambiguous threshold
    end else begin
      checks++;
      if (int'(timeout) != ref_t) begin
        failures++; $display("FAIL timeout got %0d exp %0d (rho %f)", timeout, ref_t, ref_rho);
      end
    end
    checks++;
    if ((real'(rho_hat) / 65536.0 / real'(CAPACITY) - ref_rho) > 1e-4 ||
        (ref_rho - real'(rho_hat) / 65536.0 / real'(CAPACITY)) > 1e-4) begin
      failures++; $display("FAIL rho_hat got %f exp %f", real'(rho_hat) / 65536.0 / CAPACITY, ref_rho);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;
    checks++;
    if (int'(timeout) != T_INIT) begin failures++; $display("FAIL initial timeout %0d", timeout); end
    // low utilization: timeout grows by dT every update
    for (int i = 0; i < 20; i++) do_update(1000);
    // full cache: timeout falls to T_min and stays there
    for (int i = 0; i < 80; i++) do_update(CAPACITY);
    // in between: timeout holds
    for (int i = 0; i < 20; i++) do_update(3890);   // 0.95
    for (int i = 0; i < 3000; i++) do_update(int'($urandom_range(3500, CAPACITY)));
    checks++;
    if (incs == 0 || decs == 0 || holds == 0 || floors == 0) begin
      failures++; $display("FAIL coverage inc=%0d dec=%0d hold=%0d floor=%0d", incs, decs, holds, floors);
    end
    $display("inc=%0d dec=%0d hold=%0d floor=%0d skipped=%0d", incs, decs, holds, floors, skipped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
