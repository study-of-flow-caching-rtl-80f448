// adaptive_timeout: adaptive flow-entry timeout for the flow cache.
//
// Flow cache entries that have been idle for longer than the timeout T are
// deleted. T is re-assigned periodically so that the cache stays well used:
// at every update n
//     T_n = T_{n-1} + dT                     if rho_hat(n-1) <= rho_min
//     T_n = max(T_{n-1} - dT, T_min)         if rho_hat(n-1) >= rho_max
//     T_n = T_{n-1}                          otherwise
//     rho_hat(n) = (1 - w) rho_hat(n-1) + w rho(n)
// where rho(n) is the cache utilization (occupied entries / capacity) sampled
// at update n and rho_hat its first-order low-pass filtered value. Both
// equations and the defaults w = 0.5, dT = 2, rho_min = 0.9, rho_max = 0.98
// follow the document; T_min, the initial T, the update period and the time
// unit (one tick = one second) are this design's choices. T saturates at its
// largest value instead of wrapping.
//
// rho_hat is held in units of cache entries with 16 fraction bits, so that
// rho(n) = occupancy / CAPACITY needs no divider: the thresholds are scaled
// by CAPACITY once, at elaboration.
//
// Interface and timing: on every cycle with `update` high the module samples
// `occupancy` and, on the same clock edge, moves both T (using the previous
// rho_hat, as in the equation) and rho_hat. `timeout` is a register.
module adaptive_timeout #(
  parameter int unsigned CAPACITY    = 4096,   // flow cache entries
  parameter int unsigned T_W         = 16,     // timeout width, ticks
  parameter int unsigned T_INIT      = 32,     // initial timeout, ticks
  parameter int unsigned T_MIN       = 4,      // lower bound, ticks
  parameter int unsigned DELTA_T     = 2,      // step, ticks
  parameter int unsigned RHO_MIN_Q16 = 58982,  // 0.90 * 2^16
  parameter int unsigned RHO_MAX_Q16 = 64225,  // 0.98 * 2^16
  parameter int unsigned OMEGA_Q16   = 32768,  // 0.50 * 2^16
  localparam int unsigned OCC_W      = $clog2(CAPACITY + 1),
  localparam int unsigned RH_W       = OCC_W + 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             update,
  input  logic [OCC_W-1:0] occupancy,
  output logic [T_W-1:0]   timeout,
  output logic [RH_W-1:0]  rho_hat    // filtered occupancy, entries * 2^16
);

  // rho thresholds in units of entries * 2^16
  localparam logic [RH_W-1:0] TH_MIN = RH_W'(64'(RHO_MIN_Q16) * 64'(CAPACITY));
  localparam logic [RH_W-1:0] TH_MAX = RH_W'(64'(RHO_MAX_Q16) * 64'(CAPACITY));
  localparam logic [T_W-1:0]  T_TOP  = '1;

  logic signed [RH_W+1:0]    diff;
  logic signed [RH_W+18:0]   step;
  logic [RH_W-1:0]           rho_next;
  logic [T_W-1:0]            t_next;

  always_comb begin
    // rho_hat + w * (rho - rho_hat), rho in the same scaled units
    diff     = $signed({2'b00, occupancy, 16'h0}) - $signed({2'b00, rho_hat});
    step     = (diff * $signed({1'b0, 18'(OMEGA_Q16)})) >>> 16;
    rho_next = RH_W'($signed({2'b00, rho_hat}) + step);

    t_next = timeout;
    if (rho_hat <= TH_MIN) begin
      t_next = (timeout > T_TOP - T_W'(DELTA_T)) ? T_TOP : timeout + T_W'(DELTA_T);
    end else if (rho_hat >= TH_MAX) begin
      t_next = (timeout < T_W'(T_MIN + DELTA_T)) ? T_W'(T_MIN) : timeout - T_W'(DELTA_T);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      timeout <= T_W'(T_INIT);
      rho_hat <= '0;
    end else if (update) begin
      timeout <= t_next;
      rho_hat <= rho_next;
    end
  end

endmodule
