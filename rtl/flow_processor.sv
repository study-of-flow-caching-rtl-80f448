// flow_processor: layer-4 flow processor with port comparison and port
// matching in front of a flow cache.
//
// Every packet header that enters is classified by one of four paths:
//  1. Port comparison. Equal source and destination ports mark a
//     server-to-server packet; it is filtered by the full header filter and
//     its flow is not cached (path PATH_PORT_EQUAL).
//  2. Port matching. Otherwise the counter of the packet's unknown port (the
//     larger port, with a bit telling source from destination) is read. Zero
//     means no cached flow can match: the packet is filtered and its flow is
//     cached (PATH_PORT_ZERO), without searching the flow cache.
//  3. Flow cache search (state M). A hit forwards the packet with the cached
//     information, the fast path (PATH_CACHE_HIT).
//  4. A miss sends the header to the full header filter (state F), the slow
//     path; the result is forwarded and then cached (PATH_CACHE_MISS).
// The control follows the idle / match / filter machine of the document,
// with port comparison and port matching placed before the match state as
// the document proposes. Each flow cache insertion and deletion moves the
// matching port-matching counter up or down. Entries idle for longer than the
// adaptive timeout are deleted by the flow cache's ageing scan; the timeout
// is re-assigned every UPDATE_TICKS ticks from the filtered cache
// utilization.
//
// This design's own choices: one packet is processed at a time; a packet
// whose flow cannot be cached because the cache is full is forwarded
// anyway (counted in stat_full); the time base is an external one-pulse
// `tick` per time unit (one second for the default timeout settings).
//
// Interface and timing:
//  * ready rises once the port-matching table and the flow cache have
//    initialised themselves after reset (NUM_PORTS cycles by default).
//  * Headers enter on hdr_valid/hdr_ready. The forwarding decision comes out
//    as a one-cycle dec_valid pulse with dec_key, dec_fwd and dec_path; it
//    cannot be held back. Latency, in clock edges from the one that accepts
//    the header to the one that raises dec_valid: 3 + P for a cache hit found
//    at the P-th entry compared, 2 + T_f for an equal-port packet, 3 + T_f
//    after a zero port count and 6 + P + T_f after a cache miss that compared
//    P entries, where T_f is the filter's search time (full_header_filter)
//    and the flow cache was idle. A cached flow takes 2 more
//    cycles (more if the cache is busy ageing) before the next header is
//    accepted.
//  * Filtering rules are written through rw_valid/rw_idx/rw_en/rw_rule.
//  * Status: the current timeout (ticks), the cache occupancy, the filtered
//    utilization (rho_hat scaled by ENTRIES * 2^16) and packet counters per
//    path; stat_full counts flows that found the cache full.
module flow_processor
  import fc_pkg::*;
#(
  parameter int unsigned ENTRIES      = 4096,   // flow cache entries
  parameter int unsigned BUCKETS      = 4096,   // flow cache hash buckets
  parameter int unsigned NUM_PORTS    = 65536,  // port-matching rows
  parameter int unsigned NUM_RULES    = 64,     // filtering rules
  parameter int unsigned TS_W         = 16,     // time stamp / timeout width
  parameter int unsigned T_INIT       = 32,     // initial timeout, ticks
  parameter int unsigned T_MIN        = 4,      // timeout lower bound, ticks
  parameter int unsigned DELTA_T      = 2,      // timeout step, ticks
  parameter int unsigned UPDATE_TICKS = 1,      // ticks between timeout updates
  localparam int unsigned CNT_W       = $clog2(ENTRIES + 1),
  localparam int unsigned RI_W        = $clog2(NUM_RULES)
) (
  input  logic              clk,
  input  logic              rst_n,
  output logic              ready,
  input  logic              tick,
  // packet headers from the input ports
  input  logic              hdr_valid,
  output logic              hdr_ready,
  input  flow_key_t         hdr_key,
  // forwarding decisions to the switching fabric
  output logic              dec_valid,
  output flow_key_t         dec_key,
  output fwd_info_t         dec_fwd,
  output path_e             dec_path,
  // filtering rule table
  input  logic              rw_valid,
  input  logic [RI_W-1:0]   rw_idx,
  input  logic              rw_en,
  input  rule_t             rw_rule,
  // status
  output logic [TS_W-1:0]   timeout,
  output logic [CNT_W-1:0]  occupancy,
  output logic [CNT_W+15:0] util_filtered,  // rho_hat * ENTRIES * 2^16
  output logic [31:0]       stat_pkts,
  output logic [31:0]       stat_hit,
  output logic [31:0]       stat_equal,
  output logic [31:0]       stat_zero,
  output logic [31:0]       stat_miss,
  output logic [31:0]       stat_full
);

  // ------------------------------------------------------------- time base
  logic [TS_W-1:0] now;
  logic [15:0]     upd_cnt;
  logic            to_update;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      now     <= '0;
      upd_cnt <= '0;
    end else if (tick) begin
      now     <= now + 1'b1;
      upd_cnt <= (upd_cnt == 16'(UPDATE_TICKS - 1)) ? '0 : upd_cnt + 1'b1;
    end
  end
  assign to_update = tick && (upd_cnt == 16'(UPDATE_TICKS - 1));

  // ------------------------------------------------------------ sub-blocks
  logic              pm_init, fc_init;
  logic              pc_equal, pc_is_dst;
  logic [PORT_W-1:0] pc_port;
  logic              up_equal, up_is_dst;
  logic [PORT_W-1:0] up_port;

  logic              lk_valid, lk_rsp_valid, lk_nonzero;
  logic [CNT_W-1:0]  lk_count;

  logic              fc_cmd_valid, fc_cmd_ready, fc_cmd_insert;
  fwd_info_t         fc_cmd_fwd;
  logic              fc_rsp_valid, fc_rsp_insert, fc_rsp_hit, fc_rsp_full;
  fwd_info_t         fc_rsp_fwd;
  logic [CNT_W-1:0]  fc_rsp_probes;
  logic              fc_upd_valid, fc_upd_inc;
  flow_key_t         fc_upd_key;

  logic              fh_req_valid, fh_req_ready, fh_resp_valid, fh_resp_matched;
  fwd_info_t         fh_resp_fwd;
  logic [RI_W-1:0]   fh_resp_rule;

  flow_key_t         key_q;

  // packet path: comparison of the arriving header
  port_compare u_pc (
    .src_port      (hdr_key.src_port),
    .dst_port      (hdr_key.dst_port),
    .ports_equal   (pc_equal),
    .unknown_port  (pc_port),
    .unknown_is_dst(pc_is_dst)
  );

  // update path: comparison of the key the flow cache added or removed
  port_compare u_pc_upd (
    .src_port      (fc_upd_key.src_port),
    .dst_port      (fc_upd_key.dst_port),
    .ports_equal   (up_equal),
    .unknown_port  (up_port),
    .unknown_is_dst(up_is_dst)
  );

  port_match_table #(
    .NUM_PORTS(NUM_PORTS),
    .CNT_W    (CNT_W)
  ) u_pm (
    .clk         (clk),
    .rst_n       (rst_n),
    .init_done   (pm_init),
    .lk_valid    (lk_valid),
    .lk_port     (pc_port),
    .lk_is_dst   (pc_is_dst),
    .lk_rsp_valid(lk_rsp_valid),
    .lk_nonzero  (lk_nonzero),
    .lk_count    (lk_count),
    .upd_valid   (fc_upd_valid),
    .upd_port    (up_port),
    .upd_is_dst  (up_is_dst),
    .upd_inc     (fc_upd_inc)
  );

  flow_cache_table #(
    .ENTRIES(ENTRIES),
    .BUCKETS(BUCKETS),
    .TS_W   (TS_W)
  ) u_fc (
    .clk       (clk),
    .rst_n     (rst_n),
    .init_done (fc_init),
    .cmd_valid (fc_cmd_valid),
    .cmd_ready (fc_cmd_ready),
    .cmd_insert(fc_cmd_insert),
    .cmd_key   (key_q),
    .cmd_fwd   (fc_cmd_fwd),
    .rsp_valid (fc_rsp_valid),
    .rsp_insert(fc_rsp_insert),
    .rsp_hit   (fc_rsp_hit),
    .rsp_full  (fc_rsp_full),
    .rsp_fwd   (fc_rsp_fwd),
    .rsp_probes(fc_rsp_probes),
    .now       (now),
    .timeout   (timeout),
    .age_en    (1'b1),
    .upd_valid (fc_upd_valid),
    .upd_inc   (fc_upd_inc),
    .upd_key   (fc_upd_key),
    .occupancy (occupancy)
  );

  full_header_filter #(
    .NUM_RULES(NUM_RULES)
  ) u_fh (
    .clk         (clk),
    .rst_n       (rst_n),
    .rw_valid    (rw_valid),
    .rw_idx      (rw_idx),
    .rw_en       (rw_en),
    .rw_rule     (rw_rule),
    .req_valid   (fh_req_valid),
    .req_ready   (fh_req_ready),
    .req_key     (key_q),
    .resp_valid  (fh_resp_valid),
    .resp_fwd    (fh_resp_fwd),
    .resp_matched(fh_resp_matched),
    .resp_rule   (fh_resp_rule)
  );

  adaptive_timeout #(
    .CAPACITY(ENTRIES),
    .T_W     (TS_W),
    .T_INIT  (T_INIT),
    .T_MIN   (T_MIN),
    .DELTA_T (DELTA_T)
  ) u_to (
    .clk      (clk),
    .rst_n    (rst_n),
    .update   (to_update),
    .occupancy(occupancy),
    .timeout  (timeout),
    .rho_hat  (util_filtered)
  );

  // --------------------------------------------------------------- control
  typedef enum logic [3:0] {
    S_INIT,    // waiting for the tables to initialise
    S_IDLE,    // I: waiting for a packet
    S_PM,      // port-matching counter being read
    S_MREQ,    // issuing the flow cache search
    S_M,       // M: flow cache search
    S_FREQ,    // issuing the full header filter request
    S_F,       // F: full header filtering
    S_INSREQ,  // issuing the flow cache insertion
    S_INS      // waiting for the insertion to finish
  } state_e;

  state_e    state;
  path_e     path_q;
  fwd_info_t fwd_q;

  assign ready         = (state != S_INIT);
  assign hdr_ready     = (state == S_IDLE);
  assign lk_valid      = (state == S_IDLE) && hdr_valid && !pc_equal;
  assign fc_cmd_valid  = (state == S_MREQ) || (state == S_INSREQ);
  assign fc_cmd_insert = (state == S_INSREQ);
  assign fc_cmd_fwd    = fwd_q;
  assign fh_req_valid  = (state == S_FREQ);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_INIT;
      key_q      <= '0;
      path_q     <= PATH_CACHE_HIT;
      fwd_q      <= '0;
      dec_valid  <= 1'b0;
      dec_key    <= '0;
      dec_fwd    <= '0;
      dec_path   <= PATH_CACHE_HIT;
      stat_pkts  <= '0;
      stat_hit   <= '0;
      stat_equal <= '0;
      stat_zero  <= '0;
      stat_miss  <= '0;
      stat_full  <= '0;
    end else begin
      dec_valid <= 1'b0;
      unique case (state)
        S_INIT: if (pm_init && fc_init) state <= S_IDLE;

        S_IDLE: if (hdr_valid) begin
          key_q     <= hdr_key;
          stat_pkts <= stat_pkts + 1'b1;
          if (pc_equal) begin
            path_q     <= PATH_PORT_EQUAL;
            stat_equal <= stat_equal + 1'b1;
            state      <= S_FREQ;
          end else begin
            state <= S_PM;
          end
        end

        S_PM: if (lk_rsp_valid) begin
          if (lk_nonzero) begin
            state <= S_MREQ;
          end else begin
            path_q    <= PATH_PORT_ZERO;
            stat_zero <= stat_zero + 1'b1;
            state     <= S_FREQ;
          end
        end

        S_MREQ: if (fc_cmd_ready) state <= S_M;

        S_M: if (fc_rsp_valid) begin
          if (fc_rsp_hit) begin
            dec_valid <= 1'b1;
            dec_key   <= key_q;
            dec_fwd   <= fc_rsp_fwd;
            dec_path  <= PATH_CACHE_HIT;
            stat_hit  <= stat_hit + 1'b1;
            state     <= S_IDLE;
          end else begin
            path_q    <= PATH_CACHE_MISS;
            stat_miss <= stat_miss + 1'b1;
            state     <= S_FREQ;
          end
        end

        S_FREQ: if (fh_req_ready) state <= S_F;

        S_F: if (fh_resp_valid) begin
          dec_valid <= 1'b1;
          dec_key   <= key_q;
          dec_fwd   <= fh_resp_fwd;
          dec_path  <= path_q;
          fwd_q     <= fh_resp_fwd;
          state     <= (path_q == PATH_PORT_EQUAL) ? S_IDLE : S_INSREQ;
        end

        S_INSREQ: if (fc_cmd_ready) state <= S_INS;

        S_INS: if (fc_rsp_valid) begin
          if (fc_rsp_full) stat_full <= stat_full + 1'b1;
          state <= S_IDLE;
        end

        default: state <= S_IDLE;
      endcase
    end
  end

  // The cache never stores a server-to-server flow.
  a_no_equal_port_flow: assert property (@(posedge clk) disable iff (!rst_n)
    fc_upd_valid |-> !up_equal);
  // Cache answers arrive for the command the control is waiting on.
  a_rsp_kind: assert property (@(posedge clk) disable iff (!rst_n)
    fc_rsp_valid |-> (fc_rsp_insert == (state == S_INS)));
  // A header is only taken when the tables are ready.
  a_hdr_after_init: assert property (@(posedge clk) disable iff (!rst_n)
    hdr_valid && hdr_ready |-> pm_init && fc_init);

endmodule
