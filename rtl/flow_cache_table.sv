// flow_cache_table: hashed flow cache with chained buckets and entry timeout.
//
// Each entry holds a flow's 5-tuple key, its forwarding information, the
// time it was last used and a link to the next entry of its hash bucket.
// Collisions are resolved, as the document describes, by keeping all entries
// of a bucket on a singly linked list: a search computes the hash of the key,
// reads the bucket head, and walks the list comparing all five fields of each
// entry. New entries are taken from a stack of free entries and linked in at
// the head of their bucket. Entries that have been idle for more than
// `timeout` ticks are deleted by an ageing scan that runs whenever no command
// is waiting; it unlinks the entry (walking its bucket to find the
// predecessor) and returns it to the free stack. The document gives the
// hashing, the linked lists and the timeout; the hash function (fc_pkg),
// number of buckets, free stack and the ageing scan are this design's choices.
//
// Interface and timing (one operation at a time):
//  * After reset the table initialises itself in max(ENTRIES, BUCKETS)
//    cycles; init_done then rises.
//  * Commands use a valid/ready handshake (cmd_ready is high only when the
//    table is idle). An insertion raises rsp_valid on the edge that accepts
//    it. A lookup raises it P edges later when it hits at the P-th entry
//    compared, and P + 1 edges later when it misses after comparing P
//    entries (rsp_probes = P); a hit refreshes the entry's last-use time.
//    For an insertion, rsp_full reports that
//    no free entry was left and nothing was stored. The caller must not
//    insert a key that is already cached.
//  * Every insertion and deletion is reported, one cycle after it takes
//    effect, on upd_valid/upd_inc/upd_key, so that the port-matching counters
//    can follow the cache contents.
//  * occupancy is the number of valid entries.
module flow_cache_table
  import fc_pkg::*;
#(
  parameter int unsigned ENTRIES = 4096,
  parameter int unsigned BUCKETS = 4096,   // power of two, at most 65536
  parameter int unsigned TS_W    = 16,     // time stamp width, ticks
  localparam int unsigned IDX_W  = $clog2(ENTRIES),
  localparam int unsigned CNT_W  = $clog2(ENTRIES + 1),
  localparam int unsigned HASH_W = $clog2(BUCKETS)
) (
  input  logic             clk,
  input  logic             rst_n,
  output logic             init_done,
  // commands
  input  logic             cmd_valid,
  output logic             cmd_ready,
  input  logic             cmd_insert,   // 0: lookup, 1: insert
  input  flow_key_t        cmd_key,
  input  fwd_info_t        cmd_fwd,
  output logic             rsp_valid,
  output logic             rsp_insert,   // response belongs to an insert
  output logic             rsp_hit,      // lookup found the key
  output logic             rsp_full,     // insert found no free entry
  output fwd_info_t        rsp_fwd,
  output logic [CNT_W-1:0] rsp_probes,   // entries compared by a lookup
  // time and ageing
  input  logic [TS_W-1:0]  now,
  input  logic [TS_W-1:0]  timeout,
  input  logic             age_en,
  // content changes, for the port-matching counters
  output logic             upd_valid,
  output logic             upd_inc,
  output flow_key_t        upd_key,
  output logic [CNT_W-1:0] occupancy
);

  localparam int unsigned INIT_N = (ENTRIES > BUCKETS) ? ENTRIES : BUCKETS;
  localparam int unsigned INIT_W = $clog2(INIT_N);

  typedef struct packed {
    logic             valid;
    logic [IDX_W-1:0] idx;
  } ptr_t;

  // storage
  flow_key_t       key_mem  [ENTRIES];
  fwd_info_t       fwd_mem  [ENTRIES];
  logic [TS_W-1:0] ts_mem   [ENTRIES];
  ptr_t            next_mem [ENTRIES];
  logic [IDX_W-1:0] free_mem [ENTRIES];
  ptr_t            head_mem [BUCKETS];
  logic [ENTRIES-1:0] ent_valid;

  typedef enum logic [1:0] {S_INIT, S_IDLE, S_LWALK, S_DWALK} state_e;
  state_e            state;
  logic [INIT_W-1:0] init_idx;
  logic [CNT_W-1:0]  free_cnt;
  flow_key_t         key_q;
  ptr_t              cur, prev;
  logic [HASH_W-1:0] bkt_q;
  logic [IDX_W-1:0]  age_ptr;
  logic [CNT_W-1:0]  probes;

  // combinational helpers
  logic [HASH_W-1:0] cmd_bkt, age_bkt;
  logic [IDX_W-1:0]  free_top;
  logic              age_expired;
  logic [TS_W-1:0]   idle_time;

  always_comb begin
    cmd_bkt     = HASH_W'(flow_hash(cmd_key));
    age_bkt     = HASH_W'(flow_hash(key_mem[age_ptr]));
    free_top    = free_mem[IDX_W'(free_cnt - 1'b1)];
    idle_time   = now - ts_mem[age_ptr];
    age_expired = ent_valid[age_ptr] && (idle_time > timeout);
  end

  assign cmd_ready = (state == S_IDLE);
  assign init_done = (state != S_INIT);
  assign occupancy = CNT_W'(ENTRIES) - free_cnt;

  logic do_insert, do_lookup, do_age, ins_ok;
  logic lw_hit, lw_end, dw_found;
  assign do_insert = (state == S_IDLE) && cmd_valid && cmd_insert;
  assign do_lookup = (state == S_IDLE) && cmd_valid && !cmd_insert;
  assign do_age    = (state == S_IDLE) && !cmd_valid && age_en;
  assign ins_ok    = do_insert && (free_cnt != '0);
  assign lw_hit    = (state == S_LWALK) && cur.valid && (key_mem[cur.idx] == key_q);
  assign lw_end    = (state == S_LWALK) && !cur.valid;
  assign dw_found  = (state == S_DWALK) && cur.valid && (cur.idx == age_ptr);

  // ---------------------------------------------------------------- memories
  always_ff @(posedge clk) begin
    if (ins_ok) begin
      key_mem[free_top] <= cmd_key;
      fwd_mem[free_top] <= cmd_fwd;
    end
  end

  always_ff @(posedge clk) begin
    if (ins_ok)      ts_mem[free_top] <= now;
    else if (lw_hit) ts_mem[cur.idx]  <= now;
  end

  always_ff @(posedge clk) begin
    if (ins_ok)                    next_mem[free_top] <= head_mem[cmd_bkt];
    else if (dw_found && prev.valid) next_mem[prev.idx] <= next_mem[age_ptr];
  end

  always_ff @(posedge clk) begin
    if (state == S_INIT)             head_mem[HASH_W'(init_idx)] <= '0;
    else if (ins_ok)                 head_mem[cmd_bkt] <= '{valid: 1'b1, idx: free_top};
    else if (dw_found && !prev.valid) head_mem[bkt_q]  <= next_mem[age_ptr];
  end

  always_ff @(posedge clk) begin
    if (state == S_INIT)  free_mem[IDX_W'(init_idx)] <= IDX_W'(init_idx);
    else if (dw_found)    free_mem[IDX_W'(free_cnt)] <= age_ptr;
  end

  // ------------------------------------------------------------ control path
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_INIT;
      init_idx   <= '0;
      free_cnt   <= '0;
      ent_valid  <= '0;
      key_q      <= '0;
      cur        <= '0;
      prev       <= '0;
      bkt_q      <= '0;
      age_ptr    <= '0;
      probes     <= '0;
      rsp_valid  <= 1'b0;
      rsp_insert <= 1'b0;
      rsp_hit    <= 1'b0;
      rsp_full   <= 1'b0;
      rsp_fwd    <= '0;
      rsp_probes <= '0;
      upd_valid  <= 1'b0;
      upd_inc    <= 1'b0;
      upd_key    <= '0;
    end else begin
      rsp_valid <= 1'b0;
      upd_valid <= 1'b0;
      unique case (state)
        S_INIT: begin
          init_idx <= init_idx + 1'b1;
          if (init_idx == INIT_W'(INIT_N - 1)) begin
            free_cnt <= CNT_W'(ENTRIES);
            state    <= S_IDLE;
          end
        end

        S_IDLE: begin
          if (do_insert) begin
            rsp_valid  <= 1'b1;
            rsp_insert <= 1'b1;
            rsp_hit    <= 1'b0;
            rsp_full   <= !ins_ok;
            rsp_fwd    <= cmd_fwd;
            rsp_probes <= '0;
            if (ins_ok) begin
              free_cnt            <= free_cnt - 1'b1;
              ent_valid[free_top] <= 1'b1;
              upd_valid           <= 1'b1;
              upd_inc             <= 1'b1;
              upd_key             <= cmd_key;
            end
          end else if (do_lookup) begin
            key_q  <= cmd_key;
            cur    <= head_mem[cmd_bkt];
            probes <= '0;
            state  <= S_LWALK;
          end else if (do_age) begin
            if (age_expired) begin
              bkt_q <= age_bkt;
              cur   <= head_mem[age_bkt];
              prev  <= '0;
              state <= S_DWALK;
            end else begin
              age_ptr <= (age_ptr == IDX_W'(ENTRIES - 1)) ? '0 : age_ptr + 1'b1;
            end
          end
        end

        S_LWALK: begin
          if (lw_hit || lw_end) begin
            rsp_valid  <= 1'b1;
            rsp_insert <= 1'b0;
            rsp_hit    <= lw_hit;
            rsp_full   <= 1'b0;
            rsp_fwd    <= lw_hit ? fwd_mem[cur.idx] : '0;
            rsp_probes <= probes + CNT_W'(lw_hit);
            state      <= S_IDLE;
          end else begin
            probes <= probes + 1'b1;
            cur    <= next_mem[cur.idx];
          end
        end

        S_DWALK: begin
          if (dw_found) begin
            ent_valid[age_ptr] <= 1'b0;
            free_cnt           <= free_cnt + 1'b1;
            upd_valid          <= 1'b1;
            upd_inc            <= 1'b0;
            upd_key            <= key_mem[age_ptr];
            age_ptr <= (age_ptr == IDX_W'(ENTRIES - 1)) ? '0 : age_ptr + 1'b1;
            state   <= S_IDLE;
          end else begin
            prev <= cur;
            cur  <= next_mem[cur.idx];
          end
        end

        default: state <= S_IDLE;
      endcase
    end
  end

  // An entry being deleted is always on its bucket's list.
  a_delete_finds_entry: assert property (@(posedge clk) disable iff (!rst_n)
    state == S_DWALK |-> cur.valid);
  // The free stack never over- or underflows.
  a_free_count: assert property (@(posedge clk) disable iff (!rst_n)
    free_cnt <= CNT_W'(ENTRIES));

endmodule
