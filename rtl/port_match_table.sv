// port_match_table: the port-matching module of the flow processor.
//
// A table with one row per port number and two columns, column 0 for source
// ports and column 1 for destination ports. Entry [k][c] counts the flows now
// held in the flow cache whose unknown port (the larger of their two ports,
// see port_compare) is k and sits in field c. A packet whose unknown-port
// entry is zero cannot match any cached flow, so it can be sent to full header
// filtering without searching the flow cache. The table and its use follow
// the document; the counter width, the reset sweep and the timing are this
// design's choices.
//
// Interface and timing:
//  * After reset the table clears itself, one row per cycle (NUM_PORTS
//    cycles); init_done rises when it is finished. Requests are ignored
//    before that.
//  * Lookup: lk_valid with lk_port/lk_is_dst; one cycle later lk_rsp_valid
//    with lk_count and lk_nonzero. An update to the same entry in the cycle
//    of the lookup is forwarded into the answer.
//  * Update: upd_valid with upd_port/upd_is_dst and upd_inc (1 increment on
//    flow cache insertion, 0 decrement on deletion), read-modify-write in the
//    cycle it is presented. One update per cycle.
// The counters saturate neither way; assertions flag an increment of a full
// counter and a decrement of an empty one, which the flow cache never asks
// for when CNT_W can hold its entry count.
module port_match_table
  import fc_pkg::*;
#(
  parameter int unsigned NUM_PORTS = 65536,  // one row per 16-bit port number
  parameter int unsigned CNT_W     = 13      // holds 0..4096 cached flows
) (
  input  logic              clk,
  input  logic              rst_n,
  output logic              init_done,
  // lookup
  input  logic              lk_valid,
  input  logic [PORT_W-1:0] lk_port,
  input  logic              lk_is_dst,
  output logic              lk_rsp_valid,
  output logic              lk_nonzero,
  output logic [CNT_W-1:0]  lk_count,
  // update
  input  logic              upd_valid,
  input  logic [PORT_W-1:0] upd_port,
  input  logic              upd_is_dst,
  input  logic              upd_inc
);

  localparam int unsigned IDX_W = (NUM_PORTS > 1) ? $clog2(NUM_PORTS) : 1;

  logic [CNT_W-1:0] cnt_src [NUM_PORTS];
  logic [CNT_W-1:0] cnt_dst [NUM_PORTS];

  logic [IDX_W-1:0] clr_idx;
  logic             clearing;

  logic [IDX_W-1:0] upd_idx, lk_idx;
  logic [CNT_W-1:0] upd_old, upd_new;
  logic             upd_go;

  assign upd_idx = upd_port[IDX_W-1:0];
  assign lk_idx  = lk_port[IDX_W-1:0];
  assign upd_go  = upd_valid && init_done;

  always_comb begin
    upd_old = upd_is_dst ? cnt_dst[upd_idx] : cnt_src[upd_idx];
    upd_new = upd_inc ? upd_old + 1'b1 : upd_old - 1'b1;
  end

  // reset sweep
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      clearing  <= 1'b1;
      clr_idx   <= '0;
      init_done <= 1'b0;
    end else if (clearing) begin
      clr_idx <= clr_idx + 1'b1;
      if (clr_idx == IDX_W'(NUM_PORTS - 1)) begin
        clearing  <= 1'b0;
        init_done <= 1'b1;
      end
    end
  end

  // counter storage: cleared by the sweep, then read-modify-write updates
  always_ff @(posedge clk) begin
    if (clearing) begin
      cnt_src[clr_idx] <= '0;
      cnt_dst[clr_idx] <= '0;
    end else if (upd_go) begin
      if (upd_is_dst) cnt_dst[upd_idx] <= upd_new;
      else            cnt_src[upd_idx] <= upd_new;
    end
  end

  // lookup, registered, with forwarding of a same-cycle update
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lk_rsp_valid <= 1'b0;
      lk_count     <= '0;
    end else begin
      lk_rsp_valid <= lk_valid && init_done;
      if (lk_valid && init_done) begin
        if (upd_go && upd_idx == lk_idx && upd_is_dst == lk_is_dst)
          lk_count <= upd_new;
        else
          lk_count <= lk_is_dst ? cnt_dst[lk_idx] : cnt_src[lk_idx];
      end
    end
  end

  assign lk_nonzero = (lk_count != '0);

  // An update must never wrap a counter.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    upd_go && upd_inc |-> upd_old != '1);
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n)
    upd_go && !upd_inc |-> upd_old != '0);

endmodule
