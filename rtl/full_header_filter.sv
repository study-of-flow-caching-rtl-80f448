// full_header_filter: the slow-path packet classifier of the flow processor.
//
// It classifies a packet by all five header fields against an ordered table
// of filtering rules and returns the forwarding information of the first rule
// that matches. The document gives only this function (filtering rules that
// are changed at run time, a cost in clock cycles that grows with the number
// of rules); the rule format and the search are this design's choices: a
// linear search that tests one rule per clock cycle, so the filtering time
// T_f, from the edge that accepts a request to the one that raises
// resp_valid, is (index of the first matching rule + 1) cycles, or NUM_RULES
// cycles when no rule matches. A packet that matches no rule gets
// NOMATCH_ACTION (drop by default).
//
// Interface and timing:
//  * Rule write: rw_valid writes rw_rule and its enable bit rw_en into slot
//    rw_idx. After reset every slot is disabled. Writes may arrive at any
//    time; a search in progress sees the table as it is when it reaches a
//    slot.
//  * Search: req_valid/req_ready handshake with req_key; resp_valid pulses
//    for one cycle, T_f edges after acceptance, with resp_fwd,
//    resp_matched and resp_rule (index of the rule that matched).
module full_header_filter
  import fc_pkg::*;
#(
  parameter int unsigned NUM_RULES      = 64,
  parameter fwd_info_t   NOMATCH_ACTION = '{drop: 1'b1, out_port: '0, prio: '0}
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // rule table write port
  input  logic                         rw_valid,
  input  logic [$clog2(NUM_RULES)-1:0] rw_idx,
  input  logic                         rw_en,
  input  rule_t                        rw_rule,
  // search
  input  logic                         req_valid,
  output logic                         req_ready,
  input  flow_key_t                    req_key,
  output logic                         resp_valid,
  output fwd_info_t                    resp_fwd,
  output logic                         resp_matched,
  output logic [$clog2(NUM_RULES)-1:0] resp_rule
);

  localparam int unsigned RI_W = $clog2(NUM_RULES);

  rule_t          rules   [NUM_RULES];
  logic [NUM_RULES-1:0] rule_en;

  typedef enum logic [0:0] {S_IDLE, S_SCAN} state_e;
  state_e         state;
  flow_key_t      key_q;
  logic [RI_W-1:0] idx;
  logic           hit;

  always_ff @(posedge clk) begin
    if (rw_valid) rules[rw_idx] <= rw_rule;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        rule_en <= '0;
    else if (rw_valid) rule_en[rw_idx] <= rw_en;
  end

  assign hit       = rule_en[idx] && rule_matches(rules[idx], key_q);
  assign req_ready = (state == S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      key_q        <= '0;
      idx          <= '0;
      resp_valid   <= 1'b0;
      resp_fwd     <= '0;
      resp_matched <= 1'b0;
      resp_rule    <= '0;
    end else begin
      resp_valid <= 1'b0;
      unique case (state)
        S_IDLE: if (req_valid) begin
          key_q <= req_key;
          idx   <= '0;
          state <= S_SCAN;
        end
        S_SCAN: begin
          if (hit || idx == RI_W'(NUM_RULES - 1)) begin
            resp_valid   <= 1'b1;
            resp_matched <= hit;
            resp_rule    <= idx;
            resp_fwd     <= hit ? rules[idx].action : NOMATCH_ACTION;
            state        <= S_IDLE;
          end else begin
            idx <= idx + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
