// hsn_ha_table: one hardware-acceleration (HA) table of the FE.
//
// An HA table is a match selector, a TCAM match table of DEPTH rules with a
// 64-bit key, an action memory beside it, and an action processor. A packet
// is processed only when its next_tbl equals TABLE_ID and no earlier table
// dropped it; any other packet passes through untouched, with the same
// latency, so packets stay in order. On a hit the rule's action is applied
// and next_tbl becomes the action's go-to target; on a miss next_tbl moves
// to TABLE_ID+1 (the next HA table, or the FW table after the last one).
// An HA table never sends a packet to a controller, hit or miss.
//
// Timing: two pipeline stages, one token per clock. Stage 1 selects the key
// and searches the TCAM; stage 2 reads the action and applies it.
// Configuration (from the HA control interface): sel_we loads the match
// selector; rule_we writes (rule_valid=1) or deletes (rule_valid=0) rule
// rule_idx. valid_bits shows which rules are in use.
//
// The structure (selector, match table, action processor per table) and the
// miss behaviour follow the design; depth and pipelining are this design's.
module hsn_ha_table
  import hsn_pkg::*;
#(
  parameter int TABLE_ID = 0,
  parameter int DEPTH    = HA_DEPTH,
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  // configuration
  input  logic            sel_we,
  input  sel_cfg_t        sel_cfg,
  input  logic            rule_we,
  input  logic [AW-1:0]   rule_idx,
  input  logic            rule_valid,
  input  logic [HA_W-1:0] rule_key,
  input  logic [HA_W-1:0] rule_mask,
  input  ha_action_t      rule_act,
  output logic [DEPTH-1:0] valid_bits,
  // packet tokens
  input  logic            in_valid,
  input  pkt_t            in_pkt,
  output logic            out_valid,
  output pkt_t            out_pkt
);

  // ---------------------------------------------------- configuration
  sel_cfg_t   sel_q;
  ha_action_t act_mem [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sel_q <= '0;
    else if (sel_we) sel_q <= sel_cfg;
  end

  always_ff @(posedge clk) begin
    if (rule_we && rule_valid) act_mem[rule_idx] <= rule_act;
  end

  // ---------------------------------------------------- stage 1: match
  logic [HA_W-1:0] key;
  logic            tc_hit;
  logic [AW-1:0]   tc_idx;

  hsn_match_selector u_sel (
    .hv  (in_pkt.hv),
    .cfg (sel_q),
    .key (key)
  );

  hsn_tcam #(.KEY_W(HA_W), .DEPTH(DEPTH)) u_tcam (
    .clk        (clk),
    .rst_n      (rst_n),
    .wr_en      (rule_we),
    .wr_idx     (rule_idx),
    .wr_valid   (rule_valid),
    .wr_key     (rule_key),
    .wr_mask    (rule_mask),
    .key        (key),
    .hit        (tc_hit),
    .hit_idx    (tc_idx),
    .valid_bits (valid_bits)
  );

  logic          s1_valid, s1_active, s1_hit;
  logic [AW-1:0] s1_idx;
  pkt_t          s1_pkt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s1_valid <= 1'b0;
    else        s1_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    s1_pkt    <= in_pkt;
    s1_active <= (in_pkt.next_tbl == TBL_W'(TABLE_ID)) && !in_pkt.drop;
    s1_hit    <= tc_hit;
    s1_idx    <= tc_idx;
  end

  // ---------------------------------------------------- stage 2: action
  hv_t              ap_hv;
  logic             ap_drop;
  logic [TBL_W-1:0] ap_next;

  hsn_action_proc u_act (
    .hv_in    (s1_pkt.hv),
    .hit      (s1_hit),
    .act      (act_mem[s1_idx]),
    .miss_tbl (TBL_W'(TABLE_ID + 1)),
    .hv_out   (ap_hv),
    .drop     (ap_drop),
    .next_tbl (ap_next)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= s1_valid;
  end

  always_ff @(posedge clk) begin
    out_pkt <= s1_pkt;
    if (s1_active) begin
      out_pkt.hv       <= ap_hv;
      out_pkt.drop     <= ap_drop;
      out_pkt.next_tbl <= ap_next;
    end
  end

endmodule
