// hsn_fw_table: the forwarding (FW) table, the steering half of the FE.
//
// The FW table matches only the in_port and the 5-tuple (IP source and
// destination, L4 source and destination port), 104 bits, in a TCAM of
// DEPTH rules, and its actions only forward: send to a port, send to the
// FE controller (packet-in) or drop. A packet that matches no rule goes to
// the FE controller so that it can install the path. The FW table is the
// only stage that can send a packet to a controller. A packet that an HA
// table already dropped is counted as dropped and not looked up.
//
// Timing: two pipeline stages, one packet per clock: stage 1 searches the
// TCAM, stage 2 reads the action and drives exactly one of fwd_valid,
// pin_valid and drop_valid for each input packet. Rules are written by the
// FE control interface (rule_valid=0 deletes).
//
// The 5-tuple match, forwarding-only actions and miss-to-controller follow
// the design; the depth and the TCAM form of the table are this design's.
module hsn_fw_table
  import hsn_pkg::*;
#(
  parameter int DEPTH = FW_DEPTH,
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                rule_we,
  input  logic [AW-1:0]       rule_idx,
  input  logic                rule_valid,
  input  logic [FW_KEY_W-1:0] rule_key,
  input  logic [FW_KEY_W-1:0] rule_mask,
  input  fw_action_t          rule_act,
  output logic [DEPTH-1:0]    valid_bits,
  input  logic                in_valid,
  input  pkt_t                in_pkt,
  // forwarded packet
  output logic                fwd_valid,
  output out_t                fwd,
  // packet-in to the FE controller
  output logic                pin_valid,
  output hv_t                 pin_hv,
  // dropped packet (by an HA table or by the FW table)
  output logic                drop_valid
);

  fw_action_t act_mem [DEPTH];

  always_ff @(posedge clk) begin
    if (rule_we && rule_valid) act_mem[rule_idx] <= rule_act;
  end

  logic          tc_hit;
  logic [AW-1:0] tc_idx;

  hsn_tcam #(.KEY_W(FW_KEY_W), .DEPTH(DEPTH)) u_tcam (
    .clk        (clk),
    .rst_n      (rst_n),
    .wr_en      (rule_we),
    .wr_idx     (rule_idx),
    .wr_valid   (rule_valid),
    .wr_key     (rule_key),
    .wr_mask    (rule_mask),
    .key        (fw_key(in_pkt.hv)),
    .hit        (tc_hit),
    .hit_idx    (tc_idx),
    .valid_bits (valid_bits)
  );

  logic          s1_valid, s1_hit, s1_drop;
  logic [AW-1:0] s1_idx;
  hv_t           s1_hv;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s1_valid <= 1'b0;
    else        s1_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    s1_hv   <= in_pkt.hv;
    s1_drop <= in_pkt.drop;
    s1_hit  <= tc_hit;
    s1_idx  <= tc_idx;
  end

  fw_action_t act;
  assign act = act_mem[s1_idx];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fwd_valid  <= 1'b0;
      pin_valid  <= 1'b0;
      drop_valid <= 1'b0;
    end else begin
      fwd_valid  <= s1_valid && !s1_drop && s1_hit && act.op == FW_OUTPUT;
      pin_valid  <= s1_valid && !s1_drop && (!s1_hit || act.op == FW_TO_CTRL);
      drop_valid <= s1_valid && (s1_drop || (s1_hit && act.op != FW_OUTPUT
                                                  && act.op != FW_TO_CTRL));
    end
  end

  always_ff @(posedge clk) begin
    fwd.hv   <= s1_hv;
    fwd.port <= act.port;
    pin_hv   <= s1_hv;
  end

endmodule
