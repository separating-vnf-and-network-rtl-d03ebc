// hsn_fe: HSN forwarding element, the top of the design.
//
// An SDN forwarding element whose match tables are split in two halves
// with two owners. The HA half (NUM_HA tables in series, each with its own
// match selector and bit-granular action processor) runs VNF processing
// offloaded from software, configured by the hardware-acceleration manager
// (HAM) through the HA control interface. The FW half (one 5-tuple table)
// only steers traffic and is configured by the network controller through
// the FE control interface, which also receives packet-ins. A classifier
// after the parser reads each packet's service tag and sends it either
// through the HA tables and then the FW table (HA path) or to the FW table
// alone (forwarding-only path). Because the two halves never share a table,
// VNF rules and forwarding rules cannot conflict, and only the network
// controller ever receives packets.
//
//   s_* stream -> parser -> classifier -> HA table 0 .. NUM_HA-1 -> FW table
//                                                  |                 |-> fwd_*
//                 HAM  <-> hsn_ha_ctrl ------------+                 |-> drop
//          controller  <-> hsn_fe_ctrl -> classifier, FW table <-----+ packet-in
//
// Timing: one packet per clock through the tables (after the parser, which
// takes one 64-bit word per clock). Latency from the last word of a packet
// to fwd_valid / drop_valid is 1 (parser) + 1 (classifier) + 2 per HA
// table + 2 (FW table) clocks, 10 with three HA tables; packets on both
// paths take the same time, so order is kept. Packet-ins reach pin_* one
// clock later through a buffer.
//
// Three HA tables of 64-bit match width, a 5-tuple FW table, a 512-bit
// header vector and eight ports follow the prototype; depths, encodings and
// interfaces are this design's choices (see hsn_pkg).
module hsn_fe
  import hsn_pkg::*;
#(
  parameter int HA_DEPTH_P  = HA_DEPTH,
  parameter int FW_DEPTH_P  = FW_DEPTH,
  parameter int CLS_DEPTH_P = CLS_DEPTH,
  parameter int PIN_DEPTH   = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  // packets in
  input  logic              s_valid,
  output logic              s_ready,
  input  logic [63:0]       s_data,
  input  logic [7:0]        s_keep,
  input  logic              s_last,
  input  logic [PORT_W-1:0] s_port,
  // packets out (header vector and output port) and drops
  output logic              fwd_valid,
  output out_t              fwd,
  output logic              drop_valid,
  // HA control interface (HAM)
  input  logic              ham_msg_valid,
  output logic              ham_msg_ready,
  input  ha_msg_t           ham_msg,
  output logic              ham_rsp_valid,
  input  logic              ham_rsp_ready,
  output ha_rsp_t           ham_rsp,
  // FE control interface (network controller)
  input  logic              ctl_msg_valid,
  output logic              ctl_msg_ready,
  input  fe_msg_t           ctl_msg,
  output logic              ctl_rsp_valid,
  input  logic              ctl_rsp_ready,
  output fe_op_e            ctl_rsp_op,
  output logic              ctl_rsp_ok,
  output logic              pin_valid,
  input  logic              pin_ready,
  output hv_t               pin_hv,
  output logic [31:0]       pin_overflow
);

  localparam int HAW = (HA_DEPTH_P > 1) ? $clog2(HA_DEPTH_P) : 1;
  localparam int FAW = (FW_DEPTH_P > 1) ? $clog2(FW_DEPTH_P) : 1;
  localparam int CAW = (CLS_DEPTH_P > 1) ? $clog2(CLS_DEPTH_P) : 1;

  // ------------------------------------------------------------ parser
  logic hv_valid;
  hv_t  hv;

  hsn_parser u_parser (
    .clk, .rst_n,
    .s_valid, .s_ready, .s_data, .s_keep, .s_last, .s_port,
    .hv_valid (hv_valid),
    .hv       (hv)
  );

  // ------------------------------------------------------- FE control
  logic                fw_we, fw_valid, cls_we, cls_valid;
  logic [FAW-1:0]      fw_idx;
  logic [FW_KEY_W-1:0] fw_key_w, fw_mask;
  fw_action_t          fw_act;
  logic [CAW-1:0]      cls_idx;
  logic [TAG_W-1:0]    cls_tag;
  logic [TBL_W-1:0]    cls_first;
  logic                dp_pin_valid;
  hv_t                 dp_pin_hv;

  hsn_fe_ctrl #(
    .FW_DEPTH_P (FW_DEPTH_P), .CLS_DEPTH_P (CLS_DEPTH_P), .PIN_DEPTH (PIN_DEPTH)
  ) u_fe_ctrl (
    .clk, .rst_n,
    .msg_valid (ctl_msg_valid), .msg_ready (ctl_msg_ready), .msg (ctl_msg),
    .rsp_valid (ctl_rsp_valid), .rsp_ready (ctl_rsp_ready),
    .rsp_op    (ctl_rsp_op),    .rsp_ok    (ctl_rsp_ok),
    .pin_valid, .pin_ready, .pin_hv, .pin_overflow,
    .fw_we, .fw_idx, .fw_valid, .fw_key_o (fw_key_w), .fw_mask, .fw_act,
    .cls_we, .cls_idx, .cls_valid, .cls_tag, .cls_first_tbl (cls_first),
    .dp_pin_valid, .dp_pin_hv
  );

  // -------------------------------------------------------- classifier
  logic tok_valid [NUM_HA+1];
  pkt_t tok       [NUM_HA+1];

  hsn_classifier #(.DEPTH(CLS_DEPTH_P)) u_cls (
    .clk, .rst_n,
    .cfg_we (cls_we), .cfg_idx (cls_idx), .cfg_valid (cls_valid),
    .cfg_tag (cls_tag), .cfg_first_tbl (cls_first),
    .in_valid  (hv_valid),
    .in_hv     (hv),
    .out_valid (tok_valid[0]),
    .out_pkt   (tok[0])
  );

  // ------------------------------------------------ HA control + tables
  logic [NUM_HA-1:0]                 sel_we, rule_we;
  sel_cfg_t                          sel_cfg;
  logic [HAW-1:0]                    rule_idx;
  logic                              rule_valid;
  logic [HA_W-1:0]                   rule_key, rule_mask;
  ha_action_t                        rule_act;
  logic [NUM_HA-1:0][HA_DEPTH_P-1:0] ha_valid_bits;

  hsn_ha_ctrl #(.DEPTH(HA_DEPTH_P)) u_ha_ctrl (
    .clk, .rst_n,
    .msg_valid (ham_msg_valid), .msg_ready (ham_msg_ready), .msg (ham_msg),
    .rsp_valid (ham_rsp_valid), .rsp_ready (ham_rsp_ready), .rsp (ham_rsp),
    .sel_we, .sel_cfg, .rule_we, .rule_idx, .rule_valid,
    .rule_key, .rule_mask, .rule_act,
    .valid_bits (ha_valid_bits)
  );

  for (genvar t = 0; t < NUM_HA; t++) begin : g_ha
    hsn_ha_table #(.TABLE_ID(t), .DEPTH(HA_DEPTH_P)) u_ha (
      .clk, .rst_n,
      .sel_we     (sel_we[t]),
      .sel_cfg    (sel_cfg),
      .rule_we    (rule_we[t]),
      .rule_idx   (rule_idx),
      .rule_valid (rule_valid),
      .rule_key   (rule_key),
      .rule_mask  (rule_mask),
      .rule_act   (rule_act),
      .valid_bits (ha_valid_bits[t]),
      .in_valid   (tok_valid[t]),
      .in_pkt     (tok[t]),
      .out_valid  (tok_valid[t+1]),
      .out_pkt    (tok[t+1])
    );
  end

  // ---------------------------------------------------------- FW table
  logic [FW_DEPTH_P-1:0] fw_valid_bits;

  hsn_fw_table #(.DEPTH(FW_DEPTH_P)) u_fw (
    .clk, .rst_n,
    .rule_we (fw_we), .rule_idx (fw_idx), .rule_valid (fw_valid),
    .rule_key (fw_key_w), .rule_mask (fw_mask), .rule_act (fw_act),
    .valid_bits (fw_valid_bits),
    .in_valid   (tok_valid[NUM_HA]),
    .in_pkt     (tok[NUM_HA]),
    .fwd_valid, .fwd,
    .pin_valid  (dp_pin_valid),
    .pin_hv     (dp_pin_hv),
    .drop_valid
  );

endmodule
