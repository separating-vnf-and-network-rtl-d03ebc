// hsn_pkg: types and constants shared by the HSN forwarding element.
//
// The forwarding element keeps traffic steering (one 5-tuple FW table,
// owned by the network controller) apart from VNF packet processing (N HA
// tables in series, owned by the hardware-acceleration manager, HAM). All
// stages work on one 512-bit header vector per packet. The header vector
// holds the OpenFlow 12-tuple, two validity flags, a 32-bit metadata word
// that HA tables use to pass results to each other, and the packet length;
// the remaining bits are spare.
//
// Numbers that follow the prototype: 512-bit header vector, three HA tables
// with a 64-bit match width, a 5-tuple FW table of 104 bits (the 296-bit
// total match width minus 3 x 64), four physical plus four DMA ports.
// This design's own choices: the field order inside the header vector, the
// 32-bit metadata, the 16-bit selector segments, two set operations per HA
// action, the table depths and the control message formats.
package hsn_pkg;

  // ---------------------------------------------------------------- sizes
  parameter int HV_W     = 512;            // header vector length
  parameter int PORT_W   = 8;              // in_port / output port
  parameter int NUM_PORTS = 8;             // 4 x 10G + 4 DMA ports
  parameter int NUM_HA   = 3;              // HA tables per FE
  parameter int HA_W     = 64;             // HA table match width
  parameter int SEG_W    = 16;             // match selector segment
  parameter int SEGS     = HA_W / SEG_W;   // segments per key
  parameter int OFF_W    = $clog2(HV_W);   // bit offset into the vector
  parameter int META_W   = 32;             // metadata between HA tables
  parameter int TAG_W    = 12;             // service tag (VLAN ID)
  parameter int FW_KEY_W = 104;            // in_port + 5-tuple
  parameter int NUM_SETS = 2;              // set operations per HA action
  parameter int TBL_W    = 2;              // table id; NUM_HA = FW table
  parameter int IDX_W    = 8;              // rule index field in messages
  parameter int HA_DEPTH = 32;             // rules per HA table
  parameter int FW_DEPTH = 32;             // rules in the FW table
  parameter int CLS_DEPTH = 16;            // classifier tag entries

  // ------------------------------------------------------- header vector
  typedef struct packed {
    logic [PORT_W-1:0] in_port;
    logic [47:0]       eth_dst;
    logic [47:0]       eth_src;
    logic [15:0]       eth_type;
    logic              vlan_valid;
    logic [2:0]        vlan_pcp;
    logic [11:0]       vlan_id;
    logic              ipv4_valid;
    logic [5:0]        ip_tos;      // DSCP
    logic [7:0]        ip_proto;
    logic [31:0]       ip_src;
    logic [31:0]       ip_dst;
    logic              l4_valid;
    logic [15:0]       tp_src;
    logic [15:0]       tp_dst;
    logic [META_W-1:0] meta;
    logic [15:0]       pkt_len;
    logic [HV_W-8-96-16-1-3-12-1-6-8-64-1-32-META_W-16-1:0] spare;
  } hv_t;

  // Bit offset (from bit 0 of the vector) of each field, for selector
  // and action configuration. Field order above is MSB first.
  localparam int SPARE_W      = HV_W-8-96-16-1-3-12-1-6-8-64-1-32-META_W-16;
  localparam int OFF_PKT_LEN  = SPARE_W;
  localparam int OFF_META     = OFF_PKT_LEN + 16;
  localparam int OFF_TP_DST   = OFF_META + META_W;
  localparam int OFF_TP_SRC   = OFF_TP_DST + 16;
  localparam int OFF_L4_VALID = OFF_TP_SRC + 16;
  localparam int OFF_IP_DST   = OFF_L4_VALID + 1;
  localparam int OFF_IP_SRC   = OFF_IP_DST + 32;
  localparam int OFF_IP_PROTO = OFF_IP_SRC + 32;
  localparam int OFF_IP_TOS   = OFF_IP_PROTO + 8;
  localparam int OFF_IPV4_VALID = OFF_IP_TOS + 6;
  localparam int OFF_VLAN_ID  = OFF_IPV4_VALID + 1;
  localparam int OFF_VLAN_PCP = OFF_VLAN_ID + 12;
  localparam int OFF_VLAN_VALID = OFF_VLAN_PCP + 3;
  localparam int OFF_ETH_TYPE = OFF_VLAN_VALID + 1;
  localparam int OFF_ETH_SRC  = OFF_ETH_TYPE + 16;
  localparam int OFF_ETH_DST  = OFF_ETH_SRC + 48;
  localparam int OFF_IN_PORT  = OFF_ETH_DST + 48;

  // ------------------------------------------------------ pipeline token
  // A header vector travelling through the tables, with its routing state.
  typedef struct packed {
    hv_t              hv;
    logic [TBL_W-1:0] next_tbl;  // HA table that acts next; NUM_HA = FW
    logic             ha_path;   // classifier chose the HA path
    logic             drop;      // an HA action dropped the packet
  } pkt_t;

  // -------------------------------------------------------- HA tables
  typedef struct packed {
    logic [SEGS-1:0][OFF_W-1:0] off;   // bit offset of each segment
  } sel_cfg_t;

  typedef struct packed {
    logic             en;
    logic [OFF_W-1:0] off;    // lowest header-vector bit written
    logic [HA_W-1:0]  mask;   // which of the 64 bits are written
    logic [HA_W-1:0]  val;
  } ha_set_t;

  typedef struct packed {
    ha_set_t [NUM_SETS-1:0] set;
    logic                   drop;
    logic [TBL_W-1:0]       next_tbl;  // go-to: next table id
  } ha_action_t;

  // -------------------------------------------------------- FW table
  typedef enum logic [1:0] {
    FW_OUTPUT  = 2'd0,
    FW_TO_CTRL = 2'd1,
    FW_DROP    = 2'd2
  } fw_op_e;

  typedef struct packed {
    fw_op_e            op;
    logic [PORT_W-1:0] port;
  } fw_action_t;

  // Packet leaving the FE on a port.
  typedef struct packed {
    hv_t               hv;
    logic [PORT_W-1:0] port;
  } out_t;

  // ------------------------------------------ HA control interface (HAM)
  typedef enum logic [1:0] {
    HA_STATUS  = 2'd0,   // status enquiry: total and idle rules
    HA_SEL_CFG = 2'd1,   // configure a match selector
    HA_RULE_WR = 2'd2,   // write a rule (match + action)
    HA_RULE_DEL = 2'd3   // delete a rule
  } ha_op_e;

  typedef struct packed {
    ha_op_e           op;
    logic [TBL_W-1:0] tbl;
    logic [IDX_W-1:0] idx;
    sel_cfg_t         sel;
    logic [HA_W-1:0]  key;
    logic [HA_W-1:0]  mask;   // 1 = bit is compared
    ha_action_t       act;
  } ha_msg_t;

  typedef struct packed {
    ha_op_e           op;
    logic [TBL_W-1:0] tbl;
    logic             ok;
    logic [15:0]      total;
    logic [15:0]      idle;
  } ha_rsp_t;

  // ------------------------------------ FE control interface (controller)
  typedef enum logic [1:0] {
    FE_FW_WR  = 2'd0,
    FE_FW_DEL = 2'd1,
    FE_CLS_WR = 2'd2,
    FE_CLS_DEL = 2'd3
  } fe_op_e;

  typedef struct packed {
    fe_op_e            op;
    logic [IDX_W-1:0]  idx;
    logic [FW_KEY_W-1:0] key;
    logic [FW_KEY_W-1:0] mask;
    fw_action_t        act;
    logic [TAG_W-1:0]  tag;
    logic [TBL_W-1:0]  first_tbl;
  } fe_msg_t;

  // The FW table key: in_port and the 5-tuple.
  function automatic logic [FW_KEY_W-1:0] fw_key(hv_t hv);
    return {hv.in_port, hv.ip_src, hv.ip_dst, hv.tp_src, hv.tp_dst};
  endfunction

endpackage
