// hsn_fe_ctrl: the FE control interface between the FE and its network
// (SDN) controller.
//
// The network controller owns traffic steering only. Through this
// interface it writes and deletes FW table rules and classifier tag
// entries, and it receives packet-in messages: header vectors of packets
// that the FW table sends to the controller (a miss, or a to-controller
// rule). Packet-ins wait in a PIN_DEPTH-entry buffer; when it is full a new
// packet-in is discarded and pin_overflow counts it. Every control message
// gets one response with ok=0 when its index does not exist.
//
// Timing: msg, rsp and pin use valid/ready handshakes. A message is
// accepted only while no response is waiting; its write strobe and its
// response follow one clock later. fw_* and cls_* are the write ports of
// the FW table and the classifier.
//
// That only the FW table reaches the controller, and that the controller
// configures the FW table, follows the design. That the controller also
// owns the classifier, the buffer and the message encoding are this
// design's choice.
module hsn_fe_ctrl
  import hsn_pkg::*;
#(
  parameter int FW_DEPTH_P  = FW_DEPTH,
  parameter int CLS_DEPTH_P = CLS_DEPTH,
  parameter int PIN_DEPTH   = 8,
  localparam int FAW = (FW_DEPTH_P > 1) ? $clog2(FW_DEPTH_P) : 1,
  localparam int CAW = (CLS_DEPTH_P > 1) ? $clog2(CLS_DEPTH_P) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  // from / to the network controller
  input  logic                msg_valid,
  output logic                msg_ready,
  input  fe_msg_t             msg,
  output logic                rsp_valid,
  input  logic                rsp_ready,
  output fe_op_e              rsp_op,
  output logic                rsp_ok,
  output logic                pin_valid,
  input  logic                pin_ready,
  output hv_t                 pin_hv,
  output logic [31:0]         pin_overflow,
  // FW table write port
  output logic                fw_we,
  output logic [FAW-1:0]      fw_idx,
  output logic                fw_valid,
  output logic [FW_KEY_W-1:0] fw_key_o,
  output logic [FW_KEY_W-1:0] fw_mask,
  output fw_action_t          fw_act,
  // classifier write port
  output logic                cls_we,
  output logic [CAW-1:0]      cls_idx,
  output logic                cls_valid,
  output logic [TAG_W-1:0]    cls_tag,
  output logic [TBL_W-1:0]    cls_first_tbl,
  // packet-in from the FW table
  input  logic                dp_pin_valid,
  input  hv_t                 dp_pin_hv
);

  // ------------------------------------------------------- rule writes
  logic accept, ok;
  assign msg_ready = !rsp_valid;
  assign accept    = msg_valid && msg_ready;

  always_comb begin
    case (msg.op)
      FE_FW_WR, FE_FW_DEL: ok = int'(msg.idx) < FW_DEPTH_P;
      default:             ok = int'(msg.idx) < CLS_DEPTH_P;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rsp_valid <= 1'b0;
      fw_we     <= 1'b0;
      cls_we    <= 1'b0;
    end else begin
      fw_we  <= accept && ok && (msg.op == FE_FW_WR  || msg.op == FE_FW_DEL);
      cls_we <= accept && ok && (msg.op == FE_CLS_WR || msg.op == FE_CLS_DEL);
      if (rsp_valid && rsp_ready) rsp_valid <= 1'b0;
      if (accept) rsp_valid <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (accept) begin
      fw_idx        <= FAW'(msg.idx);
      fw_valid      <= msg.op == FE_FW_WR;
      fw_key_o      <= msg.key;
      fw_mask       <= msg.mask;
      fw_act        <= msg.act;
      cls_idx       <= CAW'(msg.idx);
      cls_valid     <= msg.op == FE_CLS_WR;
      cls_tag       <= msg.tag;
      cls_first_tbl <= msg.first_tbl;
      rsp_op        <= msg.op;
      rsp_ok        <= ok;
    end
  end

  // ------------------------------------------------------- packet-in
  logic fifo_full, fifo_empty;

  hsn_fifo #(.WIDTH($bits(hv_t)), .DEPTH(PIN_DEPTH)) u_pin_fifo (
    .clk     (clk),
    .rst_n   (rst_n),
    .wr_en   (dp_pin_valid),
    .wr_data (dp_pin_hv),
    .rd_en   (pin_valid && pin_ready),
    .rd_data (pin_hv),
    .full    (fifo_full),
    .empty   (fifo_empty)
  );

  assign pin_valid = !fifo_empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pin_overflow <= '0;
    else if (dp_pin_valid && fifo_full) pin_overflow <= pin_overflow + 1'b1;
  end

  a_rsp_stable: assert property (@(posedge clk) disable iff (!rst_n)
    rsp_valid && !rsp_ready |=> rsp_valid && $stable({rsp_op, rsp_ok}));

endmodule
