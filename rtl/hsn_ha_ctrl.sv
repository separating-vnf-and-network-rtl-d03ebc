// hsn_ha_ctrl: the HA control interface between the FE and the HAM.
//
// The HAM (hardware-acceleration manager) talks to the HA tables only;
// it never sees packets. Two kinds of message exist. A status enquiry
// returns the total and the idle rule count of one HA table, so that the
// HAM can map VNFs onto tables. An HA configuration message loads a match
// selector, or writes or deletes one rule (match key, care mask, action).
// Every message gets exactly one response on this interface: the status,
// or an acknowledgement with ok=0 when the table or rule index does not
// exist (nothing is then written).
//
// Timing: msg_valid/msg_ready and rsp_valid/rsp_ready handshakes; a
// transfer happens on a clock where both are high. A message is accepted
// only while no response is waiting, so at most one is in flight. The
// configuration strobe to the table and the response appear one clock
// after the message is accepted; the idle count of a status response is
// taken when the message is accepted.
//
// The two message kinds and what they carry follow the design; the
// handshake and message encoding are this design's choice.
module hsn_ha_ctrl
  import hsn_pkg::*;
#(
  parameter int DEPTH = HA_DEPTH,
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // from the HAM
  input  logic                  msg_valid,
  output logic                  msg_ready,
  input  ha_msg_t               msg,
  output logic                  rsp_valid,
  input  logic                  rsp_ready,
  output ha_rsp_t               rsp,
  // to the HA tables
  output logic [NUM_HA-1:0]     sel_we,
  output sel_cfg_t              sel_cfg,
  output logic [NUM_HA-1:0]     rule_we,
  output logic [AW-1:0]         rule_idx,
  output logic                  rule_valid,
  output logic [HA_W-1:0]       rule_key,
  output logic [HA_W-1:0]       rule_mask,
  output ha_action_t            rule_act,
  input  logic [NUM_HA-1:0][DEPTH-1:0] valid_bits
);

  logic accept;
  assign msg_ready = !rsp_valid;
  assign accept    = msg_valid && msg_ready;

  logic tbl_ok, idx_ok, ok;
  assign tbl_ok = int'(msg.tbl) < NUM_HA;
  assign idx_ok = int'(msg.idx) < DEPTH;
  always_comb begin
    case (msg.op)
      HA_STATUS, HA_SEL_CFG: ok = tbl_ok;
      default:               ok = tbl_ok && idx_ok;
    endcase
  end

  logic [15:0] used;
  always_comb begin
    used = '0;
    for (int t = 0; t < NUM_HA; t++)
      if (TBL_W'(t) == msg.tbl)
        for (int i = 0; i < DEPTH; i++) used += 16'(valid_bits[t][i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rsp_valid <= 1'b0;
      sel_we    <= '0;
      rule_we   <= '0;
    end else begin
      sel_we  <= '0;
      rule_we <= '0;
      if (rsp_valid && rsp_ready) rsp_valid <= 1'b0;
      if (accept) begin
        rsp_valid <= 1'b1;
        for (int t = 0; t < NUM_HA; t++) begin
          if (ok && TBL_W'(t) == msg.tbl) begin
            sel_we[t]  <= msg.op == HA_SEL_CFG;
            rule_we[t] <= msg.op == HA_RULE_WR || msg.op == HA_RULE_DEL;
          end
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (accept) begin
      sel_cfg    <= msg.sel;
      rule_idx   <= AW'(msg.idx);
      rule_valid <= msg.op == HA_RULE_WR;
      rule_key   <= msg.key;
      rule_mask  <= msg.mask;
      rule_act   <= msg.act;
      rsp.op     <= msg.op;
      rsp.tbl    <= msg.tbl;
      rsp.ok     <= ok;
      rsp.total  <= (msg.op == HA_STATUS && ok) ? 16'(DEPTH) : '0;
      rsp.idle   <= (msg.op == HA_STATUS && ok) ? 16'(DEPTH) - used : '0;
    end
  end

  // A response stays unchanged until the HAM takes it.
  a_rsp_stable: assert property (@(posedge clk) disable iff (!rst_n)
    rsp_valid && !rsp_ready |=> rsp_valid && $stable(rsp));

endmodule
