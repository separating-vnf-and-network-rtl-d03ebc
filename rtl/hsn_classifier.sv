// hsn_classifier: chooses between the HA path and the forwarding-only path.
//
// Packets carry a service tag that says which VNF of their chain comes
// next. This design takes the 802.1Q VLAN ID as that tag. The classifier
// holds DEPTH tag entries; a tagged packet whose tag is in the table takes
// the HA path: it enters the HA tables at the entry's first table. Any other
// packet takes the forwarding-only path: next_tbl is set to NUM_HA so every
// HA table lets it pass and only the FW table acts on it.
//
// Timing: one registered stage, one packet per clock. Entries are written
// by the FE control interface (cfg_we with cfg_valid=1 writes, 0 deletes).
// out_pkt.ha_path records which path was taken.
//
// The two paths follow the design; the tag field, the table form and the
// owner of its configuration are this design's choice.
module hsn_classifier
  import hsn_pkg::*;
#(
  parameter int DEPTH = CLS_DEPTH,
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             cfg_we,
  input  logic [AW-1:0]    cfg_idx,
  input  logic             cfg_valid,
  input  logic [TAG_W-1:0] cfg_tag,
  input  logic [TBL_W-1:0] cfg_first_tbl,
  input  logic             in_valid,
  input  hv_t              in_hv,
  output logic             out_valid,
  output pkt_t             out_pkt
);

  logic [DEPTH-1:0] ent_valid;
  logic [TAG_W-1:0] ent_tag   [DEPTH];
  logic [TBL_W-1:0] ent_first [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ent_valid <= '0;
    else if (cfg_we) ent_valid[cfg_idx] <= cfg_valid;
  end

  always_ff @(posedge clk) begin
    if (cfg_we) begin
      ent_tag[cfg_idx]   <= cfg_tag;
      ent_first[cfg_idx] <= cfg_first_tbl;
    end
  end

  logic             hit;
  logic [TBL_W-1:0] first;
  always_comb begin
    hit   = 1'b0;
    first = TBL_W'(NUM_HA);
    for (int i = DEPTH-1; i >= 0; i--) begin
      if (in_hv.vlan_valid && ent_valid[i] && ent_tag[i] == in_hv.vlan_id) begin
        hit   = 1'b1;
        first = ent_first[i];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    out_pkt.hv       <= in_hv;
    out_pkt.next_tbl <= first;
    out_pkt.ha_path  <= hit;
    out_pkt.drop     <= 1'b0;
  end

endmodule
