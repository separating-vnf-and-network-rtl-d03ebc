// hsn_action_proc: applies the action of a matched HA rule.
//
// An HA action is configured at bit granularity: each of its NUM_SETS set
// operations writes the bits selected by a 64-bit mask into the 64-bit
// window of the header vector that starts at bit offset off (bits past the
// top of the vector are ignored). Set operations are applied in order, so
// a later one wins where two overlap. The action can also drop the packet
// and names the table that acts next (go-to), which lets several VNFs run
// one after another in the same FE. When hit is low the header vector
// passes unchanged and next_tbl is miss_tbl. Purely combinational.
//
// Bit-granular actions, drop for stateless filtering and the go-to follow
// the design; the (offset, mask, value) encoding is this design's choice.
module hsn_action_proc
  import hsn_pkg::*;
(
  input  hv_t              hv_in,
  input  logic             hit,
  input  ha_action_t       act,
  input  logic [TBL_W-1:0] miss_tbl,
  output hv_t              hv_out,
  output logic             drop,
  output logic [TBL_W-1:0] next_tbl
);

  // stage[k] is the vector after the first k set operations
  logic [NUM_SETS:0][HV_W-1:0]   stage;
  logic [NUM_SETS-1:0][HV_W-1:0] wmask, wdata;

  assign stage[0] = hv_in;

  for (genvar k = 0; k < NUM_SETS; k++) begin : g_set
    assign wmask[k] = (hit && act.set[k].en)
                    ? HV_W'(act.set[k].mask) << act.set[k].off : '0;
    assign wdata[k] = HV_W'(act.set[k].val) << act.set[k].off;
    assign stage[k+1] = (stage[k] & ~wmask[k]) | (wdata[k] & wmask[k]);
  end

  assign hv_out   = stage[NUM_SETS];
  assign drop     = hit && act.drop;
  assign next_tbl = hit ? act.next_tbl : miss_tbl;

endmodule
