// hsn_match_selector: builds the 64-bit match key of one HA table.
//
// The HA tables do not match fixed header fields: the HAM picks which bits
// of the 512-bit header vector each table looks at. The key is SEGS
// segments of SEG_W bits; segment s is the SEG_W header-vector bits that
// start at bit offset cfg.off[s], and segment 0 fills the top of the key.
// A 32-bit field therefore takes two segments, a short field one segment
// whose unused bits the TCAM mask ignores. A segment that would run past
// the top of the vector reads zeros there. Purely combinational.
//
// That a selector picks the HA match fields from the header vector follows
// the design; segmenting the key into four bit-addressed 16-bit windows is
// this design's choice.
module hsn_match_selector
  import hsn_pkg::*;
(
  input  hv_t             hv,
  input  sel_cfg_t        cfg,
  output logic [HA_W-1:0] key
);

  logic [HV_W-1:0] flat;
  assign flat = hv;

  always_comb begin
    for (int s = 0; s < SEGS; s++) begin
      logic [HV_W-1:0] shifted;
      shifted = flat >> cfg.off[s];
      key[HA_W-1-s*SEG_W -: SEG_W] = shifted[SEG_W-1:0];
    end
  end

endmodule
