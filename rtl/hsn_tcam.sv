// hsn_tcam: ternary match table used by the HA tables and the FW table.
//
// Each of DEPTH entries holds a key, a care mask (1 = bit compared) and a
// valid bit. A lookup compares the search key with every valid entry at
// once and reports the lowest matching index, so a lower index has the
// higher priority. The lookup is combinational; the table that uses the
// TCAM registers the result. One write port writes or invalidates an entry
// per clock; a write shows in lookups from the next clock on. Reset clears
// every valid bit, so an empty table never matches.
//
// The use of a TCAM for the functional rules follows the prototype; the
// lowest-index priority and the single write port are this design's choice.
module hsn_tcam #(
  parameter int KEY_W = 64,
  parameter int DEPTH = 32,
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // write port
  input  logic             wr_en,
  input  logic [AW-1:0]    wr_idx,
  input  logic             wr_valid,   // 0 deletes the entry
  input  logic [KEY_W-1:0] wr_key,
  input  logic [KEY_W-1:0] wr_mask,
  // lookup
  input  logic [KEY_W-1:0] key,
  output logic             hit,
  output logic [AW-1:0]    hit_idx,
  // occupancy, for status enquiries
  output logic [DEPTH-1:0] valid_bits
);

  logic [KEY_W-1:0] ent_key  [DEPTH];
  logic [KEY_W-1:0] ent_mask [DEPTH];
  logic [DEPTH-1:0] ent_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ent_valid <= '0;
    else if (wr_en) ent_valid[wr_idx] <= wr_valid;
  end

  always_ff @(posedge clk) begin
    if (wr_en) begin
      ent_key[wr_idx]  <= wr_key & wr_mask;
      ent_mask[wr_idx] <= wr_mask;
    end
  end

  logic [DEPTH-1:0] match;
  always_comb begin
    for (int i = 0; i < DEPTH; i++)
      match[i] = ent_valid[i] && (((key & ent_mask[i]) ^ ent_key[i]) == '0);
  end

  always_comb begin
    hit     = 1'b0;
    hit_idx = '0;
    for (int i = DEPTH-1; i >= 0; i--) begin
      if (match[i]) begin
        hit     = 1'b1;
        hit_idx = AW'(i);
      end
    end
  end

  assign valid_bits = ent_valid;

endmodule
