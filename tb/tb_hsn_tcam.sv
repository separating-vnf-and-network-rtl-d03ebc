// tb_hsn_tcam: random writes, deletes and lookups against a reference
// model of a lowest-index-first ternary table.
module tb_hsn_tcam;
  localparam int KEY_W = 64;
  localparam int DEPTH = 32;
  localparam int AW = $clog2(DEPTH);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic             wr_en = 0, wr_valid = 0;
  logic [AW-1:0]    wr_idx = '0;
  logic [KEY_W-1:0] wr_key = '0, wr_mask = '0, key = '0;
  logic             hit;
  logic [AW-1:0]    hit_idx;
  logic [DEPTH-1:0] valid_bits;

  hsn_tcam #(.KEY_W(KEY_W), .DEPTH(DEPTH)) dut (.*);

  logic [KEY_W-1:0] m_key [DEPTH], m_mask [DEPTH];
  logic             m_val [DEPTH];
  int checks = 0, failures = 0;

  function automatic logic [KEY_W-1:0] rnd64();
    return {$urandom(), $urandom()};
  endfunction

  task automatic write(int idx, logic v, logic [KEY_W-1:0] k, logic [KEY_W-1:0] m);
    @(negedge clk);
    wr_en = 1; wr_idx = AW'(idx); wr_valid = v; wr_key = k; wr_mask = m;
    @(negedge clk);
    wr_en = 0;
    m_val[idx] = v; m_key[idx] = k; m_mask[idx] = m;
  endtask

  task automatic lookup(logic [KEY_W-1:0] k);
    int exp_idx;
    exp_idx = -1;
    for (int i = 0; i < DEPTH; i++)
      if (exp_idx < 0 && m_val[i] && ((k ^ m_key[i]) & m_mask[i]) == 0) exp_idx = i;
    key = k;
    #1;
    checks++;
    if (hit !== (exp_idx >= 0) || (exp_idx >= 0 && int'(hit_idx) != exp_idx)) begin
      failures++;
      $display("FAIL lookup %h: hit=%0d idx=%0d expected %0d", k, hit, hit_idx, exp_idx);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < DEPTH; i++) m_val[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // empty table never matches
    @(negedge clk);
    lookup('0);
    lookup(rnd64());
    checks++;
    if (valid_bits != '0) begin failures++; $display("FAIL valid_bits after reset"); end
    // an all-wildcard entry at the bottom, exact and partial ones above
    write(DEPTH-1, 1, '0, '0);
    for (int i = 0; i < DEPTH-1; i++) begin
      logic [KEY_W-1:0] m;
      m = (i % 3 == 0) ? '1 : rnd64();
      write(i, 1, rnd64(), m);
    end
    for (int r = 0; r < 2000; r++) begin
      logic [KEY_W-1:0] k;
      int e;
      e = $urandom_range(0, DEPTH-1);
      k = rnd64();
      if (r % 2 == 0) k = (k & ~m_mask[e]) | (m_key[e] & m_mask[e]);
      @(negedge clk);
      lookup(k);
      if (r % 50 == 0) begin
        int d;
        d = $urandom_range(0, DEPTH-1);
        write(d, ($urandom() % 3) == 0, rnd64(), (r % 100 == 0) ? '1 : rnd64());
      end
    end
    // a deleted entry stops matching
    write(5, 1, 64'h1234_5678_9abc_def0, '1);
    for (int i = 0; i < 5; i++) write(i, 0, '0, '0);
    @(negedge clk); lookup(64'h1234_5678_9abc_def0);
    checks++;
    if (!(hit && hit_idx == 5)) begin failures++; $display("FAIL entry 5 not hit"); end
    write(5, 0, '0, '0);
    @(negedge clk); lookup(64'h1234_5678_9abc_def0);
    checks++;
    for (int i = 0; i < DEPTH; i++)
      if (valid_bits[i] != m_val[i]) begin failures++; $display("FAIL valid_bits[%0d]", i); break; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
