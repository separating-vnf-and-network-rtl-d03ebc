// tb_hsn_ha_table: one HA table (TABLE_ID 1) fed a packet every clock.
// A reference model selects the key, finds the first matching rule and
// applies its action; packets not addressed to the table, or already
// dropped, must pass unchanged. Output must follow input by 2 clocks.
module tb_hsn_ha_table;
  import hsn_pkg::*;
  localparam int TID = 1;
  localparam int DEPTH = HA_DEPTH;
  localparam int AW = $clog2(DEPTH);
  localparam int LAT = 2;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic            sel_we = 0, rule_we = 0, rule_valid = 0;
  sel_cfg_t        sel_cfg = '0;
  logic [AW-1:0]   rule_idx = '0;
  logic [HA_W-1:0] rule_key = '0, rule_mask = '0;
  ha_action_t      rule_act = '0;
  logic [DEPTH-1:0] valid_bits;
  logic            in_valid = 0, out_valid;
  pkt_t            in_pkt = '0, out_pkt;

  hsn_ha_table #(.TABLE_ID(TID), .DEPTH(DEPTH)) dut (.*);

  // model state
  sel_cfg_t        m_sel;
  logic [HA_W-1:0] m_key [DEPTH], m_mask [DEPTH];
  ha_action_t      m_act [DEPTH];
  logic            m_val [DEPTH];
  pkt_t            exp_q [$];
  int              tq [$];
  int checks = 0, failures = 0, n_hit = 0, n_miss = 0, n_skip = 0, cyc = 0;

  always @(posedge clk) cyc <= cyc + 1;

  function automatic logic [HV_W-1:0] rnd_hv();
    logic [HV_W-1:0] v;
    for (int i = 0; i < HV_W/32; i++) v[32*i +: 32] = $urandom();
    return v;
  endfunction

  function automatic logic [HA_W-1:0] sel_key(hv_t hv);
    logic [HV_W-1:0] f;
    logic [HA_W-1:0] k;
    f = hv;
    k = '0;
    for (int s = 0; s < SEGS; s++)
      for (int b = 0; b < SEG_W; b++)
        if (int'(m_sel.off[s]) + b < HV_W)
          k[HA_W - (s+1)*SEG_W + b] = f[int'(m_sel.off[s]) + b];
    return k;
  endfunction

  function automatic pkt_t model(pkt_t p);
    pkt_t r;
    int e;
    logic [HA_W-1:0] k;
    r = p;
    if (p.next_tbl != TBL_W'(TID) || p.drop) begin n_skip++; return r; end
    k = sel_key(p.hv);
    e = -1;
    for (int i = 0; i < DEPTH; i++)
      if (e < 0 && m_val[i] && ((k ^ m_key[i]) & m_mask[i]) == 0) e = i;
    if (e < 0) begin n_miss++; r.next_tbl = TBL_W'(TID + 1); return r; end
    n_hit++;
    begin
      logic [HV_W-1:0] f;
      f = p.hv;
      for (int s = 0; s < NUM_SETS; s++)
        if (m_act[e].set[s].en)
          for (int b = 0; b < HA_W; b++)
            if (m_act[e].set[s].mask[b] && int'(m_act[e].set[s].off) + b < HV_W)
              f[int'(m_act[e].set[s].off) + b] = m_act[e].set[s].val[b];
      r.hv = f;
    end
    r.drop = m_act[e].drop;
    r.next_tbl = m_act[e].next_tbl;
    return r;
  endfunction

  // checker
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      pkt_t e;
      checks++;
      if (exp_q.size() == 0) begin
        failures++; $display("FAIL unexpected output");
      end else begin
        e = exp_q.pop_front();
        if (out_pkt != e) begin
          failures++;
          if (failures < 10) $display("FAIL packet mismatch at cycle %0d", cyc);
        end
        if (cyc - tq.pop_front() != LAT) begin
          failures++; $display("FAIL latency %0d", cyc);
        end
      end
    end
  end

  task automatic write_rule(int idx, logic v, logic [HA_W-1:0] k, logic [HA_W-1:0] m, ha_action_t a);
    @(negedge clk);
    rule_we = 1; rule_idx = AW'(idx); rule_valid = v; rule_key = k; rule_mask = m; rule_act = a;
    @(negedge clk);
    rule_we = 0;
    m_val[idx] = v; m_key[idx] = k; m_mask[idx] = m;
    if (v) m_act[idx] = a;
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
    // selector: IPv4 source + destination
    @(negedge clk);
    m_sel.off[0] = OFF_W'(OFF_IP_SRC + 16); m_sel.off[1] = OFF_W'(OFF_IP_SRC);
    m_sel.off[2] = OFF_W'(OFF_IP_DST + 16); m_sel.off[3] = OFF_W'(OFF_IP_DST);
    sel_cfg = m_sel; sel_we = 1;
    @(negedge clk); sel_we = 0;
    for (int i = 0; i < DEPTH; i++) begin
      ha_action_t a;
      a = '0;
      for (int s = 0; s < NUM_SETS; s++) begin
        a.set[s].en = $urandom_range(0, 1);
        a.set[s].off = OFF_W'($urandom_range(0, HV_W-1));
        a.set[s].mask = {$urandom(), $urandom()};
        a.set[s].val = {$urandom(), $urandom()};
      end
      a.drop = ($urandom_range(0, 7) == 0);
      a.next_tbl = TBL_W'($urandom_range(2, 3));
      write_rule(i, $urandom_range(0, 5) != 0, {$urandom(), $urandom()},
                 (i % 2) ? '1 : {32'hffff_ffff, 32'h0}, a);
    end
    // traffic: one packet per clock
    for (int r = 0; r < 3000; r++) begin
      pkt_t p;
      int e;
      @(negedge clk);
      p = '0;
      p.hv = rnd_hv();
      e = $urandom_range(0, DEPTH-1);
      if ($urandom_range(0, 2) != 0) begin
        p.hv.ip_src = m_key[e][63:32];
        if (e % 2) p.hv.ip_dst = m_key[e][31:0];
      end
      p.next_tbl = ($urandom_range(0, 4) == 0) ? TBL_W'($urandom()) : TBL_W'(TID);
      p.drop = ($urandom_range(0, 9) == 0);
      p.ha_path = $urandom_range(0, 1);
      in_valid = ($urandom_range(0, 7) != 0);
      in_pkt = p;
      if (in_valid) begin exp_q.push_back(model(p)); tq.push_back(cyc); end
      if (r % 500 == 499) begin
        @(negedge clk); in_valid = 0;
        write_rule(e, 0, '0, '0, '0);
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (5) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d outputs missing", exp_q.size()); end
    checks++;
    if (n_hit == 0 || n_miss == 0 || n_skip == 0) begin
      failures++; $display("FAIL coverage hit=%0d miss=%0d skip=%0d", n_hit, n_miss, n_skip);
    end
    for (int i = 0; i < DEPTH; i++) if (valid_bits[i] != m_val[i]) begin
      failures++; $display("FAIL valid_bits[%0d]", i); break;
    end
    $display("hits=%0d misses=%0d passed=%0d", n_hit, n_miss, n_skip);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
