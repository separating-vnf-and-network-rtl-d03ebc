// tb_hsn_classifier: tagged and untagged packets against a tag table
// model. A known tag must take the HA path at its first table, anything
// else the forwarding-only path (next table = FW table). Latency 1 clock.
module tb_hsn_classifier;
  import hsn_pkg::*;
  localparam int DEPTH = CLS_DEPTH;
  localparam int AW = $clog2(DEPTH);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic             cfg_we = 0, cfg_valid = 0, in_valid = 0, out_valid;
  logic [AW-1:0]    cfg_idx = '0;
  logic [TAG_W-1:0] cfg_tag = '0;
  logic [TBL_W-1:0] cfg_first_tbl = '0;
  hv_t              in_hv = '0;
  pkt_t             out_pkt;

  hsn_classifier #(.DEPTH(DEPTH)) dut (.*);

  logic [TAG_W-1:0] m_tag [DEPTH];
  logic [TBL_W-1:0] m_first [DEPTH];
  logic             m_val [DEPTH];
  pkt_t exp_q [$];
  int checks = 0, failures = 0, n_ha = 0, n_fw = 0;

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("FAIL unexpected output"); end
      else if (out_pkt != exp_q.pop_front()) begin
        failures++;
        if (failures < 10) $display("FAIL classification");
      end
    end
  end

  task automatic write(int idx, logic v, logic [TAG_W-1:0] t, logic [TBL_W-1:0] f);
    @(negedge clk);
    cfg_we = 1; cfg_idx = AW'(idx); cfg_valid = v; cfg_tag = t; cfg_first_tbl = f;
    @(negedge clk);
    cfg_we = 0;
    m_val[idx] = v; m_tag[idx] = t; m_first[idx] = f;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < DEPTH; i++) m_val[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < DEPTH; i++)
      write(i, i != 3, TAG_W'(100 + 7 * i), TBL_W'(i % NUM_HA));
    write(9, 1, TAG_W'(100), 2'd2);   // duplicate tag: entry 0 wins
    for (int r = 0; r < 2000; r++) begin
      pkt_t e;
      int ent;
      @(negedge clk);
      for (int w = 0; w < HV_W/32; w++) in_hv[32*w +: 32] = $urandom();
      ent = $urandom_range(0, DEPTH-1);
      if ($urandom_range(0, 2) != 0) in_hv.vlan_id = m_tag[ent];
      in_valid = 1;
      e.hv = in_hv; e.drop = 0; e.next_tbl = TBL_W'(NUM_HA); e.ha_path = 0;
      if (in_hv.vlan_valid)
        for (int i = DEPTH-1; i >= 0; i--)
          if (m_val[i] && m_tag[i] == in_hv.vlan_id) begin
            e.next_tbl = m_first[i]; e.ha_path = 1;
          end
      if (e.ha_path) n_ha++; else n_fw++;
      exp_q.push_back(e);
    end
    @(negedge clk); in_valid = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (exp_q.size() != 0 || n_ha == 0 || n_fw == 0) begin
      failures++; $display("FAIL left=%0d ha=%0d fw=%0d", exp_q.size(), n_ha, n_fw);
    end
    $display("ha_path=%0d fw_only=%0d", n_ha, n_fw);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
