// tb_hsn_ha_ctrl: HAM messages of every kind, valid and invalid, with a
// HAM that is sometimes slow to take responses. Checks the write strobes
// one clock after acceptance, one response per message, and idle counts
// against occupancy bits the testbench drives.
module tb_hsn_ha_ctrl;
  import hsn_pkg::*;
  localparam int DEPTH = HA_DEPTH;
  localparam int AW = $clog2(DEPTH);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                         msg_valid = 0, msg_ready, rsp_valid, rsp_ready = 0;
  ha_msg_t                      msg = '0;
  ha_rsp_t                      rsp;
  logic [NUM_HA-1:0]            sel_we, rule_we;
  sel_cfg_t                     sel_cfg;
  logic [AW-1:0]                rule_idx;
  logic                         rule_valid;
  logic [HA_W-1:0]              rule_key, rule_mask;
  ha_action_t                   rule_act;
  logic [NUM_HA-1:0][DEPTH-1:0] valid_bits = '0;

  hsn_ha_ctrl #(.DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0, n_rsp = 0, n_stat = 0, n_err = 0;

  function automatic ha_msg_t rnd_msg();
    logic [$bits(ha_msg_t)-1:0] v;
    for (int i = 0; i < $bits(ha_msg_t); i++) v[i] = 1'($urandom());
    return ha_msg_t'(v);
  endfunction

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 15) $display("FAIL %s", what); end
  endtask

  // Sends one message, checks the strobes it causes and its response.
  task automatic transact(ha_msg_t m);
    logic exp_ok;
    int   used;
    exp_ok = int'(m.tbl) < NUM_HA && (m.op inside {HA_STATUS, HA_SEL_CFG} || int'(m.idx) < DEPTH);
    used = 0;
    if (int'(m.tbl) < NUM_HA) for (int i = 0; i < DEPTH; i++) used += valid_bits[m.tbl][i];
    @(negedge clk);
    msg = m; msg_valid = 1;
    while (!msg_ready) @(negedge clk);
    @(negedge clk);
    msg_valid = 0;
    msg = rnd_msg();
    // strobes, one clock after acceptance
    for (int t = 0; t < NUM_HA; t++) begin
      check(sel_we[t] == (exp_ok && m.op == HA_SEL_CFG && int'(m.tbl) == t), "sel_we");
      check(rule_we[t] == (exp_ok && m.op inside {HA_RULE_WR, HA_RULE_DEL} && int'(m.tbl) == t), "rule_we");
    end
    if (exp_ok && m.op == HA_SEL_CFG) check(sel_cfg == m.sel, "sel_cfg");
    if (exp_ok && m.op inside {HA_RULE_WR, HA_RULE_DEL}) begin
      check(rule_idx == AW'(m.idx) && rule_valid == (m.op == HA_RULE_WR), "rule idx/valid");
      if (m.op == HA_RULE_WR)
        check(rule_key == m.key && rule_mask == m.mask && rule_act == m.act, "rule data");
    end
    check(!msg_ready, "second message accepted while a response waits");
    // response, held until taken
    check(rsp_valid, "response missing");
    repeat ($urandom_range(0, 3)) begin
      @(negedge clk);
      check(rsp_valid && !msg_ready, "response dropped before taken");
    end
    check(rsp.op == m.op && rsp.tbl == m.tbl && rsp.ok == exp_ok, "response header");
    if (m.op == HA_STATUS && exp_ok) begin
      check(rsp.total == 16'(DEPTH) && rsp.idle == 16'(DEPTH - used), "status counts");
      n_stat++;
    end
    if (!exp_ok) n_err++;
    rsp_ready = 1;
    @(negedge clk);
    rsp_ready = 0;
    check(!rsp_valid, "response not cleared");
    n_rsp++;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 1500; r++) begin
      ha_msg_t m;
      m = rnd_msg();
      if ($urandom_range(0, 4) != 0) m.tbl = TBL_W'($urandom_range(0, NUM_HA-1));
      if ($urandom_range(0, 4) != 0) m.idx = IDX_W'($urandom_range(0, DEPTH-1));
      for (int t = 0; t < NUM_HA; t++) begin
        int fill;
        fill = $urandom_range(0, 3);
        for (int i = 0; i < DEPTH; i++)
          valid_bits[t][i] = (fill == 0) ? 1'b0 : (fill == 3) ? 1'b1 : 1'($urandom());
      end
      transact(m);
    end
    check(n_stat > 0 && n_err > 0, "coverage");
    $display("responses=%0d status=%0d errors=%0d", n_rsp, n_stat, n_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
