// tb_hsn_fe_nat: a NAT VNF deeper than one HA table, at the FE's default
// sizes. The NAT matches the 32-bit IPv4 source and rewrites it. Its
// NAT_RULES rules are spread over all three HA tables (32 per table): a
// hit rewrites the source and jumps to the FW table, a miss falls through
// to the next HA table with the same selector. Packets carry the NAT's
// service tag; sources beyond the rule set must leave unchanged. One
// wildcard FW rule forwards everything to port 4. Checks every packet's
// source, port and the 10-clock latency, and that each table served hits.
module tb_hsn_fe_nat;
  import hsn_pkg::*;
  localparam int LAT = 10;
  localparam int NAT_RULES = NUM_HA * HA_DEPTH;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              s_valid = 0, s_ready, s_last = 0;
  logic [63:0]       s_data = '0;
  logic [7:0]        s_keep = '0;
  logic [PORT_W-1:0] s_port = '0;
  logic              fwd_valid, drop_valid;
  out_t              fwd;
  logic              ham_msg_valid = 0, ham_msg_ready, ham_rsp_valid, ham_rsp_ready = 1;
  ha_msg_t           ham_msg = '0;
  ha_rsp_t           ham_rsp;
  logic              ctl_msg_valid = 0, ctl_msg_ready, ctl_rsp_valid, ctl_rsp_ready = 1;
  fe_msg_t           ctl_msg = '0;
  fe_op_e            ctl_rsp_op;
  logic              ctl_rsp_ok;
  logic              pin_valid, pin_ready = 1;
  hv_t               pin_hv;
  logic [31:0]       pin_overflow;

  hsn_fe dut (.*);

  typedef struct { logic [31:0] src; int t; } exp_t;
  exp_t exp_q [$];
  int checks = 0, failures = 0, cyc = 0;
  int hits_per_tbl [NUM_HA + 1];

  always @(posedge clk) cyc <= cyc + 1;

  function automatic logic [31:0] priv(int i);   return 32'h0a01_0000 + 32'(i); endfunction
  function automatic logic [31:0] pub(int i);    return 32'hc633_6400 + 32'(i); endfunction

  always @(posedge clk) begin
    if (rst_n && (fwd_valid || drop_valid || pin_valid)) begin
      exp_t e;
      checks++;
      if (exp_q.size() == 0 || !fwd_valid) begin
        failures++; $display("FAIL unexpected result");
      end else begin
        e = exp_q.pop_front();
        if (fwd.hv.ip_src != e.src || fwd.port != 8'd4 || cyc - e.t != LAT) begin
          failures++;
          if (failures < 10) $display("FAIL src %h exp %h port %0d latency %0d",
                                      fwd.hv.ip_src, e.src, fwd.port, cyc - e.t);
        end
      end
    end
  end

  task automatic ham(ha_msg_t m);
    @(negedge clk);
    ham_msg = m; ham_msg_valid = 1;
    do @(posedge clk); while (!ham_msg_ready);
    @(negedge clk); ham_msg_valid = 0;
    while (!ham_rsp_valid) @(negedge clk);
    checks++;
    if (!ham_rsp.ok) begin failures++; $display("FAIL HAM message refused"); end
    @(negedge clk);
  endtask

  task automatic ctl(fe_msg_t m);
    @(negedge clk);
    ctl_msg = m; ctl_msg_valid = 1;
    do @(posedge clk); while (!ctl_msg_ready);
    @(negedge clk); ctl_msg_valid = 0;
    while (!ctl_rsp_valid) @(negedge clk);
    checks++;
    if (!ctl_rsp_ok) begin failures++; $display("FAIL controller message refused"); end
    @(negedge clk);
  endtask

  task automatic send(logic [31:0] src, logic [31:0] exp_src);
    byte unsigned p [$];
    int n;
    for (int i = 0; i < 12; i++) p.push_back(8'(i));
    p.push_back(8'h81); p.push_back(8'h00); p.push_back(8'h00); p.push_back(8'd50);
    p.push_back(8'h08); p.push_back(8'h00);
    p.push_back(8'h45); p.push_back(8'h00);
    for (int i = 0; i < 7; i++) p.push_back(8'h00);
    p.push_back(8'd17); p.push_back(8'h00); p.push_back(8'h00);
    for (int i = 0; i < 4; i++) p.push_back(src[31-8*i -: 8]);
    for (int i = 0; i < 4; i++) p.push_back(8'(8 + i));
    for (int i = 0; i < 4; i++) p.push_back(8'($urandom()));
    while (p.size() < 256) p.push_back(8'($urandom()));   // 256-byte packets
    n = p.size();
    for (int w = 0; w * 8 < n; w++) begin
      @(negedge clk);
      s_valid = 1; s_port = 8'd0; s_last = (w + 1) * 8 >= n;
      s_keep = 8'hff;
      for (int b = 0; b < 8; b++) s_data[63-8*b -: 8] = p[w*8+b];
      if (s_last) exp_q.push_back('{exp_src, cyc});
    end
    @(negedge clk);
    s_valid = 0; s_last = 0;
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ha_msg_t m;
    fe_msg_t c;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < NUM_HA; t++) begin
      m = '0; m.op = HA_SEL_CFG; m.tbl = TBL_W'(t);
      m.sel.off[0] = OFF_W'(OFF_IP_SRC + 16); m.sel.off[1] = OFF_W'(OFF_IP_SRC);
      ham(m);
    end
    for (int i = 0; i < NAT_RULES; i++) begin
      m = '0; m.op = HA_RULE_WR;
      m.tbl = TBL_W'(i / HA_DEPTH); m.idx = IDX_W'(i % HA_DEPTH);
      m.key = {priv(i), 32'h0}; m.mask = {32'hffff_ffff, 32'h0};
      m.act.set[0].en = 1; m.act.set[0].off = OFF_W'(OFF_IP_SRC);
      m.act.set[0].mask = 64'hffff_ffff; m.act.set[0].val = 64'(pub(i));
      m.act.next_tbl = TBL_W'(NUM_HA);
      ham(m);
    end
    // every table reports itself full
    for (int t = 0; t < NUM_HA; t++) begin
      m = '0; m.op = HA_STATUS; m.tbl = TBL_W'(t);
      @(negedge clk);
      ham_msg = m; ham_msg_valid = 1;
      do @(posedge clk); while (!ham_msg_ready);
      @(negedge clk); ham_msg_valid = 0;
      while (!ham_rsp_valid) @(negedge clk);
      checks++;
      if (ham_rsp.idle != 0 || ham_rsp.total != 16'(HA_DEPTH)) begin
        failures++; $display("FAIL table %0d not full", t);
      end
      @(negedge clk);
    end
    c = '0; c.op = FE_CLS_WR; c.idx = '0; c.tag = TAG_W'(50); c.first_tbl = '0;
    ctl(c);
    c = '0; c.op = FE_FW_WR; c.idx = '0; c.key = '0; c.mask = '0;
    c.act.op = FW_OUTPUT; c.act.port = 8'd4;
    ctl(c);
    for (int r = 0; r < 1000; r++) begin
      int i;
      i = $urandom_range(0, NAT_RULES + 23);
      if (i < NAT_RULES) hits_per_tbl[i / HA_DEPTH]++; else hits_per_tbl[NUM_HA]++;
      send(priv(i), (i < NAT_RULES) ? pub(i) : priv(i));
    end
    repeat (LAT + 4) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d packets missing", exp_q.size()); end
    for (int t = 0; t <= NUM_HA; t++) begin
      $display("%s %0d: %0d packets", (t < NUM_HA) ? "hits in HA table" : "no NAT rule", t,
               hits_per_tbl[t]);
      checks++;
      if (hits_per_tbl[t] == 0) begin failures++; $display("FAIL no traffic for case %0d", t); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
