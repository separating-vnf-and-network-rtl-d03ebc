// tb_hsn_fe: end-to-end test of the forwarding element at its default
// sizes. The HAM side loads three VNFs into the HA tables: a NAT in table
// 0 (rewrites the IPv4 source), and a 5-tuple firewall that spans tables
// 1 and 2 (table 1 matches the addresses and writes a metadata tag,
// table 2 matches that tag with the L4 destination port and drops denied flows). The
// controller side loads classifier tags (NAT only, firewall only, NAT then
// firewall by go-to) and FW rules (forward, to-controller, drop). Packets
// are built byte by byte, streamed in, and every result is compared in
// order with a reference model of the whole FE, including the 10-clock
// latency. Each mechanism is counted and must occur at least once: both
// classifier paths, HA hit, miss and go-to, HA drop, FW forward, FW
// to-controller, FW miss, FW drop, packet-in overflow, status enquiry,
// rejected configuration and rule deletion.
module tb_hsn_fe;
  import hsn_pkg::*;
  localparam int LAT = 10;

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

  // ------------------------------------------------------------ model
  sel_cfg_t        m_sel [NUM_HA];
  logic [HA_W-1:0] m_hkey [NUM_HA][HA_DEPTH], m_hmask [NUM_HA][HA_DEPTH];
  ha_action_t      m_hact [NUM_HA][HA_DEPTH];
  logic            m_hval [NUM_HA][HA_DEPTH];
  logic [FW_KEY_W-1:0] m_fkey [FW_DEPTH], m_fmask [FW_DEPTH];
  fw_action_t      m_fact [FW_DEPTH];
  logic            m_fval [FW_DEPTH];
  logic [TAG_W-1:0] m_ctag [CLS_DEPTH];
  logic [TBL_W-1:0] m_cfirst [CLS_DEPTH];
  logic            m_cval [CLS_DEPTH];

  typedef enum int {
    EV_HA_PATH, EV_FW_PATH, EV_HA_HIT, EV_HA_MISS, EV_GOTO, EV_HA_DROP,
    EV_FW_FWD, EV_FW_CTRL, EV_FW_MISS, EV_FW_DROP, EV_PIN_OVF, EV_STATUS,
    EV_CFG_ERR, EV_DELETE, EV_N
  } ev_e;
  int ev [EV_N];
  string ev_name [EV_N] = '{"HA path", "forwarding-only path", "HA hit", "HA miss",
    "go-to past a table", "HA drop", "FW forward", "FW to-controller",
    "FW miss to controller", "FW drop", "packet-in overflow", "status enquiry",
    "rejected configuration", "rule deletion"};

  typedef struct { int kind; hv_t hv; logic [PORT_W-1:0] port; int t; } exp_t;
  exp_t exp_q [$];
  hv_t  pin_q [$];
  int checks = 0, failures = 0, cyc = 0, pins_lost = 0;

  always @(posedge clk) cyc <= cyc + 1;

  function automatic logic [HA_W-1:0] sel_key(int t, hv_t hv);
    logic [HV_W-1:0] f;
    logic [HA_W-1:0] k;
    f = hv;
    k = '0;
    for (int s = 0; s < SEGS; s++)
      for (int b = 0; b < SEG_W; b++)
        if (int'(m_sel[t].off[s]) + b < HV_W)
          k[HA_W - (s+1)*SEG_W + b] = f[int'(m_sel[t].off[s]) + b];
    return k;
  endfunction

  // Whole-FE reference: classifier, HA tables in order, FW table.
  function automatic exp_t model(hv_t hv);
    exp_t x;
    int nt, first;
    logic dropped;
    x.hv = hv; x.port = '0; x.t = 0;
    nt = NUM_HA;
    if (hv.vlan_valid)
      for (int i = CLS_DEPTH-1; i >= 0; i--)
        if (m_cval[i] && m_ctag[i] == hv.vlan_id) nt = int'(m_cfirst[i]);
    ev[(nt < NUM_HA) ? EV_HA_PATH : EV_FW_PATH]++;
    first = nt;
    dropped = 0;
    for (int t = 0; t < NUM_HA; t++) begin
      int e;
      logic [HA_W-1:0] k;
      if (nt != t || dropped) begin
        if (t > first && !dropped && nt > t) ev[EV_GOTO]++;
        continue;
      end
      k = sel_key(t, x.hv);
      e = -1;
      for (int i = 0; i < HA_DEPTH; i++)
        if (e < 0 && m_hval[t][i] && ((k ^ m_hkey[t][i]) & m_hmask[t][i]) == 0) e = i;
      if (e < 0) begin ev[EV_HA_MISS]++; nt = t + 1; continue; end
      ev[EV_HA_HIT]++;
      begin
        logic [HV_W-1:0] f;
        f = x.hv;
        for (int s = 0; s < NUM_SETS; s++)
          if (m_hact[t][e].set[s].en)
            for (int b = 0; b < HA_W; b++)
              if (m_hact[t][e].set[s].mask[b] && int'(m_hact[t][e].set[s].off) + b < HV_W)
                f[int'(m_hact[t][e].set[s].off) + b] = m_hact[t][e].set[s].val[b];
        x.hv = f;
      end
      if (m_hact[t][e].drop) begin dropped = 1; ev[EV_HA_DROP]++; end
      nt = int'(m_hact[t][e].next_tbl);
    end
    if (dropped) begin x.kind = 2; return x; end
    begin
      logic [FW_KEY_W-1:0] k;
      int e;
      k = {x.hv.in_port, x.hv.ip_src, x.hv.ip_dst, x.hv.tp_src, x.hv.tp_dst};
      e = -1;
      for (int i = 0; i < FW_DEPTH; i++)
        if (e < 0 && m_fval[i] && ((k ^ m_fkey[i]) & m_fmask[i]) == 0) e = i;
      if (e < 0) begin x.kind = 1; ev[EV_FW_MISS]++; end
      else case (m_fact[e].op)
        FW_OUTPUT:  begin x.kind = 0; x.port = m_fact[e].port; ev[EV_FW_FWD]++; end
        FW_TO_CTRL: begin x.kind = 1; ev[EV_FW_CTRL]++; end
        default:    begin x.kind = 2; ev[EV_FW_DROP]++; end
      endcase
    end
    return x;
  endfunction

  // ---------------------------------------------------------- checker
  always @(posedge clk) begin
    if (rst_n && (fwd_valid || drop_valid || dut.dp_pin_valid)) begin
      exp_t e;
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("FAIL unexpected result"); end
      else begin
        e = exp_q.pop_front();
        if (cyc - e.t != LAT) begin
          failures++; if (failures < 10) $display("FAIL latency %0d", cyc - e.t);
        end
        case (e.kind)
          0: if (!fwd_valid || fwd.hv != e.hv || fwd.port != e.port) begin
               failures++; if (failures < 10) $display("FAIL forward at %0d", cyc);
             end
          1: if (!dut.dp_pin_valid) begin
               failures++; if (failures < 10) $display("FAIL expected packet-in at %0d", cyc);
             end else begin
               if (pin_q.size() >= 8) pins_lost++;   // full buffer refuses
               else pin_q.push_back(e.hv);
             end
          default: if (!drop_valid) begin
               failures++; if (failures < 10) $display("FAIL expected drop at %0d", cyc);
             end
        endcase
      end
    end
    if (rst_n && pin_valid && pin_ready) begin
      checks++;
      if (pin_q.size() == 0 || pin_hv != pin_q[0]) begin
        failures++; if (failures < 10) $display("FAIL packet-in contents");
      end
      if (pin_q.size() > 0) void'(pin_q.pop_front());
    end
  end

  // ------------------------------------------------------ stimulus
  task automatic ham(ha_msg_t m, output ha_rsp_t r);
    @(negedge clk);
    ham_msg = m; ham_msg_valid = 1;
    do @(posedge clk); while (!ham_msg_ready);
    @(negedge clk); ham_msg_valid = 0;
    while (!ham_rsp_valid) @(negedge clk);
    r = ham_rsp;
    @(negedge clk);
  endtask

  task automatic ha_sel(int t, int o0, int o1, int o2, int o3);
    ha_msg_t m; ha_rsp_t r;
    m = '0; m.op = HA_SEL_CFG; m.tbl = TBL_W'(t);
    m.sel.off[0] = OFF_W'(o0); m.sel.off[1] = OFF_W'(o1);
    m.sel.off[2] = OFF_W'(o2); m.sel.off[3] = OFF_W'(o3);
    ham(m, r);
    m_sel[t] = m.sel;
    checks++; if (!r.ok) begin failures++; $display("FAIL selector refused"); end
  endtask

  task automatic ha_rule(int t, int i, logic v, logic [HA_W-1:0] k, logic [HA_W-1:0] mk, ha_action_t a);
    ha_msg_t m; ha_rsp_t r;
    m = '0; m.op = v ? HA_RULE_WR : HA_RULE_DEL; m.tbl = TBL_W'(t); m.idx = IDX_W'(i);
    m.key = k; m.mask = mk; m.act = a;
    ham(m, r);
    m_hval[t][i] = v; m_hkey[t][i] = k; m_hmask[t][i] = mk;
    if (v) m_hact[t][i] = a; else ev[EV_DELETE]++;
    checks++; if (!r.ok) begin failures++; $display("FAIL HA rule refused"); end
  endtask

  task automatic ctl(fe_msg_t m);
    @(negedge clk);
    ctl_msg = m; ctl_msg_valid = 1;
    do @(posedge clk); while (!ctl_msg_ready);
    @(negedge clk); ctl_msg_valid = 0;
    while (!ctl_rsp_valid) @(negedge clk);
    checks++;
    if (ctl_rsp_op != m.op || !ctl_rsp_ok) begin failures++; $display("FAIL controller message"); end
    @(negedge clk);
  endtask

  task automatic fw_rule(int i, logic [FW_KEY_W-1:0] k, logic [FW_KEY_W-1:0] mk, fw_op_e op, int port);
    fe_msg_t m;
    m = '0; m.op = FE_FW_WR; m.idx = IDX_W'(i); m.key = k; m.mask = mk;
    m.act.op = op; m.act.port = PORT_W'(port);
    ctl(m);
    m_fval[i] = 1; m_fkey[i] = k; m_fmask[i] = mk; m_fact[i] = m.act;
  endtask

  task automatic cls_rule(int i, int tag, int first);
    fe_msg_t m;
    m = '0; m.op = FE_CLS_WR; m.idx = IDX_W'(i); m.tag = TAG_W'(tag); m.first_tbl = TBL_W'(first);
    ctl(m);
    m_cval[i] = 1; m_ctag[i] = TAG_W'(tag); m_cfirst[i] = TBL_W'(first);
  endtask

  // address pools keep rule hits frequent
  function automatic logic [31:0] addr(int i); return 32'h0a00_0000 + 32'(i); endfunction
  function automatic logic [15:0] l4p(int i);  return 16'(1000 + i);          endfunction

  task automatic send_packet(hv_t h, int extra);
    byte unsigned p [$];
    int n;
    for (int i = 0; i < 6; i++) p.push_back(h.eth_dst[47-8*i -: 8]);
    for (int i = 0; i < 6; i++) p.push_back(h.eth_src[47-8*i -: 8]);
    if (h.vlan_valid) begin
      p.push_back(8'h81); p.push_back(8'h00);
      p.push_back({h.vlan_pcp, 1'b0, h.vlan_id[11:8]}); p.push_back(h.vlan_id[7:0]);
    end
    p.push_back(8'h08); p.push_back(8'h00);
    p.push_back(8'h45); p.push_back({h.ip_tos, 2'b00});
    for (int i = 0; i < 7; i++) p.push_back(8'h00);
    p.push_back(h.ip_proto); p.push_back(8'h00); p.push_back(8'h00);
    for (int i = 0; i < 4; i++) p.push_back(h.ip_src[31-8*i -: 8]);
    for (int i = 0; i < 4; i++) p.push_back(h.ip_dst[31-8*i -: 8]);
    p.push_back(h.tp_src[15:8]); p.push_back(h.tp_src[7:0]);
    p.push_back(h.tp_dst[15:8]); p.push_back(h.tp_dst[7:0]);
    while (p.size() < 60 + extra) p.push_back(8'($urandom()));
    n = p.size();
    h.pkt_len = 16'(n);
    for (int w = 0; w * 8 < n; w++) begin
      @(negedge clk);
      s_valid = 1; s_port = h.in_port; s_last = (w + 1) * 8 >= n;
      s_data = '0; s_keep = '0;
      for (int b = 0; b < 8; b++)
        if (w * 8 + b < n) begin s_data[63-8*b -: 8] = p[w*8+b]; s_keep[7-b] = 1; end
      if (s_last) begin
        exp_t x;
        x = model(h);
        x.t = cyc;
        exp_q.push_back(x);
      end
    end
    @(negedge clk);
    s_valid = 0; s_last = 0;
  endtask

  function automatic hv_t rnd_pkt();
    hv_t h;
    int tg;
    h = '0;
    h.in_port = PORT_W'($urandom_range(0, 3));
    h.eth_dst = 48'h0200_0000_0001; h.eth_src = 48'h0200_0000_0100 + 48'($urandom_range(0, 15));
    h.eth_type = 16'h0800;
    tg = $urandom_range(0, 4);
    h.vlan_valid = tg != 0;
    h.vlan_id = (tg == 1) ? 12'd100 : (tg == 2) ? 12'd200 : (tg == 3) ? 12'd300 : 12'd999;
    if (!h.vlan_valid) h.vlan_id = '0;
    h.ipv4_valid = 1; h.l4_valid = 1;
    h.ip_proto = $urandom_range(0, 1) ? 8'd6 : 8'd17;
    h.ip_src = addr($urandom_range(0, 7));
    h.ip_dst = addr(16 + $urandom_range(0, 7));
    h.tp_src = l4p($urandom_range(0, 3));
    h.tp_dst = l4p(10 + $urandom_range(0, 3));
    return h;
  endfunction

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ha_msg_t m;
    ha_rsp_t r;
    for (int t = 0; t < NUM_HA; t++) begin
      m_sel[t] = '0;
      for (int i = 0; i < HA_DEPTH; i++) m_hval[t][i] = 0;
    end
    for (int i = 0; i < FW_DEPTH; i++) m_fval[i] = 0;
    for (int i = 0; i < CLS_DEPTH; i++) m_cval[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---- HAM: NAT in table 0 (key = IPv4 source, 32 bits used)
    ha_sel(0, OFF_IP_SRC + 16, OFF_IP_SRC, OFF_VLAN_ID, OFF_VLAN_ID);
    for (int i = 0; i < 4; i++) begin
      ha_action_t a;
      a = '0;
      a.set[0].en = 1; a.set[0].off = OFF_W'(OFF_IP_SRC);
      a.set[0].mask = 64'hffff_ffff; a.set[0].val = 64'(32'hc0a8_0000 + 32'(i));
      // chain-tag 300 goes on to the firewall (table 1), the rest to FW
      a.next_tbl = TBL_W'(NUM_HA);
      ha_rule(0, 2 * i, 1, {addr(i), 16'd300, 16'd0}, {32'hffff_ffff, 16'h0fff, 16'h0}, a);
      a.next_tbl = TBL_W'(NUM_HA);
      ha_rule(0, 2 * i + 1, 1, {addr(i), 32'd0}, {32'hffff_ffff, 32'h0}, a);
      m_hact[0][2*i].next_tbl = 2'd1;
      begin
        ha_action_t a2;
        a2 = a; a2.next_tbl = 2'd1;
        ha_rule(0, 2 * i, 1, {addr(i), 16'd300, 16'd0}, {32'hffff_ffff, 16'h0fff, 16'h0}, a2);
      end
    end
    // ---- HAM: firewall, table 1 = address pair -> metadata tag
    ha_sel(1, OFF_IP_SRC + 16, OFF_IP_SRC, OFF_IP_DST + 16, OFF_IP_DST);
    for (int i = 0; i < 8; i++) begin
      ha_action_t a;
      a = '0;
      a.set[0].en = 1; a.set[0].off = OFF_W'(OFF_META);
      a.set[0].mask = 64'hffff; a.set[0].val = 64'(16'h0100 + 16'(i));
      a.next_tbl = 2'd2;
      // NAT rewrote sources to 192.168.0.x: match both address spaces
      // any destination of the pool
      ha_rule(1, i, 1, {(i < 4) ? addr(i) : 32'hc0a8_0000 + 32'(i - 4), addr(16)},
              {32'hffff_ffff, 32'hffff_fff8}, a);
    end
    // ---- HAM: firewall, table 2 = metadata tag + L4 destination -> deny
    ha_sel(2, OFF_META, OFF_TP_SRC, OFF_TP_DST, OFF_VLAN_ID);
    for (int i = 0; i < 8; i++) begin
      ha_action_t a;
      a = '0; a.drop = (i % 2 == 0); a.next_tbl = TBL_W'(NUM_HA);
      a.set[0].en = 1; a.set[0].off = OFF_W'(OFF_META + 16);
      a.set[0].mask = 64'hffff; a.set[0].val = 64'h00aa;   // mark as passed
      ha_rule(2, i, 1, {16'h0100 + 16'(i), l4p(i % 4), l4p(10 + i % 4), 16'd0},
              {16'hffff, 16'h0000, 16'hffff, 16'h0}, a);
    end
    // ---- HAM: status enquiry of every table, an invalid message
    for (int t = 0; t <= NUM_HA; t++) begin
      int used;
      m = '0; m.op = HA_STATUS; m.tbl = TBL_W'(t);
      ham(m, r);
      used = 0;
      if (t < NUM_HA) for (int i = 0; i < HA_DEPTH; i++) used += m_hval[t][i];
      checks++;
      if (t < NUM_HA) begin
        ev[EV_STATUS]++;
        if (!r.ok || r.total != 16'(HA_DEPTH) || r.idle != 16'(HA_DEPTH - used)) begin
          failures++; $display("FAIL status of table %0d: idle %0d", t, r.idle);
        end
      end else begin
        ev[EV_CFG_ERR]++;
        if (r.ok) begin failures++; $display("FAIL table %0d accepted", t); end
      end
    end
    m = '0; m.op = HA_RULE_WR; m.tbl = 2'd0; m.idx = IDX_W'(HA_DEPTH);
    ham(m, r);
    ev[EV_CFG_ERR]++;
    checks++; if (r.ok) begin failures++; $display("FAIL out-of-range rule accepted"); end

    // ---- controller: classifier tags and FW rules
    cls_rule(0, 100, 0);   // NAT
    cls_rule(1, 200, 1);   // firewall
    cls_rule(2, 300, 0);   // NAT, then go-to firewall
    for (int i = 0; i < 8; i++) begin
      // forward on destination; two destinations to the controller, one dropped
      logic [FW_KEY_W-1:0] k, mk;
      k  = {8'd0, 32'd0, addr(16 + i), 16'd0, 16'd0};
      mk = {8'd0, 32'd0, 32'hffff_ffff, 16'd0, 16'd0};
      if (i < 6) begin
        if (i == 5) k[15:0] = l4p(10);
        if (i == 5) mk[15:0] = 16'hffff;
        fw_rule(i, k, mk, (i == 4) ? FW_TO_CTRL : FW_OUTPUT, 4 + i % 4);
      end else if (i == 6) fw_rule(i, k, mk, FW_DROP, 0);
      // destination 23 has no rule: misses go to the controller
    end

    // ---- traffic
    for (int r2 = 0; r2 < 1500; r2++) begin
      send_packet(rnd_pkt(), $urandom_range(0, 40));
      if (r2 == 700) begin
        ha_action_t a;
        a = '0;
        ha_rule(1, 3, 0, '0, '0, a);   // delete a firewall rule in service
      end
    end
    // ---- packet-in overflow: controller stops reading, misses arrive
    @(negedge clk); pin_ready = 0;
    for (int r2 = 0; r2 < 20; r2++) begin
      hv_t h;
      h = rnd_pkt();
      h.vlan_valid = 0; h.vlan_id = '0; h.ip_dst = addr(23);
      send_packet(h, 0);
    end
    repeat (LAT + 2) @(negedge clk);
    ev[EV_PIN_OVF] = pins_lost;
    checks++;
    if (pin_overflow != 32'(pins_lost)) begin
      failures++; $display("FAIL overflow count %0d vs %0d", pin_overflow, pins_lost);
    end
    pin_ready = 1;
    repeat (20) @(negedge clk);
    checks++;
    if (exp_q.size() != 0 || pin_q.size() != 0) begin
      failures++; $display("FAIL %0d results, %0d packet-ins missing", exp_q.size(), pin_q.size());
    end
    for (int e = 0; e < EV_N; e++) begin
      $display("%-24s %0d", ev_name[e], ev[e]);
      checks++;
      if (ev[e] == 0) begin failures++; $display("FAIL mechanism never happened: %s", ev_name[e]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
