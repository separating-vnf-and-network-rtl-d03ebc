// tb_hsn_fe_fields: two VNFs, each matching three fields drawn at random
// from the OpenFlow 12-tuple, mapped onto the 64-bit HA tables of the FE at
// its default sizes. Each field is cut into 16-bit selector windows. A VNF
// that needs more than four windows continues in the next table: its
// first table writes a link number into meta[31:16] and the next table
// matches that link plus up to three more windows. VNF A writes its rule
// number into meta[7:0], VNF B into meta[15:8]. A draw that needs more
// than NUM_HA tables in all does not fit and is only counted. For every
// draw that fits, the FE is reset and configured, packets built from 16
// header templates (some with one field changed) are sent, and every
// result is compared with a model of the tables. It also reports how many
// of the table key bits the drawn fields use, over all draws.
module tb_hsn_fe_fields;
  import hsn_pkg::*;
  localparam int LAT = 10;
  localparam int NT = 16;        // header templates
  localparam int DRAWS = 24;

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

  // the OpenFlow 12-tuple: offsets and widths in the header vector
  int f_off [12] = '{OFF_IN_PORT, OFF_ETH_DST, OFF_ETH_SRC, OFF_ETH_TYPE, OFF_VLAN_ID,
                     OFF_VLAN_PCP, OFF_IP_SRC, OFF_IP_DST, OFF_IP_PROTO, OFF_IP_TOS,
                     OFF_TP_SRC, OFF_TP_DST};
  int f_w   [12] = '{8, 48, 48, 16, 12, 3, 32, 32, 8, 6, 16, 16};

  // model of the HA tables
  sel_cfg_t        m_sel [NUM_HA];
  logic [HA_W-1:0] m_key [NUM_HA][HA_DEPTH], m_mask [NUM_HA][HA_DEPTH];
  ha_action_t      m_act [NUM_HA][HA_DEPTH];
  logic            m_val [NUM_HA][HA_DEPTH];

  hv_t tmpl [NT];
  typedef struct { logic [META_W-1:0] meta; int t; } exp_t;
  exp_t exp_q [$];
  int checks = 0, failures = 0, cyc = 0, fit = 0, no_fit = 0, hit_a = 0, hit_b = 0;
  int bits_used = 0, bits_built = 0;   // field bits against table key bits, all draws

  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) begin
    if (rst_n && (fwd_valid || drop_valid || pin_valid)) begin
      exp_t e;
      checks++;
      if (exp_q.size() == 0 || !fwd_valid) begin failures++; $display("FAIL unexpected result"); end
      else begin
        e = exp_q.pop_front();
        if (fwd.hv.meta != e.meta || cyc - e.t != LAT) begin
          failures++;
          if (failures < 10) $display("FAIL meta %h exp %h", fwd.hv.meta, e.meta);
        end
      end
    end
  end

  function automatic logic [HA_W-1:0] sel_key(int t, hv_t hv);
    logic [HV_W-1:0] f;
    logic [HA_W-1:0] k;
    f = hv; k = '0;
    for (int s = 0; s < SEGS; s++)
      for (int b = 0; b < SEG_W; b++)
        if (int'(m_sel[t].off[s]) + b < HV_W) k[HA_W - (s+1)*SEG_W + b] = f[int'(m_sel[t].off[s]) + b];
    return k;
  endfunction

  function automatic logic [META_W-1:0] model(hv_t hv);
    int nt;
    nt = 0;
    for (int t = 0; t < NUM_HA; t++) begin
      int e;
      logic [HA_W-1:0] k;
      logic [HV_W-1:0] f;
      if (nt != t) continue;
      k = sel_key(t, hv);
      e = -1;
      for (int i = 0; i < HA_DEPTH; i++)
        if (e < 0 && m_val[t][i] && ((k ^ m_key[t][i]) & m_mask[t][i]) == 0) e = i;
      if (e < 0) begin nt = t + 1; continue; end
      f = hv;
      for (int s = 0; s < NUM_SETS; s++)
        if (m_act[t][e].set[s].en)
          for (int b = 0; b < HA_W; b++)
            if (m_act[t][e].set[s].mask[b]) f[int'(m_act[t][e].set[s].off) + b] = m_act[t][e].set[s].val[b];
      hv = f;
      nt = int'(m_act[t][e].next_tbl);
    end
    return hv.meta;
  endfunction

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
    @(negedge clk);
  endtask

  task automatic send(hv_t h);
    byte unsigned p [$];
    int n;
    for (int i = 0; i < 6; i++) p.push_back(h.eth_dst[47-8*i -: 8]);
    for (int i = 0; i < 6; i++) p.push_back(h.eth_src[47-8*i -: 8]);
    p.push_back(8'h81); p.push_back(8'h00);
    p.push_back({h.vlan_pcp, 1'b0, h.vlan_id[11:8]}); p.push_back(h.vlan_id[7:0]);
    p.push_back(8'h08); p.push_back(8'h00);
    p.push_back(8'h45); p.push_back({h.ip_tos, 2'b00});
    for (int i = 0; i < 7; i++) p.push_back(8'h00);
    p.push_back(h.ip_proto); p.push_back(8'h00); p.push_back(8'h00);
    for (int i = 0; i < 4; i++) p.push_back(h.ip_src[31-8*i -: 8]);
    for (int i = 0; i < 4; i++) p.push_back(h.ip_dst[31-8*i -: 8]);
    p.push_back(h.tp_src[15:8]); p.push_back(h.tp_src[7:0]);
    p.push_back(h.tp_dst[15:8]); p.push_back(h.tp_dst[7:0]);
    while (p.size() < 64) p.push_back(8'h00);
    n = p.size();
    h.pkt_len = 16'(n);
    for (int w = 0; w * 8 < n; w++) begin
      @(negedge clk);
      s_valid = 1; s_port = h.in_port; s_last = (w + 1) * 8 >= n; s_keep = 8'hff;
      for (int b = 0; b < 8; b++) s_data[63-8*b -: 8] = p[w*8+b];
      if (s_last) exp_q.push_back('{model(h), cyc});
    end
    @(negedge clk);
    s_valid = 0; s_last = 0;
  endtask

  function automatic hv_t rnd_hdr();
    hv_t h;
    h = '0;
    h.in_port = PORT_W'($urandom_range(0, 7));
    h.eth_dst = 48'({$urandom(), $urandom()}); h.eth_src = 48'({$urandom(), $urandom()});
    h.eth_type = 16'h0800; h.vlan_valid = 1; h.vlan_id = 12'd50; h.vlan_pcp = 3'($urandom());
    h.ipv4_valid = 1; h.ip_tos = 6'($urandom()); h.ip_proto = $urandom_range(0, 1) ? 8'd6 : 8'd17;
    h.ip_src = $urandom(); h.ip_dst = $urandom(); h.l4_valid = 1;
    h.tp_src = 16'($urandom()); h.tp_dst = 16'($urandom());
    return h;
  endfunction

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int d = 0; d < DRAWS; d++) begin
      int seg_off [2][$];
      int seg_w [2][$];
      int need [2];
      int fld [2][3];
      for (int v = 0; v < 2; v++) begin seg_off[v].delete(); seg_w[v].delete(); end
      // draw three distinct fields per VNF and cut them into windows
      for (int v = 0; v < 2; v++) begin
        int pick [$];
        pick.delete();
        for (int i = 0; i < 12; i++) pick.push_back(i);
        pick.shuffle();
        for (int j = 0; j < 3; j++) begin
          fld[v][j] = pick[j];
          for (int s = 0; s * SEG_W < f_w[pick[j]]; s++) begin
            seg_off[v].push_back(f_off[pick[j]] + s * SEG_W);
            seg_w[v].push_back((f_w[pick[j]] - s * SEG_W < SEG_W) ? f_w[pick[j]] - s * SEG_W : SEG_W);
          end
        end
        need[v] = (seg_off[v].size() <= SEGS) ? 1 : 1 + (seg_off[v].size() - SEGS + SEGS - 2) / (SEGS - 1);
        for (int j = 0; j < 3; j++) bits_used += f_w[fld[v][j]];
        bits_built += need[v] * HA_W;
      end
      if (need[0] + need[1] > NUM_HA) begin
        no_fit++;
        $display("draw %0d: fields %0d,%0d,%0d / %0d,%0d,%0d need %0d+%0d tables: does not fit",
                 d, fld[0][0], fld[0][1], fld[0][2], fld[1][0], fld[1][1], fld[1][2], need[0], need[1]);
        continue;
      end
      fit++;
      // reset the FE and the model
      rst_n = 0;
      repeat (2) @(negedge clk);
      rst_n = 1;
      for (int t = 0; t < NUM_HA; t++) begin
        m_sel[t] = '0;
        for (int i = 0; i < HA_DEPTH; i++) m_val[t][i] = 0;
      end
      for (int i = 0; i < NT; i++) tmpl[i] = rnd_hdr();
      begin
        fe_msg_t c;
        c = '0; c.op = FE_CLS_WR; c.tag = TAG_W'(50); c.first_tbl = '0;
        ctl(c);
        c = '0; c.op = FE_FW_WR; c.act.op = FW_OUTPUT; c.act.port = 8'd4;
        ctl(c);
      end
      // map: VNF A from table 0, VNF B right after it
      begin
        int t0;
        t0 = 0;
        for (int v = 0; v < 2; v++) begin
          int first_rule, nseg;
          first_rule = v * 4;              // A: templates 0..7, B: 4..11
          nseg = seg_off[v].size();
          for (int k = 0; k < need[v]; k++) begin
            int t, s_lo, s_n, slot;
            ha_msg_t m;
            t = t0 + k;
            s_lo = (k == 0) ? 0 : SEGS + (k - 1) * (SEGS - 1);
            s_n  = (k == 0) ? SEGS : SEGS - 1;
            m = '0; m.op = HA_SEL_CFG; m.tbl = TBL_W'(t);
            slot = 0;
            if (k > 0) begin m.sel.off[0] = OFF_W'(OFF_META + 16); slot = 1; end
            for (int s = s_lo; s < s_lo + s_n && s < nseg; s++) begin
              m.sel.off[slot] = OFF_W'(seg_off[v][s]); slot++;
            end
            ham(m);
            m_sel[t] = m.sel;
            for (int r = 0; r < 8; r++) begin
              logic [HA_W-1:0] kk, mk, full;
              ha_action_t a;
              full = sel_key(t, tmpl[first_rule + r]);
              mk = '0; slot = (k > 0) ? 1 : 0;
              for (int s = s_lo; s < s_lo + s_n && s < nseg; s++) begin
                for (int b = 0; b < seg_w[v][s]; b++) mk[HA_W - (slot+1)*SEG_W + b] = 1'b1;
                slot++;
              end
              kk = full & mk;
              if (k > 0) begin
                // the link number written by the previous table of this VNF
                kk[HA_W-1 -: SEG_W] = SEG_W'(16'h100 * v + r + 1);
                mk[HA_W-1 -: SEG_W] = '1;
              end
              a = '0;
              a.set[0].en = 1;
              if (k < need[v] - 1) begin
                a.set[0].off = OFF_W'(OFF_META + 16); a.set[0].mask = 64'hffff;
                a.set[0].val = 64'(16'h100 * v + r + 1);
                a.next_tbl = TBL_W'(t + 1);
              end else begin
                a.set[0].off = OFF_W'(OFF_META + 8 * v); a.set[0].mask = 64'hff;
                a.set[0].val = 64'(r + 1);
                a.set[1].en = 1; a.set[1].off = OFF_W'(OFF_META + 16);
                a.set[1].mask = 64'hffff; a.set[1].val = '0;
                a.next_tbl = TBL_W'((v == 0) ? need[0] : NUM_HA);
              end
              m = '0; m.op = HA_RULE_WR; m.tbl = TBL_W'(t); m.idx = IDX_W'(r);
              m.key = kk; m.mask = mk; m.act = a;
              ham(m);
              m_val[t][r] = 1; m_key[t][r] = kk; m_mask[t][r] = mk; m_act[t][r] = a;
            end
          end
          t0 += need[v];
        end
      end
      // traffic
      for (int p = 0; p < 120; p++) begin
        hv_t h;
        logic [META_W-1:0] mm;
        h = tmpl[$urandom_range(0, NT-1)];
        if ($urandom_range(0, 3) == 0) begin
          hv_t r;
          r = rnd_hdr();
          case ($urandom_range(0, 3))
            0: h.ip_src = r.ip_src;
            1: h.eth_dst = r.eth_dst;
            2: h.tp_dst = r.tp_dst;
            default: h.in_port = r.in_port;
          endcase
        end
        mm = model(h);
        if (mm[7:0] != 0) hit_a++;
        if (mm[15:8] != 0) hit_b++;
        send(h);
      end
      repeat (LAT + 4) @(negedge clk);
      checks++;
      if (exp_q.size() != 0) begin failures++; $display("FAIL %0d results missing", exp_q.size()); exp_q.delete(); end
      $display("draw %0d: fields %0d,%0d,%0d / %0d,%0d,%0d use %0d+%0d tables",
               d, fld[0][0], fld[0][1], fld[0][2], fld[1][0], fld[1][1], fld[1][2], need[0], need[1]);
    end
    checks++;
    if (fit == 0 || hit_a == 0 || hit_b == 0) begin
      failures++; $display("FAIL coverage fit=%0d hits A=%0d B=%0d", fit, hit_a, hit_b);
    end
    $display("key bits used by the fields: %0d of %0d (%0d.%0d %%)", bits_used, bits_built,
             bits_used * 100 / bits_built, (bits_used * 1000 / bits_built) % 10);
    $display("draws that fit: %0d, that do not: %0d; VNF A hits %0d, VNF B hits %0d", fit, no_fit, hit_a, hit_b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
