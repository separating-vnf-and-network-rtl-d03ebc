// tb_hsn_fw_table: 5-tuple rules with output, to-controller and drop
// actions. Each input must give exactly one of forward / packet-in / drop
// two clocks later, as a reference model predicts; a miss goes to the
// controller and an HA-dropped packet is only counted as dropped.
module tb_hsn_fw_table;
  import hsn_pkg::*;
  localparam int DEPTH = FW_DEPTH;
  localparam int AW = $clog2(DEPTH);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                rule_we = 0, rule_valid = 0, in_valid = 0;
  logic [AW-1:0]       rule_idx = '0;
  logic [FW_KEY_W-1:0] rule_key = '0, rule_mask = '0;
  fw_action_t          rule_act = '{FW_OUTPUT, '0};
  logic [DEPTH-1:0]    valid_bits;
  pkt_t                in_pkt = '0;
  logic                fwd_valid, pin_valid, drop_valid;
  out_t                fwd;
  hv_t                 pin_hv;

  hsn_fw_table #(.DEPTH(DEPTH)) dut (.*);

  typedef struct { int kind; hv_t hv; logic [PORT_W-1:0] port; int t; } exp_t;
  logic [FW_KEY_W-1:0] m_key [DEPTH], m_mask [DEPTH];
  fw_action_t          m_act [DEPTH];
  logic                m_val [DEPTH];
  exp_t exp_q [$];
  int checks = 0, failures = 0, cyc = 0;
  int n_kind [3] = '{0, 0, 0};

  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) begin
    if (rst_n && (fwd_valid || pin_valid || drop_valid)) begin
      exp_t e;
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("FAIL unexpected output"); end
      else begin
        e = exp_q.pop_front();
        if (int'(fwd_valid) + int'(pin_valid) + int'(drop_valid) != 1) begin
          failures++; $display("FAIL several outputs at once");
        end
        if (cyc - e.t != 2) begin failures++; $display("FAIL latency"); end
        case (e.kind)
          0: if (!fwd_valid || fwd.hv != e.hv || fwd.port != e.port) begin
               failures++; if (failures < 10) $display("FAIL forward");
             end
          1: if (!pin_valid || pin_hv != e.hv) begin
               failures++; if (failures < 10) $display("FAIL packet-in");
             end
          default: if (!drop_valid) begin
               failures++; if (failures < 10) $display("FAIL drop");
             end
        endcase
      end
    end
  end

  task automatic write(int idx, logic v, logic [FW_KEY_W-1:0] k, logic [FW_KEY_W-1:0] m, fw_action_t a);
    @(negedge clk);
    rule_we = 1; rule_idx = AW'(idx); rule_valid = v; rule_key = k; rule_mask = m; rule_act = a;
    @(negedge clk);
    rule_we = 0;
    m_val[idx] = v; m_key[idx] = k; m_mask[idx] = m;
    if (v) m_act[idx] = a;
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
    for (int i = 0; i < DEPTH - 2; i++) begin
      fw_action_t a;
      logic [FW_KEY_W-1:0] k;
      k = {$urandom(), $urandom(), $urandom(), $urandom()};
      a.op = (i % 5 == 1) ? FW_TO_CTRL : (i % 5 == 2) ? FW_DROP : FW_OUTPUT;
      a.port = PORT_W'($urandom_range(0, 7));
      // odd entries wildcard the L4 ports
      write(i, 1, k, (i % 2) ? {{(FW_KEY_W-32){1'b1}}, 32'h0} : '1, a);
    end
    for (int r = 0; r < 2000; r++) begin
      exp_t x;
      int e, hitx;
      logic [FW_KEY_W-1:0] k;
      pkt_t p;
      @(negedge clk);
      for (int w = 0; w < HV_W/32; w++) p.hv[32*w +: 32] = $urandom();
      p.next_tbl = TBL_W'(NUM_HA); p.ha_path = $urandom_range(0, 1);
      p.drop = ($urandom_range(0, 9) == 0);
      e = $urandom_range(0, DEPTH-3);
      if ($urandom_range(0, 3) != 0)
        {p.hv.in_port, p.hv.ip_src, p.hv.ip_dst, p.hv.tp_src, p.hv.tp_dst} =
          (fw_key(p.hv) & ~m_mask[e]) | (m_key[e] & m_mask[e]);
      k = {p.hv.in_port, p.hv.ip_src, p.hv.ip_dst, p.hv.tp_src, p.hv.tp_dst};
      hitx = -1;
      for (int i = 0; i < DEPTH; i++)
        if (hitx < 0 && m_val[i] && ((k ^ m_key[i]) & m_mask[i]) == 0) hitx = i;
      x.hv = p.hv; x.t = cyc; x.port = '0;
      if (p.drop) x.kind = 2;
      else if (hitx < 0) x.kind = 1;
      else begin
        x.kind = (m_act[hitx].op == FW_OUTPUT) ? 0 : (m_act[hitx].op == FW_TO_CTRL) ? 1 : 2;
        x.port = m_act[hitx].port;
      end
      n_kind[x.kind]++;
      in_valid = 1; in_pkt = p;
      exp_q.push_back(x);
    end
    @(negedge clk); in_valid = 0;
    repeat (4) @(negedge clk);
    checks++;
    if (exp_q.size() != 0 || n_kind[0] == 0 || n_kind[1] == 0 || n_kind[2] == 0) begin
      failures++; $display("FAIL left=%0d", exp_q.size());
    end
    $display("forwarded=%0d packet_in=%0d dropped=%0d", n_kind[0], n_kind[1], n_kind[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
