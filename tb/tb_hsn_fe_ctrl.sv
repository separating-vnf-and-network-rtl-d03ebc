// tb_hsn_fe_ctrl: controller messages for the FW table and the classifier
// (valid and out-of-range indices), and bursts of packet-ins against a
// slow controller so that the packet-in buffer fills and overflows. Every
// packet-in that fits must come out in order; the rest must be counted.
module tb_hsn_fe_ctrl;
  import hsn_pkg::*;
  localparam int FD = FW_DEPTH, CD = CLS_DEPTH, PD = 8;
  localparam int FAW = $clog2(FD), CAW = $clog2(CD);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                msg_valid = 0, msg_ready, rsp_valid, rsp_ready = 0, rsp_ok;
  fe_msg_t             msg = '0;
  fe_op_e              rsp_op;
  logic                pin_valid, pin_ready = 0;
  hv_t                 pin_hv;
  logic [31:0]         pin_overflow;
  logic                fw_we, fw_valid, cls_we, cls_valid;
  logic [FAW-1:0]      fw_idx;
  logic [FW_KEY_W-1:0] fw_key_o, fw_mask;
  fw_action_t          fw_act;
  logic [CAW-1:0]      cls_idx;
  logic [TAG_W-1:0]    cls_tag;
  logic [TBL_W-1:0]    cls_first_tbl;
  logic                dp_pin_valid = 0;
  hv_t                 dp_pin_hv = '0;

  hsn_fe_ctrl #(.FW_DEPTH_P(FD), .CLS_DEPTH_P(CD), .PIN_DEPTH(PD)) dut (.*);

  int checks = 0, failures = 0, n_err = 0, exp_ovf = 0;
  hv_t pin_q [$];

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 15) $display("FAIL %s", what); end
  endtask

  function automatic fe_msg_t rnd_msg();
    logic [$bits(fe_msg_t)-1:0] v;
    for (int i = 0; i < $bits(fe_msg_t); i++) v[i] = 1'($urandom());
    return fe_msg_t'(v);
  endfunction

  function automatic hv_t rnd_hv();
    logic [HV_W-1:0] v;
    for (int i = 0; i < HV_W/32; i++) v[32*i +: 32] = $urandom();
    return hv_t'(v);
  endfunction

  task automatic transact(fe_msg_t m);
    logic ok, is_fw;
    is_fw = m.op inside {FE_FW_WR, FE_FW_DEL};
    ok = is_fw ? int'(m.idx) < FD : int'(m.idx) < CD;
    @(negedge clk);
    msg = m; msg_valid = 1;
    while (!msg_ready) @(negedge clk);
    @(negedge clk);
    msg_valid = 0; msg = rnd_msg();
    check(fw_we == (ok && is_fw) && cls_we == (ok && !is_fw), "write strobe");
    if (ok && is_fw)
      check(fw_idx == FAW'(m.idx) && fw_valid == (m.op == FE_FW_WR) && fw_key_o == m.key
            && fw_mask == m.mask && fw_act == m.act, "FW write port");
    if (ok && !is_fw)
      check(cls_idx == CAW'(m.idx) && cls_valid == (m.op == FE_CLS_WR) && cls_tag == m.tag
            && cls_first_tbl == m.first_tbl, "classifier write port");
    check(rsp_valid && !msg_ready, "response");
    repeat ($urandom_range(0, 2)) begin
      @(negedge clk);
      check(rsp_valid, "response held");
    end
    check(rsp_op == m.op && rsp_ok == ok, "response contents");
    if (!ok) n_err++;
    rsp_ready = 1;
    @(negedge clk);
    rsp_ready = 0;
    check(!rsp_valid, "response cleared");
  endtask

  // model of the packet-in buffer (a write while full is refused even if
  // a read happens in the same clock)
  always @(posedge clk) begin
    if (rst_n) begin
      automatic bit was_full = pin_q.size() >= PD;
      if (pin_valid && pin_ready) begin
        check(pin_q.size() > 0 && pin_hv == pin_q[0], "packet-in order/content");
        if (pin_q.size() > 0) void'(pin_q.pop_front());
      end
      if (dp_pin_valid) begin
        if (!was_full) pin_q.push_back(dp_pin_hv);
        else exp_ovf++;
      end
    end
  end

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
    for (int r = 0; r < 800; r++) begin
      fe_msg_t m;
      m = rnd_msg();
      if ($urandom_range(0, 4) != 0) m.idx = IDX_W'($urandom_range(0, CD-1));
      transact(m);
    end
    // packet-in bursts; the controller drains slowly
    for (int r = 0; r < 3000; r++) begin
      @(negedge clk);
      dp_pin_valid = (r % 400 < 40) ? 1'b1 : ($urandom_range(0, 3) == 0);
      dp_pin_hv = rnd_hv();
      pin_ready = ($urandom_range(0, 2) == 0);
    end
    @(negedge clk); dp_pin_valid = 0; pin_ready = 1;
    repeat (PD + 4) @(negedge clk);
    check(pin_q.size() == 0 && !pin_valid, "buffer drained");
    check(exp_ovf > 0 && pin_overflow == 32'(exp_ovf), "overflow count");
    check(n_err > 0, "coverage");
    $display("overflows=%0d errors=%0d", exp_ovf, n_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
