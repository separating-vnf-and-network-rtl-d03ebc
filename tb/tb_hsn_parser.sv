// tb_hsn_parser: builds packets from chosen field values (Ethernet with
// and without an 802.1Q tag, IPv4 with options, TCP, UDP, ICMP, ARP,
// packets cut short), streams them in 64-bit words with random gaps, and
// compares the header vector with the values it chose. The vector must
// appear one clock after the last word.
module tb_hsn_parser;
  import hsn_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              s_valid = 0, s_last = 0, s_ready, hv_valid;
  logic [63:0]       s_data = '0;
  logic [7:0]        s_keep = '0;
  logic [PORT_W-1:0] s_port = '0;
  hv_t               hv;

  hsn_parser dut (.*);

  hv_t exp_q [$];
  int  t_q [$];
  int checks = 0, failures = 0, cyc = 0;
  int n_vlan = 0, n_l4 = 0, n_nonip = 0;

  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) begin
    if (rst_n && hv_valid) begin
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("FAIL unexpected vector"); end
      else begin
        hv_t e;
        e = exp_q.pop_front();
        if (hv != e) begin
          failures++;
          if (failures < 10) $display("FAIL vector: got %h\n exp %h", hv, e);
        end
        if (cyc - t_q.pop_front() != 1) begin failures++; $display("FAIL latency"); end
      end
    end
  end

  task automatic send(byte unsigned pkt [$], logic [PORT_W-1:0] port);
    int n;
    n = pkt.size();
    for (int w = 0; w * 8 < n; w++) begin
      while ($urandom_range(0, 3) == 0) begin @(negedge clk); s_valid = 0; end
      @(negedge clk);
      s_valid = 1;
      s_port  = (w == 0) ? port : PORT_W'($urandom());
      s_last  = (w + 1) * 8 >= n;
      s_data  = {$urandom(), $urandom()};
      s_keep  = '0;
      for (int b = 0; b < 8; b++)
        if (w * 8 + b < n) begin
          s_data[63 - 8*b -: 8] = pkt[w * 8 + b];
          s_keep[7 - b] = 1'b1;
        end
      if (s_last) t_q.push_back(cyc);
    end
    @(negedge clk);
    s_valid = 0;
  endtask

  task automatic one_packet(int kind);
    byte unsigned p [$];
    hv_t e;
    logic [15:0] et;
    int ihl, len, l4;
    logic [PORT_W-1:0] port;
    e = '0;
    port = PORT_W'($urandom_range(0, 7));
    e.in_port = port;
    e.eth_dst = 48'({$urandom(), $urandom()});
    e.eth_src = 48'({$urandom(), $urandom()});
    for (int i = 0; i < 6; i++) p.push_back(e.eth_dst[47-8*i -: 8]);
    for (int i = 0; i < 6; i++) p.push_back(e.eth_src[47-8*i -: 8]);
    if ($urandom_range(0, 1)) begin
      e.vlan_valid = 1;
      e.vlan_pcp = 3'($urandom());
      e.vlan_id = 12'($urandom());
      p.push_back(8'h81); p.push_back(8'h00);
      p.push_back({e.vlan_pcp, 1'b0, e.vlan_id[11:8]});
      p.push_back(e.vlan_id[7:0]);
      n_vlan++;
    end
    et = (kind == 3) ? 16'h0806 : 16'h0800;
    e.eth_type = et;
    p.push_back(et[15:8]); p.push_back(et[7:0]);
    if (kind != 3) begin
      ihl = (kind == 2) ? 5 + $urandom_range(1, 3) : 5;
      e.ipv4_valid = 1;
      e.ip_tos = 6'($urandom());
      e.ip_proto = (kind == 0) ? 8'd6 : (kind == 1) ? 8'd17 : (kind == 4) ? 8'd1 : 8'd6;
      e.ip_src = $urandom();
      e.ip_dst = $urandom();
      p.push_back({4'd4, 4'(ihl)});
      p.push_back({e.ip_tos, 2'b00});
      for (int i = 0; i < 7; i++) p.push_back(8'($urandom()));
      p.push_back(e.ip_proto);
      p.push_back(8'($urandom())); p.push_back(8'($urandom()));
      for (int i = 0; i < 4; i++) p.push_back(e.ip_src[31-8*i -: 8]);
      for (int i = 0; i < 4; i++) p.push_back(e.ip_dst[31-8*i -: 8]);
      for (int i = 0; i < 4 * (ihl - 5); i++) p.push_back(8'($urandom()));
      l4 = p.size();
      if (e.ip_proto != 8'd1 && l4 + 4 <= HV_W / 8) begin
        e.l4_valid = 1;
        e.tp_src = 16'($urandom());
        e.tp_dst = 16'($urandom());
      end
      p.push_back(e.tp_src[15:8]); p.push_back(e.tp_src[7:0]);
      p.push_back(e.tp_dst[15:8]); p.push_back(e.tp_dst[7:0]);
      if (!e.l4_valid) begin e.tp_src = '0; e.tp_dst = '0; end
      else n_l4++;
    end else n_nonip++;
    len = p.size() + $urandom_range(0, 200);
    if (len < 60) len = 60;
    while (p.size() < len) p.push_back(8'($urandom()));
    e.pkt_len = 16'(len);
    exp_q.push_back(e);
    send(p, port);
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 600; r++) one_packet(r % 5);
    // a runt: 16 bytes, Ethernet header only with an IPv4 type
    begin
      byte unsigned p [$];
      hv_t e;
      e = '0;
      e.in_port = 8'd5;
      e.eth_type = 16'h0800;
      for (int i = 0; i < 12; i++) p.push_back(8'h00);
      p.push_back(8'h08); p.push_back(8'h00); p.push_back(8'h45); p.push_back(8'h00);
      e.pkt_len = 16;
      exp_q.push_back(e);
      send(p, 8'd5);
    end
    repeat (4) @(negedge clk);
    checks++;
    if (exp_q.size() != 0 || n_vlan == 0 || n_l4 == 0 || n_nonip == 0) begin
      failures++; $display("FAIL left=%0d", exp_q.size());
    end
    $display("vlan=%0d l4=%0d non_ip=%0d", n_vlan, n_l4, n_nonip);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
