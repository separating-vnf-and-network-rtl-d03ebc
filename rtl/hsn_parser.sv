// hsn_parser: turns an incoming packet into a 512-bit header vector.
//
// Packets arrive as a stream of 64-bit words, first byte of the packet in
// bits 63:56 of the first word. The parser keeps the first HDR_BYTES bytes
// of each packet and, on the last word, decodes them: Ethernet addresses
// and type, an optional 802.1Q tag (VLAN ID and priority), IPv4 source,
// destination, protocol and DSCP, and the TCP or UDP ports found after the
// IPv4 header (its length comes from the IHL field). Fields a packet does
// not have, or that do not lie completely within the packet and within
// the first HDR_BYTES bytes, read as zero and their valid flag is low. The in_port comes with the first word,
// the packet length is counted from the words and the byte enables of the
// last word; the metadata starts at zero. The payload is not kept: only
// the header vector continues through the FE.
//
// Timing: s_ready is always high, one word per clock; the header vector
// appears with hv_valid one clock after the word with s_last. Words of a
// packet must be contiguous in s_keep (valid bytes start at bit 63:56).
//
// That a parser feeds the tables with the OpenFlow 12-tuple follows the
// design; the stream format and the decoded protocols are this design's.
module hsn_parser
  import hsn_pkg::*;
#(
  parameter int HDR_BYTES = HV_W / 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              s_valid,
  output logic              s_ready,
  input  logic [63:0]       s_data,
  input  logic [7:0]        s_keep,
  input  logic              s_last,
  input  logic [PORT_W-1:0] s_port,    // sampled on the first word
  output logic              hv_valid,
  output hv_t               hv
);

  typedef logic [HDR_BYTES-1:0][7:0] hdr_t;   // index 0 = first byte

  hdr_t              hdr_q, hdr_n;
  logic [15:0]       words_q;
  logic [PORT_W-1:0] port_q, port_n;

  assign s_ready = 1'b1;

  // Header bytes with the current word written in.
  always_comb begin
    hdr_n  = (words_q == 0) ? '0 : hdr_q;
    port_n = (words_q == 0) ? s_port : port_q;
    for (int b = 0; b < 8; b++) begin
      int pos;
      pos = int'(words_q) * 8 + b;
      if (pos < HDR_BYTES && s_keep[7-b]) hdr_n[pos] = s_data[63-8*b -: 8];
    end
  end

  function automatic logic [7:0] byte_at(hdr_t h, int i);
    return (i >= 0 && i < HDR_BYTES) ? h[i] : 8'h00;
  endfunction

  function automatic hv_t decode(hdr_t h, logic [PORT_W-1:0] port,
                                 logic [15:0] len);
    hv_t r;
    int  l3, l4, avail;
    logic [15:0] et;
    r = '0;
    avail = (int'(len) < HDR_BYTES) ? int'(len) : HDR_BYTES;
    r.in_port = port;
    for (int i = 0; i < 6; i++) begin
      r.eth_dst[47-8*i -: 8] = byte_at(h, i);
      r.eth_src[47-8*i -: 8] = byte_at(h, 6 + i);
    end
    et = {byte_at(h, 12), byte_at(h, 13)};
    l3 = 14;
    if (et == 16'h8100 && avail >= 18) begin
      r.vlan_valid = 1'b1;
      r.vlan_pcp   = byte_at(h, 14)[7:5];
      r.vlan_id    = {byte_at(h, 14)[3:0], byte_at(h, 15)};
      et           = {byte_at(h, 16), byte_at(h, 17)};
      l3           = 18;
    end
    r.eth_type = et;
    if (et == 16'h0800 && l3 + 20 <= avail) begin
      r.ipv4_valid = 1'b1;
      r.ip_tos     = byte_at(h, l3 + 1)[7:2];
      r.ip_proto   = byte_at(h, l3 + 9);
      for (int i = 0; i < 4; i++) begin
        r.ip_src[31-8*i -: 8] = byte_at(h, l3 + 12 + i);
        r.ip_dst[31-8*i -: 8] = byte_at(h, l3 + 16 + i);
      end
      l4 = l3 + 4 * int'(byte_at(h, l3)[3:0]);
      if ((r.ip_proto == 8'd6 || r.ip_proto == 8'd17) && l4 + 4 <= avail) begin
        r.l4_valid = 1'b1;
        r.tp_src   = {byte_at(h, l4),     byte_at(h, l4 + 1)};
        r.tp_dst   = {byte_at(h, l4 + 2), byte_at(h, l4 + 3)};
      end
    end
    r.pkt_len = len;
    return r;
  endfunction

  logic [3:0] keep_cnt;
  always_comb begin
    keep_cnt = '0;
    for (int b = 0; b < 8; b++) keep_cnt += 4'(s_keep[b]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      words_q  <= '0;
      hv_valid <= 1'b0;
    end else begin
      hv_valid <= s_valid && s_last;
      if (s_valid) words_q <= s_last ? '0 : words_q + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (s_valid) begin
      hdr_q  <= hdr_n;
      port_q <= port_n;
      if (s_last) hv <= decode(hdr_n, port_n, 16'(words_q * 8) + 16'(keep_cnt));
    end
  end

endmodule
