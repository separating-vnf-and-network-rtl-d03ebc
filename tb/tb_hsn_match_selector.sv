// tb_hsn_match_selector: random header vectors and segment offsets; each
// key segment must equal the 16 header-vector bits at its offset.
module tb_hsn_match_selector;
  import hsn_pkg::*;

  hv_t             hv;
  sel_cfg_t        cfg;
  logic [HA_W-1:0] key;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  hsn_match_selector dut (.*);

  function automatic logic [HV_W-1:0] rnd_hv();
    logic [HV_W-1:0] v;
    for (int i = 0; i < HV_W/32; i++) v[32*i +: 32] = $urandom();
    return v;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // named-field selection: IP source and destination as one 64-bit key
    hv = rnd_hv();
    cfg.off[0] = OFF_W'(OFF_IP_SRC + 16); cfg.off[1] = OFF_W'(OFF_IP_SRC);
    cfg.off[2] = OFF_W'(OFF_IP_DST + 16); cfg.off[3] = OFF_W'(OFF_IP_DST);
    #1;
    checks++;
    if (key != {hv.ip_src, hv.ip_dst}) begin
      failures++; $display("FAIL ip pair: %h vs %h", key, {hv.ip_src, hv.ip_dst});
    end
    // random offsets, bit by bit
    for (int r = 0; r < 3000; r++) begin
      logic [HV_W-1:0] flat;
      flat = rnd_hv();
      hv = flat;
      for (int s = 0; s < SEGS; s++) cfg.off[s] = OFF_W'($urandom_range(0, HV_W-1));
      #1;
      for (int s = 0; s < SEGS; s++) begin
        for (int b = 0; b < SEG_W; b++) begin
          int src;
          logic exp;
          src = int'(cfg.off[s]) + b;
          exp = (src < HV_W) ? flat[src] : 1'b0;
          if (key[HA_W - (s+1)*SEG_W + b] != exp) begin
            failures++;
            if (failures < 10) $display("FAIL seg %0d bit %0d off %0d", s, b, cfg.off[s]);
          end
        end
      end
      checks++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
