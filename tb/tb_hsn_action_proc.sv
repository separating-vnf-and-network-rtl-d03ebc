// tb_hsn_action_proc: random actions checked bit by bit against a model
// that applies the set operations in order; drop and go-to on hit and miss.
module tb_hsn_action_proc;
  import hsn_pkg::*;

  hv_t              hv_in, hv_out;
  logic             hit, drop;
  ha_action_t       act;
  logic [TBL_W-1:0] miss_tbl, next_tbl;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  hsn_action_proc dut (.*);

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
    // NAT-style rewrite of the IPv4 source address
    hv_in = rnd_hv();
    hit = 1; miss_tbl = 2'd1;
    act = '0;
    act.set[0].en = 1; act.set[0].off = OFF_W'(OFF_IP_SRC);
    act.set[0].mask = 64'hffff_ffff; act.set[0].val = 64'h0a00_0001;
    act.next_tbl = 2'd3;
    #1;
    checks++;
    begin
      hv_t e;
      e = hv_in; e.ip_src = 32'h0a00_0001;
      if (hv_out != e || drop || next_tbl != 2'd3) begin
        failures++; $display("FAIL NAT rewrite");
      end
    end
    for (int r = 0; r < 3000; r++) begin
      logic [HV_W-1:0] exp, flat;
      flat = rnd_hv();
      hv_in = flat;
      hit = $urandom_range(0, 3) != 0;
      miss_tbl = TBL_W'($urandom());
      for (int k = 0; k < NUM_SETS; k++) begin
        act.set[k].en   = $urandom_range(0, 3) != 0;
        act.set[k].off  = OFF_W'($urandom_range(0, HV_W-1));
        act.set[k].mask = {$urandom(), $urandom()};
        act.set[k].val  = {$urandom(), $urandom()};
      end
      act.drop = $urandom_range(0, 1);
      act.next_tbl = TBL_W'($urandom());
      #1;
      exp = flat;
      if (hit)
        for (int k = 0; k < NUM_SETS; k++)
          if (act.set[k].en)
            for (int b = 0; b < HA_W; b++)
              if (act.set[k].mask[b] && int'(act.set[k].off) + b < HV_W)
                exp[int'(act.set[k].off) + b] = act.set[k].val[b];
      checks++;
      if (hv_out != exp || drop != (hit && act.drop) ||
          next_tbl != (hit ? act.next_tbl : miss_tbl)) begin
        failures++;
        if (failures < 10) $display("FAIL random action %0d", r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
