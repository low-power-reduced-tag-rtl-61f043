// tb_rt_locality_buffer: random test of a 4-entry Locality Buffer with 8-bit
// TagH values (drawn from a pool of 6 so hits are frequent) and 3-bit
// counters (so saturation happens). Inserts and counter increments are
// applied at random; after every edge all lookup outputs are compared with
// a model of the entries.
module tb_rt_locality_buffer;
  logic       clk = 0, rst_n = 0;
  logic [7:0] tagh, sel_tagh, ins_tagh;
  logic [1:0] sel_lcb, hit_idx, empty_idx, cnt_idx, ins_idx;
  logic       lob_hit, any_hit, any_empty, sel_valid, cnt_inc, ins_en;
  logic [2:0] sel_cnt;
  int checks = 0, failures = 0;
  bit       mv [4];
  bit [7:0] mt [4];
  int       mc [4];
  int       n_sat = 0;

  always #5 clk = ~clk;

  rt_locality_buffer #(.TAGH_W(8), .LCB_W(2), .HITCNT_W(3)) dut (.*);

  initial begin
    bit eh, ee; int ehi, eei;
    cnt_inc = 0; ins_en = 0; cnt_idx = 0; ins_idx = 0; ins_tagh = 0; tagh = 0; sel_lcb = 0;
    foreach (mv[i]) begin mv[i] = 0; mt[i] = 0; mc[i] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      tagh    = 8'($urandom_range(0, 6));
      sel_lcb = 2'($urandom_range(0, 3));
      #1;
      eh = 0; ehi = 0; ee = 0; eei = 0;
      for (int e = 3; e >= 0; e--) begin
        if (mv[e] && mt[e] == tagh) begin eh = 1; ehi = e; end
        if (!mv[e]) begin ee = 1; eei = e; end
      end
      checks += 6;
      if (lob_hit !== (mv[sel_lcb] && mt[sel_lcb] == tagh)) begin failures++; $display("FAIL lob_hit"); end
      if (any_hit !== eh) begin failures++; $display("FAIL any_hit"); end
      if (eh && hit_idx !== 2'(ehi)) begin failures++; $display("FAIL hit_idx"); end
      if (any_empty !== ee) begin failures++; $display("FAIL any_empty"); end
      if (ee && empty_idx !== 2'(eei)) begin failures++; $display("FAIL empty_idx"); end
      if (sel_valid !== mv[sel_lcb] || (mv[sel_lcb] && (sel_tagh !== mt[sel_lcb] || int'(sel_cnt) != mc[sel_lcb]))) begin
        failures++; $display("FAIL selected entry");
      end
      // random update, keeping TagH values unique as the cache does
      cnt_inc = ($urandom_range(0, 1) == 1);
      cnt_idx = 2'($urandom_range(0, 3));
      ins_en  = ($urandom_range(0, 5) == 0) && !eh;
      ins_idx = ee ? 2'(eei) : 2'($urandom_range(0, 3));
      ins_tagh = tagh;
      @(posedge clk);
      if (cnt_inc) begin if (mc[cnt_idx] < 7) mc[cnt_idx]++; else n_sat++; end
      if (ins_en) begin mv[ins_idx] = 1; mt[ins_idx] = ins_tagh; mc[ins_idx] = 0; end
      #1 cnt_inc = 0; ins_en = 0;
    end
    checks++;
    if (n_sat == 0) begin failures++; $display("FAIL counter never saturated"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
