// tb_rt_locality_miss_buffer: random test of a 3-entry Locality Miss Buffer
// with 8-bit TagH values and 4-bit counters. Writes (with either valid
// value) and counter increments are random; after each edge the hit, free
// entry and replacement candidate are compared with a model. The candidate
// is the lowest entry with counter <= 1, else the smallest counter.
module tb_rt_locality_miss_buffer;
  logic       clk = 0, rst_n = 0;
  logic [7:0] tagh, wr_tagh;
  logic       hit, any_empty, cnt_inc, wr_en, wr_valid;
  logic [1:0] hit_idx, empty_idx, victim_idx, cnt_idx, wr_idx;
  logic [3:0] hit_cnt;
  int checks = 0, failures = 0;
  bit       mv [3];
  bit [7:0] mt [3];
  int       mc [3];
  int       n_fallback = 0;

  always #5 clk = ~clk;

  rt_locality_miss_buffer #(.TAGH_W(8), .ENTRIES(3), .HITCNT_W(4)) dut (.*);

  initial begin
    bit eh, ee; int ehi, eei, vi, minc;
    cnt_inc = 0; wr_en = 0; cnt_idx = 0; wr_idx = 0; wr_tagh = 0; wr_valid = 0; tagh = 0;
    foreach (mv[i]) begin mv[i] = 0; mt[i] = 0; mc[i] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      tagh = 8'($urandom_range(1, 5));
      #1;
      eh = 0; ehi = 0; ee = 0; eei = 0; vi = -1;
      for (int e = 2; e >= 0; e--) begin
        if (mv[e] && mt[e] == tagh) begin eh = 1; ehi = e; end
        if (!mv[e]) begin ee = 1; eei = e; end
      end
      for (int e = 0; e < 3 && vi < 0; e++) if (mc[e] <= 1) vi = e;
      if (vi < 0) begin
        n_fallback++;
        minc = 99;
        for (int e = 0; e < 3; e++) if (mc[e] < minc) begin minc = mc[e]; vi = e; end
      end
      checks += 4;
      if (hit !== eh) begin failures++; $display("FAIL hit"); end
      if (eh && (hit_idx !== 2'(ehi) || int'(hit_cnt) != mc[ehi])) begin failures++; $display("FAIL hit entry"); end
      if (any_empty !== ee || (ee && empty_idx !== 2'(eei))) begin failures++; $display("FAIL empty"); end
      if (victim_idx !== 2'(vi)) begin failures++; $display("FAIL victim %0d want %0d", victim_idx, vi); end
      cnt_inc = ($urandom_range(0, 1) == 1);
      cnt_idx = 2'($urandom_range(0, 2));
      wr_en   = ($urandom_range(0, 6) == 0) && !eh;
      wr_idx  = 2'($urandom_range(0, 2));
      wr_tagh = tagh;
      wr_valid = ($urandom_range(0, 4) != 0);
      @(posedge clk);
      if (cnt_inc && mc[cnt_idx] < 15) mc[cnt_idx]++;
      if (wr_en) begin mv[wr_idx] = wr_valid; mt[wr_idx] = wr_tagh; mc[wr_idx] = 0; end
      #1 cnt_inc = 0; wr_en = 0;
    end
    checks++;
    if (n_fallback == 0) begin failures++; $display("FAIL fallback candidate never used"); end
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
