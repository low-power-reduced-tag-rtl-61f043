// tb_rt_cache_way: random test of one cache way with 16 sets, 4 TagL bits,
// 2 LCB bits and 32-bit lines. Fills, LCB invalidations and lookups are
// mixed; a model array of {valid, TagL, LCB, data} predicts the line read
// one cycle after each lookup and the LowTagHit for a random or matching
// requested TagL.
module tb_rt_cache_way;
  logic        clk = 0, rst_n = 0;
  logic        rd_en, wr_en, inval_en;
  logic [3:0]  rd_index, wr_index, cmp_tagl, wr_tagl, line_tagl;
  logic [1:0]  wr_lcb, inval_lcb, line_lcb;
  logic [31:0] wr_data, line_data;
  logic        line_valid, low_tag_hit;
  int checks = 0, failures = 0;

  bit        mv [16];
  bit [3:0]  mt [16];
  bit [1:0]  ml [16];
  bit [31:0] md [16];

  always #5 clk = ~clk;

  rt_cache_way #(.SETS(16), .TAGL_W(4), .LCB_W(2), .LINE_W(32)) dut (.*);

  initial begin
    int idx;
    rd_en = 0; wr_en = 0; inval_en = 0;
    rd_index = 0; wr_index = 0; cmp_tagl = 0; wr_tagl = 0; wr_lcb = 0; inval_lcb = 0; wr_data = 0;
    foreach (mv[i]) begin mv[i] = 0; mt[i] = 0; ml[i] = 0; md[i] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      // update port
      wr_en    = ($urandom_range(0, 2) == 0);
      inval_en = ($urandom_range(0, 9) == 0);
      wr_index = 4'($urandom_range(0, 15));
      wr_tagl  = 4'($urandom_range(0, 15));
      wr_lcb   = 2'($urandom_range(0, 3));
      wr_data  = $urandom;
      inval_lcb = 2'($urandom_range(0, 3));
      // lookup
      rd_en    = 1;
      idx      = $urandom_range(0, 15);
      rd_index = 4'(idx);
      @(posedge clk);
      // model update for the edge that just happened; the read saw the old data
      begin
        bit        ov;
        bit [3:0]  ot;
        bit [1:0]  ol;
        bit [31:0] od;
        ov = mv[idx]; ot = mt[idx]; ol = ml[idx]; od = md[idx];
        if (inval_en)
          for (int i = 0; i < 16; i++) if (ml[i] == inval_lcb) mv[i] = 0;
        if (wr_en) begin
          mv[wr_index] = 1; mt[wr_index] = wr_tagl; ml[wr_index] = wr_lcb; md[wr_index] = wr_data;
        end
        #1;
        wr_en = 0; inval_en = 0; rd_en = 0;
        cmp_tagl = $urandom_range(0, 1) ? mt[idx] : 4'($urandom_range(0, 15));
        #1;
        // tag-side outputs show the current (post-edge) contents of the line read
        checks += 4;
        if (line_valid !== mv[idx]) begin failures++; $display("FAIL valid set %0d", idx); end
        if (line_tagl !== mt[idx]) begin failures++; $display("FAIL tagl set %0d", idx); end
        if (line_lcb !== ml[idx]) begin failures++; $display("FAIL lcb set %0d", idx); end
        if (low_tag_hit !== (mv[idx] && mt[idx] == cmp_tagl)) begin failures++; $display("FAIL low_tag_hit"); end
        // the synchronous data read returns the contents before the edge's write
        checks++;
        if (ov && line_data !== od) begin failures++; $display("FAIL data set %0d: %h want %h", idx, line_data, od); end
        if (!ov) checks--;
      end
    end
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
