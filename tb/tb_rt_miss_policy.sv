// tb_rt_miss_policy: exhaustive test of the miss-policy decoder. All input
// combinations (counter 0..15, threshold 2) are applied; the expected
// operation is written as the row conditions of the cache operation summary,
// checked in a different order from the design (the least specific last).
module tb_rt_miss_policy;
  import rt_pkg::*;
  logic       low_tag_hit, lob_hit, any_lob_hit, lomb_hit, lob_empty, lomb_empty;
  logic [3:0] lomb_cnt;
  rt_action_e action;
  logic       cache_fill, lob_modified, lomb_modified;
  int checks = 0, failures = 0;

  rt_miss_policy #(.HITCNT_W(4), .THRESH(2)) dut (.*);

  initial begin
    rt_action_e exp;
    bit row_hit, row_lob, row_swap, row_cnt, row_newlob, row_newlomb;
    for (int i = 0; i < 1024; i++) begin
      {low_tag_hit, lob_hit, any_lob_hit, lomb_hit, lob_empty, lomb_empty, lomb_cnt} = 10'(i);
      #1;
      row_hit     = low_tag_hit & lob_hit;
      row_lob     = !row_hit & any_lob_hit;
      row_swap    = !row_hit & !any_lob_hit & lomb_hit & (int'(lomb_cnt) >= 2);   // count+1 > 2
      row_cnt     = !row_hit & !any_lob_hit & lomb_hit & (int'(lomb_cnt) < 2);
      row_newlob  = !row_hit & !any_lob_hit & !lomb_hit & lob_empty;
      row_newlomb = !row_hit & !any_lob_hit & !lomb_hit & !lob_empty & lomb_empty;
      if (row_hit)          exp = ACT_HIT;
      else if (row_lob)     exp = ACT_FILL_LOB;
      else if (row_swap)    exp = ACT_SWAP_FILL;
      else if (row_cnt)     exp = ACT_LOMB_COUNT;
      else if (row_newlob)  exp = ACT_NEW_LOB;
      else if (row_newlomb) exp = ACT_NEW_LOMB;
      else                  exp = ACT_REPLACE_LOMB;
      checks++;
      if (action !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL in=%b action=%s want %s", 10'(i), action.name(), exp.name());
      end
      checks++;
      if (cache_fill !== (exp inside {ACT_FILL_LOB, ACT_SWAP_FILL, ACT_NEW_LOB})) failures++;
      checks++;
      if (lob_modified !== (exp inside {ACT_SWAP_FILL, ACT_NEW_LOB})) failures++;
      checks++;
      if (lomb_modified !== (exp inside {ACT_SWAP_FILL, ACT_LOMB_COUNT, ACT_NEW_LOMB, ACT_REPLACE_LOMB})) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
