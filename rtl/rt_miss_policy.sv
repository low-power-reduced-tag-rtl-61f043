// rt_miss_policy: chooses what the miss handler does in the selected way.
//
// Inputs are the lookup results of the way chosen by masked-FIFO selection:
//   low_tag_hit  valid line with equal TagL
//   lob_hit      the LoB entry named by the line's LCB holds the TagH
//   any_lob_hit  some LoB entry of the way holds the TagH
//   lomb_hit     the way's Locality Miss Buffer holds the TagH
//   lomb_cnt     that LoMB entry's hit counter (before this access)
//   lob_empty    the way's LoB has a free entry
//   lomb_empty   the way's LoMB has a free entry
// The decision follows the cache operation summary of the architecture:
//   LowTagHit & LoBHit                  -> hit, nothing changes
//   TagH in the LoB                     -> fill line, LCB = that entry, LoB counter++
//   TagH in LoMB, counter+1 > THRESH    -> swap LoB[LCB] with the LoMB entry, fill
//   TagH in LoMB, otherwise             -> LoMB counter++, data bypasses the cache
//   TagH nowhere, free LoB entry        -> new LoB entry, fill
//   TagH nowhere, free LoMB entry       -> new LoMB entry, bypass
//   TagH nowhere, both full             -> replace a LoMB candidate, bypass
// The counter is compared after counting this access, as the text orders it
// ("counter up, then if counter > threshold"); THRESH itself is a choice of
// this design. Purely combinational.
module rt_miss_policy
  import rt_pkg::*;
#(
  parameter int unsigned HITCNT_W = rt_pkg::HITCNT_W_D,
  parameter int unsigned THRESH   = rt_pkg::LOMB_THRESH_D
) (
  input  logic                low_tag_hit,
  input  logic                lob_hit,
  input  logic                any_lob_hit,
  input  logic                lomb_hit,
  input  logic [HITCNT_W-1:0] lomb_cnt,
  input  logic                lob_empty,
  input  logic                lomb_empty,
  output rt_action_e          action,
  output logic                cache_fill,
  output logic                lob_modified,
  output logic                lomb_modified
);

  logic [HITCNT_W:0] cnt_next;
  assign cnt_next = {1'b0, lomb_cnt} + 1'b1;

  always_comb begin
    if (low_tag_hit && lob_hit)            action = ACT_HIT;
    else if (any_lob_hit)                  action = ACT_FILL_LOB;
    else if (lomb_hit && (cnt_next > (HITCNT_W+1)'(THRESH)))
                                           action = ACT_SWAP_FILL;
    else if (lomb_hit)                     action = ACT_LOMB_COUNT;
    else if (lob_empty)                    action = ACT_NEW_LOB;
    else if (lomb_empty)                   action = ACT_NEW_LOMB;
    else                                   action = ACT_REPLACE_LOMB;
  end

  assign cache_fill    = action_fills(action);
  assign lob_modified  = (action == ACT_SWAP_FILL) || (action == ACT_NEW_LOB);
  assign lomb_modified = (action == ACT_SWAP_FILL) || (action == ACT_LOMB_COUNT) ||
                         (action == ACT_NEW_LOMB)  || (action == ACT_REPLACE_LOMB);

endmodule
