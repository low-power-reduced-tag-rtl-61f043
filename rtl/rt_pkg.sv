// rt_pkg: constants and types shared by the reduced-tag set-associative cache.
//
// The cache splits each 32-bit address into TagH | TagL | Index | Offset.
// Only TagL is stored beside each cache line; the wide TagH part lives in a
// small per-way Locality Buffer (LoB) that lines point into through their
// LCB (locality compressed bits) field. A per-way Locality Miss Buffer (LoMB)
// holds localities that are waiting to earn a LoB slot.
//
// The default sizes are the main configuration: a 16 KB, 4-way cache with
// 4-word (16-byte) lines, 2 LCB bits (4 LoB entries per way) and 6 TagL bits,
// the tag length at which the 16 KB 4-way cache reaches full-tag hit ratio.
// The LoMB depth, the hit-counter width and the LoMB promotion threshold are
// not fixed by the architecture description and are choices of this design.
package rt_pkg;

  // Address and data widths (ARM core: 32-bit addresses and words).
  localparam int unsigned ADDR_W_D       = 32;
  localparam int unsigned WORD_W_D       = 32;
  // Cache organisation.
  localparam int unsigned CACHE_BYTES_D  = 16384;
  localparam int unsigned WAYS_D         = 4;
  localparam int unsigned LINE_WORDS_D   = 4;
  // Reduced tag.
  localparam int unsigned TAGL_W_D       = 6;
  localparam int unsigned LCB_W_D        = 2;
  // Locality bookkeeping (design choices).
  localparam int unsigned LOMB_ENTRIES_D = 2;
  localparam int unsigned HITCNT_W_D     = 4;
  localparam int unsigned LOMB_THRESH_D  = 2;

  // Action taken by the miss handler in the selected way. One value per
  // row of the cache operation summary (a hit is row 1).
  typedef enum logic [2:0] {
    ACT_HIT          = 3'd0, // LowTagHit and LoBHit: no change
    ACT_FILL_LOB     = 3'd1, // TagH found in a LoB entry: fill line, LCB -> that entry, LoB counter++
    ACT_SWAP_FILL    = 3'd2, // LoMB hit over threshold: swap LoB[LCB] with LoMB, fill line
    ACT_LOMB_COUNT   = 3'd3, // LoMB hit under threshold: LoMB counter++, bypass
    ACT_NEW_LOB      = 3'd4, // free LoB entry: insert TagH there, fill line
    ACT_NEW_LOMB     = 3'd5, // LoB full, free LoMB entry: insert TagH there, bypass
    ACT_REPLACE_LOMB = 3'd6  // LoB and LoMB full: replace a LoMB candidate, bypass
  } rt_action_e;

  // Number of action kinds, for counters in testbenches.
  localparam int unsigned N_ACTIONS = 7;

  // True when an action refills the cache line in the selected way.
  function automatic logic action_fills(rt_action_e a);
    return (a == ACT_FILL_LOB) || (a == ACT_SWAP_FILL) || (a == ACT_NEW_LOB);
  endfunction

endpackage
