// rt_cache: reduced-tag set-associative cache with masked-FIFO way selection.
//
// The address is split into TagH | TagL | Index | Offset. Each line stores
// only TagL plus a small LCB field; the LCB selects one of 2**LCB_W entries
// of the way's Locality Buffer (LoB), which holds the wide TagH. A lookup
// compares TagL in every way in parallel (LowTagHit) and the LCB-selected
// TagH (LoBHit); a way with both is a hit. Because one LoB entry serves
// many lines, misses pick the victim way with a masked FIFO (rt_fifo_mask_gen,
// rt_masked_fifo) that avoids throwing away useful LoB entries, and a
// per-way Locality Miss Buffer (LoMB) lets a new locality into the LoB only
// after it has recurred (rt_miss_policy).
//
// Defaults: 16 KB, 4 ways, 4-word lines, 32-bit addresses -> 256 sets,
// 4 offset bits, 8 index bits, 20 tag bits split into 14 TagH and 6 TagL
// bits; 2 LCB bits, so 4 LoB entries per way.
//
// CPU side: a read request (cpu_req_valid, cpu_req_addr) is taken when
// cpu_req_ready is high. Exactly one response follows: cpu_resp_valid for
// one cycle with the addressed 32-bit word and cpu_resp_hit. A hit answers
// in the cycle after the request was taken (one cycle of array access). A
// miss requests the whole line from the next memory level (mem_req_valid /
// mem_req_ready, line-aligned mem_req_addr), waits for mem_resp_valid with
// the line, answers the CPU with the word from it in that cycle and, in the
// same clock edge, updates the line, LoB, LoMB and FIFO as the miss policy
// chose. Lines of a locality that is not (yet) admitted to the LoB are
// passed to the CPU without being cached. Each completed access also
// reports evt_valid with the policy action (rt_pkg::rt_action_e) and way.
//
// The architecture describes reads only; this cache has no write path. The
// handshakes, the one-cycle hit timing and the invalidation of lines whose
// LoB entry receives a new TagH are choices of this design.
module rt_cache
  import rt_pkg::*;
#(
  parameter int unsigned ADDR_W       = ADDR_W_D,
  parameter int unsigned WORD_W       = WORD_W_D,
  parameter int unsigned CACHE_BYTES  = CACHE_BYTES_D,
  parameter int unsigned WAYS         = WAYS_D,
  parameter int unsigned LINE_WORDS   = LINE_WORDS_D,
  parameter int unsigned TAGL_W       = TAGL_W_D,
  parameter int unsigned LCB_W        = LCB_W_D,
  parameter int unsigned LOMB_ENTRIES = LOMB_ENTRIES_D,
  parameter int unsigned HITCNT_W     = HITCNT_W_D,
  parameter int unsigned LOMB_THRESH  = LOMB_THRESH_D,
  // derived sizes
  parameter int unsigned LINE_W       = LINE_WORDS * WORD_W,
  parameter int unsigned LINE_BYTES   = LINE_W / 8,
  parameter int unsigned SETS         = CACHE_BYTES / (WAYS * LINE_BYTES),
  parameter int unsigned OFFSET_W     = $clog2(LINE_BYTES),
  parameter int unsigned INDEX_W      = $clog2(SETS),
  parameter int unsigned TAGH_W       = ADDR_W - OFFSET_W - INDEX_W - TAGL_W,
  parameter int unsigned WAY_W        = (WAYS > 1) ? $clog2(WAYS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // CPU side
  input  logic              cpu_req_valid,
  output logic              cpu_req_ready,
  input  logic [ADDR_W-1:0] cpu_req_addr,
  output logic              cpu_resp_valid,
  output logic [WORD_W-1:0] cpu_resp_data,
  output logic              cpu_resp_hit,
  // next memory level
  output logic              mem_req_valid,
  input  logic              mem_req_ready,
  output logic [ADDR_W-1:0] mem_req_addr,
  input  logic              mem_resp_valid,
  input  logic [LINE_W-1:0] mem_resp_data,
  // access report
  output logic              evt_valid,
  output logic [2:0]        evt_action,
  output logic [WAY_W-1:0]  evt_way
);

  localparam int unsigned BYTE_W  = $clog2(WORD_W / 8);
  localparam int unsigned WSEL_W  = (LINE_WORDS > 1) ? $clog2(LINE_WORDS) : 1;
  localparam int unsigned LOMB_IW = (LOMB_ENTRIES > 1) ? $clog2(LOMB_ENTRIES) : 1;

  typedef enum logic [1:0] {S_IDLE, S_LOOKUP, S_MEM_REQ, S_MEM_WAIT} state_e;

  state_e            state_q;
  logic [ADDR_W-1:0] addr_q;
  logic [WAY_W-1:0]  vway_q;
  rt_action_e        action_q;

  // Address fields of the request being served.
  logic [TAGH_W-1:0]  req_tagh;
  logic [TAGL_W-1:0]  req_tagl;
  logic [INDEX_W-1:0] req_index;
  logic [WSEL_W-1:0]  req_word;
  assign req_tagh  = addr_q[ADDR_W-1 -: TAGH_W];
  assign req_tagl  = addr_q[OFFSET_W+INDEX_W +: TAGL_W];
  assign req_index = addr_q[OFFSET_W +: INDEX_W];
  assign req_word  = WSEL_W'(addr_q[OFFSET_W-1:0] >> BYTE_W);

  logic accept;
  assign cpu_req_ready = (state_q == S_IDLE);
  assign accept        = cpu_req_valid && cpu_req_ready;

  // ---------------------------------------------------------------- ways
  logic [WAYS-1:0]                 w_valid, w_low_hit, w_lob_hit, w_any_lob_hit;
  logic [WAYS-1:0]                 w_lob_empty, w_lomb_hit, w_lomb_empty, w_sel_valid;
  logic [WAYS-1:0][LINE_W-1:0]     w_data;
  logic [WAYS-1:0][LCB_W-1:0]      w_lcb, w_lob_hit_idx, w_lob_empty_idx;
  logic [WAYS-1:0][TAGH_W-1:0]     w_sel_tagh;
  logic [WAYS-1:0][HITCNT_W-1:0]   w_lomb_cnt;
  logic [WAYS-1:0][LOMB_IW-1:0]    w_lomb_idx, w_lomb_empty_idx, w_lomb_victim;

  // update controls for the way being worked on
  logic              apply;         // miss data has arrived: commit the action
  logic              do_fill, do_inval, do_lob_cnt, do_lob_ins;
  logic              do_lomb_cnt, do_lomb_wr, lomb_wr_valid;
  logic [LCB_W-1:0]  fill_lcb, lob_ins_idx;
  logic [LOMB_IW-1:0] lomb_wr_idx;
  logic [TAGH_W-1:0] lomb_wr_tagh;

  for (genvar w = 0; w < WAYS; w++) begin : g_way
    logic mine;
    assign mine = apply && (vway_q == WAY_W'(w));

    rt_cache_way #(
      .SETS(SETS), .INDEX_W(INDEX_W), .TAGL_W(TAGL_W), .LCB_W(LCB_W), .LINE_W(LINE_W)
    ) u_way (
      .clk, .rst_n,
      .rd_en      (accept),
      .rd_index   (cpu_req_addr[OFFSET_W +: INDEX_W]),
      .cmp_tagl   (req_tagl),
      .line_valid (w_valid[w]),
      .line_tagl  (),
      .line_lcb   (w_lcb[w]),
      .line_data  (w_data[w]),
      .low_tag_hit(w_low_hit[w]),
      .wr_en      (mine && do_fill),
      .wr_index   (req_index),
      .wr_tagl    (req_tagl),
      .wr_lcb     (fill_lcb),
      .wr_data    (mem_resp_data),
      .inval_en   (mine && do_inval),
      .inval_lcb  (w_lcb[w])
    );

    rt_locality_buffer #(
      .TAGH_W(TAGH_W), .LCB_W(LCB_W), .HITCNT_W(HITCNT_W)
    ) u_lob (
      .clk, .rst_n,
      .tagh      (req_tagh),
      .sel_lcb   (w_lcb[w]),
      .lob_hit   (w_lob_hit[w]),
      .any_hit   (w_any_lob_hit[w]),
      .hit_idx   (w_lob_hit_idx[w]),
      .any_empty (w_lob_empty[w]),
      .empty_idx (w_lob_empty_idx[w]),
      .sel_tagh  (w_sel_tagh[w]),
      .sel_valid (w_sel_valid[w]),
      .sel_cnt   (),
      .cnt_inc   (mine && do_lob_cnt),
      .cnt_idx   (w_lob_hit_idx[w]),
      .ins_en    (mine && do_lob_ins),
      .ins_idx   (lob_ins_idx),
      .ins_tagh  (req_tagh)
    );

    rt_locality_miss_buffer #(
      .TAGH_W(TAGH_W), .ENTRIES(LOMB_ENTRIES), .HITCNT_W(HITCNT_W), .IDX_W(LOMB_IW)
    ) u_lomb (
      .clk, .rst_n,
      .tagh       (req_tagh),
      .hit        (w_lomb_hit[w]),
      .hit_idx    (w_lomb_idx[w]),
      .hit_cnt    (w_lomb_cnt[w]),
      .any_empty  (w_lomb_empty[w]),
      .empty_idx  (w_lomb_empty_idx[w]),
      .victim_idx (w_lomb_victim[w]),
      .cnt_inc    (mine && do_lomb_cnt),
      .cnt_idx    (w_lomb_idx[w]),
      .wr_en      (mine && do_lomb_wr),
      .wr_idx     (lomb_wr_idx),
      .wr_tagh    (lomb_wr_tagh),
      .wr_valid   (lomb_wr_valid)
    );
  end

  // ---------------------------------------------------------- hit path
  logic              hit;
  logic [WAY_W-1:0]  hit_way;
  logic [WORD_W-1:0] hit_word;

  rt_hit_select #(
    .WAYS(WAYS), .WORD_W(WORD_W), .LINE_WORDS(LINE_WORDS), .WAY_W(WAY_W), .WSEL_W(WSEL_W)
  ) u_hit (
    .low_tag_hit(w_low_hit),
    .lob_hit    (w_lob_hit),
    .way_data   (w_data),
    .word_sel   (req_word),
    .way_hit    (),
    .hit        (hit),
    .hit_way    (hit_way),
    .hit_line   (),
    .hit_word   (hit_word)
  );

  // ------------------------------------------------------ way selection
  logic [WAYS-1:0]  fifo_mask;
  logic [WAY_W-1:0] sel_way;

  rt_fifo_mask_gen #(.WAYS(WAYS)) u_mask (
    .empty_line   (~w_valid),
    .any_lob_empty(w_lob_empty),
    .any_lob_hit  (w_any_lob_hit),
    .fifo_mask    (fifo_mask)
  );

  rt_masked_fifo #(.WAYS(WAYS), .SETS(SETS), .INDEX_W(INDEX_W), .WAY_W(WAY_W)) u_fifo (
    .clk, .rst_n,
    .index     (req_index),
    .fifo_mask (fifo_mask),
    .last_way  (),
    .sel_onehot(),
    .sel_way   (sel_way),
    .upd_en    (apply && action_fills(action_q)),
    .upd_index (req_index),
    .upd_way   (vway_q)
  );

  // -------------------------------------------------------- miss policy
  // During the lookup the policy looks at the way the masked FIFO chose;
  // afterwards at the way that was latched (nothing changes in between).
  logic [WAY_W-1:0] pw;
  rt_action_e       action;
  assign pw = (state_q == S_LOOKUP) ? sel_way : vway_q;

  rt_miss_policy #(.HITCNT_W(HITCNT_W), .THRESH(LOMB_THRESH)) u_policy (
    .low_tag_hit  (w_low_hit[pw]),
    .lob_hit      (w_lob_hit[pw]),
    .any_lob_hit  (w_any_lob_hit[pw]),
    .lomb_hit     (w_lomb_hit[pw]),
    .lomb_cnt     (w_lomb_cnt[pw]),
    .lob_empty    (w_lob_empty[pw]),
    .lomb_empty   (w_lomb_empty[pw]),
    .action       (action),
    .cache_fill   (),
    .lob_modified (),
    .lomb_modified()
  );

  // Commit controls, decoded from the latched action for way vway_q.
  assign apply       = (state_q == S_MEM_WAIT) && mem_resp_valid;
  assign do_fill     = action_fills(action_q);
  assign do_inval    = (action_q == ACT_SWAP_FILL);
  assign do_lob_cnt  = (action_q == ACT_FILL_LOB);
  assign do_lob_ins  = (action_q == ACT_SWAP_FILL) || (action_q == ACT_NEW_LOB);
  assign do_lomb_cnt = (action_q == ACT_LOMB_COUNT);
  assign do_lomb_wr  = (action_q == ACT_SWAP_FILL) || (action_q == ACT_NEW_LOMB) ||
                       (action_q == ACT_REPLACE_LOMB);

  always_comb begin
    fill_lcb      = w_lcb[vway_q];
    lob_ins_idx   = w_lcb[vway_q];
    lomb_wr_idx   = w_lomb_idx[vway_q];
    lomb_wr_tagh  = req_tagh;
    lomb_wr_valid = 1'b1;
    unique case (action_q)
      ACT_FILL_LOB: fill_lcb = w_lob_hit_idx[vway_q];
      ACT_NEW_LOB: begin
        fill_lcb    = w_lob_empty_idx[vway_q];
        lob_ins_idx = w_lob_empty_idx[vway_q];
      end
      ACT_SWAP_FILL: begin
        // the LoB entry named by the line's LCB moves to the LoMB slot
        lomb_wr_tagh  = w_sel_tagh[vway_q];
        lomb_wr_valid = w_sel_valid[vway_q];
      end
      ACT_NEW_LOMB:     lomb_wr_idx = w_lomb_empty_idx[vway_q];
      ACT_REPLACE_LOMB: lomb_wr_idx = w_lomb_victim[vway_q];
      default: ;
    endcase
  end

  // ---------------------------------------------------------------- FSM
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q  <= S_IDLE;
      addr_q   <= '0;
      vway_q   <= '0;
      action_q <= ACT_HIT;
    end else begin
      unique case (state_q)
        S_IDLE:     if (accept) begin
                      addr_q  <= cpu_req_addr;
                      state_q <= S_LOOKUP;
                    end
        S_LOOKUP:   if (hit) begin
                      state_q <= S_IDLE;
                    end else begin
                      vway_q   <= sel_way;
                      action_q <= action;
                      state_q  <= S_MEM_REQ;
                    end
        S_MEM_REQ:  if (mem_req_ready) state_q <= S_MEM_WAIT;
        S_MEM_WAIT: if (mem_resp_valid) state_q <= S_IDLE;
        default:    state_q <= S_IDLE;
      endcase
    end
  end

  assign mem_req_valid = (state_q == S_MEM_REQ);
  assign mem_req_addr  = {addr_q[ADDR_W-1:OFFSET_W], OFFSET_W'(0)};

  assign cpu_resp_valid = ((state_q == S_LOOKUP) && hit) || apply;
  assign cpu_resp_hit   = (state_q == S_LOOKUP) && hit;
  assign cpu_resp_data  = (state_q == S_LOOKUP) ? hit_word
                                                : mem_resp_data[req_word*WORD_W +: WORD_W];

  assign evt_valid  = cpu_resp_valid;
  assign evt_action = (state_q == S_LOOKUP) ? 3'(ACT_HIT) : 3'(action_q);
  assign evt_way    = (state_q == S_LOOKUP) ? hit_way : vway_q;

  // The line request is held until it is taken.
  a_mem_req_stable: assert property (@(posedge clk) disable iff (!rst_n)
      mem_req_valid && !mem_req_ready |=> mem_req_valid && $stable(mem_req_addr));
  // A miss never reaches the memory stage labelled as a hit.
  a_miss_action: assert property (@(posedge clk) disable iff (!rst_n)
      (state_q == S_MEM_REQ) |-> (action_q != ACT_HIT));

endmodule
