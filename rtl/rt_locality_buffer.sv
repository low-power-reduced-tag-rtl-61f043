// rt_locality_buffer: the Locality Buffer (LoB) of one cache way.
//
// It holds 2**LCB_W entries of {TagH, valid, hit counter}. Each cache line
// of the way stores an LCB value that selects one entry; that entry's TagH
// completes the line's tag. All lookups are combinational:
//   lob_hit      the entry selected by sel_lcb is valid and equals tagh
//                (LoBHit: together with LowTagHit this makes a cache hit)
//   any_hit      some valid entry equals tagh (AnyLoBHit), hit_idx is it
//   any_empty    some entry is not valid (AnyLoBEmpty), empty_idx is the
//                lowest such entry
//   sel_tagh/sel_valid  the entry selected by sel_lcb, read out so that a
//                swap can move it to the Locality Miss Buffer
// Updates take effect at the next clock edge:
//   cnt_inc      hit counter of entry cnt_idx counts up, saturating
//   ins_en       entry ins_idx gets ins_tagh, valid, counter cleared
// The entry format and the lookups follow the architecture; the counter
// width and its saturation are choices of this design. TagH values are kept
// unique by the controller, which inserts only on an any_hit miss.
module rt_locality_buffer #(
  parameter int unsigned TAGH_W   = 14,
  parameter int unsigned LCB_W    = rt_pkg::LCB_W_D,
  parameter int unsigned HITCNT_W = rt_pkg::HITCNT_W_D,
  parameter int unsigned ENTRIES  = 2 ** LCB_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [TAGH_W-1:0]   tagh,
  input  logic [LCB_W-1:0]    sel_lcb,
  output logic                lob_hit,
  output logic                any_hit,
  output logic [LCB_W-1:0]    hit_idx,
  output logic                any_empty,
  output logic [LCB_W-1:0]    empty_idx,
  output logic [TAGH_W-1:0]   sel_tagh,
  output logic                sel_valid,
  output logic [HITCNT_W-1:0] sel_cnt,
  input  logic                cnt_inc,
  input  logic [LCB_W-1:0]    cnt_idx,
  input  logic                ins_en,
  input  logic [LCB_W-1:0]    ins_idx,
  input  logic [TAGH_W-1:0]   ins_tagh
);

  logic [TAGH_W-1:0]   tagh_q [ENTRIES];
  logic [ENTRIES-1:0]  valid_q;
  logic [HITCNT_W-1:0] cnt_q  [ENTRIES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= '0;
      for (int unsigned e = 0; e < ENTRIES; e++) begin
        tagh_q[e] <= '0;
        cnt_q[e]  <= '0;
      end
    end else begin
      if (cnt_inc && (cnt_q[cnt_idx] != '1))
        cnt_q[cnt_idx] <= cnt_q[cnt_idx] + 1'b1;
      if (ins_en) begin
        tagh_q[ins_idx]  <= ins_tagh;
        valid_q[ins_idx] <= 1'b1;
        cnt_q[ins_idx]   <= '0;
      end
    end
  end

  assign sel_tagh  = tagh_q[sel_lcb];
  assign sel_valid = valid_q[sel_lcb];
  assign sel_cnt   = cnt_q[sel_lcb];
  assign lob_hit   = sel_valid && (sel_tagh == tagh);

  always_comb begin
    any_hit   = 1'b0;
    hit_idx   = '0;
    any_empty = 1'b0;
    empty_idx = '0;
    for (int e = ENTRIES - 1; e >= 0; e--) begin
      if (valid_q[e] && (tagh_q[e] == tagh)) begin
        any_hit = 1'b1;
        hit_idx = LCB_W'(e);
      end
      if (!valid_q[e]) begin
        any_empty = 1'b1;
        empty_idx = LCB_W'(e);
      end
    end
  end

endmodule
