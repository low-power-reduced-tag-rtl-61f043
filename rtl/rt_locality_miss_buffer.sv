// rt_locality_miss_buffer: the Locality Miss Buffer (LoMB) of one cache way.
//
// When every LoB entry of a way is taken, a new locality (TagH) is first
// recorded here, with a hit counter, instead of displacing a LoB entry. Only
// once its counter passes the threshold is it swapped into the LoB.
// It holds ENTRIES entries of {TagH, valid, hit counter}; lookups are
// combinational:
//   hit, hit_idx, hit_cnt   a valid entry equals tagh, its index and counter
//   any_empty, empty_idx    lowest entry that is not valid
//   victim_idx              replacement candidate: the lowest entry whose
//                           counter is at most 1; if none is, the entry
//                           with the smallest counter
// Updates at the next clock edge:
//   cnt_inc   counter of cnt_idx counts up, saturating
//   wr_en     entry wr_idx gets wr_tagh with valid wr_valid, counter cleared
// The entry format, the counter and the "counter <= 1" candidate rule come
// from the architecture; the depth, the counter width and the fallback to the
// smallest counter when no entry qualifies are choices of this design.
module rt_locality_miss_buffer #(
  parameter int unsigned TAGH_W   = 14,
  parameter int unsigned ENTRIES  = rt_pkg::LOMB_ENTRIES_D,
  parameter int unsigned HITCNT_W = rt_pkg::HITCNT_W_D,
  parameter int unsigned IDX_W    = (ENTRIES > 1) ? $clog2(ENTRIES) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [TAGH_W-1:0]   tagh,
  output logic                hit,
  output logic [IDX_W-1:0]    hit_idx,
  output logic [HITCNT_W-1:0] hit_cnt,
  output logic                any_empty,
  output logic [IDX_W-1:0]    empty_idx,
  output logic [IDX_W-1:0]    victim_idx,
  input  logic                cnt_inc,
  input  logic [IDX_W-1:0]    cnt_idx,
  input  logic                wr_en,
  input  logic [IDX_W-1:0]    wr_idx,
  input  logic [TAGH_W-1:0]   wr_tagh,
  input  logic                wr_valid
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
      if (wr_en) begin
        tagh_q[wr_idx]  <= wr_tagh;
        valid_q[wr_idx] <= wr_valid;
        cnt_q[wr_idx]   <= '0;
      end
    end
  end

  always_comb begin
    logic found_small;
    logic [HITCNT_W-1:0] min_cnt;
    hit         = 1'b0;
    hit_idx     = '0;
    hit_cnt     = '0;
    any_empty   = 1'b0;
    empty_idx   = '0;
    found_small = 1'b0;
    victim_idx  = '0;
    min_cnt     = '1;
    for (int e = ENTRIES - 1; e >= 0; e--) begin
      if (valid_q[e] && (tagh_q[e] == tagh)) begin
        hit     = 1'b1;
        hit_idx = IDX_W'(e);
        hit_cnt = cnt_q[e];
      end
      if (!valid_q[e]) begin
        any_empty = 1'b1;
        empty_idx = IDX_W'(e);
      end
    end
    // Candidate: lowest entry with counter <= 1.
    for (int e = ENTRIES - 1; e >= 0; e--) begin
      if (cnt_q[e] <= HITCNT_W'(1)) begin
        found_small = 1'b1;
        victim_idx  = IDX_W'(e);
      end
    end
    // Fallback: smallest counter, lowest index on a tie.
    if (!found_small) begin
      for (int e = 0; e < ENTRIES; e++) begin
        if (cnt_q[e] < min_cnt || e == 0) begin
          min_cnt    = cnt_q[e];
          victim_idx = IDX_W'(e);
        end
      end
    end
  end

endmodule
