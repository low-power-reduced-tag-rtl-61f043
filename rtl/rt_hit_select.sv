// rt_hit_select: combines the per-way results into the cache hit and data.
//
// A way hits when its LowTagHit (TagL match on a valid line) and its LoBHit
// (the LoB entry named by the line's LCB holds the requested TagH) are both
// true. The way hits are ORed into the cache hit, encoded into the hitting
// way number, and that number selects the way's data line through a
// multiplexer, which then selects the addressed word (word_sel) of the line.
// With unique TagH values per LoB at most one way can hit; an assertion
// checks this. Purely combinational. The OR/encoder/multiplexer structure is
// that of a conventional set-associative cache; the split into LowTagHit
// and LoBHit is the reduced-tag architecture's.
module rt_hit_select #(
  parameter int unsigned WAYS       = rt_pkg::WAYS_D,
  parameter int unsigned WORD_W     = rt_pkg::WORD_W_D,
  parameter int unsigned LINE_WORDS = rt_pkg::LINE_WORDS_D,
  parameter int unsigned WAY_W      = (WAYS > 1) ? $clog2(WAYS) : 1,
  parameter int unsigned WSEL_W     = (LINE_WORDS > 1) ? $clog2(LINE_WORDS) : 1
) (
  input  logic [WAYS-1:0]                   low_tag_hit,
  input  logic [WAYS-1:0]                   lob_hit,
  input  logic [WAYS-1:0][LINE_WORDS*WORD_W-1:0] way_data,
  input  logic [WSEL_W-1:0]                 word_sel,
  output logic [WAYS-1:0]                   way_hit,
  output logic                              hit,
  output logic [WAY_W-1:0]                  hit_way,
  output logic [LINE_WORDS*WORD_W-1:0]      hit_line,
  output logic [WORD_W-1:0]                 hit_word
);

  assign way_hit = low_tag_hit & lob_hit;
  assign hit     = |way_hit;

  always_comb begin
    hit_way = '0;
    for (int unsigned w = 0; w < WAYS; w++)
      if (way_hit[w]) hit_way = WAY_W'(w);
  end

  assign hit_line = way_data[hit_way];
  assign hit_word = hit_line[word_sel*WORD_W +: WORD_W];

  always_comb
    assert final ($onehot0(way_hit))
      else $error("rt_hit_select: more than one way hit: %b", way_hit);

endmodule
