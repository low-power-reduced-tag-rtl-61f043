// rt_cache_way: one way of the reduced-tag cache (the "SRAM cache" of a way).
//
// Each of the SETS lines holds an LCB field, a valid bit, the reduced tag
// TagL and a data line of LINE_W bits. The LCB field names the Locality
// Buffer entry that supplies the rest of the line's tag (TagH).
//
// Read: rd_en with rd_index starts a lookup. One cycle later line_valid,
// line_tagl, line_lcb and line_data show the addressed line, and
// low_tag_hit compares the stored TagL with cmp_tagl (LowTagHit is valid
// and TagL equal). The data array has a synchronous read port, as an SRAM
// macro would; the small tag-side fields are kept in flip-flops so that the
// whole way can be searched by LCB value.
//
// Fill: wr_en writes data, TagL and LCB at wr_index and sets the line valid.
// Invalidate: inval_en clears the valid bit of every line whose LCB equals
// inval_lcb. The controller uses it when a LoB entry receives a new TagH,
// so that no line keeps pointing at a locality that is no longer there.
// A fill in the same cycle wins over the invalidation for its own line.
// The invalidation port is this design's addition; the storage layout
// (LCB, Valid, TagL, Data) follows the architecture.
module rt_cache_way #(
  parameter int unsigned SETS    = 256,
  parameter int unsigned INDEX_W = $clog2(SETS),
  parameter int unsigned TAGL_W  = rt_pkg::TAGL_W_D,
  parameter int unsigned LCB_W   = rt_pkg::LCB_W_D,
  parameter int unsigned LINE_W  = rt_pkg::LINE_WORDS_D * rt_pkg::WORD_W_D
) (
  input  logic               clk,
  input  logic               rst_n,
  // lookup
  input  logic               rd_en,
  input  logic [INDEX_W-1:0] rd_index,
  input  logic [TAGL_W-1:0]  cmp_tagl,
  output logic               line_valid,
  output logic [TAGL_W-1:0]  line_tagl,
  output logic [LCB_W-1:0]   line_lcb,
  output logic [LINE_W-1:0]  line_data,
  output logic               low_tag_hit,
  // fill
  input  logic               wr_en,
  input  logic [INDEX_W-1:0] wr_index,
  input  logic [TAGL_W-1:0]  wr_tagl,
  input  logic [LCB_W-1:0]   wr_lcb,
  input  logic [LINE_W-1:0]  wr_data,
  // invalidate all lines that point at one LoB entry
  input  logic               inval_en,
  input  logic [LCB_W-1:0]   inval_lcb
);

  logic [SETS-1:0]   valid_q;
  logic [TAGL_W-1:0] tagl_q [SETS];
  logic [LCB_W-1:0]  lcb_q  [SETS];
  logic [LINE_W-1:0] data_mem [SETS];
  logic [INDEX_W-1:0] idx_q;

  // Valid bits: reset, flash invalidate by LCB, set by a fill.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= '0;
    end else begin
      for (int unsigned i = 0; i < SETS; i++) begin
        if (wr_en && (wr_index == INDEX_W'(i)))
          valid_q[i] <= 1'b1;
        else if (inval_en && (lcb_q[i] == inval_lcb))
          valid_q[i] <= 1'b0;
      end
    end
  end

  // Tag side fields; reset so that unwritten lines read as a known value.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < SETS; i++) begin
        tagl_q[i] <= '0;
        lcb_q[i]  <= '0;
      end
    end else if (wr_en) begin
      tagl_q[wr_index] <= wr_tagl;
      lcb_q[wr_index]  <= wr_lcb;
    end
  end

  // Data array: one write port, one synchronous read port.
  always_ff @(posedge clk) begin
    if (wr_en) data_mem[wr_index] <= wr_data;
    if (rd_en) line_data <= data_mem[rd_index];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     idx_q <= '0;
    else if (rd_en) idx_q <= rd_index;
  end

  assign line_valid  = valid_q[idx_q];
  assign line_tagl   = tagl_q[idx_q];
  assign line_lcb    = lcb_q[idx_q];
  assign low_tag_hit = line_valid && (line_tagl == cmp_tagl);

endmodule
