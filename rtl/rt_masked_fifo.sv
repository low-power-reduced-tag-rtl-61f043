// rt_masked_fifo: FIFO way selection overridden by a mask.
//
// For every set the FIFO register remembers, one-hot, the way that was last
// replaced in that set (bit w is way w+1). A conventional FIFO would take
// the next way up, wrapping from the last way to the first. Here the search
// starts at that next way and continues upward, wrapping, to the first way
// whose fifo_mask bit is set. Example: last replaced way 1 (0001) and mask
// 1101 skips way 2 and selects way 3. An all-zero mask selects the plain
// FIFO successor.
// Selection is combinational on (index, fifo_mask). upd_en writes way
// upd_way (binary) as the last replaced way of set upd_index at the next
// clock edge. After reset every set reads as if the last way had just been
// replaced, so the first victim of each set is way 1. The selection rule is
// the architecture's; the reset value is a choice of this design.
module rt_masked_fifo #(
  parameter int unsigned WAYS    = rt_pkg::WAYS_D,
  parameter int unsigned SETS    = 256,
  parameter int unsigned INDEX_W = $clog2(SETS),
  parameter int unsigned WAY_W   = (WAYS > 1) ? $clog2(WAYS) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [INDEX_W-1:0] index,
  input  logic [WAYS-1:0]    fifo_mask,
  output logic [WAYS-1:0]    last_way,
  output logic [WAYS-1:0]    sel_onehot,
  output logic [WAY_W-1:0]   sel_way,
  input  logic               upd_en,
  input  logic [INDEX_W-1:0] upd_index,
  input  logic [WAY_W-1:0]   upd_way
);

  logic [WAYS-1:0] fifo_q [SETS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned s = 0; s < SETS; s++)
        fifo_q[s] <= WAYS'(1) << (WAYS - 1);
    end else if (upd_en) begin
      fifo_q[upd_index] <= WAYS'(1) << upd_way;
    end
  end

  assign last_way = fifo_q[index];

  always_comb begin
    int unsigned last_i;
    logic found;
    last_i = 0;
    for (int unsigned w = 0; w < WAYS; w++)
      if (last_way[w]) last_i = w;
    sel_way = WAY_W'((last_i + 1) % WAYS);
    found   = 1'b0;
    for (int unsigned k = 1; k <= WAYS; k++) begin
      if (!found && fifo_mask[(last_i + k) % WAYS]) begin
        found   = 1'b1;
        sel_way = WAY_W'((last_i + k) % WAYS);
      end
    end
    sel_onehot = WAYS'(1) << sel_way;
  end

endmodule
