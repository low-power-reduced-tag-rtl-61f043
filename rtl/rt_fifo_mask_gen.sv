// rt_fifo_mask_gen: builds the FIFO mask for masked-FIFO way selection.
//
// Three per-way status vectors are taken from the lookup of the missing
// address (bit w belongs to way w+1):
//   M1 empty_line     the indexed line of the way is not valid
//   M2 any_lob_empty  the way's Locality Buffer has a free entry
//   M3 any_lob_hit    some LoB entry of the way already holds the TagH
// The mask marks the ways that are good victims:
//   - some line is empty (M1 != 0): empty lines whose way already knows the
//     TagH (M1 & M3); if there is none, all empty lines (M1);
//   - no line is empty: ways whose LoB already holds the TagH (M3), so no
//     valuable LoB entry is lost; if none, ways with a free LoB entry (M2);
//   - if that is still empty, all ways, which leaves plain FIFO order.
// The two branches on "empty line" and the M1-and-M3 combination follow the
// worked mask example (1111 with 1101 gives 1101). In the branch without
// empty lines the preference of a LoB hit over a free LoB entry follows the
// two FIFO problem cases of the architecture; how the two vectors are
// combined there, and the fallbacks to a non-empty mask, are choices of this
// design. Purely combinational.
module rt_fifo_mask_gen #(
  parameter int unsigned WAYS = rt_pkg::WAYS_D
) (
  input  logic [WAYS-1:0] empty_line,
  input  logic [WAYS-1:0] any_lob_empty,
  input  logic [WAYS-1:0] any_lob_hit,
  output logic [WAYS-1:0] fifo_mask
);

  always_comb begin
    if (empty_line != '0) begin
      if ((empty_line & any_lob_hit) != '0) fifo_mask = empty_line & any_lob_hit;
      else                                  fifo_mask = empty_line;
    end else if (any_lob_hit != '0) begin
      fifo_mask = any_lob_hit;
    end else if (any_lob_empty != '0) begin
      fifo_mask = any_lob_empty;
    end else begin
      fifo_mask = '1;
    end
  end

endmodule
