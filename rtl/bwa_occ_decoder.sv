// bwa_occ_decoder: one-cycle decoder of the encoded occurrence array.
//
// A 256-bit code covers 64 consecutive BWT rows. It stores the BWT symbol of
// each row and the occurrence counts O(a, last) of the group's last row. The
// count of row j of the group is recovered by subtracting, per symbol, the
// number of that symbol among the rows after j:
//     O(a, base + j) = O(a, base + 63) - #{ r : j < r <= 63, B[base + r] = a }
// This is the add/subtract scheme of the original architecture (its seven-row worked example works
// the same way with 7 rows). All four symbols are decoded at once by four
// popcount-and-subtract trees.
//
// The row holding the end marker '$' has no symbol; its slot is excluded
// with dollar_hit/dollar_slot (this masking, and using code 00 in that slot,
// are choices of this design).
//
// Purely combinational; the result is valid in the cycle the code arrives.
module bwa_occ_decoder
  import bwa_pkg::*;
(
  input  logic [CODE_W-1:0] code,        // encoded group of 64 rows
  input  logic [SLOT_W-1:0] j,           // row within the group to decode
  input  logic              dollar_hit,  // '$' lies in this group
  input  logic [SLOT_W-1:0] dollar_slot, // its row within the group
  output occ_t              occ          // O(a, row) for a = A, C, G, T
);

  // rows strictly after j that hold a symbol
  logic [ROWS_PER_CODE-1:0] after_j, dollar_mask;
  assign after_j     = ~((ROWS_PER_CODE'(2) << j) - 1'b1);
  assign dollar_mask = dollar_hit ? (ROWS_PER_CODE'(1) << dollar_slot) : '0;

  always_comb begin
    for (int a = 0; a < NSYM; a++) begin
      logic [ROWS_PER_CODE-1:0] is_a;
      for (int r = 0; r < ROWS_PER_CODE; r++)
        is_a[r] = (code[2*r +: 2] == a[1:0]);
      occ[a] = code[ROWS_PER_CODE*2 + a*CNT_W +: CNT_W]
             - CNT_W'($countones(is_a & after_j & ~dollar_mask));
    end
  end

endmodule
