// cmp4_fs: feedback-selection (FS) part of the 4-bit comparator cell.
//
// Each admitted bit pair is compared with an exclusive OR, giving Uneq_i;
// these flags go back to the priority-shut-down part. The select lines mark
// the most significant unequal pair (a one-hot or all-zero vector):
//   Sel_3 = Uneq_3
//   Sel_2 = ~Uneq_3 & Uneq_2
//   Sel_1 = ~Uneq_3 & ~Uneq_2 & Uneq_1
//   Sel_0 = ~Uneq_3 & ~Uneq_2 & ~Uneq_1 & Uneq_0
//
// Interface: a_g, b_g are the admitted nibbles; uneq and sel as above.
// Timing: purely combinational.
//
// The equations are the described ones. Because shut-down already forces
// lower pairs to 0 once a higher pair differs, the priority terms are
// redundant in the closed loop but are kept so that the part is correct on
// its own.
module cmp4_fs (
  input  logic [3:0] a_g,
  input  logic [3:0] b_g,
  output logic [3:0] uneq,
  output logic [3:0] sel
);

  assign uneq = a_g ^ b_g;

  always_comb begin
    sel[3] = uneq[3];
    sel[2] = ~uneq[3] & uneq[2];
    sel[1] = ~uneq[3] & ~uneq[2] & uneq[1];
    sel[0] = ~uneq[3] & ~uneq[2] & ~uneq[1] & uneq[0];
  end

endmodule
