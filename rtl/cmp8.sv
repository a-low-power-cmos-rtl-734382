// cmp8: 8-bit sub-comparator of the first stage.
//
// Two 4-bit shut-down cells are chained in priority order. The upper cell
// compares bits 7..4. Its EQUAL output admits the lower nibble: when the
// upper nibbles already differ, bits 3..0 are held at 0 before they reach
// the lower cell, so the lower cell stays idle (logic shut-down one level
// up). Because a shut-down lower cell sees equal operands, its A_big and
// B_big lines stay 0, and the two cells' result lines can simply be ORed.
//
// Interface: a, b 8-bit operands; res = {a_big, b_big, equal}.
// Timing: purely combinational; worst path is upper cell EQUAL -> lower
// nibble gate -> lower cell.
//
// That the 32-bit design uses 8-bit sub-comparators, each drawn as two
// 4-bit cells, is described; how the two cells are joined (EQUAL gating the
// lower nibble, ORed result lines) is this design's own choice.
module cmp8
  import cmp_pkg::*;
(
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  output cmp_result_t res
);

  cmp_result_t      res_hi, res_lo;
  logic [NIB_W-1:0] a_lo, b_lo;

  cmp4 u_hi (.a(a[7:4]), .b(b[7:4]), .res(res_hi));

  // The lower nibble is shut down (held at 0) unless the upper nibbles match.
  assign a_lo    = a[3:0] & {NIB_W{res_hi.equal}};
  assign b_lo    = b[3:0] & {NIB_W{res_hi.equal}};

  cmp4 u_lo (.a(a_lo), .b(b_lo), .res(res_lo));

  assign res.a_big = res_hi.a_big | res_lo.a_big;
  assign res.b_big = res_hi.b_big | res_lo.b_big;
  assign res.equal = res_hi.equal & res_lo.equal;

endmodule
