// cmp_pkg: types and constants shared by every level of the shut-down
// magnitude comparator.
//
// A comparator level reports its decision as three flags: a_big (A > B),
// b_big (B > A) and equal (A == B). Exactly one of them is 1 for any pair
// of operands. The three output names follow the comparator's description;
// packing them into one struct is this design's own choice.
package cmp_pkg;

  // Width of the basic comparator cell (4 bits, as described).
  localparam int unsigned NIB_W = 4;

  typedef struct packed {
    logic a_big;   // A is larger
    logic b_big;   // B is larger
    logic equal;   // A equals B
  } cmp_result_t;

endpackage
