// cmp32: 32-bit low-power magnitude comparator (top level).
//
// Two stages. The first stage is four 8-bit sub-comparators (cmp8) working
// in parallel on bytes 3..0 of A and B; each reports A_big / B_big for its
// byte, with both 0 when the bytes are equal. The second stage is one 4-bit
// shut-down cell (cmp4) that treats the four A_big flags as a 4-bit number
// and the four B_big flags as another. A byte whose operands differ has
// exactly one of its two flags set, so the second stage finds the most
// significant unequal byte, shuts the lower bytes' flags out and passes
// that byte's decision to the outputs. EQUAL is 1 only when all bytes are
// equal. Inside every cell, the lower bits are shut down as soon as a
// higher bit pair differs.
//
// Interface: a, b unsigned 32-bit operands; res = {a_big, b_big, equal},
// exactly one set: a_big for A > B, b_big for B > A, equal for A == B.
// Timing: purely combinational (no clock, no reset). The worst path is an
// 8-bit sub-comparator followed by the second-stage cell.
//
// The two-stage structure (four parallel 8-bit sub-comparators, one 4-bit
// second stage) follows the described design; byte 3 is the most
// significant group, and active-high flags are this design's choice.
module cmp32
  import cmp_pkg::*;
#(
  parameter int unsigned WIDTH = 32  // operand width (fixed structure)
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output cmp_result_t      res
);

  localparam int unsigned GROUPS = WIDTH / 8;

  cmp_result_t       grp_res [GROUPS];
  logic [GROUPS-1:0] grp_a_big, grp_b_big;

  // The structure is four bytes into one 4-bit second stage.
  if (WIDTH != 32) begin : g_bad_width
    $error("cmp32: WIDTH must be 32 (four 8-bit groups into a 4-bit second stage)");
  end

  for (genvar g = 0; g < GROUPS; g++) begin : g_grp
    cmp8 u_cmp8 (.a(a[8*g +: 8]), .b(b[8*g +: 8]), .res(grp_res[g]));
    assign grp_a_big[g] = grp_res[g].a_big;
    assign grp_b_big[g] = grp_res[g].b_big;
  end

  cmp4 u_stage2 (.a(grp_a_big), .b(grp_b_big), .res(res));

endmodule
