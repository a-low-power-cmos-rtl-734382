// cmp4: 4-bit magnitude comparator cell with logic shut-down.
//
// The cell compares A and B from the most significant bit down. The
// priority-shut-down part (cmp4_psd) admits a bit pair only while every
// higher pair is equal; the feedback-selection part (cmp4_fs) XORs the
// admitted pairs, feeds the Uneq flags back to the shut-down part and
// selects the first unequal pair; the MUX part (cmp4_mux) passes that pair
// onto the A_big / B_big lines. EQUAL is raised when no pair differs.
//
// Interface: a, b operands; res = {a_big, b_big, equal}, exactly one set.
// Timing: purely combinational; the worst path runs through all four
// shut-down stages (operands equal down to bit 0).
//
// The split into the three parts and their equations follow the described
// cell. The outputs are active high, which is this design's choice.
module cmp4
  import cmp_pkg::*;
(
  input  logic [NIB_W-1:0] a,
  input  logic [NIB_W-1:0] b,
  output cmp_result_t      res
);

  logic [3:0] a_g, b_g, uneq, sel;
  logic       equal;
  logic       a_big, b_big;

  cmp4_psd u_psd (.a(a), .b(b), .uneq(uneq), .a_g(a_g), .b_g(b_g), .equal(equal));
  cmp4_fs  u_fs  (.a_g(a_g), .b_g(b_g), .uneq(uneq), .sel(sel));
  cmp4_mux u_mux (.a_g(a_g), .b_g(b_g), .sel(sel), .a_big(a_big), .b_big(b_big));

  assign res = '{a_big: a_big, b_big: b_big, equal: equal};

  // Exactly one decision flag is raised for any operand pair.
  always_comb begin
    assert final ($onehot({res.a_big, res.b_big, res.equal}))
      else $error("cmp4: result flags not one-hot: %b", res);
  end

endmodule
