// cmp4_psd: priority-shut-down (PSD) part of the 4-bit comparator cell.
//
// Bit pairs are admitted from the most significant downwards. Pair 3 always
// reaches the feedback-selection (FS) part. Pair i (i < 3) is admitted only
// while the FS part reports every higher pair equal (Uneq_j = 0 for j > i);
// once a higher pair differs, the lower pairs are held at 0 so that the
// lower comparison logic stops switching ("logic shut-down"). EQUAL is the
// NOR of the four Uneq flags fed back from the FS part.
//
// Interface: a, b are the raw operand nibbles; uneq is the feedback from
// the FS part; a_g, b_g are the admitted (gated) nibbles; equal is 1 when
// no admitted pair differs.
// Timing: purely combinational. The feedback path is not a real loop: the
// gate of pair i depends only on Uneq of higher pairs.
//
// The admission rule and the NOR for EQUAL follow the described cell. The
// transistor-level input gating is modelled as AND gates that drive a
// shut-down pair to 0; the held value is this design's choice.
module cmp4_psd (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic [3:0] uneq,
  output logic [3:0] a_g,
  output logic [3:0] b_g,
  output logic       equal
);

  logic [3:0] admit;

  always_comb begin
    admit[3] = 1'b1;
    admit[2] = ~uneq[3];
    admit[1] = ~(uneq[3] | uneq[2]);
    admit[0] = ~(uneq[3] | uneq[2] | uneq[1]);
  end

  assign a_g   = a & admit;
  assign b_g   = b & admit;
  assign equal = ~|uneq;

endmodule
