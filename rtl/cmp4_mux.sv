// cmp4_mux: MUX part of the 4-bit comparator cell.
//
// The selected bit pair is passed onto two shared result lines:
//   A&sel_i = A_i & sel_i,  B&sel_i = B_i & sel_i
//   a_big = OR_i A&sel_i,   b_big = OR_i B&sel_i
// With sel one-hot on the most significant unequal pair, the operand that
// holds the 1 in that pair is the larger one; with sel all zero both lines
// stay 0.
//
// Interface: a_g, b_g are the admitted nibbles, sel the select lines from
// the feedback-selection part; a_big and b_big are the result lines.
// Timing: purely combinational.
//
// The AND terms are the described ones. In the circuit they are pass
// transistors onto one common line per operand; here that line is an OR,
// which is this design's reading of the wired connection. The outputs are
// active high, also this design's choice.
module cmp4_mux (
  input  logic [3:0] a_g,
  input  logic [3:0] b_g,
  input  logic [3:0] sel,
  output logic       a_big,
  output logic       b_big
);

  logic [3:0] a_and_sel;
  logic [3:0] b_and_sel;

  assign a_and_sel = a_g & sel;
  assign b_and_sel = b_g & sel;
  assign a_big     = |a_and_sel;
  assign b_big     = |b_and_sel;

endmodule
