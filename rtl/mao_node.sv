// mao_node -- one node of the match address output (MAO) binary tree.
//
// Upward, the node reports whether either of its two subtrees holds a
// matched position (maa_out = mp0 | mp1).  Downward, it steers the
// leftmost pointer: when the pointer arrives from above (lp_in) it is
// passed to the left subtree if that one has a match, otherwise to the
// right one, so exactly the leftmost matched leaf receives it:
//   lp0 = lp_in & mp0,   lp1 = lp_in & mp1 & ~mp0.
// Port names follow the node drawing of the design (MP0, MP1, LP0, LP1,
// MAAout, LPin).  Purely combinational.
module mao_node (
  input  logic mp0,      // left subtree has a match
  input  logic mp1,      // right subtree has a match
  input  logic lp_in,    // leftmost pointer from the parent
  output logic maa_out,  // this subtree has a match
  output logic lp0,      // pointer to the left subtree
  output logic lp1       // pointer to the right subtree
);

  always_comb begin
    maa_out = mp0 | mp1;
    lp0     = lp_in & mp0;
    lp1     = lp_in & mp1 & ~mp0;
  end

endmodule
