// Radix-4 (valency-4) Ling prefix node.
//
// Merges four adjacent groups, grp_in[3] the most significant, into one:
//   H = H3 + I3 H2 + I3 I2 H1 + I3 I2 I1 H0
//   I = I3 I2 I1 I0
// This is the same associative operator as in a conventional
// carry-lookahead tree; in Ling's form the first level needs no transmit of
// the top bit, which is what makes its nodes simpler. A missing input group
// (beyond the least significant bit) is fed with the neutral group
// {h=0, i=1}. Purely combinational: one domino gate in the carry tree.
module ling_node4
  import ling_pkg::*;
(
  input  ling_grp_t [3:0] grp_in,
  output ling_grp_t       grp_out
);

  always_comb begin
    grp_out.h = grp_in[3].h
              | (grp_in[3].i & grp_in[2].h)
              | (grp_in[3].i & grp_in[2].i & grp_in[1].h)
              | (grp_in[3].i & grp_in[2].i & grp_in[1].i & grp_in[0].h);
    grp_out.i = grp_in[3].i & grp_in[2].i & grp_in[1].i & grp_in[0].i;
  end

endmodule
