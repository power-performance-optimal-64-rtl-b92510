// Shared types and constants of the sparse radix-4 Ling adder.
//
// A prefix group spanning bits i down to k is described by two signals in
// Ling's form:
//   h : the Ling "pseudo carry" H(i:k) = g(i) + t(i-1) g(i-1) + ...
//       (with g implying t, the transmit of the top bit drops out)
//   i : the group transmit I(i:k) = t(i-1) t(i-2) ... t(k-1)
// The conventional carry out of the group is recovered as t(i) & H(i:k).
// A single bit i forms the group {h = g(i), i = t(i-1)}; below bit 0 the
// transmit is 0 because the adder has no carry input.
package ling_pkg;

  // Operand width of the adder (64 bits in the design).
  parameter int unsigned ADDER_WIDTH = 64;
  // Sparseness of the carry tree: one Ling carry every SPARSENESS bits.
  parameter int unsigned TREE_SPARSENESS = 2;

  typedef struct packed {
    logic h;  // Ling pseudo carry of the group
    logic i;  // Ling transmit of the group
  } ling_grp_t;

  // Neutral element of the prefix operator (an empty group).
  localparam ling_grp_t LING_GRP_EMPTY = '{h: 1'b0, i: 1'b1};

  // Number of radix-4 levels needed to span 'width' bits: ceil(log4(width)).
  function automatic int unsigned clog4(input int unsigned width);
    int unsigned span;
    int unsigned levels;
    span   = 1;
    levels = 0;
    while (span < width) begin
      span   = span * 4;
      levels = levels + 1;
    end
    return levels;
  endfunction

  // 4**n
  function automatic int unsigned pow4(input int unsigned n);
    return 1 << (2 * n);
  endfunction

endpackage
