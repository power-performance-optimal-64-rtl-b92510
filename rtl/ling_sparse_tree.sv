// Sparse radix-4 Ling carry tree (the carry-lookahead block).
//
// A radix-4 Kogge-Stone prefix tree on Ling's equations, built only at every
// SPARSENESS-th bit column: the carries computed are H at bits
// k*SPARSENESS + SPARSENESS-1, k = 0 .. WIDTH/SPARSENESS-1. With the
// defaults (64 bits, sparseness 2) these are H1, H3, ..., H63, i.e. the
// carries into the even bit positions 2, 4, ..., 64.
//
// Level 1 combines the four single-bit groups below each computed column
// (span 4), level 2 combines four level-1 groups 4 bits apart (span 16),
// level 3 four level-2 groups 16 bits apart (span 64). Since 4**l is a
// multiple of the sparseness (1, 2 or 4), every group a node needs sits in a
// computed column, so the sparse tree is the full tree with the other
// columns removed. Groups reaching below bit 0 are replaced by the neutral
// group. With 64 bits the critical path is three prefix levels, plus the
// sum select after it: four domino stages.
//
// Interface: g, t from the generate/transmit stage; h[k] is the Ling carry
// of bit k*SPARSENESS + SPARSENESS-1. Purely combinational.
module ling_sparse_tree
  import ling_pkg::*;
#(
  parameter int unsigned WIDTH      = ADDER_WIDTH,
  parameter int unsigned SPARSENESS = TREE_SPARSENESS
) (
  input  logic [WIDTH-1:0]            g,
  input  logic [WIDTH-1:0]            t,
  output logic [WIDTH/SPARSENESS-1:0] h
);

  localparam int unsigned NCOL   = WIDTH / SPARSENESS;  // computed columns
  localparam int unsigned LEVELS = clog4(WIDTH);        // radix-4 levels

  if (!(SPARSENESS == 1 || SPARSENESS == 2 || SPARSENESS == 4)) begin : g_bad_sparseness
    $error("ling_sparse_tree: SPARSENESS must be 1, 2 or 4");
  end
  if (WIDTH % SPARSENESS != 0 || WIDTH < 4) begin : g_bad_width
    $error("ling_sparse_tree: WIDTH must be a multiple of SPARSENESS and at least 4");
  end

  // g_lvl[l].grp[k]: group of level l ending at column k, that is at bit
  // k*SPARSENESS + SPARSENESS-1, spanning 4**l bits (fewer near bit 0).
  for (genvar l = 1; l <= LEVELS; l++) begin : g_lvl
    ling_grp_t grp [NCOL];

    for (genvar k = 0; k < NCOL; k++) begin : g_col
      localparam int POS = k * SPARSENESS + SPARSENESS - 1;
      ling_grp_t [3:0] node_in;

      for (genvar m = 0; m < 4; m++) begin : g_in
        if (l == 1) begin : g_first
          // Level 1: the single-bit groups POS, POS-1, POS-2, POS-3.
          localparam int BIT = POS - m;
          if (BIT < 0) begin : g_none
            assign node_in[3-m] = LING_GRP_EMPTY;
          end else if (BIT == 0) begin : g_lsb
            // no carry input: the transmit from below bit 0 is 0
            assign node_in[3-m] = '{h: g[0], i: 1'b0};
          end else begin : g_bit
            assign node_in[3-m] = '{h: g[BIT], i: t[BIT-1]};
          end
        end else begin : g_upper
          // Levels 2 .. LEVELS: groups of the level below, 4**(l-1) bits apart.
          localparam int SRC = k - m * int'(pow4(l - 1) / SPARSENESS);
          if (SRC < 0) begin : g_none
            assign node_in[3-m] = LING_GRP_EMPTY;
          end else begin : g_grp
            assign node_in[3-m] = g_lvl[l-1].grp[SRC];
          end
        end
      end

      ling_node4 u_node (.grp_in(node_in), .grp_out(grp[k]));
    end
  end

  for (genvar k = 0; k < NCOL; k++) begin : g_out
    assign h[k] = g_lvl[LEVELS].grp[k].h;
  end

endmodule
