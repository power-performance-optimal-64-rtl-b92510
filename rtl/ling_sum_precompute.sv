// Sum-precompute stage of the sparse Ling adder.
//
// Bit i is selected by the nearest Ling carry H(j) the sparse tree computes
// below it (j = i-1 or i-2 for sparseness 2). The carry into bit i is
//   c(i) = G(i-1:j+1) + T(i-1:j) H(j)
// where G is the conventional group generate and T the AND of the
// transmits over the bits named. So the two candidate sums are
//   S0(i) = d(i) ^ G(i-1:j+1)                 (H(j) = 0)
//   S1(i) = d(i) ^ (G(i-1:j+1) + T(i-1:j))     (H(j) = 1)
// For j = i-1 this is S0 = a^b, S1 = a^b^(a(i-1)+b(i-1)); for j = i-2 it is
// S0 = a^b^a(i-1)b(i-1), S1 = a^b^[a(i-1)b(i-1) + (a(i-1)+b(i-1))(a(i-2)+b(i-2))],
// the two equation sets of the design. Bits below the first computed carry
// have no carry to select on; their S0 and S1 are equal. The general form
// for sparseness 1, 2 and 4 is this design's own extension.
// Purely combinational and off the critical path.
module ling_sum_precompute #(
  parameter int unsigned WIDTH      = ling_pkg::ADDER_WIDTH,
  parameter int unsigned SPARSENESS = ling_pkg::TREE_SPARSENESS
) (
  input  logic [WIDTH-1:0] g,   // generate a&b
  input  logic [WIDTH-1:0] t,   // transmit a|b
  input  logic [WIDTH-1:0] d,   // half sum a^b
  output logic [WIDTH-1:0] s0,  // sum if the selecting Ling carry is 0
  output logic [WIDTH-1:0] s1   // sum if the selecting Ling carry is 1
);

  always_comb begin
    for (int i = 0; i < WIDTH; i++) begin
      // lowest bit of the run between the selecting carry and bit i
      int   lo;
      logic gg;   // G(i-1:lo)
      logic tt;   // T(i-1:lo-1), with t(-1) = 0
      lo = (i / SPARSENESS) * SPARSENESS;
      gg = 1'b0;
      tt = (lo == 0) ? 1'b0 : t[(lo == 0) ? 0 : lo - 1];
      for (int j = lo; j < i; j++) begin
        gg = g[j] | (t[j] & gg);
        tt = tt & t[j];
      end
      s0[i] = d[i] ^ gg;
      s1[i] = d[i] ^ (gg | tt);
    end
  end

endmodule
