// Sum-select stage of the sparse Ling adder.
//
// One 2:1 multiplexer per bit: sum(i) = H(j) ? S1(i) : S0(i), where H(j) is
// the nearest Ling carry computed below bit i (column i/SPARSENESS - 1 of
// the carry tree). Each carry therefore steers SPARSENESS multiplexers, the
// extra load that a sparse tree trades for its smaller first level. Bits
// below the first computed carry take S0. The carry out of the adder,
// c(WIDTH) = t(WIDTH-1) H(WIDTH-1), is formed here too, from the topmost
// tree output.
// In the domino adder this is the gate that carries the hard clock edge; the
// capture itself is modelled by the register in the adder top.
// Purely combinational.
module ling_sum_select #(
  parameter int unsigned WIDTH      = ling_pkg::ADDER_WIDTH,
  parameter int unsigned SPARSENESS = ling_pkg::TREE_SPARSENESS
) (
  input  logic [WIDTH-1:0]            s0,
  input  logic [WIDTH-1:0]            s1,
  input  logic [WIDTH/SPARSENESS-1:0] h,      // Ling carries of the tree
  input  logic                        t_msb,  // transmit of the top bit
  output logic [WIDTH-1:0]            sum,
  output logic                        cout
);

  localparam int unsigned NCOL = WIDTH / SPARSENESS;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    if (i < SPARSENESS) begin : g_nosel
      assign sum[i] = s0[i];
    end else begin : g_sel
      assign sum[i] = h[i / SPARSENESS - 1] ? s1[i] : s0[i];
    end
  end

  assign cout = t_msb & h[NCOL-1];

endmodule
