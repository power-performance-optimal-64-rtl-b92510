// 64-bit sparse radix-4 Ling carry-lookahead adder (top).
//
// The adder computes sum = a + b, with carry out, through four stages:
//   ling_pg             bit generate g = a&b, transmit t = a|b, half sum a^b
//   ling_sparse_tree    radix-4 Ling prefix tree at every second bit, giving
//                       the Ling carries H1, H3, ..., H63
//   ling_sum_precompute both candidate sums of every bit, for a selecting
//                       carry of 0 and of 1
//   ling_sum_select     per-bit 2:1 multiplexer steered by the carries
// Ling's carries, the radix-4 tree, the sparseness of 2 and the
// precompute/select split are the design's; the tree is drawn only as a
// block diagram, so its exact wiring (a Kogge-Stone tree with the odd
// columns kept) is this implementation's reading.
//
// Timing: in the circuit the whole path is domino logic inside one cycle and
// the last gate, the sum select, is clocked with a hard edge. Here the
// datapath is combinational and the sum select output is captured in a
// register at the rising clock edge: a, b presented with in_valid before a
// rising edge appear on sum/cout with out_valid after that edge (latency one
// cycle, one addition per cycle). Without in_valid the register holds its
// value. The register, the valid flag and the active-low asynchronous reset
// are this implementation's choices; two assertions at the end state the
// latency and hold rules.
module ling_adder64 #(
  parameter int unsigned WIDTH      = ling_pkg::ADDER_WIDTH,
  parameter int unsigned SPARSENESS = ling_pkg::TREE_SPARSENESS
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic             out_valid,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  logic [WIDTH-1:0]            g, t, d;
  logic [WIDTH-1:0]            s0, s1;
  logic [WIDTH/SPARSENESS-1:0] h;
  logic [WIDTH-1:0]            sum_d;
  logic                        cout_d;

  ling_pg #(.WIDTH(WIDTH)) u_pg (
    .a(a), .b(b), .g(g), .t(t), .d(d)
  );

  ling_sparse_tree #(.WIDTH(WIDTH), .SPARSENESS(SPARSENESS)) u_tree (
    .g(g), .t(t), .h(h)
  );

  ling_sum_precompute #(.WIDTH(WIDTH), .SPARSENESS(SPARSENESS)) u_pre (
    .g(g), .t(t), .d(d), .s0(s0), .s1(s1)
  );

  ling_sum_select #(.WIDTH(WIDTH), .SPARSENESS(SPARSENESS)) u_sel (
    .s0(s0), .s1(s1), .h(h), .t_msb(t[WIDTH-1]), .sum(sum_d), .cout(cout_d)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      sum       <= '0;
      cout      <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        sum  <= sum_d;
        cout <= cout_d;
      end
    end
  end

  // Interface rules: the valid flag follows in_valid one cycle later, and a
  // cycle without in_valid leaves the result unchanged.
  a_valid_latency: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid |=> out_valid);
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    !in_valid |=> !out_valid && $stable(sum) && $stable(cout));

endmodule
