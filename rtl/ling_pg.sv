// Bit-level generate / transmit stage of the Ling adder.
//
// For every bit it forms the Ling generate g = a & b, the transmit
// t = a | b (the OR form of propagate, which Ling's equations allow) and the
// half sum d = a ^ b used by the sum-precompute stage. These are the
// definitions of the first line of the adder's Ling equations. Purely
// combinational; in the domino implementation this is the first, footed,
// dynamic stage connected to the primary inputs.
module ling_pg #(
  parameter int unsigned WIDTH = ling_pkg::ADDER_WIDTH
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] g,  // generate
  output logic [WIDTH-1:0] t,  // transmit
  output logic [WIDTH-1:0] d   // half sum
);

  always_comb begin
    g = a & b;
    t = a | b;
    d = a ^ b;
  end

endmodule
