// bec: Binary to Excess-1 converter, x = b + 1 (modulo 2**WIDTH).
//
// Bit 0 is inverted; every higher bit i is XORed with the AND of all bits
// below it, built as a chain of two-input AND gates (b1&b0, then b2&b1&b0,
// and so on), so there is no adder inside. In the carry select group it
// turns the carry-in-0 result {carry, sum} into the carry-in-1 result; the
// default width of 5 is the four sum bits of a group plus its carry, which
// is the five-bit converter (b4..b0 to x4..x0) the design uses.
//
// The AND-chain/XOR structure and the five-bit size follow the published
// converter; using all five bits in a 4-bit group is this design's choice.
//
// Purely combinational.
module bec #(
  parameter int unsigned WIDTH = 5
) (
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] x   // b + 1
);

  logic [WIDTH-1:0] all_ones_below;  // AND of b[i-1:0]

  assign all_ones_below[0] = 1'b1;
  for (genvar i = 1; i < WIDTH; i++) begin : g_and_chain
    assign all_ones_below[i] = all_ones_below[i-1] & b[i-1];
  end

  assign x = b ^ all_ones_below;

endmodule
