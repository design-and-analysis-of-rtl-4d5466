// csla_ksa_bec: one carry select group built from a Kogge-Stone adder and a
// Binary to Excess-1 converter.
//
// Instead of two adders, one for each possible carry-in, the group has a
// single WIDTH-bit Kogge-Stone adder that assumes a carry-in of 0. Its
// result {c0, s0} is passed through a (WIDTH+1)-bit BEC, which adds one and
// so gives the result for a carry-in of 1, {c1, s1}. A multiplexer bank
// picks one of the two with the group carry-in cin.
//
// c0 and c1 are brought out as well: they do not depend on cin and are what
// the fast carry logic of the 16-bit adder uses to compute every group's
// carry-in in parallel (c0 acts as the group generate, c1 as the group
// generate-or-propagate). Purely combinational; cin only passes through the
// last multiplexer, which is the point of the structure. The KSA -> BEC ->
// multiplexer structure is the published one; the c0/c1 outputs are this
// design's choice of what the fast carry logic reads.
module csla_ksa_bec
  import csla_pkg::*;
#(
  parameter int unsigned WIDTH = GROUP_WIDTH
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] s,     // a + b + cin, low WIDTH bits
  output logic             cout,  // carry out of a + b + cin
  output logic             c0,    // carry out of a + b
  output logic             c1     // carry out of a + b + 1
);

  logic [WIDTH-1:0] s0, s1;

  kogge_stone_adder #(.WIDTH(WIDTH)) u_ksa (
    .a   (a),
    .b   (b),
    .s   (s0),
    .cout(c0)
  );

  bec #(.WIDTH(WIDTH+1)) u_bec (
    .b({c0, s0}),
    .x({c1, s1})
  );

  mux2 #(.WIDTH(WIDTH+1)) u_mux (
    .d0 ({c0, s0}),
    .d1 ({c1, s1}),
    .sel(cin),
    .y  ({cout, s})
  );

endmodule
