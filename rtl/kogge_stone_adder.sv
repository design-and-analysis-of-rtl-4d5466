// kogge_stone_adder: WIDTH-bit Kogge-Stone adder with a carry-in of 0.
//
// Three stages, as the design describes them:
//   pre-processing    P_i = A_i xor B_i,  G_i = A_i and B_i
//   carry generation  a Kogge-Stone prefix tree of black and grey cells
//                     (kogge_stone_tree) gives C_i, the carry out of bit i
//   post-processing   S_0 = P_0,  S_i = P_i xor C_(i-1)
// The carry out is the group generate over all bits, C_(WIDTH-1).
// With no carry-in the least significant sum bit is P_0 alone; the sum for a
// carry-in of 1 is formed outside, by the Binary to Excess-1 converter.
//
// Purely combinational; the delay grows with log2(WIDTH). The default width
// of 4 is the group size of the 16-bit adder. The three stages, the cell
// equations and the 4-bit size are the published structure; the width
// parameter is this design's generalisation.
module kogge_stone_adder
  import csla_pkg::*;
#(
  parameter int unsigned WIDTH = GROUP_WIDTH
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] s,     // a + b, low WIDTH bits
  output logic             cout   // carry out of the top bit
);

  gp_t [WIDTH-1:0] gp;   // pre-processing result
  gp_t [WIDTH-1:0] pre;  // prefix (carry) result
  logic [WIDTH-1:0] p;
  logic [WIDTH-1:0] c;

  // Pre-processing
  always_comb begin
    for (int i = 0; i < WIDTH; i++) begin
      gp[i].p = a[i] ^ b[i];
      gp[i].g = a[i] & b[i];
      p[i]    = gp[i].p;
    end
  end

  // Carry generation
  kogge_stone_tree #(.WIDTH(WIDTH)) u_tree (
    .gp_in (gp),
    .gp_out(pre)
  );

  // Post-processing
  always_comb begin
    for (int i = 0; i < WIDTH; i++) c[i] = pre[i].g;
    s = p ^ {c[WIDTH-2:0], 1'b0};
  end

  assign cout = c[WIDTH-1];

endmodule
