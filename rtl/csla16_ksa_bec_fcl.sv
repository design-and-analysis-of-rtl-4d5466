// csla16_ksa_bec_fcl: 16-bit carry select adder made of Kogge-Stone/BEC
// groups with fast carry logic.
//
// The operands are cut into N_GROUPS = WIDTH/GROUP_WIDTH groups (four groups
// of four bits by default). Each group (csla_ksa_bec) adds its slice once,
// with a Kogge-Stone adder for a carry-in of 0, and derives the carry-in-1
// result from it with a Binary to Excess-1 converter. Each group also hands
// its two candidate carries to the fast carry logic, a Kogge-Stone tree that
// computes all group carries (C4, C8, C12, C16) at once from them and the
// adder's carry-in. Each group's multiplexer bank then selects with the
// carry from the group below (cin for group 0), so the carry never ripples
// through the multiplexers.
//
// Interface: s = a + b + cin (low WIDTH bits), cout = carry out, and
// c_grp[k] = carry out of group k as the fast carry logic computes it
// (c_grp[N_GROUPS-1] is cout), c_sel[k] = the carry out of group k as its
// own multiplexer selects it (C16 at the last group). The two vectors are
// equal; c_sel is the multiplexed carry of each group, brought out so that
// it is observable.
// Timing: purely combinational, no clock and no registers.
// The 16-bit width, the four 4-bit groups and the block diagram follow the
// published adder; the second carry vector c_sel and the parameterisation
// are this design's additions.
module csla16_ksa_bec_fcl #(
  parameter int unsigned WIDTH       = csla_pkg::ADDER_WIDTH,
  parameter int unsigned GROUP_WIDTH = csla_pkg::GROUP_WIDTH
) (
  input  logic [WIDTH-1:0]             a,
  input  logic [WIDTH-1:0]             b,
  input  logic                         cin,
  output logic [WIDTH-1:0]             s,
  output logic                         cout,
  output logic [WIDTH/GROUP_WIDTH-1:0] c_grp,
  output logic [WIDTH/GROUP_WIDTH-1:0] c_sel
);

  localparam int unsigned N_GROUPS = WIDTH / GROUP_WIDTH;

  if (N_GROUPS * GROUP_WIDTH != WIDTH || GROUP_WIDTH < 2) begin : g_bad_size
    $error("WIDTH must be a multiple of GROUP_WIDTH, and GROUP_WIDTH at least 2");
  end

  logic [N_GROUPS-1:0] c0, c1;      // candidate group carries
  logic [N_GROUPS-1:0] carry;       // real group carries, from the fast carry logic
  logic [N_GROUPS-1:0] gcin;        // carry into each group
  logic [N_GROUPS-1:0] gcout;       // multiplexed carry of each group

  assign gcin = {carry[N_GROUPS-2:0], cin};

  for (genvar k = 0; k < N_GROUPS; k++) begin : g_group
    csla_ksa_bec #(.WIDTH(GROUP_WIDTH)) u_group (
      .a   (a[k*GROUP_WIDTH +: GROUP_WIDTH]),
      .b   (b[k*GROUP_WIDTH +: GROUP_WIDTH]),
      .cin (gcin[k]),
      .s   (s[k*GROUP_WIDTH +: GROUP_WIDTH]),
      .cout(gcout[k]),
      .c0  (c0[k]),
      .c1  (c1[k])
    );
  end

  fast_carry_logic #(.N_GROUPS(N_GROUPS)) u_fcl (
    .cin  (cin),
    .c0   (c0),
    .c1   (c1),
    .carry(carry)
  );

  assign c_grp = carry;
  assign c_sel = gcout;
  assign cout  = carry[N_GROUPS-1];

endmodule
