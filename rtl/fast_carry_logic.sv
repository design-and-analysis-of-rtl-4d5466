// fast_carry_logic: group carries of the carry select adder from a
// Kogge-Stone tree, so that no carry has to ripple through the group
// multiplexers.
//
// Every group k reports two carries that do not depend on its carry-in:
// c0[k] (carry out for a carry-in of 0) and c1[k] (for a carry-in of 1).
// Its real carry out is c0[k] | (c1[k] & carry-in), which is the
// generate/propagate rule with g = c0[k] and p = c1[k] (c1 is the group's
// generate-or-propagate, and the prefix operator gives the same carries with
// it as with a pure propagate). The tree works on N_GROUPS+1 positions:
// position 0 holds the adder's carry-in as a generate with no propagate,
// position k+1 holds group k. The generate of prefix k+1 is the carry out of
// group k; for 4-bit groups these are C4, C8, C12 and C16, the last being
// the adder's carry out.
//
// Purely combinational; depth ceil(log2(N_GROUPS+1)) black/grey cells.
// That the group carries come from a Kogge-Stone tree is the published
// idea; the leaf encoding (c0 as generate, c1 as propagate, cin as an extra
// leaf) is this design's own.
module fast_carry_logic
  import csla_pkg::*;
#(
  parameter int unsigned N_GROUPS = ADDER_WIDTH / GROUP_WIDTH
) (
  input  logic                cin,
  input  logic [N_GROUPS-1:0] c0,     // group carries for a carry-in of 0
  input  logic [N_GROUPS-1:0] c1,     // group carries for a carry-in of 1
  output logic [N_GROUPS-1:0] carry   // carry[k] = carry out of group k
);

  gp_t [N_GROUPS:0] gp;
  gp_t [N_GROUPS:0] pre;

  always_comb begin
    gp[0].g = cin;
    gp[0].p = 1'b0;
    for (int k = 0; k < int'(N_GROUPS); k++) begin
      gp[k+1].g = c0[k];
      gp[k+1].p = c1[k];
    end
  end

  kogge_stone_tree #(.WIDTH(N_GROUPS+1)) u_tree (
    .gp_in (gp),
    .gp_out(pre)
  );

  always_comb begin
    for (int k = 0; k < int'(N_GROUPS); k++) carry[k] = pre[k+1].g;
  end

endmodule
