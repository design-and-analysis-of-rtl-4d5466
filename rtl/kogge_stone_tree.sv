// kogge_stone_tree: parallel-prefix carry tree of the Kogge-Stone kind.
//
// Input is one generate/propagate pair per position; output, for every
// position i, the pair that spans positions i down to 0. There are
// ceil(log2(WIDTH)) levels; at level l every position i >= 2**l combines
// itself with position i - 2**l through a black cell, the others pass their
// pair on unchanged. A cell whose P result nobody reads is a grey cell: the
// P term is still written and left to synthesis to remove. For WIDTH = 4
// that is 3 cells on the first level and 2 on the second, 5 in all, which is
// n*log2(n) - n + 1.
//
// Purely combinational. Used by the 4-bit Kogge-Stone adder (on bit pairs)
// and by the fast carry logic (on group carries). The cell equations are the
// published black/grey cells; the generic form is this design's own.
module kogge_stone_tree
  import csla_pkg::*;
#(
  parameter int unsigned WIDTH = 4
) (
  input  gp_t [WIDTH-1:0] gp_in,   // per-position generate/propagate
  output gp_t [WIDTH-1:0] gp_out   // prefix over positions i..0
);

  localparam int unsigned LEVELS = (WIDTH > 1) ? $clog2(WIDTH) : 0;

  gp_t [WIDTH-1:0] lvl [LEVELS+1];

  assign lvl[0] = gp_in;

  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    localparam int unsigned D = 1 << l;
    for (genvar i = 0; i < WIDTH; i++) begin : g_pos
      if (i >= D) begin : g_cell
        assign lvl[l+1][i] = black_cell(lvl[l][i], lvl[l][i-D]);
      end else begin : g_pass
        assign lvl[l+1][i] = lvl[l][i];
      end
    end
  end

  assign gp_out = lvl[LEVELS];

endmodule
