// csla_pkg: shared sizes and types of the Kogge-Stone based carry select adder.
//
// The adder is 16 bits wide and is cut into 4-bit groups; both numbers are
// the ones the design is built around. A generate/propagate pair travels
// through the Kogge-Stone trees as one packed struct, gp_t. The combining
// operator of those trees (the "black cell") is given here as a function so
// that the adder tree and the fast carry logic use the same definition:
//   G = G_hi | (P_hi & G_lo),   P = P_hi & P_lo
// The "grey cell" is the same operator with the P output unused.
package csla_pkg;

  localparam int unsigned ADDER_WIDTH = 16;  // operand width of the full adder
  localparam int unsigned GROUP_WIDTH = 4;   // bits per carry select group

  typedef struct packed {
    logic g;  // (group) generate
    logic p;  // (group) propagate
  } gp_t;

  // Black cell: combine a more significant span (hi) with the span just below it (lo).
  function automatic gp_t black_cell(gp_t hi, gp_t lo);
    gp_t r;
    r.g = hi.g | (hi.p & lo.g);
    r.p = hi.p & lo.p;
    return r;
  endfunction

endpackage
