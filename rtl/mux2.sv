// mux2: a bank of WIDTH two-to-one multiplexers sharing one select.
//
// y = sel ? d1 : d0. In the carry select adder d0 is the result computed
// for a carry-in of 0, d1 the one for a carry-in of 1, and sel the carry
// that actually arrives; the "Four 2:1 mux" of a 4-bit group is this bank
// with four sum bits (the group instance carries a fifth bit for the group
// carry). Purely combinational. The source only names the multiplexers; a
// plain conditional assignment is this design's choice.
module mux2 #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] d0,   // selected when sel = 0
  input  logic [WIDTH-1:0] d1,   // selected when sel = 1
  input  logic             sel,
  output logic [WIDTH-1:0] y
);

  always_comb y = sel ? d1 : d0;

endmodule
