// sparc_cmp -- comparator of the SPARC integer unit.
//
// Combinational unsigned comparison of two WIDTH-bit values: a > b, a == b,
// and a zero test of a. The integer unit uses it for the interrupt test
// (requested level against the processor interrupt level, and the level-15
// test) and for the zero test of the window mask.
//
// Interface: a, b in; gt, eq, a_zero out; no clock, results settle in the
// same cycle. The unit and its gt / zero functions are those allocated for
// the specification's data path; treating gt as unsigned and the WIDTH
// parameter are this design's choices.
module sparc_cmp #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic             gt,
  output logic             eq,
  output logic             a_zero
);
  assign gt     = (a > b);
  assign eq     = (a == b);
  assign a_zero = (a == '0);
endmodule
