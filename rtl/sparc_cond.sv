// sparc_cond -- integer condition evaluation for Bicc and Ticc.
//
// Combinational. Evaluates the 4-bit cond field of a branch or trap-on-
// condition instruction against the integer condition codes N Z V C with the
// SPARC V8 encoding: 0 never, 1 e (Z), 2 le (Z | N^V), 3 l (N^V),
// 4 leu (C | Z), 5 cs (C), 6 neg (N), 7 vs (V), and 8..15 the negations
// of 0..7 (8 always, 9 ne, ...).
//
// Interface: cond, n, z, v, c in; taken out; no clock. The specification
// spells out only some branch conditions (be, bne); the full table is taken
// from SPARC V8, and computing it as eight base conditions plus an inverting
// bit is this design's own structure.
module sparc_cond (
  input  logic [3:0] cond,
  input  logic       n,
  input  logic       z,
  input  logic       v,
  input  logic       c,
  output logic       taken
);
  logic base;
  always_comb begin
    unique case (cond[2:0])
      3'd0: base = 1'b0;
      3'd1: base = z;
      3'd2: base = z | (n ^ v);
      3'd3: base = n ^ v;
      3'd4: base = c | z;
      3'd5: base = c;
      3'd6: base = n;
      3'd7: base = v;
      default: base = 1'b0;
    endcase
  end
  assign taken = cond[3] ? ~base : base;
endmodule
