// sparc_alu -- 32-bit arithmetic and logic unit of the SPARC integer unit.
//
// One adder and a logic block. The adder serves add, add with carry, subtract
// (a + ~b + 1), subtract with carry (a + ~b + ~c), increment, decrement and
// the multiply step; the logic block serves and/or/xor with the second operand
// optionally inverted (andn, orn, xnor). The unit is purely combinational.
//
// Condition codes follow SPARC V8: N is bit 31 of the result, Z is set for a
// zero result, V and C are the signed overflow and the carry (for subtraction
// the borrow) of the adder, and are 0 for logic operations. The overflow and
// carry formulas of the addcc example in the specification are the ones used
// here. tag_err reports a non-zero tag (low two bits) on either operand, for
// the tagged add/subtract instructions.
//
// Multiply step (ALU_MULS): the first operand is {n ^ v, a[31:1]} and the
// second is b when y0 is 1 and 0 otherwise; the caller shifts the y register.
//
// Interface: op, a, b, cin, n_xor_v, y0 in; result, n, z, v, c, tag_err
// out; no clock, everything settles in the same cycle. The operation list is
// that of the full ALU of the specification's data path; sharing one adder
// among all arithmetic operations is this design's choice.
module sparc_alu
  import sparc_pkg::*;
(
  input  alu_op_e      op,
  input  logic [31:0]  a,
  input  logic [31:0]  b,
  input  logic         cin,       // psr.c, for ALU_ADDC / ALU_SUBC
  input  logic         n_xor_v,   // psr.n ^ psr.v, for ALU_MULS
  input  logic         y0,        // y[0], for ALU_MULS
  output logic [31:0]  result,
  output logic         n,
  output logic         z,
  output logic         v,
  output logic         c,
  output logic         tag_err
);
  logic [31:0] aa, bb;
  logic        ci;
  logic        is_sub;
  logic        is_logic;
  logic [32:0] sum;

  always_comb begin
    aa       = a;
    bb       = b;
    ci       = 1'b0;
    is_sub   = 1'b0;
    is_logic = 1'b0;
    unique case (op)
      ALU_ADD:  ;
      ALU_ADDC: ci = cin;
      ALU_SUB:  begin bb = ~b; ci = 1'b1; is_sub = 1'b1; end
      ALU_SUBC: begin bb = ~b; ci = ~cin; is_sub = 1'b1; end
      ALU_INC:  bb = 32'd1;
      ALU_DEC:  begin bb = ~32'd1; ci = 1'b1; is_sub = 1'b1; end
      ALU_MULS: begin aa = {n_xor_v, a[31:1]}; bb = y0 ? b : 32'd0; end
      default:  is_logic = 1'b1;
    endcase
  end

  assign sum = {1'b0, aa} + {1'b0, bb} + {32'd0, ci};

  always_comb begin
    unique case (op)
      ALU_AND:  result = a & b;
      ALU_OR:   result = a | b;
      ALU_XOR:  result = a ^ b;
      ALU_ANDN: result = a & ~b;
      ALU_ORN:  result = a | ~b;
      ALU_XNOR: result = a ^ ~b;
      default:  result = sum[31:0];
    endcase
  end

  assign n = result[31];
  assign z = (result == 32'd0);
  assign v = is_logic ? 1'b0
           : ((aa[31] & bb[31] & ~result[31]) | (~aa[31] & ~bb[31] & result[31]));
  assign c = is_logic ? 1'b0 : (is_sub ? ~sum[32] : sum[32]);
  assign tag_err = (a[1:0] != 2'b00) || (b[1:0] != 2'b00);
endmodule
