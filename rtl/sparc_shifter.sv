// sparc_shifter -- 32-bit shift unit of the SPARC integer unit.
//
// Combinational barrel shifter for the three shift operations of the
// allocated shift unit: shift left logical, shift right logical and shift
// right arithmetic, by 0 to 31 places (the low five bits of the second
// operand or of the shift-count field).
//
// Interface: op (shf_op_e), a, cnt in; result out; no clock, the result
// settles in the same cycle. The three operations are the shift unit's
// functions in the specification's data path; the barrel-shifter form is
// this design's choice.
module sparc_shifter
  import sparc_pkg::*;
(
  input  shf_op_e     op,
  input  logic [31:0] a,
  input  logic [4:0]  cnt,
  output logic [31:0] result
);
  always_comb begin
    unique case (op)
      SHF_SLL: result = a << cnt;
      SHF_SRL: result = a >> cnt;
      SHF_SRA: result = $signed(a) >>> cnt;
      default: result = a;
    endcase
  end
endmodule
