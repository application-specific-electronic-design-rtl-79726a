// sparc_decode -- instruction decoder of the SPARC integer unit.
//
// Combinational. Splits the 32-bit instruction word by its op field (31:30),
// then op2 (24:22) for format 2 or op3 (24:19) for format 3, and returns a
// decoded_t: the instruction class, the ALU or shift operation, whether icc is
// written, the special register of rd/wr, the access size and signedness of
// a load or store, and whether the instruction is privileged. Opcodes that
// are unassigned in SPARC V8 decode to IC_ILLEGAL (the illegal_instruction
// test of the specification). Floating-point and coprocessor opcodes decode
// to IC_FP / IC_CP, which the integer unit turns into fp_disabled and
// cp_disabled traps, since neither unit is part of this design. The integer
// multiply and divide instructions (umul, smul, udiv, sdiv and their cc
// forms) decode to IC_MULDIV with md_div and md_signed taken from op3[2] and
// op3[0]. ldstub and swap are decoded as IC_ILLEGAL: the atomic
// (multiprocessing) instructions were left out of the specification.
module sparc_decode
  import sparc_pkg::*;
(
  input  logic [31:0] inst,
  output decoded_t    d
);
  logic [1:0] op;
  logic [2:0] op2;
  logic [5:0] op3;

  assign op  = inst[31:30];
  assign op2 = inst[24:22];
  assign op3 = inst[24:19];

  always_comb begin
    d           = '0;
    d.cls       = IC_ILLEGAL;
    d.alu_op    = ALU_ADD;
    d.shf_op    = SHF_SLL;
    d.sreg      = SR_Y;
    d.size      = SZ_WORD;
    unique case (op)
      2'd0: begin
        unique case (op2)
          3'd2:    d.cls = IC_BICC;
          3'd4:    d.cls = IC_SETHI;
          3'd6:    d.cls = IC_FP;
          3'd7:    d.cls = IC_CP;
          default: d.cls = IC_ILLEGAL;   // unimp and unassigned
        endcase
      end
      2'd1: d.cls = IC_CALL;
      2'd2: begin
        d.setcc = op3[4] && (op3[5] == 1'b0);
        if (op3[5] == 1'b0) begin
          d.cls = IC_ALU;
          unique case (op3[3:0])
            4'h0: d.alu_op = ALU_ADD;
            4'h1: d.alu_op = ALU_AND;
            4'h2: d.alu_op = ALU_OR;
            4'h3: d.alu_op = ALU_XOR;
            4'h4: d.alu_op = ALU_SUB;
            4'h5: d.alu_op = ALU_ANDN;
            4'h6: d.alu_op = ALU_ORN;
            4'h7: d.alu_op = ALU_XNOR;
            4'h8: d.alu_op = ALU_ADDC;
            4'hC: d.alu_op = ALU_SUBC;
            4'hA: begin d.cls = IC_MULDIV; end                                  // umul
            4'hB: begin d.cls = IC_MULDIV; d.md_signed = 1'b1; end              // smul
            4'hE: begin d.cls = IC_MULDIV; d.md_div = 1'b1; end                 // udiv
            4'hF: begin d.cls = IC_MULDIV; d.md_div = 1'b1; d.md_signed = 1'b1; end  // sdiv
            default: begin d.cls = IC_ILLEGAL; d.setcc = 1'b0; end
          endcase
        end else begin
          unique case (op3)
            6'h20: begin d.cls = IC_TAGGED; d.alu_op = ALU_ADD; d.setcc = 1'b1; end
            6'h21: begin d.cls = IC_TAGGED; d.alu_op = ALU_SUB; d.setcc = 1'b1; end
            6'h22: begin d.cls = IC_TAGGED; d.alu_op = ALU_ADD; d.setcc = 1'b1; d.tag_trap = 1'b1; end
            6'h23: begin d.cls = IC_TAGGED; d.alu_op = ALU_SUB; d.setcc = 1'b1; d.tag_trap = 1'b1; end
            6'h24: begin d.cls = IC_MULSCC; d.alu_op = ALU_MULS; d.setcc = 1'b1; end
            6'h25: begin d.cls = IC_SHIFT; d.shf_op = SHF_SLL; end
            6'h26: begin d.cls = IC_SHIFT; d.shf_op = SHF_SRL; end
            6'h27: begin d.cls = IC_SHIFT; d.shf_op = SHF_SRA; end
            6'h28: begin d.cls = IC_RDSPEC; d.sreg = (inst[18:14] == 5'd0) ? SR_Y : SR_ASR; end
            6'h29: begin d.cls = IC_RDSPEC; d.sreg = SR_PSR; d.priv = 1'b1; end
            6'h2A: begin d.cls = IC_RDSPEC; d.sreg = SR_WIM; d.priv = 1'b1; end
            6'h2B: begin d.cls = IC_RDSPEC; d.sreg = SR_TBR; d.priv = 1'b1; end
            6'h30: begin d.cls = IC_WRSPEC; d.sreg = (inst[29:25] == 5'd0) ? SR_Y : SR_ASR; end
            6'h31: begin d.cls = IC_WRSPEC; d.sreg = SR_PSR; d.priv = 1'b1; end
            6'h32: begin d.cls = IC_WRSPEC; d.sreg = SR_WIM; d.priv = 1'b1; end
            6'h33: begin d.cls = IC_WRSPEC; d.sreg = SR_TBR; d.priv = 1'b1; end
            6'h34, 6'h35: d.cls = IC_FP;
            6'h36, 6'h37: d.cls = IC_CP;
            6'h38: d.cls = IC_JMPL;
            6'h39: begin d.cls = IC_RETT; d.priv = 1'b1; end
            6'h3A: d.cls = IC_TICC;
            6'h3B: d.cls = IC_FLUSH;
            6'h3C: d.cls = IC_SAVE;
            6'h3D: d.cls = IC_RESTORE;
            default: d.cls = IC_ILLEGAL;
          endcase
        end
      end
      default: begin  // op = 3: memory instructions
        d.alt  = op3[4];
        d.priv = op3[4];
        if (op3[5]) begin
          d.cls  = op3[4] ? IC_CP : IC_FP;     // FP / CP loads and stores
          d.alt  = 1'b0;
          d.priv = 1'b0;
        end else begin
          unique case (op3[3:0])
            4'h0: begin d.cls = IC_LOAD;  d.size = SZ_WORD;   end
            4'h1: begin d.cls = IC_LOAD;  d.size = SZ_BYTE;   end
            4'h2: begin d.cls = IC_LOAD;  d.size = SZ_HALF;   end
            4'h3: begin d.cls = IC_LOAD;  d.size = SZ_DOUBLE; end
            4'h4: begin d.cls = IC_STORE; d.size = SZ_WORD;   end
            4'h5: begin d.cls = IC_STORE; d.size = SZ_BYTE;   end
            4'h6: begin d.cls = IC_STORE; d.size = SZ_HALF;   end
            4'h7: begin d.cls = IC_STORE; d.size = SZ_DOUBLE; end
            4'h9: begin d.cls = IC_LOAD;  d.size = SZ_BYTE; d.ld_signed = 1'b1; end
            4'hA: begin d.cls = IC_LOAD;  d.size = SZ_HALF; d.ld_signed = 1'b1; end
            default: begin d.cls = IC_ILLEGAL; d.alt = 1'b0; d.priv = 1'b0; end
          endcase
        end
      end
    endcase
  end
endmodule
