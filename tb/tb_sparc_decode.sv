// tb_sparc_decode -- self-checking testbench of the instruction decoder.
//
// Builds instruction words field by field and compares the decoded
// instruction class, ALU or shift operation, condition-code setting,
// privilege, special register and load/store size and signedness with the
// values the SPARC V8 opcode tables give. Also checks the multiply/divide
// class with its divide, signed and cc bits, that instructions this integer
// unit does not implement (swap, unimp) decode as illegal, and that
// floating-point and coprocessor opcodes are recognised as such. Combinational; sampled 1 ns after the input changes.
//
// The programs, stimulus and reference values are this testbench's own;
// the behaviour they check is the one described in the module's header.
module tb_sparc_decode;
  import sparc_pkg::*;
  import sparc_asm_pkg::*;
  logic [31:0] inst;
  decoded_t    d;
  sparc_decode dut (.inst(inst), .d(d));

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_cls(string what, logic [31:0] w, iclass_e cls);
    inst = w; #1;
    checks++;
    if (d.cls !== cls) begin
      failures++; $display("FAIL %s: class %s expected %s", what, d.cls.name(), cls.name());
    end
  endtask

  task automatic expect_md(string what, logic [5:0] op3, logic dv, logic sg, logic cc);
    inst = alu_r(op3, 5'd1, 5'd2, 5'd3); #1;
    checks++;
    if (d.cls !== IC_MULDIV || d.md_div !== dv || d.md_signed !== sg || d.setcc !== cc) begin
      failures++;
      $display("FAIL %s: class %s div %b signed %b setcc %b", what, d.cls.name(), d.md_div,
               d.md_signed, d.setcc);
    end
  endtask

  task automatic expect_alu(string what, logic [5:0] op3, alu_op_e aop, logic cc);
    inst = alu_r(op3, 5'd1, 5'd2, 5'd3); #1;
    checks++;
    if (d.cls !== IC_ALU || d.alu_op !== aop || d.setcc !== cc || d.priv !== 1'b0) begin
      failures++; $display("FAIL %s: %s %s cc=%b", what, d.cls.name(), d.alu_op.name(), d.setcc);
    end
  endtask

  task automatic expect_mem(string what, logic [31:0] w, iclass_e cls, msize_e sz, logic sgn,
                            logic alt);
    inst = w; #1;
    checks++;
    if (d.cls !== cls || d.size !== sz || d.ld_signed !== sgn || d.alt !== alt || d.priv !== alt) begin
      failures++;
      $display("FAIL %s: %s %s signed=%b alt=%b", what, d.cls.name(), d.size.name(), d.ld_signed, d.alt);
    end
  endtask

  task automatic expect_sreg(string what, logic [31:0] w, iclass_e cls, sreg_e sr, logic priv);
    inst = w; #1;
    checks++;
    if (d.cls !== cls || d.sreg !== sr || d.priv !== priv) begin
      failures++; $display("FAIL %s: %s %s priv=%b", what, d.cls.name(), d.sreg.name(), d.priv);
    end
  endtask

  initial begin
    expect_cls("call", call(5), IC_CALL);
    expect_cls("sethi", sethi(5'd1, 22'h12345), IC_SETHI);
    expect_cls("nop is sethi", nop(), IC_SETHI);
    expect_cls("bicc", bicc(CNE, 1'b1, -3), IC_BICC);
    expect_cls("unimp", unimp(), IC_ILLEGAL);
    expect_cls("fbfcc", {2'b00, 5'd0, 3'd6, 22'd4}, IC_FP);
    expect_cls("cbccc", {2'b00, 5'd0, 3'd7, 22'd4}, IC_CP);
    expect_alu("add", ADD, ALU_ADD, 0);
    expect_alu("and", AND_, ALU_AND, 0);
    expect_alu("or", OR_, ALU_OR, 0);
    expect_alu("xor", XOR_, ALU_XOR, 0);
    expect_alu("sub", SUB, ALU_SUB, 0);
    expect_alu("andn", ANDN, ALU_ANDN, 0);
    expect_alu("orn", ORN, ALU_ORN, 0);
    expect_alu("xnor", XNOR_, ALU_XNOR, 0);
    expect_alu("addx", ADDX, ALU_ADDC, 0);
    expect_alu("subx", SUBX, ALU_SUBC, 0);
    expect_alu("addcc", ADDCC, ALU_ADD, 1);
    expect_alu("andcc", ANDCC, ALU_AND, 1);
    expect_alu("orcc", ORCC, ALU_OR, 1);
    expect_alu("subcc", SUBCC, ALU_SUB, 1);
    expect_alu("addxcc", ADDXCC, ALU_ADDC, 1);
    expect_alu("subxcc", SUBXCC, ALU_SUBC, 1);
    expect_md("umul", UMUL, 1'b0, 1'b0, 1'b0);
    expect_md("smul", SMUL, 1'b0, 1'b1, 1'b0);
    expect_md("udiv", UDIV, 1'b1, 1'b0, 1'b0);
    expect_md("sdiv", SDIV, 1'b1, 1'b1, 1'b0);
    expect_md("umulcc", UMULCC, 1'b0, 1'b0, 1'b1);
    expect_md("smulcc", 6'h1B, 1'b0, 1'b1, 1'b1);
    expect_md("udivcc", UDIVCC, 1'b1, 1'b0, 1'b1);
    expect_md("sdivcc", 6'h1F, 1'b1, 1'b1, 1'b1);
    inst = alu_r(TADDCCTV, 5'd1, 5'd2, 5'd3); #1;
    checks++;
    if (d.cls !== IC_TAGGED || d.alu_op !== ALU_ADD || !d.tag_trap || !d.setcc) begin
      failures++; $display("FAIL taddcctv");
    end
    inst = alu_r(TSUBCC, 5'd1, 5'd2, 5'd3); #1;
    checks++;
    if (d.cls !== IC_TAGGED || d.alu_op !== ALU_SUB || d.tag_trap || !d.setcc) begin
      failures++; $display("FAIL tsubcc");
    end
    inst = alu_r(MULSCC, 5'd1, 5'd2, 5'd3); #1;
    checks++;
    if (d.cls !== IC_MULSCC || d.alu_op !== ALU_MULS || !d.setcc) begin
      failures++; $display("FAIL mulscc");
    end
    inst = alu_i(SLL, 5'd1, 5'd2, 3); #1;
    checks++; if (d.cls !== IC_SHIFT || d.shf_op !== SHF_SLL) begin failures++; $display("FAIL sll"); end
    inst = alu_i(SRL, 5'd1, 5'd2, 3); #1;
    checks++; if (d.cls !== IC_SHIFT || d.shf_op !== SHF_SRL) begin failures++; $display("FAIL srl"); end
    inst = alu_i(SRA, 5'd1, 5'd2, 3); #1;
    checks++; if (d.cls !== IC_SHIFT || d.shf_op !== SHF_SRA) begin failures++; $display("FAIL sra"); end
    expect_sreg("rdy", alu_r(RDY, 5'd1, 5'd0, 5'd0), IC_RDSPEC, SR_Y, 0);
    expect_sreg("rdasr17", alu_r(RDY, 5'd1, 5'd17, 5'd0), IC_RDSPEC, SR_ASR, 0);
    expect_sreg("rdpsr", alu_r(RDPSR, 5'd1, 5'd0, 5'd0), IC_RDSPEC, SR_PSR, 1);
    expect_sreg("rdwim", alu_r(RDWIM, 5'd1, 5'd0, 5'd0), IC_RDSPEC, SR_WIM, 1);
    expect_sreg("rdtbr", alu_r(RDTBR, 5'd1, 5'd0, 5'd0), IC_RDSPEC, SR_TBR, 1);
    expect_sreg("wry", alu_r(WRY, 5'd0, 5'd1, 5'd0), IC_WRSPEC, SR_Y, 0);
    expect_sreg("wrasr17", alu_r(WRY, 5'd17, 5'd1, 5'd0), IC_WRSPEC, SR_ASR, 0);
    expect_sreg("wrpsr", alu_r(WRPSR, 5'd0, 5'd1, 5'd0), IC_WRSPEC, SR_PSR, 1);
    expect_sreg("wrwim", alu_r(WRWIM, 5'd0, 5'd1, 5'd0), IC_WRSPEC, SR_WIM, 1);
    expect_sreg("wrtbr", alu_r(WRTBR, 5'd0, 5'd1, 5'd0), IC_WRSPEC, SR_TBR, 1);
    expect_cls("fpop1", alu_r(FPOP1, 5'd0, 5'd0, 5'd0), IC_FP);
    expect_cls("cpop1", alu_r(CPOP1, 5'd0, 5'd0, 5'd0), IC_CP);
    expect_cls("jmpl", alu_i(JMPL, 5'd15, 5'd1, 8), IC_JMPL);
    expect_sreg("rett privileged", alu_i(RETT, 5'd0, 5'd18, 4), IC_RETT, SR_Y, 1);
    expect_cls("ticc", ticc_i(CA, 3), IC_TICC);
    expect_cls("flush", alu_i(FLUSH, 5'd0, 5'd1, 0), IC_FLUSH);
    expect_cls("save", alu_i(SAVE, 5'd14, 5'd14, -96), IC_SAVE);
    expect_cls("restore", alu_r(RESTORE, 5'd0, 5'd0, 5'd0), IC_RESTORE);
    expect_cls("op2 unassigned", {2'b00, 5'd0, 3'd1, 22'd0}, IC_ILLEGAL);
    expect_cls("op3 unassigned", alu_r(6'h2C, 5'd0, 5'd0, 5'd0), IC_ILLEGAL);
    expect_mem("ld", mem_i(LD, 5'd1, 5'd2, 0), IC_LOAD, SZ_WORD, 0, 0);
    expect_mem("ldub", mem_i(LDUB, 5'd1, 5'd2, 0), IC_LOAD, SZ_BYTE, 0, 0);
    expect_mem("lduh", mem_i(LDUH, 5'd1, 5'd2, 0), IC_LOAD, SZ_HALF, 0, 0);
    expect_mem("ldd", mem_i(LDD, 5'd2, 5'd2, 0), IC_LOAD, SZ_DOUBLE, 0, 0);
    expect_mem("ldsb", mem_i(LDSB, 5'd1, 5'd2, 0), IC_LOAD, SZ_BYTE, 1, 0);
    expect_mem("ldsh", mem_i(LDSH, 5'd1, 5'd2, 0), IC_LOAD, SZ_HALF, 1, 0);
    expect_mem("st", mem_i(ST, 5'd1, 5'd2, 0), IC_STORE, SZ_WORD, 0, 0);
    expect_mem("stb", mem_i(STB, 5'd1, 5'd2, 0), IC_STORE, SZ_BYTE, 0, 0);
    expect_mem("sth", mem_i(STH, 5'd1, 5'd2, 0), IC_STORE, SZ_HALF, 0, 0);
    expect_mem("std", mem_i(STD, 5'd2, 5'd2, 0), IC_STORE, SZ_DOUBLE, 0, 0);
    expect_mem("lda", mem_a(LDA, 5'd1, 5'd2, 5'd3, 8'd10), IC_LOAD, SZ_WORD, 0, 1);
    expect_mem("sta", mem_a(STA, 5'd1, 5'd2, 5'd3, 8'd10), IC_STORE, SZ_WORD, 0, 1);
    expect_cls("swap not built", mem_i(SWAP, 5'd1, 5'd2, 0), IC_ILLEGAL);
    expect_cls("ldf", mem_i(6'h20, 5'd1, 5'd2, 0), IC_FP);
    expect_cls("ldc", mem_i(6'h30, 5'd1, 5'd2, 0), IC_CP);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
