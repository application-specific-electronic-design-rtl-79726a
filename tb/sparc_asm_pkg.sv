// sparc_asm_pkg -- instruction encoders for the SPARC testbenches.
//
// Small functions that build SPARC V8 instruction words from their fields,
// so that test programs can be written as readable sequences in the
// testbench. The encodings follow the SPARC V8 instruction formats:
//   format 1 (call):         op=1, disp30
//   format 2 (sethi, Bicc):  op=0, rd / a+cond, op2, imm22 / disp22
//   format 3 (alu, mem):     op=2/3, rd, op3, rs1, i, rs2 or simm13
//
// The encodings are the SPARC V8 instruction formats; the helper names are
// this package's own.
package sparc_asm_pkg;

  // op3 values, op = 2
  localparam logic [5:0] ADD = 6'h00, AND_ = 6'h01, OR_ = 6'h02, XOR_ = 6'h03,
                         SUB = 6'h04, ANDN = 6'h05, ORN = 6'h06, XNOR_ = 6'h07,
                         ADDX = 6'h08, SUBX = 6'h0C, UMUL = 6'h0A, SMUL = 6'h0B,
                         UDIV = 6'h0E, SDIV = 6'h0F, UMULCC = 6'h1A, UDIVCC = 6'h1E,
                         ADDCC = 6'h10, ANDCC = 6'h11, ORCC = 6'h12, SUBCC = 6'h14,
                         ADDXCC = 6'h18, SUBXCC = 6'h1C,
                         TADDCC = 6'h20, TSUBCC = 6'h21, TADDCCTV = 6'h22,
                         MULSCC = 6'h24, SLL = 6'h25, SRL = 6'h26, SRA = 6'h27,
                         RDY = 6'h28, RDPSR = 6'h29, RDWIM = 6'h2A, RDTBR = 6'h2B,
                         WRY = 6'h30, WRPSR = 6'h31, WRWIM = 6'h32, WRTBR = 6'h33,
                         FPOP1 = 6'h34, CPOP1 = 6'h36,
                         JMPL = 6'h38, RETT = 6'h39, TICC = 6'h3A, FLUSH = 6'h3B,
                         SAVE = 6'h3C, RESTORE = 6'h3D;
  // op3 values, op = 3
  localparam logic [5:0] LD = 6'h00, LDUB = 6'h01, LDUH = 6'h02, LDD = 6'h03,
                         ST = 6'h04, STB = 6'h05, STH = 6'h06, STD = 6'h07,
                         LDSB = 6'h09, LDSH = 6'h0A, LDA = 6'h10, STA = 6'h14,
                         SWAP = 6'h0F;
  // conditions
  localparam logic [3:0] CN = 4'h0, CE = 4'h1, CLE = 4'h2, CL = 4'h3, CLEU = 4'h4,
                         CCS = 4'h5, CNEG = 4'h6, CVS = 4'h7, CA = 4'h8, CNE = 4'h9,
                         CG = 4'hA, CGE = 4'hB, CGU = 4'hC, CCC = 4'hD, CPOS = 4'hE,
                         CVC = 4'hF;

  function automatic logic [31:0] f3r(input logic [1:0] op, input logic [5:0] op3,
                                      input logic [4:0] rd, input logic [4:0] rs1,
                                      input logic [4:0] rs2);
    return {op, rd, op3, rs1, 1'b0, 8'd0, rs2};
  endfunction

  function automatic logic [31:0] f3i(input logic [1:0] op, input logic [5:0] op3,
                                      input logic [4:0] rd, input logic [4:0] rs1,
                                      input int simm);
    logic [12:0] s13;
    s13 = 13'(simm);
    return {op, rd, op3, rs1, 1'b1, s13};
  endfunction

  function automatic logic [31:0] alu_r(input logic [5:0] op3, input logic [4:0] rd,
                                        input logic [4:0] rs1, input logic [4:0] rs2);
    return f3r(2'd2, op3, rd, rs1, rs2);
  endfunction

  function automatic logic [31:0] alu_i(input logic [5:0] op3, input logic [4:0] rd,
                                        input logic [4:0] rs1, input int simm);
    return f3i(2'd2, op3, rd, rs1, simm);
  endfunction

  function automatic logic [31:0] mem_i(input logic [5:0] op3, input logic [4:0] rd,
                                        input logic [4:0] rs1, input int simm);
    return f3i(2'd3, op3, rd, rs1, simm);
  endfunction

  function automatic logic [31:0] mem_a(input logic [5:0] op3, input logic [4:0] rd,
                                        input logic [4:0] rs1, input logic [4:0] rs2,
                                        input logic [7:0] asi);
    return {2'd3, rd, op3, rs1, 1'b0, asi, rs2};
  endfunction

  function automatic logic [31:0] sethi(input logic [4:0] rd, input logic [21:0] imm22);
    return {2'd0, rd, 3'd4, imm22};
  endfunction

  function automatic logic [31:0] nop();
    return sethi(5'd0, 22'd0);
  endfunction

  // branch: disp in instructions (words), relative to the branch itself
  function automatic logic [31:0] bicc(input logic [3:0] cond, input logic a, input int disp);
    logic [21:0] d22;
    d22 = 22'(disp);
    return {2'd0, a, cond, 3'd2, d22};
  endfunction

  function automatic logic [31:0] call(input int disp);
    logic [29:0] d30;
    d30 = 30'(disp);
    return {2'd1, d30};
  endfunction

  function automatic logic [31:0] ticc_i(input logic [3:0] cond, input int imm7);
    return {2'd2, 1'b0, cond, TICC, 5'd0, 1'b1, 6'd0, 7'(imm7)};
  endfunction

  function automatic logic [31:0] unimp();
    return 32'h0000_0000;
  endfunction

endpackage
