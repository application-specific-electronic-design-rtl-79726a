// sparc_pkg -- shared types and constants of the non-pipelined SPARC V8
// integer unit.
//
// Holds the register layouts (psr, tbr, the implementation status register p
// and the trap/interrupt register q), the instruction field slices, the
// operation codes of the functional units, the trap type numbers and the
// sign-extension helpers that the other modules share.
//
// The field positions of psr, tbr, q and of the instruction word follow the
// SPARC V8 architecture as laid out in the specification this design is built
// from. The status flags of p keep that specification's order (annul is the
// most significant flag) but are packed into a 25-bit struct, because the
// listed bit positions 32..8 do not fit a 32-bit register. Trap type numbers
// are the SPARC V8 architectural values; the specification only names them
// tmask1, tmask2, ... in priority order.
package sparc_pkg;

  // Number of register windows (the configuration of the specification).
  localparam int unsigned NWINDOWS_DEFAULT = 4;

  typedef logic [31:0] word_t;

  // Processor state register.
  typedef struct packed {
    logic [3:0] impl;      // 31:28 implementation id
    logic [3:0] ver;       // 27:24 implementation version
    logic       n;         // 23 negative
    logic       z;         // 22 zero
    logic       v;         // 21 overflow
    logic       c;         // 20 carry
    logic [5:0] reserved;  // 19:14 unused
    logic       ec;        // 13 enable coprocessor
    logic       ef;        // 12 enable floating point
    logic [3:0] pil;       // 11:8 processor interrupt level
    logic       s;         // 7 supervisor mode
    logic       ps;        // 6 previous s
    logic       et;        // 5 enable traps
    logic [4:0] cwp;       // 4:0 current window pointer
  } psr_t;

  // Trap base register.
  typedef struct packed {
    logic [19:0] tba;      // 31:12 trap base address
    logic [7:0]  tt;       // 11:4 trap type
    logic [3:0]  zero;     // 3:0 always zero
  } tbr_t;

  // Implementation status flags ("p"), most significant first.
  typedef struct packed {
    logic annul;
    logic cp_disabled;
    logic cp_exception;
    logic data_access_error;
    logic data_access_exception;
    logic data_store_error;
    logic division_by_zero;
    logic error_mode;
    logic execute_mode;
    logic fp_disabled;
    logic fp_exception;
    logic illegal_instruction;
    logic instruction_access_error;
    logic instruction_access_exception;
    logic mem_address_not_aligned;
    logic privileged_instruction;
    logic r_register_access_error;
    logic reset_mode;
    logic reset_trap;
    logic tag_overflow;
    logic trap;
    logic trap_instruction;
    logic unimplemented_flush;
    logic window_overflow;
    logic window_underflow;
  } pflags_t;

  // SPARC V8 trap types.
  localparam logic [7:0] TT_INSTRUCTION_ACCESS_EXCEPTION = 8'h01;
  localparam logic [7:0] TT_ILLEGAL_INSTRUCTION          = 8'h02;
  localparam logic [7:0] TT_PRIVILEGED_INSTRUCTION       = 8'h03;
  localparam logic [7:0] TT_FP_DISABLED                  = 8'h04;
  localparam logic [7:0] TT_WINDOW_OVERFLOW              = 8'h05;
  localparam logic [7:0] TT_WINDOW_UNDERFLOW             = 8'h06;
  localparam logic [7:0] TT_MEM_ADDRESS_NOT_ALIGNED      = 8'h07;
  localparam logic [7:0] TT_FP_EXCEPTION                 = 8'h08;
  localparam logic [7:0] TT_DATA_ACCESS_EXCEPTION        = 8'h09;
  localparam logic [7:0] TT_TAG_OVERFLOW                 = 8'h0A;
  localparam logic [7:0] TT_R_REGISTER_ACCESS_ERROR      = 8'h20;
  localparam logic [7:0] TT_INSTRUCTION_ACCESS_ERROR     = 8'h21;
  localparam logic [7:0] TT_CP_DISABLED                  = 8'h24;
  localparam logic [7:0] TT_UNIMPLEMENTED_FLUSH          = 8'h25;
  localparam logic [7:0] TT_CP_EXCEPTION                 = 8'h28;
  localparam logic [7:0] TT_DATA_ACCESS_ERROR            = 8'h29;
  localparam logic [7:0] TT_DIVISION_BY_ZERO             = 8'h2A;
  localparam logic [7:0] TT_DATA_STORE_ERROR             = 8'h2B;
  localparam logic [7:0] TT_TRAP_INSTRUCTION_BASE        = 8'h80;
  localparam logic [7:0] TT_INTERRUPT_BASE               = 8'h10;

  // Address space identifiers used by fetch and by load/store.
  localparam logic [7:0] ASI_USER_INSTRUCTION       = 8'd8;
  localparam logic [7:0] ASI_SUPERVISOR_INSTRUCTION = 8'd9;
  localparam logic [7:0] ASI_USER_DATA              = 8'd10;
  localparam logic [7:0] ASI_SUPERVISOR_DATA        = 8'd11;

  // ALU operations.
  typedef enum logic [3:0] {
    ALU_ADD,    // a + b
    ALU_ADDC,   // a + b + carry in
    ALU_SUB,    // a - b
    ALU_SUBC,   // a - b - carry in
    ALU_AND,    // a & b
    ALU_OR,     // a | b
    ALU_XOR,    // a ^ b
    ALU_ANDN,   // a & ~b
    ALU_ORN,    // a | ~b
    ALU_XNOR,   // a ^ ~b
    ALU_INC,    // a + 1
    ALU_DEC,    // a - 1
    ALU_MULS    // one multiply step: (n^v, a>>1) + (y0 ? b : 0)
  } alu_op_e;

  // Shifter operations.
  typedef enum logic [1:0] {
    SHF_SLL,
    SHF_SRL,
    SHF_SRA
  } shf_op_e;

  // Instruction classes produced by the decoder.
  typedef enum logic [4:0] {
    IC_ILLEGAL,    // unassigned opcode or unimplemented instruction
    IC_FP,         // floating-point operation, load or branch
    IC_CP,         // coprocessor operation, load or branch
    IC_SETHI,
    IC_BICC,
    IC_CALL,
    IC_ALU,        // arithmetic / logical, optionally setting icc
    IC_TAGGED,     // taddcc, tsubcc and their trap-on-overflow variants
    IC_MULSCC,
    IC_SHIFT,
    IC_RDSPEC,     // rdy, rdpsr, rdwim, rdtbr
    IC_WRSPEC,     // wry, wrpsr, wrwim, wrtbr
    IC_JMPL,
    IC_RETT,
    IC_TICC,
    IC_FLUSH,
    IC_SAVE,
    IC_RESTORE,
    IC_LOAD,
    IC_STORE,
    IC_MULDIV      // umul, smul, udiv, sdiv and their cc forms
  } iclass_e;

  // Memory access sizes for load and store.
  typedef enum logic [1:0] {
    SZ_BYTE,
    SZ_HALF,
    SZ_WORD,
    SZ_DOUBLE
  } msize_e;

  // Special registers reached by rd/wr instructions.
  typedef enum logic [2:0] {
    SR_Y,
    SR_PSR,
    SR_WIM,
    SR_TBR,
    SR_ASR
  } sreg_e;

  // Decoded instruction.
  typedef struct packed {
    iclass_e cls;
    alu_op_e alu_op;     // ALU operation (IC_ALU, IC_TAGGED)
    logic    setcc;      // write the icc bits of psr
    logic    tag_trap;   // taddcctv / tsubcctv: trap on tag overflow
    shf_op_e shf_op;     // IC_SHIFT
    sreg_e   sreg;       // IC_RDSPEC / IC_WRSPEC
    logic    priv;       // supervisor-only instruction
    msize_e  size;       // IC_LOAD / IC_STORE
    logic    ld_signed;  // sign-extend a byte or half load
    logic    alt;        // alternate-space load/store (lda, sta, ...)
    logic    md_div;     // IC_MULDIV: divide (else multiply)
    logic    md_signed;  // IC_MULDIV: signed operation
  } decoded_t;

  // Sign extension of the 13-bit immediate.
  function automatic word_t sext13(input logic [12:0] v);
    return {{19{v[12]}}, v};
  endfunction

  // Branch displacement: disp22 * 4, sign extended.
  function automatic word_t bdisp22(input logic [21:0] v);
    return {{8{v[21]}}, v, 2'b00};
  endfunction

  // Call displacement: disp30 * 4.
  function automatic word_t cdisp30(input logic [29:0] v);
    return {v, 2'b00};
  endfunction

endpackage
