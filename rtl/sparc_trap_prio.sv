// sparc_trap_prio -- trap selection priority encoder.
//
// Combinational. Looks at the pending trap flags of the status register p and
// returns the trap type tt of the highest-priority one, as a single priority
// encoder rather than a chain of sequential tests. Priority, highest first
// (SPARC V8 order, the order tmask1, tmask2, ... of the specification):
// data_store_error, instruction_access_error, r_register_access_error,
// instruction_access_exception, privileged_instruction, illegal_instruction,
// fp_disabled, cp_disabled, unimplemented_FLUSH, window_overflow,
// window_underflow, mem_address_not_aligned, fp_exception, cp_exception,
// data_access_error, data_access_exception, tag_overflow, division_by_zero,
// trap_instruction (tt = 0x80 + ticc_trap_type) and finally an interrupt
// (tt = 0x10 + interrupt_level). any is 0 when nothing is pending.
//
// Interface: p, interrupt_level, ticc_trap_type in; tt, any out; no clock.
// The priority list follows the specification's trap dispatch; the trap type
// numbers are those of SPARC V8, since the specification names them only
// as tmask constants.
module sparc_trap_prio
  import sparc_pkg::*;
(
  input  pflags_t    p,
  input  logic [3:0] interrupt_level,
  input  logic [6:0] ticc_trap_type,
  output logic [7:0] tt,
  output logic       any
);
  always_comb begin
    any = 1'b1;
    if      (p.data_store_error)             tt = TT_DATA_STORE_ERROR;
    else if (p.instruction_access_error)     tt = TT_INSTRUCTION_ACCESS_ERROR;
    else if (p.r_register_access_error)      tt = TT_R_REGISTER_ACCESS_ERROR;
    else if (p.instruction_access_exception) tt = TT_INSTRUCTION_ACCESS_EXCEPTION;
    else if (p.privileged_instruction)       tt = TT_PRIVILEGED_INSTRUCTION;
    else if (p.illegal_instruction)          tt = TT_ILLEGAL_INSTRUCTION;
    else if (p.fp_disabled)                  tt = TT_FP_DISABLED;
    else if (p.cp_disabled)                  tt = TT_CP_DISABLED;
    else if (p.unimplemented_flush)          tt = TT_UNIMPLEMENTED_FLUSH;
    else if (p.window_overflow)              tt = TT_WINDOW_OVERFLOW;
    else if (p.window_underflow)             tt = TT_WINDOW_UNDERFLOW;
    else if (p.mem_address_not_aligned)      tt = TT_MEM_ADDRESS_NOT_ALIGNED;
    else if (p.fp_exception)                 tt = TT_FP_EXCEPTION;
    else if (p.cp_exception)                 tt = TT_CP_EXCEPTION;
    else if (p.data_access_error)            tt = TT_DATA_ACCESS_ERROR;
    else if (p.data_access_exception)        tt = TT_DATA_ACCESS_EXCEPTION;
    else if (p.tag_overflow)                 tt = TT_TAG_OVERFLOW;
    else if (p.division_by_zero)             tt = TT_DIVISION_BY_ZERO;
    else if (p.trap_instruction)             tt = TT_TRAP_INSTRUCTION_BASE | {1'b0, ticc_trap_type};
    else if (interrupt_level != 4'd0)        tt = TT_INTERRUPT_BASE | {4'd0, interrupt_level};
    else begin
      tt  = 8'd0;
      any = 1'b0;
    end
  end
endmodule
