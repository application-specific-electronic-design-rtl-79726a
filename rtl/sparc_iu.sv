// sparc_iu -- non-pipelined SPARC V8 integer unit.
//
// The processor runs the SPARC trap-fetch-execute loop as a multicycle state
// machine around a small data path: the windowed register file (two read
// ports, one write port), ALU 1 (all arithmetic and logic, effective
// addresses, branch targets), ALU 2 (add only: the "next PC + 4" adder), a
// comparator, the shift unit, the window unit, the trap priority encoder and
// the condition evaluator. Architected registers are pc, npc, psr, tbr, wim,
// y and the ancillary state registers asr[1..31]; implementation registers
// are inst, the status flags p, the trap/interrupt register q, the
// temporaries tempAddr, tempCWP and tempMask, and the memory interface
// registers memAR, memDR, memAS, memBM and memAE.
//
// Loop, one state per step:
//   RESET   while bp_reset_in is high: reset_mode 0, execute_mode 1,
//           trap 1, reset_trap 1 (so the first thing done is a reset trap)
//   CHECK   error_mode -> ERROR; sample the interrupt request (ET = 1 and
//           IRL = 15 or IRL > PIL); pending trap -> TRAP1, else -> FETCH
//   TRAP1   select the trap (tt), clear the trap flags; with ET = 0 enter
//           error mode; else ET <- 0, PS <- S, S <- 1, CWP <- CWP - 1
//   TRAP2   r[17] <- pc (npc when the instruction was annulled)
//   TRAP3   r[18] <- npc (npc + 4 when annulled), pc <- tbr, npc <- tbr + 4
//           (0 and 4 for a reset trap)
//   FETCH   read the word at pc (ASI 8 user / 9 supervisor) into inst
//   EXEC    annulled slot: skip it; fetch error: instruction access trap;
//           otherwise execute, and for instructions that do not change
//           control flow themselves: pc <- npc, npc <- npc + 4
//   WIN     second step of save, restore and rett: test tempMask, then
//           switch windows (save/restore also do their add)
//   STDATA  store: move the register (or register pair) to memDR, set memBM
//   MEM     memory read or write at memAR, memAS, memBM
//   MEMEND  test memAE; loads write the register; ldd/std repeat for the
//           second word
//   MULDIV  integer multiply or divide in sparc_muldiv (32 steps); then
//           rd <- result, y <- high word of a product, icc if the cc form
//   ERROR   pb_error is high; only bp_reset_in leaves this state
// A trap raised by an instruction leaves pc and npc unchanged, so the trap
// saves the address of the trapping instruction.
//
// Timing with a memory that acknowledges one cycle after the request: an
// ALU, branch, call or jmpl instruction takes 4 cycles (CHECK, 2 x FETCH,
// EXEC), save/restore/rett 5, a load 7, a store 8, ldd 10 and std 12, an
// integer multiply or divide 37 (4 + 33 in MULDIV); taking a trap adds 3
// cycles (TRAP1..TRAP3). A divide by zero traps (division_by_zero) from EXEC.
//
// Memory port: mem_req is held, with mem_addr, mem_we, mem_asi, mem_bm and
// mem_wdata stable, until the cycle in which mem_ack is seen; mem_rdata and
// mem_err are sampled in that cycle. Data is big-endian: byte 0 of a word is
// bits 31:24.
//
// Following the specification: the loop order, the state flags and their
// effects, the window arithmetic, the register file mapping, the annulling
// rules of branches, the load/store subroutine order and the use of ASI 8..11.
// This design's own choices, where the specification is silent or departs
// from SPARC V8: branch and call targets are relative to the address of the
// branch (V8) rather than to npc; jmpl and rett add simm13 to rs1 (V8);
// entering error mode sets error_mode and pb_error; the interrupt test needs
// ET = 1 for every level; writes to psr, wim, tbr and y take effect at once;
// flush is a no-op (there is no cache); floating-point and coprocessor
// instructions always trap as disabled, so the FPU and coprocessor lines are
// not used; ldstub and swap trap as illegal; integer multiply and divide
// (the specification's division_by_zero flag) follow SPARC V8 and are
// computed by an iterative unit, with a divide quotient that does not fit
// saturated and, for the cc forms, V set.
// bp_FPU_*, bp_CP_* are accepted for interface completeness and left unused,
// and pb_block_ldst_word/byte stay low because no atomic access is built.
module sparc_iu
  import sparc_pkg::*;
#(
  parameter int unsigned NWINDOWS = sparc_pkg::NWINDOWS_DEFAULT,
  parameter logic [3:0]  IMPL     = 4'd0,
  parameter logic [3:0]  VER      = 4'd0,
  localparam int unsigned CWPW    = (NWINDOWS > 1) ? $clog2(NWINDOWS) : 1
) (
  input  logic        clk,
  // off-chip interface lines
  input  logic        bp_reset_in,
  input  logic [3:0]  bp_IRL,
  input  logic        bp_FPU_present,
  input  logic        bp_FPU_exception,
  input  logic [1:0]  bp_FPU_cc,
  input  logic        bp_CP_present,
  input  logic        bp_CP_exception,
  input  logic [1:0]  bp_CP_cc,
  output logic        pb_error,
  output logic        pb_block_ldst_word,
  output logic        pb_block_ldst_byte,
  // memory system
  output logic        mem_req,
  output logic        mem_we,
  output logic [31:0] mem_addr,
  output logic [7:0]  mem_asi,
  output logic [3:0]  mem_bm,
  output logic [31:0] mem_wdata,
  input  logic        mem_ack,
  input  logic [31:0] mem_rdata,
  input  logic        mem_err,
  // observation
  output logic [31:0] pc_o,
  output logic [31:0] npc_o,
  output logic [31:0] psr_o,
  output logic [31:0] tbr_o,
  output logic [31:0] y_o,
  output logic        ev_retire,   // an instruction completed (or was annulled)
  output logic        ev_annul,    // an annulled delay slot was skipped
  output logic        ev_trap,     // a trap was entered (TRAP1)
  output logic        ev_irq,      // an interrupt request was accepted
  output logic        ev_error     // error mode was entered
);

  typedef enum logic [3:0] {
    S_RESET, S_CHECK, S_TRAP1, S_TRAP2, S_TRAP3, S_FETCH, S_EXEC, S_WIN,
    S_STDATA, S_MEM, S_MEMEND, S_MULDIV, S_ERROR
  } state_e;

  // ---------------------------------------------------------------- registers
  state_e              state;
  logic [31:0]         pc, npc, y, inst;
  psr_t                psr;
  tbr_t                tbr;
  logic [NWINDOWS-1:0] wim;
  pflags_t             p;
  logic [3:0]          q_il;        // q.interrupt_level
  logic [6:0]          q_ticc;      // q.ticc_trap_type
  logic [31:0]         temp_addr;
  logic [CWPW-1:0]     temp_cwp;
  logic [NWINDOWS-1:0] temp_mask;
  logic [31:0]         mem_ar, mem_dr;
  logic [7:0]          mem_as;
  logic [3:0]          mem_bm_r;
  logic                mem_ae;
  logic                second;      // second word of ldd / std
  logic [31:0]         cur_pc;      // address of the instruction in flight
  logic                in_flight;   // an instruction was fetched since the last CHECK
  logic [31:0]         asr [1:31];

  // ---------------------------------------------------------------- decode
  decoded_t    dec;
  logic [4:0]  f_rd, f_rs1, f_rs2;
  logic        f_i, f_a;
  logic [3:0]  f_cond;
  logic [12:0] f_simm13;
  logic [7:0]  f_asi;

  sparc_decode u_decode (.inst(inst), .d(dec));

  assign f_rd     = inst[29:25];
  assign f_a      = inst[29];
  assign f_cond   = inst[28:25];
  assign f_rs1    = inst[18:14];
  assign f_i      = inst[13];
  assign f_asi    = inst[12:5];
  assign f_rs2    = inst[4:0];
  assign f_simm13 = inst[12:0];

  // ---------------------------------------------------------------- register file
  logic [4:0]      r1_addr, w_addr;
  logic [31:0]     r1_data, r2_data, w_data;
  logic            w_en;
  logic [CWPW-1:0] w_cwp;

  sparc_regfile #(.NWINDOWS(NWINDOWS)) u_regfile (
    .clk     (clk),
    .r1_addr (r1_addr), .r1_cwp(psr.cwp[CWPW-1:0]), .r1_data(r1_data),
    .r2_addr (f_rs2),   .r2_cwp(psr.cwp[CWPW-1:0]), .r2_data(r2_data),
    .w_en    (w_en), .w_addr(w_addr), .w_cwp(w_cwp), .w_data(w_data)
  );

  // store data comes through port r1 (rd, or rd+1 for the second word)
  assign r1_addr = (state == S_STDATA) ? {f_rd[4:1], f_rd[0] | second} : f_rs1;

  logic [31:0] op2;  // second operand: register or sign-extended immediate
  assign op2 = f_i ? sext13(f_simm13) : r2_data;

  // ---------------------------------------------------------------- functional units
  alu_op_e     alu1_op;
  logic [31:0] alu1_a, alu1_b, alu1_y, alu2_a, alu2_y;
  logic        alu1_n, alu1_z, alu1_v, alu1_c, alu1_tag;

  sparc_alu u_alu1 (
    .op(alu1_op), .a(alu1_a), .b(alu1_b), .cin(psr.c), .n_xor_v(psr.n ^ psr.v),
    .y0(y[0]), .result(alu1_y), .n(alu1_n), .z(alu1_z), .v(alu1_v), .c(alu1_c),
    .tag_err(alu1_tag)
  );

  // ALU 2 only adds 4 to npc (or to tbr during trap entry)
  sparc_alu u_alu2 (
    .op(ALU_ADD), .a(alu2_a), .b(32'd4), .cin(1'b0), .n_xor_v(1'b0), .y0(1'b0),
    .result(alu2_y), .n(), .z(), .v(), .c(), .tag_err()
  );
  assign alu2_a = (state == S_TRAP3) ? tbr : npc;

  logic [31:0] shf_y;
  sparc_shifter u_shf (.op(dec.shf_op), .a(r1_data), .cnt(op2[4:0]), .result(shf_y));

  logic irl_gt_pil;
  sparc_cmp #(.WIDTH(4)) u_cmp_irq (
    .a(bp_IRL), .b(psr.pil), .gt(irl_gt_pil), .eq(), .a_zero()
  );
  logic temp_mask_zero;
  sparc_cmp #(.WIDTH(NWINDOWS)) u_cmp_mask (
    .a(temp_mask), .b('0), .gt(), .eq(), .a_zero(temp_mask_zero)
  );

  logic            win_inc, win_invalid;
  logic [CWPW-1:0] win_cwp;
  logic [NWINDOWS-1:0] win_mask;
  sparc_window #(.NWINDOWS(NWINDOWS)) u_window (
    .cwp(psr.cwp[CWPW-1:0]), .inc(win_inc), .wim(wim),
    .new_cwp(win_cwp), .mask(win_mask), .invalid(win_invalid)
  );
  assign win_inc = (state == S_EXEC) && (dec.cls == IC_RESTORE || dec.cls == IC_RETT);

  logic [7:0] sel_tt;
  logic       sel_any;
  sparc_trap_prio u_trap_prio (
    .p(p), .interrupt_level(q_il), .ticc_trap_type(q_ticc), .tt(sel_tt), .any(sel_any)
  );

  // multiply / divide unit, started from EXEC, result collected in MULDIV
  logic        md_start, md_busy, md_done, md_ovf, md_div_zero;
  logic [31:0] md_result, md_y;
  assign md_div_zero = dec.md_div && (op2 == 32'd0);
  assign md_start    = (state == S_EXEC) && !p.annul && !mem_ae && (dec.cls == IC_MULDIV) &&
                       !md_div_zero;
  sparc_muldiv u_muldiv (
    .clk(clk), .rst(bp_reset_in), .start(md_start), .op_div(dec.md_div),
    .sgn(dec.md_signed), .a(r1_data), .b(op2), .y_in(y), .busy(md_busy), .done(md_done),
    .result(md_result), .y_out(md_y), .ovf(md_ovf)
  );

  logic cond_taken;
  sparc_cond u_cond (.cond(f_cond), .n(psr.n), .z(psr.z), .v(psr.v), .c(psr.c), .taken(cond_taken));

  // ALU 1 operand selection
  always_comb begin
    alu1_op = ALU_ADD;
    alu1_a  = r1_data;
    alu1_b  = op2;
    unique case (state)
      S_EXEC: begin
        if (dec.cls == IC_BICC) begin
          alu1_a = pc;
          alu1_b = bdisp22(inst[21:0]);
        end else if (dec.cls == IC_CALL) begin
          alu1_a = pc;
          alu1_b = cdisp30(inst[29:0]);
        end else if (dec.cls == IC_ALU || dec.cls == IC_TAGGED || dec.cls == IC_MULSCC) begin
          alu1_op = dec.alu_op;
        end
      end
      S_TRAP3: begin   // npc + 4 for an annulled trap
        alu1_a = npc;
        alu1_b = 32'd4;
      end
      S_MEMEND: begin  // address of the second word
        alu1_a = mem_ar;
        alu1_b = 32'd4;
      end
      default: ;
    endcase
  end

  // ---------------------------------------------------------------- helpers
  logic irq_req;
  assign irq_req = psr.et && (bp_IRL == 4'hF || irl_gt_pil);

  logic misaligned;
  always_comb begin
    unique case (dec.size)
      SZ_BYTE:   misaligned = 1'b0;
      SZ_HALF:   misaligned = alu1_y[0];
      SZ_WORD:   misaligned = (alu1_y[1:0] != 2'b00);
      default:   misaligned = (alu1_y[2:0] != 3'b000);
    endcase
  end

  // load data alignment (big-endian)
  logic [7:0]  ld_byte;
  logic [15:0] ld_half;
  logic [31:0] ld_val;
  always_comb begin
    unique case (mem_ar[1:0])
      2'd0: ld_byte = mem_dr[31:24];
      2'd1: ld_byte = mem_dr[23:16];
      2'd2: ld_byte = mem_dr[15:8];
      default: ld_byte = mem_dr[7:0];
    endcase
    ld_half = mem_ar[1] ? mem_dr[15:0] : mem_dr[31:16];
    unique case (dec.size)
      SZ_BYTE: ld_val = dec.ld_signed ? {{24{ld_byte[7]}}, ld_byte} : {24'd0, ld_byte};
      SZ_HALF: ld_val = dec.ld_signed ? {{16{ld_half[15]}}, ld_half} : {16'd0, ld_half};
      default: ld_val = mem_dr;
    endcase
  end

  logic [31:0] st_val;
  logic [3:0]  st_bm;
  always_comb begin
    unique case (dec.size)
      SZ_BYTE: begin st_val = {4{r1_data[7:0]}};  st_bm = 4'b1000 >> mem_ar[1:0]; end
      SZ_HALF: begin st_val = {2{r1_data[15:0]}}; st_bm = mem_ar[1] ? 4'b0011 : 4'b1100; end
      default: begin st_val = r1_data;            st_bm = 4'b1111; end
    endcase
  end

  logic [31:0] rd_spec;
  always_comb begin
    unique case (dec.sreg)
      SR_Y:    rd_spec = y;
      SR_PSR:  rd_spec = psr;
      SR_WIM:  rd_spec = 32'(wim);
      SR_TBR:  rd_spec = tbr;
      default: rd_spec = asr[(f_rs1 == 5'd0) ? 5'd1 : f_rs1];
    endcase
  end

  logic [31:0] wr_val;
  assign wr_val = r1_data ^ op2;   // wr: rs1 xor (rs2 or simm13)

  // ---------------------------------------------------------------- register file write
  always_comb begin
    w_en   = 1'b0;
    w_addr = f_rd;
    w_cwp  = psr.cwp[CWPW-1:0];
    w_data = alu1_y;
    unique case (state)
      S_TRAP2: begin
        w_en = 1'b1; w_addr = 5'd17; w_data = p.annul ? npc : pc;
      end
      S_TRAP3: begin
        w_en = 1'b1; w_addr = 5'd18; w_data = p.annul ? alu1_y : npc;
      end
      S_EXEC: begin
        if (!p.annul && !mem_ae && !(dec.priv && !psr.s && dec.cls != IC_RETT)) begin
          unique case (dec.cls)
            IC_SETHI:  begin w_en = 1'b1; w_data = {inst[21:0], 10'd0}; end
            IC_CALL:   begin w_en = 1'b1; w_addr = 5'd15; w_data = pc; end
            IC_ALU, IC_MULSCC: w_en = 1'b1;
            IC_TAGGED: w_en = !(dec.tag_trap && (alu1_v || alu1_tag));
            IC_SHIFT:  begin w_en = 1'b1; w_data = shf_y; end
            IC_RDSPEC: begin w_en = 1'b1; w_data = rd_spec; end
            IC_JMPL:   begin w_en = (alu1_y[1:0] == 2'b00); w_data = pc; end
            default: ;
          endcase
        end
      end
      S_WIN: begin
        if ((dec.cls == IC_SAVE || dec.cls == IC_RESTORE) && temp_mask_zero) begin
          w_en = 1'b1; w_cwp = temp_cwp;   // operands old window, result new window
        end
      end
      S_MULDIV: begin
        if (md_done) begin w_en = 1'b1; w_data = md_result; end
      end
      S_MEMEND: begin
        if (dec.cls == IC_LOAD && !mem_ae) begin
          w_en = 1'b1; w_addr = {f_rd[4:1], f_rd[0] | second}; w_data = ld_val;
        end
      end
      default: ;
    endcase
  end

  // ---------------------------------------------------------------- sequencing
  pflags_t p_cleared;
  always_comb begin
    p_cleared = p;
    p_cleared.trap                         = 1'b0;
    p_cleared.instruction_access_exception = 1'b0;
    p_cleared.illegal_instruction          = 1'b0;
    p_cleared.privileged_instruction       = 1'b0;
    p_cleared.fp_disabled                  = 1'b0;
    p_cleared.cp_disabled                  = 1'b0;
    p_cleared.window_overflow              = 1'b0;
    p_cleared.window_underflow             = 1'b0;
    p_cleared.mem_address_not_aligned      = 1'b0;
    p_cleared.fp_exception                 = 1'b0;
    p_cleared.cp_exception                 = 1'b0;
    p_cleared.data_access_exception        = 1'b0;
    p_cleared.tag_overflow                 = 1'b0;
    p_cleared.division_by_zero             = 1'b0;
    p_cleared.trap_instruction             = 1'b0;
  end

  // advance to the next sequential instruction
  task automatic next_pc();
    pc  <= npc;
    npc <= alu2_y;
  endtask

  always_ff @(posedge clk) begin
    if (bp_reset_in) begin
      state              <= S_RESET;
      p                  <= '0;
      p.execute_mode     <= 1'b1;
      p.trap             <= 1'b1;
      p.reset_trap       <= 1'b1;
      q_il               <= '0;
      q_ticc             <= '0;
      psr                <= '0;
      psr.impl           <= IMPL;
      psr.ver            <= VER;
      psr.s              <= 1'b1;
      tbr                <= '0;
      wim                <= '0;
      y                  <= '0;
      pc                 <= '0;
      npc                <= 32'd4;
      inst               <= '0;
      temp_addr          <= '0;
      temp_cwp           <= '0;
      temp_mask          <= '0;
      mem_ar             <= '0;
      mem_dr             <= '0;
      mem_as             <= '0;
      mem_bm_r           <= '0;
      mem_ae             <= 1'b0;
      second             <= 1'b0;
      pb_error           <= 1'b0;
      cur_pc             <= '0;
      in_flight          <= 1'b0;
    end else begin
      unique case (state)
        S_RESET: state <= S_CHECK;

        S_CHECK: begin
          in_flight <= 1'b0;
          if (p.error_mode) begin
            state <= S_ERROR;
          end else if (p.trap || irq_req) begin
            if (irq_req) begin
              p.trap <= 1'b1;
              q_il   <= bp_IRL;
            end
            state <= S_TRAP1;
          end else if (p.execute_mode) begin
            mem_ar    <= pc;
            cur_pc    <= pc;
            in_flight <= 1'b1;
            mem_as <= psr.s ? ASI_SUPERVISOR_INSTRUCTION : ASI_USER_INSTRUCTION;
            state  <= S_FETCH;
          end
        end

        S_TRAP1: begin
          p    <= p_cleared;
          q_il <= '0;
          if (!p.reset_trap) begin
            if (!psr.et) begin
              p.execute_mode <= 1'b0;
              p.error_mode   <= 1'b1;
            end else begin
              tbr.tt <= sel_tt;
            end
          end
          if (!p.reset_trap && !psr.et) begin
            pb_error <= 1'b1;
            state    <= S_ERROR;
          end else begin
            psr.et  <= 1'b0;
            psr.ps  <= psr.s;
            psr.s   <= 1'b1;
            psr.cwp <= 5'(win_cwp);
            state   <= S_TRAP2;
          end
        end

        S_TRAP2: state <= S_TRAP3;

        S_TRAP3: begin
          p.annul <= 1'b0;
          if (p.reset_trap) begin
            pc           <= '0;
            npc          <= 32'd4;
            p.reset_trap <= 1'b0;
          end else begin
            pc  <= tbr;
            npc <= alu2_y;
          end
          state <= S_CHECK;
        end

        S_FETCH: begin
          if (mem_ack) begin
            inst   <= mem_rdata;
            mem_ae <= mem_err;
            state  <= S_EXEC;
          end
        end

        S_EXEC: begin
          state <= S_CHECK;
          if (p.annul) begin
            p.annul <= 1'b0;
            next_pc();
          end else if (mem_ae) begin
            p.trap                         <= 1'b1;
            p.instruction_access_exception <= 1'b1;
          end else if (dec.priv && !psr.s && dec.cls != IC_RETT) begin
            p.trap                   <= 1'b1;
            p.privileged_instruction <= 1'b1;
          end else begin
            unique case (dec.cls)
              IC_ILLEGAL: begin p.trap <= 1'b1; p.illegal_instruction <= 1'b1; end
              IC_FP:      begin p.trap <= 1'b1; p.fp_disabled <= 1'b1; end
              IC_CP:      begin p.trap <= 1'b1; p.cp_disabled <= 1'b1; end
              IC_SETHI, IC_SHIFT, IC_RDSPEC, IC_FLUSH: next_pc();
              IC_ALU: begin
                if (dec.setcc) {psr.n, psr.z, psr.v, psr.c} <= {alu1_n, alu1_z, alu1_v, alu1_c};
                next_pc();
              end
              IC_TAGGED: begin
                if (dec.tag_trap && (alu1_v || alu1_tag)) begin
                  p.trap         <= 1'b1;
                  p.tag_overflow <= 1'b1;
                end else begin
                  {psr.n, psr.z, psr.v, psr.c} <= {alu1_n, alu1_z, alu1_v | alu1_tag, alu1_c};
                  next_pc();
                end
              end
              IC_MULSCC: begin
                {psr.n, psr.z, psr.v, psr.c} <= {alu1_n, alu1_z, alu1_v, alu1_c};
                y <= {r1_data[0], y[31:1]};
                next_pc();
              end
              IC_WRSPEC: begin
                unique case (dec.sreg)
                  SR_Y:   begin y <= wr_val; next_pc(); end
                  SR_ASR: begin asr[f_rd] <= wr_val; next_pc(); end
                  SR_WIM: begin wim <= wr_val[NWINDOWS-1:0]; next_pc(); end
                  SR_TBR: begin tbr.tba <= wr_val[31:12]; next_pc(); end
                  default: begin  // SR_PSR
                    if (wr_val[4:0] >= 5'(NWINDOWS)) begin
                      p.trap <= 1'b1; p.illegal_instruction <= 1'b1;
                    end else begin
                      psr <= {IMPL, VER, wr_val[23:20], 6'd0, wr_val[13:0]};
                      next_pc();
                    end
                  end
                endcase
              end
              IC_BICC: begin
                pc <= npc;
                if (cond_taken) begin
                  npc <= alu1_y;
                  if (f_a && f_cond == 4'b1000) p.annul <= 1'b1;   // ba,a
                end else begin
                  npc <= alu2_y;
                  if (f_a) p.annul <= 1'b1;
                end
              end
              IC_CALL: begin
                pc  <= npc;
                npc <= alu1_y;
              end
              IC_JMPL: begin
                temp_addr <= alu1_y;
                if (alu1_y[1:0] != 2'b00) begin
                  p.trap <= 1'b1; p.mem_address_not_aligned <= 1'b1;
                end else begin
                  pc  <= npc;
                  npc <= alu1_y;
                end
              end
              IC_TICC: begin
                if (cond_taken) begin
                  p.trap             <= 1'b1;
                  p.trap_instruction <= 1'b1;
                  q_ticc             <= alu1_y[6:0];
                end else begin
                  next_pc();
                end
              end
              IC_SAVE, IC_RESTORE, IC_RETT: begin
                temp_cwp  <= win_cwp;
                temp_mask <= win_mask;
                temp_addr <= alu1_y;
                state     <= S_WIN;
              end
              IC_MULDIV: begin
                if (md_div_zero) begin
                  p.trap <= 1'b1; p.division_by_zero <= 1'b1;
                end else begin
                  state <= S_MULDIV;
                end
              end
              IC_LOAD, IC_STORE: begin
                mem_ar   <= alu1_y;
                mem_as   <= dec.alt ? f_asi : (psr.s ? ASI_SUPERVISOR_DATA : ASI_USER_DATA);
                second   <= 1'b0;
                if (dec.alt && f_i) begin
                  p.trap <= 1'b1; p.illegal_instruction <= 1'b1;
                end else if (dec.size == SZ_DOUBLE && f_rd[0]) begin
                  p.trap <= 1'b1; p.illegal_instruction <= 1'b1;
                end else if (misaligned) begin
                  p.trap <= 1'b1; p.mem_address_not_aligned <= 1'b1;
                end else begin
                  state <= (dec.cls == IC_STORE) ? S_STDATA : S_MEM;
                end
              end
              default: ;
            endcase
          end
        end

        S_WIN: begin
          state <= S_CHECK;
          if (dec.cls == IC_RETT) begin
            if (psr.et) begin
              p.trap <= 1'b1;
              if (!psr.s) p.privileged_instruction <= 1'b1;
              else        p.illegal_instruction    <= 1'b1;
            end else if (!psr.s) begin
              p.trap <= 1'b1; p.privileged_instruction <= 1'b1;
              p.execute_mode <= 1'b0; p.error_mode <= 1'b1;
              tbr.tt <= TT_PRIVILEGED_INSTRUCTION;
            end else if (!temp_mask_zero) begin
              p.trap <= 1'b1; p.window_underflow <= 1'b1;
              p.execute_mode <= 1'b0; p.error_mode <= 1'b1;
              tbr.tt <= TT_WINDOW_UNDERFLOW;
            end else if (temp_addr[1:0] != 2'b00) begin
              p.trap <= 1'b1; p.mem_address_not_aligned <= 1'b1;
              p.execute_mode <= 1'b0; p.error_mode <= 1'b1;
              tbr.tt <= TT_MEM_ADDRESS_NOT_ALIGNED;
            end else begin
              psr.et  <= 1'b1;
              psr.s   <= psr.ps;
              psr.cwp <= 5'(temp_cwp);
              pc      <= npc;
              npc     <= temp_addr;
            end
          end else if (temp_mask_zero) begin
            psr.cwp <= 5'(temp_cwp);
            next_pc();
          end else begin
            p.trap <= 1'b1;
            if (dec.cls == IC_SAVE) p.window_overflow  <= 1'b1;
            else                    p.window_underflow <= 1'b1;
          end
        end

        S_STDATA: begin
          mem_dr   <= st_val;
          mem_bm_r <= st_bm;
          state    <= S_MEM;
        end

        S_MEM: begin
          if (mem_ack) begin
            mem_ae <= mem_err;
            if (dec.cls == IC_LOAD) mem_dr <= mem_rdata;
            state <= S_MEMEND;
          end
        end

        S_MEMEND: begin
          state <= S_CHECK;
          if (mem_ae) begin
            p.trap <= 1'b1; p.data_access_exception <= 1'b1;
          end else if (dec.size == SZ_DOUBLE && !second) begin
            second <= 1'b1;
            mem_ar <= alu1_y;
            state  <= (dec.cls == IC_STORE) ? S_STDATA : S_MEM;
          end else begin
            next_pc();
          end
        end

        S_MULDIV: begin
          if (md_done) begin
            if (!dec.md_div) y <= md_y;
            if (dec.setcc) {psr.n, psr.z, psr.v, psr.c} <= {md_result[31], md_result == 32'd0, md_ovf, 1'b0};
            next_pc();
            state <= S_CHECK;
          end
        end

        S_ERROR: pb_error <= 1'b1;

        default: state <= S_RESET;
      endcase
    end
  end

  // ---------------------------------------------------------------- outputs
  assign mem_req   = (state == S_FETCH) || (state == S_MEM);
  assign mem_we    = (state == S_MEM) && (dec.cls == IC_STORE);
  assign mem_addr  = mem_ar;
  assign mem_asi   = mem_as;
  assign mem_bm    = (state == S_MEM && dec.cls == IC_STORE) ? mem_bm_r : 4'b0000;
  assign mem_wdata = mem_dr;

  assign pb_block_ldst_word = 1'b0;
  assign pb_block_ldst_byte = 1'b0;

  assign pc_o  = pc;
  assign npc_o = npc;
  assign psr_o = psr;
  assign tbr_o = tbr;
  assign y_o   = y;

  assign ev_trap  = (state == S_TRAP1);
  assign ev_irq   = (state == S_CHECK) && !p.error_mode && irq_req;
  assign ev_error = (state == S_TRAP1) && !p.reset_trap && !psr.et;
  assign ev_annul = (state == S_EXEC) && p.annul;
  // an instruction has retired when pc has moved on since it was fetched
  assign ev_retire = (state == S_CHECK) && in_flight && (pc != cur_pc);

  // ---------------------------------------------------------------- handshake rules
  // a memory request is held, unchanged, until it is acknowledged
  property p_req_held;
    @(posedge clk) disable iff (bp_reset_in)
      (mem_req && !mem_ack) |=> (mem_req && $stable(mem_addr) && $stable(mem_we));
  endproperty
  a_req_held: assert property (p_req_held);

  // the multiply/divide unit is working for as long as the loop waits on it
  a_md_busy: assert property (@(posedge clk) disable iff (bp_reset_in)
    (state == S_MULDIV) |-> (md_busy || md_done));

  // the acknowledge only answers a request
  a_ack_req: assert property (@(posedge clk) disable iff (bp_reset_in) mem_ack |-> mem_req);

endmodule
