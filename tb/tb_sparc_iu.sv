// tb_sparc_iu -- self-checking testbench of the SPARC integer unit.
//
// Loads a test program, a trap table and a trap handler into the behavioural
// memory, releases reset and lets the processor run. The program exercises
// arithmetic, logic, shifts, condition codes, branches with and without
// annulling, call/jmpl, all load/store sizes including ldd/std, save and
// restore with a window overflow and underflow, a trap instruction, an
// illegal, a misaligned and a faulting access, multiply step, tagged add,
// ancillary state registers, a floating-point opcode, a privileged
// instruction in user mode and an external interrupt. Results are stored to a
// result area; every trap handler appends the tbr value to a trap log. Both
// are compared with values worked out by hand from the SPARC V8 definitions.
// The instruction latencies (4 cycles for an ALU instruction, 5 for save,
// 7 for a load, 8 for a store) are checked from the retire events. A second
// short program checks that a trap with traps disabled enters error mode and
// that reset leaves it. A third program runs umul, smul, udiv, udivcc with
// an overflowing quotient and sdiv, checks their results, y and psr, the
// 37-cycle latency and the division_by_zero trap of a zero divisor.
//
// The programs, stimulus and reference values are this testbench's own;
// the behaviour they check is the one described in the module's header.
module tb_sparc_iu;
  import sparc_asm_pkg::*;

  localparam logic [4:0] G0 = 0, G1 = 1, G2 = 2, G3 = 3, G4 = 4, G5 = 5, G6 = 6, G7 = 7;
  localparam logic [4:0] O0 = 8, O1 = 9, O2 = 10, O3 = 11, O7 = 15;
  localparam logic [4:0] L0 = 16, L1 = 17, L2 = 18, L3 = 19;
  localparam logic [4:0] I2 = 26;

  localparam int RES = 32'h400;   // result area
  localparam int LOG = 32'h600;   // trap log
  localparam int HND = 32'h300;   // common trap handler
  localparam int IRQ = 32'h340;   // interrupt handler
  localparam int SUB = 32'h2C0;   // subroutine

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        reset_in;
  logic [3:0]  irl;
  logic        pb_error, blk_w, blk_b;
  logic        mem_req, mem_we, mem_ack, mem_err;
  logic [31:0] mem_addr, mem_wdata, mem_rdata;
  logic [7:0]  mem_asi;
  logic [3:0]  mem_bm;
  logic [31:0] pc_o, npc_o, psr_o, tbr_o, y_o;
  logic        ev_retire, ev_annul, ev_trap, ev_irq, ev_error;

  sparc_iu dut (
    .clk(clk), .bp_reset_in(reset_in), .bp_IRL(irl),
    .bp_FPU_present(1'b0), .bp_FPU_exception(1'b0), .bp_FPU_cc(2'b00),
    .bp_CP_present(1'b0), .bp_CP_exception(1'b0), .bp_CP_cc(2'b00),
    .pb_error(pb_error), .pb_block_ldst_word(blk_w), .pb_block_ldst_byte(blk_b),
    .mem_req(mem_req), .mem_we(mem_we), .mem_addr(mem_addr), .mem_asi(mem_asi),
    .mem_bm(mem_bm), .mem_wdata(mem_wdata), .mem_ack(mem_ack), .mem_rdata(mem_rdata),
    .mem_err(mem_err),
    .pc_o(pc_o), .npc_o(npc_o), .psr_o(psr_o), .tbr_o(tbr_o), .y_o(y_o),
    .ev_retire(ev_retire), .ev_annul(ev_annul), .ev_trap(ev_trap), .ev_irq(ev_irq),
    .ev_error(ev_error)
  );

  sparc_mem_model #(.WORDS(4096), .WAIT(0), .ERR_BASE(32'h4000)) u_mem (
    .clk(clk), .req(mem_req), .we(mem_we), .addr(mem_addr), .asi(mem_asi), .bm(mem_bm),
    .wdata(mem_wdata), .ack(mem_ack), .rdata(mem_rdata), .err(mem_err)
  );

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // program assembly
  int wp;
  task automatic emit(input logic [31:0] w);
    u_mem.m[wp] = w;
    wp++;
  endtask

  // retire cycle per retired pc (the pc after the instruction)
  int retire_at [int];
  int annuls = 0, traps = 0, irqs = 0, errors = 0;
  logic [7:0] user_store_asi = 8'hFF;
  always @(posedge clk) begin
    if (!reset_in) begin
      if (ev_retire) retire_at[int'(pc_o)] = cycle;
      if (ev_annul) annuls++;
      if (ev_trap) traps++;
      if (ev_irq) irqs++;
      if (ev_error) errors++;
      if (mem_req && mem_we && mem_ack && mem_addr == RES + 124) user_store_asi = mem_asi;
    end
  end

  // watchdog
  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] exp_log [11] = '{8'h05, 8'h06, 8'h85, 8'h02, 8'h07, 8'h09, 8'h0A, 8'h04,
                               8'h03, 8'h81, 8'h15};

  initial begin
    reset_in = 1'b1;
    irl      = 4'd0;
    for (int i = 0; i < 4096; i++) u_mem.m[i] = 32'd0;

    // trap table at 0x1000: rd %tbr,%l3 ; ba handler ; nop
    for (int tt = 0; tt < 256; tt++) begin
      int base;
      base = (32'h1000 + tt * 16) / 4;
      u_mem.m[base]     = alu_r(RDTBR, L3, G0, G0);
      u_mem.m[base + 1] = bicc(CA, 1'b0,
                               (((tt > 16 && tt < 32) ? IRQ : HND) / 4) - (base + 1));
      u_mem.m[base + 2] = nop();
    end
    // common handler: log tbr, skip the trapping instruction
    wp = HND / 4;
    emit(mem_i(ST, L3, G7, 0));
    emit(alu_i(ADD, G7, G7, 4));
    emit(alu_i(JMPL, G0, L2, 0));
    emit(alu_i(RETT, G0, L2, 4));
    // interrupt handler: log tbr, return to the interrupted instruction
    wp = IRQ / 4;
    emit(mem_i(ST, L3, G7, 0));
    emit(alu_i(ADD, G7, G7, 4));
    emit(alu_i(JMPL, G0, L1, 0));
    emit(alu_i(RETT, G0, L2, 0));
    // subroutine: o3 <- o2 + 1, return
    wp = SUB / 4;
    emit(alu_i(ADD, O3, O2, 1));
    emit(alu_i(JMPL, G0, O7, 8));
    emit(nop());

    wp = 0;
    emit(sethi(G1, 22'h4));                 //  0 g1 = 0x1000
    emit(alu_i(WRTBR, G0, G1, 0));          //  1 tbr.tba = 1
    emit(alu_i(OR_, G7, G0, LOG));          //  2
    emit(alu_i(OR_, G6, G0, RES));          //  3
    emit(alu_i(WRWIM, G0, G0, 1));          //  4 window 0 invalid
    emit(alu_i(WRPSR, G0, G0, 32'hA3));     //  5 s=1 et=1 cwp=3
    emit(alu_i(OR_, G2, G0, 5));            //  6
    emit(alu_i(OR_, G3, G0, -3));           //  7
    emit(alu_r(ADD, G4, G2, G3));           //  8
    emit(mem_i(ST, G4, G6, 0));             //  9 R0 = 2
    emit(alu_r(SUBCC, G0, G2, G2));         // 10 z = 1
    emit(bicc(CE, 1'b0, 3));                // 11 -> 14
    emit(nop());                            // 12
    emit(mem_i(ST, G2, G6, 4));             // 13 skipped
    emit(sethi(G5, 22'h1FFFFF));            // 14
    emit(alu_i(OR_, G5, G5, 32'h3FF));      // 15 g5 = 0x7fffffff
    emit(alu_i(ADDCC, G4, G5, 1));          // 16 n=1 v=1
    emit(alu_r(RDPSR, G4, G0, G0));         // 17
    emit(mem_i(ST, G4, G6, 8));             // 18 R2
    emit(bicc(CVS, 1'b0, 3));               // 19 -> 22
    emit(nop());                            // 20
    emit(mem_i(ST, G2, G6, 12));            // 21 skipped
    emit(alu_i(SLL, G4, G2, 3));            // 22
    emit(mem_i(ST, G4, G6, 12));            // 23 R3
    emit(alu_i(SRA, G4, G3, 1));            // 24
    emit(mem_i(ST, G4, G6, 16));            // 25 R4
    emit(alu_i(SRL, G4, G3, 28));           // 26
    emit(mem_i(ST, G4, G6, 20));            // 27 R5
    emit(alu_r(XNOR_, G4, G2, G3));         // 28
    emit(mem_i(ST, G4, G6, 24));            // 29 R6
    emit(alu_r(ANDN, G4, G3, G2));          // 30
    emit(mem_i(ST, G4, G6, 28));            // 31 R7
    emit(alu_i(SUBCC, G0, G0, 1));          // 32 c = 1
    emit(alu_r(ADDX, G4, G0, G2));          // 33
    emit(mem_i(ST, G4, G6, 32));            // 34 R8
    emit(sethi(G4, 22'h12345));             // 35
    emit(mem_i(ST, G4, G6, 36));            // 36 R9
    emit(alu_i(OR_, G5, G0, 32'h700));      // 37
    emit(sethi(G4, 22'h226AF3));            // 38
    emit(alu_i(OR_, G4, G4, 32'h1EF));      // 39 g4 = 0x89ABCDEF
    emit(mem_i(ST, G4, G5, 0));             // 40
    emit(mem_i(LDUB, G3, G5, 1));           // 41
    emit(mem_i(ST, G3, G6, 40));            // 42 R10
    emit(mem_i(LDSB, G3, G5, 0));           // 43
    emit(mem_i(ST, G3, G6, 44));            // 44 R11
    emit(mem_i(LDUH, G3, G5, 2));           // 45
    emit(mem_i(ST, G3, G6, 48));            // 46 R12
    emit(mem_i(LDSH, G3, G5, 2));           // 47
    emit(mem_i(ST, G3, G6, 52));            // 48 R13
    emit(mem_i(STB, G2, G5, 6));            // 49
    emit(mem_i(STH, G2, G5, 8));            // 50
    emit(mem_i(LD, G3, G5, 4));             // 51
    emit(mem_i(ST, G3, G6, 56));            // 52 R14
    emit(mem_i(LD, G3, G5, 8));             // 53
    emit(mem_i(ST, G3, G6, 60));            // 54 R15
    emit(mem_i(STD, G4, G5, 16));           // 55
    emit(mem_i(LDD, O0, G5, 16));           // 56
    emit(mem_i(ST, O1, G6, 64));            // 57 R16
    emit(mem_i(ST, O0, G6, 68));            // 58 R17
    emit(call(SUB / 4 - 59));               // 59
    emit(alu_i(OR_, O2, G0, 9));            // 60 delay slot
    emit(mem_i(ST, O3, G6, 72));            // 61 R18
    emit(mem_i(ST, O7, G6, 76));            // 62 R19
    emit(alu_i(SAVE, L0, O2, 1));           // 63 cwp 3 -> 2
    emit(mem_i(ST, I2, G6, 80));            // 64 R20
    emit(mem_i(ST, L0, G6, 84));            // 65 R21
    emit(alu_r(SAVE, G0, G0, G0));          // 66 cwp 2 -> 1
    emit(alu_r(SAVE, G0, G0, G0));          // 67 overflow trap
    emit(alu_r(RDPSR, G4, G0, G0));         // 68
    emit(mem_i(ST, G4, G6, 88));            // 69 R22
    emit(alu_r(RESTORE, G0, G0, G0));       // 70 cwp 1 -> 2
    emit(alu_r(RESTORE, G0, G0, G0));       // 71 cwp 2 -> 3
    emit(alu_r(RESTORE, G0, G0, G0));       // 72 underflow trap
    emit(alu_r(RDPSR, G4, G0, G0));         // 73
    emit(mem_i(ST, G4, G6, 92));            // 74 R23
    emit(ticc_i(CA, 5));                    // 75 trap 0x85
    emit(alu_r(SUBCC, G0, G0, G0));         // 76 z = 1
    emit(ticc_i(CNE, 6));                   // 77 not taken
    emit(bicc(CNE, 1'b1, 2));               // 78 not taken, annul slot
    emit(mem_i(ST, G2, G6, 96));            // 79 annulled
    emit(bicc(CA, 1'b1, 2));                // 80 ba,a -> 82
    emit(mem_i(ST, G2, G6, 100));           // 81 annulled
    emit(unimp());                          // 82 illegal
    emit(mem_i(LD, G4, G6, 1));             // 83 misaligned
    emit(sethi(G4, 22'h10));                // 84 g4 = 0x4000
    emit(mem_i(LD, G3, G4, 0));             // 85 access error
    emit(alu_i(WRY, G0, G0, 3));            // 86 y = 3
    emit(alu_i(OR_, G3, G0, 6));            // 87
    emit(alu_r(ANDCC, G0, G0, G0));         // 88 n = v = 0
    emit(alu_r(MULSCC, G4, G3, G2));        // 89
    emit(mem_i(ST, G4, G6, 104));           // 90 R26
    emit(alu_r(RDY, G4, G0, G0));           // 91
    emit(mem_i(ST, G4, G6, 108));           // 92 R27
    emit(alu_i(OR_, O0, G0, 4));            // 93
    emit(alu_i(OR_, O1, G0, 8));            // 94
    emit(alu_r(TADDCC, G4, O0, O1));        // 95
    emit(mem_i(ST, G4, G6, 112));           // 96 R28
    emit(alu_i(TADDCC, G4, O0, 1));         // 97 tag error -> v
    emit(alu_r(RDPSR, G4, G0, G0));         // 98
    emit(mem_i(ST, G4, G6, 116));           // 99 R29
    emit(alu_i(TADDCCTV, G4, O0, 1));       // 100 tag overflow trap
    emit(alu_i(WRY, 5'd17, G2, 0));         // 101 asr17 = 5
    emit(alu_r(RDY, G4, 5'd17, G0));        // 102
    emit(mem_i(ST, G4, G6, 120));           // 103 R30
    emit(alu_r(FPOP1, G0, G0, G0));         // 104 fp disabled
    emit(alu_i(WRPSR, G0, G0, 32'h23));     // 105 user mode
    emit(alu_r(RDPSR, G4, G0, G0));         // 106 privileged
    emit(mem_i(ST, G2, G6, 124));           // 107 R31, user data space
    emit(ticc_i(CA, 1));                    // 108 trap 0x81
    emit(alu_i(OR_, G1, G0, 1));            // 109
    emit(mem_i(ST, G1, G6, 128));           // 110 done marker
    emit(bicc(CA, 1'b0, 0));                // 111 loop
    emit(nop());                            // 112

    repeat (3) @(posedge clk);
    reset_in = 1'b0;

    // run until the done marker appears
    wait (u_mem.m[(RES + 128) / 4] == 32'd1);
    repeat (20) @(posedge clk);
    // raise an interrupt, drop it once accepted
    irl = 4'd5;
    wait (irqs > 0);
    @(posedge clk);
    irl = 4'd0;
    repeat (60) @(posedge clk);

    check("R0 add", u_mem.m[RES/4 + 0], 32'd2);
    check("R1 be skipped", u_mem.m[RES/4 + 1], 32'd0);
    check("R2 psr after addcc overflow", u_mem.m[RES/4 + 2], 32'h00A0_00A3);
    check("R3 sll", u_mem.m[RES/4 + 3], 32'd40);
    check("R4 sra", u_mem.m[RES/4 + 4], 32'hFFFF_FFFE);
    check("R5 srl", u_mem.m[RES/4 + 5], 32'h0000_000F);
    check("R6 xnor", u_mem.m[RES/4 + 6], 32'd7);
    check("R7 andn", u_mem.m[RES/4 + 7], 32'hFFFF_FFF8);
    check("R8 addx", u_mem.m[RES/4 + 8], 32'd6);
    check("R9 sethi", u_mem.m[RES/4 + 9], 32'h048D_1400);
    check("R10 ldub", u_mem.m[RES/4 + 10], 32'h0000_00AB);
    check("R11 ldsb", u_mem.m[RES/4 + 11], 32'hFFFF_FF89);
    check("R12 lduh", u_mem.m[RES/4 + 12], 32'h0000_CDEF);
    check("R13 ldsh", u_mem.m[RES/4 + 13], 32'hFFFF_CDEF);
    check("R14 stb", u_mem.m[RES/4 + 14], 32'h0000_0500);
    check("R15 sth", u_mem.m[RES/4 + 15], 32'h0005_0000);
    check("R16 ldd odd", u_mem.m[RES/4 + 16], 32'h0000_0700);
    check("R17 ldd even", u_mem.m[RES/4 + 17], 32'h89AB_CDEF);
    check("R18 call/subroutine", u_mem.m[RES/4 + 18], 32'd10);
    check("R19 call link", u_mem.m[RES/4 + 19], 32'd236);
    check("R20 save in = old out", u_mem.m[RES/4 + 20], 32'd9);
    check("R21 save result", u_mem.m[RES/4 + 21], 32'd10);
    check("R22 psr cwp 1", u_mem.m[RES/4 + 22], 32'h0090_00E1);
    check("R23 psr cwp 3", u_mem.m[RES/4 + 23], 32'h0090_00E3);
    check("R24 bne,a slot annulled", u_mem.m[RES/4 + 24], 32'd0);
    check("R25 ba,a slot annulled", u_mem.m[RES/4 + 25], 32'd0);
    check("R26 mulscc", u_mem.m[RES/4 + 26], 32'd8);
    check("R27 y after mulscc", u_mem.m[RES/4 + 27], 32'd1);
    check("R28 taddcc", u_mem.m[RES/4 + 28], 32'd12);
    check("R29 psr after tag error", u_mem.m[RES/4 + 29], 32'h0020_00E3);
    check("R30 asr17", u_mem.m[RES/4 + 30], 32'd5);
    check("R31 user store", u_mem.m[RES/4 + 31], 32'd5);
    check("user data ASI", 32'(user_store_asi), 32'd10);
    check("std word 0", u_mem.m[32'h710/4], 32'h89AB_CDEF);
    check("std word 1", u_mem.m[32'h714/4], 32'h0000_0700);
    for (int k = 0; k < 11; k++)
      check($sformatf("trap log %0d", k), u_mem.m[LOG/4 + k], 32'h1000 | (32'(exp_log[k]) << 4));
    check("trap log end", u_mem.m[LOG/4 + 11], 32'd0);
    check("annul events", 32'(annuls), 32'd2);
    check("trap events (reset + 11)", 32'(traps), 32'd12);
    check("still user mode", 32'(psr_o[7]), 32'd0);
    // latencies from the retire events
    check("ALU latency", 32'(retire_at[8*4] - retire_at[7*4]), 32'd4);
    check("store latency", 32'(retire_at[41*4] - retire_at[40*4]), 32'd8);
    check("load latency", 32'(retire_at[42*4] - retire_at[41*4]), 32'd7);
    check("save latency", 32'(retire_at[64*4] - retire_at[63*4]), 32'd5);
    check("ldd latency", 32'(retire_at[57*4] - retire_at[56*4]), 32'd10);
    check("std latency", 32'(retire_at[56*4] - retire_at[55*4]), 32'd12);
    check("no error yet", 32'(pb_error), 32'd0);

    // second program: a trap while traps are disabled enters error mode
    reset_in = 1'b1;
    for (int i = 0; i < 16; i++) u_mem.m[i] = 32'd0;
    u_mem.m[0] = nop();
    u_mem.m[1] = unimp();
    repeat (3) @(posedge clk);
    reset_in = 1'b0;
    repeat (40) @(posedge clk);
    check("error mode pb_error", 32'(pb_error), 32'd1);
    check("error mode entered once", 32'(errors), 32'd1);
    check("error mode pc stays", pc_o, 32'd4);
    reset_in = 1'b1;
    repeat (3) @(posedge clk);
    check("reset clears pb_error", 32'(pb_error), 32'd0);

    // third program: integer multiply and divide
    for (int i = 0; i < 64; i++) u_mem.m[i] = 32'd0;
    for (int i = 0; i < 16; i++) u_mem.m[32'h680/4 + i] = 32'd0;
    for (int i = 0; i < 16; i++) u_mem.m[32'h780/4 + i] = 32'd0;
    wp = 0;
    emit(sethi(G1, 22'h4));                 //  0 g1 = 0x1000
    emit(alu_i(WRTBR, G0, G1, 0));          //  1
    emit(alu_i(OR_, G7, G0, 32'h680));      //  2 trap log
    emit(alu_i(OR_, G6, G0, 32'h780));      //  3 results
    emit(alu_i(WRWIM, G0, G0, 1));          //  4
    emit(alu_i(WRPSR, G0, G0, 32'hA3));     //  5
    emit(alu_i(OR_, G2, G0, -7));           //  6
    emit(alu_i(OR_, G3, G0, 3));            //  7
    emit(alu_r(UMUL, G4, G2, G3));          //  8
    emit(mem_i(ST, G4, G6, 0));             //  9 M0
    emit(alu_r(RDY, G4, G0, G0));           // 10
    emit(mem_i(ST, G4, G6, 4));             // 11 M1
    emit(alu_r(SMUL, G4, G2, G3));          // 12
    emit(alu_r(RDY, G5, G0, G0));           // 13
    emit(mem_i(ST, G5, G6, 8));             // 14 M2
    emit(alu_i(WRY, G0, G0, 0));            // 15 y = 0
    emit(alu_i(OR_, G2, G0, 100));          // 16
    emit(alu_r(UDIV, G4, G2, G3));          // 17
    emit(mem_i(ST, G4, G6, 12));            // 18 M3
    emit(alu_r(RDY, G4, G0, G0));           // 19
    emit(mem_i(ST, G4, G6, 16));            // 20 M4
    emit(alu_i(WRY, G0, G0, 1));            // 21 y = 1
    emit(alu_i(OR_, G3, G0, 1));            // 22
    emit(alu_r(UDIVCC, G4, G2, G3));        // 23 quotient overflows
    emit(alu_r(RDPSR, G5, G0, G0));         // 24
    emit(mem_i(ST, G5, G6, 20));            // 25 M5
    emit(mem_i(ST, G4, G6, 24));            // 26 M6
    emit(alu_i(WRY, G0, G0, -1));           // 27 y = 0xffffffff
    emit(alu_i(OR_, G2, G0, -7));           // 28
    emit(alu_i(OR_, G3, G0, 3));            // 29
    emit(alu_r(SDIV, G4, G2, G3));          // 30 -7 / 3
    emit(mem_i(ST, G4, G6, 28));            // 31 M7
    emit(alu_r(UDIV, G4, G2, G0));          // 32 division by zero
    emit(alu_i(OR_, G1, G0, 2));            // 33
    emit(mem_i(ST, G1, G6, 32));            // 34 done marker
    emit(bicc(CA, 1'b0, 0));                // 35 loop
    emit(nop());                            // 36
    reset_in = 1'b0;
    wait (u_mem.m[32'h780/4 + 8] == 32'd2);
    check("M0 umul low", u_mem.m[32'h780/4 + 0], 32'hFFFF_FFEB);
    check("M1 umul y", u_mem.m[32'h780/4 + 1], 32'd2);
    check("M2 smul y", u_mem.m[32'h780/4 + 2], 32'hFFFF_FFFF);
    check("M3 udiv", u_mem.m[32'h780/4 + 3], 32'd33);
    check("M4 y after udiv", u_mem.m[32'h780/4 + 4], 32'd0);
    check("M5 psr after udivcc overflow", u_mem.m[32'h780/4 + 5], 32'h00A0_00A3);
    check("M6 udivcc saturated", u_mem.m[32'h780/4 + 6], 32'hFFFF_FFFF);
    check("M7 sdiv", u_mem.m[32'h780/4 + 7], 32'hFFFF_FFFE);
    check("division_by_zero logged", u_mem.m[32'h680/4], 32'h0000_12A0);
    check("one trap logged", u_mem.m[32'h680/4 + 1], 32'd0);
    check("umul latency", 32'(retire_at[9*4] - retire_at[8*4]), 32'd37);
    check("udiv latency", 32'(retire_at[18*4] - retire_at[17*4]), 32'd37);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
