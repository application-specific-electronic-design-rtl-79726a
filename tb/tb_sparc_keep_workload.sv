// tb_sparc_keep_workload -- the integer unit running the instruction list of
// the reduced eqntott configuration.
//
// That configuration keeps call, jmpl, save, restore, rett, lda, sta, ta and
// tne, besides the frequent ALU, load/store and branch instructions. This
// testbench runs a program in which each of the nine is executed: a call
// into a subroutine that opens a window with save, reads its argument with
// lda and writes the result with sta (user and supervisor data ASIs),
// closes the window with restore and returns with jmpl; the caller then
// stores the returned value with sta, takes a ta trap and a taken tne trap,
// with a tne that is not taken in between. The trap handler returns with
// rett. Results, the trap log and the final psr are compared with values
// worked out by hand, and the latency of each kept instruction (from the
// retire events, with a memory that answers one cycle after the request) is
// compared with the integer unit's cycle counts.
//
// The programs, stimulus and reference values are this testbench's own;
// the behaviour they check is the one described in the module's header.
module tb_sparc_keep_workload;
  import sparc_asm_pkg::*;

  localparam logic [4:0] G0 = 0, G1 = 1, G6 = 6, G7 = 7;
  localparam logic [4:0] O0 = 8, O1 = 9, O7 = 15;
  localparam logic [4:0] L1 = 17, L2 = 18, L3 = 19;
  localparam logic [4:0] I0 = 24, I1 = 25;

  localparam int RES  = 32'h400;   // result area
  localparam int ARG  = 32'h420;   // subroutine operand
  localparam int LOG  = 32'h600;   // trap log
  localparam int HND  = 32'h300;   // trap handler
  localparam int SUBR = 32'h2C0;   // subroutine

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        reset_in;
  logic        pb_error, blk_w, blk_b;
  logic        mem_req, mem_we, mem_ack, mem_err;
  logic [31:0] mem_addr, mem_wdata, mem_rdata;
  logic [7:0]  mem_asi;
  logic [3:0]  mem_bm;
  logic [31:0] pc_o, npc_o, psr_o, tbr_o, y_o;
  logic        ev_retire, ev_annul, ev_trap, ev_irq, ev_error;

  sparc_iu dut (
    .clk(clk), .bp_reset_in(reset_in), .bp_IRL(4'd0),
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

  int wp;
  task automatic emit(input logic [31:0] w);
    u_mem.m[wp] = w;
    wp++;
  endtask

  // retire cycle per pc reached, ASIs of the two sta accesses
  int retire_at [int];
  logic [7:0] asi_arg = 8'hFF, asi_res = 8'hFF;
  always @(posedge clk) begin
    if (!reset_in) begin
      if (ev_retire) retire_at[int'(pc_o)] = cycle;
      if (mem_req && mem_we && mem_ack && mem_addr == ARG) asi_arg = mem_asi;
      if (mem_req && mem_we && mem_ack && mem_addr == RES) asi_res = mem_asi;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset_in = 1'b1;
    for (int i = 0; i < 4096; i++) u_mem.m[i] = 32'd0;
    // trap table at 0x1000: rd %tbr,%l3 ; ba handler ; nop
    for (int tt = 0; tt < 256; tt++) begin
      int base;
      base = (32'h1000 + tt * 16) / 4;
      u_mem.m[base]     = alu_r(RDTBR, L3, G0, G0);
      u_mem.m[base + 1] = bicc(CA, 1'b0, HND / 4 - (base + 1));
      u_mem.m[base + 2] = nop();
    end
    // handler: log tbr, return past the trap instruction with rett
    wp = HND / 4;
    emit(mem_i(ST, L3, G7, 0));
    emit(alu_i(ADD, G7, G7, 4));
    emit(alu_i(JMPL, G0, L2, 0));
    emit(alu_i(RETT, G0, L2, 4));
    // subroutine: i0 <- i0 + mem[i1], written back to mem[i1]
    wp = SUBR / 4;
    emit(alu_r(SAVE, G0, G0, G0));          // cwp 3 -> 2
    emit(mem_a(LDA, L1, I1, G0, 8'd10));    // user data
    emit(alu_r(ADD, I0, I0, L1));
    emit(mem_a(STA, I0, I1, G0, 8'd11));    // supervisor data
    emit(alu_r(RESTORE, G0, G0, G0));       // cwp 2 -> 3
    emit(alu_i(JMPL, G0, O7, 8));
    emit(nop());
    u_mem.m[ARG / 4] = 32'd5;

    wp = 0;
    emit(sethi(G1, 22'h4));                 //  0 g1 = 0x1000
    emit(alu_i(WRTBR, G0, G1, 0));          //  1
    emit(alu_i(OR_, G7, G0, LOG));          //  2
    emit(alu_i(OR_, G6, G0, RES));          //  3
    emit(alu_i(WRWIM, G0, G0, 1));          //  4
    emit(alu_i(WRPSR, G0, G0, 32'hA3));     //  5 s=1 et=1 cwp=3
    emit(alu_i(OR_, O0, G0, 10));           //  6
    emit(call(SUBR / 4 - 7));               //  7
    emit(alu_i(OR_, O1, G0, ARG));          //  8 delay slot
    emit(mem_a(STA, O0, G6, G0, 8'd10));    //  9 R0 = returned value
    emit(ticc_i(CA, 3));                    // 10 ta 3
    emit(alu_r(SUBCC, G0, G0, G0));         // 11 z = 1
    emit(ticc_i(CNE, 4));                   // 12 not taken
    emit(alu_i(SUBCC, G0, G0, 1));          // 13 z = 0
    emit(ticc_i(CNE, 5));                   // 14 taken
    emit(alu_i(OR_, G1, G0, 1));            // 15
    emit(mem_i(ST, G1, G6, 8));             // 16 done marker
    emit(bicc(CA, 1'b0, 0));                // 17 loop
    emit(nop());                            // 18

    repeat (3) @(posedge clk);
    reset_in = 1'b0;
    wait (u_mem.m[RES / 4 + 2] == 32'd1);
    repeat (10) @(posedge clk);

    check("returned value (sta)", u_mem.m[RES / 4], 32'd15);
    check("sta ASI 10", 32'(asi_res), 32'd10);
    check("subroutine result (sta)", u_mem.m[ARG / 4], 32'd15);
    check("sta ASI 11", 32'(asi_arg), 32'd11);
    check("trap log ta", u_mem.m[LOG / 4], 32'h0000_1830);
    check("trap log tne", u_mem.m[LOG / 4 + 1], 32'h0000_1850);
    check("trap log end", u_mem.m[LOG / 4 + 2], 32'd0);
    check("psr.s after rett", 32'(psr_o[7]), 32'd1);
    check("psr.et after rett", 32'(psr_o[5]), 32'd1);
    check("psr.cwp after rett", 32'(psr_o[4:0]), 32'd3);
    check("no error mode", 32'(pb_error), 32'd0);
    check("call latency", 32'(retire_at[8 * 4] - retire_at[7 * 4]), 32'd4);
    check("save latency", 32'(retire_at[SUBR + 4] - retire_at[SUBR]), 32'd5);
    check("lda latency", 32'(retire_at[SUBR + 8] - retire_at[SUBR + 4]), 32'd7);
    check("sta latency", 32'(retire_at[SUBR + 16] - retire_at[SUBR + 12]), 32'd8);
    check("restore latency", 32'(retire_at[SUBR + 20] - retire_at[SUBR + 16]), 32'd5);
    check("jmpl latency", 32'(retire_at[SUBR + 24] - retire_at[SUBR + 20]), 32'd4);
    check("tne not taken latency", 32'(retire_at[13 * 4] - retire_at[12 * 4]), 32'd4);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
