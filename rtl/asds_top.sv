// asds_top -- top level: the SPARC V8 integer unit and the example
// accumulator machine, side by side.
//
// The two processors are independent designs. The SPARC integer unit is the
// main one: a non-pipelined implementation of the SPARC V8 integer
// instruction set with four register windows, whose data path is two ALUs,
// a comparator, a shift unit and a windowed register file. The accumulator
// machine is the small example processor used to introduce behavioural
// processor specification. Each brings out its own memory port (the memory
// system is outside this design) and its own status; the SPARC off-chip
// interface lines (interrupt level, reset, error, FPU and coprocessor lines)
// are ports of the top as well.
//
// Both memory ports use the same handshake: req is held, with the address,
// write enable and write data stable, until ack; read data is valid with ack.
// Timing is that of the two processors (see sparc_iu and acc_machine); the
// top adds no logic of its own. Both designs, and placing them side by side
// without any connection between them, follow the specification; the port
// names and the shared clock are this design's choices.
module asds_top
  import sparc_pkg::*;
#(
  parameter int unsigned NWINDOWS   = sparc_pkg::NWINDOWS_DEFAULT,
  parameter int unsigned ACC_WORD_W = 16,
  parameter int unsigned ACC_OP_W   = 3,
  localparam int unsigned ACC_ADDR_W = ACC_WORD_W - ACC_OP_W
) (
  input  logic                  clk,
  // SPARC integer unit: off-chip interface lines
  input  logic                  bp_reset_in,
  input  logic [3:0]            bp_IRL,
  input  logic                  bp_FPU_present,
  input  logic                  bp_FPU_exception,
  input  logic [1:0]            bp_FPU_cc,
  input  logic                  bp_CP_present,
  input  logic                  bp_CP_exception,
  input  logic [1:0]            bp_CP_cc,
  output logic                  pb_error,
  output logic                  pb_block_ldst_word,
  output logic                  pb_block_ldst_byte,
  // SPARC integer unit: memory system
  output logic                  iu_mem_req,
  output logic                  iu_mem_we,
  output logic [31:0]           iu_mem_addr,
  output logic [7:0]            iu_mem_asi,
  output logic [3:0]            iu_mem_bm,
  output logic [31:0]           iu_mem_wdata,
  input  logic                  iu_mem_ack,
  input  logic [31:0]           iu_mem_rdata,
  input  logic                  iu_mem_err,
  // SPARC integer unit: observation
  output logic [31:0]           iu_pc,
  output logic [31:0]           iu_npc,
  output logic [31:0]           iu_psr,
  output logic [31:0]           iu_tbr,
  output logic [31:0]           iu_y,
  output logic                  iu_ev_retire,
  output logic                  iu_ev_annul,
  output logic                  iu_ev_trap,
  output logic                  iu_ev_irq,
  output logic                  iu_ev_error,
  // accumulator machine
  input  logic                  acc_rst,
  output logic                  acc_mem_req,
  output logic                  acc_mem_we,
  output logic [ACC_ADDR_W-1:0] acc_mem_addr,
  output logic [ACC_WORD_W-1:0] acc_mem_wdata,
  input  logic                  acc_mem_ack,
  input  logic [ACC_WORD_W-1:0] acc_mem_rdata,
  output logic                  acc_halted,
  output logic [ACC_ADDR_W-1:0] acc_pc,
  output logic [ACC_WORD_W-1:0] acc_ac
);

  sparc_iu #(.NWINDOWS(NWINDOWS)) u_iu (
    .clk                (clk),
    .bp_reset_in        (bp_reset_in),
    .bp_IRL             (bp_IRL),
    .bp_FPU_present     (bp_FPU_present),
    .bp_FPU_exception   (bp_FPU_exception),
    .bp_FPU_cc          (bp_FPU_cc),
    .bp_CP_present      (bp_CP_present),
    .bp_CP_exception    (bp_CP_exception),
    .bp_CP_cc           (bp_CP_cc),
    .pb_error           (pb_error),
    .pb_block_ldst_word (pb_block_ldst_word),
    .pb_block_ldst_byte (pb_block_ldst_byte),
    .mem_req            (iu_mem_req),
    .mem_we             (iu_mem_we),
    .mem_addr           (iu_mem_addr),
    .mem_asi            (iu_mem_asi),
    .mem_bm             (iu_mem_bm),
    .mem_wdata          (iu_mem_wdata),
    .mem_ack            (iu_mem_ack),
    .mem_rdata          (iu_mem_rdata),
    .mem_err            (iu_mem_err),
    .pc_o               (iu_pc),
    .npc_o              (iu_npc),
    .psr_o              (iu_psr),
    .tbr_o              (iu_tbr),
    .y_o                (iu_y),
    .ev_retire          (iu_ev_retire),
    .ev_annul           (iu_ev_annul),
    .ev_trap            (iu_ev_trap),
    .ev_irq             (iu_ev_irq),
    .ev_error           (iu_ev_error)
  );

  acc_machine #(.WORD_W(ACC_WORD_W), .OP_W(ACC_OP_W)) u_acc (
    .clk       (clk),
    .rst       (acc_rst),
    .mem_req   (acc_mem_req),
    .mem_we    (acc_mem_we),
    .mem_addr  (acc_mem_addr),
    .mem_wdata (acc_mem_wdata),
    .mem_ack   (acc_mem_ack),
    .mem_rdata (acc_mem_rdata),
    .halted    (acc_halted),
    .pc_o      (acc_pc),
    .ac_o      (acc_ac)
  );
endmodule
