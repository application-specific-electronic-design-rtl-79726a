// acc_machine -- the small accumulator machine used as the introductory
// example of a behavioural processor specification.
//
// Four registers: the program counter pc, the accumulator ac, the memory
// address register memAR and the memory data register memDR, whose upper
// OP_W bits are the opcode field and whose lower bits are the address field.
// The machine fetches (memAR <- pc, read memory into memDR, pc <- pc + 1) and
// executes one of eight instructions until it executes halt:
//   halt  stop (halted goes high; only rst restarts the machine)
//   add   ac <- ac + M[address]        and   ac <- ac & M[address]
//   shr   ac <- ac >> 1 (arithmetic)   load  ac <- M[address]
//   stor  M[address] <- ac             jump  pc <- address
//   brn   if ac < 0 then pc <- address
//
// Memory port: the same request/acknowledge handshake as the SPARC integer
// unit (req held with addr, we and wdata stable until ack; rdata valid with
// ack). One state per step: FETCH, EXEC, OPREAD (operand read for
// add/and/load), OPWRITE (stor) and HALT. With a memory that acknowledges one
// cycle after the request, shr/jump/brn take 3 cycles, add/and/load/stor 5.
//
// The instruction set, the registers and the order of the register
// transfers are those of the example. The word width (16 bits), the opcode
// width (3 bits) and encoding (halt = 0, add = 1, and = 2, shr = 3,
// load = 4, stor = 5, jump = 6, brn = 7, the order of the listing), the
// arithmetic shift, the synchronous reset to pc = 0 and the handshake are
// this design's own choices.
module acc_machine #(
  parameter int unsigned WORD_W = 16,
  parameter int unsigned OP_W   = 3,
  localparam int unsigned ADDR_W = WORD_W - OP_W
) (
  input  logic              clk,
  input  logic              rst,
  output logic              mem_req,
  output logic              mem_we,
  output logic [ADDR_W-1:0] mem_addr,
  output logic [WORD_W-1:0] mem_wdata,
  input  logic              mem_ack,
  input  logic [WORD_W-1:0] mem_rdata,
  output logic              halted,
  output logic [ADDR_W-1:0] pc_o,
  output logic [WORD_W-1:0] ac_o
);
  typedef enum logic [OP_W-1:0] {
    OP_HALT = 'd0, OP_ADD = 'd1, OP_AND = 'd2, OP_SHR = 'd3,
    OP_LOAD = 'd4, OP_STOR = 'd5, OP_JUMP = 'd6, OP_BRN = 'd7
  } opcode_e;

  typedef enum logic [2:0] {S_FETCH, S_EXEC, S_OPREAD, S_OPWRITE, S_HALT} state_e;

  state_e            state;
  logic [ADDR_W-1:0] pc, mem_ar;
  logic [WORD_W-1:0] ac, mem_dr;
  opcode_e           opcode;
  logic [ADDR_W-1:0] address;

  assign opcode  = opcode_e'(mem_dr[WORD_W-1 -: OP_W]);
  assign address = mem_dr[ADDR_W-1:0];

  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= S_FETCH;
      pc     <= '0;
      ac     <= '0;
      mem_ar <= '0;
      mem_dr <= '0;
    end else begin
      unique case (state)
        S_FETCH: if (mem_ack) begin
          mem_dr <= mem_rdata;
          pc     <= pc + 1'b1;
          state  <= S_EXEC;
        end
        S_EXEC: begin
          state <= S_FETCH;
          unique case (opcode)
            OP_HALT: state <= S_HALT;
            OP_SHR:  ac <= $signed(ac) >>> 1;
            OP_JUMP: pc <= address;
            OP_BRN:  if (ac[WORD_W-1]) pc <= address;
            OP_STOR: begin
              mem_ar <= address;
              mem_dr <= ac;
              state  <= S_OPWRITE;
            end
            default: begin   // add, and, load
              mem_ar <= address;
              state  <= S_OPREAD;
            end
          endcase
        end
        S_OPREAD: if (mem_ack) begin
          unique case (opcode)
            OP_ADD:  ac <= ac + mem_rdata;
            OP_AND:  ac <= ac & mem_rdata;
            default: ac <= mem_rdata;      // load
          endcase
          mem_ar <= pc;
          state  <= S_FETCH;
        end
        S_OPWRITE: if (mem_ack) begin
          mem_ar <= pc;
          state  <= S_FETCH;
        end
        S_HALT: ;
        default: state <= S_HALT;
      endcase
      // memAR <- pc (or the jump target) for the next fetch
      if (state == S_EXEC && !(opcode inside {OP_STOR, OP_ADD, OP_AND, OP_LOAD}))
        mem_ar <= (opcode == OP_JUMP || (opcode == OP_BRN && ac[WORD_W-1])) ? address : pc;
    end
  end

  assign mem_req   = !rst && ((state == S_FETCH) || (state == S_OPREAD) || (state == S_OPWRITE));
  assign mem_we    = (state == S_OPWRITE);
  assign mem_addr  = mem_ar;
  assign mem_wdata = mem_dr;
  assign halted    = (state == S_HALT);
  assign pc_o      = pc;
  assign ac_o      = ac;
endmodule
