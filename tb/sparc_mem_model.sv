// sparc_mem_model -- behavioural memory for the SPARC integer unit testbenches.
//
// Not synthesizable logic of the design: a word array of WORDS 32-bit words
// standing in for the external memory system. A request (req) is answered
// with ack one cycle later, with WAIT extra cycles when WAIT > 0; read data
// and the error bit are valid with ack. Writes honour the byte mask bm
// (bit 3 = bits 31:24, big-endian). An access to an address at or above
// ERR_BASE returns err = 1 and changes nothing, which stands in for a memory
// access error. The address space identifier is recorded in last_asi.
//
// Its one-cycle answer and the error region are testbench choices, not part
// of the design.
module sparc_mem_model #(
  parameter int unsigned WORDS    = 4096,
  parameter int unsigned WAIT     = 0,
  parameter logic [31:0] ERR_BASE = 32'h0000_4000
) (
  input  logic        clk,
  input  logic        req,
  input  logic        we,
  input  logic [31:0] addr,
  input  logic [7:0]  asi,
  input  logic [3:0]  bm,
  input  logic [31:0] wdata,
  output logic        ack,
  output logic [31:0] rdata,
  output logic        err
);
  logic [31:0] m [WORDS];
  logic [7:0]  last_asi;
  int unsigned wcnt;
  int unsigned nreads, nwrites;

  initial begin
    ack = 1'b0; rdata = '0; err = 1'b0; wcnt = 0; last_asi = '0;
    nreads = 0; nwrites = 0;
  end

  always @(posedge clk) begin
    ack <= 1'b0;
    err <= 1'b0;
    if (req && !ack) begin
      if (wcnt < WAIT) begin
        wcnt <= wcnt + 1;
      end else begin
        wcnt     <= 0;
        ack      <= 1'b1;
        last_asi <= asi;
        if (addr >= ERR_BASE) begin
          err   <= 1'b1;
          rdata <= 32'hDEAD_BEEF;
        end else if (we) begin
          nwrites <= nwrites + 1;
          for (int b = 0; b < 4; b++)
            if (bm[b]) m[addr[31:2] % WORDS][8*b +: 8] <= wdata[8*b +: 8];
        end else begin
          nreads <= nreads + 1;
          rdata  <= m[addr[31:2] % WORDS];
        end
      end
    end
  end
endmodule
