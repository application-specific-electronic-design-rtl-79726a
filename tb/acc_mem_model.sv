// acc_mem_model -- behavioural word memory for the accumulator machine.
//
// Not part of the design: WORDS words of WORD_W bits standing in for the
// machine's memory. A request is acknowledged one cycle later; read data is
// valid with the acknowledge, and a write is performed at that edge.
//
// Its one-cycle answer is a testbench choice, not part
// of the design.
module acc_mem_model #(
  parameter int unsigned WORD_W = 16,
  parameter int unsigned ADDR_W = 13,
  parameter int unsigned WORDS  = 256
) (
  input  logic              clk,
  input  logic              req,
  input  logic              we,
  input  logic [ADDR_W-1:0] addr,
  input  logic [WORD_W-1:0] wdata,
  output logic              ack,
  output logic [WORD_W-1:0] rdata
);
  logic [WORD_W-1:0] m [WORDS];
  initial begin ack = 1'b0; rdata = '0; end
  always @(posedge clk) begin
    ack <= 1'b0;
    if (req && !ack) begin
      ack <= 1'b1;
      if (we) m[addr % WORDS] <= wdata;
      else    rdata <= m[addr % WORDS];
    end
  end
endmodule
