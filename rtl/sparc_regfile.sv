// sparc_regfile -- windowed integer register file of the SPARC integer unit.
//
// Holds 7 global registers and 16*NWINDOWS windowed registers of 32 bits.
// Every access names a 5-bit register number n and a window pointer cwp; the
// address decode maps it as the SPARC architecture defines:
//   n = 0        reads as zero, writes are dropped
//   1 <= n <= 7  global register g[n]
//   n >= 8       windowed register R[((n-8) + cwp*16) mod (16*NWINDOWS)]
// so the "in" registers (24..31) of window w are the "out" registers (8..15)
// of window w+1.
//
// Two read ports (r1, r2) and one write port (w), as in the specification.
// Reads are combinational (the value is available in the cycle the address
// is presented); the write takes effect at the rising clock edge. The write
// port has its own window pointer so that save/restore can read operands in
// the old window and write the result into the new one in the same cycle.
// With the default NWINDOWS = 4 the file has 71 words; NWINDOWS = 8 gives the
// 136 words of an eight-window implementation.
// The register contents are not reset (a program must write a register
// before it reads it), which is this design's choice.
module sparc_regfile #(
  parameter int unsigned NWINDOWS = sparc_pkg::NWINDOWS_DEFAULT,
  localparam int unsigned CWPW    = (NWINDOWS > 1) ? $clog2(NWINDOWS) : 1
) (
  input  logic            clk,
  // read port r1
  input  logic [4:0]      r1_addr,
  input  logic [CWPW-1:0] r1_cwp,
  output logic [31:0]     r1_data,
  // read port r2
  input  logic [4:0]      r2_addr,
  input  logic [CWPW-1:0] r2_cwp,
  output logic [31:0]     r2_data,
  // write port w
  input  logic            w_en,
  input  logic [4:0]      w_addr,
  input  logic [CWPW-1:0] w_cwp,
  input  logic [31:0]     w_data
);
  localparam int unsigned NWREG = 16 * NWINDOWS;
  localparam int unsigned IDXW  = $clog2(NWREG);

  logic [31:0] g [1:7];
  logic [31:0] r [NWREG];

  // Physical index of a windowed register.
  function automatic logic [IDXW-1:0] widx(input logic [4:0] n, input logic [CWPW-1:0] w);
    logic [IDXW-1:0] base, off;
    off  = IDXW'(n - 5'd8);
    base = IDXW'({w, 4'b0000});
    return base + off;  // wraps modulo 16*NWINDOWS (NWINDOWS a power of two)
  endfunction

  function automatic logic [31:0] rd_reg(input logic [4:0] n,
                                         input logic [31:0] gv, input logic [31:0] rv);
    if (n == 5'd0)      return '0;
    else if (n < 5'd8)  return gv;
    else                return rv;
  endfunction

  assign r1_data = rd_reg(r1_addr, g[(r1_addr[2:0] == 3'd0) ? 3'd1 : r1_addr[2:0]],
                          r[widx(r1_addr, r1_cwp)]);
  assign r2_data = rd_reg(r2_addr, g[(r2_addr[2:0] == 3'd0) ? 3'd1 : r2_addr[2:0]],
                          r[widx(r2_addr, r2_cwp)]);

  always_ff @(posedge clk) begin
    if (w_en && w_addr != 5'd0) begin
      if (w_addr < 5'd8) g[w_addr[2:0]] <= w_data;
      else               r[widx(w_addr, w_cwp)] <= w_data;
    end
  end

  initial begin
    assert (NWINDOWS >= 2 && NWINDOWS <= 32 && (NWINDOWS & (NWINDOWS - 1)) == 0)
      else $error("sparc_regfile: NWINDOWS must be a power of two between 2 and 32");
  end
endmodule
