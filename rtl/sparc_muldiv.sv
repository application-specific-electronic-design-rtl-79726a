// sparc_muldiv -- iterative integer multiply and divide unit.
//
// Serves the SPARC V8 instructions umul, smul, udiv and sdiv (and their cc
// forms) with one shift-and-add or shift-and-subtract step per clock, on
// operand magnitudes, with the sign applied at the end.
//   multiply: {y_out, result} = a * b (64-bit product; signed when sgn)
//   divide:   result = {y_in, a} / b (64-bit dividend, truncated quotient)
// A divide whose quotient does not fit in 32 bits saturates: unsigned
// 0xFFFFFFFF; signed 0x7FFFFFFF or 0x80000000; ovf is then 1 (the V bit of
// udivcc / sdivcc). The caller must not start a divide with b = 0; the
// integer unit raises division_by_zero instead.
//
// Interface and timing: start (one cycle, with op_div, sgn, a, b and y_in
// valid) loads the operands; busy is high for the 32 steps that follow and
// done is high, with result, y_out and ovf valid, from the cycle after the
// last step until the next start. A multiply or divide therefore takes 33
// cycles after start.
//
// The instructions and their results are those of SPARC V8, whose integer
// instruction set the specification translates; the iterative one-bit-per-
// cycle structure is this design's choice, made to keep the data path small
// like the rest of this multicycle implementation.
module sparc_muldiv (
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  logic        op_div,   // 0: multiply, 1: divide
  input  logic        sgn,      // signed operation
  input  logic [31:0] a,        // multiplicand / low word of the dividend
  input  logic [31:0] b,        // multiplier / divisor
  input  logic [31:0] y_in,     // high word of the dividend
  output logic        busy,
  output logic        done,
  output logic [31:0] result,
  output logic [31:0] y_out,
  output logic        ovf
);
  logic [31:0] hi, lo, m;      // partial product or remainder, shifting word, operand
  logic [5:0]  cnt;
  logic        is_div, neg, ovf_mag, sgn_r;

  // magnitudes of the operands
  logic [63:0] dividend, dividend_mag;
  logic [31:0] a_mag, b_mag;
  assign dividend     = {y_in, a};
  assign dividend_mag = (sgn && y_in[31]) ? (~dividend + 64'd1) : dividend;
  assign a_mag        = (sgn && a[31]) ? (~a + 32'd1) : a;
  assign b_mag        = (sgn && b[31]) ? (~b + 32'd1) : b;

  // one step
  logic [32:0] add_s;          // multiply: hi + m when lo[0]
  logic [32:0] rem_sh, rem_sub;
  assign add_s   = {1'b0, hi} + (lo[0] ? {1'b0, m} : 33'd0);
  assign rem_sh  = {hi, lo[31]};
  assign rem_sub = rem_sh - {1'b0, m};

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0;
      done <= 1'b0;
      cnt  <= '0;
    end else if (start) begin
      busy    <= 1'b1;
      done    <= 1'b0;
      cnt     <= '0;
      is_div  <= op_div;
      sgn_r   <= sgn;
      if (op_div) begin
        hi      <= dividend_mag[63:32];
        lo      <= dividend_mag[31:0];
        m       <= b_mag;
        neg     <= sgn && (y_in[31] ^ b[31]);
        ovf_mag <= (dividend_mag[63:32] >= b_mag);
      end else begin
        hi      <= '0;
        lo      <= b_mag;
        m       <= a_mag;
        neg     <= sgn && (a[31] ^ b[31]);
        ovf_mag <= 1'b0;
      end
    end else if (busy) begin
      if (is_div) begin
        if (!rem_sub[32]) begin          // remainder >= divisor: subtract
          hi <= rem_sub[31:0];
          lo <= {lo[30:0], 1'b1};
        end else begin
          hi <= rem_sh[31:0];
          lo <= {lo[30:0], 1'b0};
        end
      end else begin
        hi <= add_s[32:1];
        lo <= {add_s[0], lo[31:1]};
      end
      cnt <= cnt + 6'd1;
      if (cnt == 6'd31) begin
        busy <= 1'b0;
        done <= 1'b1;
      end
    end
  end

  // sign and saturation
  logic [63:0] prod;
  assign prod = neg ? (~{hi, lo} + 64'd1) : {hi, lo};
  always_comb begin
    y_out  = prod[63:32];
    result = prod[31:0];
    ovf    = 1'b0;
    if (is_div) begin
      y_out = '0;
      if (!sgn_r) begin
        if (ovf_mag) begin result = 32'hFFFF_FFFF; ovf = 1'b1; end
        else           result = lo;
      end else if (neg) begin
        if (ovf_mag || lo > 32'h8000_0000) begin result = 32'h8000_0000; ovf = 1'b1; end
        else                                  result = ~lo + 32'd1;
      end else begin
        if (ovf_mag || lo[31]) begin result = 32'h7FFF_FFFF; ovf = 1'b1; end
        else                      result = lo;
      end
    end
  end
endmodule
