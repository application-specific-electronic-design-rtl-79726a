// tb_sparc_muldiv -- self-checking testbench of the multiply/divide unit.
//
// Random and corner-case operands for umul, smul, udiv and sdiv. The
// reference uses 64-bit signed and unsigned integer arithmetic: the full
// product, and the quotient of {y, a} / b truncated toward zero, saturated
// as SPARC V8 defines when it does not fit in 32 bits. It also checks that
// done comes exactly 33 cycles after start.
//
// The stimulus and reference values are this testbench's own; the behaviour
// they check is the one described in the module's header.
module tb_sparc_muldiv;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic        rst, start, op_div, sgn, busy, done, ovf;
  logic [31:0] a, b, y_in, result, y_out;

  sparc_muldiv dut (
    .clk(clk), .rst(rst), .start(start), .op_div(op_div), .sgn(sgn), .a(a), .b(b),
    .y_in(y_in), .busy(busy), .done(done), .result(result), .y_out(y_out), .ovf(ovf)
  );

  int checks = 0, failures = 0;
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_one(logic d, logic s, logic [31:0] x, logic [31:0] w, logic [31:0] yy);
    logic [31:0] er, ey;
    logic eo;
    int n;
    if (!d) begin
      longint p;
      if (s) p = longint'($signed(x)) * longint'($signed(w));
      else   p = longint'({32'd0, x}) * longint'({32'd0, w});
      er = p[31:0]; ey = p[63:32]; eo = 0;
    end else if (!s) begin
      longint unsigned q;
      q = {yy, x} / {32'd0, w};
      ey = 0;
      if (q > 64'h0000_0000_FFFF_FFFF) begin er = 32'hFFFF_FFFF; eo = 1; end
      else begin er = q[31:0]; eo = 0; end
    end else begin
      longint q;
      // the only 64-bit signed quotient that overflows longint
      if ({yy, x} == 64'h8000_0000_0000_0000 && w == 32'hFFFF_FFFF) q = 64'sh7FFF_FFFF_FFFF_FFFF;
      else q = $signed({yy, x}) / longint'($signed(w));
      ey = 0;
      if (q > 64'sh7FFF_FFFF) begin er = 32'h7FFF_FFFF; eo = 1; end
      else if (q < -64'sh8000_0000) begin er = 32'h8000_0000; eo = 1; end
      else begin er = q[31:0]; eo = 0; end
    end
    @(negedge clk);
    start = 1; op_div = d; sgn = s; a = x; b = w; y_in = yy;
    @(negedge clk);
    start = 0; a = $urandom; b = $urandom; y_in = $urandom;   // operands need not stay
    n = 1;
    while (!done && n < 100) begin @(negedge clk); n++; end
    checks++;
    if (result !== er || ovf !== eo || (!d && y_out !== ey) || n != 33) begin
      failures++;
      $display("FAIL div=%b sgn=%b y=%h a=%h b=%h: got %h:%h v=%b after %0d, expected %h:%h v=%b",
               d, s, yy, x, w, y_out, result, ovf, n, ey, er, eo);
    end
  endtask

  initial begin
    rst = 1; start = 0; op_div = 0; sgn = 0; a = 0; b = 0; y_in = 0;
    repeat (2) @(posedge clk);
    rst = 0;
    // corners
    run_one(0, 0, 32'hFFFF_FFFF, 32'hFFFF_FFFF, 0);
    run_one(0, 1, 32'h8000_0000, 32'h8000_0000, 0);
    run_one(0, 1, 32'hFFFF_FFFF, 32'd7, 0);
    run_one(1, 0, 32'd100, 32'd7, 0);
    run_one(1, 0, 32'd0, 32'd1, 32'd1);             // quotient 2^32: overflow
    run_one(1, 1, 32'hFFFF_FF9C, 32'd7, 32'hFFFF_FFFF);   // -100 / 7
    run_one(1, 1, 32'h8000_0000, 32'hFFFF_FFFF, 32'hFFFF_FFFF); // -2^31 / -1: overflow
    run_one(1, 1, 32'h8000_0000, 32'd1, 32'hFFFF_FFFF);   // -2^31 / 1 fits
    run_one(1, 1, 32'h7FFF_FFFF, 32'd1, 32'd0);
    for (int i = 0; i < 1500; i++) begin
      logic d, s;
      logic [31:0] x, w, yy;
      d = 1'($urandom); s = 1'($urandom); x = $urandom; w = $urandom;
      if (i % 3 == 0) w = w >> $urandom_range(0, 31);
      if (w == 0) w = 1;
      // keep many divides in range: a small high word (sign-extended for signed)
      case (i % 4)
        0: yy = 0;
        1: yy = (s && x[31]) ? 32'hFFFF_FFFF : 32'd0;
        2: yy = $urandom % (w | 1);
        default: yy = $urandom;
      endcase
      run_one(d, s, x, w, yy);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
