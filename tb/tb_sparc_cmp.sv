// tb_sparc_cmp -- self-checking testbench of the comparator.
//
// Compares gt (unsigned a > b), eq and a_zero with a reference that looks for
// the most significant differing bit, for equal, adjacent, random and zero
// operands. Combinational; sampled 1 ns after the inputs.
//
// The programs, stimulus and reference values are this testbench's own;
// the behaviour they check is the one described in the module's header.
module tb_sparc_cmp;
  logic [31:0] a, b;
  logic gt, eq, a_zero;
  sparc_cmp #(.WIDTH(32)) dut (.a(a), .b(b), .gt(gt), .eq(eq), .a_zero(a_zero));

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_one();
    logic egt, eeq;
    egt = 0; eeq = 1;
    for (int i = 31; i >= 0; i--)
      if (a[i] != b[i]) begin egt = a[i]; eeq = 0; break; end
    #1;
    checks++;
    if (gt !== egt || eq !== eeq || a_zero !== (a == 32'd0)) begin
      failures++;
      $display("FAIL a=%h b=%h: gt=%b eq=%b z=%b", a, b, gt, eq, a_zero);
    end
  endtask

  initial begin
    a = 0; b = 0; run_one();
    a = 0; b = 1; run_one();
    a = 1; b = 0; run_one();
    a = 32'h8000_0000; b = 32'h7FFF_FFFF; run_one();
    a = 32'hFFFF_FFFF; b = 32'hFFFF_FFFF; run_one();
    for (int r = 0; r < 5000; r++) begin
      a = $urandom;
      case (r % 4)
        0: b = a;
        1: b = a + 1;
        2: b = a - 1;
        default: b = $urandom;
      endcase
      if (r % 50 == 0) a = 0;
      run_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
