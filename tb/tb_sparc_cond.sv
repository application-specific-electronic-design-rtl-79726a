// tb_sparc_cond -- self-checking testbench of the condition evaluator.
//
// All 16 conditions against all 16 combinations of N Z V C. The reference
// decides each condition from the signed and unsigned meaning of a
// comparison (e.g. "greater" is neither zero nor N different from V).
// Combinational; sampled 1 ns after the inputs.
//
// The programs, stimulus and reference values are this testbench's own;
// the behaviour they check is the one described in the module's header.
module tb_sparc_cond;
  logic [3:0] cond;
  logic n, z, v, c, taken;
  sparc_cond dut (.cond(cond), .n(n), .z(z), .v(v), .c(c), .taken(taken));

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic expect_taken(int k, logic fn, logic fz, logic fv, logic fc);
    logic less, lequ;
    less = (fn != fv);
    lequ = fc | fz;
    case (k)
      0:  return 0;              // bn
      1:  return fz;             // be
      2:  return fz | less;      // ble
      3:  return less;           // bl
      4:  return lequ;           // bleu
      5:  return fc;             // bcs
      6:  return fn;             // bneg
      7:  return fv;             // bvs
      8:  return 1;              // ba
      9:  return !fz;            // bne
      10: return !fz && !less;   // bg
      11: return !less;          // bge
      12: return !lequ;          // bgu
      13: return !fc;            // bcc
      14: return !fn;            // bpos
      default: return !fv;       // bvc
    endcase
  endfunction

  initial begin
    for (int k = 0; k < 16; k++)
      for (int f = 0; f < 16; f++) begin
        cond = 4'(k); {n, z, v, c} = 4'(f);
        #1;
        checks++;
        if (taken !== expect_taken(k, n, z, v, c)) begin
          failures++;
          $display("FAIL cond %0d nzvc=%b: got %b", k, 4'(f), taken);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
