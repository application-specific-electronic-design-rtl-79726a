// tb_sparc_shifter -- self-checking testbench of the shift unit.
//
// Every shift count 0..31 and many random operands for sll, srl and sra.
// The reference shifts one bit at a time in a loop, filling with zero or,
// for sra, with the sign bit. Combinational; sampled 1 ns after the inputs.
//
// The programs, stimulus and reference values are this testbench's own;
// the behaviour they check is the one described in the module's header.
module tb_sparc_shifter;
  import sparc_pkg::*;
  shf_op_e     op;
  logic [31:0] a, result;
  logic [4:0]  cnt;
  sparc_shifter dut (.op(op), .a(a), .cnt(cnt), .result(result));

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

  function automatic logic [31:0] ref_shift(shf_op_e o, logic [31:0] x, int k);
    for (int i = 0; i < k; i++)
      case (o)
        SHF_SLL: x = {x[30:0], 1'b0};
        SHF_SRL: x = {1'b0, x[31:1]};
        default: x = {x[31], x[31:1]};
      endcase
    return x;
  endfunction

  initial begin
    for (int o = 0; o < 3; o++)
      for (int k = 0; k < 32; k++)
        for (int r = 0; r < 60; r++) begin
          op = shf_op_e'(o); cnt = 5'(k);
          a = (r == 0) ? 32'h8000_0001 : (r == 1) ? 32'h7FFF_FFFF : $urandom;
          #1;
          checks++;
          if (result !== ref_shift(op, a, k)) begin
            failures++;
            $display("FAIL %s %h by %0d: got %h expected %h", op.name(), a, k, result,
                     ref_shift(op, a, k));
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
