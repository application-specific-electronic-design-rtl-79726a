// tb_sparc_alu -- self-checking testbench of the ALU.
//
// Drives every operation with random and corner-case operands and compares
// the result and the N Z V C flags with a reference computed in 64-bit
// integer arithmetic from the SPARC V8 definitions (carry out of bit 31 for
// additions, borrow for subtractions, V and C zero for logic operations),
// and the tag error output with the low two bits of the operands. The ALU is
// combinational; outputs are sampled 1 ns after the inputs change.
//
// The programs, stimulus and reference values are this testbench's own;
// the behaviour they check is the one described in the module's header.
module tb_sparc_alu;
  import sparc_pkg::*;
  alu_op_e     op;
  logic [31:0] a, b, result;
  logic        cin, nxv, y0, n, z, v, c, tag_err;

  sparc_alu dut (.op(op), .a(a), .b(b), .cin(cin), .n_xor_v(nxv), .y0(y0),
                 .result(result), .n(n), .z(z), .v(v), .c(c), .tag_err(tag_err));

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_one();
    longint unsigned ua, ub, s;
    logic [31:0] er;
    logic ev, ec;
    logic [31:0] x, y;
    bit arith, is_sub;
    x = a; y = b; arith = 1; is_sub = 0;
    case (op)
      ALU_ADD:  ;
      ALU_ADDC: ;
      ALU_SUB:  is_sub = 1;
      ALU_SUBC: is_sub = 1;
      ALU_INC:  y = 32'd1;
      ALU_DEC:  begin y = 32'd1; is_sub = 1; end
      ALU_MULS: begin x = {nxv, a[31:1]}; y = y0 ? b : 32'd0; end
      default:  arith = 0;
    endcase
    ua = longint'(x); ub = longint'(y);
    if (arith && !is_sub) begin
      s  = ua + ub + ((op == ALU_ADDC) ? longint'(cin) : 0);
      er = s[31:0];
      ec = s[32];
      ev = (x[31] == y[31]) && (er[31] != x[31]);
    end else if (arith) begin
      s  = ua - ub - ((op == ALU_SUBC) ? longint'(cin) : 0);
      er = s[31:0];
      ec = (ua < ub + ((op == ALU_SUBC) ? longint'(cin) : 0));
      ev = (x[31] != y[31]) && (er[31] != x[31]);
    end else begin
      case (op)
        ALU_AND:  er = a & b;
        ALU_OR:   er = a | b;
        ALU_XOR:  er = a ^ b;
        ALU_ANDN: er = a & ~b;
        ALU_ORN:  er = a | ~b;
        default:  er = ~(a ^ b);
      endcase
      ec = 0; ev = 0;
    end
    #1;
    checks++;
    if (result !== er || n !== er[31] || z !== (er == 0) || v !== ev || c !== ec ||
        tag_err !== ((a[1:0] != 0) || (b[1:0] != 0))) begin
      failures++;
      $display("FAIL %s a=%h b=%h cin=%b: got %h nzvc=%b%b%b%b expected %h nzvc=%b%b%b%b",
               op.name(), a, b, cin, result, n, z, v, c, er, er[31], er == 0, ev, ec);
    end
  endtask

  localparam logic [31:0] CORNER [6] = '{32'h0, 32'h1, 32'h7FFF_FFFF, 32'h8000_0000,
                                         32'hFFFF_FFFF, 32'h8000_0001};
  initial begin
    for (int o = 0; o <= int'(ALU_MULS); o++) begin
      op = alu_op_e'(o);
      foreach (CORNER[i]) foreach (CORNER[j]) for (int k = 0; k < 2; k++) begin
        a = CORNER[i]; b = CORNER[j]; cin = k[0]; nxv = k[0]; y0 = ~k[0];
        run_one();
      end
      for (int r = 0; r < 2000; r++) begin
        a = $urandom; b = $urandom; cin = 1'($urandom); nxv = 1'($urandom); y0 = 1'($urandom);
        run_one();
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
