// tb_acc_workload -- the accumulator machine running the artificial
// instruction mix: add 25, and 15, load 20, stor 10, brn 18, shr 6, jump 5,
// halt 1 (100 instructions executed).
//
// The testbench builds a straight-line program with exactly these counts in
// a shuffled order (jump targets the next word, brn is taken to the next word
// or falls through, with the accumulator kept small), runs it on the machine
// and on a reference interpreter written here, and compares the accumulator,
// the data area and the number of instructions of each kind. It also checks
// the total run time against the latencies of this implementation: 5 cycles
// for add/and/load/stor, 3 for brn/shr/jump, 3 from the start of halt's
// fetch to halted, i.e. 440 cycles or 4.40 cycles per instruction.
//
// The programs, stimulus and reference values are this testbench's own;
// the behaviour they check is the one described in the module's header.
module tb_acc_workload;
  localparam int W = 16, OPW = 3, AW = W - OPW;
  localparam int DATA = 200;   // data area base
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst;
  logic req, we, ack, halted;
  logic [AW-1:0] addr, pc;
  logic [W-1:0]  wdata, rdata, ac;

  acc_machine dut (
    .clk(clk), .rst(rst), .mem_req(req), .mem_we(we), .mem_addr(addr),
    .mem_wdata(wdata), .mem_ack(ack), .mem_rdata(rdata), .halted(halted),
    .pc_o(pc), .ac_o(ac)
  );
  acc_mem_model #(.WORD_W(W), .ADDR_W(AW), .WORDS(256)) u_mem (
    .clk(clk), .req(req), .we(we), .addr(addr), .wdata(wdata), .ack(ack), .rdata(rdata)
  );

  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;
  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  int count [8];
  always @(posedge clk)
    if (!rst && dut.state == dut.S_EXEC) count[dut.opcode]++;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // opcodes in listing order
  localparam int HALT = 0, ADD = 1, AND = 2, SHR = 3, LOAD = 4, STOR = 5, JUMP = 6, BRN = 7;
  localparam int MIX [8] = '{1, 25, 15, 6, 20, 10, 5, 18};

  initial begin
    int ops [$];
    logic [W-1:0] prog [100];
    logic [W-1:0] rmem [256];
    logic signed [W-1:0] rac;
    int rpc, steps, start, elapsed;
    rst = 1'b1;
    for (int k = 1; k < 8; k++) for (int i = 0; i < MIX[k]; i++) ops.push_back(k);
    ops.shuffle();
    ops.push_back(HALT);
    for (int i = 0; i < 100; i++) begin
      int a;
      case (ops[i])
        ADD, AND, LOAD: a = DATA + $urandom_range(0, 15);
        STOR:           a = DATA + 16 + $urandom_range(0, 15);
        JUMP, BRN:      a = i + 1;
        default:        a = 0;
      endcase
      prog[i] = {OPW'(ops[i]), AW'(a)};
    end
    for (int i = 0; i < 256; i++) u_mem.m[i] = '0;
    for (int i = 0; i < 100; i++) u_mem.m[i] = prog[i];
    // operands: small positive values, and masks that keep ac non-negative
    for (int i = 0; i < 16; i++) u_mem.m[DATA + i] = W'($urandom_range(0, 200));
    u_mem.m[DATA + 15] = 16'h7FF0;
    for (int i = 0; i < 256; i++) rmem[i] = u_mem.m[i];

    // reference interpreter
    rac = '0; rpc = 0; steps = 0;
    while (steps < 1000) begin
      logic [W-1:0] iw;
      int o, a;
      iw = rmem[rpc]; o = int'(iw[W-1 -: OPW]); a = int'(iw[AW-1:0]);
      rpc++; steps++;
      if (o == HALT) break;
      case (o)
        ADD:  rac = rac + rmem[a];
        AND:  rac = rac & rmem[a];
        SHR:  rac = rac >>> 1;
        LOAD: rac = rmem[a];
        STOR: rmem[a] = rac;
        JUMP: rpc = a;
        default: if (rac < 0) rpc = a;
      endcase
    end

    repeat (2) @(posedge clk);
    rst = 1'b0;
    start = cycle;
    wait (halted);
    elapsed = cycle - start;
    repeat (2) @(posedge clk);
    check("instructions executed", steps, 100);
    check("ac", int'(ac), int'(rac));
    for (int i = DATA + 16; i < DATA + 32; i++)
      check($sformatf("data word %0d", i), int'(u_mem.m[i]), int'(rmem[i]));
    for (int k = 0; k < 8; k++) check($sformatf("count of opcode %0d", k), count[k], MIX[k]);
    check("total cycles", elapsed, 70 * 5 + 29 * 3 + 3);
    $display("cycles %0d for 100 instructions: CPI %0d.%02d", elapsed, elapsed / 100, elapsed % 100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
