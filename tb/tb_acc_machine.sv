// tb_acc_machine -- self-checking testbench of the accumulator machine.
//
// Runs a program that uses all eight instructions: it loads a negative
// number, adds to it until it is no longer negative (brn loop), shifts,
// adds and masks it, stores the result, jumps over a poison word and halts.
// Instructions executed are counted per opcode, the final memory and
// accumulator are compared with values computed in the testbench, and the
// cycle counts of a 3-cycle (shr) and a 5-cycle (add) instruction are
// checked.
//
// The programs, stimulus and reference values are this testbench's own;
// the behaviour they check is the one described in the module's header.
module tb_acc_machine;
  localparam int W = 16, OPW = 3, AW = W - OPW;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst;
  logic req, we, ack, halted;
  logic [AW-1:0] addr, pc;
  logic [W-1:0]  wdata, rdata, ac;

  acc_machine #(.WORD_W(W), .OP_W(OPW)) dut (
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

  function automatic logic [W-1:0] ins(input int op, input int a);
    return {OPW'(op), AW'(a)};
  endfunction

  int count [8];
  int fetch_cycle [int];
  always @(posedge clk)
    if (!rst && dut.state == dut.S_EXEC) begin
      count[dut.opcode]++;
      fetch_cycle[int'(pc) - 1] = cycle;
    end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [W-1:0] a, expect_ac;
    int loops;
    rst = 1'b1;
    for (int i = 0; i < 256; i++) u_mem.m[i] = '0;
    // data
    u_mem.m[100] = 16'hF123;   // negative start value
    u_mem.m[101] = 16'd7;
    u_mem.m[102] = 16'h00FF;
    u_mem.m[105] = 16'h0400;
    // program
    u_mem.m[0] = ins(4, 100);  // load 100
    u_mem.m[1] = ins(1, 105);  // loop: add 105
    u_mem.m[2] = ins(7, 1);    // brn loop
    u_mem.m[3] = ins(3, 0);    // shr
    u_mem.m[4] = ins(1, 101);  // add 101
    u_mem.m[5] = ins(2, 102);  // and 102
    u_mem.m[6] = ins(5, 103);  // stor 103
    u_mem.m[7] = ins(6, 9);    // jump 9
    u_mem.m[8] = ins(5, 104);  // poison: stor 104 (skipped)
    u_mem.m[9] = ins(0, 0);    // halt
    u_mem.m[104] = 16'h1234;

    // reference computation
    a = 16'hF123; loops = 0;
    do begin a = a + 16'sh0400; loops++; end while (a < 0 && loops < 100);
    a = a >>> 1;
    expect_ac = (a + 16'sd7) & 16'sh00FF;

    repeat (2) @(posedge clk);
    rst = 1'b0;
    wait (halted);
    repeat (3) @(posedge clk);
    check("ac", int'(ac), int'(expect_ac));
    check("stored result", int'(u_mem.m[103]), int'(expect_ac));
    check("poison word untouched", int'(u_mem.m[104]), 16'h1234);
    check("halt pc", int'(pc), 10);
    check("shr count", count[3], 1);
    check("brn count", count[7], loops);
    check("load count", count[4], 1);
    check("add count", count[1], loops + 1);
    check("and count", count[2], 1);
    check("stor count", count[5], 1);
    check("jump count", count[6], 1);
    check("halt count", count[0], 1);
    check("shr latency", fetch_cycle[4] - fetch_cycle[3], 3);
    check("add latency", fetch_cycle[5] - fetch_cycle[4], 5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
