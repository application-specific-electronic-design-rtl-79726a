// tb_sparc_regfile -- self-checking testbench of the windowed register file.
//
// Keeps its own model of the register file: 7 globals and, for every window
// w, 8 locals and 8 ins of its own, with the outs of window w being the ins of
// window w-1 (modulo the number of windows). Random writes through the write
// port and random reads through both read ports are compared with the model,
// and a directed test checks the in/out overlap and that r0 reads zero.
// Reads are combinational; a write shows on the read ports after the clock
// edge.
//
// The programs, stimulus and reference values are this testbench's own;
// the behaviour they check is the one described in the module's header.
module tb_sparc_regfile;
  localparam int NW = 4;
  localparam int CW = $clog2(NW);
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [4:0]    r1_addr, r2_addr, w_addr;
  logic [CW-1:0] r1_cwp, r2_cwp, w_cwp;
  logic [31:0]   r1_data, r2_data, w_data;
  logic          w_en;

  sparc_regfile #(.NWINDOWS(NW)) dut (
    .clk(clk), .r1_addr(r1_addr), .r1_cwp(r1_cwp), .r1_data(r1_data),
    .r2_addr(r2_addr), .r2_cwp(r2_cwp), .r2_data(r2_data),
    .w_en(w_en), .w_addr(w_addr), .w_cwp(w_cwp), .w_data(w_data)
  );

  int checks = 0, failures = 0;
  // model: globals, and per window its locals and its ins; outs of window w
  // are the ins of window (w-1) mod NW
  logic [31:0] glob [8];
  logic [31:0] locals [NW][8];
  logic [31:0] ins [NW][8];

  function automatic logic [31:0] model_read(int w, int n);
    if (n == 0) return 32'd0;
    if (n < 8) return glob[n];
    if (n < 16) return ins[(w + NW - 1) % NW][n - 8];
    if (n < 24) return locals[w][n - 16];
    return ins[w][n - 24];
  endfunction

  task automatic model_write(int w, int n, logic [31:0] v);
    if (n == 0) return;
    if (n < 8) glob[n] = v;
    else if (n < 16) ins[(w + NW - 1) % NW][n - 8] = v;
    else if (n < 24) locals[w][n - 16] = v;
    else ins[w][n - 24] = v;
  endtask

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    w_en = 1'b0; w_addr = '0; w_cwp = '0; w_data = '0;
    r1_addr = '0; r1_cwp = '0; r2_addr = '0; r2_cwp = '0;
    // fill every register once so that the model is defined
    for (int w = 0; w < NW; w++)
      for (int n = 1; n < 32; n++) begin
        @(negedge clk);
        w_en = 1'b1; w_cwp = CW'(w); w_addr = 5'(n); w_data = $urandom;
        model_write(w, n, w_data);
      end
    @(negedge clk);
    w_en = 1'b0;
    // directed: outs of window 2 are the ins of window 1
    @(negedge clk);
    w_en = 1'b1; w_cwp = 2; w_addr = 10; w_data = 32'hCAFE_0010;
    model_write(2, 10, w_data);
    @(negedge clk);
    w_en = 1'b0;
    r1_cwp = 1; r1_addr = 26;
    r2_cwp = 2; r2_addr = 10;
    #1 check("out of w2 = in of w1", r1_data, 32'hCAFE_0010);
    check("out of w2 direct", r2_data, 32'hCAFE_0010);
    // wrap-around: outs of window 0 are the ins of window NW-1
    @(negedge clk);
    w_en = 1'b1; w_cwp = 0; w_addr = 15; w_data = 32'h1234_5678;
    model_write(0, 15, w_data);
    @(negedge clk);
    w_en = 1'b0; r1_cwp = CW'(NW - 1); r1_addr = 31;
    #1 check("out of w0 = in of w3", r1_data, 32'h1234_5678);
    // r0
    @(negedge clk);
    w_en = 1'b1; w_cwp = 1; w_addr = 0; w_data = 32'hFFFF_FFFF;
    @(negedge clk);
    w_en = 1'b0; r1_addr = 0; r1_cwp = 1;
    #1 check("r0 reads zero", r1_data, 32'd0);
    // random
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      w_en   = ($urandom_range(0, 3) != 0);
      w_cwp  = CW'($urandom); w_addr = 5'($urandom); w_data = $urandom;
      if (w_en) model_write(int'(w_cwp), int'(w_addr), w_data);
      @(negedge clk);
      w_en = 1'b0;
      r1_cwp = CW'($urandom); r1_addr = 5'($urandom);
      r2_cwp = CW'($urandom); r2_addr = 5'($urandom);
      #1;
      check($sformatf("r1 w%0d r%0d", r1_cwp, r1_addr), r1_data, model_read(int'(r1_cwp), int'(r1_addr)));
      check($sformatf("r2 w%0d r%0d", r2_cwp, r2_addr), r2_data, model_read(int'(r2_cwp), int'(r2_addr)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
