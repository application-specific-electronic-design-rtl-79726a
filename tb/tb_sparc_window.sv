// tb_sparc_window -- self-checking testbench of the window pointer unit.
//
// For every current window, both directions and every window invalid mask,
// checks the new window number (modulo the number of windows), the selected
// mask bit and the invalid flag that raises a window overflow or underflow.
// Combinational; sampled 1 ns after the inputs.
//
// The programs, stimulus and reference values are this testbench's own;
// the behaviour they check is the one described in the module's header.
module tb_sparc_window;
  localparam int NW = 4;
  logic [1:0]    cwp, new_cwp;
  logic          inc, invalid;
  logic [NW-1:0] wim, mask;
  sparc_window #(.NWINDOWS(NW)) dut (.cwp(cwp), .inc(inc), .wim(wim), .new_cwp(new_cwp),
                                     .mask(mask), .invalid(invalid));

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

  initial begin
    for (int w = 0; w < NW; w++)
      for (int d = 0; d < 2; d++)
        for (int m = 0; m < (1 << NW); m++) begin
          int nw;
          cwp = 2'(w); inc = d[0]; wim = NW'(m);
          nw = d ? (w + 1) % NW : (w + NW - 1) % NW;
          #1;
          checks++;
          if (new_cwp !== 2'(nw) || mask !== (wim & NW'(1 << nw)) || invalid !== wim[nw]) begin
            failures++;
            $display("FAIL cwp=%0d inc=%0d wim=%b: new=%0d mask=%b invalid=%b", w, d, wim,
                     new_cwp, mask, invalid);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
