// tb_sparc_trap_prio -- self-checking testbench of the trap priority encoder.
//
// Sets random subsets of the trap condition flags (plus the flags that are
// no trap conditions: annul, execute_mode, error_mode, ...) and checks that
// the trap type chosen is that of the highest-priority condition set, with
// the SPARC V8 priorities and trap types written out as a table here; a
// trap instruction gives 0x80 + its number, an interrupt 0x10 + its level,
// and nothing pending gives any = 0. Combinational; sampled 1 ns after the
// inputs.
//
// The programs, stimulus and reference values are this testbench's own;
// the behaviour they check is the one described in the module's header.
module tb_sparc_trap_prio;
  import sparc_pkg::*;
  pflags_t    p;
  logic [3:0] il;
  logic [6:0] ticc;
  logic [7:0] tt;
  logic       any;
  sparc_trap_prio dut (.p(p), .interrupt_level(il), .ticc_trap_type(ticc), .tt(tt), .any(any));

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

  // (priority order, highest first) trap type of each condition
  localparam logic [7:0] ORDER_TT [19] = '{8'h2B, 8'h21, 8'h20, 8'h01, 8'h03, 8'h02, 8'h04,
                                            8'h24, 8'h25, 8'h05, 8'h06, 8'h07, 8'h08, 8'h28,
                                            8'h29, 8'h09, 8'h0A, 8'h2A, 8'h80};

  function automatic logic flag_of(pflags_t f, int k);
    case (k)
      0: return f.data_store_error;            1: return f.instruction_access_error;
      2: return f.r_register_access_error;     3: return f.instruction_access_exception;
      4: return f.privileged_instruction;      5: return f.illegal_instruction;
      6: return f.fp_disabled;                 7: return f.cp_disabled;
      8: return f.unimplemented_flush;         9: return f.window_overflow;
      10: return f.window_underflow;           11: return f.mem_address_not_aligned;
      12: return f.fp_exception;               13: return f.cp_exception;
      14: return f.data_access_error;          15: return f.data_access_exception;
      16: return f.tag_overflow;               17: return f.division_by_zero;
      default: return f.trap_instruction;
    endcase
  endfunction

  initial begin
    for (int r = 0; r < 6000; r++) begin
      logic [7:0] ett;
      logic eany;
      p = pflags_t'($urandom);
      // make sparse sets common so that every level gets to be the highest
      if (r % 3 != 0) p = p & pflags_t'($urandom) & pflags_t'($urandom) & pflags_t'($urandom);
      if (r % 5 == 0) p = pflags_t'(0);
      il = 4'($urandom); ticc = 7'($urandom);
      eany = 0; ett = 8'h00;
      for (int k = 0; k < 19; k++)
        if (flag_of(p, k)) begin
          eany = 1;
          ett = (k == 18) ? (8'h80 + 8'(ticc)) : ORDER_TT[k];
          break;
        end
      if (!eany && il != 0) begin eany = 1; ett = 8'h10 + 8'(il); end
      #1;
      checks++;
      if (any !== eany || (eany && tt !== ett)) begin
        failures++;
        $display("FAIL p=%h il=%0d: got any=%b tt=%h expected any=%b tt=%h", p, il, any, tt,
                 eany, ett);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
