// sparc_window -- register-window pointer arithmetic and window check.
//
// Combinational. Computes the next window pointer, cwp - 1 (save, trap entry)
// or cwp + 1 (restore, rett), modulo NWINDOWS; with NWINDOWS a power of two
// this is a plain counter of the right width, so no wrap-around test is
// needed. It then forms the one-hot mask of the new window (1 << new_cwp)
// and ANDs it with the window invalid mask wim; a non-zero result (invalid)
// means the new window may not be used, which causes a window overflow
// (save) or underflow (restore, rett) trap.
//
// Interface: cwp, inc, wim in; new_cwp, mask, invalid out; no clock. The
// modulo window arithmetic and the mask test follow the specification's
// save/restore/rett routines; the mask is combined with wim by AND, which
// is how the specification's prose describes the test, and requiring
// NWINDOWS to be a power of two is this design's choice.
module sparc_window #(
  parameter int unsigned NWINDOWS = sparc_pkg::NWINDOWS_DEFAULT,
  localparam int unsigned CWPW    = (NWINDOWS > 1) ? $clog2(NWINDOWS) : 1
) (
  input  logic [CWPW-1:0]     cwp,
  input  logic                inc,       // 1: cwp + 1, 0: cwp - 1
  input  logic [NWINDOWS-1:0] wim,
  output logic [CWPW-1:0]     new_cwp,
  output logic [NWINDOWS-1:0] mask,      // (1 << new_cwp) & wim
  output logic                invalid
);
  assign new_cwp = inc ? cwp + 1'b1 : cwp - 1'b1;
  assign mask    = (NWINDOWS'(1) << new_cwp) & wim;
  assign invalid = (mask != '0);
endmodule
