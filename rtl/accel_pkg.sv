// accel_pkg: types, constants and small helpers shared by the accelerator cores.
//
// The cores exchange data with the processor over two kinds of AXI4-Stream:
// 32-bit words for integer arrays (C int) and 64-bit words for IEEE-754
// binary64 arrays (C double). Control goes through an AXI4-Lite register bank
// with the usual high-level-synthesis layout: ap_start/ap_done/ap_idle/ap_ready
// at 0x00, interrupt enables at 0x04..0x0C, scalar arguments from 0x10 up.
// Offsets and the bit positions inside 0x00 are this design's choice.
package accel_pkg;

  typedef logic        [63:0] fp64_t;   // IEEE-754 binary64 bit pattern
  typedef logic signed [31:0] idx_t;    // integer array element

  // AXI4-Lite register offsets (byte addresses)
  localparam logic [7:0] REG_CTRL = 8'h00;
  localparam logic [7:0] REG_GIE  = 8'h04;
  localparam logic [7:0] REG_IER  = 8'h08;
  localparam logic [7:0] REG_ISR  = 8'h0C;
  localparam logic [7:0] REG_ARG0 = 8'h10;

  // bits of REG_CTRL
  localparam int CTRL_START        = 0;
  localparam int CTRL_DONE         = 1;
  localparam int CTRL_IDLE         = 2;
  localparam int CTRL_READY        = 3;
  localparam int CTRL_AUTO_RESTART = 7;

  localparam fp64_t FP64_ZERO = 64'h0;

  // sign flip of a binary64 value
  function automatic fp64_t fp64_neg(input fp64_t a);
    return {~a[63], a[62:0]};
  endfunction

  function automatic logic fp64_is_nan(input fp64_t a);
    return (a[62:52] == 11'h7FF) && (a[51:0] != 52'h0);
  endfunction

  // a <= b for binary64 (false when either is NaN, +0 == -0)
  function automatic logic fp64_le(input fp64_t a, input fp64_t b);
    logic both_zero;
    both_zero = (a[62:0] == 63'h0) && (b[62:0] == 63'h0);
    if (fp64_is_nan(a) || fp64_is_nan(b)) return 1'b0;
    if (both_zero)                        return 1'b1;
    if (a[63] != b[63])                   return a[63];            // negative <= positive
    if (!a[63])                           return a[62:0] <= b[62:0];
    return a[62:0] >= b[62:0];                                     // both negative
  endfunction

endpackage
