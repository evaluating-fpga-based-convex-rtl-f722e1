// fp64_to_fix: cast of an IEEE-754 binary64 value to a signed fixed-point
// number of W bits with I integer bits (sign included) and B = W - I
// fractional bits, the ap_fixed<W, I> layout.
//
// Combinational. Quantization truncates toward minus infinity and overflow
// wraps around: the two default modes the document names for the
// arbitrary-precision types. The value is m * 2^(e-1075); the significand is
// shifted by e - 1075 + B, the bits shifted out make a negative result one
// LSB more negative, and the low W bits are kept. Zero, subnormal, infinite
// and NaN inputs give 0 (a choice of this design; the solver's data are
// finite).
module fp64_to_fix
  import accel_pkg::*;
#(
  parameter int W = 39,
  parameter int I = 5
) (
  input  fp64_t        a,
  output logic [W-1:0] y
);

  localparam int B  = W - I;
  localparam int XW = W + 54;

  logic [10:0]    e;
  logic [52:0]    m;
  int             sh;
  logic [XW-1:0]  mag;
  logic           lost;
  logic [W-1:0]   mw;

  always_comb begin
    e    = a[62:52];
    m    = {1'b1, a[51:0]};
    sh   = int'(e) - 1075 + B;
    mag  = '0;
    lost = 1'b0;
    if (sh >= W) begin
      mag = '0;                                  // only bits above W remain: wraps to 0
    end else if (sh >= 0) begin
      mag = XW'(m) << sh;
    end else if (sh > -54) begin
      mag  = XW'(m >> (-sh));
      lost = ((m & ((53'd1 << (-sh)) - 53'd1)) != 53'd0);
    end else begin
      mag  = '0;
      lost = 1'b1;
    end
    mw = mag[W-1:0];
    if (e == 11'd0 || e == 11'h7FF)
      y = '0;
    else if (a[63])
      y = -(mw + W'(lost));
    else
      y = mw;
  end

endmodule
