// fp64_mul: IEEE-754 binary64 multiplier, y = a * b.
//
// Purely combinational: a 53 x 53 bit significand product, one-bit
// normalization and round to nearest, ties to even. Subnormal inputs are
// read as zero and results below the normal range are flushed to signed
// zero; overflow gives infinity, 0 * inf and NaN inputs give the quiet NaN.
// The document asks for double-precision multiplication in the
// matrix-vector and factorization loops; the structure is this design's
// choice.
module fp64_mul
  import accel_pkg::*;
(
  input  fp64_t a,
  input  fp64_t b,
  output fp64_t y
);

  localparam fp64_t QNAN = 64'h7FF8_0000_0000_0000;

  logic         s;
  logic [10:0]  ea, eb;
  logic         a_zero, b_zero, a_spec, b_spec;
  logic [105:0] p;
  logic [52:0]  m;
  logic         g, st, rnd;
  logic [53:0]  mr;
  logic signed [13:0] e;

  always_comb begin
    s = a[63] ^ b[63];
    ea = a[62:52];
    eb = b[62:52];
    a_zero = (ea == 11'd0);
    b_zero = (eb == 11'd0);
    a_spec = (ea == 11'h7FF);
    b_spec = (eb == 11'h7FF);
    p = {53'd0, 1'b1, a[51:0]} * {53'd0, 1'b1, b[51:0]};
    e = $signed({3'b0, ea}) + $signed({3'b0, eb}) - 14'sd1023;
    if (p[105]) begin
      m  = p[105:53];
      g  = p[52];
      st = (p[51:0] != 52'd0);
      e  = e + 14'sd1;
    end else begin
      m  = p[104:52];
      g  = p[51];
      st = (p[50:0] != 51'd0);
    end
    rnd = g & (st | m[0]);
    mr  = {1'b0, m} + {53'd0, rnd};
    if (mr[53]) begin
      mr = mr >> 1;
      e  = e + 14'sd1;
    end

    if ((a_spec && a[51:0] != 0) || (b_spec && b[51:0] != 0))
      y = QNAN;
    else if ((a_spec && b_zero) || (b_spec && a_zero))
      y = QNAN;
    else if (a_spec || b_spec)
      y = {s, 11'h7FF, 52'd0};
    else if (a_zero || b_zero)
      y = {s, 63'd0};
    else if (e >= 14'sd2047)
      y = {s, 11'h7FF, 52'd0};
    else if (e <= 14'sd0)
      y = {s, 63'd0};
    else
      y = {s, e[10:0], mr[51:0]};
  end

endmodule
