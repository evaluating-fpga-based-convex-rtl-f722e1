// fp64_addsub: IEEE-754 binary64 adder/subtractor, y = a + b or a - b.
//
// Purely combinational; the cores register the result in the state that
// uses it. Round to nearest, ties to even. Subnormal inputs are read as zero
// and results below the normal range are flushed to signed zero (the
// solver's values stay well inside the normal range). Overflow gives
// infinity; NaN or inf - inf gives the quiet NaN 0x7FF8_0000_0000_0000.
// The document only requires double-precision arithmetic in the IP cores;
// the structure (swap, align with sticky bit, add, normalize, round) is this
// design's choice.
module fp64_addsub
  import accel_pkg::*;
(
  input  fp64_t a,
  input  fp64_t b,
  input  logic  sub,   // 1: y = a - b
  output fp64_t y
);

  localparam fp64_t QNAN = 64'h7FF8_0000_0000_0000;

  logic        sa, sb, sx, sy;
  logic [10:0] ea, eb, ex, ey;
  logic [52:0] ma, mb, mx, my;
  logic        a_zero, b_zero, a_spec, b_spec;
  logic [12:0] d;
  logic [55:0] mx_e, my_e;          // mantissa plus guard, round, sticky
  logic [56:0] s;                    // raw sum
  logic [55:0] n;                    // normalized
  logic signed [13:0] e;
  logic [5:0]  lz;
  logic        rnd;
  logic [53:0] mr;
  logic signed [13:0] er;
  logic        eff_sub;

  always_comb begin
    sa = a[63];
    sb = b[63] ^ sub;
    ea = a[62:52];
    eb = b[62:52];
    a_zero = (ea == 11'd0);
    b_zero = (eb == 11'd0);
    a_spec = (ea == 11'h7FF);
    b_spec = (eb == 11'h7FF);
    ma = a_zero ? 53'd0 : {1'b1, a[51:0]};
    mb = b_zero ? 53'd0 : {1'b1, b[51:0]};

    // order operands so that |x| >= |y|
    if ({eb, mb} > {ea, ma}) begin
      sx = sb; ex = eb; mx = mb;
      sy = sa; ey = ea; my = ma;
    end else begin
      sx = sa; ex = ea; mx = ma;
      sy = sb; ey = eb; my = mb;
    end
    eff_sub = sx ^ sy;

    // align the smaller operand, folding shifted-out bits into the sticky bit
    d    = {2'b0, ex} - {2'b0, ey};
    mx_e = {mx, 3'b000};
    if (d >= 13'd56)
      my_e = {55'd0, (my != 53'd0)};
    else begin
      my_e = {my, 3'b000} >> d;
      if ((({my, 3'b000} & ((56'd1 << d) - 56'd1))) != 56'd0) my_e[0] = 1'b1;
    end

    s = eff_sub ? ({1'b0, mx_e} - {1'b0, my_e}) : ({1'b0, mx_e} + {1'b0, my_e});
    e = {3'b0, ex};

    // normalize to a leading one at bit 55
    if (s[56]) begin
      n = s[56:1];
      n[0] = s[1] | s[0];
      e = e + 14'sd1;
      lz = '0;
    end else begin
      lz = 6'd0;
      for (int i = 55; i >= 0; i--) begin
        if (s[i]) break;
        lz = lz + 6'd1;
      end
      n = s[55:0] << lz;
      e = e - {8'd0, lz};
    end

    // round to nearest even: n[55:3] mantissa, n[2] guard, n[1:0] round|sticky
    rnd = n[2] & (n[1] | n[0] | n[3]);
    mr  = {1'b0, n[55:3]} + {53'd0, rnd};
    er  = e;
    if (mr[53]) begin
      mr = mr >> 1;
      er = er + 14'sd1;
    end

    // result selection
    if (a_spec || b_spec) begin
      if ((a_spec && a[51:0] != 0) || (b_spec && b[51:0] != 0))
        y = QNAN;
      else if (a_spec && b_spec && (sa != sb))
        y = QNAN;
      else if (a_spec)
        y = {sa, 11'h7FF, 52'd0};
      else
        y = {sb, 11'h7FF, 52'd0};
    end else if (a_zero && b_zero) begin
      y = {sa & sb, 63'd0};
    end else if (s == 57'd0) begin
      y = FP64_ZERO;                         // exact cancellation gives +0
    end else if (er >= 14'sd2047) begin
      y = {sx, 11'h7FF, 52'd0};
    end else if (er <= 14'sd0) begin
      y = {sx, 63'd0};
    end else begin
      y = {sx, er[10:0], mr[51:0]};
    end
  end

endmodule
