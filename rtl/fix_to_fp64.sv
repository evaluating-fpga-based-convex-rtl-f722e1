// fix_to_fp64: cast of a signed fixed-point number (W bits, I integer bits,
// B = W - I fractional bits, the ap_fixed<W, I> layout) to IEEE-754 binary64.
//
// Combinational: magnitude, leading-one search, normalization, round to
// nearest with ties to even when more than 53 significant bits are present
// (the rounding mode is this design's choice; the document only states that
// the cast is done inside the IP core). Zero gives +0.
module fix_to_fp64
  import accel_pkg::*;
#(
  parameter int W = 78,
  parameter int I = 10
) (
  input  logic [W-1:0] a,
  output fp64_t        y
);

  localparam int B  = W - I;
  localparam int NW = W + 56;

  logic          s;
  logic [W-1:0]  mag;
  int            lz;
  logic [NW-1:0] nrm;
  logic [52:0]   m;
  logic          g, st, rnd;
  logic [53:0]   mr;
  int            e;

  always_comb begin
    s   = a[W-1];
    mag = s ? -a : a;
    lz  = W;
    for (int i = 0; i < W; i++)
      if (mag[i]) lz = W - 1 - i;
    nrm = {mag, 56'd0} << lz;
    m   = nrm[NW-1 -: 53];
    g   = nrm[NW-54];
    st  = (nrm[NW-55:0] != '0);
    rnd = g & (st | m[0]);
    mr  = {1'b0, m} + {53'd0, rnd};
    e   = (W - 1 - lz) - B + 1023;
    if (mr[53]) begin
      mr = mr >> 1;
      e  = e + 1;
    end
    if (mag == '0)
      y = FP64_ZERO;
    else
      y = {s, e[10:0], mr[51:0]};
  end

endmodule
