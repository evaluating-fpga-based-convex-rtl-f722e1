// fp64_div: IEEE-754 binary64 divider, y = a / b, one quotient bit per cycle.
//
// A start pulse captures the operands; the significand quotient is formed by
// restoring division, 56 bits (53 + guard + round + one spare), then rounded
// to nearest, ties to even, with the final remainder as sticky bit. done
// pulses for one cycle, 58 cycles after the start cycle, and y holds the result until
// the next start. Subnormal inputs are read as zero and underflow is flushed
// to signed zero; x/0 gives infinity, 0/0, inf/inf and NaN give the quiet
// NaN. The document needs the division l_ki = y_i / d_ii of the LDL^T
// factorization; the iterative structure is this design's choice.
module fp64_div
  import accel_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  fp64_t a,
  input  fp64_t b,
  output logic  busy,
  output logic  done,
  output fp64_t y
);

  localparam fp64_t QNAN = 64'h7FF8_0000_0000_0000;
  localparam int    QB   = 56;

  logic        s_q;
  logic signed [13:0] e_q;
  logic [54:0] rem_q;       // partial remainder, < 2 * divisor
  logic [52:0] div_q;       // divisor significand
  logic [QB-1:0] quo_q;
  logic [5:0]  cnt_q;
  logic [1:0]  special_q;   // 0: normal, 1: zero, 2: inf, 3: NaN

  // final rounding (combinational on the finished quotient)
  logic [52:0] m;
  logic        g, st, rnd;
  logic [53:0] mr;
  logic signed [13:0] e_r;
  fp64_t       y_d;

  always_comb begin
    st = (rem_q != 55'd0);
    e_r = e_q;
    if (quo_q[QB-1]) begin
      m  = quo_q[QB-1 -: 53];
      g  = quo_q[2];
      st = st | quo_q[1] | quo_q[0];
    end else begin
      m  = quo_q[QB-2 -: 53];
      g  = quo_q[1];
      st = st | quo_q[0];
      e_r = e_r - 14'sd1;
    end
    rnd = g & (st | m[0]);
    mr  = {1'b0, m} + {53'd0, rnd};
    if (mr[53]) begin
      mr  = mr >> 1;
      e_r = e_r + 14'sd1;
    end
    case (special_q)
      2'd1:    y_d = {s_q, 63'd0};
      2'd2:    y_d = {s_q, 11'h7FF, 52'd0};
      2'd3:    y_d = QNAN;
      default: begin
        if (e_r >= 14'sd2047)   y_d = {s_q, 11'h7FF, 52'd0};
        else if (e_r <= 14'sd0) y_d = {s_q, 63'd0};
        else                    y_d = {s_q, e_r[10:0], mr[51:0]};
      end
    endcase
  end

  logic [10:0] ea, eb;
  logic a_zero, b_zero, a_inf, b_inf, a_nan, b_nan;
  always_comb begin
    ea = a[62:52];
    eb = b[62:52];
    a_zero = (ea == 0);
    b_zero = (eb == 0);
    a_inf  = (ea == 11'h7FF) && (a[51:0] == 0);
    b_inf  = (eb == 11'h7FF) && (b[51:0] == 0);
    a_nan  = (ea == 11'h7FF) && (a[51:0] != 0);
    b_nan  = (eb == 11'h7FF) && (b[51:0] != 0);
  end

  logic [54:0] trial;
  always_comb trial = rem_q - {2'b0, div_q};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      y    <= FP64_ZERO;
      s_q  <= 1'b0;
      e_q  <= '0;
      rem_q <= '0;
      div_q <= '0;
      quo_q <= '0;
      cnt_q <= '0;
      special_q <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        busy  <= 1'b1;
        s_q   <= a[63] ^ b[63];
        e_q   <= $signed({3'b0, ea}) - $signed({3'b0, eb}) + 14'sd1023;
        rem_q <= {2'b0, 1'b1, a[51:0]};
        div_q <= {1'b1, b[51:0]};
        quo_q <= '0;
        cnt_q <= 6'd0;
        if (a_nan || b_nan || (a_zero && b_zero) || (a_inf && b_inf)) special_q <= 2'd3;
        else if (a_inf || b_zero)                                      special_q <= 2'd2;
        else if (a_zero || b_inf)                                      special_q <= 2'd1;
        else                                                           special_q <= 2'd0;
      end else if (busy) begin
        if (cnt_q == 6'(QB)) begin
          busy <= 1'b0;
          done <= 1'b1;
          y    <= y_d;
        end else begin
          cnt_q <= cnt_q + 6'd1;
          if (!trial[54]) begin
            quo_q <= {quo_q[QB-2:0], 1'b1};
            rem_q <= {trial[53:0], 1'b0};
          end else begin
            quo_q <= {quo_q[QB-2:0], 1'b0};
            rem_q <= {rem_q[53:0], 1'b0};
          end
        end
      end
    end
  end

endmodule
