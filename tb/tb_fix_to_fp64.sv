// tb_fix_to_fp64: checks the fixed-to-double cast for the output types of
// both fixed-point designs (78 bits with 10 integer bits, 110 bits with 10
// integer bits). The expected double is built from exact pieces: the input's
// magnitude is split into its top 53 bits and the rest, each converted
// exactly, summed (one IEEE rounding, nearest even), signed and scaled by 2^-B.
module tb_fix_to_fp64;
  import accel_pkg::*;

  logic [77:0]  a1;
  logic [109:0] a2;
  fp64_t y1, y2;
  int checks = 0, failures = 0;
  logic clk = 0;

  fix_to_fp64 #(.W(78),  .I(10)) dut1 (.a(a1), .y(y1));
  fix_to_fp64 #(.W(110), .I(10)) dut2 (.a(a2), .y(y2));

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // value of a W-bit two's-complement word (W <= 110), rounded once: the
  // magnitude is split into its top 53 bits H and the rest L below bit k;
  // H * 2^k is exact and L is exact up to the rare case of 54 consecutive
  // ones, so the single sum gives the nearest-even double.
  function automatic real exact_val(input logic [109:0] x, input int w);
    logic signed [109:0] sx;
    logic [109:0] mag, lo;
    int p, k;
    real h, l, r;
    sx  = $signed(x << (110 - w)) >>> (110 - w);
    mag = sx[109] ? 110'(-sx) : 110'(sx);
    p = -1;
    for (int i = 0; i < 110; i++) if (mag[i]) p = i;
    k  = (p > 52) ? p - 52 : 0;
    h  = real'(longint'(64'(mag >> k)));
    lo = mag & ((110'd1 << k) - 110'd1);
    l  = real'(longint'(64'(lo >> 28))) * (2.0 ** 28) + real'(longint'(64'(lo[27:0])));
    r  = h * (2.0 ** k) + l;
    return sx[109] ? -r : r;
  endfunction

  task automatic check(input logic [109:0] x);
    real e1, e2;
    a1 = x[77:0];
    a2 = x;
    #1;
    e1 = exact_val({32'd0, x[77:0]}, 78) * (2.0 ** -68);
    e2 = exact_val(x, 110) * (2.0 ** -100);
    checks += 2;
    if (y1 !== $realtobits(e1)) begin
      failures++;
      if (failures < 10) $display("FAIL W78 %h: got %h expected %h", x[77:0], y1, $realtobits(e1));
    end
    if (y2 !== $realtobits(e2)) begin
      failures++;
      if (failures < 10) $display("FAIL W110 %h: got %h expected %h", x, y2, $realtobits(e2));
    end
  endtask

  initial begin
    logic [109:0] x;
    for (int k = 0; k < 20000; k++) begin
      x = {$urandom, $urandom, $urandom, $urandom};
      x = x >> ($urandom % 110);                   // all magnitudes
      if ($urandom % 2) x = -x;
      check(x);
    end
    check('0);
    check(110'd1);
    check({1'b1, 109'd0});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
