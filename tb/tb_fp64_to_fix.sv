// tb_fp64_to_fix: checks the double-to-fixed cast for both fixed-point
// designs (39 bits with 5 integer bits, 55 bits with 5 integer bits). The
// expected value is floor(v * 2^B) computed in real arithmetic (exact for
// these sizes), wrapped to W bits; operands cover in-range values of both
// signs, values below one LSB, values that overflow and wrap, and zero.
module tb_fp64_to_fix;
  import accel_pkg::*;

  fp64_t a;
  logic [38:0] y1;
  logic [54:0] y2;
  int checks = 0, failures = 0;
  logic clk = 0;

  fp64_to_fix #(.W(39), .I(5)) dut1 (.a, .y(y1));
  fp64_to_fix #(.W(55), .I(5)) dut2 (.a, .y(y2));

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [63:0] expect_fix(input real v, input int b, input int w);
    real f;
    longint q;
    f = $floor(v * (2.0 ** b));
    q = longint'(f);
    return 64'(q) & ((64'd1 << w) - 64'd1);
  endfunction

  task automatic check(input fp64_t ta);
    real v;
    a = ta;
    #1;
    v = $bitstoreal(ta);
    checks += 2;
    if (64'(y1) !== expect_fix(v, 34, 39)) begin
      failures++;
      if (failures < 10) $display("FAIL W39 %h (%g): got %h", ta, v, y1);
    end
    if (64'(y2) !== expect_fix(v, 50, 55)) begin
      failures++;
      if (failures < 10) $display("FAIL W55 %h (%g): got %h", ta, v, y2);
    end
  endtask

  initial begin
    fp64_t t;
    for (int k = 0; k < 20000; k++) begin
      t = {$urandom, $urandom};
      // exponents from 2^-60 to 2^10 (overflow above 2^4 wraps)
      t[62:52] = 11'(1023 - 60 + int'($urandom % 71));
      check(t);
    end
    check(64'h0);
    check($realtobits(-1.0));
    check($realtobits(15.999999));
    check($realtobits(-16.0));
    check($realtobits(16.0));          // wraps to -16
    check($realtobits(-1.0e-30));      // floors to -1 LSB
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
