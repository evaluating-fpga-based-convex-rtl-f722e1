// tb_fp64_mul: checks the binary64 multiplier bit for bit against the
// simulator's IEEE double product on random operands and on zeros,
// infinities, NaN and overflow.
module tb_fp64_mul;
  import accel_pkg::*;

  fp64_t a, b, y;
  int    checks = 0, failures = 0;
  logic  clk = 0;

  fp64_mul dut (.a, .b, .y);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic fp64_t rnd_fp(input int espan);
    logic [63:0] r;
    r = {$urandom, $urandom};
    r[62:52] = 11'(1023 + int'($urandom % (2 * espan + 1)) - espan);
    return r;
  endfunction

  task automatic check(input fp64_t ea, input fp64_t eb, input fp64_t exp_y);
    a = ea; b = eb;
    #1;
    checks++;
    if (y !== exp_y) begin
      failures++;
      if (failures < 10) $display("FAIL %h * %h: got %h expected %h", ea, eb, y, exp_y);
    end
  endtask

  initial begin
    fp64_t ta, tb;
    for (int t = 0; t < 20000; t++) begin
      ta = rnd_fp(200);
      tb = rnd_fp(200);
      if (t % 5 == 0) tb[51:0] = 52'h0;          // exact products
      check(ta, tb, $realtobits($bitstoreal(ta) * $bitstoreal(tb)));
    end
    check(64'h0, $realtobits(5.0), 64'h0);
    check(64'h8000_0000_0000_0000, $realtobits(5.0), 64'h8000_0000_0000_0000);
    check(64'h7FF0_0000_0000_0000, $realtobits(-2.0), 64'hFFF0_0000_0000_0000);
    check(64'h7FF0_0000_0000_0000, 64'h0, 64'h7FF8_0000_0000_0000);
    check($realtobits(1.0e200), $realtobits(1.0e200), 64'h7FF0_0000_0000_0000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
