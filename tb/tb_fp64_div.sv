// tb_fp64_div: checks the iterative binary64 divider bit for bit against the
// simulator's IEEE double quotient on random operands and on zero and
// infinite divisors, and checks that done comes 58 cycles after the start cycle and
// that busy covers the interval.
module tb_fp64_div;
  import accel_pkg::*;

  logic  clk = 0, rst_n = 0, start = 0, busy, done;
  fp64_t a, b, y;
  int    checks = 0, failures = 0;

  fp64_div dut (.clk, .rst_n, .start, .a, .b, .busy, .done, .y);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (2000000) @(posedge clk);
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
    int cyc;
    @(negedge clk);
    a = ea; b = eb; start = 1;
    @(negedge clk);
    start = 0;
    a = '0; b = '0;
    cyc = 1;
    while (!done) begin
      if (!busy) begin failures++; $display("FAIL busy low before done"); end
      @(negedge clk);
      cyc++;
    end
    checks += 2;
    if (cyc != 58) begin
      failures++;
      $display("FAIL latency %0d", cyc);
    end
    if (y !== exp_y) begin
      failures++;
      if (failures < 10) $display("FAIL %h / %h: got %h expected %h", ea, eb, y, exp_y);
    end
  endtask

  initial begin
    fp64_t ta, tb;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      ta = rnd_fp(300);
      tb = rnd_fp(300);
      if (t % 4 == 0) tb[51:0] = 52'h0;
      check(ta, tb, $realtobits($bitstoreal(ta) / $bitstoreal(tb)));
    end
    check($realtobits(1.0), $realtobits(3.0), $realtobits(1.0 / 3.0));
    check($realtobits(-7.0), 64'h0, 64'hFFF0_0000_0000_0000);
    check(64'h0, 64'h0, 64'h7FF8_0000_0000_0000);
    check(64'h0, $realtobits(2.0), 64'h0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
