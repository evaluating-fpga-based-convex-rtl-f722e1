// tb_fp64_addsub: checks the binary64 adder/subtractor against the
// simulator's own IEEE double arithmetic (round to nearest even), bit for
// bit, on random operands (wide and close exponents, so that both alignment
// with sticky bits and massive cancellation occur) and on signed zeros,
// infinities and NaN.
module tb_fp64_addsub;
  import accel_pkg::*;

  fp64_t a, b, y;
  logic  sub;
  int    checks = 0, failures = 0;
  logic  clk = 0;

  fp64_addsub dut (.a, .b, .sub, .y);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic fp64_t rnd_fp(input int ebase, input int espan);
    logic [63:0] r;
    r = {$urandom, $urandom};
    r[62:52] = 11'(ebase + int'($urandom % (2 * espan + 1)) - espan);
    return r;
  endfunction

  task automatic check(input fp64_t ea, input fp64_t eb, input logic es, input fp64_t exp_y);
    a = ea; b = eb; sub = es;
    #1;
    checks++;
    if (y !== exp_y) begin
      failures++;
      if (failures < 10)
        $display("FAIL %h %s %h: got %h expected %h", ea, es ? "-" : "+", eb, y, exp_y);
    end
  endtask

  initial begin
    real ra, rb;
    fp64_t ta, tb;
    for (int t = 0; t < 20000; t++) begin
      ta = rnd_fp(1023, 60);
      tb = (t % 3 == 0) ? rnd_fp(int'(ta[62:52]), 2) : rnd_fp(1023, 60);
      if (t % 7 == 0) tb = {~ta[63], ta[62:20], 20'($urandom)};   // near-total cancellation
      ra = $bitstoreal(ta);
      rb = $bitstoreal(tb);
      check(ta, tb, 1'b0, $realtobits(ra + rb));
      check(ta, tb, 1'b1, $realtobits(ra - rb));
    end
    // special operands
    check(64'h0, 64'h0, 1'b0, 64'h0);                                  // +0 + +0
    check(64'h8000_0000_0000_0000, 64'h0, 1'b1, 64'h8000_0000_0000_0000); // -0 - +0
    check($realtobits(1.5), $realtobits(1.5), 1'b1, 64'h0);             // x - x = +0
    check($realtobits(2.0), 64'h0, 1'b0, $realtobits(2.0));
    check(64'h7FF0_0000_0000_0000, $realtobits(3.0), 1'b0, 64'h7FF0_0000_0000_0000);
    check(64'h7FF0_0000_0000_0000, 64'h7FF0_0000_0000_0000, 1'b1, 64'h7FF8_0000_0000_0000);
    check(64'h7FEF_FFFF_FFFF_FFFF, 64'h7FEF_FFFF_FFFF_FFFF, 1'b0, 64'h7FF0_0000_0000_0000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
