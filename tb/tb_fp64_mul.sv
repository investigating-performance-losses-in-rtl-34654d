// tb_fp64_mul: self-checking test of the binary64 multiplier.
// Reference: the simulator's IEEE double multiplication on `real` values. Covers
// random operands, squares (as used by the error module), subnormal inputs and
// results, underflow to zero, overflow to infinity and 0 * inf.
module tb_fp64_mul;
  import laplace_pkg::*;

  fp64_t a, b, y;
  int    checks = 0, failures = 0;

  fp64_mul dut (.a(a), .b(b), .y(y));

  function automatic fp64_t rnd(input int unsigned emin, input int unsigned emax);
    logic [10:0] e;
    e = 11'(emin + ($urandom % (emax - emin + 1)));
    return {1'($urandom), e, 20'($urandom), 32'($urandom)};
  endfunction

  task automatic check(input fp64_t x, input fp64_t z);
    fp64_t exp_y;
    a = x; b = z;
    #1;
    exp_y = $realtobits($bitstoreal(x) * $bitstoreal(z));
    checks++;
    if (y !== exp_y) begin
      failures++;
      if (failures < 10) $display("FAIL mul %h * %h: got %h expected %h", x, z, y, exp_y);
    end
  endtask

  // free-running clock, used only by the watchdog
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fp64_t x, z;
    check($realtobits(3.0), $realtobits(0.5));
    check($realtobits(0.1), $realtobits(0.1));
    check($realtobits(-1.5e-3), $realtobits(-1.5e-3));
    check(64'h0, $realtobits(5.0));
    check(64'h0000_0000_0000_0001, $realtobits(0.5));        // rounds to zero/subnormal
    check(64'h0000_0000_0000_0003, $realtobits(0.5));        // tie
    check(64'h0008_0000_0000_0000, $realtobits(4.0));        // subnormal to normal
    check($realtobits(1.0e-160), $realtobits(1.0e-160));     // underflow
    check($realtobits(1.0e200), $realtobits(1.0e200));       // overflow
    a = 64'h7FF0_0000_0000_0000; b = 64'h0; #1;
    checks++; if (y !== FP64_QNAN) begin failures++; $display("FAIL 0*inf"); end
    for (int i = 0; i < 20000; i++) begin
      x = rnd(900, 1150); z = rnd(900, 1150);
      check(x, z);
    end
    for (int i = 0; i < 20000; i++) begin
      x = rnd(0, 2046);
      check(x, x);
    end
    for (int i = 0; i < 20000; i++) begin
      x = rnd(0, 2046); z = rnd(0, 2046);
      check(x, z);
    end
    for (int i = 0; i < 5000; i++) begin
      x = rnd(0, 40); z = rnd(1000, 1060);
      check(x, z);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
