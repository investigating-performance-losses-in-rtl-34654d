// tb_fp64_add: self-checking test of the binary64 adder/subtractor.
// Reference: the simulator's own IEEE double arithmetic on `real` values. Covers
// random operands of similar and very different magnitudes, cancellation, zeros,
// subnormal operands and results, overflow to infinity and inf/NaN rules.
module tb_fp64_add;
  import laplace_pkg::*;

  fp64_t a, b, y;
  logic  sub;
  int    checks = 0, failures = 0;

  fp64_add dut (.a(a), .b(b), .sub(sub), .y(y));

  function automatic fp64_t rnd(input int unsigned emin, input int unsigned emax);
    logic [10:0] e;
    e = 11'(emin + ($urandom % (emax - emin + 1)));
    return {1'($urandom), e, 20'($urandom), 32'($urandom)};
  endfunction

  task automatic check(input fp64_t x, input fp64_t z, input logic s);
    fp64_t exp_y;
    real   r;
    a = x; b = z; sub = s;
    #1;
    r = s ? ($bitstoreal(x) - $bitstoreal(z)) : ($bitstoreal(x) + $bitstoreal(z));
    exp_y = $realtobits(r);
    checks++;
    if (y !== exp_y) begin
      failures++;
      if (failures < 10)
        $display("FAIL add %h %s %h: got %h expected %h", x, s ? "-" : "+", z, y, exp_y);
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
    // directed cases
    check($realtobits(1.0), $realtobits(2.0), 1'b0);
    check($realtobits(1.5), $realtobits(1.5), 1'b1);          // exact zero
    check($realtobits(0.1), $realtobits(0.2), 1'b0);
    check($realtobits(1.0), $realtobits(1.0e-17), 1'b0);      // tiny addend, sticky
    check($realtobits(1.0), $realtobits(1.0e-16), 1'b1);
    check(64'h0, 64'h8000_0000_0000_0000, 1'b0);              // +0 + -0
    check(64'h8000_0000_0000_0000, 64'h8000_0000_0000_0000, 1'b0);
    check(64'h0000_0000_0000_0003, 64'h0000_0000_0000_0005, 1'b0);  // subnormals
    check(64'h0010_0000_0000_0001, 64'h0010_0000_0000_0000, 1'b1);  // to subnormal
    check(64'h7FEF_FFFF_FFFF_FFFF, 64'h7FEF_FFFF_FFFF_FFFF, 1'b0);  // overflow
    check(64'h7FF0_0000_0000_0000, $realtobits(3.0), 1'b0);         // inf
    a = 64'h7FF0_0000_0000_0000; b = 64'h7FF0_0000_0000_0000; sub = 1'b1; #1;
    checks++; if (y !== FP64_QNAN) begin failures++; $display("FAIL inf-inf"); end
    // random, operands of similar magnitude
    for (int i = 0; i < 20000; i++) begin
      x = rnd(1000, 1046); z = rnd(1000, 1046);
      check(x, z, 1'($urandom));
    end
    // random, close exponents (heavy cancellation)
    for (int i = 0; i < 20000; i++) begin
      x = rnd(1020, 1022);
      z = {x[63:20] ^ 44'($urandom % 4), 20'($urandom)};
      check(x, z, 1'($urandom));
    end
    // random over the whole range, subnormals included
    for (int i = 0; i < 20000; i++) begin
      x = rnd(0, 2046); z = rnd(0, 2046);
      check(x, z, 1'($urandom));
    end
    for (int i = 0; i < 5000; i++) begin
      x = rnd(0, 3); z = rnd(0, 3);
      check(x, z, 1'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
