// tb_err_unit: self-checking test of the error module.
// Streams "timesteps" of random length, each a run of (y, x) pairs with some cells
// marked as skipped, and compares each accumulated error with the `real` sum of
// (y - x)^2 over the non-skipped cells, taken in order from 0. Checks that the error
// is ready SUB + MUL + 1 = 30 cycles after the last cell.
module tb_err_unit;
  import laplace_pkg::*;

  logic  clk = 0, rst = 1, flush = 0;
  logic  in_valid = 0, in_skip = 0, in_first = 0, in_last = 0;
  fp64_t y = '0, x = '0;
  logic  out_valid;
  fp64_t out_err;
  int    checks = 0, failures = 0, cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  err_unit dut (.*);

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real expq [$];
  int  tq [$];

  always @(posedge clk) begin
    if (!rst && out_valid) begin
      checks++;
      if (expq.size() == 0) begin
        failures++; $display("FAIL unexpected output");
      end else begin
        real e; int t;
        e = expq.pop_front(); t = tq.pop_front();
        if (out_err !== $realtobits(e)) begin
          failures++; $display("FAIL err %h expected %h", out_err, $realtobits(e));
        end
        checks++;
        // applied after edge t, sampled at t+1: 14 + 15 pipeline cycles + 1 accumulate
        if (cycle - t != ADD_LAT + MUL_LAT + 1 + 1) begin
          failures++; $display("FAIL latency %0d", cycle - t);
        end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int s = 0; s < 60; s++) begin
      int n; real acc;
      n = 2 + $urandom % 80;
      acc = 0.0;
      for (int i = 0; i < n; i++) begin
        real ry, rx; logic sk;
        if ($urandom % 6 == 0) begin @(negedge clk); in_valid = 0; end
        rx = $bitstoreal({1'b0, 11'(1020 + $urandom % 6), 20'($urandom), 32'($urandom)});
        ry = rx + $bitstoreal({1'($urandom), 11'(990 + $urandom % 30), 20'($urandom), 32'($urandom)});
        sk = ($urandom % 7 == 0);
        @(negedge clk);
        in_valid = 1; y = $realtobits(ry); x = $realtobits(rx); in_skip = sk;
        in_first = (i == 0); in_last = (i == n - 1);
        if (!sk) acc = acc + (ry - rx) * (ry - rx);
        if (i == n - 1) begin expq.push_back(acc); tq.push_back(cycle); end
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (40) @(posedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d errors missing", expq.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
