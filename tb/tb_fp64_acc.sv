// tb_fp64_acc: self-checking test of the one-addend-per-cycle accumulator.
// Streams several sums of random length (gaps between addends included, back-to-back
// sums included) and compares each finished sum with a left-to-right `real` sum
// starting from 0. Also checks that out_valid comes exactly one cycle after the last
// addend and that flush discards a sum in progress.
module tb_fp64_acc;
  import laplace_pkg::*;

  logic  clk = 0, rst = 1, flush = 0;
  logic  in_valid = 0, in_first = 0, in_last = 0;
  fp64_t in_data = '0;
  logic  out_valid;
  fp64_t out_sum;
  int    checks = 0, failures = 0, cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  fp64_acc dut (.*);

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real   expq [$];
  int    tq   [$];

  // checker
  always @(posedge clk) begin
    if (!rst && out_valid) begin
      checks++;
      if (expq.size() == 0) begin
        failures++; $display("FAIL unexpected out_valid");
      end else begin
        real e; int t;
        e = expq.pop_front(); t = tq.pop_front();
        if (out_sum !== $realtobits(e)) begin
          failures++; $display("FAIL sum got %h expected %h", out_sum, $realtobits(e));
        end
        checks++;
        if (cycle - t != 2) begin  // sampled at edge t+1, result registered there, seen at t+2
          failures++; $display("FAIL latency %0d", cycle - t);
        end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int s = 0; s < 200; s++) begin
      int n; real acc;
      n = 1 + $urandom % 40;
      acc = 0.0;
      for (int i = 0; i < n; i++) begin
        fp64_t x;
        while ($urandom % 4 == 0) begin
          @(negedge clk); in_valid = 0;
        end
        x = {1'b0, 11'(1000 + $urandom % 30), 20'($urandom), 32'($urandom)};
        @(negedge clk);
        in_valid = 1; in_first = (i == 0); in_last = (i == n - 1); in_data = x;
        acc = acc + $bitstoreal(x);
        if (i == n - 1) begin expq.push_back(acc); tq.push_back(cycle); end
      end
      // a sum that is abandoned by flush
      if (s % 50 == 7) begin
        @(negedge clk); in_valid = 1; in_first = 1; in_last = 0; in_data = $realtobits(5.0);
        @(negedge clk); in_valid = 0; flush = 1;
        @(negedge clk); flush = 0;
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (5) @(posedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d sums missing", expq.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
