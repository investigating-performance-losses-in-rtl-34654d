// tb_avg_unit: self-checking test of the averaging module.
// Streams random neighbour quadruples (with idle gaps) and checks every result
// against ((a+b)+(c+d))*0.25 computed with `real` arithmetic, that the tag comes out
// with its own result, and that the latency is exactly 29 cycles. Includes inputs
// whose average is subnormal, where dividing by four needs a rounded shift. Also
// checks that flush drops the values in flight.
module tb_avg_unit;
  import laplace_pkg::*;

  localparam int unsigned TW = 16;
  logic  clk = 0, rst = 1, flush = 0;
  logic  in_valid = 0;
  fp64_t a = '0, b = '0, c = '0, d = '0;
  logic [TW-1:0] in_tag = '0, out_tag;
  logic  out_valid;
  fp64_t y;
  int    checks = 0, failures = 0, cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  avg_unit #(.TAG_W(TW)) dut (.*);

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  fp64_t expq [$];
  int    tq [$];
  logic [TW-1:0] tagq [$];

  always @(posedge clk) begin
    if (!rst && out_valid) begin
      checks++;
      if (expq.size() == 0) begin
        failures++; $display("FAIL unexpected output");
      end else begin
        fp64_t e; int t; logic [TW-1:0] g;
        e = expq.pop_front(); t = tq.pop_front(); g = tagq.pop_front();
        if (y !== e || out_tag !== g) begin
          failures++; $display("FAIL y %h exp %h tag %h exp %h", y, e, out_tag, g);
        end
        checks++;
        if (cycle - t != 29 + 1) begin  // applied after edge t, sampled at edge t+1
          failures++; $display("FAIL latency %0d", cycle - t);
        end
      end
    end
  end

  function automatic fp64_t rv(input int unsigned emin, input int unsigned span);
    return {1'($urandom), 11'(emin + $urandom % span), 20'($urandom), 32'($urandom)};
  endfunction

  task automatic send(input fp64_t va, vb, vc, vd);
    @(negedge clk);
    in_valid = 1; a = va; b = vb; c = vc; d = vd; in_tag = TW'($urandom);
    expq.push_back($realtobits((($bitstoreal(va) + $bitstoreal(vb)) +
                                ($bitstoreal(vc) + $bitstoreal(vd))) * 0.25));
    tq.push_back(cycle);
    tagq.push_back(in_tag);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 3000; i++) begin
      if ($urandom % 5 == 0) begin @(negedge clk); in_valid = 0; end
      if (i % 10 == 3)
        send(rv(0, 4), rv(0, 4), rv(0, 4), rv(0, 4));       // subnormal territory
      else
        send(rv(1015, 16), rv(1015, 16), rv(1015, 16), rv(1015, 16));
    end
    @(negedge clk); in_valid = 0;
    repeat (40) @(posedge clk);
    // flush drops in-flight values
    send($realtobits(1.0), $realtobits(1.0), $realtobits(1.0), $realtobits(1.0));
    @(negedge clk); in_valid = 0;
    repeat (10) @(posedge clk);
    @(negedge clk); flush = 1; @(negedge clk); flush = 0;
    void'(expq.pop_back()); void'(tq.pop_back()); void'(tagq.pop_back());
    repeat (40) @(posedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d results missing", expq.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
