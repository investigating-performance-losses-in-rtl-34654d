// tb_nbr_fifo: self-checking test of the 32-entry right-neighbour FIFO.
// Random push/pop traffic against a queue model: head value, empty/full flags and
// count are compared every cycle; the FIFO is filled to exactly 32 entries (full)
// and drained to empty; flush empties it.
module tb_nbr_fifo;
  logic clk = 0, rst = 1, flush = 0, push = 0, pop = 0;
  logic [63:0] din = '0, dout;
  logic empty, full;
  logic [5:0] count;
  int checks = 0, failures = 0, saw_full = 0;

  always #5 clk = ~clk;

  nbr_fifo #(.W(64), .DEPTH(32)) dut (.*);

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [63:0] model [$];

  task automatic compare();
    checks++;
    if (count != 6'(model.size()) || empty != (model.size() == 0) || full != (model.size() == 32) ||
        (model.size() != 0 && dout !== model[0])) begin
      failures++;
      if (failures < 10) $display("FAIL count %0d/%0d dout %h", count, model.size(), dout);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;
    for (int i = 0; i < 20000; i++) begin
      int phase; logic pu, po;
      phase = (i / 500) % 3;      // fill-biased, drain-biased, balanced
      pu = (phase == 0) ? ($urandom % 4 != 0) : (phase == 1) ? ($urandom % 4 == 0) : 1'($urandom);
      po = (phase == 0) ? ($urandom % 4 == 0) : (phase == 1) ? ($urandom % 4 != 0) : 1'($urandom);
      if (model.size() == 32 && !po) pu = 0;
      if (model.size() == 0) po = 0;
      push = pu; pop = po; din = {$urandom, $urandom};
      @(posedge clk);
      if (po) void'(model.pop_front());
      if (pu) model.push_back(din);
      if (model.size() == 32) saw_full++;
      @(negedge clk);
      push = 0; pop = 0;
      compare();
    end
    @(negedge clk); flush = 1; @(negedge clk); flush = 0;
    model.delete();
    compare();
    checks++;
    if (saw_full == 0) begin failures++; $display("FAIL never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
