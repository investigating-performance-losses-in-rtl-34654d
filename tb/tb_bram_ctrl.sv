// tb_bram_ctrl: self-checking test of the parity-banked BRAM controller.
// Loads a 16 x 256 matrix through the host port, then issues one neighbour read per
// cycle for every cell and checks left, right, upper and lower values (with the
// wrap-around that serves halos at the top and bottom rows) the cycle after. Then
// writes new values through the write port, one per cycle, and reads them back.
module tb_bram_ctrl;
  import laplace_pkg::*;

  localparam int R = 16, C = 256;
  logic clk = 0, rst = 1;
  logic rd_en = 0, wr_en = 0, host_en = 0, host_we = 0;
  logic [3:0] rd_row = 0, wr_row = 0, host_row = 0;
  logic [7:0] rd_col = 0, wr_col = 0, host_col = 0;
  fp64_t nb_a, nb_b, nb_up, nb_dn, wr_data = 0, host_wdata = 0, host_rdata;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  bram_ctrl #(.ROWS(R), .COLS(C)) dut (.*);

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  fp64_t m [R][C];

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) begin
        m[r][c] = {$urandom, $urandom};
        host_en = 1; host_we = 1; host_row = 4'(r); host_col = 8'(c); host_wdata = m[r][c];
        @(negedge clk);
      end
    host_en = 0; host_we = 0;
    // neighbour reads, one per cycle, checked the next cycle
    for (int i = 0; i < R * C; i++) begin
      int pr, pc;
      pr = i / C; pc = i % C;
      rd_en = 1;
      rd_row = 4'(pr); rd_col = 8'(pc);
      @(negedge clk);
      begin
        checks++;
        if (nb_a !== m[pr][(pc + C - 1) % C] || nb_b !== m[pr][(pc + 1) % C] ||
            nb_up !== m[(pr + R - 1) % R][pc] || nb_dn !== m[(pr + 1) % R][pc]) begin
          failures++;
          if (failures < 10) $display("FAIL neighbours of (%0d,%0d)", pr, pc);
        end
      end
    end
    rd_en = 0;
    // write port
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) begin
        m[r][c] = {$urandom, $urandom};
        wr_en = 1; wr_row = 4'(r); wr_col = 8'(c); wr_data = m[r][c];
        @(negedge clk);
      end
    wr_en = 0;
    for (int i = 0; i < 2000; i++) begin
      int r, c;
      r = $urandom % R; c = $urandom % C;
      host_en = 1; host_row = 4'(r); host_col = 8'(c);
      @(negedge clk);
      host_en = 0;
      checks++;
      if (host_rdata !== m[r][c]) begin
        failures++;
        if (failures < 10) $display("FAIL host read (%0d,%0d)", r, c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
