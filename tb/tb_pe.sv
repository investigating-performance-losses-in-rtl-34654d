// tb_pe: self-checking test of one processing element (a middle PE, so both halo
// directions are used) at the full 16 x 256 submatrix size.
// The testbench plays the engine and the two neighbouring PEs: it loads both
// matrices through the host port, streams the cell addresses of two back-to-back
// timesteps (swapping input and output matrix), supplies halo rows for the PE above
// and below the cycle after each read, and checks:
//   - the halos the PE hands to its neighbours (its own bottom row while on row 0,
//     its own top row while on the last row),
//   - every updated cell of the output matrix against a `real` Jacobi update
//     ((left+right)+(up+down))*0.25, and the untouched boundary columns,
//   - the accumulated error against the `real` sum of squared differences,
//   - write and error timing: last write 1 + 29 cycles after the last read, error
//     14 + 15 + 1 cycles after that.
module tb_pe;
  import laplace_pkg::*;

  localparam int R = 16, C = 256;
  logic clk = 0, rst = 1, flush = 0;
  logic step_en = 0, step_first = 0, step_last = 0, in_sel = 0;
  logic [3:0] step_row = 0, host_row = 0;
  logic [7:0] step_col = 0, host_col = 0;
  fp64_t halo_from_above, halo_from_below, halo_to_above, halo_to_below;
  logic wr_last, err_valid;
  fp64_t err_sum;
  logic host_en = 0, host_we = 0, host_sel = 0;
  fp64_t host_wdata = 0, host_rdata;
  int checks = 0, failures = 0, cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  pe #(.ROWS(R), .COLS(C), .FIRST_PE(1'b0), .LAST_PE(1'b0)) dut (.*);

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real   cur [R][C], nxt [R][C], above [C], below [C];
  fp64_t mat [2][R][C];

  // neighbours' halos, one cycle after the read, as the neighbouring PEs deliver them
  logic       v_d;
  logic [3:0] row_d;
  logic [7:0] col_d;
  always_ff @(posedge clk) begin
    v_d <= step_en; row_d <= step_row; col_d <= step_col;
  end
  assign halo_from_above = $realtobits(above[col_d]);
  assign halo_from_below = $realtobits(below[col_d]);

  int halo_checks = 0;
  always @(negedge clk) begin
    if (v_d && row_d == 0) begin
      checks++; halo_checks++;
      if (halo_to_below !== $realtobits(cur[R-1][col_d])) begin
        failures++; $display("FAIL halo_to_below col %0d", col_d);
      end
    end
    if (v_d && row_d == 4'(R - 1)) begin
      checks++; halo_checks++;
      if (halo_to_above !== $realtobits(cur[0][col_d])) begin
        failures++; $display("FAIL halo_to_above col %0d", col_d);
      end
    end
  end

  int t_last_issue, t_wr_last, t_err;

  initial begin
    real err_ref;
    for (int c = 0; c < C; c++) begin
      above[c] = real'($urandom % 100000) / 1000.0;
      below[c] = real'($urandom % 100000) / 1000.0;
    end
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) cur[r][c] = real'($urandom % 100000) / 1000.0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) begin
        host_en = 1; host_we = 1; host_row = 4'(r); host_col = 8'(c);
        host_wdata = $realtobits(cur[r][c]);
        mat[0][r][c] = host_wdata; mat[1][r][c] = host_wdata;
        @(negedge clk);
      end
    host_en = 0; host_we = 0;

    for (int s = 0; s < 2; s++) begin
      // reference timestep
      err_ref = 0.0;
      for (int r = 0; r < R; r++)
        for (int c = 0; c < C; c++) begin
          if (c == 0 || c == C - 1) continue;
          nxt[r][c] = ((cur[r][c-1] + cur[r][c+1]) +
                       ((r == 0 ? above[c] : cur[r-1][c]) + (r == R - 1 ? below[c] : cur[r+1][c]))) * 0.25;
          err_ref = err_ref + (nxt[r][c] - cur[r][c]) * (nxt[r][c] - cur[r][c]);
          mat[1 - s][r][c] = $realtobits(nxt[r][c]);
        end
      // stream the cells
      for (int i = 0; i < R * C; i++) begin
        step_en = 1; in_sel = s[0]; step_row = 4'(i / C); step_col = 8'(i % C);
        step_first = (i == 0); step_last = (i == R * C - 1);
        @(negedge clk);
      end
      t_last_issue = cycle;
      step_en = 0; step_first = 0; step_last = 0;
      wait (wr_last);
      t_wr_last = cycle;
      wait (err_valid);
      t_err = cycle;
      @(negedge clk);
      checks++;
      if (err_sum !== $realtobits(err_ref)) begin
        failures++; $display("FAIL error sum %h expected %h", err_sum, $realtobits(err_ref));
      end
      checks++;
      // t_last_issue is read one cycle after the last address was presented, so the
      // 1 read + 29 averaging cycles show as 29 here.
      if (t_wr_last - t_last_issue != 29 || t_err - t_wr_last != ADD_LAT + MUL_LAT + 1) begin
        failures++; $display("FAIL timing: write %0d, error %0d", t_wr_last - t_last_issue, t_err - t_wr_last);
      end
      // compare both matrices
      for (int k = 0; k < 2; k++)
        for (int r = 0; r < R; r++)
          for (int c = 0; c < C; c++) begin
            host_en = 1; host_sel = k[0]; host_row = 4'(r); host_col = 8'(c);
            @(negedge clk);
            host_en = 0;
            checks++;
            if (host_rdata !== mat[k][r][c]) begin
              failures++;
              if (failures < 10) $display("FAIL step %0d mat %0d (%0d,%0d) %h expected %h", s, k, r, c,
                                          host_rdata, mat[k][r][c]);
            end
          end
      for (int r = 0; r < R; r++)
        for (int c = 1; c < C - 1; c++) cur[r][c] = nxt[r][c];
    end
    checks++;
    if (halo_checks != 4 * C) begin failures++; $display("FAIL halo count %0d", halo_checks); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
