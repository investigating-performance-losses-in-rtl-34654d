// laplace_check: end-to-end test sequence for laplace_engine, shared by the reduced
// testbench (tb_laplace_engine) and the full-size one (tb_laplace_full).
//
// It loads a random grid through the host port, runs a solve that converges after
// a few timesteps, reads the whole result back, then runs a second solve from that
// result which stops at its max_iters limit without converging, and reads it back
// again. A `real` model of the same Jacobi sweep, per-PE error sums, PE-order total
// and mean gives every expected bit: the grid, the returned MSE, the iteration
// count and the converged flag. The tolerance for the first solve is picked from the
// model so that the fourth timestep is the first to pass.
//
// It also counts the mechanisms of the design and fails if one never happened:
// halo exchange between PEs, back-to-back timesteps (a timestep running while the
// previous one's convergence test is still pending), abort of a running timestep on
// convergence, stop at max_iters, and results returned from both matrices. The
// period between timestep starts must be ROWS*COLS + 31 cycles (cells, read,
// 29-cycle averaging, start).
//
// DEFAULTS = 1 instantiates the engine with no parameter override (PES, ROWS and
// COLS must then equal the engine's defaults).
module laplace_check #(
  parameter int unsigned PES      = 3,
  parameter int unsigned ROWS     = 4,
  parameter int unsigned COLS     = 16,
  parameter bit          DEFAULTS = 1'b0
) ();
  import laplace_pkg::*;

  localparam int unsigned RW = (ROWS > 1) ? $clog2(ROWS) : 1;
  localparam int unsigned CW = (COLS > 1) ? $clog2(COLS) : 1;
  localparam int unsigned PW = (PES > 1)  ? $clog2(PES)  : 1;
  localparam int unsigned GR = PES * ROWS;
  localparam int unsigned N_INNER = (GR - 2) * (COLS - 2);
  localparam int unsigned PERIOD  = ROWS * COLS + 31;

  logic clk = 0, rst = 1, start = 0;
  fp64_t tolerance = '0;
  logic [31:0] max_iters = 32'd1;
  logic busy, done, converged;
  logic [31:0] iterations;
  fp64_t final_mse;
  logic host_en = 0, host_we = 0;
  logic [PW-1:0] host_pe = '0;
  logic [RW-1:0] host_row = '0;
  logic [CW-1:0] host_col = '0;
  fp64_t host_wdata = '0, host_rdata;

  int checks = 0, failures = 0, cycle = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  // internal observation points
  logic m_issuing, m_flush, m_summing, m_res_sel, m_top_row;
  logic [31:0] m_started, m_checked;

  if (DEFAULTS) begin : g_def
    laplace_engine dut (.*);
    assign m_issuing = dut.issuing_q;
    assign m_flush   = dut.flush;
    assign m_summing = dut.summing_q;
    assign m_res_sel = dut.result_sel_q;
    assign m_started = dut.started_q;
    assign m_checked = dut.checked_q;
    assign m_top_row = (dut.row_q == '0);
  end else begin : g_par
    laplace_engine #(.PES(PES), .ROWS(ROWS), .COLS(COLS)) dut (.*);
    assign m_issuing = dut.issuing_q;
    assign m_flush   = dut.flush;
    assign m_summing = dut.summing_q;
    assign m_res_sel = dut.result_sel_q;
    assign m_started = dut.started_q;
    assign m_checked = dut.checked_q;
    assign m_top_row = (dut.row_q == '0);
  end

  // mechanism counters
  int n_halo = 0, n_b2b = 0, n_abort = 0, n_maxstop = 0, n_sel0 = 0, n_sel1 = 0;
  int n_periods = 0, last_start = -1;
  logic issuing_d = 0;
  always @(posedge clk) begin
    if (!rst) begin
      if (m_issuing && m_top_row && PES > 1) n_halo++;
      if (m_issuing && (m_summing || (m_checked + 1 < m_started))) n_b2b++;
      if (m_flush && m_issuing) n_abort++;
      if (m_issuing && !issuing_d) begin
        if (last_start >= 0 && cycle - last_start < 3 * PERIOD) begin
          n_periods++;
          checks++;
          if (cycle - last_start != PERIOD) begin
            failures++; $display("FAIL timestep period %0d, expected %0d", cycle - last_start, PERIOD);
          end
        end
        last_start = cycle;
      end
      issuing_d <= m_issuing;
    end
  end

  // ---------------- reference model ----------------
  real g [GR][COLS];
  real h [GR][COLS];

  // one Jacobi timestep on g (result in g), returns the mean squared error
  function automatic real ref_step();
    real total, e;
    total = 0.0;
    for (int p = 0; p < PES; p++) begin
      e = 0.0;
      for (int r = p * ROWS; r < (p + 1) * ROWS; r++)
        for (int c = 0; c < COLS; c++) begin
          h[r][c] = g[r][c];
          if (r == 0 || r == GR - 1 || c == 0 || c == COLS - 1) continue;
          h[r][c] = ((g[r][c-1] + g[r][c+1]) + (g[r-1][c] + g[r+1][c])) * 0.25;
          e = e + (h[r][c] - g[r][c]) * (h[r][c] - g[r][c]);
        end
      total = total + e;
    end
    g = h;
    return total * (1.0 / real'(N_INNER));
  endfunction

  task automatic read_back(input string what);
    int bad;
    bad = 0;
    for (int r = 0; r < GR; r++)
      for (int c = 0; c < COLS; c++) begin
        @(negedge clk);
        host_en = 1; host_we = 0;
        host_pe = PW'(r / ROWS); host_row = RW'(r % ROWS); host_col = CW'(c);
        @(negedge clk);
        host_en = 0;
        checks++;
        if (host_rdata !== $realtobits(g[r][c])) begin
          failures++; bad++;
          if (bad < 5) $display("FAIL %s cell (%0d,%0d) %h expected %h", what, r, c,
                                host_rdata, $realtobits(g[r][c]));
        end
      end
  endtask

  task automatic run(input fp64_t tol, input int maxit, input real exp_mse,
                     input logic exp_conv, input int exp_iters);
    @(negedge clk);
    tolerance = tol; max_iters = 32'(maxit); start = 1;
    @(negedge clk);
    start = 0;
    wait (done);
    @(negedge clk);
    checks++;
    if (converged !== exp_conv || iterations !== 32'(exp_iters) || final_mse !== $realtobits(exp_mse)) begin
      failures++;
      $display("FAIL run: converged %0d/%0d iterations %0d/%0d mse %h/%h", converged, exp_conv,
               iterations, exp_iters, final_mse, $realtobits(exp_mse));
    end
    if (m_res_sel) n_sel1++; else n_sel0++;
  endtask

  initial begin : watchdog
    repeat (40 * GR * COLS + 20 * PERIOD + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real g0 [GR][COLS];
    real mse [6];
    int  k_conv;
    fp64_t tol;

    for (int r = 0; r < GR; r++)
      for (int c = 0; c < COLS; c++)
        g[r][c] = (r == 0) ? 100.0 : real'($urandom % 1000000) / 10000.0;
    g0 = g;
    // pick the tolerance: just above the MSE of the fourth timestep
    for (int k = 0; k < 6; k++) mse[k] = ref_step();
    tol = $realtobits(mse[3]) + 64'd1;
    k_conv = -1;
    for (int k = 0; k < 6; k++)
      if (k_conv < 0 && $realtobits(mse[k]) < tol) k_conv = k;
    g = g0;

    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;
    for (int r = 0; r < GR; r++)
      for (int c = 0; c < COLS; c++) begin
        host_en = 1; host_we = 1;
        host_pe = PW'(r / ROWS); host_row = RW'(r % ROWS); host_col = CW'(c);
        host_wdata = $realtobits(g[r][c]);
        @(negedge clk);
      end
    host_en = 0; host_we = 0;

    // solve 1: converges at timestep k_conv
    for (int k = 0; k <= k_conv; k++) void'(ref_step());
    run(tol, 1000, mse[k_conv], 1'b1, k_conv + 1);
    read_back("solve 1");

    // solve 2: continues from that result, stops at max_iters = 3
    begin
      real m;
      m = ref_step();
      m = ref_step();
      m = ref_step();
      run(64'd0, 3, m, 1'b0, 3);
      n_maxstop++;
    end
    read_back("solve 2");

    checks++;
    if (n_halo == 0 || n_b2b == 0 || n_abort == 0 || n_maxstop == 0 || n_sel0 == 0 ||
        n_sel1 == 0 || n_periods == 0) begin
      failures++;
      $display("FAIL mechanism not seen: halo %0d back-to-back %0d abort %0d max-stop %0d sel0 %0d sel1 %0d periods %0d",
               n_halo, n_b2b, n_abort, n_maxstop, n_sel0, n_sel1, n_periods);
    end
    $display("mechanisms: halo-row cycles %0d, back-to-back cycles %0d, aborts %0d, max-iter stops %0d, results from mat0 %0d / mat1 %0d, periods checked %0d",
             n_halo, n_b2b, n_abort, n_maxstop, n_sel0, n_sel1, n_periods);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
