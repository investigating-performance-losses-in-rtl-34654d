// laplace_engine: Jacobi solver for Laplace's equation on a (PES*ROWS) x COLS grid.
//
// The grid is cut into PES horizontal strips of ROWS x COLS cells, one per processing
// element (pe), stacked vertically so that halos only cross the top and bottom edges
// of each strip. The engine broadcasts one cell address per cycle to all PEs (they run
// in lockstep, so the halo a PE needs is being read by its neighbour in the same
// cycle), swaps the input and output matrices every timestep, and runs the
// convergence test: it adds the PEs' accumulated squared errors, scales the total by
// 1 / (number of updated cells) to get the mean squared error, and stops once that is
// below the tolerance.
//
// Back-to-back timesteps: a timestep does not wait for its convergence test. As soon
// as its last result has been written the next timestep starts, while the errors are
// still being squared, accumulated and summed. If the test then reports convergence,
// the running timestep is aborted (flush) and its input matrix, i.e. the output of the
// converged timestep, is the result. A timestep k+1 only starts once the test of
// timestep k-1 is known, so at most one test is outstanding. Waiting for the write
// drain before the next start is this design's choice (it keeps the two BRAM ports
// of each bank free of collisions); the overlap with the error path, the abort rule
// and the returned matrix follow the design. max_iters bounds the run and is also
// this design's addition.
//
// Interface:
//   start (pulse, while idle) begins a solve; busy is high until done pulses.
//   tolerance: MSE threshold (positive binary64); max_iters: timestep limit (>= 1).
//   converged, iterations (timesteps whose result is returned), final_mse: valid
//   from done until the next start.
//   host_*: load a cell into both matrices (host_we = 1) or read a cell of the result
//   matrix (host_we = 0, data on host_rdata the next cycle); only while idle.
// Timing: one cell update per PE per cycle; a timestep takes ROWS*COLS issue cycles
// plus the 30-cycle read + averaging drain.
module laplace_engine
  import laplace_pkg::*;
#(
  parameter int unsigned PES  = NUM_PES_DEF,
  parameter int unsigned ROWS = PE_ROWS_DEF,
  parameter int unsigned COLS = PE_COLS_DEF,
  localparam int unsigned RW  = (ROWS > 1) ? $clog2(ROWS) : 1,
  localparam int unsigned CW  = (COLS > 1) ? $clog2(COLS) : 1,
  localparam int unsigned PW  = (PES > 1)  ? $clog2(PES)  : 1
) (
  input  logic          clk,
  input  logic          rst,
  // control
  input  logic          start,
  input  fp64_t         tolerance,
  input  logic [31:0]   max_iters,
  output logic          busy,
  output logic          done,
  output logic          converged,
  output logic [31:0]   iterations,
  output fp64_t         final_mse,
  // host access
  input  logic          host_en,
  input  logic          host_we,
  input  logic [PW-1:0] host_pe,
  input  logic [RW-1:0] host_row,
  input  logic [CW-1:0] host_col,
  input  fp64_t         host_wdata,
  output fp64_t         host_rdata
);

  // Number of cells that are updated each timestep, and its reciprocal.
  localparam int unsigned N_INNER = (PES * ROWS - 2) * (COLS - 2);
  localparam fp64_t INV_N = $realtobits(1.0 / real'(N_INNER));

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DONE} state_t;
  state_t state_q;

  // ---------------- cell issue ----------------
  logic          issuing_q, cur_sel_q, init_sel_q;
  logic [RW-1:0] row_q;
  logic [CW-1:0] col_q;
  logic [31:0]   started_q, drained_q, checked_q, max_q;
  logic          flush;

  // ---------------- PEs ----------------
  fp64_t to_above [PES], to_below [PES], err [PES], h_rd [PES];
  logic  wr_last [PES], err_v [PES];
  logic [PW-1:0] host_pe_q;
  logic  result_sel_q;

  for (genvar p = 0; p < PES; p++) begin : g_pe
    fp64_t from_above, from_below;
    if (p == 0) begin : g_top
      assign from_above = FP64_POS_ZERO;      // grid boundary, never used
    end else begin : g_mid_a
      assign from_above = to_below[p-1];
    end
    if (p == PES - 1) begin : g_bot
      assign from_below = FP64_POS_ZERO;      // grid boundary, never used
    end else begin : g_mid_b
      assign from_below = to_above[p+1];
    end

    pe #(.ROWS(ROWS), .COLS(COLS), .FIRST_PE(p == 0), .LAST_PE(p == PES - 1)) u_pe (
      .clk, .rst, .flush,
      .step_en   (issuing_q),
      .step_row  (row_q),
      .step_col  (col_q),
      .step_first(row_q == '0 && col_q == '0),
      .step_last (row_q == RW'(ROWS - 1) && col_q == CW'(COLS - 1)),
      .in_sel    (cur_sel_q),
      .halo_from_above(from_above),
      .halo_from_below(from_below),
      .halo_to_above(to_above[p]),
      .halo_to_below(to_below[p]),
      .wr_last(wr_last[p]),
      .err_valid(err_v[p]),
      .err_sum(err[p]),
      .host_en(host_en && (host_pe == PW'(p)) && (state_q == S_IDLE)),
      .host_we, .host_sel(result_sel_q),
      .host_row, .host_col, .host_wdata,
      .host_rdata(h_rd[p]));
  end

  always_ff @(posedge clk) begin
    if (host_en) host_pe_q <= host_pe;
  end
  assign host_rdata = h_rd[host_pe_q];

  // ---------------- convergence test ----------------
  fp64_t err_q [PES];
  fp64_t total_q, total_nxt, mse;
  logic  summing_q;
  logic [PW:0] sum_idx_q;
  logic  test_done, is_conv;

  fp64_add u_sum (.a(total_q), .b(err_q[sum_idx_q[PW-1:0]]), .sub(1'b0), .y(total_nxt));
  fp64_mul u_mean (.a(total_nxt), .b(INV_N), .y(mse));

  assign test_done = summing_q && (sum_idx_q == (PW+1)'(PES - 1));
  // Both values are non-negative, so their bit patterns order like their values.
  assign is_conv   = !mse[63] && !tolerance[63] && (mse[62:0] < tolerance[62:0]);

  logic can_start;
  assign can_start = (state_q == S_RUN) && !issuing_q && (started_q == drained_q) &&
                     (started_q < max_q) && (started_q <= checked_q + 1);

  assign flush = test_done && is_conv;
  assign busy  = (state_q != S_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state_q      <= S_IDLE;
      issuing_q    <= 1'b0;
      cur_sel_q    <= 1'b0;
      init_sel_q   <= 1'b0;
      row_q        <= '0;
      col_q        <= '0;
      started_q    <= '0;
      drained_q    <= '0;
      checked_q    <= '0;
      max_q        <= 32'd1;
      summing_q    <= 1'b0;
      sum_idx_q    <= '0;
      total_q      <= FP64_POS_ZERO;
      result_sel_q <= 1'b0;
      done         <= 1'b0;
      converged    <= 1'b0;
      iterations   <= '0;
      final_mse    <= FP64_POS_ZERO;
      for (int p = 0; p < PES; p++) err_q[p] <= FP64_POS_ZERO;
    end else begin
      done <= 1'b0;
      case (state_q)
        S_IDLE: begin
          if (start) begin
            state_q   <= S_RUN;
            started_q <= '0;
            drained_q <= '0;
            checked_q <= '0;
            max_q     <= (max_iters == '0) ? 32'd1 : max_iters;
            converged <= 1'b0;
            // The matrix holding the current values becomes the first input.
            cur_sel_q  <= result_sel_q;
            init_sel_q <= result_sel_q;
          end
        end

        S_RUN: begin
          // Issue cells of the running timestep.
          if (can_start) begin
            issuing_q <= 1'b1;
            row_q     <= '0;
            col_q     <= '0;
            if (started_q != '0) cur_sel_q <= ~cur_sel_q;
            started_q <= started_q + 1;
          end else if (issuing_q) begin
            if (col_q == CW'(COLS - 1)) begin
              col_q <= '0;
              if (row_q == RW'(ROWS - 1)) issuing_q <= 1'b0;
              else                        row_q <= row_q + 1'b1;
            end else begin
              col_q <= col_q + 1'b1;
            end
          end

          if (wr_last[0]) drained_q <= drained_q + 1;

          // Add up the PE errors one per cycle, then compare the mean.
          if (err_v[0]) begin
            for (int p = 0; p < PES; p++) err_q[p] <= err[p];
            summing_q <= 1'b1;
            sum_idx_q <= '0;
            total_q   <= FP64_POS_ZERO;
          end else if (summing_q) begin
            total_q   <= total_nxt;
            sum_idx_q <= sum_idx_q + 1'b1;
            if (test_done) begin
              summing_q <= 1'b0;
              checked_q <= checked_q + 1;
              final_mse <= mse;
              if (is_conv || (checked_q + 1 == max_q)) begin
                // Result = output of the tested timestep = its successor's input.
                state_q      <= S_DONE;
                issuing_q    <= 1'b0;
                converged    <= is_conv;
                iterations   <= checked_q + 1;
                result_sel_q <= ~(init_sel_q ^ checked_q[0]);
              end
            end
          end
        end

        S_DONE: begin
          state_q <= S_IDLE;
          done    <= 1'b1;
        end

        default: state_q <= S_IDLE;
      endcase
    end
  end

  a_one_test: assert property (@(posedge clk) disable iff (rst) !(err_v[0] && summing_q));
  a_lockstep: assert property (@(posedge clk) disable iff (rst) err_v[0] == err_v[PES-1]);

endmodule
