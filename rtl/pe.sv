// pe: processing element, updates its ROWS x COLS submatrix at one cell per cycle.
//
// A PE owns two BRAM controllers (mat 0 and mat 1). In each timestep one is the
// input matrix and the other the output matrix; the roles swap every timestep
// (in_sel), so no copy is ever made. The engine broadcasts the same cell address to
// all PEs, which therefore run in lockstep.
//
// Per cell (r, c), in a single pass:
//   cycle t      the input controller reads the four neighbours (column-parity banks).
//   cycle t+1    left/right/up/down go to the averaging module. At the top row the
//                upper neighbour is the halo from the PE above (its spare-port read of
//                its own bottom row), at the bottom row the lower neighbour is the halo
//                from the PE below. The right neighbour is pushed into the FIFO: it is
//                the old value of the next cell.
//   cycle t+30   the new value y leaves the averaging module and is written to the
//                output controller; the FIFO head (old value x of the same cell) and y
//                go to the error module, which accumulates (y - x)^2.
// Cells on the global grid boundary (columns 0 and COLS-1, the top row of the first
// PE and the bottom row of the last PE) are not written and add +0 to the error; both
// matrices are loaded with the same values, so the boundary is kept without a copy.
// This dataflow follows the design; the tag format, boundary handling by flags and
// the host port are this design's choices.
//
// Interface: step_en/row/col/first/last/in_sel from the engine, one cell per cycle;
// halo_* to and from the neighbouring PEs (combinational, same cycle in all PEs);
// wr_last pulses when the last cell of a timestep is written; err_valid/err_sum give
// the PE's accumulated error of a timestep; host_* load (both matrices) and unload
// (matrix host_sel) the submatrix, one-cycle read latency. flush aborts a timestep.
module pe
  import laplace_pkg::*;
#(
  parameter int unsigned ROWS     = PE_ROWS_DEF,
  parameter int unsigned COLS     = PE_COLS_DEF,
  parameter bit          FIRST_PE = 1'b1,   // holds the top rows of the grid
  parameter bit          LAST_PE  = 1'b1,   // holds the bottom rows of the grid
  localparam int unsigned RW = (ROWS > 1) ? $clog2(ROWS) : 1,
  localparam int unsigned CW = (COLS > 1) ? $clog2(COLS) : 1
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          flush,
  // lockstep cell stream
  input  logic          step_en,
  input  logic [RW-1:0] step_row,
  input  logic [CW-1:0] step_col,
  input  logic          step_first,
  input  logic          step_last,
  input  logic          in_sel,
  // halo exchange
  input  fp64_t         halo_from_above,
  input  fp64_t         halo_from_below,
  output fp64_t         halo_to_above,
  output fp64_t         halo_to_below,
  // results
  output logic          wr_last,
  output logic          err_valid,
  output fp64_t         err_sum,
  // host access
  input  logic          host_en,
  input  logic          host_we,
  input  logic          host_sel,
  input  logic [RW-1:0] host_row,
  input  logic [CW-1:0] host_col,
  input  fp64_t         host_wdata,
  output fp64_t         host_rdata
);

  typedef struct packed {
    logic          out_sel;
    logic          skip;
    logic          first;
    logic          last;
    logic [RW-1:0] row;
    logic [CW-1:0] col;
  } tag_t;

  // ---------------- stage 1 registers (read data valid) ----------------
  logic          s1_valid, s1_sel, s1_first, s1_last;
  logic [RW-1:0] s1_row;
  logic [CW-1:0] s1_col;

  always_ff @(posedge clk) begin
    if (rst || flush) begin
      s1_valid <= 1'b0;
    end else begin
      s1_valid <= step_en;
    end
    s1_sel   <= in_sel;
    s1_first <= step_first;
    s1_last  <= step_last;
    s1_row   <= step_row;
    s1_col   <= step_col;
  end

  // ---------------- the two matrices ----------------
  fp64_t nb_a [2], nb_b [2], nb_up [2], nb_dn [2], h_rd [2];
  logic  y_valid;
  fp64_t y;
  tag_t  ytag;
  logic  h_sel_q;

  for (genvar k = 0; k < 2; k++) begin : g_mat
    bram_ctrl #(.ROWS(ROWS), .COLS(COLS)) u_mat (
      .clk, .rst,
      .rd_en (step_en && (in_sel == k[0])),
      .rd_row(step_row),
      .rd_col(step_col),
      .nb_a(nb_a[k]), .nb_b(nb_b[k]), .nb_up(nb_up[k]), .nb_dn(nb_dn[k]),
      .wr_en (y_valid && !ytag.skip && (ytag.out_sel == k[0])),
      .wr_row(ytag.row),
      .wr_col(ytag.col),
      .wr_data(y),
      .host_en(host_en && (host_we || host_sel == k[0])),
      .host_we(host_we),
      .host_row, .host_col, .host_wdata,
      .host_rdata(h_rd[k]));
  end

  always_ff @(posedge clk) begin
    if (host_en) h_sel_q <= host_sel;
  end
  assign host_rdata = h_sel_q ? h_rd[1] : h_rd[0];

  fp64_t n_a, n_b, n_up, n_dn, n_c, n_d;
  assign n_a  = s1_sel ? nb_a[1]  : nb_a[0];
  assign n_b  = s1_sel ? nb_b[1]  : nb_b[0];
  assign n_up = s1_sel ? nb_up[1] : nb_up[0];
  assign n_dn = s1_sel ? nb_dn[1] : nb_dn[0];

  // Spare-port reads: on the top row n_up is this PE's bottom row (for the PE below),
  // on the bottom row n_dn is this PE's top row (for the PE above).
  assign halo_to_below = n_up;
  assign halo_to_above = n_dn;

  logic top_row, bot_row;
  assign top_row = (s1_row == '0);
  assign bot_row = (s1_row == RW'(ROWS - 1));
  assign n_c = top_row ? halo_from_above : n_up;
  assign n_d = bot_row ? halo_from_below : n_dn;

  tag_t s1_tag;
  always_comb begin
    s1_tag.out_sel = ~s1_sel;
    s1_tag.skip    = (s1_col == '0) || (s1_col == CW'(COLS - 1)) ||
                     (FIRST_PE && top_row) || (LAST_PE && bot_row);
    s1_tag.first   = s1_first;
    s1_tag.last    = s1_last;
    s1_tag.row     = s1_row;
    s1_tag.col     = s1_col;
  end

  // ---------------- averaging module ----------------
  avg_unit #(.TAG_W($bits(tag_t))) u_avg (
    .clk, .rst, .flush,
    .in_valid(s1_valid),
    .a(n_a), .b(n_b), .c(n_c), .d(n_d),
    .in_tag(s1_tag),
    .out_valid(y_valid),
    .y(y),
    .out_tag(ytag));

  // ---------------- right-neighbour FIFO ----------------
  fp64_t x_old;
  nbr_fifo #(.W(64), .DEPTH(FIFO_DEPTH_DEF)) u_fifo (
    .clk, .rst, .flush,
    .push(s1_valid && (s1_col != CW'(COLS - 1))),
    .din (n_b),
    .pop (y_valid && (ytag.col != '0)),
    .dout(x_old),
    .empty(),
    .full(),
    .count());

  // ---------------- error module ----------------
  err_unit u_err (
    .clk, .rst, .flush,
    .in_valid(y_valid),
    .y(y),
    .x(x_old),
    .in_skip(ytag.skip),
    .in_first(ytag.first),
    .in_last(ytag.last),
    .out_valid(err_valid),
    .out_err(err_sum));

  assign wr_last = y_valid && ytag.last;

  a_host_idle: assert property (@(posedge clk) disable iff (rst) !(host_en && (step_en || y_valid)));

endmodule
