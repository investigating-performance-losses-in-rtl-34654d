// err_unit: the error module, accumulates (y - x)^2 over a PE's cells per timestep.
//
// For each cell the new value y (from the averaging module) and the old value x
// (from the right-neighbour FIFO) arrive together. A subtractor forms y - x, a
// multiplier squares the difference, and an accumulator sums the squares; the sum
// over one timestep is the PE's accumulated error, used by the engine's convergence
// test. Cells that are not updated (grid boundary) contribute +0. The subtract /
// square / accumulate structure follows the design; the subtractor latency (ADD_LAT)
// and multiplier latency (MUL_LAT) are this design's choice.
//
// Timing: one cell per cycle. in_first/in_last mark the first and last cell of a
// timestep; out_valid pulses with the finished sum SUB_LT + MUL_LT + 1 cycles after
// the last cell entered. flush drops all work in flight.
module err_unit
  import laplace_pkg::*;
#(
  parameter int unsigned SUB_LT = ADD_LAT,
  parameter int unsigned MUL_LT = MUL_LAT
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  flush,
  input  logic  in_valid,
  input  fp64_t y,
  input  fp64_t x,
  input  logic  in_skip,
  input  logic  in_first,
  input  logic  in_last,
  output logic  out_valid,
  output fp64_t out_err
);

  fp64_t diff, sq;
  fp64_add u_sub (.a(y), .b(x), .sub(1'b1), .y(diff));

  logic        v1;
  logic [66:0] d1;
  pipe_delay #(.W(67), .LAT(SUB_LT)) u_p1 (
    .clk, .rst, .flush, .in_valid(in_valid), .in_data({diff, in_skip, in_first, in_last}),
    .out_valid(v1), .out_data(d1));

  fp64_mul u_sq (.a(d1[66:3]), .b(d1[66:3]), .y(sq));

  logic        v2;
  logic [66:0] d2;
  pipe_delay #(.W(67), .LAT(MUL_LT)) u_p2 (
    .clk, .rst, .flush, .in_valid(v1), .in_data({sq, d1[2:0]}),
    .out_valid(v2), .out_data(d2));

  fp64_acc u_acc (
    .clk, .rst, .flush,
    .in_valid(v2),
    .in_first(d2[1]),
    .in_last (d2[0]),
    .in_data (d2[2] ? FP64_POS_ZERO : d2[66:3]),
    .out_valid(out_valid),
    .out_sum  (out_err));

endmodule
