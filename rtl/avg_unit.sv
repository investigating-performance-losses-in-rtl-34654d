// avg_unit: the averaging module, y = ((a + b) + (c + d)) / 4 in binary64.
//
// a and b are the left and right neighbours of the target cell, c and d the upper
// and lower ones. Two adders form a + b and c + d in parallel, a third adds the two
// sums, and the division by four is done without a divider or multiplier: dividing
// a binary64 number by 4 only lowers its exponent by 2, so the last stage subtracts
// 2 from the exponent field (falling back to a rounded shift in the rare case that
// the result is subnormal). That structure and the total latency of 29 cycles follow
// the design; splitting the latency as 14 + 14 + 1 cycles is this design's choice.
//
// Timing: fully pipelined, one new cell per cycle. in_valid/in_tag enter with the
// operands and leave on out_valid/out_tag with y, LAT = 2*ADD_LAT + DIV_LAT cycles
// later. in_tag carries the cell's address and flags through the pipeline. flush
// drops everything in flight.
module avg_unit
  import laplace_pkg::*;
#(
  parameter int unsigned TAG_W   = 8,
  parameter int unsigned ADD_LT  = ADD_LAT,
  parameter int unsigned DIV_LT  = DIV4_LAT
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             flush,
  input  logic             in_valid,
  input  fp64_t            a,
  input  fp64_t            b,
  input  fp64_t            c,
  input  fp64_t            d,
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  output fp64_t            y,
  output logic [TAG_W-1:0] out_tag
);

  // Divide by four by lowering the exponent by two.
  function automatic fp64_t div4(input fp64_t x);
    logic [10:0] e;
    e = x[62:52];
    if (e == 11'h7FF) return x;                       // inf / NaN unchanged
    if (e > 11'd2)    return {x[63], e - 11'd2, x[51:0]};
    return round_pack(x[63], $signed({3'b000, (e == 11'd0) ? 11'd1 : e}) - 14'sd2,
                      {(e != 11'd0), x[51:0], 3'b000});
  endfunction

  // Level 1: a + b and c + d.
  fp64_t ab, cd;
  fp64_add u_add_ab (.a(a), .b(b), .sub(1'b0), .y(ab));
  fp64_add u_add_cd (.a(c), .b(d), .sub(1'b0), .y(cd));

  logic                    v1;
  logic [128+TAG_W-1:0]    d1;
  pipe_delay #(.W(128 + TAG_W), .LAT(ADD_LT)) u_p1 (
    .clk, .rst, .flush, .in_valid(in_valid), .in_data({ab, cd, in_tag}),
    .out_valid(v1), .out_data(d1));

  // Level 2: (a + b) + (c + d).
  fp64_t s;
  fp64_add u_add_s (.a(d1[128+TAG_W-1 -: 64]), .b(d1[64+TAG_W-1 -: 64]), .sub(1'b0), .y(s));

  logic                 v2;
  logic [64+TAG_W-1:0]  d2;
  pipe_delay #(.W(64 + TAG_W), .LAT(ADD_LT)) u_p2 (
    .clk, .rst, .flush, .in_valid(v1), .in_data({s, d1[TAG_W-1:0]}),
    .out_valid(v2), .out_data(d2));

  // Level 3: divide by four.
  logic [64+TAG_W-1:0]  d3;
  pipe_delay #(.W(64 + TAG_W), .LAT(DIV_LT)) u_p3 (
    .clk, .rst, .flush, .in_valid(v2), .in_data({div4(d2[64+TAG_W-1 -: 64]), d2[TAG_W-1:0]}),
    .out_valid(out_valid), .out_data(d3));

  assign y       = d3[64+TAG_W-1 -: 64];
  assign out_tag = d3[TAG_W-1:0];

endmodule
