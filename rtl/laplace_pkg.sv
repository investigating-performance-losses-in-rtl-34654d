// laplace_pkg: types, sizes and shared IEEE-754 binary64 helper functions for the
// Jacobi/Laplace stencil engine.
//
// The engine stores every grid cell as a binary64 (double precision) value, as the
// solver it implements works in double precision. The latencies below follow the
// averaging pipeline: two adder levels of ADD_LAT cycles each plus one cycle for the
// divide-by-four give the 29-cycle averaging latency the design is built around.
// The split 14 + 14 + 1 and the multiplier latency are this design's own choice.
//
// round_pack() is the common tail of the adder and the multiplier: it takes a sign,
// a biased exponent and a 56-bit significand (bit 55 = integer bit, bits 2..0 =
// guard, round and sticky), denormalises when the exponent is below 1, rounds to
// nearest even, and packs the result (overflow gives infinity).
package laplace_pkg;

  typedef logic [63:0] fp64_t;

  // Submatrix of one processing element and number of processing elements.
  localparam int unsigned PE_ROWS_DEF = 16;
  localparam int unsigned PE_COLS_DEF = 256;
  localparam int unsigned NUM_PES_DEF = 8;

  // Pipeline latencies (cycles).
  localparam int unsigned ADD_LAT   = 14;  // one double-precision add level
  localparam int unsigned DIV4_LAT  = 1;   // exponent decrement
  localparam int unsigned AVG_LAT   = 2 * ADD_LAT + DIV4_LAT;  // = 29
  localparam int unsigned MUL_LAT   = 15;  // double-precision multiply
  localparam int unsigned FIFO_DEPTH_DEF = 32;

  localparam fp64_t FP64_POS_ZERO = 64'h0000_0000_0000_0000;
  localparam fp64_t FP64_QNAN     = 64'h7FF8_0000_0000_0000;

  // Number of leading zeros of a 106-bit vector (106 when it is all zero).
  function automatic int unsigned lzc106(input logic [105:0] v);
    int unsigned n;
    n = 106;
    for (int i = 0; i < 106; i++) begin
      if (v[i]) n = 105 - i;
    end
    return n;
  endfunction

  // Round to nearest even and pack. e is the biased exponent of m[55].
  function automatic fp64_t round_pack(input logic sign, input logic signed [13:0] e,
                                       input logic [55:0] m);
    logic signed [13:0] ee;
    logic [55:0]        mm;
    logic [53:0]        r;      // rounded 53-bit significand plus carry
    logic               up;
    int unsigned        sh;
    ee = e;
    mm = m;
    if (ee < 14'sd1) begin
      // Denormalise: shift right until the exponent is 1, keeping a sticky bit.
      sh = (1 - int'(ee) > 60) ? 60 : unsigned'(1 - int'(ee));
      for (int i = 0; i < 60; i++) begin
        if (i < sh) mm = {1'b0, mm[55:2], mm[1] | mm[0]};
      end
      ee = 14'sd1;
    end
    up = mm[2] & (mm[1] | mm[0] | mm[3]);
    r  = {1'b0, mm[55:3]} + {53'd0, up};
    if (r[53]) begin
      r  = r >> 1;
      ee = ee + 14'sd1;
    end
    if (ee >= 14'sd2047) begin
      return {sign, 11'h7FF, 52'd0};
    end
    if (!r[52]) begin
      return {sign, 11'd0, r[51:0]};  // subnormal or zero
    end
    return {sign, ee[10:0], r[51:0]};
  endfunction

endpackage
