// fp64_mul: combinational IEEE-754 binary64 multiplier, y = a * b.
//
// It stands in for the vendor floating-point multiplier core; only the function is
// given, so the structure is the plain one: multiply the two 53-bit significands into
// a 106-bit product, normalise it so that its leading one sits at bit 105, derive the
// biased exponent, and round to nearest even (laplace_pkg::round_pack, which also
// produces subnormal results). Subnormal inputs are handled. NaN inputs and 0 * inf
// give the quiet NaN 0x7FF8...; other infinite operands give a signed infinity.
// Callers add a delay line to model a pipelined core of a given latency.
//
// Ports: a, b operands; y product.
module fp64_mul
  import laplace_pkg::*;
(
  input  fp64_t a,
  input  fp64_t b,
  output fp64_t y
);

  always_comb begin
    logic               s, a_nan, b_nan, a_inf, b_inf, a_zero, b_zero;
    logic [10:0]        ea, eb;
    logic [52:0]        ma, mb;
    logic [105:0]       p, pn;
    logic [55:0]        mn;
    logic signed [13:0] e;
    int unsigned        lz;

    s  = a[63] ^ b[63];
    ea = a[62:52];
    eb = b[62:52];
    ma = {(ea != 11'd0), a[51:0]};
    mb = {(eb != 11'd0), b[51:0]};
    a_inf  = (ea == 11'h7FF) && (a[51:0] == 52'd0);
    b_inf  = (eb == 11'h7FF) && (b[51:0] == 52'd0);
    a_nan  = (ea == 11'h7FF) && (a[51:0] != 52'd0);
    b_nan  = (eb == 11'h7FF) && (b[51:0] != 52'd0);
    a_zero = (a[62:0] == 63'd0);
    b_zero = (b[62:0] == 63'd0);

    p  = {53'd0, ma} * {53'd0, mb};
    lz = lzc106(p);
    if (lz > 105) lz = 105;
    pn = p << lz;
    // Leading one at bit 105 - lz of p; exponent of bit 105 of pn.
    e  = $signed({3'b000, (ea == 11'd0) ? 11'd1 : ea})
       + $signed({3'b000, (eb == 11'd0) ? 11'd1 : eb})
       - 14'sd1022 - 14'(lz);
    mn = {pn[105:51], |pn[50:0]};

    if (a_nan || b_nan || (a_inf && b_zero) || (b_inf && a_zero)) begin
      y = FP64_QNAN;
    end else if (a_inf || b_inf) begin
      y = {s, 11'h7FF, 52'd0};
    end else if (a_zero || b_zero) begin
      y = {s, 63'd0};
    end else begin
      y = round_pack(s, e, mn);
    end
  end

endmodule
