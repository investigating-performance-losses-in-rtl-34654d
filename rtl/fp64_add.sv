// fp64_add: combinational IEEE-754 binary64 adder/subtractor, y = a + b or a - b.
//
// It stands in for the vendor floating-point adder core the stencil engine was built
// around; only its function (a double-precision add) is given, so the structure here
// is a plain textbook one: order the operands by magnitude, align the smaller one with
// a guard/round/sticky tail, add or subtract the significands, normalise, and round
// to nearest even (laplace_pkg::round_pack). Subnormal inputs and outputs are handled;
// NaN inputs or inf - inf give the quiet NaN 0x7FF8..., an infinite input passes.
// The module is purely combinational: callers place it in front of a delay line to
// model a pipelined core of a given latency, or inside a one-cycle feedback loop.
//
// Ports: a, b operands; sub = 1 subtracts b; y result.
module fp64_add
  import laplace_pkg::*;
(
  input  fp64_t a,
  input  fp64_t b,
  input  logic  sub,
  output fp64_t y
);

  logic        sa, sb;
  logic [10:0] ea, eb;
  logic [52:0] ma, mb;
  logic        a_nan, b_nan, a_inf, b_inf;

  always_comb begin
    logic              swap, sl, ss, eff_sub;
    logic [10:0]       el, es, d11;
    logic [52:0]       ml, ms;
    logic [111:0]      sh;
    logic [55:0]       al, as_;
    logic [56:0]       s;
    logic [55:0]       mn;
    logic signed [13:0] e;
    int unsigned       d, lz, lim;

    sa = a[63];
    sb = b[63] ^ sub;
    ea = a[62:52];
    eb = b[62:52];
    ma = {(ea != 11'd0), a[51:0]};
    mb = {(eb != 11'd0), b[51:0]};
    a_inf = (ea == 11'h7FF) && (a[51:0] == 52'd0);
    b_inf = (eb == 11'h7FF) && (b[51:0] == 52'd0);
    a_nan = (ea == 11'h7FF) && (a[51:0] != 52'd0);
    b_nan = (eb == 11'h7FF) && (b[51:0] != 52'd0);

    // Effective exponents (subnormals behave as exponent 1).
    swap = ({(eb == 11'd0) ? 11'd1 : eb, mb} > {(ea == 11'd0) ? 11'd1 : ea, ma});
    sl   = swap ? sb : sa;
    ss   = swap ? sa : sb;
    el   = swap ? ((eb == 11'd0) ? 11'd1 : eb) : ((ea == 11'd0) ? 11'd1 : ea);
    es   = swap ? ((ea == 11'd0) ? 11'd1 : ea) : ((eb == 11'd0) ? 11'd1 : eb);
    ml   = swap ? mb : ma;
    ms   = swap ? ma : mb;
    eff_sub = sl ^ ss;

    d11 = el - es;
    d   = (d11 > 11'd63) ? 63 : int'(d11);
    al  = {ml, 3'b000};
    sh  = {ms, 3'b000, 56'd0} >> d;
    as_ = {sh[111:57], sh[56] | (|sh[55:0])};

    s = eff_sub ? ({1'b0, al} - {1'b0, as_}) : ({1'b0, al} + {1'b0, as_});

    e   = $signed({3'b000, el});
    mn  = '0;
    lz  = 0;
    lim = 0;
    if (s[56]) begin
      mn = {s[56:2], s[1] | s[0]};
      e  = e + 14'sd1;
    end else begin
      lz = lzc106({s[55:0], 50'd0});
      if (lz > 55) lz = 55;
      lim = int'(el) - 1;            // keep the exponent at 1 or above
      if (lz > lim) lz = lim;
      mn = s[55:0] << lz;
      e  = e - 14'(lz);
    end

    if (a_nan || b_nan || (a_inf && b_inf && (sa != sb))) begin
      y = FP64_QNAN;
    end else if (a_inf) begin
      y = {sa, 11'h7FF, 52'd0};
    end else if (b_inf) begin
      y = {sb, 11'h7FF, 52'd0};
    end else if (s == 57'd0) begin
      y = {(sl & ss), 63'd0};        // exact zero: +0 unless both operands are -0
    end else begin
      y = round_pack(sl, e, mn);
    end
  end

endmodule
