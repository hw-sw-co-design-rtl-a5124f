// fp32_add: combinational IEEE-754 single-precision adder. A processing
// element uses two: one accumulates MulBuffer into OutBuffer over the kernel
// taps, the other adds OutBuffer to the Output BRAM word, accumulating over
// input channels.
//
// The operand of larger magnitude is kept, the other is shifted right to the
// same exponent inside a 50-bit field whose lowest bit collects everything
// shifted out (sticky). After the add or subtract the sum is normalised with
// a leading-one search and rounded to nearest, ties to even. Subnormal inputs
// count as zero and subnormal results are flushed to zero; an exact
// cancellation gives +0. Overflow gives infinity; NaN or inf-inf give a quiet
// NaN. Only 32-bit floating point is taken from the source; the rounding and
// subnormal rules are this design's choice.
// Timing: purely combinational.
module fp32_add
  import imac_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t y
);

  logic        sa, sb, sl, ss;
  logic [7:0]  ea, eb, el, es;
  logic [22:0] fa, fb;
  logic        za, zb, ia, ib, na, nb;
  logic [49:0] ml, ms, ms_sh;
  logic [7:0]  d;
  logic        sticky_sh;
  logic [50:0] sum;
  logic [5:0]  lead;
  logic [50:0] norm;
  logic signed [10:0] exp_v;
  logic [23:0] mant;
  logic        guard, sticky, round_up;
  logic [24:0] mant_r;

  always_comb begin
    {sa, ea, fa} = a;
    {sb, eb, fb} = b;
    za = (ea == 8'd0);
    zb = (eb == 8'd0);
    ia = (ea == 8'hff) && (fa == 23'd0);
    ib = (eb == 8'hff) && (fb == 23'd0);
    na = (ea == 8'hff) && (fa != 23'd0);
    nb = (eb == 8'hff) && (fb != 23'd0);

    // order by magnitude: l = larger, s = smaller
    if ({ea, fa} >= {eb, fb}) begin
      sl = sa; el = ea; ml = {1'b1, fa, 26'd0};
      ss = sb; es = eb; ms = {1'b1, fb, 26'd0};
    end else begin
      sl = sb; el = eb; ml = {1'b1, fb, 26'd0};
      ss = sa; es = ea; ms = {1'b1, fa, 26'd0};
    end
    d = el - es;

    // align the smaller operand; bits shifted out survive as a sticky bit
    if (d > 8'd49) begin
      ms_sh     = 50'd0;
      sticky_sh = 1'b1;
    end else begin
      ms_sh     = ms >> d;
      sticky_sh = |(ms & ((50'd1 << d) - 50'd1));
    end
    ms_sh[0] = ms_sh[0] | sticky_sh;

    if (sl == ss) sum = {1'b0, ml} + {1'b0, ms_sh};
    else          sum = {1'b0, ml} - {1'b0, ms_sh};

    // leading one position
    lead = 6'd0;
    for (int i = 0; i <= 50; i++) begin
      if (sum[i]) lead = 6'(i);
    end
    // bring the leading one to bit 50
    norm  = sum << (6'd50 - lead);
    exp_v = 11'(signed'({3'b000, el})) + 11'(signed'({5'd0, lead})) - 11'sd49;

    mant     = norm[50:27];
    guard    = norm[26];
    sticky   = |norm[25:0];
    round_up = guard && (sticky || mant[0]);
    mant_r   = {1'b0, mant} + {24'd0, round_up};
    if (mant_r[24]) begin
      mant_r = mant_r >> 1;
      exp_v  = exp_v + 11'sd1;
    end

    if (na || nb || (ia && ib && (sa != sb))) begin
      y = FP32_QNAN;
    end else if (ia) begin
      y = {sa, 8'hff, 23'd0};
    end else if (ib) begin
      y = {sb, 8'hff, 23'd0};
    end else if (za && zb) begin
      y = {sa & sb, 31'd0};
    end else if (za) begin
      y = b;
    end else if (zb) begin
      y = a;
    end else if (sum == 51'd0) begin
      y = FP32_ZERO;
    end else if (exp_v >= 11'sd255) begin
      y = {sl, 8'hff, 23'd0};
    end else if (exp_v <= 11'sd0) begin
      y = {sl, 31'd0};
    end else begin
      y = {sl, exp_v[7:0], mant_r[22:0]};
    end
  end

endmodule
