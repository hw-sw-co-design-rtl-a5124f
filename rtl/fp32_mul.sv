// fp32_mul: combinational IEEE-754 single-precision multiplier, the "x" of a
// processing element (Im2colBuffer element times weight, into MulBuffer).
//
// The 24x24-bit significand product is normalised by at most one place and
// rounded to nearest, ties to even. Subnormal inputs are read as zero and
// results below the smallest normal number are flushed to a signed zero;
// overflow gives a signed infinity, any NaN or inf*0 gives a quiet NaN.
// The accelerator works on 32-bit floats as its source describes; the
// rounding mode and the subnormal handling are this design's choices.
// Timing: purely combinational, the caller registers the result.
module fp32_mul
  import imac_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t y
);

  logic        sa, sb, sy;
  logic [7:0]  ea, eb;
  logic [22:0] fa, fb;
  logic        za, zb, ia, ib, na, nb;
  logic [47:0] prod;
  logic [23:0] mant;
  logic        guard, sticky, round_up;
  logic [24:0] mant_r;
  logic signed [10:0] exp_v;

  always_comb begin
    {sa, ea, fa} = a;
    {sb, eb, fb} = b;
    sy = sa ^ sb;
    za = (ea == 8'd0);
    zb = (eb == 8'd0);
    ia = (ea == 8'hff) && (fa == 23'd0);
    ib = (eb == 8'hff) && (fb == 23'd0);
    na = (ea == 8'hff) && (fa != 23'd0);
    nb = (eb == 8'hff) && (fb != 23'd0);

    prod  = {1'b1, fa} * {1'b1, fb};
    exp_v = 11'(signed'({3'b000, ea})) + 11'(signed'({3'b000, eb})) - 11'sd127;
    if (prod[47]) begin
      mant   = prod[47:24];
      guard  = prod[23];
      sticky = |prod[22:0];
      exp_v  = exp_v + 11'sd1;
    end else begin
      mant   = prod[46:23];
      guard  = prod[22];
      sticky = |prod[21:0];
    end
    round_up = guard && (sticky || mant[0]);
    mant_r   = {1'b0, mant} + {24'd0, round_up};
    if (mant_r[24]) begin
      mant_r = mant_r >> 1;
      exp_v  = exp_v + 11'sd1;
    end

    if (na || nb || (ia && zb) || (ib && za)) begin
      y = FP32_QNAN;
    end else if (ia || ib) begin
      y = {sy, 8'hff, 23'd0};
    end else if (za || zb) begin
      y = {sy, 31'd0};
    end else if (exp_v >= 11'sd255) begin
      y = {sy, 8'hff, 23'd0};
    end else if (exp_v <= 11'sd0) begin
      y = {sy, 31'd0};
    end else begin
      y = {sy, exp_v[7:0], mant_r[22:0]};
    end
  end

endmodule
