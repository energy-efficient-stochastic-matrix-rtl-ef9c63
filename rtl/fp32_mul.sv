// fp32_mul: combinational IEEE-754 single-precision multiplier, y = a * b.
//
// The 24x24-bit significand product is normalised by at most one place and
// rounded to nearest, ties to even. Subnormal inputs are read as zero and a
// result below the normal range is flushed to a signed zero; a result above
// it becomes a signed infinity. Infinity and NaN inputs give infinity or a
// quiet NaN (0 * inf). The estimator's kernels compute in single precision;
// the flush-to-zero treatment of subnormals is this design's own choice.
// Timing: purely combinational, no clock.
module fp32_mul
  import sme_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t y
);

  logic        sa, sb, sy;
  logic [7:0]  ea, eb;
  logic [22:0] fa, fb;
  logic [47:0] prod;
  logic [23:0] mant;
  logic        guard, sticky, round_up;
  logic [24:0] mant_r;
  logic signed [10:0] exp_n;

  always_comb begin
    sa = a[31]; ea = a[30:23]; fa = a[22:0];
    sb = b[31]; eb = b[30:23]; fb = b[22:0];
    sy = sa ^ sb;
    prod     = {1'b1, fa} * {1'b1, fb};
    exp_n    = 11'(signed'({3'b000, ea})) + 11'(signed'({3'b000, eb})) - 11'sd127;
    if (prod[47]) begin
      mant   = prod[47:24];
      guard  = prod[23];
      sticky = |prod[22:0];
      exp_n  = exp_n + 11'sd1;
    end else begin
      mant   = prod[46:23];
      guard  = prod[22];
      sticky = |prod[21:0];
    end
    round_up = guard & (sticky | mant[0]);
    mant_r   = {1'b0, mant} + {24'd0, round_up};
    if (mant_r[24]) begin
      mant_r = mant_r >> 1;
      exp_n  = exp_n + 11'sd1;
    end

    if ((ea == 8'hFF && fa != '0) || (eb == 8'hFF && fb != '0))
      y = 32'h7FC0_0000;                                  // NaN operand
    else if (ea == 8'hFF || eb == 8'hFF)
      y = (ea == 8'h00 || eb == 8'h00) ? 32'h7FC0_0000    // inf * 0
                                       : {sy, 8'hFF, 23'd0};
    else if (ea == 8'h00 || eb == 8'h00)
      y = {sy, 31'd0};                                    // zero (subnormals flushed)
    else if (exp_n >= 11'sd255)
      y = {sy, 8'hFF, 23'd0};                             // overflow
    else if (exp_n <= 11'sd0)
      y = {sy, 31'd0};                                    // underflow, flush to zero
    else
      y = {sy, exp_n[7:0], mant_r[22:0]};
  end

endmodule
