// fp32_add: combinational IEEE-754 single-precision adder, y = a + b.
//
// The operand of larger magnitude is taken as the base; the other significand
// is aligned to it with three extra bits (guard, round, sticky), added or
// subtracted, normalised (one place right after a carry, or left by the
// leading-zero count after a cancellation) and rounded to nearest, ties to
// even. Subnormal inputs are read as zero and results below the normal range
// are flushed to zero; an exact cancellation gives +0. Infinities and NaNs
// follow IEEE rules (inf - inf is a quiet NaN). Single precision follows the
// estimator's float kernels; flush-to-zero is this design's own choice.
// Timing: purely combinational, no clock.
module fp32_add
  import sme_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t y
);

  logic        a_zero, b_zero, a_inf, b_inf, a_nan, b_nan;
  logic        swap;
  fp32_t       op_big, op_sml;
  logic [7:0]  diff;
  logic [26:0] mb, ms, ms_sh;
  logic [27:0] sum;
  logic        sub;
  logic [4:0]  lz;
  logic signed [9:0] exp_n;
  logic [23:0] mant;
  logic        guard, rest, round_up;
  logic [24:0] mant_r;

  always_comb begin
    a_zero = (a[30:23] == 8'h00);
    b_zero = (b[30:23] == 8'h00);
    a_inf  = (a[30:23] == 8'hFF) && (a[22:0] == '0);
    b_inf  = (b[30:23] == 8'hFF) && (b[22:0] == '0);
    a_nan  = (a[30:23] == 8'hFF) && (a[22:0] != '0);
    b_nan  = (b[30:23] == 8'hFF) && (b[22:0] != '0);

    swap  = (b[30:0] > a[30:0]);
    op_big   = swap ? b : a;
    op_sml = swap ? a : b;
    diff  = op_big[30:23] - op_sml[30:23];
    sub   = op_big[31] ^ op_sml[31];

    mb = {1'b1, op_big[22:0], 3'b000};
    ms = {1'b1, op_sml[22:0], 3'b000};
    // align with sticky
    if (diff > 8'd26)
      ms_sh = 27'd1;
    else begin
      ms_sh = ms >> diff;
      if ((ms & ((27'd1 << diff) - 27'd1)) != '0) ms_sh[0] = 1'b1;
    end

    sum   = sub ? ({1'b0, mb} - {1'b0, ms_sh}) : ({1'b0, mb} + {1'b0, ms_sh});
    exp_n = 10'(signed'({2'b00, op_big[30:23]}));
    lz    = '0;

    if (sum[27]) begin
      sum   = {1'b0, sum[27:2], sum[1] | sum[0]};
      exp_n = exp_n + 10'sd1;
    end else begin
      for (int k = 26; k >= 0; k--) begin
        if (sum[k]) begin
          lz = 5'(26 - k);
          break;
        end
      end
      sum   = sum << lz;
      exp_n = exp_n - 10'(lz);
    end

    mant     = sum[26:3];
    guard    = sum[2];
    rest     = sum[1] | sum[0];
    round_up = guard & (rest | mant[0]);
    mant_r   = {1'b0, mant} + {24'd0, round_up};
    if (mant_r[24]) begin
      mant_r = mant_r >> 1;
      exp_n  = exp_n + 10'sd1;
    end

    if (a_nan || b_nan || (a_inf && b_inf && (a[31] != b[31])))
      y = 32'h7FC0_0000;
    else if (a_inf)
      y = a;
    else if (b_inf)
      y = b;
    else if (a_zero && b_zero)
      y = {a[31] & b[31], 31'd0};
    else if (a_zero)
      y = b;
    else if (b_zero)
      y = a;
    else if (sum == '0)
      y = FP_ZERO;
    else if (exp_n >= 10'sd255)
      y = {op_big[31], 8'hFF, 23'd0};
    else if (exp_n <= 10'sd0)
      y = {op_big[31], 31'd0};
    else
      y = {op_big[31], exp_n[7:0], mant_r[22:0]};
  end

endmodule
