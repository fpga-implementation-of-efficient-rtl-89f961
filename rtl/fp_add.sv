// fp_add: IEEE-754 single-precision adder (combinational).
//
// The adder half of the filter's arithmetic unit: the source design uses one
// floating-point adder, reused for every tap, and does not show its inside.
// This one is the classic align-add-normalise-round unit:
//   1. the operand of larger magnitude is put first;
//   2. the smaller significand is shifted right by the exponent difference,
//      keeping two extra bits (guard, round) and OR-ing everything shifted out
//      past them into a sticky bit;
//   3. the significands are added (same signs) or subtracted (different signs);
//   4. the result is normalised: one place right after a carry, or left by the
//      leading-zero count after a cancellation;
//   5. it is rounded to nearest, ties to even.
// An exact cancellation gives +0. The sign of a non-zero result is that of the
// larger operand.
//
// Choices of this design, not of the source: flush-to-zero for subnormal inputs
// and results, overflow to a signed infinity, quiet NaN 0x7FC00000 for NaN
// inputs and for +inf + -inf.
//
// Interface: a, b operands; y = a + b. Purely combinational, no clock.
module fp_add
  import fir_pkg::*;
(
  input  logic [FP_W-1:0] a,
  input  logic [FP_W-1:0] b,
  output logic [FP_W-1:0] y
);

  fp32_t fa, fb, op_hi, op_lo;
  assign fa = fp32_t'(a);
  assign fb = fp32_t'(b);

  logic        a_zero, b_zero, a_inf, b_inf, a_nan, b_nan;
  logic [7:0]  exp_diff;
  logic [49:0] lo_wide;       // {1, man, 26 zeros} of the smaller operand, shifted
  logic [26:0] hi_ext;          // {1, man, g, r, s}
  logic [26:0] lo_ext;
  logic [27:0] sum;
  logic [26:0] norm;
  logic [4:0]  lz;
  logic        found;
  logic [23:0] mant;
  logic        guard, sticky, round_up;
  logic [24:0] mant_r;
  logic signed [10:0] exp_n, exp_r;
  logic        res_zero;

  always_comb begin
    a_zero = (fa.exp == 8'd0);
    b_zero = (fb.exp == 8'd0);
    a_inf  = (fa.exp == 8'hFF) && (fa.man == '0);
    b_inf  = (fb.exp == 8'hFF) && (fb.man == '0);
    a_nan  = (fa.exp == 8'hFF) && (fa.man != '0);
    b_nan  = (fb.exp == 8'hFF) && (fb.man != '0);

    // Order by magnitude: exponent and fraction compare as one unsigned number.
    if ({fa.exp, fa.man} >= {fb.exp, fb.man}) begin
      op_hi   = fa;
      op_lo = fb;
    end else begin
      op_hi   = fb;
      op_lo = fa;
    end

    // Align the smaller significand.
    exp_diff   = op_hi.exp - op_lo.exp;
    lo_wide = {1'b1, op_lo.man, 26'd0};
    if (exp_diff >= 8'd50) begin
      lo_ext = 27'd1;           // only its sticky contribution is left
    end else begin
      lo_wide = lo_wide >> exp_diff;
      lo_ext  = {lo_wide[49:24], |lo_wide[23:0]};
    end
    hi_ext = {1'b1, op_hi.man, 3'b000};

    // Add or subtract, then normalise.
    exp_n    = $signed({3'b000, op_hi.exp});
    res_zero = 1'b0;
    lz       = '0;
    found    = 1'b0;
    if (op_hi.sign == op_lo.sign) begin
      sum = {1'b0, hi_ext} + {1'b0, lo_ext};
      if (sum[27]) begin
        norm  = {sum[27:2], sum[1] | sum[0]};
        exp_n = exp_n + 11'sd1;
      end else begin
        norm  = sum[26:0];
      end
    end else begin
      sum = {1'b0, hi_ext} - {1'b0, lo_ext};
      res_zero = (sum[26:0] == '0);
      for (int i = 26; i >= 0; i--) begin
        if (!found && sum[i]) begin
          found = 1'b1;
          lz    = 5'(26 - i);
        end
      end
      norm  = sum[26:0] << lz;
      exp_n = exp_n - $signed({6'd0, lz});
    end

    // Round to nearest, ties to even.
    mant     = norm[26:3];
    guard    = norm[2];
    sticky   = norm[1] | norm[0];
    round_up = guard & (sticky | mant[0]);
    mant_r   = {1'b0, mant} + {24'd0, round_up};
    if (mant_r[24]) begin
      mant_r = mant_r >> 1;
      exp_r  = exp_n + 11'sd1;
    end else begin
      exp_r  = exp_n;
    end

    if (a_nan || b_nan || (a_inf && b_inf && (fa.sign != fb.sign))) begin
      y = FP_QNAN;
    end else if (a_inf) begin
      y = a;
    end else if (b_inf) begin
      y = b;
    end else if (a_zero && b_zero) begin
      y = {fa.sign & fb.sign, 31'd0};
    end else if (a_zero) begin
      y = b;
    end else if (b_zero) begin
      y = a;
    end else if (res_zero) begin
      y = FP_ZERO;
    end else if (exp_r >= 11'sd255) begin
      y = {op_hi.sign, 8'hFF, 23'd0};
    end else if (exp_r <= 11'sd0) begin
      y = {op_hi.sign, 31'd0};
    end else begin
      y = {op_hi.sign, exp_r[7:0], mant_r[22:0]};
    end
  end

endmodule
