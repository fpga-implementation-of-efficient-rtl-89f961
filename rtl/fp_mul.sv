// fp_mul: IEEE-754 single-precision multiplier (combinational).
//
// This is the multiplier half of the filter's arithmetic unit: the source design
// uses one floating-point multiplier, reused for every tap, but does not show
// its inside. This one is the plain textbook unit: the signs are XORed, the
// biased exponents added and re-biased, the two 24-bit significands (hidden bit
// restored) multiplied into a 48-bit product, which is normalised by at most one
// place and rounded to nearest, ties to even, from a guard bit and a sticky bit.
//
// Choices of this design, not of the source:
//   - subnormal inputs are read as zero and subnormal results are flushed to a
//     signed zero (flush-to-zero), as is common for FPGA floating-point units;
//   - a result whose exponent overflows becomes a signed infinity;
//   - NaN in, or infinity times zero, gives the quiet NaN 0x7FC00000;
//     infinity times a finite non-zero value gives a signed infinity.
//
// Interface: a, b operands; y = a * b. Purely combinational, no clock.
module fp_mul
  import fir_pkg::*;
(
  input  logic [FP_W-1:0] a,
  input  logic [FP_W-1:0] b,
  output logic [FP_W-1:0] y
);

  fp32_t fa, fb;
  assign fa = fp32_t'(a);
  assign fb = fp32_t'(b);

  logic        sign;
  logic        a_zero, b_zero, a_inf, b_inf, a_nan, b_nan;
  logic [47:0] prod;
  logic [23:0] mant;
  logic        guard, sticky, round_up;
  logic [24:0] mant_r;
  logic signed [10:0] exp_sum, exp_n, exp_r;

  always_comb begin
    sign   = fa.sign ^ fb.sign;
    a_zero = (fa.exp == 8'd0);
    b_zero = (fb.exp == 8'd0);
    a_inf  = (fa.exp == 8'hFF) && (fa.man == '0);
    b_inf  = (fb.exp == 8'hFF) && (fb.man == '0);
    a_nan  = (fa.exp == 8'hFF) && (fa.man != '0);
    b_nan  = (fb.exp == 8'hFF) && (fb.man != '0);

    prod    = {1'b1, fa.man} * {1'b1, fb.man};
    exp_sum = $signed({3'b000, fa.exp}) + $signed({3'b000, fb.exp}) - 11'sd127;

    // Normalise: the product of two values in [1,2) lies in [1,4).
    if (prod[47]) begin
      mant   = prod[47:24];
      guard  = prod[23];
      sticky = |prod[22:0];
      exp_n  = exp_sum + 11'sd1;
    end else begin
      mant   = prod[46:23];
      guard  = prod[22];
      sticky = |prod[21:0];
      exp_n  = exp_sum;
    end

    // Round to nearest, ties to even.
    round_up = guard & (sticky | mant[0]);
    mant_r   = {1'b0, mant} + {24'd0, round_up};
    if (mant_r[24]) begin
      mant_r = mant_r >> 1;
      exp_r  = exp_n + 11'sd1;
    end else begin
      exp_r  = exp_n;
    end

    if (a_nan || b_nan || (a_inf && b_zero) || (b_inf && a_zero)) begin
      y = FP_QNAN;
    end else if (a_inf || b_inf) begin
      y = {sign, 8'hFF, 23'd0};
    end else if (a_zero || b_zero) begin
      y = {sign, 31'd0};
    end else if (exp_r >= 11'sd255) begin
      y = {sign, 8'hFF, 23'd0};
    end else if (exp_r <= 11'sd0) begin
      y = {sign, 31'd0};
    end else begin
      y = {sign, exp_r[7:0], mant_r[22:0]};
    end
  end

endmodule
