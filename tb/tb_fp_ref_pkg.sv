// tb_fp_ref_pkg: reference arithmetic for the testbenches, independent of the RTL.
//
// Values are carried as IEEE-754 doubles (SystemVerilog real). A single-precision
// word is widened to a double exactly; an operation is done in double and the
// double is rounded once to single precision, ties to even. That is exact for
// the two operations used here: the product of two singles fits in a double
// without rounding, and a double's 53-bit significand is wide enough that
// rounding a sum first to double and then to single gives the correctly rounded
// single result. Subnormals are flushed to zero, as the RTL does, and overflow
// gives infinity.
package tb_fp_ref_pkg;

  // Widen a single-precision word to real (subnormals read as zero).
  function automatic real f2r(input logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 8'd0) begin
      d = {f[31], 63'd0};
    end else if (f[30:23] == 8'hFF) begin
      d = {f[31], 11'h7FF, f[22:0], 29'd0};
    end else begin
      d = {f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0};
    end
    return $bitstoreal(d);
  endfunction

  // Round a real to the nearest single-precision word, ties to even.
  function automatic logic [31:0] r2f(input real r);
    logic [63:0] d;
    logic        s, g, st;
    int          e;
    logic [24:0] m;
    d = $realtobits(r);
    s = d[63];
    if (d[62:52] == 11'h7FF) return {s, 8'hFF, d[51:29] | {22'd0, |d[51:0]}};
    if (d[62:52] == 11'd0) return {s, 31'd0};
    e  = int'(d[62:52]) - 1023 + 127;
    m  = {2'b01, d[51:29]};
    g  = d[28];
    st = |d[27:0];
    if (g && (st || m[0])) m = m + 25'd1;
    if (m[24]) begin
      m = m >> 1;
      e = e + 1;
    end
    if (e >= 255) return {s, 8'hFF, 23'd0};
    if (e <= 0)   return {s, 31'd0};
    return {s, 8'(e), m[22:0]};
  endfunction

  function automatic logic [31:0] ref_mul(input logic [31:0] a, input logic [31:0] b);
    return r2f(f2r(a) * f2r(b));
  endfunction

  function automatic logic [31:0] ref_add(input logic [31:0] a, input logic [31:0] b);
    logic [31:0] y;
    y = r2f(f2r(a) + f2r(b));
    // An exact cancellation is +0 in round-to-nearest.
    if (y[30:0] == 31'd0 && !(a[30:23] == 8'd0 && b[30:23] == 8'd0)) y = 32'd0;
    return y;
  endfunction

  // A random normal single-precision value with exponent field in [elo, ehi].
  function automatic logic [31:0] rand_fp(input int elo, input int ehi);
    logic [31:0] f;
    f[31]    = 1'($urandom);
    f[30:23] = 8'(elo + int'($urandom % 32'(ehi - elo + 1)));
    f[22:0]  = 23'($urandom);
    return f;
  endfunction

endpackage
