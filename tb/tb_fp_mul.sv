// tb_fp_mul: self-checking test of the single-precision multiplier.
// Directed cases (exact products, signs, zero, infinity, NaN, overflow,
// underflow, a rounding tie) and random operands over a wide exponent range are
// compared bit for bit with a double-precision reference rounded to single.
module tb_fp_mul;
  timeunit 1ns;
  timeprecision 1ps;

  import tb_fp_ref_pkg::*;

  logic [31:0] a, b, y;
  int checks = 0, failures = 0;

  fp_mul dut (.a(a), .b(b), .y(y));

  task automatic check(input logic [31:0] ta, input logic [31:0] tb_, input logic [31:0] exp);
    a = ta;
    b = tb_;
    #1;
    checks++;
    if (y !== exp) begin
      failures++;
      $display("FAIL fp_mul %h * %h = %h, expected %h", ta, tb_, y, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(32'h3F800000, 32'h40000000, 32'h40000000);  // 1 * 2 = 2
    check(32'h40400000, 32'hC0000000, 32'hC0C00000);  // 3 * -2 = -6
    check(32'h3FC00000, 32'h3FC00000, 32'h40100000);  // 1.5 * 1.5 = 2.25
    check(32'h00000000, 32'h40000000, 32'h00000000);  // 0 * 2
    check(32'h80000000, 32'h40000000, 32'h80000000);  // -0 * 2
    check(32'h7F800000, 32'h40000000, 32'h7F800000);  // inf * 2
    check(32'h7F800000, 32'h00000000, 32'h7FC00000);  // inf * 0 = NaN
    check(32'h7FC00000, 32'h3F800000, 32'h7FC00000);  // NaN
    check(32'h7F000000, 32'h7F000000, 32'h7F800000);  // overflow
    check(32'h00800000, 32'h00800000, 32'h00000000);  // underflow, flushed
    // 1+2^-23 squared = 1 + 2^-22 + 2^-46: rounds down to 1 + 2^-22
    check(32'h3F800001, 32'h3F800001, 32'h3F800002);
    // (1+2^-12)^2 = 1 + 2^-11 + 2^-24: exact tie at the guard bit, even stays
    check(32'h3F800800, 32'h3F800800, 32'h3F801000);
    // (1+2^-12)(1+2^-12+2^-23) = 1 + 2^-11 + 2^-23 + 2^-24 + 2^-35: rounds up
    check(32'h3F800800, 32'h3F800801, 32'h3F801002);
    repeat (20000) begin
      logic [31:0] ra, rb;
      ra = rand_fp(64, 190);
      rb = rand_fp(64, 190);
      check(ra, rb, ref_mul(ra, rb));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
