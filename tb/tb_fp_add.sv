// tb_fp_add: self-checking test of the single-precision adder.
// Directed cases (carry, cancellation, zero, infinity, NaN, far-apart exponents,
// rounding ties) and random operands, with near and far exponents and both
// sign combinations, are compared bit for bit with a double-precision reference
// rounded to single.
module tb_fp_add;
  timeunit 1ns;
  timeprecision 1ps;

  import tb_fp_ref_pkg::*;

  logic [31:0] a, b, y;
  int checks = 0, failures = 0;

  fp_add dut (.a(a), .b(b), .y(y));

  task automatic check(input logic [31:0] ta, input logic [31:0] tb_, input logic [31:0] exp);
    a = ta;
    b = tb_;
    #1;
    checks++;
    if (y !== exp) begin
      failures++;
      $display("FAIL fp_add %h + %h = %h, expected %h", ta, tb_, y, exp);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(32'h3F800000, 32'h3F800000, 32'h40000000);  // 1 + 1 = 2
    check(32'h40400000, 32'hBF800000, 32'h40000000);  // 3 - 1 = 2
    check(32'h3F800000, 32'hBF800000, 32'h00000000);  // 1 - 1 = +0
    check(32'hBF800000, 32'h3F800000, 32'h00000000);  // -1 + 1 = +0
    check(32'h00000000, 32'hC0000000, 32'hC0000000);  // 0 + -2
    check(32'h80000000, 32'h80000000, 32'h80000000);  // -0 + -0 = -0
    check(32'h7F800000, 32'h3F800000, 32'h7F800000);  // inf + 1
    check(32'h7F800000, 32'hFF800000, 32'h7FC00000);  // inf - inf = NaN
    check(32'h7F7FFFFF, 32'h7F7FFFFF, 32'h7F800000);  // overflow
    check(32'h3F800000, 32'h33800000, 32'h3F800000);  // 1 + 2^-24: tie, stays even
    check(32'h3F800001, 32'h33800000, 32'h3F800002);  // (1+2^-23) + 2^-24: tie, to even
    check(32'h3F800000, 32'h00800000, 32'h3F800000);  // 1 + tiny
    check(32'h3F800000, 32'h80800000, 32'h3F800000);  // 1 - tiny
    check(32'h3F800000, 32'hB3800001, 32'h3F7FFFFF);  // 1 - (2^-24 + e): just below 1
    repeat (20000) begin
      logic [31:0] ra, rb;
      ra = rand_fp(60, 190);
      rb = ($urandom % 2) ? rand_fp(60, 190) : {1'($urandom), 8'(int'(ra[30:23]) - int'($urandom % 3)), 23'($urandom)};
      check(ra, rb, ref_add(ra, rb));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
