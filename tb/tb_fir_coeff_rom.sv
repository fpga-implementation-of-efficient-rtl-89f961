// tb_fir_coeff_rom: self-checking test of the coefficient table.
// The expected coefficients are recomputed here from their defining formula, a
// 16-tap Hamming-windowed sinc low-pass with cutoff 0.25 cycles/sample scaled
// to unity DC gain, in double precision and rounded to single. Each table word
// must equal it within one unit in the last place; the table must also be
// symmetric, h(k) = h(15-k), bit for bit.
module tb_fir_coeff_rom;
  timeunit 1ns;
  timeprecision 1ps;

  import tb_fp_ref_pkg::*;

  localparam real PI = 3.14159265358979323846;
  logic [3:0]  addr;
  logic [31:0] data;
  logic [31:0] got [16];
  real         hr [16];
  real         total;
  int checks = 0, failures = 0;

  fir_coeff_rom dut (.addr(addr), .data(data));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    total = 0.0;
    for (int k = 0; k < 16; k++) begin
      real m;
      m = real'(k) - 7.5;
      hr[k] = $sin(2.0 * PI * 0.25 * m) / (PI * m) * (0.54 - 0.46 * $cos(2.0 * PI * real'(k) / 15.0));
      total += hr[k];
    end
    for (int k = 0; k < 16; k++) begin
      logic [31:0] exp;
      int diff;
      addr = 4'(k);
      #1;
      got[k] = data;
      exp = r2f(hr[k] / total);
      diff = int'(data) - int'(exp);
      checks++;
      if (diff > 1 || diff < -1) begin
        failures++;
        $display("FAIL h(%0d) = %h, expected %h", k, data, exp);
      end
    end
    for (int k = 0; k < 8; k++) begin
      checks++;
      if (got[k] !== got[15-k]) begin
        failures++;
        $display("FAIL h(%0d) = %h differs from h(%0d) = %h", k, got[k], 15-k, got[15-k]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
