// tb_filter_alu: end-to-end test of the 16-tap floating-point FIR filter at its
// default parameters.
//
// Input sequences, each followed through the whole filter:
//   1. a unit impulse: the 16 outputs must be the coefficients themselves,
//      recomputed here from their formula (within one unit in the last place);
//   2. a constant 1.0: once the delay line is full the output is the DC gain,
//      which the coefficients set to 1 (checked within 1e-6);
//   3. sixteen samples of one period of a sine, x(n) = sin(2*pi*n/16), the
//      S-shaped test sequence of the original design, repeated twice;
//   4. 200 random samples, strobed at random gaps, some in the first cycle the
//      filter is free again, and with extra strobes while it is busy, which it
//      must ignore;
//   5. a reset in the middle of a computation, after which the filter must
//      start again from a zero history.
// Every output is compared bit for bit with a software model that forms each
// product and partial sum in the same order with single-precision rounding,
// and must appear exactly N_TAPS + 4 = 20 cycles after its input strobe, for
// one cycle. The test counts taps seen in the impulse response, strobes ignored while busy,
// back-to-back inputs and resets, and fails if any of them never happened.
module tb_filter_alu;
  timeunit 1ns;
  timeprecision 1ps;

  import tb_fp_ref_pkg::*;

  localparam int  N  = 16;
  localparam int  LATENCY = N + 4;
  localparam real PI = 3.14159265358979323846;

  logic        clk = 0, reset, data_in_valid, data_out_valid;
  logic [31:0] data_in, sample_out;

  filter_alu dut (.clk(clk), .reset(reset), .data_in(data_in), .data_in_valid(data_in_valid),
                  .sample_out(sample_out), .data_out_valid(data_out_valid));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  int n_outputs = 0, n_taps = 0, n_ignored = 0, n_back_to_back = 0, n_resets = 0;
  logic [31:0] hist [N];
  logic [31:0] hcoef [N];
  real         hreal [N];

  always @(posedge clk) cyc++;

  task automatic fail(input string msg);
    failures++;
    $display("FAIL %s (cycle %0d)", msg, cyc);
  endtask

  function automatic logic [31:0] model_output();
    logic [31:0] acc;
    acc = 32'h0;
    for (int k = 0; k < N; k++) acc = ref_add(acc, ref_mul(hist[k], hcoef[k]));
    return acc;
  endfunction

  // Present one sample with a one-cycle strobe, optionally strobe again while
  // busy, and check the result and its timing. Returns the output word.
  task automatic run_sample(input logic [31:0] x, input bit extra_strobes, output logic [31:0] y);
    int start;
    logic [31:0] exp;
    data_in = x;
    data_in_valid = 1;
    start = cyc;
    @(posedge clk); #1;
    data_in_valid = 0;
    for (int i = N - 1; i > 0; i--) hist[i] = hist[i-1];
    hist[0] = x;
    exp = model_output();
    for (int c = 1; c < LATENCY; c++) begin
      if (extra_strobes && ($urandom % 4 == 0)) begin
        data_in = $urandom;
        data_in_valid = 1;
        n_ignored++;
      end
      checks++;
      if (data_out_valid) fail("data_out_valid early");
      @(posedge clk); #1;
      data_in_valid = 0;
    end
    checks++;
    if (!data_out_valid) fail($sformatf("no data_out_valid %0d cycles after the strobe", cyc - start));
    checks++;
    if (sample_out !== exp) fail($sformatf("y = %h, expected %h (x = %h)", sample_out, exp, x));
    y = sample_out;
    n_outputs++;
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] y;
    real total;
    for (int k = 0; k < N; k++) hcoef[k] = fir_pkg::H_DEFAULT[k];
    total = 0.0;
    for (int k = 0; k < N; k++) begin
      real m;
      m = real'(k) - 7.5;
      hreal[k] = $sin(2.0 * PI * 0.25 * m) / (PI * m) * (0.54 - 0.46 * $cos(2.0 * PI * real'(k) / 15.0));
      total += hreal[k];
    end
    foreach (hist[i]) hist[i] = 32'h0;
    reset = 1; data_in_valid = 0; data_in = 0;
    repeat (3) @(posedge clk);
    #1 reset = 0;
    n_resets++;
    @(posedge clk); #1;

    // 1. Impulse response.
    for (int n = 0; n < N; n++) begin
      int diff;
      run_sample(n == 0 ? 32'h3F800000 : 32'h0, 1'b0, y);
      diff = int'(y) - int'(r2f(hreal[n] / total));
      checks++;
      if (diff > 1 || diff < -1) fail($sformatf("impulse response %0d = %h", n, y));
      else if (y != 32'h0) n_taps++;
      @(posedge clk); #1;
    end

    // 2. DC gain.
    for (int n = 0; n < N + 4; n++) begin
      run_sample(32'h3F800000, 1'b0, y);
      if (n >= N - 1) begin
        checks++;
        if (f2r(y) > 1.000001 || f2r(y) < 0.999999) fail($sformatf("DC gain %f", f2r(y)));
      end
      @(posedge clk); #1;
    end

    // 3. Two periods of a sine of period 16 samples.
    for (int n = 0; n < 2 * N; n++) begin
      run_sample(r2f($sin(2.0 * PI * real'(n) / 16.0)), 1'b0, y);
      @(posedge clk); #1;
    end

    // 4. Random samples, random gaps, strobes while busy.
    for (int n = 0; n < 200; n++) begin
      int gap;
      gap = int'($urandom % 3);
      if (gap == 0) n_back_to_back++;
      run_sample(rand_fp(110, 135), 1'b1, y);
      repeat (gap) @(posedge clk);
      #0.1;
    end

    // 5. Reset in the middle of a computation.
    data_in = 32'h40000000;
    data_in_valid = 1;
    @(posedge clk); #1;
    data_in_valid = 0;
    repeat (7) @(posedge clk);
    #1 reset = 1;
    @(posedge clk); #1 reset = 0;
    n_resets++;
    foreach (hist[i]) hist[i] = 32'h0;
    repeat (LATENCY + 2) begin
      checks++;
      if (data_out_valid) fail("output after reset");
      @(posedge clk); #1;
    end
    checks++;
    if (sample_out !== 32'h0) fail("sample_out not cleared by reset");
    run_sample(32'h3FC00000, 1'b0, y);    // 1.5 after a zero history gives 1.5*h(0)

    checks++; if (n_outputs == 0) fail("no output produced");
    checks++; if (n_taps != N) fail($sformatf("only %0d taps seen in the impulse response", n_taps));
    checks++; if (n_ignored == 0) fail("no strobe sent while busy");
    checks++; if (n_back_to_back == 0) fail("no back-to-back input");
    checks++; if (n_resets < 2) fail("no reset during operation");
    $display("outputs %0d, taps in impulse response %0d, strobes ignored while busy %0d, back-to-back inputs %0d, resets %0d",
             n_outputs, n_taps, n_ignored, n_back_to_back, n_resets);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
