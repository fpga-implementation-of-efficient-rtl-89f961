// tb_filter_alu_32tap: the FIR filter built with NTAPS = 32 and a 32-entry
// coefficient table, to show that the tap count is a real parameter.
// Coefficients are exact powers of two with alternating signs,
// h(k) = (-1)^k * 2^-(k mod 8 + 1). Random samples are strobed, some while the
// filter is busy (ignored); every output is compared bit for bit with a model
// that sums the 32 rounded products in tap order and must appear exactly
// NTAPS + 4 = 36 cycles after its strobe.
module tb_filter_alu_32tap;
  timeunit 1ns;
  timeprecision 1ps;
  import tb_fp_ref_pkg::*;

  localparam int N = 32;
  localparam int LATENCY = N + 4;

  typedef logic [31:0] table_t [N];

  function automatic table_t make_table();
    table_t t;
    for (int k = 0; k < N; k++) t[k] = {1'(k % 2), 8'(126 - (k % 8)), 23'd0};
    return t;
  endfunction

  localparam table_t H32 = make_table();

  logic        clk = 0, reset, data_in_valid, data_out_valid;
  logic [31:0] data_in, sample_out;
  logic [31:0] hist [N];
  int checks = 0, failures = 0, cyc = 0, n_ignored = 0;

  filter_alu #(.NTAPS(N), .COEFFS(H32)) dut (
    .clk(clk), .reset(reset), .data_in(data_in), .data_in_valid(data_in_valid),
    .sample_out(sample_out), .data_out_valid(data_out_valid));

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] exp;
    int start;
    foreach (hist[i]) hist[i] = 32'h0;
    reset = 1; data_in_valid = 0; data_in = 0;
    repeat (3) @(posedge clk);
    #1 reset = 0;
    for (int s = 0; s < 100; s++) begin
      data_in = rand_fp(110, 135);
      data_in_valid = 1;
      start = cyc;
      @(posedge clk); #1;
      data_in_valid = 0;
      for (int i = N - 1; i > 0; i--) hist[i] = hist[i-1];
      hist[0] = data_in;
      exp = 32'h0;
      for (int k = 0; k < N; k++) exp = ref_add(exp, ref_mul(hist[k], H32[k]));
      for (int c = 1; c < LATENCY; c++) begin
        if ($urandom % 6 == 0) begin
          data_in = $urandom;
          data_in_valid = 1;
          n_ignored++;
        end
        checks++;
        if (data_out_valid) begin failures++; $display("FAIL early output"); end
        @(posedge clk); #1;
        data_in_valid = 0;
      end
      checks++;
      if (!data_out_valid) begin
        failures++; $display("FAIL no output %0d cycles after the strobe", cyc - start);
      end
      checks++;
      if (sample_out !== exp) begin
        failures++; $display("FAIL y = %h, expected %h", sample_out, exp);
      end
    end
    checks++;
    if (n_ignored == 0) begin failures++; $display("FAIL no strobe while busy"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
