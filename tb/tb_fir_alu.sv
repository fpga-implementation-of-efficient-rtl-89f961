// tb_fir_alu: self-checking test of the shared multiply-accumulate unit.
// Runs of 1 to 20 random (x, h) pairs are fed after a clear, sometimes one per
// cycle and sometimes with gaps. The accumulator is compared bit for bit with a
// reference that sums the rounded products in the same order, and the latency
// from the last pair to the accumulator (a pair presented in cycle t is in the
// sum from cycle t+3 on) is checked, as is the idle flag.
module tb_fir_alu;
  timeunit 1ns;
  timeprecision 1ps;

  import tb_fp_ref_pkg::*;

  logic        clk = 0, rst, clear, in_valid;
  logic [31:0] x, h, acc;
  logic        idle;
  int checks = 0, failures = 0;

  fir_alu dut (.clk(clk), .rst(rst), .clear(clear), .in_valid(in_valid),
               .x(x), .h(h), .acc(acc), .idle(idle));

  always #5 clk = ~clk;

  task automatic expect_eq(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] ref_acc, ref_prev;
    int n;
    rst = 1; clear = 0; in_valid = 0; x = 0; h = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    @(posedge clk); #1;
    expect_eq(acc, 32'h0, "acc after reset");
    checks++; if (!idle) begin failures++; $display("FAIL idle after reset"); end
    for (int run = 0; run < 300; run++) begin
      clear = 1;
      @(posedge clk); #1;
      clear = 0;
      expect_eq(acc, 32'h0, "acc after clear");
      ref_acc = 32'h0;
      n = 1 + int'($urandom % 20);
      for (int k = 0; k < n; k++) begin
        if (run % 3 == 0 && k > 0) begin
          repeat ($urandom % 3) @(posedge clk);
          #1;
        end
        x = rand_fp(100, 140);
        h = rand_fp(100, 130);
        in_valid = 1;
        ref_prev = ref_acc;
        ref_acc = ref_add(ref_acc, ref_mul(x, h));
        @(posedge clk); #1;
        in_valid = 0;
      end
      // The last pair was presented in the previous cycle (cycle t); the sum
      // must include it from cycle t+3 on, and not yet in cycle t+2.
      @(posedge clk); #1;
      checks++; if (idle) begin failures++; $display("FAIL idle too early"); end
      checks++;
      if (acc === ref_acc && ref_prev !== ref_acc) begin
        failures++; $display("FAIL acc complete one cycle early");
      end
      @(posedge clk); #1;
      expect_eq(acc, ref_acc, "accumulated sum");
      checks++; if (!idle) begin failures++; $display("FAIL idle not set after drain"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
