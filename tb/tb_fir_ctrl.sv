// tb_fir_ctrl: self-checking test of the filter sequencer.
// A small model of the arithmetic unit's pipeline (idle two cycles after the
// last operand pair) drives alu_idle. For every accepted strobe the test checks
// that the delay-line shift, the accumulator clear and setup_start come in the
// strobe's cycle only; that exactly N_TAPS operand pairs follow with tap
// addresses 0, 1, ..., 15 in consecutive cycles, count_mem tracking them; that
// out_load comes once, N_TAPS + 3 cycles after the strobe; and that strobes
// arriving while busy are ignored.
module tb_fir_ctrl;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int N = 16;

  logic       clk = 0, rst, data_in_valid, alu_idle;
  logic       sample_shift, alu_clear, alu_in_valid, out_load, setup_start, busy;
  logic [3:0] tap_addr;
  logic [4:0] count_mem;
  logic       v1, v2;
  int checks = 0, failures = 0;
  int cyc = 0, accepted = 0, ignored = 0;

  fir_ctrl dut (.clk(clk), .rst(rst), .data_in_valid(data_in_valid), .alu_idle(alu_idle),
                .sample_shift(sample_shift), .alu_clear(alu_clear), .alu_in_valid(alu_in_valid),
                .tap_addr(tap_addr), .out_load(out_load), .setup_start(setup_start),
                .busy(busy), .count_mem(count_mem));

  always #5 clk = ~clk;

  // Pipeline model of the arithmetic unit: two register stages before the sum.
  always_ff @(posedge clk) begin
    if (rst) begin v1 <= 0; v2 <= 0; end
    else begin v1 <= alu_in_valid; v2 <= v1; end
  end
  assign alu_idle = !v1 && !v2;

  task automatic fail(input string msg);
    failures++;
    $display("FAIL %s at cycle %0d", msg, cyc);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cyc++;

  initial begin
    int start, gap;
    rst = 1; data_in_valid = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int s = 0; s < 100; s++) begin
      gap = int'($urandom % 4);
      repeat (gap) begin
        checks++; if (sample_shift || alu_clear || setup_start || alu_in_valid || out_load)
          fail("activity while idle");
        @(posedge clk); #1;
      end
      // Strobe in this cycle.
      data_in_valid = 1;
      #0.1;
      checks++; if (!(sample_shift && alu_clear && setup_start)) fail("strobe not accepted");
      checks++; if (alu_in_valid || busy) fail("busy in the accepting cycle");
      start = cyc;
      accepted++;
      @(posedge clk); #1;
      data_in_valid = 0;
      for (int k = 0; k < N; k++) begin
        // Sometimes strobe again while busy: must be ignored.
        data_in_valid = ($urandom % 5 == 0);
        #0.1;
        if (data_in_valid) ignored++;
        checks++; if (!alu_in_valid) fail("missing operand pair");
        checks++; if (tap_addr !== 4'(k)) fail($sformatf("tap_addr %0d, expected %0d", tap_addr, k));
        checks++; if (count_mem !== 5'(k)) fail("count_mem does not follow the tap");
        checks++; if (sample_shift || alu_clear || setup_start) fail("strobe accepted while busy");
        checks++; if (out_load) fail("out_load during the taps");
        @(posedge clk); #1;
        data_in_valid = 0;
      end
      // Drain: two cycles without a pair, then out_load.
      for (int d = 0; d < 2; d++) begin
        data_in_valid = (d == 0);
        #0.1;
        if (data_in_valid) ignored++;
        checks++; if (alu_in_valid || out_load || sample_shift) fail("unexpected activity in drain");
        @(posedge clk); #1;
        data_in_valid = 0;
      end
      #0.1;
      checks++; if (!out_load) fail("out_load missing");
      checks++; if (cyc - start != N + 3) fail($sformatf("out_load %0d cycles after strobe", cyc - start));
      checks++; if (!busy) fail("busy dropped before out_load");
      @(posedge clk); #1;
      checks++; if (out_load || busy) fail("out_load longer than one cycle");
    end
    checks++; if (ignored == 0) fail("no strobe was sent while busy");
    checks++; if (accepted != 100) fail("wrong number of accepted strobes");
    $display("accepted %0d strobes, ignored %0d sent while busy", accepted, ignored);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
