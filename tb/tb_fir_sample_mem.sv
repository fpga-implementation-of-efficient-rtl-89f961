// tb_fir_sample_mem: self-checking test of the delay line.
// Random samples are shifted in, some cycles without a shift; after every cycle
// all 16 words are read back by address and compared with a model in which
// word k is the k-th most recent sample. A reset in the middle must clear all.
module tb_fir_sample_mem;
  timeunit 1ns;
  timeprecision 1ps;

  logic        clk = 0, rst, shift;
  logic [31:0] din, rd_data;
  logic [3:0]  rd_addr;
  logic [31:0] model [16];
  int checks = 0, failures = 0;

  fir_sample_mem #(.DEPTH(16)) dut (.clk(clk), .rst(rst), .shift(shift), .din(din),
                                    .rd_addr(rd_addr), .rd_data(rd_data));

  always #5 clk = ~clk;

  task automatic check_all();
    for (int k = 0; k < 16; k++) begin
      rd_addr = 4'(k);
      #0.1;
      checks++;
      if (rd_data !== model[k]) begin
        failures++;
        $display("FAIL word %0d: got %h expected %h", k, rd_data, model[k]);
      end
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; shift = 0; din = 0; rd_addr = 0;
    foreach (model[i]) model[i] = 32'h0;
    @(posedge clk); #1 rst = 0;
    check_all();
    for (int c = 0; c < 200; c++) begin
      shift = ($urandom % 4) != 0;
      din   = $urandom;
      @(posedge clk); #1;
      if (shift) begin
        for (int i = 15; i > 0; i--) model[i] = model[i-1];
        model[0] = din;
      end
      shift = 0;
      check_all();
      if (c == 120) begin
        rst = 1;
        @(posedge clk); #1 rst = 0;
        foreach (model[i]) model[i] = 32'h0;
        check_all();
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
