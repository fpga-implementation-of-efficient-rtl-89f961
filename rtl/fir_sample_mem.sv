// fir_sample_mem: the filter's delay line, the memory of the last N_TAPS input
// samples (sample_mem in the source design's simulation trace).
//
// It stands for the chain of unit delays of the direct-form FIR structure. Since
// one arithmetic unit visits the taps one after another, every stored sample
// must be readable by address, so the delay line is a shift register of words
// with a read multiplexer: a shift moves word k to word k+1 and writes the new
// sample into word 0, so word k always holds x(n-k). The oldest word drops out.
//
// Interface (synchronous to the rising edge of clk):
//   rst      synchronous, active high: every word becomes +0, so the filter
//            starts from a zero history (this design's choice; the source does
//            not say how its memory starts)
//   shift    store din as x(n) and age the others by one sample
//   rd_addr  k, selects x(n-k); rd_data is combinational from the stored words
module fir_sample_mem
  import fir_pkg::*;
#(
  parameter int unsigned DEPTH = N_TAPS
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     shift,
  input  logic [FP_W-1:0]          din,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output logic [FP_W-1:0]          rd_data
);

  logic [FP_W-1:0] sample_mem [DEPTH];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < DEPTH; i++) sample_mem[i] <= FP_ZERO;
    end else if (shift) begin
      sample_mem[0] <= din;
      for (int i = 1; i < DEPTH; i++) sample_mem[i] <= sample_mem[i-1];
    end
  end

  assign rd_data = sample_mem[rd_addr];

endmodule
