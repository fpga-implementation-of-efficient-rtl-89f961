// filter_alu: 16-tap FIR filter on IEEE-754 single-precision samples, built
// around one floating-point multiplier and one floating-point adder.
//
// A direct-form N-tap FIR filter computes y(n) = sum_k h(k) x(n-k) with N
// multipliers and N-1 adders. To save area this filter has only one of each
// (fir_alu) and visits the taps one after another: for each input sample the
// controller (fir_ctrl) shifts the sample into the delay line (fir_sample_mem),
// clears the accumulator and then, once per cycle, sends x(n-k) and h(k) from
// the coefficient table (fir_coeff_rom) through the multiply-accumulate
// pipeline. When the last product has been added, the sum is registered on
// sample_out and data_out_valid is raised for one cycle.
//
// The word format (32-bit single precision), the tap count (16), the sharing
// of one multiplier and one adder, and the port list (clk, reset, data_in,
// data_in_valid, sample_out, data_out_valid) follow the source design. The
// coefficient values, the pipeline, the handshake details and the reset
// behaviour are this design's own choices.
//
// The sum is accumulated in tap order, h(0)x(n) first, each product and each
// partial sum rounded to nearest-even single precision (subnormals flushed to
// zero), so a bit-exact software model only has to repeat that order.
//
// Parameters: NTAPS (default 16) and COEFFS, the coefficient table (default
// the 16-entry low-pass set of fir_pkg; a different NTAPS needs its own table).
//
// Timing: data_in_valid for one cycle in cycle t (while the filter is idle)
// gives data_out_valid in cycle t + NTAPS + 4 = t + 20. A data_in_valid that
// arrives during a computation is ignored. sample_out holds its value until the
// next result. reset is synchronous and active high; it clears the delay line
// (zero history) and sample_out.
module filter_alu
  import fir_pkg::*;
#(
  parameter int unsigned     NTAPS = N_TAPS,
  parameter logic [FP_W-1:0] COEFFS [NTAPS] = H_DEFAULT
) (
  input  logic            clk,
  input  logic            reset,
  input  logic [FP_W-1:0] data_in,
  input  logic            data_in_valid,
  output logic [FP_W-1:0] sample_out,
  output logic            data_out_valid
);

  localparam int unsigned AW = $clog2(NTAPS);

  logic                 sample_shift, alu_clear, alu_in_valid, alu_idle;
  logic                 out_load;
  logic [AW-1:0]        tap_addr;
  logic [FP_W-1:0]      x_k, h_k, acc;

  fir_ctrl #(.NTAPS(NTAPS)) u_ctrl (
    .clk          (clk),
    .rst          (reset),
    .data_in_valid(data_in_valid),
    .alu_idle     (alu_idle),
    .sample_shift (sample_shift),
    .alu_clear    (alu_clear),
    .alu_in_valid (alu_in_valid),
    .tap_addr     (tap_addr),
    .out_load     (out_load),
    .setup_start  (),
    .busy         (),
    .count_mem    ()
  );

  fir_sample_mem #(.DEPTH(NTAPS)) u_samples (
    .clk    (clk),
    .rst    (reset),
    .shift  (sample_shift),
    .din    (data_in),
    .rd_addr(tap_addr),
    .rd_data(x_k)
  );

  fir_coeff_rom #(.NTAPS(NTAPS), .COEFFS(COEFFS)) u_coeffs (
    .addr(tap_addr),
    .data(h_k)
  );

  fir_alu u_alu (
    .clk     (clk),
    .rst     (reset),
    .clear   (alu_clear),
    .in_valid(alu_in_valid),
    .x       (x_k),
    .h       (h_k),
    .acc     (acc),
    .idle    (alu_idle)
  );

  always_ff @(posedge clk) begin
    if (reset) begin
      sample_out     <= FP_ZERO;
      data_out_valid <= 1'b0;
    end else begin
      data_out_valid <= out_load;
      if (out_load) sample_out <= acc;
    end
  end

endmodule
