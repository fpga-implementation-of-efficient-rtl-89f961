// fir_alu: the filter's arithmetic unit, one floating-point multiplier and one
// floating-point adder, reused for every tap.
//
// The source design's central idea is to compute the whole 16-tap convolution
// with a single multiplier and a single adder, fed different operands in
// successive cycles, instead of one multiplier and one adder per tap. This
// block is that unit, organised as a multiply-accumulate pipeline:
//
//   stage 1  mult_operand1/2 <= x, h            (when in_valid)
//            mult_out         = fp_mul(mult_operand1, mult_operand2)
//   stage 2  add_operand2     <= mult_out
//            add_operand1      = acc
//            add_out           = fp_add(add_operand1, add_operand2)
//   stage 3  acc              <= add_out
//
// The register names follow the signal names of the source design's simulation
// trace; the pipeline itself, its depth and the clear input are this design's
// own choices, since the source does not show how its operands are sequenced.
// One product enters per cycle; the accumulator is a single-cycle loop through
// the adder, so back-to-back accumulation needs no stall.
//
// Interface (all synchronous to the rising edge of clk):
//   rst       synchronous, active high: empties the pipeline, acc = +0
//   clear     sets acc to +0; must not be raised while products are in flight
//   in_valid  x and h are a new operand pair
//   acc       running sum; it includes a pair three cycles after that
//             pair was presented
//   idle      no operand pair is in the pipeline
module fir_alu
  import fir_pkg::*;
(
  input  logic            clk,
  input  logic            rst,
  input  logic            clear,
  input  logic            in_valid,
  input  logic [FP_W-1:0] x,
  input  logic [FP_W-1:0] h,
  output logic [FP_W-1:0] acc,
  output logic            idle
);

  logic [FP_W-1:0] mult_operand1, mult_operand2, mult_out;
  logic [FP_W-1:0] add_operand1, add_operand2, add_out;
  logic            v1, v2;

  fp_mul u_mul (.a(mult_operand1), .b(mult_operand2), .y(mult_out));
  fp_add u_add (.a(add_operand1),  .b(add_operand2),  .y(add_out));

  assign add_operand1 = acc;
  assign idle         = !v1 && !v2;

  always_ff @(posedge clk) begin
    if (rst) begin
      v1            <= 1'b0;
      v2            <= 1'b0;
      mult_operand1 <= FP_ZERO;
      mult_operand2 <= FP_ZERO;
      add_operand2  <= FP_ZERO;
      acc           <= FP_ZERO;
    end else begin
      v1 <= in_valid;
      v2 <= v1;
      if (in_valid) begin
        mult_operand1 <= x;
        mult_operand2 <= h;
      end
      if (v1) begin
        add_operand2 <= mult_out;
      end
      if (clear) begin
        acc <= FP_ZERO;
      end else if (v2) begin
        acc <= add_out;
      end
    end
  end

  // A clear while a product is still in flight would lose that product.
  assert property (@(posedge clk) disable iff (rst) clear |-> !v2)
    else $error("fir_alu: clear raised while a product was being accumulated");

endmodule
