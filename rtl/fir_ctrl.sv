// fir_ctrl: sequencer of the ALU-based FIR filter.
//
// For every accepted input sample it runs one filter output through the shared
// arithmetic unit, one tap per cycle:
//   IDLE   waits for data_in_valid. On it, the sample is shifted into the delay
//          line (sample_shift), the accumulator is cleared (alu_clear) and
//          setup_start is raised for that cycle.
//   MAC    for count_mem = 0 .. NTAPS-1 presents the pair x(n-k), h(k) with
//          k = count_mem to the arithmetic unit (alu_in_valid, tap_addr).
//   DRAIN  waits until the arithmetic unit's pipeline is empty (alu_idle), then
//          raises out_load for one cycle: the accumulator now holds y(n).
// The 5-bit tap counter count_mem and the setup_start strobe carry the names of
// the source design's trace; the states, and the rule that a sample arriving
// while a computation runs (busy) is ignored, are this design's choices, since
// the source shows only the ports clk, reset, data_in, data_in_valid,
// sample_out and data_out_valid.
//
// Timing: with an idle filter, data_in_valid in cycle t gives out_load in cycle
// t + NTAPS + 3 and the registered output one cycle later, so one output every
// NTAPS + 4 = 20 cycles at most (16 taps). The counter is $clog2(NTAPS)+1 = 5
// bits wide, since it reaches NTAPS. rst is synchronous and active high.
module fir_ctrl
  import fir_pkg::*;
#(
  parameter int unsigned NTAPS = N_TAPS
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      data_in_valid,
  input  logic                      alu_idle,
  output logic                      sample_shift,
  output logic                      alu_clear,
  output logic                      alu_in_valid,
  output logic [$clog2(NTAPS)-1:0]  tap_addr,
  output logic                      out_load,
  output logic                      setup_start,
  output logic                      busy,
  output logic [$clog2(NTAPS):0]    count_mem
);

  localparam int unsigned CW = $clog2(NTAPS) + 1;

  typedef enum logic [1:0] {IDLE, MAC, DRAIN} state_t;
  state_t state;

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= IDLE;
      count_mem <= '0;
    end else begin
      unique case (state)
        IDLE: begin
          if (data_in_valid) begin
            state     <= MAC;
            count_mem <= '0;
          end
        end
        MAC: begin
          count_mem <= count_mem + 1'b1;
          if (count_mem == CW'(NTAPS - 1)) state <= DRAIN;
        end
        DRAIN: begin
          if (alu_idle) state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

  always_comb begin
    setup_start  = (state == IDLE) && data_in_valid;
    sample_shift = setup_start;
    alu_clear    = setup_start;
    alu_in_valid = (state == MAC);
    tap_addr     = count_mem[$clog2(NTAPS)-1:0];
    out_load     = (state == DRAIN) && alu_idle;
    busy         = (state != IDLE);
  end

  // The tap counter never passes NTAPS.
  assert property (@(posedge clk) disable iff (rst) count_mem <= CW'(NTAPS))
    else $error("fir_ctrl: tap counter out of range");

endmodule
