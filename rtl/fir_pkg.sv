// fir_pkg: types and constants shared by the ALU-based floating-point FIR filter.
//
// The filter works on IEEE-754 single-precision words (32 bits) and has 16 taps,
// both of which follow the source design. The 16 coefficients below are this
// design's own choice, because the original design generated its set offline and
// never listed it: a linear-phase low-pass, Hamming-windowed sinc with cutoff
// fc = 0.25 cycles/sample, normalised to unity DC gain:
//   m    = k - (N-1)/2
//   h[k] = sin(2*pi*fc*m)/(pi*m) * (0.54 - 0.46*cos(2*pi*k/(N-1))),  k = 0..N-1
//   h[k] = h[k] / sum(h)
// each rounded to the nearest single-precision value. The table is symmetric,
// h[k] = h[N-1-k], as every linear-phase FIR filter's is.
package fir_pkg;

  // Word width of every sample, coefficient and result (single precision).
  localparam int unsigned FP_W = 32;
  // Default number of filter taps.
  localparam int unsigned N_TAPS = 16;

  // IEEE-754 single-precision word, field by field.
  typedef struct packed {
    logic       sign;
    logic [7:0] exp;
    logic [22:0] man;
  } fp32_t;

  localparam logic [FP_W-1:0] FP_ZERO = 32'h0000_0000;
  localparam logic [FP_W-1:0] FP_QNAN = 32'h7FC0_0000;

  // Default coefficient set (see the formula above), h[0] first.
  localparam logic [FP_W-1:0] H_DEFAULT [N_TAPS] = '{
    32'hBB1DE7D8, 32'hBB8862DB, 32'h3C1C3EEB, 32'h3CA39A11,
    32'hBD1B75D8, 32'hBD8E7C34, 32'h3E0CA852, 32'h3EE4FB62,
    32'h3EE4FB62, 32'h3E0CA852, 32'hBD8E7C34, 32'hBD1B75D8,
    32'h3CA39A11, 32'h3C1C3EEB, 32'hBB8862DB, 32'hBB1DE7D8
  };

endpackage
