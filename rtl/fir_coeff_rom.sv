// fir_coeff_rom: read-only table of the filter coefficients h(0)..h(NTAPS-1).
//
// The source design reads a fixed set of 16 single-precision coefficients from
// a table prepared offline; the arithmetic unit fetches one coefficient per
// cycle, so the table is addressed by the tap counter. The contents are the
// COEFFS parameter, whose default is the low-pass set in fir_pkg (its formula
// is given there); any other set of single-precision words can be passed in.
//
// NTAPS sets the table length; the default set has 16 entries, so another
// length needs its own COEFFS.
//
// Interface: addr selects h(addr); data is combinational (an asynchronous ROM,
// which maps to LUTs on an FPGA).
module fir_coeff_rom
  import fir_pkg::*;
#(
  parameter int unsigned   NTAPS = N_TAPS,
  parameter logic [FP_W-1:0] COEFFS [NTAPS] = H_DEFAULT
) (
  input  logic [$clog2(NTAPS)-1:0] addr,
  output logic [FP_W-1:0]           data
);

  assign data = COEFFS[addr];

endmodule
