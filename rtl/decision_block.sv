// decision_block: the decision block (DB) that switches a tap multiplier on or off.
//
// A single comparator: ctrl = 1 (multiplier off) when the coefficient amplitude is below
// the threshold Cth, ctrl = 0 (multiplier on) when it is greater than or equal to Cth.
// The threshold is an input, set per filter characteristic (for instance the average of
// the coefficients). Comparing the magnitude of the coefficient rather than its signed
// value is this design's reading: a small negative coefficient is as small as a small
// positive one.
// Interface: coef_mag (16-bit unsigned), cth (16-bit unsigned) -> ctrl. Combinational.
module decision_block
  import drs_pkg::*;
(
  input  logic [C_W-1:0] coef_mag,
  input  logic [C_W-1:0] cth,
  output logic           ctrl
);

  assign ctrl = (coef_mag < cth);

endmodule
