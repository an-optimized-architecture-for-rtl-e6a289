// select_unit: one select unit (SU) of the estimation distribution multiplier.
//
// It multiplies the sample by one 4-bit alphabet a of the coefficient magnitude without a
// multiplier. Any non-zero a equals odd << k with odd in {1,3,...,15} and k in 0..3:
//   shifter   shifts a right until its lowest bit is 1 and counts the shifts k;
//   mux       the upper three bits of the shifted alphabet, (odd-1)/2, select the
//             pre-estimate odd*x from the eight the pre-estimator distributes;
//   ishifter  shifts the selected word left by k again.
// For a = 1100 the shifter gives 0011 and k = 2, the mux picks 3x, the ishifter yields 12x.
// An all-zero alphabet has no 1 to stop at; this design then outputs 0.
// Interface: pe[0..7] (20-bit signed pre-estimates), alpha (4 bits) ->
// prod (23-bit signed, alpha * x). Combinational.
module select_unit
  import drs_pkg::*;
(
  input  pe_t                   pe [NUM_PE],
  input  logic [NIB-1:0]        alpha,
  output logic signed [SEL_W-1:0] prod
);

  logic [NIB-1:0] shifted;   // alpha with trailing zeros removed
  logic [1:0]     nshift;    // number of right shifts performed
  logic [2:0]     sel;       // mux select: upper bits of the odd alphabet
  pe_t            chosen;

  // Shifter: right shift until the LSB is 1 (at most three shifts for a non-zero nibble).
  always_comb begin
    shifted = alpha;
    nshift  = '0;
    for (int i = 0; i < NIB - 1; i++) begin
      if (shifted != '0 && !shifted[0]) begin
        shifted = shifted >> 1;
        nshift  = nshift + 2'd1;
      end
    end
  end

  assign sel    = shifted[NIB-1:1];
  assign chosen = pe[sel];

  // Inverse shifter, with a zero alphabet forcing a zero partial product.
  always_comb begin
    if (alpha == '0) prod = '0;
    else             prod = (SEL_W'(chosen)) <<< nshift;
  end

endmodule
