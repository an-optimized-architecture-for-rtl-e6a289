// edmb: estimation distribution multiplier block, the tap multiplier of the filter.
//
// It multiplies the current sample by one coefficient using only the pre-estimates that
// the shared pre-estimator distributes. The coefficient magnitude is cut into four 4-bit
// alphabets; each goes to its own select unit, which returns alphabet * x exactly, and
// the adder block weights, sums and signs the four results. No bits are truncated, so the
// product is exact.
// The ctrl input comes from the decision block. With ctrl = 1 the multiplier is switched
// off: the alphabets and the sign seen by the select units and adder are held at zero, so
// they do not toggle, and the product is 0. Forcing the operands to zero (operand
// isolation) is this design's way of switching off; the document does not say how.
// Interface: pe[0..7] (20-bit signed), coef (sign + 16-bit magnitude), ctrl ->
// prod (32-bit signed). Combinational; the filter registers the product.
module edmb
  import drs_pkg::*;
(
  input  pe_t      pe [NUM_PE],
  input  sm_coef_t coef,
  input  logic     ctrl,
  output prod_t    prod
);

  logic [C_W-1:0]          mag_on;
  logic                    sign_on;
  logic signed [SEL_W-1:0] part [NUM_NIB];

  assign mag_on  = ctrl ? '0 : coef.mag;
  assign sign_on = ctrl ? 1'b0 : coef.sign;

  for (genvar i = 0; i < NUM_NIB; i++) begin : g_su
    select_unit u_su (
      .pe    (pe),
      .alpha (mag_on[NIB*i +: NIB]),
      .prod  (part[i])
    );
  end

  edmb_adder u_adder (
    .part (part),
    .sign (sign_on),
    .prod (prod)
  );

endmodule
