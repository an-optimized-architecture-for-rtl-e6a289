// edmb_adder: adder block of the estimation distribution multiplier.
//
// It combines the four select-unit outputs into the 32-bit product. Select unit i handles
// coefficient bits [4i+3:4i], so its partial product carries the weight 2**(4i). The four
// weighted words are summed by a two-level tree of carry select adders, and the coefficient
// sign bit then negates the sum (invert, add one through the carry-in of a fourth carry
// select adder), which gives the product of the signed sample and the sign-magnitude
// coefficient. Use of carry select adders follows the design; the tree shape and the
// negation step are this design's choices. All arithmetic is modulo 2**32; for a 16-bit
// sample and a magnitude of at most 2**16-1 the true product always fits.
// Interface: part[0..3] (23-bit signed), sign -> prod (32-bit signed). Combinational.
module edmb_adder
  import drs_pkg::*;
(
  input  logic signed [SEL_W-1:0] part [NUM_NIB],
  input  logic                    sign,
  output prod_t                   prod
);

  prod_t w [NUM_NIB];   // weighted partial products
  prod_t s01, s23, mag_sum;

  always_comb begin
    for (int i = 0; i < NUM_NIB; i++) w[i] = prod_t'(part[i]) <<< (NIB * i);
  end

  csla #(.N(P_W)) u_add01 (.a(w[0]), .b(w[1]), .cin(1'b0), .sum(s01), .cout());
  csla #(.N(P_W)) u_add23 (.a(w[2]), .b(w[3]), .cin(1'b0), .sum(s23), .cout());
  csla #(.N(P_W)) u_addt  (.a(s01),  .b(s23),  .cin(1'b0), .sum(mag_sum), .cout());
  csla #(.N(P_W)) u_sign  (.a(mag_sum ^ {P_W{sign}}), .b('0), .cin(sign), .sum(prod), .cout());

endmodule
