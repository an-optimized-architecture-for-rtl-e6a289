// pre_estimator: the shared pre-estimator block (PEB) of the filter.
//
// From one input sample x it forms the eight odd multiples x, 3x, 5x, ..., 15x, one per
// 4-bit alphabet value with a set lowest bit. Every tap multiplier then picks its partial
// products from these eight words instead of multiplying, so the multiples are computed
// once per sample for the whole filter. The multiples are formed by shifts and carry
// select adders, as the design prescribes:
//   3x = (x<<1) + x      5x = (x<<2) + x      7x = (x<<3) - x      9x = (x<<3) + x
//   11x = (x<<3) + (x<<1) + x                 13x = (x<<3) + (x<<2) + x
//   15x = (x<<4) - x
// 11x and 13x reuse the 3x and 5x sums for their last two terms, and a subtraction is an
// addition of the inverted operand with carry-in 1; both are this design's choices.
// Interface: x (16-bit signed) -> pe[0..7] (20-bit signed, pe[i] = (2i+1)*x).
// Combinational; the filter registers the result (the delay after the PEB).
module pre_estimator
  import drs_pkg::*;
(
  input  sample_t x,
  output pe_t     pe [NUM_PE]
);

  pe_t x1, x2, x4, x8, x16;
  pe_t s3, s5, s7, s9, s11, s13, s15;

  assign x1  = pe_t'(x);
  assign x2  = x1 <<< 1;
  assign x4  = x1 <<< 2;
  assign x8  = x1 <<< 3;
  assign x16 = x1 <<< 4;

  csla #(.N(PE_W)) u_3x  (.a(x2),  .b(x1),  .cin(1'b0), .sum(s3),  .cout());
  csla #(.N(PE_W)) u_5x  (.a(x4),  .b(x1),  .cin(1'b0), .sum(s5),  .cout());
  csla #(.N(PE_W)) u_7x  (.a(x8),  .b(~x1), .cin(1'b1), .sum(s7),  .cout());
  csla #(.N(PE_W)) u_9x  (.a(x8),  .b(x1),  .cin(1'b0), .sum(s9),  .cout());
  csla #(.N(PE_W)) u_11x (.a(x8),  .b(s3),  .cin(1'b0), .sum(s11), .cout());
  csla #(.N(PE_W)) u_13x (.a(x8),  .b(s5),  .cin(1'b0), .sum(s13), .cout());
  csla #(.N(PE_W)) u_15x (.a(x16), .b(~x1), .cin(1'b1), .sum(s15), .cout());

  assign pe[0] = x1;
  assign pe[1] = s3;
  assign pe[2] = s5;
  assign pe[3] = s7;
  assign pe[4] = s9;
  assign pe[5] = s11;
  assign pe[6] = s13;
  assign pe[7] = s15;

endmodule
