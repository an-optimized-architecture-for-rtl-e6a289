// drs_pkg: widths and types shared by the dynamically reconfigurable FIR filter.
//
// The filter multiplies 16-bit two's-complement samples by 16-bit coefficients and
// produces 32-bit products and outputs, as the design specification states. A
// coefficient is handled inside the multiplier in sign-magnitude form: four 4-bit
// "alphabets" (nibbles) of the magnitude plus a separate sign bit. The pre-estimator
// produces the eight odd multiples x, 3x, ..., 15x of a sample; 15x of a 16-bit
// signed sample needs 20 bits, which fixes PE_W. The 20-bit width and the
// sign-magnitude encoding are this design's choices.
package drs_pkg;

  localparam int X_W      = 16;  // input sample width
  localparam int C_W      = 16;  // coefficient width (two's complement at the filter ports)
  localparam int NIB      = 4;   // alphabet (nibble) width
  localparam int NUM_NIB  = C_W / NIB;  // alphabets per coefficient magnitude
  localparam int NUM_PE   = 8;   // odd multiples 1,3,...,15
  localparam int PE_W     = X_W + 4;    // width of one pre-estimate (15x fits)
  localparam int SEL_W    = PE_W + 3;   // select-unit output: pre-estimate << up to 3
  localparam int P_W      = 32;  // product and filter output width

  typedef logic signed [X_W-1:0]  sample_t;
  typedef logic signed [C_W-1:0]  coef_t;
  typedef logic signed [PE_W-1:0] pe_t;
  typedef logic signed [P_W-1:0]  prod_t;

  // The eight pre-estimates; entry i holds (2*i+1)*x.
  typedef pe_t pe_set_t [NUM_PE];

  // Coefficient in the form the multiplier block takes it.
  typedef struct packed {
    logic           sign;  // 1: negative coefficient
    logic [C_W-1:0] mag;   // magnitude, 0 .. 2**(C_W-1)
  } sm_coef_t;

endpackage
