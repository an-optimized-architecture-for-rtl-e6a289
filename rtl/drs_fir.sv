// drs_fir: dynamically reconfigurable low-pass FIR filter (transposed form) in which every
// tap multiplier is an estimation distribution multiplier block (EDMB).
//
// Datapath, per accepted sample (en = 1):
//   1. One shared pre-estimator forms x, 3x, ..., 15x; a register (the Z^-1 after the
//      pre-estimator) holds them and broadcasts them to all TAPS multipliers.
//   2. EDMB k multiplies that sample by coefficient C(k); a register holds the product.
//   3. A transposed-form chain of carry select adders sums the products:
//        acc[TAPS-1] <= p[TAPS-1],  acc[k] <= p[k] + acc[k+1],  y = p[0] + acc[1].
// Reconfiguration: the filter is linear phase, so C(k) = C(TAPS-1-k). Only the first
// NUNIQ = ceil(TAPS/2) coefficients (up to and including the centre one) are inputs, and
// one decision block per input compares its magnitude with the threshold cth. When a
// coefficient is below cth, both EDMBs that use it are switched off and contribute 0,
// so the effective filter order changes with the coefficient set and the threshold,
// which may both change at any sample.
// Timing: with sample x[m] presented at the m-th enabled clock edge, the output after
// that edge is y = sum over k of C(k) * x[m-1-k]. A new sample every enabled cycle.
// The coefficient in effect for the product of x[j] is the one present at the enabled
// edge after x[j] was taken.
// Interface: clk, rst_n (asynchronous, active low, clears all registers), en (sample
// strobe; all registers hold while 0), x_in (16-bit signed), coef[0..NUNIQ-1] (16-bit
// signed, C(0)..C(centre)), cth (16-bit unsigned), y (32-bit signed, wraps modulo 2**32),
// mult_off (bit i = 1 when C(i) and its mirror are switched off).
// Follows the design: the shared pre-estimator and its register, the EDMB per tap, the
// register after each EDMB, the transposed adder chain of carry select adders, decision
// blocks over the first half plus centre, 16-bit inputs, 32-bit output, 75 taps. This
// design's choices: the reset, the sample strobe, the two's-complement coefficient ports
// converted to sign-magnitude, a register between every pair of chain adders including
// the last (so the response is that of a true FIR filter), and a 32-bit wrapping
// accumulator. An assertion checks that a switched-off tap registers a zero product.
module drs_fir
  import drs_pkg::*;
#(
  parameter int TAPS  = 75,
  parameter int NUNIQ = (TAPS + 1) / 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  sample_t              x_in,
  input  coef_t                coef [NUNIQ],
  input  logic [C_W-1:0]       cth,
  output prod_t                y,
  output logic [NUNIQ-1:0]     mult_off
);

  // ---------------- coefficient half: sign-magnitude form and decision blocks ------------
  sm_coef_t sm [NUNIQ];

  for (genvar i = 0; i < NUNIQ; i++) begin : g_db
    assign sm[i].sign = coef[i][C_W-1];
    assign sm[i].mag  = coef[i][C_W-1] ? C_W'(-coef[i]) : C_W'(coef[i]);

    decision_block u_db (
      .coef_mag (sm[i].mag),
      .cth      (cth),
      .ctrl     (mult_off[i])
    );
  end

  // ---------------- shared pre-estimator and its register --------------------------------
  pe_t pe_comb [NUM_PE];
  pe_t pe_q    [NUM_PE];

  pre_estimator u_peb (
    .x  (x_in),
    .pe (pe_comb)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  pe_q <= '{default: '0};
    else if (en) pe_q <= pe_comb;
  end

  // ---------------- one EDMB per tap and its product register -----------------------------
  prod_t p_comb [TAPS];
  prod_t p_q    [TAPS];

  for (genvar k = 0; k < TAPS; k++) begin : g_tap
    localparam int U = (k < TAPS - 1 - k) ? k : TAPS - 1 - k;  // mirrored coefficient index

    edmb u_edmb (
      .pe   (pe_q),
      .coef (sm[U]),
      .ctrl (mult_off[U]),
      .prod (p_comb[k])
    );

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)  p_q[k] <= '0;
      else if (en) p_q[k] <= p_comb[k];
    end

    // A switched-off tap must contribute nothing to the sum.
    a_off_is_zero : assert property (@(posedge clk) disable iff (!rst_n)
                                     (en && mult_off[U]) |=> (p_q[k] == '0))
      else $error("tap %0d switched off but its product is not zero", k);
  end

  // ---------------- transposed-form accumulation chain -----------------------------------
  // acc_q[k] holds the partial sum of taps k..TAPS-1 that enters adder k-1.
  prod_t acc_q   [1:TAPS-1];
  prod_t acc_sum [0:TAPS-2];

  for (genvar k = 0; k < TAPS - 1; k++) begin : g_chain
    csla #(.N(P_W)) u_add (
      .a    (p_q[k]),
      .b    (acc_q[k+1]),
      .cin  (1'b0),
      .sum  (acc_sum[k]),
      .cout ()
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q <= '{default: '0};
    end else if (en) begin
      acc_q[TAPS-1] <= p_q[TAPS-1];
      for (int k = 1; k < TAPS - 1; k++) acc_q[k] <= acc_sum[k];
    end
  end

  assign y = acc_sum[0];

endmodule
