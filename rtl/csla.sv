// csla: N-bit carry select adder in the area-delay-power efficient organisation.
//
// The sum is formed in four steps, all combinational:
//   HSG  half-sum s0 = a ^ b and half-carry c0 = a & b, bit by bit;
//   CG0  carry word for carry-in 0: c1_0[0] = c0[0], c1_0[i] = c0[i] | s0[i] & c1_0[i-1];
//   CG1  carry word for carry-in 1: c1_1[0] = c0[0] | s0[0], same recurrence above bit 0;
//   CS   final carry word. Because c1_1[i] is 1 wherever c1_0[i] is 1, the selection
//        reduces to c1[i] = c1_0[i] | (cin & c1_1[i]);
//   FSG  sum[0] = s0[0] ^ cin, sum[i] = s0[i] ^ c1[i-1]; cout = c1[N-1].
// This structure (HSG, CG0, CG1, CS, FSG and the select simplification) follows the
// described adder; the ripple form of the two carry generators is this design's choice.
// Ports: a, b (N bits), cin -> sum (N bits), cout. Purely combinational, no latency.
module csla #(
  parameter int N = 32
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);

  logic [N-1:0] s0, c0;      // half sum and half carry
  logic [N-1:0] c1_0, c1_1;  // full carry words for carry-in 0 and 1
  logic [N-1:0] c1;          // selected carry word

  // HSG
  assign s0 = a ^ b;
  assign c0 = a & b;

  // CG0 and CG1 (ripple of the running carries cy0 and cy1)
  always_comb begin
    logic cy0, cy1;
    cy0 = c0[0];
    cy1 = c0[0] | s0[0];
    c1_0[0] = cy0;
    c1_1[0] = cy1;
    for (int i = 1; i < N; i++) begin
      cy0 = c0[i] | (s0[i] & cy0);
      cy1 = c0[i] | (s0[i] & cy1);
      c1_0[i] = cy0;
      c1_1[i] = cy1;
    end
  end

  // CS
  assign c1 = c1_0 | ({N{cin}} & c1_1);

  // FSG
  always_comb begin
    sum[0] = s0[0] ^ cin;
    for (int i = 1; i < N; i++) sum[i] = s0[i] ^ c1[i-1];
  end
  assign cout = c1[N-1];

endmodule
