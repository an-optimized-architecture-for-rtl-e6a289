// edmb_tb: self-checking test of the estimation distribution multiplier block.
// The pre-estimates are driven as exact odd multiples of the sample (computed here). Checks:
//   - the 8-bit example 106 * 124 = 13144, exact with no truncation;
//   - the 8-bit coefficient C(9) = 11111101 (253) times x = 4, i.e. 1012;
//   - random 16-bit signed samples times random sign-magnitude coefficients, including
//     magnitude 0, 32768 and 65535, against an ordinary integer product;
//   - ctrl = 1 (switched off) gives a zero product for any operands.
// Watchdog included.
module edmb_tb;
  import drs_pkg::*;

  logic     clk = 1'b0;
  pe_t      pe [NUM_PE];
  sm_coef_t coef;
  logic     ctrl;
  prod_t    prod;
  int       checks = 0, failures = 0;

  always #5 clk = ~clk;

  edmb dut (.pe(pe), .coef(coef), .ctrl(ctrl), .prod(prod));

  task automatic check(input int x, input int mag, input logic s, input logic off);
    longint m;
    prod_t  expv;
    for (int i = 0; i < NUM_PE; i++) pe[i] = pe_t'((2 * i + 1) * x);
    coef.sign = s;
    coef.mag  = C_W'(mag);
    ctrl      = off;
    @(posedge clk);
    m = longint'(x) * longint'(mag);
    if (s) m = -m;
    expv = off ? '0 : prod_t'(m);
    checks++;
    if (prod !== expv) begin
      failures++;
      $display("FAIL x=%0d mag=%0d s=%0d off=%0d got %0d exp %0d", x, mag, s, off, prod, expv);
    end
  endtask

  initial begin
    check(106, 124, 1'b0, 1'b0);            // 13144
    check(4, 253, 1'b0, 1'b0);              // 1012
    check(-32768, 32768, 1'b1, 1'b0);
    check(-32768, 65535, 1'b0, 1'b0);
    check(32767, 65535, 1'b1, 1'b0);
    check(1234, 0, 1'b1, 1'b0);
    check(1234, 5000, 1'b0, 1'b1);
    for (int i = 0; i < 3000; i++)
      check(int'(sample_t'($urandom)), int'($urandom % 65536), 1'($urandom), ($urandom % 4) == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
