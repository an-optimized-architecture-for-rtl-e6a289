// select_unit_tb: self-checking test of one select unit. The pre-estimate inputs are driven
// with exact odd multiples of a sample (worked out here, not by the pre-estimator), and for
// every 4-bit alphabet 0..15 and many samples the output must equal alphabet * x. Includes
// the worked cases 1100 (3x shifted by 2) and 1110 (7x shifted by 1). Watchdog included.
module select_unit_tb;
  import drs_pkg::*;

  logic                    clk = 1'b0;
  pe_t                     pe [NUM_PE];
  logic [NIB-1:0]          alpha;
  logic signed [SEL_W-1:0] prod;
  int                      checks = 0, failures = 0;

  always #5 clk = ~clk;

  select_unit dut (.pe(pe), .alpha(alpha), .prod(prod));

  task automatic check(input int x, input int a);
    for (int i = 0; i < NUM_PE; i++) pe[i] = pe_t'((2 * i + 1) * x);
    alpha = NIB'(a);
    @(posedge clk);
    checks++;
    if (int'(prod) != a * x) begin
      failures++;
      $display("FAIL x=%0d alpha=%0d got %0d exp %0d", x, a, prod, a * x);
    end
  endtask

  initial begin
    check(5, 12);
    check(5, 14);
    check(-32768, 15);
    check(32767, 8);
    for (int a = 0; a < 16; a++) begin
      check(1, a);
      check(-1, a);
      check(-32768, a);
      check(32767, a);
      for (int r = 0; r < 50; r++) check(int'(sample_t'($urandom)), a);
    end
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
