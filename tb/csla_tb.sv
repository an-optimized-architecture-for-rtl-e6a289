// csla_tb: self-checking test of the carry select adder at its default width (32 bits).
// Drives corner operands (all zeros, all ones, carry ripple across every bit) and random
// operands with both carry-in values, and compares sum and carry-out with a 33-bit
// reference addition. A watchdog ends the run if it stalls.
module csla_tb;

  localparam int N = 32;

  logic         clk = 1'b0;
  logic [N-1:0] a, b, sum;
  logic         cin, cout;
  int           checks = 0, failures = 0;

  always #5 clk = ~clk;

  csla dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  task automatic check(input logic [N-1:0] ta, input logic [N-1:0] tb_, input logic tc);
    logic [N:0] ref_sum;
    a = ta; b = tb_; cin = tc;
    @(posedge clk);
    ref_sum = {1'b0, ta} + {1'b0, tb_} + {{N{1'b0}}, tc};
    checks++;
    if ({cout, sum} !== ref_sum) begin
      failures++;
      $display("FAIL a=%h b=%h cin=%0d got %0d:%h exp %h", ta, tb_, tc, cout, sum, ref_sum);
    end
  endtask

  initial begin
    check('0, '0, 1'b0);
    check('0, '0, 1'b1);
    check('1, '0, 1'b1);
    check('1, '1, 1'b1);
    check('1, 32'd1, 1'b0);
    check(32'h7fff_ffff, 32'd1, 1'b0);
    check(32'haaaa_aaaa, 32'h5555_5555, 1'b1);
    for (int i = 0; i < 2000; i++) check($urandom, $urandom, 1'($urandom));
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
