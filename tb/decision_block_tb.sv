// decision_block_tb: self-checking test of the decision block. Checks the boundary around
// the threshold (below, equal, above), the extremes, and random magnitude/threshold pairs,
// using the threshold 4798 quoted for a 75-tap equiripple filter. Watchdog included.
module decision_block_tb;
  import drs_pkg::*;

  logic           clk = 1'b0;
  logic [C_W-1:0] coef_mag, cth;
  logic           ctrl;
  int             checks = 0, failures = 0;

  always #5 clk = ~clk;

  decision_block dut (.coef_mag(coef_mag), .cth(cth), .ctrl(ctrl));

  task automatic check(input int m, input int t);
    logic expv;
    coef_mag = C_W'(m);
    cth      = C_W'(t);
    @(posedge clk);
    expv = (m < t);   // 1: multiplier off
    checks++;
    if (ctrl !== expv) begin
      failures++;
      $display("FAIL mag=%0d cth=%0d ctrl=%0d exp %0d", m, t, ctrl, expv);
    end
  endtask

  initial begin
    check(4797, 4798);
    check(4798, 4798);
    check(4799, 4798);
    check(0, 0);
    check(0, 1);
    check(65535, 65535);
    check(32768, 65535);
    check(65535, 32768);
    for (int i = 0; i < 2000; i++) check(int'($urandom % 65536), int'($urandom % 65536));
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
