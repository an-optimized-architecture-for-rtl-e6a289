// pre_estimator_tb: self-checking test of the pre-estimator. For extreme and random 16-bit
// signed samples it checks that output i equals (2i+1) * x, computed here by ordinary
// integer multiplication. A watchdog ends the run if it stalls.
module pre_estimator_tb;
  import drs_pkg::*;

  logic    clk = 1'b0;
  sample_t x;
  pe_t     pe [NUM_PE];
  int      checks = 0, failures = 0;

  always #5 clk = ~clk;

  pre_estimator dut (.x(x), .pe(pe));

  task automatic check(input sample_t tx);
    x = tx;
    @(posedge clk);
    for (int i = 0; i < NUM_PE; i++) begin
      int expv;
      expv = (2 * i + 1) * int'(tx);
      checks++;
      if (int'(pe[i]) != expv) begin
        failures++;
        $display("FAIL x=%0d pe[%0d]=%0d exp %0d", tx, i, pe[i], expv);
      end
    end
  endtask

  initial begin
    check(16'sd0);
    check(16'sd1);
    check(-16'sd1);
    check(16'sd4);
    check(16'sd32767);
    check(-16'sd32768);
    for (int i = 0; i < 2000; i++) check(sample_t'($urandom));
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
