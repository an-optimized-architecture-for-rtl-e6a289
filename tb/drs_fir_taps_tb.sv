// drs_fir_taps_tb: runs the filter in its 25-tap and 50-tap configurations (TAPS
// parameter), side by side, each streaming speech-like samples through Hamming and Bohman
// low-pass sets with and without the coefficient threshold. Every output is compared with
// a reference convolution (see fir_taps_check). Fails if a configuration never switched a
// multiplier off or never reconfigured. Watchdog included.
module drs_fir_taps_tb;

  logic clk = 1'b0;
  logic done25, done50;
  int   c25, f25, o25, r25, c50, f50, o50, r50;
  int   checks, failures;

  always #5 clk = ~clk;

  fir_taps_check #(.TAPS(25)) u_25 (.clk(clk), .done(done25), .checks(c25), .failures(f25),
                                    .n_off(o25), .n_reconf(r25));
  fir_taps_check #(.TAPS(50)) u_50 (.clk(clk), .done(done50), .checks(c50), .failures(f50),
                                    .n_off(o50), .n_reconf(r50));

  initial begin
    wait (done25 && done50);
    checks   = c25 + c50 + 4;
    failures = f25 + f50;
    if (o25 == 0) begin failures++; $display("FAIL 25 taps: no multiplier switched off"); end
    if (o50 == 0) begin failures++; $display("FAIL 50 taps: no multiplier switched off"); end
    if (r25 == 0) begin failures++; $display("FAIL 25 taps: no reconfiguration"); end
    if (r50 == 0) begin failures++; $display("FAIL 50 taps: no reconfiguration"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c25 + c50, f25 + f50 + 1);
    $finish;
  end

endmodule
