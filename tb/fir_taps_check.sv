// fir_taps_check: streaming check of one drs_fir instance of a given length, used by
// drs_fir_taps_tb to run the 25- and 50-tap configurations.
//
// It designs a Hamming-windowed and a Bohman-windowed sinc low-pass (cut-off 0.12 of the
// Nyquist frequency, scaled by 2**16) of length TAPS, streams NSAMP speech-like samples
// (two tones plus pseudo-random noise) through the filter and compares every output with
// a convolution worked out here. Phases: threshold 0 (all multipliers on), threshold =
// average coefficient, then the Bohman set with its own average. A coefficient whose
// magnitude is below the threshold in force counts as 0 in the reference. It raises done
// when finished and reports its checks, failures and how many multiplier-off decisions
// it saw. Ports: clk (from the testbench), done, checks, failures, n_off, n_reconf.
module fir_taps_check #(
  parameter int TAPS  = 25,
  parameter int NSAMP = 600
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_off,
  output int   n_reconf
);
  import drs_pkg::*;

  localparam int  NUNIQ = (TAPS + 1) / 2;
  localparam real PI    = 3.14159265358979;

  logic             rst_n, en;
  sample_t          x_in;
  coef_t            coef [NUNIQ];
  logic [C_W-1:0]   cth;
  prod_t            y;
  logic [NUNIQ-1:0] mult_off;

  drs_fir #(.TAPS(TAPS)) dut (
    .clk (clk), .rst_n (rst_n), .en (en), .x_in (x_in),
    .coef (coef), .cth (cth), .y (y), .mult_off (mult_off)
  );

  int cset [2][NUNIQ];
  int cavg [2];
  int x_hist [NSAMP];
  int set_hist [NSAMP];
  int th_hist [NSAMP];

  function automatic real sinc_lp(input real wc, input real n);
    if (n == 0.0) return wc;
    return $sin(PI * wc * n) / (PI * n);
  endfunction

  function automatic real bohman(input real t);
    real a;
    a = (t < 0.0) ? -t : t;
    return (1.0 - a) * $cos(PI * a) + $sin(PI * a) / PI;
  endfunction

  function automatic int rnd(input real h);
    return int'($rtoi(h + (h >= 0.0 ? 0.5 : -0.5)));
  endfunction

  function automatic int mirror(input int k);
    return (k < TAPS - 1 - k) ? k : TAPS - 1 - k;
  endfunction

  function automatic int eff_coef(input int st, input int th, input int k);
    int c;
    c = cset[st][mirror(k)];
    return ((c < 0 ? -c : c) < th) ? 0 : c;
  endfunction

  function automatic longint ref_y(input int m);
    longint acc;
    acc = 0;
    for (int k = 0; k < TAPS; k++)
      if (m - 1 - k >= 0)
        acc += longint'(eff_coef(set_hist[m - k], th_hist[m - k], k)) * x_hist[m - 1 - k];
    return acc;
  endfunction

  initial begin
    int s, cur_set, cur_th, prev_set, prev_th;
    real n, v;
    done = 1'b0; checks = 0; failures = 0; n_off = 0; n_reconf = 0;
    for (int i = 0; i < NUNIQ; i++) begin
      n = real'(i) - real'(TAPS - 1) / 2.0;
      cset[0][i] = rnd(sinc_lp(0.12, n) * (0.54 - 0.46 * $cos(2.0 * PI * i / (TAPS - 1))) * 65536.0);
      cset[1][i] = rnd(sinc_lp(0.12, n) * bohman(2.0 * i / (TAPS - 1) - 1.0) * 65536.0);
    end
    for (int st = 0; st < 2; st++) begin
      s = 0;
      for (int k = 0; k < TAPS; k++) s += cset[st][mirror(k)];
      cavg[st] = (s + TAPS / 2) / TAPS;
    end
    rst_n = 1'b0; en = 1'b0; x_in = '0; cth = '0;
    for (int i = 0; i < NUNIQ; i++) coef[i] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    prev_set = 0; prev_th = 0;
    for (int m = 0; m < NSAMP; m++) begin
      if      (m < NSAMP / 3)     begin cur_set = 0; cur_th = 0;       end
      else if (m < 2 * NSAMP / 3) begin cur_set = 0; cur_th = cavg[0]; end
      else                        begin cur_set = 1; cur_th = cavg[1]; end
      if (m > 0 && (cur_set != prev_set || cur_th != prev_th)) n_reconf++;
      prev_set = cur_set; prev_th = cur_th;
      v = 9000.0 * $sin(2.0 * PI * 300.0 * m / 8000.0)
        + 6000.0 * $sin(2.0 * PI * 1100.0 * m / 8000.0)
        + real'(int'($urandom % 12001) - 6000);
      @(negedge clk);
      x_hist[m] = int'($rtoi(v));
      set_hist[m] = cur_set;
      th_hist[m] = cur_th;
      x_in = sample_t'(x_hist[m]);
      for (int i = 0; i < NUNIQ; i++) coef[i] = coef_t'(cset[cur_set][i]);
      cth = C_W'(cur_th);
      en = 1'b1;
      #1;
      for (int i = 0; i < NUNIQ; i++) if (mult_off[i]) n_off++;
      @(posedge clk);
      #1;
      checks++;
      if (y !== prod_t'(ref_y(m))) begin
        failures++;
        if (failures < 5) $display("FAIL taps=%0d m=%0d y=%0d exp %0d", TAPS, m, y, ref_y(m));
      end
    end
    en = 1'b0;
    $display("taps %0d: centre %0d, average %0d, multiplier-off decisions %0d",
             TAPS, cset[0][NUNIQ-1], cavg[0], n_off);
    done = 1'b1;
  end

endmodule
