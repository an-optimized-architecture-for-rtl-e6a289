// drs_fir_tb: end-to-end test of the reconfigurable FIR filter at its default size
// (75 taps, no parameter overrides).
//
// Coefficients are designed here: a Hamming-windowed sinc low-pass with cut-off 0.12
// (normalised to the Nyquist frequency), scaled by 2**16 and rounded, so the centre tap is
// about 7864. The second set uses a Bohman window with the same cut-off, and a third set is
// a 25-tap Hamming low-pass placed in the middle of the 75-tap frame (outer taps zero).
// The input is a synthetic speech-like stream: two tones plus pseudo-random noise, with
// occasional full-scale samples.
// The reference output is an ordinary convolution worked out here from the sample history
// and, for every sample, the coefficient set and threshold that were in force when its
// products were formed: a coefficient whose magnitude is below the threshold counts as 0.
// Phases: all multipliers on (threshold 0), threshold = average coefficient, switch of
// coefficient set and threshold in mid-stream, gaps in the sample strobe, the 25-tap set.
// Each mechanism is counted (multipliers switched off and on, negative coefficients in use,
// threshold or coefficient changes, held cycles) and a mechanism that never happened counts
// as a failure. The mean square error of the pruned against the unpruned output is printed.
module drs_fir_tb;
  import drs_pkg::*;

  localparam int TAPS   = 75;
  localparam int NUNIQ  = (TAPS + 1) / 2;
  localparam int NSAMP  = 2400;
  localparam int NSETS  = 4;
  localparam real PI    = 3.14159265358979;

  logic           clk = 1'b0;
  logic           rst_n;
  logic           en;
  sample_t        x_in;
  coef_t          coef [NUNIQ];
  logic [C_W-1:0] cth;
  prod_t          y;
  logic [NUNIQ-1:0] mult_off;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  drs_fir dut (
    .clk (clk), .rst_n (rst_n), .en (en), .x_in (x_in),
    .coef (coef), .cth (cth), .y (y), .mult_off (mult_off)
  );

  // ---------------- coefficient sets -----------------------------------------------------
  int        cset [NSETS][NUNIQ];   // unique half, C(0)..C(centre)
  int        cavg [NSETS];          // average of all TAPS coefficients (rounded)
  int        x_hist [NSAMP];
  int        set_hist [NSAMP];      // coefficient set driven with sample m
  int        th_hist [NSAMP];       // threshold driven with sample m

  function automatic real sinc_lp(input real wc, input real n);
    if (n == 0.0) return wc;
    return $sin(PI * wc * n) / (PI * n);
  endfunction

  function automatic real bohman(input real t);  // t in [-1, 1]
    real a;
    a = (t < 0.0) ? -t : t;
    return (1.0 - a) * $cos(PI * a) + $sin(PI * a) / PI;
  endfunction

  task automatic design_sets();
    real h, w, n, scale;
    int len, off, s;
    scale = 65536.0;
    for (int st = 0; st < NSETS; st++) for (int i = 0; i < NUNIQ; i++) cset[st][i] = 0;
    for (int i = 0; i < NUNIQ; i++) begin
      n = real'(i - (TAPS - 1) / 2);
      // set 0: Hamming, cut-off 0.12
      w = 0.54 - 0.46 * $cos(2.0 * PI * i / (TAPS - 1));
      h = sinc_lp(0.12, n) * w * scale;
      cset[0][i] = int'($rtoi(h + (h >= 0.0 ? 0.5 : -0.5)));
      // set 1: Bohman, cut-off 0.12
      w = bohman(2.0 * i / (TAPS - 1) - 1.0);
      h = sinc_lp(0.12, n) * w * scale;
      cset[1][i] = int'($rtoi(h + (h >= 0.0 ? 0.5 : -0.5)));
      // set 3: wider-band Hamming (cut-off 0.30) with negative side lobes of size
      w = 0.54 - 0.46 * $cos(2.0 * PI * i / (TAPS - 1));
      h = sinc_lp(0.30, n) * w * scale;
      cset[3][i] = int'($rtoi(h + (h >= 0.0 ? 0.5 : -0.5)));
    end
    // set 2: 25-tap Hamming low-pass centred in the 75-tap frame
    len = 25; off = (TAPS - len) / 2;
    for (int i = 0; i < (len + 1) / 2; i++) begin
      n = real'(i - (len - 1) / 2);
      w = 0.54 - 0.46 * $cos(2.0 * PI * i / (len - 1));
      h = sinc_lp(0.12, n) * w * scale;
      cset[2][off + i] = int'($rtoi(h + (h >= 0.0 ? 0.5 : -0.5)));
    end
    for (int st = 0; st < NSETS; st++) begin
      s = 0;
      for (int k = 0; k < TAPS; k++) s += cset[st][(k < TAPS - 1 - k) ? k : TAPS - 1 - k];
      cavg[st] = (s + TAPS / 2) / TAPS;
    end
  endtask

  function automatic int full_coef(input int st, input int k);
    return cset[st][(k < TAPS - 1 - k) ? k : TAPS - 1 - k];
  endfunction

  function automatic int eff_coef(input int st, input int th, input int k);
    int c;
    c = full_coef(st, k);
    return ((c < 0 ? -c : c) < th) ? 0 : c;
  endfunction

  // Output expected after the m-th enabled edge: sum_k C(k) x[m-1-k], where the
  // coefficients for x[j] are those driven together with sample j+1.
  function automatic longint ref_y(input int m, input bit pruned);
    longint acc;
    int j;
    acc = 0;
    for (int k = 0; k < TAPS; k++) begin
      j = m - 1 - k;
      if (j >= 0) begin
        if (pruned) acc += longint'(eff_coef(set_hist[j + 1], th_hist[j + 1], k)) * x_hist[j];
        else        acc += longint'(full_coef(set_hist[j + 1], k)) * x_hist[j];
      end
    end
    return acc;
  endfunction

  // ---------------- mechanism counters ----------------------------------------------------
  int n_off = 0, n_on = 0, n_neg = 0, n_reconf = 0, n_hold = 0, n_small_set = 0;
  real mse_acc = 0.0;
  int  mse_n = 0;

  function automatic int speech_sample(input int m);
    real v;
    v = 9000.0 * $sin(2.0 * PI * 300.0 * m / 8000.0)
      + 6000.0 * $sin(2.0 * PI * 1100.0 * m / 8000.0)
      + real'(int'($urandom % 12001) - 6000);
    if (m % 397 == 5)   v = 32767.0;
    if (m % 397 == 200) v = -32768.0;
    return int'($rtoi(v));
  endfunction

  task automatic drive_config(input int st, input int th);
    for (int i = 0; i < NUNIQ; i++) coef[i] = coef_t'(cset[st][i]);
    cth = C_W'(th);
  endtask

  initial begin
    int cur_set, cur_th, prev_set, prev_th, m;
    longint expv, fullv;
    prod_t held;
    design_sets();
    $display("centre taps: hamming %0d bohman %0d, averages %0d %0d %0d %0d",
             cset[0][NUNIQ-1], cset[1][NUNIQ-1], cavg[0], cavg[1], cavg[2], cavg[3]);
    rst_n = 1'b0; en = 1'b0; x_in = '0;
    drive_config(0, 0);
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    prev_set = 0; prev_th = 0;
    m = 0;
    while (m < NSAMP) begin
      // schedule of reconfigurations
      if      (m < 400)  begin cur_set = 0; cur_th = 0;        end
      else if (m < 900)  begin cur_set = 0; cur_th = cavg[0];  end
      else if (m < 1300) begin cur_set = 1; cur_th = cavg[1];  end
      else if (m < 1700) begin cur_set = 3; cur_th = cavg[3];  end
      else if (m < 2000) begin cur_set = 2; cur_th = cavg[2];  end
      else               begin cur_set = 1; cur_th = 2 * cavg[1]; end
      if (m > 0 && (cur_set != prev_set || cur_th != prev_th)) n_reconf++;
      prev_set = cur_set; prev_th = cur_th;
      // occasional gap in the sample strobe: outputs must hold
      if (m % 113 == 50) begin
        @(negedge clk);
        held = y;
        en = 1'b0;
        x_in = sample_t'($urandom);
        repeat (2) @(negedge clk);
        checks++; n_hold++;
        if (y !== held) begin
          failures++;
          $display("FAIL output changed while en=0 at m=%0d", m);
        end
      end
      @(negedge clk);
      x_hist[m]   = speech_sample(m);
      set_hist[m] = cur_set;
      th_hist[m]  = cur_th;
      x_in = sample_t'(x_hist[m]);
      drive_config(cur_set, cur_th);
      en = 1'b1;
      #1;
      for (int i = 0; i < NUNIQ; i++) begin
        if (mult_off[i]) n_off++; else n_on++;
        if (!mult_off[i] && cset[cur_set][i] < 0) n_neg++;
        checks++;
        if (mult_off[i] !== (((cset[cur_set][i] < 0) ? -cset[cur_set][i] : cset[cur_set][i]) < cur_th)) begin
          failures++;
          $display("FAIL mult_off[%0d] at m=%0d", i, m);
        end
      end
      if (cur_set == 2) n_small_set++;
      @(posedge clk);
      #1;
      expv  = ref_y(m, 1'b1);
      fullv = ref_y(m, 1'b0);
      checks++;
      if (y !== prod_t'(expv)) begin
        failures++;
        if (failures < 10) $display("FAIL m=%0d y=%0d exp %0d", m, y, expv);
      end
      if (m >= 500 && m < 900) begin
        mse_acc += (real'(expv - fullv) / 2147483648.0) ** 2;
        mse_n++;
      end
      m++;
    end
    en = 1'b0;
    $display("multipliers off %0d, on %0d, negative in use %0d, reconfigurations %0d, holds %0d, 25-tap samples %0d",
             n_off, n_on, n_neg, n_reconf, n_hold, n_small_set);
    if (mse_n > 0 && mse_acc > 0.0)
      $display("pruned vs full MSE (Hamming, threshold = average): %f dB", 10.0 * $log10(mse_acc / mse_n));
    checks++; if (n_off == 0)       begin failures++; $display("FAIL no multiplier switched off"); end
    checks++; if (n_on == 0)        begin failures++; $display("FAIL no multiplier on"); end
    checks++; if (n_neg == 0)       begin failures++; $display("FAIL no negative coefficient used"); end
    checks++; if (n_reconf == 0)    begin failures++; $display("FAIL no reconfiguration"); end
    checks++; if (n_hold == 0)      begin failures++; $display("FAIL no strobe gap"); end
    checks++; if (n_small_set == 0) begin failures++; $display("FAIL 25-tap set never ran"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
