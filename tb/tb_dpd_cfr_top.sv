// tb_dpd_cfr_top: end-to-end test of the whole transmitter datapath at its
// default size (three SRPC stages, four carriers, 129-tap shaping filter,
// 256-entry LUT with two pre-equalizer taps, 8192-word playback memory,
// 1024-sample correlation block over 64 lags).
//
// A four-carrier test signal (carriers at +-2.5 and +-7.5 MHz of a
// 61.44 Msample/s stream) is loaded into the playback memory and replayed in
// several phases. A simple PA model closes the loop: the feedback ADC word is
// the main DAC word delayed by PA_DLY samples and scaled to 12 bits.
//   1. CFR off (threshold at full scale), LUT at its reset value 1.0 and the
//      pre-equalizer bypassed: the DAC
//      stream must be the played stream delayed by the pipeline latency,
//      rounded to 14 bits, exactly, across playback wraps.
//   2. The same with the pre-equalizer switched in (its taps still zero)
//      after writing a unity LUT, plus two near full-scale samples that drive the LUT
//      index to its last entry (pd_sat): still exact.
//   3. CFR on (threshold 5 dB above RMS), pre-equalizer bypassed: every
//      stage clips, PAPR at the DAC
//      drops by at least 2 dB.
//   4. Predistorter with LUT = 0.5 and first pre-equalizer tap = 0.25:
//      DAC = round14(0.5 u(n) + 0.125 u(n-1)) within one LSB. The correlator
//      (corr_sel = 0) runs on this phase and must report PA_DLY + 1, and a
//      fine estimate within 0.1 sample of it.
//   5. RF predistorter (rf_* ports): random input, known LUT, coarse delays;
//      main and coefficient DAC words checked exactly, and the correlator
//      (corr_sel = 1) measures RF_DLY + main coarse delay + 3.
//   6. RF predistorter fractional delay step 5 on a slow tone: the main DAC
//      follows a half-sample shift.
// Each mechanism is counted; one that never happens counts a failure.
module tb_dpd_cfr_top;
  import dpd_pkg::*;

  localparam int  STAGES = 3;
  localparam int  NC     = 4;
  localparam int  TAPS   = 129;
  localparam int  G      = (TAPS - 1) / 2;
  localparam int  N      = 256;
  localparam int  LATD   = STAGES * (7 + G) + 6;   // played sample -> DAC word index
  localparam int  LEN    = 1536;
  localparam int  PA_DLY = 20;
  localparam int  RF_DLY = 5;
  localparam int  RF_MC  = 7;
  localparam int  RF_CC  = 11;
  localparam real PI     = 3.14159265358979;
  localparam real FS     = 61.44;

  logic                clk = 0, rst_n = 0;
  logic                play_we = 0, play_run = 0;
  logic [12:0]         play_waddr;
  cplx_t               play_wdata;
  logic [13:0]         play_len;
  logic                cfr_coef_we = 0;
  logic [7:0]          cfr_coef_addr;
  s16_t                cfr_coef_data;
  logic [31:0]         cfr_fword  [NC];
  logic [NC-1:0]       cfr_car_en;
  mag_t                cfr_thresh [STAGES];
  s16_t                cfr_alpha  [STAGES];
  logic [STAGES-1:0]   cfr_clipped;
  logic                pd_bypass, pd_lut_we = 0, pd_eq_we = 0;
  logic [7:0]          pd_lut_addr, pd_eq_addr;
  logic                pd_eq_tap;
  coef_t               pd_lut_data, pd_eq_data;
  logic                pd_sat;
  logic signed [13:0]  dac_i, dac_q;
  logic                dac_valid;
  logic signed [11:0]  adc_i, adc_q;
  logic                corr_start = 0, corr_sel = 0, corr_busy, corr_done;
  logic [5:0]          corr_lag;
  logic [63:0]         corr_peak;
  logic [9:0]          corr_lag_fine;
  logic                rf_ce = 0, rf_lut_we = 0;
  cplx_t               rf_u, rf_lut_data;
  logic [7:0]          rf_lut_addr;
  logic [5:0]          rf_main_coarse, rf_coef_coarse;
  logic [3:0]          rf_main_frac;
  logic signed [13:0]  rf_main_dac_i, rf_main_dac_q;
  logic signed [7:0]   rf_coef_dac_i, rf_coef_dac_q;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_wrap = 0, n_exact_byp = 0, n_exact_lut = 0, n_sat = 0, n_pd = 0;
  int n_clip [STAGES] = '{0, 0, 0};
  int n_fine = 0;
  int n_papr = 0, n_corr_bb = 0, n_corr_rf = 0, n_rf_main = 0, n_rf_coef = 0, n_rf_frac = 0;

  dpd_cfr_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- PA / feedback model ----------------
  // adc = DAC word delayed by PA_DLY converter samples (main path) or
  // RF_DLY samples (RF predistorter main DAC), scaled 14 -> 12 bits.
  logic signed [13:0] pa_i [PA_DLY], pa_q [PA_DLY];
  logic signed [13:0] rp_i [RF_DLY], rp_q [RF_DLY];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < PA_DLY; k++) begin pa_i[k] <= '0; pa_q[k] <= '0; end
      for (int k = 0; k < RF_DLY; k++) begin rp_i[k] <= '0; rp_q[k] <= '0; end
    end else begin
      if (dut.play_valid) begin
        pa_i[0] <= dac_i; pa_q[0] <= dac_q;
        for (int k = 1; k < PA_DLY; k++) begin pa_i[k] <= pa_i[k-1]; pa_q[k] <= pa_q[k-1]; end
      end
      if (rf_ce) begin
        rp_i[0] <= rf_main_dac_i; rp_q[0] <= rf_main_dac_q;
        for (int k = 1; k < RF_DLY; k++) begin rp_i[k] <= rp_i[k-1]; rp_q[k] <= rp_q[k-1]; end
      end
    end
  end
  always_comb begin
    adc_i = corr_sel ? 12'(rp_i[RF_DLY-1] >>> 2) : 12'(pa_i[PA_DLY-1] >>> 2);
    adc_q = corr_sel ? 12'(rp_q[RF_DLY-1] >>> 2) : 12'(pa_q[PA_DLY-1] >>> 2);
  end

  always @(posedge clk) if (rst_n && dut.u_play.wrap) n_wrap++;
  always @(posedge clk) if (rst_n && pd_sat) n_sat++;
  always @(posedge clk)
    if (rst_n) for (int s = 0; s < STAGES; s++) if (cfr_clipped[s]) n_clip[s]++;

  // ---------------- stimulus data ----------------
  int xi [LEN], xq [LEN];
  int di [4*LEN], dq [4*LEN];
  int nd;
  real cf [NC] = '{-7.5, -2.5, 2.5, 7.5};

  function automatic int rnd14(input int v);
    int r;
    r = (v + 2) >>> 2;
    if (r > 8191) r = 8191;
    if (r < -8192) r = -8192;
    return r;
  endfunction

  function automatic int rnd8(input int v);
    int r;
    r = (v + 128) >>> 8;
    if (r > 127) r = 127;
    if (r < -128) r = -128;
    return r;
  endfunction

  function automatic int isqrt(input longint p);
    int r;
    r = $rtoi($sqrt(real'(p)));
    while (longint'(r) * r > p) r--;
    while (longint'(r + 1) * (r + 1) <= p) r++;
    return r;
  endfunction

  task automatic write_play(input int a, input int vi, input int vq);
    play_we = 1;
    play_waddr = 13'(a);
    play_wdata = '{i: s16_t'(vi), q: s16_t'(vq)};
    @(posedge clk);
    #1;
    play_we = 0;
  endtask

  task automatic set_lut(input int gi, input int gq);
    for (int a = 0; a < N; a++) begin
      pd_lut_we = 1; pd_lut_addr = 8'(a); pd_lut_data = '{i: s16_t'(gi), q: s16_t'(gq)};
      @(posedge clk);
      #1;
    end
    pd_lut_we = 0;
  endtask

  task automatic set_eq(input int gi, input int gq);
    for (int a = 0; a < N; a++) begin
      pd_eq_we = 1; pd_eq_addr = 8'(a); pd_eq_tap = 1'b1; pd_eq_data = '{i: s16_t'(gi), q: s16_t'(gq)};
      @(posedge clk);
      #1;
    end
    pd_eq_we = 0;
  endtask

  // Play nsamp samples and record every DAC word in di/dq[0..].
  // corr_at >= 0 pulses corr_start before that sample.
  task automatic play(input int nsamp, input int corr_at);
    nd = 0;
    play_run = 1;
    for (int k = 0; k < nsamp + 1; k++) begin
      if (k == nsamp) play_run = 0;
      corr_start = (k == corr_at);
      @(posedge clk);
      #1;
      corr_start = 0;
      if (dac_valid) begin
        di[nd] = int'(dac_i);
        dq[nd] = int'(dac_q);
        nd++;
      end
    end
    @(posedge clk);
    #1;
    if (dac_valid) begin
      di[nd] = int'(dac_i);
      dq[nd] = int'(dac_q);
      nd++;
    end
  endtask

  // DAC word v carries played sample v - LATD (playback restarts at word 0).
  function automatic int played_i(input int v);
    return xi[(v - LATD) % LEN];
  endfunction
  function automatic int played_q(input int v);
    return xq[(v - LATD) % LEN];
  endfunction

  task automatic check_exact(input string what, ref int cnt);
    int bad;
    bad = 0;
    for (int v = 2 * LATD; v < nd; v++) begin
      checks++;
      if (di[v] != rnd14(played_i(v)) || dq[v] != rnd14(played_q(v))) begin
        bad++;
        failures++;
        if (bad < 5) $display("FAIL %s v=%0d dac=(%0d,%0d) exp=(%0d,%0d)", what, v, di[v], dq[v],
                              rnd14(played_i(v)), rnd14(played_q(v)));
      end else cnt++;
    end
  endtask

  task automatic wait_corr(input int expect_lag, input string what, ref int cnt);
    int t;
    t = 0;
    while (!corr_done && t < 200000) begin
      @(posedge clk);
      #1;
      t++;
    end
    checks++;
    if (!corr_done || int'(corr_lag) != expect_lag) begin
      failures++;
      $display("FAIL %s: lag %0d expected %0d (done=%0b)", what, corr_lag, expect_lag, corr_done);
    end else cnt++;
    checks++;
    if (int'(corr_lag_fine) > 10 * expect_lag + 1 || int'(corr_lag_fine) < 10 * expect_lag - 1) begin
      failures++;
      $display("FAIL %s: fine lag %0d/10 expected %0d/10", what, corr_lag_fine, 10 * expect_lag);
    end else n_fine++;
    $display("%s correlator lag %0d (fine %0d/10) after %0d search clocks", what, corr_lag, corr_lag_fine, t);
  endtask

  initial begin
    real rms, pk_in, pk_out;
    play_waddr = '0; play_wdata = '0; play_len = 14'(LEN);
    cfr_coef_addr = '0; cfr_coef_data = '0; cfr_car_en = '1;
    pd_bypass = 1; pd_lut_addr = '0; pd_lut_data = '0; pd_eq_addr = '0; pd_eq_tap = 1'b1; pd_eq_data = '0;
    rf_u = '0; rf_lut_addr = '0; rf_lut_data = '0; rf_main_coarse = '0; rf_coef_coarse = '0; rf_main_frac = '0;
    for (int c = 0; c < NC; c++)
      cfr_fword[c] = 32'($rtoi(cf[c] / FS * 4294967296.0 + (cf[c] < 0 ? 4294967296.0 : 0.0)));
    for (int s = 0; s < STAGES; s++) begin
      cfr_thresh[s] = 16'hFFFF;
      cfr_alpha[s]  = 16'sd6144;   // 1.5
    end
    repeat (3) @(posedge clk);
    #1;
    rst_n = 1;

    // shaping filter: Hamming-windowed sinc, 1.92 MHz cut-off, unity DC gain
    begin
      real hr [TAPS];
      real sum, fc;
      fc  = 1.92 / FS;
      sum = 0.0;
      for (int k = 0; k < TAPS; k++) begin
        real t;
        t = real'(k - G);
        hr[k] = (k == G) ? 2.0 * fc : $sin(2.0 * PI * fc * t) / (PI * t);
        hr[k] = hr[k] * (0.54 - 0.46 * $cos(2.0 * PI * k / (TAPS - 1)));
        sum += hr[k];
      end
      for (int k = 0; k < TAPS; k++) begin
        cfr_coef_we = 1; cfr_coef_addr = 8'(k); cfr_coef_data = s16_t'($rtoi(hr[k] / sum * 32768.0 + 0.5));
        @(posedge clk);
        #1;
      end
      cfr_coef_we = 0;
    end

    // four carriers x 6 random tones
    begin
      real ph [NC*6], fr [NC*6];
      for (int t = 0; t < NC * 6; t++) begin
        ph[t] = 2.0 * PI * ($urandom_range(0, 9999) / 10000.0);
        fr[t] = cf[t / 6] + ($urandom_range(0, 3000) / 1000.0 - 1.5);
      end
      rms = 0.0;
      pk_in = 0.0;
      for (int n = 0; n < LEN; n++) begin
        real vi, vq, m2;
        vi = 0.0;
        vq = 0.0;
        for (int t = 0; t < NC * 6; t++) begin
          vi += $cos(2.0 * PI * fr[t] / FS * n + ph[t]);
          vq += $sin(2.0 * PI * fr[t] / FS * n + ph[t]);
        end
        xi[n] = $rtoi(vi * 1300.0);
        xq[n] = $rtoi(vq * 1300.0);
        m2 = real'(xi[n]) * xi[n] + real'(xq[n]) * xq[n];
        rms += m2;
        if (m2 > pk_in) pk_in = m2;
        write_play(n, xi[n], xq[n]);
      end
      rms = rms / LEN;
    end

    // ---- 1: CFR off, predistorter bypassed ----
    pd_bypass = 1;
    play(2 * LEN + LATD, -1);
    check_exact("bypass", n_exact_byp);

    // ---- 2: predistorter active, unity LUT, index saturation ----
    set_lut(16384, 0);
    pd_bypass = 0;
    xi[5] = 32700; xq[5] = 0;
    xi[6] = 0;     xq[6] = -32760;
    write_play(5, xi[5], xq[5]);
    write_play(6, xi[6], xq[6]);
    play(LEN + 2 * LATD, -1);
    check_exact("unity LUT", n_exact_lut);
    checks++;
    if (n_sat == 0) begin failures++; $display("FAIL: LUT index never saturated"); end


    // ---- 3: CFR on (test signal restored) ----
    xi[5] = 0; xq[5] = 0; xi[6] = 0; xq[6] = 0;
    write_play(5, 0, 0);
    write_play(6, 0, 0);
    pd_bypass = 1;
    for (int s = 0; s < STAGES; s++) cfr_thresh[s] = mag_t'($rtoi($sqrt(rms) * $pow(10.0, 5.0 / 20.0)));
    play(LEN + 2 * LATD, -1);
    pk_out = 0.0;
    for (int v = 2 * LATD; v < nd; v++) begin
      real m2;
      m2 = 16.0 * (real'(di[v]) * di[v] + real'(dq[v]) * dq[v]);
      if (m2 > pk_out) pk_out = m2;
    end
    $display("PAPR in %0.2f dB, at the DAC %0.2f dB (threshold 5 dB)",
             10.0 * $log10(pk_in / rms), 10.0 * $log10(pk_out / rms));
    checks++;
    if (10.0 * $log10(pk_out / rms) > 10.0 * $log10(pk_in / rms) - 2.0) begin
      failures++;
      $display("FAIL: PAPR not reduced");
    end else n_papr++;

    // ---- 4: predistorter LUT 0.5, pre-equalizer 0.25; correlator on the main loop ----
    for (int s = 0; s < STAGES; s++) cfr_thresh[s] = 16'hFFFF;
    set_lut(8192, 0);
    set_eq(4096, 0);
    pd_bypass = 0;
    corr_sel = 0;
    play(LEN + 2 * LATD, 2 * LATD);
    begin
      int bad;
      bad = 0;
      for (int v = 2 * LATD; v < nd; v++) begin
        real ei, eq;
        int cur_i, cur_q, prv_i, prv_q;
        cur_i = played_i(v);     cur_q = played_q(v);
        prv_i = played_i(v - 1); prv_q = played_q(v - 1);
        ei = (0.5 * cur_i + 0.125 * prv_i) / 4.0;
        eq = (0.5 * cur_q + 0.125 * prv_q) / 4.0;
        checks++;
        if ((di[v] - ei) > 1.0 || (ei - di[v]) > 1.0 || (dq[v] - eq) > 1.0 || (eq - dq[v]) > 1.0) begin
          bad++;
          failures++;
          if (bad < 5) $display("FAIL pd v=%0d dac=(%0d,%0d) exp=(%f,%f)", v, di[v], dq[v], ei, eq);
        end else n_pd++;
      end
    end
    wait_corr(PA_DLY + 1, "main loop", n_corr_bb);

    // ---- 5: RF predistorter, exact words; correlator on its main path ----
    begin
      int fi [N], fq [N], ui [1400], uq [1400], mm [1400];
      for (int a = 0; a < N; a++) begin
        fi[a] = 12000 + 40 * a;
        fq[a] = -6000 + 30 * a;
        rf_lut_we = 1; rf_lut_addr = 8'(a); rf_lut_data = '{i: s16_t'(fi[a]), q: s16_t'(fq[a])};
        @(posedge clk);
        #1;
      end
      rf_lut_we = 0;
      rf_main_coarse = 6'(RF_MC);
      rf_coef_coarse = 6'(RF_CC);
      rf_main_frac   = 4'd0;
      corr_sel = 1;
      rf_ce = 1;
      for (int n = 0; n < 1400; n++) begin
        int e;
        ui[n] = int'($signed(16'($urandom))) / 2;
        uq[n] = int'($signed(16'($urandom))) / 2;
        e = isqrt(longint'(ui[n]) * ui[n] + longint'(uq[n]) * uq[n]);
        mm[n] = (e * N + 16384) / 32768;
        if (mm[n] > N - 1) mm[n] = N - 1;
        rf_u = '{i: s16_t'(ui[n]), q: s16_t'(uq[n])};
        corr_start = (n == 100);
        @(posedge clk);
        #1;
        corr_start = 0;
        if (n >= 60) begin
          int jm, jc;
          jm = n - RF_MC - 2;
          jc = n - RF_CC - 3;
          checks += 2;
          if (int'(rf_main_dac_i) != rnd14(ui[jm]) || int'(rf_main_dac_q) != rnd14(uq[jm])) begin
            failures++;
            $display("FAIL rf main n=%0d", n);
          end else n_rf_main++;
          if (int'(rf_coef_dac_i) != rnd8(fi[mm[jc]]) || int'(rf_coef_dac_q) != rnd8(fq[mm[jc]])) begin
            failures++;
            $display("FAIL rf coef n=%0d", n);
          end else n_rf_coef++;
        end
      end
      rf_ce = 0;
      wait_corr(RF_DLY + RF_MC + 3, "RF main path", n_corr_rf);
    end

    // ---- 6: RF predistorter fractional delay ----
    rf_main_coarse = '0;
    rf_main_frac   = 4'd5;
    rf_ce = 1;
    for (int n = 0; n < 200; n++) begin
      rf_u = '{i: s16_t'($rtoi(20000.0 * $cos(0.2 * n))), q: s16_t'($rtoi(20000.0 * $sin(0.2 * n)))};
      @(posedge clk);
      #1;
      if (n >= 20) begin
        real ei, eq;
        ei = 20000.0 * $cos(0.2 * (n - 2.5)) / 4.0;
        eq = 20000.0 * $sin(0.2 * (n - 2.5)) / 4.0;
        checks++;
        if ((rf_main_dac_i - ei) > 2.0 || (ei - rf_main_dac_i) > 2.0 ||
            (rf_main_dac_q - eq) > 2.0 || (eq - rf_main_dac_q) > 2.0) begin
          failures++;
          $display("FAIL rf frac n=%0d", n);
        end else n_rf_frac++;
      end
    end
    rf_ce = 0;

    // ---- mechanism coverage ----
    $display("wraps %0d, exact bypass %0d, exact unity LUT %0d, LUT saturations %0d, clips %0d/%0d/%0d",
             n_wrap, n_exact_byp, n_exact_lut, n_sat, n_clip[0], n_clip[1], n_clip[2]);
    $display("PAPR %0d, predistorted %0d, correlations %0d/%0d (fine %0d), RF main %0d, RF coef %0d, RF frac %0d",
             n_papr, n_pd, n_corr_bb, n_corr_rf, n_fine, n_rf_main, n_rf_coef, n_rf_frac);
    checks++; if (n_wrap == 0)      begin failures++; $display("FAIL: playback never wrapped"); end
    checks++; if (n_exact_byp == 0) begin failures++; $display("FAIL: no bypass samples"); end
    checks++; if (n_exact_lut == 0) begin failures++; $display("FAIL: no LUT samples"); end
    for (int s = 0; s < STAGES; s++) begin
      checks++; if (n_clip[s] == 0) begin failures++; $display("FAIL: stage %0d never clipped", s); end
    end
    checks++; if (n_papr == 0)      begin failures++; $display("FAIL: no PAPR reduction"); end
    checks++; if (n_pd == 0)        begin failures++; $display("FAIL: no predistorted samples"); end
    checks++; if (n_corr_bb == 0)   begin failures++; $display("FAIL: main loop correlation"); end
    checks++; if (n_corr_rf == 0)   begin failures++; $display("FAIL: RF correlation"); end
    checks++; if (n_fine == 0)      begin failures++; $display("FAIL: fine delay estimate"); end
    checks++; if (n_rf_main == 0 || n_rf_coef == 0 || n_rf_frac == 0) begin
      failures++; $display("FAIL: RF predistorter paths");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
