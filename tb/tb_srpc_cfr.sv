// tb_srpc_cfr: three-stage, four-carrier, 129-tap SRPC crest factor reducer
// (the default configuration) on a synthetic four-carrier signal: carriers at
// -7.5, -2.5, +2.5 and +7.5 MHz of a 61.44 Msample/s stream, each made of
// random-phase tones within +-1.5 MHz, like a four-carrier WCDMA spectrum.
// The noise shaper uses a Hamming-windowed sinc low-pass with 1.92 MHz
// cut-off on every branch.
//
// Checks:
//  1. With the threshold above every sample the cascade is an exact delay of
//     STAGES*LAT samples (bit-exact).
//  2. With the threshold at 5.0 dB above the RMS level: the output PAPR is at
//     least 2 dB below the input PAPR, the output peak is within 1.5 dB of the
//     threshold, the EVM (|z - x| relative to RMS) stays below 12 %, and the
//     cancellation energy outside the four carriers (measured by a
//     single-bin DFT at +-12.5 MHz) is small compared with in-band.
//  3. Two carriers at +-2.5 MHz with car_en = 0110 and the threshold again
//     5.0 dB above their RMS level: PAPR at least 1 dB lower, output peak
//     within 2 dB of the threshold (fewer branches leave more regrowth),
//     EVM below 12 %, and no cancellation energy at the two disabled
//     carrier frequencies (+-7.5 MHz).
module tb_srpc_cfr;
  import dpd_pkg::*;

  localparam int STAGES = 3;
  localparam int NC     = 4;
  localparam int TAPS   = 129;
  localparam int G      = (TAPS - 1) / 2;
  localparam int LAT    = 7 + G;
  localparam int TOT    = STAGES * LAT;
  localparam int NS     = 3000;
  localparam real PI    = 3.14159265358979;
  localparam real FS    = 61.44;

  logic              clk = 0, rst_n = 0, ce = 0;
  s16_t              coef   [TAPS];
  logic [31:0]       fword  [NC];
  logic [NC-1:0]     car_en;
  mag_t              thresh [STAGES];
  s16_t              alpha  [STAGES];
  cplx_t             x, z;
  logic [STAGES-1:0] clipped;
  int                checks = 0, failures = 0;

  srpc_cfr #(.STAGES(STAGES), .NC(NC), .TAPS(TAPS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int  xi [NS], xq [NS], zi [NS], zq [NS];
  real cf [NC] = '{-7.5, -2.5, 2.5, 7.5};

  task automatic run_stream();
    rst_n = 0;
    ce    = 0;
    x     = CPLX_ZERO;
    repeat (3) @(posedge clk);
    #1;
    rst_n = 1;
    ce    = 1;
    for (int k = 0; k < NS + TOT; k++) begin
      x = (k < NS) ? '{i: s16_t'(xi[k]), q: s16_t'(xq[k])} : CPLX_ZERO;
      @(posedge clk);
      #1;
      if (k >= TOT - 1 && k - (TOT - 1) < NS) begin
        zi[k-(TOT-1)] = int'($signed(z[31:16]));
        zq[k-(TOT-1)] = int'($signed(z[15:0]));
      end
    end
  endtask

  function automatic real dft_pow(input bit use_z, input real f_mhz);
    real re, im;
    re = 0.0;
    im = 0.0;
    for (int n = 200; n < NS - 200; n++) begin
      real a, vi, vq;
      a  = -2.0 * PI * f_mhz / FS * n;
      vi = use_z ? zi[n] : xi[n];
      vq = use_z ? zq[n] : xq[n];
      re += vi * $cos(a) - vq * $sin(a);
      im += vi * $sin(a) + vq * $cos(a);
    end
    return re * re + im * im;
  endfunction

  // Sum of 6 random-phase tones per carrier selected by mask; returns the
  // mean power and peak power over the analysed span.
  task automatic gen_signal(input logic [NC-1:0] mask, output real rms_o, output real pk_o);
    real ph [NC*6], fr [NC*6];
    for (int t = 0; t < NC * 6; t++) begin
      ph[t] = 2.0 * PI * ($urandom_range(0, 9999) / 10000.0);
      fr[t] = cf[t / 6] + ($urandom_range(0, 3000) / 1000.0 - 1.5);
    end
    for (int n = 0; n < NS; n++) begin
      real vi, vq;
      vi = 0.0;
      vq = 0.0;
      for (int t = 0; t < NC * 6; t++) begin
        if (mask[t/6]) begin
          vi += $cos(2.0 * PI * fr[t] / FS * n + ph[t]);
          vq += $sin(2.0 * PI * fr[t] / FS * n + ph[t]);
        end
      end
      xi[n] = $rtoi(vi * 1300.0);
      xq[n] = $rtoi(vq * 1300.0);
    end
    rms_o = 0.0;
    pk_o  = 0.0;
    for (int n = 200; n < NS - 200; n++) begin
      real m2;
      m2 = real'(xi[n]) * xi[n] + real'(xq[n]) * xq[n];
      rms_o += m2;
      if (m2 > pk_o) pk_o = m2;
    end
    rms_o = rms_o / (NS - 400);
  endtask

  // Output peak power, and error power relative to rms_i, over the span.
  task automatic measure(input real rms_i, output real pk_o, output real evm_o);
    pk_o  = 0.0;
    evm_o = 0.0;
    for (int n = 200; n < NS - 200; n++) begin
      real m2, di, dq;
      m2 = real'(zi[n]) * zi[n] + real'(zq[n]) * zq[n];
      if (m2 > pk_o) pk_o = m2;
      di = zi[n] - xi[n];
      dq = zq[n] - xq[n];
      evm_o += di * di + dq * dq;
    end
    evm_o = $sqrt(evm_o / (NS - 400) / rms_i);
  endtask

  initial begin
    real sum, fc, rms, pk_in, pk_out, papr_in, papr_out, err, oob_in, oob_out, ib;
    // ---- filter and carriers ----
    fc  = 1.92 / FS;
    sum = 0.0;
    begin
      real hr [TAPS];
      for (int k = 0; k < TAPS; k++) begin
        real t;
        t = real'(k - G);
        hr[k] = (k == G) ? 2.0 * fc : $sin(2.0 * PI * fc * t) / (PI * t);
        hr[k] = hr[k] * (0.54 - 0.46 * $cos(2.0 * PI * k / (TAPS - 1)));
        sum += hr[k];
      end
      for (int k = 0; k < TAPS; k++) coef[k] = s16_t'($rtoi(hr[k] / sum * 32768.0 + 0.5));
    end
    for (int c = 0; c < NC; c++) fword[c] = 32'($rtoi(cf[c] / FS * 4294967296.0 + (cf[c] < 0 ? 4294967296.0 : 0.0)));
    car_en = '1;
    for (int s = 0; s < STAGES; s++) alpha[s] = 16'sd6144;  // 1.5 in Q4.12

    // ---- test signal: 4 carriers x 6 tones ----
    gen_signal(4'b1111, rms, pk_in);

    // ---- 1: no clipping -> exact delay ----
    for (int s = 0; s < STAGES; s++) thresh[s] = 16'hFFFF;
    run_stream();
    begin
      int bad;
      bad = 0;
      for (int n = 0; n < NS; n++) if (zi[n] != xi[n] || zq[n] != xq[n]) bad++;
      checks++;
      if (bad != 0) begin
        failures++;
        $display("FAIL: pass-through differs in %0d samples", bad);
      end
    end

    // ---- 2: clipping at 5 dB above RMS ----
    for (int s = 0; s < STAGES; s++) thresh[s] = mag_t'($rtoi($sqrt(rms) * $pow(10.0, 5.0 / 20.0)));
    run_stream();
    measure(rms, pk_out, err);
    papr_in  = 10.0 * $log10(pk_in / rms);
    papr_out = 10.0 * $log10(pk_out / rms);
    oob_in   = dft_pow(0, 12.5) + dft_pow(0, -12.5);
    oob_out  = dft_pow(1, 12.5) + dft_pow(1, -12.5);
    ib       = dft_pow(1, cf[1]) + dft_pow(1, cf[2]);
    $display("PAPR in %0.2f dB, out %0.2f dB, threshold 5.00 dB, EVM %0.2f %%, out-of-band/in-band %e",
             papr_in, papr_out, err * 100.0, (oob_out - oob_in) / ib);
    checks++;
    if (papr_out > papr_in - 2.0) begin failures++; $display("FAIL: PAPR not reduced enough"); end
    checks++;
    if (papr_out > 6.5) begin failures++; $display("FAIL: peak more than 1.5 dB above the threshold"); end
    checks++;
    if (err > 0.12) begin failures++; $display("FAIL: EVM too large"); end
    checks++;
    if (oob_out > 1e-3 * ib + oob_in) begin failures++; $display("FAIL: cancellation leaks out of band"); end

    // ---- 3: two carriers (+-2.5 MHz), the outer branches disabled ----
    car_en = 4'b0110;
    gen_signal(4'b0110, rms, pk_in);
    for (int s = 0; s < STAGES; s++) thresh[s] = mag_t'($rtoi($sqrt(rms) * $pow(10.0, 5.0 / 20.0)));
    run_stream();
    measure(rms, pk_out, err);
    papr_in  = 10.0 * $log10(pk_in / rms);
    papr_out = 10.0 * $log10(pk_out / rms);
    oob_in   = dft_pow(0, cf[0]) + dft_pow(0, cf[3]);
    oob_out  = dft_pow(1, cf[0]) + dft_pow(1, cf[3]);
    ib       = dft_pow(1, cf[1]) + dft_pow(1, cf[2]);
    $display("two carriers: PAPR in %0.2f dB, out %0.2f dB, EVM %0.2f %%, disabled-carrier/in-band %e",
             papr_in, papr_out, err * 100.0, (oob_out - oob_in) / ib);
    checks++;
    if (papr_out > papr_in - 1.0) begin failures++; $display("FAIL: two carriers: PAPR not reduced enough"); end
    checks++;
    if (papr_out > 7.0) begin failures++; $display("FAIL: two carriers: peak more than 2.0 dB above the threshold"); end
    checks++;
    if (err > 0.12) begin failures++; $display("FAIL: two carriers: EVM too large"); end
    checks++;
    if (oob_out > 1e-3 * ib + oob_in) begin failures++; $display("FAIL: two carriers: cancellation at disabled carriers"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
