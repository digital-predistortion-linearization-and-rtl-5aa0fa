// tb_pwpe_lut_pd: full-size predistorter (256-entry LUT, 2-tap pre-equalizer)
// loaded with a smooth AM/AM-AM/PM correction
//   F_m = (1 + 0.3 m/N) exp(j 0.4 m/N),  W_1^m = 0.15 (m/N) exp(-j 0.7)
// and driven with random samples, some beyond full scale. The reference
// computes the envelope (exact integer square root), the index round(|u| N)
// clamped to N-1, x(n) = u(n) F_m and z(n) = x(n) + W_1^{m(n)} x(n-1) in real
// arithmetic from the loaded integer coefficients (3 LSB tolerance), with the
// 6-sample latency. Also checks the aligned x/m outputs, bypass, and the
// index saturation flag.
module tb_pwpe_lut_pd;
  import dpd_pkg::*;

  localparam int N   = 256;
  localparam int K   = 2;
  localparam int AW  = $clog2(N);
  localparam int LAT = 6;
  localparam int NS  = 3000;

  logic          clk = 0, rst_n = 0, ce = 0, bypass = 0;
  logic          lut_we = 0, eq_we = 0;
  logic [AW-1:0] lut_addr, eq_addr, m_out;
  logic [0:0]    eq_tap;
  coef_t         lut_data, eq_data;
  cplx_t         u, z, x_out;
  logic          sat;
  int            checks = 0, failures = 0, nsat = 0;

  pwpe_lut_pd #(.N(N), .K(K)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int fi [N], fq [N], wi [N], wq [N];
  int ui [NS], uq [NS], mm [NS];
  real xr [NS], xim [NS];

  function automatic int isqrt(input longint p);
    int r;
    r = $rtoi($sqrt(real'(p)));
    while (longint'(r) * r > p) r--;
    while (longint'(r + 1) * (r + 1) <= p) r++;
    return r;
  endfunction

  initial begin
    u = CPLX_ZERO;
    lut_addr = '0; eq_addr = '0; eq_tap = '0; lut_data = '0; eq_data = '0;
    repeat (3) @(posedge clk);
    #1;
    rst_n = 1;
    // check the reset state: unity LUT, zero taps -> z = u delayed
    ce = 1;
    for (int k = 0; k < 40; k++) begin
      u = '{i: s16_t'($urandom_range(0, 20000)), q: s16_t'(-$urandom_range(0, 20000))};
      ui[k] = int'(u.i);
      uq[k] = int'(u.q);
      @(posedge clk);
      #1;
      if (k >= LAT - 1) begin
        checks++;
        if (int'($signed(z[31:16])) != ui[k-LAT+1] || int'($signed(z[15:0])) != uq[k-LAT+1]) begin
          failures++;
          $display("FAIL reset identity k=%0d", k);
        end
      end
    end
    ce = 0;
    // load tables
    for (int a = 0; a < N; a++) begin
      real g, ph;
      g  = 1.0 + 0.3 * a / N;
      ph = 0.4 * a / N;
      fi[a] = $rtoi(g * $cos(ph) * 16384.0);
      fq[a] = $rtoi(g * $sin(ph) * 16384.0);
      wi[a] = $rtoi(0.15 * a / N * $cos(-0.7) * 16384.0);
      wq[a] = $rtoi(0.15 * a / N * $sin(-0.7) * 16384.0);
      lut_we = 1; lut_addr = AW'(a); lut_data = '{i: s16_t'(fi[a]), q: s16_t'(fq[a])};
      eq_we  = 1; eq_tap = 1'b1; eq_addr  = AW'(a); eq_data  = '{i: s16_t'(wi[a]), q: s16_t'(wq[a])};
      @(posedge clk);
      #1;
    end
    lut_we = 0;
    eq_we  = 0;
    for (int n = 0; n < NS; n++) begin
      int e;
      if (n % 10 == 0) begin
        ui[n] = int'($signed(16'($urandom)));
        uq[n] = int'($signed(16'($urandom)));
      end else begin
        ui[n] = int'($signed(16'($urandom))) / 3;
        uq[n] = int'($signed(16'($urandom))) / 3;
      end
      e = isqrt(longint'(ui[n]) * ui[n] + longint'(uq[n]) * uq[n]);
      mm[n] = (e * N + 16384) / 32768;
      if (mm[n] > N - 1) mm[n] = N - 1;
      xr[n]  = (real'(ui[n]) * fi[mm[n]] - real'(uq[n]) * fq[mm[n]]) / 16384.0;
      xim[n] = (real'(ui[n]) * fq[mm[n]] + real'(uq[n]) * fi[mm[n]]) / 16384.0;
    end
    ce = 1;
    for (int k = 0; k < NS + LAT; k++) begin
      u = (k < NS) ? '{i: s16_t'(ui[k]), q: s16_t'(uq[k])} : CPLX_ZERO;
      // bypass acts at the equalizer output register (last pipeline stage)
      bypass = (k - (LAT - 1) >= 2000 && k - (LAT - 1) < 2300);
      @(posedge clk);
      #1;
      if (k >= LAT && k - (LAT - 1) < NS) begin  // n = 0 follows the identity run; skipped
        int  n, gi, gq, gx;
        real ei, eq, xi_, xq_;
        n   = k - (LAT - 1);
        xi_ = (xr[n] > 32767.0) ? 32767.0 : (xr[n] < -32768.0) ? -32768.0 : xr[n];
        xq_ = (xim[n] > 32767.0) ? 32767.0 : (xim[n] < -32768.0) ? -32768.0 : xim[n];
        ei  = xi_;
        eq  = xq_;
        if (n >= 1 && !(n >= 2000 && n < 2300)) begin
          real pi_, pq_;
          pi_ = (xr[n-1] > 32767.0) ? 32767.0 : (xr[n-1] < -32768.0) ? -32768.0 : xr[n-1];
          pq_ = (xim[n-1] > 32767.0) ? 32767.0 : (xim[n-1] < -32768.0) ? -32768.0 : xim[n-1];
          ei += (wi[mm[n]] * pi_ - wq[mm[n]] * pq_) / 16384.0;
          eq += (wi[mm[n]] * pq_ + wq[mm[n]] * pi_) / 16384.0;
        end
        if (ei > 32767.0) ei = 32767.0;
        if (ei < -32768.0) ei = -32768.0;
        if (eq > 32767.0) eq = 32767.0;
        if (eq < -32768.0) eq = -32768.0;
        gi = int'($signed(z[31:16]));
        gq = int'($signed(z[15:0]));
        gx = int'($signed(x_out[31:16]));
        checks++;
        if ((gi - ei) > 3.0 || (ei - gi) > 3.0 || (gq - eq) > 3.0 || (eq - gq) > 3.0 ||
            int'(m_out) != mm[n] ||
            (gx - xi_) > 1.0 || (xi_ - gx) > 1.0) begin
          failures++;
          if (failures < 10) $display("FAIL n=%0d z=(%0d,%0d) exp=(%f,%f) m=%0d/%0d", n, gi, gq, ei, eq, m_out, mm[n]);
        end
        if (sat) nsat++;
      end
    end
    checks++;
    if (nsat == 0) begin
      failures++;
      $display("FAIL: index saturation never seen");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
