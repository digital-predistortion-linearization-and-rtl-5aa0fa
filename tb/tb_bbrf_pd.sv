// tb_bbrf_pd: baseband-derived RF predistorter with its default 256-entry
// table loaded with a known function, F_m = (0.8 + 0.6 m/N) exp(j m/N).
// For several coarse delay settings of the two paths (fractional step 0):
//   main DAC  = u(n - main_coarse - 3) rounded to 14 bits (exact), and
//   coef DACs = F_{m(u(n - coef_coarse - 4))} rounded to 8 bits (exact),
// with m = round(|u| N) from an exact integer square root. A final run with
// fractional step 5 on a slow sinusoid checks the half-sample main path
// delay (to 2 LSB of the 14-bit DAC).
module tb_bbrf_pd;
  import dpd_pkg::*;

  localparam int N   = 256;
  localparam int AW  = $clog2(N);
  localparam int MC  = 32;
  localparam int DLW = $clog2(MC + 1);
  localparam int NS  = 600;

  logic                clk = 0, rst_n = 0, ce = 0, lut_we = 0;
  logic [AW-1:0]       lut_addr;
  coef_t               lut_data;
  logic [DLW-1:0]      main_coarse, coef_coarse;
  logic [3:0]          main_frac;
  cplx_t               u;
  logic signed [13:0]  main_dac_i, main_dac_q;
  logic signed [7:0]   coef_dac_i, coef_dac_q;
  int                  checks = 0, failures = 0;

  bbrf_pd dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int fi [N], fq [N], ui [NS], uq [NS], mm [NS];

  function automatic int isqrt(input longint p);
    int r;
    r = $rtoi($sqrt(real'(p)));
    while (longint'(r) * r > p) r--;
    while (longint'(r + 1) * (r + 1) <= p) r++;
    return r;
  endfunction

  function automatic int rnd(input int v, input int w);  // round Q1.15 to w bits
    int r;
    r = (v + (1 <<< (15 - w))) >>> (16 - w);
    if (r > (1 <<< (w - 1)) - 1) r = (1 <<< (w - 1)) - 1;
    if (r < -(1 <<< (w - 1))) r = -(1 <<< (w - 1));
    return r;
  endfunction

  int mcs [4] = '{0, 5, 17, 32};
  int ccs [4] = '{0, 9, 2, 31};

  initial begin
    u = CPLX_ZERO;
    lut_addr = '0; lut_data = '0;
    main_coarse = '0; coef_coarse = '0; main_frac = '0;
    repeat (3) @(posedge clk);
    #1;
    rst_n = 1;
    for (int a = 0; a < N; a++) begin
      real g, ph;
      g  = 0.8 + 0.6 * a / N;
      ph = 1.0 * a / N;
      fi[a] = $rtoi(g * $cos(ph) * 16384.0);
      fq[a] = $rtoi(g * $sin(ph) * 16384.0);
      lut_we = 1; lut_addr = AW'(a); lut_data = '{i: s16_t'(fi[a]), q: s16_t'(fq[a])};
      @(posedge clk);
      #1;
    end
    lut_we = 0;
    for (int t = 0; t < 4; t++) begin
      main_coarse = DLW'(mcs[t]);
      coef_coarse = DLW'(ccs[t]);
      ce = 1;
      for (int n = 0; n < NS; n++) begin
        int e;
        ui[n] = int'($signed(16'($urandom))) / 2;
        uq[n] = int'($signed(16'($urandom))) / 2;
        e = isqrt(longint'(ui[n]) * ui[n] + longint'(uq[n]) * uq[n]);
        mm[n] = (e * N + 16384) / 32768;
        if (mm[n] > N - 1) mm[n] = N - 1;
        u = '{i: s16_t'(ui[n]), q: s16_t'(uq[n])};
        @(posedge clk);
        #1;
        if (n >= 40) begin
          int jm, jc;
          jm = n - mcs[t] - 2;   // output after this edge: 3 registers incl. this one
          jc = n - ccs[t] - 3;
          checks++;
          if (int'(main_dac_i) != rnd(ui[jm], 14) || int'(main_dac_q) != rnd(uq[jm], 14) ||
              int'(coef_dac_i) != rnd(fi[mm[jc]], 8) || int'(coef_dac_q) != rnd(fq[mm[jc]], 8)) begin
            failures++;
            if (failures < 10) $display("FAIL t=%0d n=%0d main=(%0d,%0d) exp=(%0d,%0d) coef=(%0d,%0d) exp=(%0d,%0d)",
              t, n, main_dac_i, main_dac_q, rnd(ui[jm], 14), rnd(uq[jm], 14),
              coef_dac_i, coef_dac_q, rnd(fi[mm[jc]], 8), rnd(fq[mm[jc]], 8));
          end
        end
      end
    end
    // fractional step 5 on a slow sinusoid: main delay 3.5 samples
    main_coarse = '0;
    main_frac   = 4'd5;
    for (int n = 0; n < 300; n++) begin
      u = '{i: s16_t'($rtoi(20000.0 * $cos(0.2 * n))), q: s16_t'($rtoi(20000.0 * $sin(0.2 * n)))};
      @(posedge clk);
      #1;
      if (n >= 20) begin
        real ei, eq;
        ei = 20000.0 * $cos(0.2 * (n - 2.5)) / 4.0;
        eq = 20000.0 * $sin(0.2 * (n - 2.5)) / 4.0;
        checks++;
        if ((main_dac_i - ei) > 2.0 || (ei - main_dac_i) > 2.0 || (main_dac_q - eq) > 2.0 || (eq - main_dac_q) > 2.0) begin
          failures++;
          if (failures < 10) $display("FAIL frac n=%0d got=(%0d,%0d) exp=(%f,%f)", n, main_dac_i, main_dac_q, ei, eq);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
