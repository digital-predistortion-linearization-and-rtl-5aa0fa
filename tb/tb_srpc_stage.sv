// tb_srpc_stage: one peak-cancellation stage (single carrier at 0 Hz, 9-tap
// windowed-sinc low-pass, alpha = 1.5) against a real-arithmetic model of
//   z(n) = x(n) - alpha * sum_j h_j p(n + G - j),  G = (TAPS-1)/2
//   p(n) = x(n) (1 - A/|x(n)|) for |x(n)| > A, else 0
// including the latency LAT = 7 + G. Tolerance 10 LSB covers the integer
// square root, truncating divide and three rounding stages.
module tb_srpc_stage;
  import dpd_pkg::*;

  localparam int NC   = 1;
  localparam int TAPS = 9;
  localparam int G    = (TAPS - 1) / 2;
  localparam int LAT  = 7 + G;
  localparam int NS   = 800;

  logic          clk = 0, rst_n = 0, ce = 0;
  s16_t          coef  [TAPS];
  logic [31:0]   fword [NC];
  logic [NC-1:0] car_en;
  mag_t          thresh;
  s16_t          alpha;
  cplx_t         x, z;
  logic          clipped;
  int            checks = 0, failures = 0, nclip = 0;

  srpc_stage #(.NC(NC), .TAPS(TAPS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int  xi [NS], xq [NS];
  real pi_ [NS], pq_ [NS];
  real hr [TAPS];

  initial begin
    real sum;
    sum = 0.0;
    for (int k = 0; k < TAPS; k++) begin
      real t;
      t = real'(k - G);
      hr[k] = (k == G) ? 0.5 : $sin(3.14159265358979 * 0.5 * t) / (3.14159265358979 * t);
      hr[k] = hr[k] * (0.54 - 0.46 * $cos(2.0 * 3.14159265358979 * k / (TAPS - 1)));
      sum += hr[k];
    end
    for (int k = 0; k < TAPS; k++) begin
      coef[k] = s16_t'($rtoi(hr[k] / sum * 32768.0));
      hr[k]   = real'(coef[k]) / 32768.0;
    end
    fword[0] = '0;
    car_en   = 1'b1;
    thresh   = 16'd12000;
    alpha    = 16'sd6144;
    for (int k = 0; k < NS; k++) begin
      real m;
      xi[k] = int'($signed(16'($urandom))) / 2;
      xq[k] = int'($signed(16'($urandom))) / 2;
      m = $sqrt(real'(xi[k]) * xi[k] + real'(xq[k]) * xq[k]);
      pi_[k] = (m > 12000.0) ? xi[k] * (1.0 - 12000.0 / m) : 0.0;
      pq_[k] = (m > 12000.0) ? xq[k] * (1.0 - 12000.0 / m) : 0.0;
      if (m > 12000.0) nclip++;
    end
    x = CPLX_ZERO;
    repeat (3) @(posedge clk);
    #1;
    rst_n = 1;
    ce    = 1;
    for (int k = 0; k < NS + LAT; k++) begin
      x = (k < NS) ? '{i: s16_t'(xi[k]), q: s16_t'(xq[k])} : CPLX_ZERO;
      @(posedge clk);
      #1;
      if (k >= LAT - 1 && k - (LAT - 1) < NS) begin
        int  n, gi, gq;
        real fi, fq, ei, eq;
        n  = k - (LAT - 1);
        fi = 0.0;
        fq = 0.0;
        for (int j = 0; j < TAPS; j++) begin
          if (n + G - j >= 0 && n + G - j < NS) begin
            fi += hr[j] * pi_[n+G-j];
            fq += hr[j] * pq_[n+G-j];
          end
        end
        ei = xi[n] - 1.5 * fi;
        eq = xq[n] - 1.5 * fq;
        gi = int'($signed(z[31:16]));
        gq = int'($signed(z[15:0]));
        checks++;
        if ((gi - ei) > 10.0 || (ei - gi) > 10.0 || (gq - eq) > 10.0 || (eq - gq) > 10.0) begin
          failures++;
          if (failures < 10) $display("FAIL n=%0d z=(%0d,%0d) exp=(%f,%f)", n, gi, gq, ei, eq);
        end
      end
    end
    checks++;
    if (nclip < 20) begin
      failures++;
      $display("FAIL: too few clipped samples (%0d)", nclip);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
