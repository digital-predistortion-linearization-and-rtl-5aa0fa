// tb_noise_shaper: two carrier branches (one at a positive, one at a
// negative offset) with a 9-tap random filter. Each output is compared with
// the band-pass model pf(n) = sum_c en_c sum_k h_k p(n-k) exp(j w_c (k-G))
// evaluated in real arithmetic (tolerance 6 LSB for the rounding of the
// three multiply stages). The carrier frequencies sit on exact table
// phases so that the comparison isolates the datapath. A second pass with one
// branch disabled checks the carrier enable; the 4-sample latency is part of
// every comparison.
module tb_noise_shaper;
  import dpd_pkg::*;

  localparam int NC   = 2;
  localparam int TAPS = 9;
  localparam int NS   = 400;
  localparam int LAT  = 4;

  logic          clk = 0, rst_n = 0, ce = 0;
  s16_t          coef  [TAPS];
  logic [31:0]   fword [NC];
  logic [NC-1:0] car_en;
  cplx_t         p, pf;
  int            checks = 0, failures = 0;

  noise_shaper #(.NC(NC), .TAPS(TAPS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int  pi_ [NS], pq_ [NS];
  real w [NC];

  initial begin
    fword[0] = 32'd40 << 22;
    fword[1] = (32'd1024 - 32'd100) << 22;
    w[0] = 2.0 * 3.14159265358979 * 40.0 / 1024.0;
    w[1] = 2.0 * 3.14159265358979 * (924.0) / 1024.0;
    for (int k = 0; k < TAPS; k++) coef[k] = s16_t'($signed(16'($urandom)) / 8);
    for (int pass = 0; pass < 2; pass++) begin
      car_en = (pass == 0) ? 2'b11 : 2'b01;
      for (int k = 0; k < NS; k++) begin
        pi_[k] = int'($signed(16'($urandom))) / 4;
        pq_[k] = int'($signed(16'($urandom))) / 4;
      end
      rst_n = 0;
      ce    = 0;
      p     = CPLX_ZERO;
      repeat (3) @(posedge clk);
      #1;
      rst_n = 1;
      ce    = 1;
      for (int k = 0; k < NS + LAT; k++) begin
        p = (k < NS) ? '{i: s16_t'(pi_[k]), q: s16_t'(pq_[k])} : CPLX_ZERO;
        @(posedge clk);
        #1;
        if (k >= LAT - 1) begin
          int  n, gi, gq;
          real ei, eq;
          n  = k - (LAT - 1);
          ei = 0.0;
          eq = 0.0;
          for (int c = 0; c < NC; c++) begin
            if (car_en[c]) begin
              for (int j = 0; j < TAPS; j++) begin
                if (n - j >= 0) begin
                  real h, a, b;
                  h  = real'(coef[j]) / 32768.0;
                  a  = $cos(w[c] * (j - (TAPS - 1) / 2));
                  b  = $sin(w[c] * (j - (TAPS - 1) / 2));
                  ei += h * (pi_[n-j] * a - pq_[n-j] * b);
                  eq += h * (pi_[n-j] * b + pq_[n-j] * a);
                end
              end
            end
          end
          gi = int'($signed(pf[31:16]));
          gq = int'($signed(pf[15:0]));
          checks++;
          if ((gi - ei) > 6.0 || (ei - gi) > 6.0 || (gq - eq) > 6.0 || (eq - gq) > 6.0) begin
            failures++;
            if (failures < 10) $display("FAIL pass=%0d n=%0d pf=(%0d,%0d) exp=(%f,%f)", pass, n, gi, gq, ei, eq);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
