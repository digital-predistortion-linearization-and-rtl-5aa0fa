// tb_piecewise_preeq: three-tap version (two stored taps per piece) with 16
// pieces, random taps and a random piece index per sample. Checks
//   z(n) = x(n) + W_1^{m(n)} x(n-1) + W_2^{m(n)} x(n-2)
// (real-arithmetic reference, 2 LSB tolerance for the per-product rounding),
// the 2-sample latency, and bypass (z = x exactly).
module tb_piecewise_preeq;
  import dpd_pkg::*;

  localparam int K  = 3;
  localparam int N  = 16;
  localparam int AW = $clog2(N);
  localparam int TW = 2;
  localparam int NS = 1500;

  logic          clk = 0, rst_n = 0, ce = 0, bypass = 0, we = 0;
  logic [AW-1:0] waddr, m;
  logic [TW-1:0] wtap;
  coef_t         wdata;
  cplx_t         x, z;
  int            checks = 0, failures = 0;

  piecewise_preeq #(.K(K), .N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int xi [NS], xq [NS], mm [NS], byp [NS];
  int wi [K][N], wq [K][N];

  initial begin
    x = CPLX_ZERO;
    m = '0;
    waddr = '0;
    wtap = '0;
    wdata = '0;
    repeat (3) @(posedge clk);
    #1;
    rst_n = 1;
    for (int k = 1; k < K; k++) begin
      for (int a = 0; a < N; a++) begin
        wi[k][a] = int'($signed(16'($urandom))) / 8;
        wq[k][a] = int'($signed(16'($urandom))) / 8;
        we    = 1;
        waddr = AW'(a);
        wtap  = TW'(k);
        wdata = '{i: s16_t'(wi[k][a]), q: s16_t'(wq[k][a])};
        @(posedge clk);
        #1;
      end
    end
    we = 0;
    for (int n = 0; n < NS; n++) begin
      xi[n]  = int'($signed(16'($urandom))) / 4;
      xq[n]  = int'($signed(16'($urandom))) / 4;
      mm[n]  = $urandom_range(0, N - 1);
      byp[n] = (n >= 1000 && n < 1200);
    end
    ce = 1;
    for (int k = 0; k < NS + 2; k++) begin
      x      = (k < NS) ? '{i: s16_t'(xi[k]), q: s16_t'(xq[k])} : CPLX_ZERO;
      m      = (k < NS) ? AW'(mm[k]) : '0;
      // bypass is applied at the output register, one sample after entry
      bypass = (k >= 1 && byp[k-1] != 0);
      @(posedge clk);
      #1;
      if (k >= 1 && k - 1 < NS) begin
        int  n, gi, gq;
        real ei, eq;
        n  = k - 1;
        ei = xi[n];
        eq = xq[n];
        if (!byp[n]) begin
          for (int t = 1; t < K; t++) begin
            if (n - t >= 0) begin
              ei += (real'(wi[t][mm[n]]) * xi[n-t] - real'(wq[t][mm[n]]) * xq[n-t]) / 16384.0;
              eq += (real'(wi[t][mm[n]]) * xq[n-t] + real'(wq[t][mm[n]]) * xi[n-t]) / 16384.0;
            end
          end
        end
        gi = int'($signed(z[31:16]));
        gq = int'($signed(z[15:0]));
        checks++;
        if ((gi - ei) > 2.0 || (ei - gi) > 2.0 || (gq - eq) > 2.0 || (eq - gq) > 2.0) begin
          failures++;
          if (failures < 10) $display("FAIL n=%0d z=(%0d,%0d) exp=(%f,%f)", n, gi, gq, ei, eq);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
