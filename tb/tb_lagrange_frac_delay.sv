// tb_lagrange_frac_delay: for every step f = 0..9 a slow complex sinusoid
// (0.03 cycles/sample) is delayed; the output must equal the sinusoid at
// time n - 1 - (1 + f/10) (one register plus the interpolator delay) within
// 6 LSB. For f = 0 the output must be exactly x(n-2). An out-of-range step
// (15) must behave as step 9.
module tb_lagrange_frac_delay;
  import dpd_pkg::*;

  localparam real PI = 3.14159265358979;
  localparam real FR = 0.03;
  localparam real A  = 20000.0;

  logic       clk = 0, rst_n = 0, ce = 0;
  logic [3:0] frac;
  cplx_t      x, y;
  int         checks = 0, failures = 0;

  lagrange_frac_delay dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int xi [400], xq [400];

  initial begin
    x    = CPLX_ZERO;
    frac = '0;
    repeat (3) @(posedge clk);
    #1;
    rst_n = 1;
    ce    = 1;
    for (int f = 0; f <= 10; f++) begin
      int  fe;
      fe   = (f == 10) ? 9 : f;
      frac = (f == 10) ? 4'd15 : 4'(f);
      for (int n = 0; n < 400; n++) begin
        xi[n] = $rtoi(A * $cos(2.0 * PI * FR * n) + 0.5);
        xq[n] = $rtoi(A * $sin(2.0 * PI * FR * n) + 0.5);
        x = '{i: s16_t'(xi[n]), q: s16_t'(xq[n])};
        @(posedge clk);
        #1;
        if (n >= 10) begin
          real t, ei, eq;
          int  gi, gq;
          gi = int'($signed(y[31:16]));
          gq = int'($signed(y[15:0]));
          t  = n - 1.0 - fe / 10.0;   // register (1) already in n; interpolator 1 + f/10
          ei = A * $cos(2.0 * PI * FR * t);
          eq = A * $sin(2.0 * PI * FR * t);
          checks++;
          if ((gi - ei) > 6.0 || (ei - gi) > 6.0 || (gq - eq) > 6.0 || (eq - gq) > 6.0 ||
              (fe == 0 && (gi != xi[n-1] || gq != xq[n-1]))) begin
            failures++;
            if (failures < 10) $display("FAIL f=%0d n=%0d y=(%0d,%0d) exp=(%f,%f)", f, n, gi, gq, ei, eq);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
