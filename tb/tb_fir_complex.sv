// tb_fir_complex: full-length (129-tap) filter with random coefficients and
// random input; every output is compared with the exact convolution
// sum h_k x(n-k), rounded to nearest and saturated, evaluated in the bench
// with 64-bit integers. Includes an impulse to check the one-sample latency
// and the tap order.
module tb_fir_complex;
  import dpd_pkg::*;

  localparam int TAPS = 129;
  localparam int NS   = 700;

  logic  clk = 0, rst_n = 0, ce = 0;
  s16_t  coef [TAPS];
  cplx_t x, y;
  int    checks = 0, failures = 0;

  fir_complex #(.TAPS(TAPS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int xi [NS], xq [NS];

  function automatic int rs(input longint v);
    longint r;
    r = (v + (64'sd1 <<< 14)) >>> 15;
    if (r > 32767) r = 32767;
    if (r < -32768) r = -32768;
    return int'(r);
  endfunction

  initial begin
    for (int k = 0; k < TAPS; k++) coef[k] = s16_t'($signed(16'($urandom)) / 64);
    for (int k = 0; k < NS; k++) begin
      xi[k] = (k == 0) ? 32767 : (k < TAPS + 2) ? 0 : int'($signed(16'($urandom)));
      xq[k] = (k == 0) ? -32768 : (k < TAPS + 2) ? 0 : int'($signed(16'($urandom)));
    end
    x = CPLX_ZERO;
    repeat (3) @(posedge clk);
    #1;
    rst_n = 1;
    ce    = 1;
    for (int k = 0; k < NS; k++) begin
      longint ri, rq;
      x = '{i: s16_t'(xi[k]), q: s16_t'(xq[k])};
      @(posedge clk);
      #1;
      ri = 0;
      rq = 0;
      for (int j = 0; j < TAPS; j++) begin
        if (k - j >= 0) begin
          ri += longint'(coef[j]) * xi[k-j];
          rq += longint'(coef[j]) * xq[k-j];
        end
      end
      checks++;
      if (int'(y.i) != rs(ri) || int'(y.q) != rs(rq)) begin
        failures++;
        if (failures < 10) $display("FAIL k=%0d y=(%0d,%0d) exp=(%0d,%0d)", k, y.i, y.q, rs(ri), rs(rq));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
