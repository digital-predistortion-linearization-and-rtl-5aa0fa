// tb_cplx_magnitude: checks |x| = floor(sqrt(I^2+Q^2)) against a reference
// computed with real arithmetic, the one-sample latency, and that x_d is the
// input delayed by one sample. Corner cases (full-scale corners, zero, axes)
// come first, then random samples.
module tb_cplx_magnitude;
  import dpd_pkg::*;

  logic  clk = 0, rst_n = 0, ce = 0;
  cplx_t x, x_d;
  mag_t  mag;
  int    checks = 0, failures = 0;

  cplx_magnitude dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_mag(input int i, input int q);
    longint p;
    int     r;
    p = longint'(i) * i + longint'(q) * q;
    r = $rtoi($sqrt(real'(p)));
    while (longint'(r) * r > p) r--;
    while (longint'(r + 1) * (r + 1) <= p) r++;
    return r;
  endfunction

  int vi [$], vq [$];

  initial begin
    vi = '{-32768, 32767, 0, 0, 12345, -32768, 1, 23170};
    vq = '{-32768, 32767, 0, -32768, 0, 5, 1, 23170};
    for (int k = 0; k < 500; k++) begin
      vi.push_back(int'($signed(16'($urandom))));
      vq.push_back(int'($signed(16'($urandom))));
    end
    x = CPLX_ZERO;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    foreach (vi[k]) begin
      x  <= '{i: s16_t'(vi[k]), q: s16_t'(vq[k])};
      ce <= 1;
      @(posedge clk);
      ce <= 0;
      #1;
      // registered one clock after the sample was presented
      checks++;
      if (int'(mag) != ref_mag(vi[k], vq[k]) || x_d.i != s16_t'(vi[k]) || x_d.q != s16_t'(vq[k])) begin
        failures++;
        if (failures < 10) $display("FAIL k=%0d x=(%0d,%0d) mag=%0d exp=%0d", k, vi[k], vq[k], mag, ref_mag(vi[k], vq[k]));
      end
      // holding ce low must keep the output
      @(posedge clk);
      #1;
      checks++;
      if (int'(mag) != ref_mag(vi[k], vq[k])) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
