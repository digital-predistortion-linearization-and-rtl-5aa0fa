// tb_cfr_clipper: drives a stream with ce held high and checks that the
// pulse two samples later equals x - x*A/|x| (reference in real arithmetic,
// tolerance 2 LSB for the integer square root and truncating divide) when
// |x| > A and is exactly zero otherwise; also checks the clipped flag.
module tb_cfr_clipper;
  import dpd_pkg::*;

  logic  clk = 0, rst_n = 0, ce = 0;
  cplx_t x, p;
  mag_t  thresh;
  logic  clipped;
  int    checks = 0, failures = 0, nclip = 0;

  cfr_clipper dut (.*);

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NS = 600;
  int xi [NS], xq [NS];

  initial begin
    thresh = mag_t'(16000);
    for (int k = 0; k < NS; k++) begin
      xi[k] = int'($signed(16'($urandom))) / ((k % 3) + 1);
      xq[k] = int'($signed(16'($urandom))) / ((k % 3) + 1);
    end
    x = CPLX_ZERO;
    repeat (3) @(posedge clk);
    #1;
    rst_n = 1;
    ce    = 1;
    for (int k = 0; k < NS + 1; k++) begin
      x <= (k < NS) ? '{i: s16_t'(xi[k]), q: s16_t'(xq[k])} : CPLX_ZERO;
      @(posedge clk);
      #1;
      if (k >= 1) begin
        int   j, gi, gq;
        real  m, ei, eq;
        logic over;
        j    = k - 1;
        m    = $sqrt(real'(xi[j]) * xi[j] + real'(xq[j]) * xq[j]);
        over = m >= 16001.0;
        ei   = over ? xi[j] * (1.0 - 16000.0 / m) : 0.0;
        eq   = over ? xq[j] * (1.0 - 16000.0 / m) : 0.0;
        if (m > 16000.0 && m < 16001.0) continue;  // floor(sqrt) boundary
        gi = int'($signed(p[31:16]));
        gq = int'($signed(p[15:0]));
        checks++;
        if (over) nclip++;
        if (clipped !== over || (gi - ei) > 2.0 || (ei - gi) > 2.0 ||
            (gq - eq) > 2.0 || (eq - gq) > 2.0) begin
          failures++;
          if (failures < 10) $display("FAIL j=%0d x=(%0d,%0d) p=(%0d,%0d) exp=(%f,%f)", j, xi[j], xq[j], gi, gq, ei, eq);
        end
      end
    end
    checks++;
    if (nclip < 50 || nclip > NS - 50) begin
      failures++;
      $display("FAIL: clipping not exercised both ways (%0d)", nclip);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
