// tb_lut_indexer: sweeps the envelope over its whole range (and random
// values) and checks m = min(N-1, round(|u| * N)) with |u| = mag/32768, the
// sat flag, and the one-sample latency.
module tb_lut_indexer;
  import dpd_pkg::*;

  localparam int N  = 256;
  localparam int AW = $clog2(N);

  logic          clk = 0, rst_n = 0, ce = 0;
  mag_t          mag;
  logic [AW-1:0] m;
  logic          sat;
  int            checks = 0, failures = 0, nsat = 0;

  lut_indexer #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mag = '0;
    repeat (3) @(posedge clk);
    #1;
    rst_n = 1;
    ce    = 1;
    for (int k = 0; k < 3000; k++) begin
      int  v, e;
      real r;
      v   = (k < 2000) ? k * 24 : int'($urandom_range(0, 65535));
      mag = mag_t'(v);
      @(posedge clk);
      #1;
      r = real'(v) * N / 32768.0;
      e = $rtoi(r + 0.5);
      checks++;
      if ((e > N - 1) != sat || int'(m) != ((e > N - 1) ? N - 1 : e)) begin
        failures++;
        if (failures < 10) $display("FAIL mag=%0d m=%0d exp=%0d", v, m, e);
      end
      if (sat) nsat++;
    end
    checks++;
    if (nsat == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
