// tb_nco: for several frequency words, checks the phasor at sample n against
// cos/sin(2*pi*(fword*n + phase_off)/2^32) computed in real arithmetic. The table index
// truncates the phase to 10 bits, so the tolerance is the slope bound
// 2*pi/1024*32767 (about 202 LSB) plus rounding; the unit magnitude is
// checked to 0.2 %.
module tb_nco;
  import dpd_pkg::*;

  logic        clk = 0, rst_n = 0, ce = 0;
  logic [31:0] fword, phase_off;
  cplx_t       phasor;
  int          checks = 0, failures = 0;

  nco dut (.*);

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint fw [4] = '{32'h0, 32'h0A3D_70A4, 32'hF000_0000, 32'h1234_5678};

  initial begin
    for (int t = 0; t < 4; t++) begin
      rst_n = 0;
      ce    = 0;
      fword = 32'(fw[t]);
      phase_off = 32'(t) * 32'h2345_6789;
      repeat (2) @(posedge clk);
      #1;
      rst_n = 1;
      ce    = 1;
      for (int n = 0; n < 300; n++) begin
        real ph, ec, es, mg;
        int  gi, gq;
        @(posedge clk);
        #1;
        // after the (n+1)-th enabled edge the phasor is for sample n+1
        ph = 2.0 * 3.14159265358979 * real'((longint'(n + 1) * fw[t] + longint'(t) * 64'h2345_6789) % 64'h1_0000_0000) / 4294967296.0;
        ec = $cos(ph) * 32767.0;
        es = $sin(ph) * 32767.0;
        gi = int'($signed(phasor[31:16]));
        gq = int'($signed(phasor[15:0]));
        mg = $sqrt(real'(gi) * gi + real'(gq) * gq);
        checks++;
        if ((gi - ec) > 210.0 || (ec - gi) > 210.0 ||
            (gq - es) > 210.0 || (es - gq) > 210.0 ||
            mg > 32767.0 * 1.002 || mg < 32767.0 * 0.998) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d n=%0d got=(%0d,%0d) exp=(%f,%f)", t, n, gi, gq, ec, es);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
