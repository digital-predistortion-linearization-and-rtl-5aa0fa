// tb_delay_correlator: the reference is a random complex stream; the
// feedback is the same stream delayed by D samples, rotated by a fixed
// phase, attenuated to 12-bit ADC precision and with added noise, as a PA
// loop would return it. For D = 13, 0 and 31 the reported lag must equal D
// and the fine estimate 10*D. Two fractional delays, 13.4 and 7.7 samples,
// use a band-limited reference (five tones within +-0.12 cycles/sample,
// delayed analytically): the fine estimate must be within 0.1 sample.
// Also checks the search time: done must come exactly
// 1 + (BLOCK+MAXLAG-1) + MAXLAG*(BLOCK+1) + 2*STEPS clocks after start
// (ce held high).
module tb_delay_correlator;
  import dpd_pkg::*;

  localparam int BLOCK  = 256;
  localparam int MAXLAG = 32;
  localparam int LW     = $clog2(MAXLAG);
  localparam int STEPS  = 10;
  localparam int FLW    = $clog2(STEPS * MAXLAG);

  logic          clk = 0, rst_n = 0, ce = 0, start = 0;
  cplx_t         ref_x, fb_y;
  logic          busy, done;
  logic [LW-1:0] lag;
  logic [63:0]   peak;
  logic [FLW-1:0] lag_fine;
  int            checks = 0, failures = 0;

  delay_correlator #(.BLOCK(BLOCK), .MAXLAG(MAXLAG)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int  dt [5] = '{130, 0, 310, 134, 77};   // delay in tenths of a sample
  real tf [5], tp [5];
  int hi [$], hq [$];

  initial begin
    ref_x = CPLX_ZERO;
    fb_y  = CPLX_ZERO;
    repeat (3) @(posedge clk);
    #1;
    rst_n = 1;
    ce    = 1;
    for (int t = 0; t < 5; t++) begin
      int cyc;
      bit tone;
      tone = (dt[t] % 10) != 0;
      for (int k = 0; k < 5; k++) begin
        int u;
        u     = $urandom_range(0, 2400);
        tf[k] = (u - 1200) / 10000.0;
        tp[k] = $urandom_range(0, 6283) / 1000.0;
      end
      hi.delete();
      hq.delete();
      for (int k = 0; k < 64; k++) begin hi.push_front(0); hq.push_front(0); end
      start = 1;
      cyc   = 0;
      while (!done) begin
        int ri, rq, di, dq;
        real c, s;
        if (tone) begin
          real vi, vq, wi, wq;
          vi = 0.0; vq = 0.0; wi = 0.0; wq = 0.0;
          for (int k = 0; k < 5; k++) begin
            vi += 3000.0 * $cos(6.2831853 * tf[k] * cyc + tp[k]);
            vq += 3000.0 * $sin(6.2831853 * tf[k] * cyc + tp[k]);
            wi += 3000.0 * $cos(6.2831853 * tf[k] * (cyc - dt[t] / 10.0) + tp[k]);
            wq += 3000.0 * $sin(6.2831853 * tf[k] * (cyc - dt[t] / 10.0) + tp[k]);
          end
          ri = $rtoi(vi);
          rq = $rtoi(vq);
          di = $rtoi(wi);
          dq = $rtoi(wq);
        end else begin
          ri = int'($signed(16'($urandom))) / 2;
          rq = int'($signed(16'($urandom))) / 2;
        end
        ref_x = '{i: s16_t'(ri), q: s16_t'(rq)};
        hi.push_front(ri);
        hq.push_front(rq);
        if (!tone) begin
          di = hi[dt[t] / 10];
          dq = hq[dt[t] / 10];
        end
        c = $cos(1.1 + t);
        s = $sin(1.1 + t);
        // rotate, scale by 0.6, keep 12 bits, add noise
        fb_y = '{i: s16_t'(($rtoi(0.6 * (di * c - dq * s)) & ~15) + $urandom_range(0, 400) - 200),
                 q: s16_t'(($rtoi(0.6 * (di * s + dq * c)) & ~15) + $urandom_range(0, 400) - 200)};
        void'(hi.pop_back());
        void'(hq.pop_back());
        @(posedge clk);
        #1;
        start = 0;
        cyc++;
        if (cyc > 200000) break;
      end
      $display("delay %0d/10: lag %0d, fine %0d/10", dt[t], lag, lag_fine);
      checks++;
      if (tone ? (int'(lag) != dt[t] / 10 && int'(lag) != dt[t] / 10 + 1) : int'(lag) != dt[t] / 10) begin
        failures++;
        $display("FAIL: delay %0d/10 estimated as %0d", dt[t], lag);
      end
      checks++;
      if (int'(lag_fine) > dt[t] + 1 || int'(lag_fine) < dt[t] - 1 || (!tone && int'(lag_fine) != dt[t])) begin
        failures++;
        $display("FAIL: delay %0d/10 fine estimate %0d/10", dt[t], lag_fine);
      end
      checks++;
      if (cyc != 1 + (BLOCK + MAXLAG - 1) + MAXLAG * (BLOCK + 1) + 2 * STEPS) begin
        failures++;
        $display("FAIL: search took %0d clocks", cyc);
      end
      @(posedge clk);
      #1;
      checks++;
      if (busy) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
