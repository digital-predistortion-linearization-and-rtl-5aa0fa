// fir_complex: direct-form FIR filter with real coefficients applied to a
// complex sample stream; the low-pass pulse-shaping filter h_n of the peak
// cancellation noise shaper (129 taps in the source).
//
// y(n) = sum_{k=0}^{TAPS-1} h_k x(n-k), h_k in Q1.15, rounded and saturated
// to Q1.15. The tap values are inputs held by the caller (host-written
// registers), because the source specifies the filter only by its length and
// its -77 dBc stop band; one bank can feed many filters. The delay line holds
// x(n-1)..x(n-TAPS+1); the sum of products is combinational into one output
// register.
//
// Interface: x sampled on ce; y valid one sample later.
// Timing: latency 1 sample (plus the filter's group delay (TAPS-1)/2 for a
// symmetric design), 1 sample per clock.
module fir_complex
  import dpd_pkg::*;
#(
  parameter int TAPS = 129
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  ce,
  input  s16_t  coef [TAPS],
  input  cplx_t x,
  output cplx_t y
);

  cplx_t hist [TAPS-1];   // hist[k] = x(n-1-k)
  logic signed [47:0] acc_i, acc_q;

  always_comb begin
    acc_i = 48'(coef[0]) * 48'(x.i);
    acc_q = 48'(coef[0]) * 48'(x.q);
    for (int k = 1; k < TAPS; k++) begin
      acc_i += 48'(coef[k]) * 48'(hist[k-1].i);
      acc_q += 48'(coef[k]) * 48'(hist[k-1].q);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < TAPS - 1; k++) hist[k] <= CPLX_ZERO;
      y <= CPLX_ZERO;
    end else if (ce) begin
      hist[0] <= x;
      for (int k = 1; k < TAPS - 1; k++) hist[k] <= hist[k-1];
      y <= '{i: rnd_sat(acc_i, 15), q: rnd_sat(acc_q, 15)};
    end
  end

endmodule
