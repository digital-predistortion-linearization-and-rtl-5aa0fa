// lagrange_frac_delay: fractional delay of a complex stream in steps of
// 1/STEPS sample, by a Lagrange interpolating FIR.
//
// The source refines the whole-sample path matching of the RF predistorter
// tenfold with Lagrange interpolators (26 ns samples matched in 2.6 ns
// steps). Here an ORDER-th order interpolator (ORDER+1 taps) realises the
// total delay D = (ORDER-1)/2 + f/STEPS samples, which keeps the fractional
// point in the centre interval of the taps where Lagrange interpolation is
// most accurate. Tap k for step f is
//   h_k(f) = prod_{i != k} (D - i) / (k - i)
// evaluated exactly in integers at elaboration (dpd_pkg::lagrange_tap) and
// rounded to Q2.14. The order is this design's choice.
//
// Interface: x sampled on ce, frac = f (0..STEPS-1) selects the tap set; y is
// registered. Timing: y(n) = x(n - 1 - D) (one output register plus D).
module lagrange_frac_delay
  import dpd_pkg::*;
#(
  parameter int STEPS = 10,
  parameter int ORDER = 3,
  localparam int NT   = ORDER + 1,
  localparam int FW   = $clog2(STEPS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          ce,
  input  logic [FW-1:0] frac,
  input  cplx_t         x,
  output cplx_t         y
);

  typedef s16_t tab_t [STEPS*NT];   // entry f*NT + k

  function automatic tab_t make_tab();
    tab_t t;
    for (int f = 0; f < STEPS; f++)
      for (int k = 0; k < NT; k++) t[f*NT+k] = lagrange_tap(STEPS, ORDER, f, k);
    return t;
  endfunction

  localparam tab_t H = make_tab();

  cplx_t hist [NT-1];   // hist[k] = x(n-1-k)

  // Out-of-range steps use the largest valid step.
  int                 fsel;
  logic signed [47:0] acc_i, acc_q;
  always_comb begin
    fsel  = (int'(frac) >= STEPS) ? STEPS - 1 : int'(frac);
    acc_i = 48'(H[fsel*NT]) * 48'(x.i);
    acc_q = 48'(H[fsel*NT]) * 48'(x.q);
    for (int k = 1; k < NT; k++) begin
      acc_i += 48'(H[fsel*NT+k]) * 48'(hist[k-1].i);
      acc_q += 48'(H[fsel*NT+k]) * 48'(hist[k-1].q);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NT - 1; k++) hist[k] <= CPLX_ZERO;
      y <= CPLX_ZERO;
    end else if (ce) begin
      hist[0] <= x;
      for (int k = 1; k < NT - 1; k++) hist[k] <= hist[k-1];
      y <= '{i: rnd_sat(acc_i, 14), q: rnd_sat(acc_q, 14)};
    end
  end

endmodule
