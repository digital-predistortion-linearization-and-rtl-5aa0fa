// srpc_stage: one iteration of scaled peak cancellation (SRPC) crest factor
// reduction.
//
//   p_n  = x_n - x_n * c_n          (cfr_clipper, threshold A)
//   pf_n = noise-shaped p_n         (noise_shaper)
//   z_n  = x_{n-d} - alpha * pf_n
//
// alpha is a per-stage constant supplied by the host: the source derives it
// from the ratio of the largest clipped pulse to the largest filtered pulse,
// which can be found numerically once the threshold is fixed, so it is not
// computed here. alpha = 1.0 gives classic repeated pulse cancellation.
// d = 6 + (TAPS-1)/2 aligns the centre of each filtered pulse (6 samples of
// clipper and shaper pipeline plus the filter's group delay) with the peak it
// came from; the alignment rule is this design's reading of x_{n-d}.
//
// Interface: x sampled on ce, z valid LAT samples later; alpha is Q4.12,
// thresh has the sample scale. clipped marks, 2 samples after the input, that
// the sample exceeded the threshold.
// Timing: LAT = 7 + (TAPS-1)/2 samples, 1 sample per clock.
module srpc_stage
  import dpd_pkg::*;
#(
  parameter int NC   = 4,
  parameter int TAPS = 129
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          ce,
  input  s16_t          coef  [TAPS],
  input  logic [31:0]   fword [NC],
  input  logic [NC-1:0] car_en,
  input  mag_t          thresh,
  input  s16_t          alpha,
  input  cplx_t         x,
  output cplx_t         z,
  output logic          clipped
);

  localparam int D = 6 + (TAPS - 1) / 2;

  cplx_t p, pf, xd;

  cfr_clipper u_clip (.clk, .rst_n, .ce, .x, .thresh, .p, .clipped);

  noise_shaper #(.NC(NC), .TAPS(TAPS)) u_ns (
    .clk, .rst_n, .ce, .coef, .fword, .car_en, .p, .pf
  );

  delay_line #(.DEPTH(D)) u_dly (
    .clk, .rst_n, .ce, .del($clog2(D + 1)'(D)), .x, .y(xd)
  );

  cplx_t scaled;
  always_comb begin
    scaled.i = rnd_sat(48'(alpha) * 48'(pf.i), 12);
    scaled.q = rnd_sat(48'(alpha) * 48'(pf.q), 12);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  z <= CPLX_ZERO;
    else if (ce) z <= csub(xd, scaled);
  end

endmodule
