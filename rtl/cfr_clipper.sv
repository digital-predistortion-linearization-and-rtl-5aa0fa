// cfr_clipper: clipper and peak-pulse generator of the scaled peak
// cancellation crest factor reducer.
//
// With threshold A, the clip gain is c_n = A/|x_n| when |x_n| > A and 1
// otherwise, and the cancellation pulse is p_n = x_n - x_n*c_n (both as in the
// source). This module forms the pulse in one step as
// p_n = x_n * (|x_n| - A) / |x_n|, which is the same quantity without a
// separate gain multiply; below the threshold p_n is 0. The divide is a
// combinational integer divide (truncating towards zero); that and the
// square root of cplx_magnitude are this design's choices.
//
// Interface: x and thresh sampled when ce is high; p and clipped are valid two
// samples later. Timing: latency 2 samples, 1 sample per clock.
module cfr_clipper
  import dpd_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  ce,
  input  cplx_t x,
  input  mag_t  thresh,
  output cplx_t p,
  output logic  clipped
);

  mag_t  mag;
  cplx_t xd;

  cplx_magnitude u_mag (.clk, .rst_n, .ce, .x, .mag, .x_d(xd));

  logic signed [33:0] num_i, num_q, den;
  logic               over;
  cplx_t              p_c;

  always_comb begin
    over  = mag > thresh;
    den   = 34'(mag);
    num_i = 34'(xd.i) * (34'(mag) - 34'(thresh));
    num_q = 34'(xd.q) * (34'(mag) - 34'(thresh));
    p_c   = CPLX_ZERO;
    if (over) begin
      p_c.i = sat16(48'(num_i / den));
      p_c.q = sat16(48'(num_q / den));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p       <= CPLX_ZERO;
      clipped <= 1'b0;
    end else if (ce) begin
      p       <= p_c;
      clipped <= over;
    end
  end

endmodule
