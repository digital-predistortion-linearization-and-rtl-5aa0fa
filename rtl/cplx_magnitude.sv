// cplx_magnitude: instantaneous envelope |x| = floor(sqrt(I^2 + Q^2)) of a
// complex Q1.15 sample.
//
// The envelope addresses the predistortion lookup tables and drives the
// crest-factor clipper. The source leaves the square-root circuit open; here a
// 16-step restoring integer square root is unrolled in combinational logic and
// registered once. The result has the sample scale (32768 = 1.0) and reaches
// at most 46341 (|I| = |Q| = 32768), so 16 unsigned bits suffice.
//
// Interface: x is taken when ce is high; one sample later (one ce) mag holds
// |x| and x_d holds the same x, so callers keep the two aligned.
// Timing: latency 1 sample, throughput 1 sample per clock.
module cplx_magnitude
  import dpd_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  ce,
  input  cplx_t x,
  output mag_t  mag,
  output cplx_t x_d
);

  function automatic mag_t isqrt32(input logic [31:0] v);
    logic [31:0] rem;
    logic [31:0] root;
    logic [31:0] trial;
    rem  = v;
    root = '0;
    for (int b = 15; b >= 0; b--) begin
      trial = (root << (b + 1)) + (32'd1 << (2 * b));
      if (rem >= trial) begin
        rem  = rem - trial;
        root = root | (32'd1 << b);
      end
    end
    return mag_t'(root);
  endfunction

  logic [31:0] pwr;
  always_comb pwr = 32'(32'(signed'(x.i) * signed'(x.i))) + 32'(signed'(x.q) * signed'(x.q));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mag <= '0;
      x_d <= CPLX_ZERO;
    end else if (ce) begin
      mag <= isqrt32(pwr);
      x_d <= x;
    end
  end

endmodule
