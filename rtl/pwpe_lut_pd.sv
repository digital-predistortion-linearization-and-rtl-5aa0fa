// pwpe_lut_pd: piecewise pre-equalized lookup-table digital predistorter.
//
// Pipeline (one sample per clock, advanced by ce):
//   1. |u(n)|                       cplx_magnitude
//   2. m = round(|u(n)| N)           lut_indexer
//   3. F_m read from the gain LUT    coef_ram (reset to 1.0)
//   4. x(n) = u(n) F_m               complex gain adjuster
//   5-6. z(n) = x(n) + sum W_k^m x(n-k)  piecewise_preeq (m of u(n))
// The structure and the addressing follow the source; the number formats,
// the pipeline cut and the host write ports are this design's choices. The
// coefficients are trained off-line (indirect learning) and written by the
// host: lut_* writes F_m, eq_* writes the equalizer taps. bypass passes x(n)
// straight through the equalizer, as required while the LUT is trained.
//
// Outputs: z (to the DACs), x (post-LUT sample) and m, both aligned with z,
// for a trainer that reuses the same addressing; sat flags a clamped index.
// Timing: latency LAT = 6 samples.
module pwpe_lut_pd
  import dpd_pkg::*;
#(
  parameter int N = 256,
  parameter int K = 2,
  localparam int AW = $clog2(N),
  localparam int TW = (K > 2) ? $clog2(K) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          ce,
  input  logic          bypass,
  input  logic          lut_we,
  input  logic [AW-1:0] lut_addr,
  input  coef_t         lut_data,
  input  logic          eq_we,
  input  logic [AW-1:0] eq_addr,
  input  logic [TW-1:0] eq_tap,
  input  coef_t         eq_data,
  input  cplx_t         u,
  output cplx_t         z,
  output cplx_t         x_out,
  output logic [AW-1:0] m_out,
  output logic          sat
);

  mag_t          mag;
  cplx_t         u1, u2, u3;
  logic [AW-1:0] m2, m3, m4, m5, m6;
  logic          sat2;
  coef_t         f3;
  cplx_t         x4, x5, x6;

  cplx_magnitude u_mag (.clk, .rst_n, .ce, .x(u), .mag, .x_d(u1));

  lut_indexer #(.N(N)) u_idx (.clk, .rst_n, .ce, .mag, .m(m2), .sat(sat2));

  coef_ram #(.DEPTH(N)) u_lut (
    .clk, .rst_n, .ce, .we(lut_we), .waddr(lut_addr), .wdata(lut_data),
    .raddr(m2), .rdata(f3)
  );

  piecewise_preeq #(.K(K), .N(N)) u_eq (
    .clk, .rst_n, .ce, .bypass,
    .we(eq_we), .waddr(eq_addr), .wtap(eq_tap), .wdata(eq_data),
    .x(x4), .m(m4), .z
  );

  logic s3, s4, s5, s6;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      u2 <= CPLX_ZERO; u3 <= CPLX_ZERO;
      m3 <= '0; m4 <= '0; m5 <= '0; m6 <= '0;
      x4 <= CPLX_ZERO; x5 <= CPLX_ZERO; x6 <= CPLX_ZERO;
      s3 <= 1'b0; s4 <= 1'b0; s5 <= 1'b0; s6 <= 1'b0;
    end else if (ce) begin
      u2 <= u1;
      u3 <= u2;
      m3 <= m2; m4 <= m3; m5 <= m4; m6 <= m5;
      s3 <= sat2; s4 <= s3; s5 <= s4; s6 <= s5;
      x4 <= cmul_coef(u3, f3);
      x5 <= x4;
      x6 <= x5;
    end
  end

  assign x_out = x6;
  assign m_out = m6;
  assign sat   = s6;

endmodule
