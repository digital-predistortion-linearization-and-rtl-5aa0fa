// bbrf_pd: digital baseband-derived RF predistorter.
//
// Instead of predistorting the baseband signal itself (which needs a
// converter chain several times wider than the signal), this architecture
// keeps the main transmit path at the signal bandwidth and applies the
// predistortion function F at RF through a vector modulator. F is derived at
// baseband: the instantaneous magnitude of the input indexes a complex gain
// table, and the table word goes to two low-resolution DACs (COEF_DAC_W bits)
// that drive the vector modulator's I/Q gain inputs. The input itself goes,
// unchanged, to the main DAC (MAIN_DAC_W bits) and up-converter.
//
// The two paths must meet at the vector modulator with matching delay. Each
// path has a whole-sample programmable delay (delay_line), and the main path
// adds a Lagrange fractional delay in 1/10-sample steps, so the host can set
// the relative delay measured by the correlator with 0.1-sample resolution,
// in either direction. Structure, the 1/10 step and the 14-bit / 8-bit DAC
// widths follow the source; the table size (N, from the baseband
// predistorter) and the placement of the programmable delays are this
// design's choices.
//
// Interface: u sampled on ce; lut_* writes F_m (Q2.14, reset to 1.0).
// main_dac = u delayed by main_coarse + 2 + 1.frac samples
// (delay_line, 1 + frac/10 interpolation, interpolator and output registers);
// coef_dac = F(|u|) delayed by coef_coarse + 4 samples. Both outputs are
// rounded and saturated two's complement. Timing: 1 sample per clock.
module bbrf_pd
  import dpd_pkg::*;
#(
  parameter int N          = 256,
  parameter int MAX_COARSE = 32,
  parameter int MAIN_DAC_W = 14,
  parameter int COEF_DAC_W = 8,
  localparam int AW  = $clog2(N),
  localparam int DLW = $clog2(MAX_COARSE + 1)
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         ce,
  input  logic                         lut_we,
  input  logic [AW-1:0]                lut_addr,
  input  coef_t                        lut_data,
  input  logic [DLW-1:0]               main_coarse,
  input  logic [3:0]                   main_frac,
  input  logic [DLW-1:0]               coef_coarse,
  input  cplx_t                        u,
  output logic signed [MAIN_DAC_W-1:0] main_dac_i,
  output logic signed [MAIN_DAC_W-1:0] main_dac_q,
  output logic signed [COEF_DAC_W-1:0] coef_dac_i,
  output logic signed [COEF_DAC_W-1:0] coef_dac_q
);

  // ---------------- main path ----------------
  cplx_t u_dly, u_frac;

  delay_line #(.DEPTH(MAX_COARSE)) u_main_dly (
    .clk, .rst_n, .ce, .del(main_coarse), .x(u), .y(u_dly)
  );

  lagrange_frac_delay #(.STEPS(10), .ORDER(3)) u_frac_dly (
    .clk, .rst_n, .ce, .frac(main_frac), .x(u_dly), .y(u_frac)
  );

  // ---------------- predistortion function path ----------------
  mag_t          mag;
  cplx_t         u1_unused;
  logic [AW-1:0] m;
  logic          sat_unused;
  coef_t         f, f_dly;

  cplx_magnitude u_mag (.clk, .rst_n, .ce, .x(u), .mag, .x_d(u1_unused));
  lut_indexer #(.N(N)) u_idx (.clk, .rst_n, .ce, .mag, .m, .sat(sat_unused));
  coef_ram #(.DEPTH(N)) u_lut (
    .clk, .rst_n, .ce, .we(lut_we), .waddr(lut_addr), .wdata(lut_data),
    .raddr(m), .rdata(f)
  );
  delay_line #(.DEPTH(MAX_COARSE)) u_coef_dly (
    .clk, .rst_n, .ce, .del(coef_coarse), .x(f), .y(f_dly)
  );

  // ---------------- converter outputs ----------------
  s16_t mi, mq, ci, cq;
  always_comb begin
    mi = round_to(u_frac.i, MAIN_DAC_W);
    mq = round_to(u_frac.q, MAIN_DAC_W);
    ci = round_to(f_dly.i, COEF_DAC_W);
    cq = round_to(f_dly.q, COEF_DAC_W);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      main_dac_i <= '0;
      main_dac_q <= '0;
      coef_dac_i <= '0;
      coef_dac_q <= '0;
    end else if (ce) begin
      main_dac_i <= mi[MAIN_DAC_W-1:0];
      main_dac_q <= mq[MAIN_DAC_W-1:0];
      coef_dac_i <= ci[COEF_DAC_W-1:0];
      coef_dac_q <= cq[COEF_DAC_W-1:0];
    end
  end

endmodule
