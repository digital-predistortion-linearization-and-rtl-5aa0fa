// dpd_cfr_top: linearised wideband transmitter datapath.
//
//   sample_playback -> srpc_cfr -> pwpe_lut_pd -> main DACs (dac_i/dac_q)
//                                      |
//   feedback ADCs (adc_i/adc_q) -> delay_correlator (loop delay)
//
// A stored multi-carrier baseband signal is replayed, its peak-to-average
// ratio is reduced by scaled repeated peak cancellation, and it is
// predistorted by the piecewise pre-equalized LUT predistorter before the
// 14-bit converters. The feedback path (12-bit converters after the PA
// down-converter) feeds the correlator that measures the loop delay, in
// whole samples and in tenths of a sample, which the off-line coefficient
// training needs. Beside this chain sits the
// baseband-derived RF predistorter (rf_* ports), an alternative
// architecture that drives a main DAC plus two coefficient DACs for an RF
// vector modulator; corr_sel = 1 points the correlator at its input so the
// same block calibrates its path delays.
//
// Everything analog (converters, modulators, PA, analyser) and the
// coefficient training, which runs on a host, are outside: their signals are
// ports. The main datapath advances one sample per clock while the playback
// runs (play_valid is the sample enable of every stage); rf_ce does the same
// for the RF predistorter.
//
// Latency from a played sample to dac_i/dac_q: STAGES*(7+(TAPS-1)/2) + 6 + 1
// samples (SRPC stages, predistorter, converter register).
module dpd_cfr_top
  import dpd_pkg::*;
#(
  parameter int STAGES      = 3,
  parameter int NC          = 4,
  parameter int TAPS        = 129,
  parameter int N           = 256,
  parameter int K           = 2,
  parameter int PLAY_DEPTH  = 8192,
  parameter int CORR_BLOCK  = 1024,
  parameter int CORR_MAXLAG = 64,
  parameter int MAX_COARSE  = 32,
  localparam int PAW = $clog2(PLAY_DEPTH),
  localparam int CAW = $clog2(TAPS),
  localparam int AW  = $clog2(N),
  localparam int TW  = (K > 2) ? $clog2(K) : 1,
  localparam int LW  = $clog2(CORR_MAXLAG),
  localparam int FLW = $clog2(10 * CORR_MAXLAG),
  localparam int DLW = $clog2(MAX_COARSE + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // playback memory
  input  logic                 play_we,
  input  logic [PAW-1:0]       play_waddr,
  input  cplx_t                play_wdata,
  input  logic                 play_run,
  input  logic [PAW:0]         play_len,
  // crest factor reduction settings
  input  logic                 cfr_coef_we,
  input  logic [CAW-1:0]       cfr_coef_addr,
  input  s16_t                 cfr_coef_data,
  input  logic [31:0]          cfr_fword  [NC],
  input  logic [NC-1:0]        cfr_car_en,
  input  mag_t                 cfr_thresh [STAGES],
  input  s16_t                 cfr_alpha  [STAGES],
  output logic [STAGES-1:0]    cfr_clipped,
  // predistorter coefficients
  input  logic                 pd_bypass,
  input  logic                 pd_lut_we,
  input  logic [AW-1:0]        pd_lut_addr,
  input  coef_t                pd_lut_data,
  input  logic                 pd_eq_we,
  input  logic [AW-1:0]        pd_eq_addr,
  input  logic [TW-1:0]        pd_eq_tap,
  input  coef_t                pd_eq_data,
  output logic                 pd_sat,
  // main DACs and feedback ADCs
  output logic signed [13:0]   dac_i,
  output logic signed [13:0]   dac_q,
  output logic                 dac_valid,
  input  logic signed [11:0]   adc_i,
  input  logic signed [11:0]   adc_q,
  // delay correlator
  input  logic                 corr_start,
  input  logic                 corr_sel,
  output logic                 corr_busy,
  output logic                 corr_done,
  output logic [LW-1:0]        corr_lag,
  output logic [63:0]          corr_peak,
  output logic [FLW-1:0]       corr_lag_fine,
  // baseband-derived RF predistorter
  input  logic                 rf_ce,
  input  cplx_t                rf_u,
  input  logic                 rf_lut_we,
  input  logic [AW-1:0]        rf_lut_addr,
  input  coef_t                rf_lut_data,
  input  logic [DLW-1:0]       rf_main_coarse,
  input  logic [3:0]           rf_main_frac,
  input  logic [DLW-1:0]       rf_coef_coarse,
  output logic signed [13:0]   rf_main_dac_i,
  output logic signed [13:0]   rf_main_dac_q,
  output logic signed [7:0]    rf_coef_dac_i,
  output logic signed [7:0]    rf_coef_dac_q
);

  // ---------------- noise shaper coefficient bank (host written) ----------
  s16_t cfr_coef [TAPS];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < TAPS; k++) cfr_coef[k] <= '0;
    end else if (cfr_coef_we && int'(cfr_coef_addr) < TAPS) begin
      cfr_coef[cfr_coef_addr] <= cfr_coef_data;
    end
  end

  // ---------------- main chain ----------------
  cplx_t play_x, cfr_z, pd_z, pd_x_unused;
  logic  play_valid, play_wrap_unused;
  logic [AW-1:0] pd_m_unused;

  sample_playback #(.DEPTH(PLAY_DEPTH)) u_play (
    .clk, .rst_n, .we(play_we), .waddr(play_waddr), .wdata(play_wdata),
    .run(play_run), .len(play_len), .x(play_x), .out_valid(play_valid),
    .wrap(play_wrap_unused)
  );

  srpc_cfr #(.STAGES(STAGES), .NC(NC), .TAPS(TAPS)) u_cfr (
    .clk, .rst_n, .ce(play_valid), .coef(cfr_coef), .fword(cfr_fword),
    .car_en(cfr_car_en), .thresh(cfr_thresh), .alpha(cfr_alpha),
    .x(play_x), .z(cfr_z), .clipped(cfr_clipped)
  );

  pwpe_lut_pd #(.N(N), .K(K)) u_pd (
    .clk, .rst_n, .ce(play_valid), .bypass(pd_bypass),
    .lut_we(pd_lut_we), .lut_addr(pd_lut_addr), .lut_data(pd_lut_data),
    .eq_we(pd_eq_we), .eq_addr(pd_eq_addr), .eq_tap(pd_eq_tap), .eq_data(pd_eq_data),
    .u(cfr_z), .z(pd_z), .x_out(pd_x_unused), .m_out(pd_m_unused), .sat(pd_sat)
  );

  s16_t di, dq;
  always_comb begin
    di = round_to(pd_z.i, 14);
    dq = round_to(pd_z.q, 14);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dac_i     <= '0;
      dac_q     <= '0;
      dac_valid <= 1'b0;
    end else begin
      dac_valid <= play_valid;
      if (play_valid) begin
        dac_i <= di[13:0];
        dac_q <= dq[13:0];
      end
    end
  end

  // ---------------- delay correlator ----------------
  cplx_t corr_ref, corr_fb;
  always_comb begin
    corr_ref = corr_sel ? rf_u : pd_z;
    corr_fb  = '{i: s16_t'({adc_i, 4'b0}), q: s16_t'({adc_q, 4'b0})};
  end

  delay_correlator #(.BLOCK(CORR_BLOCK), .MAXLAG(CORR_MAXLAG), .STEPS(10)) u_corr (
    .clk, .rst_n, .ce(corr_sel ? rf_ce : play_valid), .start(corr_start),
    .ref_x(corr_ref), .fb_y(corr_fb),
    .busy(corr_busy), .done(corr_done), .lag(corr_lag), .peak(corr_peak),
    .lag_fine(corr_lag_fine)
  );

  // ---------------- baseband-derived RF predistorter ----------------
  bbrf_pd #(.N(N), .MAX_COARSE(MAX_COARSE), .MAIN_DAC_W(14), .COEF_DAC_W(8)) u_rf (
    .clk, .rst_n, .ce(rf_ce),
    .lut_we(rf_lut_we), .lut_addr(rf_lut_addr), .lut_data(rf_lut_data),
    .main_coarse(rf_main_coarse), .main_frac(rf_main_frac), .coef_coarse(rf_coef_coarse),
    .u(rf_u),
    .main_dac_i(rf_main_dac_i), .main_dac_q(rf_main_dac_q),
    .coef_dac_i(rf_coef_dac_i), .coef_dac_q(rf_coef_dac_q)
  );

endmodule
