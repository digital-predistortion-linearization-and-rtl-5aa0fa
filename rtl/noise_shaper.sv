// noise_shaper: filters the peak-cancellation pulse so that its spectrum lies
// inside the occupied carriers.
//
// For multi-carrier signals the out-of-band products sit between the
// carriers, so one low-pass filter cannot remove them. Following the source,
// each of NC branches (a) translates the pulse down by its carrier frequency,
// (b) low-pass filters it, (c) translates it back, and (d) the branches are
// summed. All branches share one coefficient bank, as the source states. For
// a single carrier at 0 Hz the structure is just the low-pass filter.
//
// Each branch has two oscillators at the same frequency. The up-translation
// one lags the down-translation one by G+2 samples (G = (TAPS-1)/2, the
// filter's group delay, plus 2 pipeline registers), so branch c realises
//   pf_c(n) = sum_k h_k p(n-k) exp(j*omega_c*(k - G))
// a band-pass copy of h centred on carrier c whose centre tap has zero
// phase: a cancellation pulse keeps the phase of the peak it cancels. A
// branch whose enable is low contributes nothing.
//
// Interface: p sampled on ce; pf valid 4 samples later (plus the filter's
// group delay). Timing: 1 sample per clock.
module noise_shaper
  import dpd_pkg::*;
#(
  parameter int NC   = 4,
  parameter int TAPS = 129
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ce,
  input  s16_t        coef  [TAPS],
  input  logic [31:0] fword [NC],
  input  logic [NC-1:0] car_en,
  input  cplx_t       p,
  output cplx_t       pf
);

  localparam int G = (TAPS - 1) / 2;

  cplx_t ph_dn  [NC];
  cplx_t ph_up  [NC];
  cplx_t down_q [NC];
  cplx_t filt   [NC];
  cplx_t up_q   [NC];

  for (genvar c = 0; c < NC; c++) begin : g_car
    logic [31:0] lag_off;
    assign lag_off = 32'(0) - 32'(fword[c] * 32'(G + 2));

    nco u_nco_dn (.clk, .rst_n, .ce, .fword(fword[c]), .phase_off('0), .phasor(ph_dn[c]));
    nco u_nco_up (.clk, .rst_n, .ce, .fword(fword[c]), .phase_off(lag_off), .phasor(ph_up[c]));

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        down_q[c] <= CPLX_ZERO;
        up_q[c]   <= CPLX_ZERO;
      end else if (ce) begin
        down_q[c] <= cmul_q15(p, conj(ph_dn[c]));
        up_q[c]   <= car_en[c] ? cmul_q15(filt[c], ph_up[c]) : CPLX_ZERO;
      end
    end

    fir_complex #(.TAPS(TAPS)) u_fir (.clk, .rst_n, .ce, .coef, .x(down_q[c]), .y(filt[c]));
  end

  logic signed [47:0] sum_i, sum_q;
  always_comb begin
    sum_i = '0;
    sum_q = '0;
    for (int c = 0; c < NC; c++) begin
      sum_i += 48'(up_q[c].i);
      sum_q += 48'(up_q[c].q);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  pf <= CPLX_ZERO;
    else if (ce) pf <= '{i: sat16(sum_i), q: sat16(sum_q)};
  end

endmodule
