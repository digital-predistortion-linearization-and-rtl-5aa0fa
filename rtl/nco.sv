// nco: numerically controlled oscillator producing the unit phasor
// exp(j*2*pi*phase/2^PHASE_W) for the carrier frequency translations of the
// noise shaper.
//
// A PHASE_W-bit phase accumulator advances by fword every sample; its top
// LUT_AW bits address a full-period sine table. The table is computed at
// elaboration by a 9th-order Taylor series of sin on [0, pi/2] and folded by
// symmetry, scaled to 32767, so no data file is needed. Cosine reads the same
// table a quarter period ahead. The source only asks for a translation by
// omega_n; the oscillator structure is this design's choice.
//
// Interface: phasor is registered and always matches the accumulator plus
// the static offset phase_off: after reset it is exp(j*theta0) and after the
// n-th enabled clock exp(j*(omega*n + theta0)), so a sample entering on the
// n-th enable (counted from 0) sees exp(j*(omega*n + theta0)).
// Timing: 1 sample per clock, output registered. Change phase_off only in
// reset (the reset value of phasor assumes it is constant).
module nco
  import dpd_pkg::*;
#(
  parameter int PHASE_W = 32,
  parameter int LUT_AW  = 10
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               ce,
  input  logic [PHASE_W-1:0] fword,
  input  logic [PHASE_W-1:0] phase_off,
  output cplx_t              phasor
);

  localparam int LUT_N = 1 << LUT_AW;

  typedef s16_t table_t [LUT_N];

  function automatic real sin_q(input real a);  // a in [0, pi/2]
    real a2;
    a2 = a * a;
    return a * (1.0 - a2 / 6.0 * (1.0 - a2 / 20.0 * (1.0 - a2 / 42.0 * (1.0 - a2 / 72.0))));
  endfunction

  function automatic table_t make_table();
    table_t t;
    real    pi, ang, s;
    int     quarter;
    pi = 3.14159265358979;
    quarter = LUT_N / 4;
    for (int k = 0; k < LUT_N; k++) begin
      int kk;
      kk  = k % (LUT_N / 2);
      if (kk > quarter) kk = LUT_N / 2 - kk;
      ang = pi / 2.0 * real'(kk) / real'(quarter);
      s   = sin_q(ang) * 32767.0;
      if (k >= LUT_N / 2) s = -s;
      t[k] = s16_t'($rtoi(s + (s >= 0.0 ? 0.5 : -0.5)));
    end
    return t;
  endfunction

  localparam table_t SIN_TAB = make_table();

  logic [PHASE_W-1:0] acc, acc_nxt, ph_nxt, ph_rst;
  logic [LUT_AW-1:0]  idx, idx_c, idx_r, idx_rc;

  always_comb begin
    acc_nxt = acc + fword;
    ph_nxt  = acc_nxt + phase_off;
    ph_rst  = phase_off;
    idx     = ph_nxt[PHASE_W-1 -: LUT_AW];
    idx_r   = ph_rst[PHASE_W-1 -: LUT_AW];
    idx_rc  = idx_r + LUT_AW'(LUT_N / 4);
    idx_c = idx + LUT_AW'(LUT_N / 4);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc    <= '0;
      phasor <= '{i: SIN_TAB[idx_rc], q: SIN_TAB[idx_r]};
    end else if (ce) begin
      acc    <= acc_nxt;
      phasor <= '{i: SIN_TAB[idx_c], q: SIN_TAB[idx]};
    end
  end

endmodule
