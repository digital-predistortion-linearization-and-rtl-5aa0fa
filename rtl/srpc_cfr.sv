// srpc_cfr: scaled repeated peak cancellation crest factor reducer, a cascade
// of STAGES srpc_stage iterations (three by default, the count at which the
// source reports its best PAPR/EVM result).
//
// z^(i) = z^(i-1) - alpha^(i) * pf^(i). Every stage clips against its own
// threshold and scales by its own alpha, so the peaks that re-grow after
// filtering in one stage are cancelled by the next. All stages share the
// filter coefficients and carrier frequencies (same noise shaper design).
//
// Interface: x sampled on ce; z valid STAGES*LAT samples later where
// LAT = 7 + (TAPS-1)/2. clipped[i] is stage i's clip flag.
// Timing: 1 sample per clock.
module srpc_cfr
  import dpd_pkg::*;
#(
  parameter int STAGES = 3,
  parameter int NC     = 4,
  parameter int TAPS   = 129
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ce,
  input  s16_t              coef   [TAPS],
  input  logic [31:0]       fword  [NC],
  input  logic [NC-1:0]     car_en,
  input  mag_t              thresh [STAGES],
  input  s16_t              alpha  [STAGES],
  input  cplx_t             x,
  output cplx_t             z,
  output logic [STAGES-1:0] clipped
);

  cplx_t chain [STAGES+1];
  assign chain[0] = x;

  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    srpc_stage #(.NC(NC), .TAPS(TAPS)) u_stage (
      .clk, .rst_n, .ce, .coef, .fword, .car_en,
      .thresh(thresh[s]), .alpha(alpha[s]),
      .x(chain[s]), .z(chain[s+1]), .clipped(clipped[s])
    );
  end

  assign z = chain[STAGES];

endmodule
