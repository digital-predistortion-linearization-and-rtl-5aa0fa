// piecewise_preeq: piecewise pre-equalizer of the predistorter.
//
//   z(n) = x(n) + sum_{k=1}^{K-1} W_k^m x(n-k)
//
// x(n) = u(n) F_m(|u(n)|) is the output of the complex-gain LUT stage and m is
// the magnitude index of the *current* input u(n), so the FIR taps change
// with the signal envelope: N short FIR filters, one per magnitude piece,
// give the amplitude-dependent (hysteresis-like) response that compensates PA
// memory effects. As in the source the first tap W_0 is fixed at 1, so only
// N x (K-1) complex taps are stored (one coef_ram per tap, reset to 0).
// bypass forces z(n) = x(n), which the source requires while the gain table
// is being trained.
//
// Interface: x and m sampled on ce; z valid 2 samples later (registered tap
// read, then the filter). Tap writes: we, waddr = piece index m,
// wtap = k (1..K-1), wdata Q2.14.
// Timing: latency 2 samples, 1 sample per clock.
module piecewise_preeq
  import dpd_pkg::*;
#(
  parameter int K = 2,
  parameter int N = 256,
  localparam int AW = $clog2(N),
  localparam int TW = (K > 2) ? $clog2(K) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          ce,
  input  logic          bypass,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [TW-1:0] wtap,
  input  coef_t         wdata,
  input  cplx_t         x,
  input  logic [AW-1:0] m,
  output cplx_t         z
);

  coef_t w    [K];      // w[k] = W_k^m for the aligned sample; w[0] unused
  cplx_t hist [K];      // hist[0] = x(n) aligned with w, hist[k] = x(n-k)

  assign w[0] = COEF_ONE;

  for (genvar k = 1; k < K; k++) begin : g_tap
    coef_ram #(.DEPTH(N), .INIT('{i: 16'sd0, q: 16'sd0})) u_ram (
      .clk, .rst_n, .ce,
      .we(we && (int'(wtap) == k)), .waddr, .wdata,
      .raddr(m), .rdata(w[k])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < K; k++) hist[k] <= CPLX_ZERO;
    end else if (ce) begin
      hist[0] <= x;
      for (int k = 1; k < K; k++) hist[k] <= hist[k-1];
    end
  end

  cplx_t acc;
  always_comb begin
    acc = hist[0];
    for (int k = 1; k < K; k++) acc = cadd(acc, cmul_coef(hist[k], w[k]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  z <= CPLX_ZERO;
    else if (ce) z <= bypass ? hist[0] : acc;
  end

endmodule
