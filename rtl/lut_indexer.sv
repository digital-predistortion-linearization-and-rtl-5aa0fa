// lut_indexer: linear magnitude addressing of the predistortion tables,
// m = round(|u| * N), with |u| = 1.0 (32768) as full scale.
//
// Uniform magnitude quantisation is the addressing the source uses. Inputs
// that would round to N or beyond (|u| >= (N-0.5)/N, possible because the
// envelope of a Q1.15 I/Q pair can reach sqrt(2)) are clamped to N-1; the
// clamp and the sat flag are this design's additions.
//
// Interface: mag sampled on ce; m and sat valid one sample later.
// Timing: latency 1 sample, 1 sample per clock. N must be a power of two.
module lut_indexer
  import dpd_pkg::*;
#(
  parameter int N = 256,
  localparam int AW = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          ce,
  input  mag_t          mag,
  output logic [AW-1:0] m,
  output logic          sat
);

  logic [31:0] prod, idx;
  always_comb begin
    prod = 32'(mag) * 32'(N);
    idx  = (prod + 32'd16384) >> 15;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m   <= '0;
      sat <= 1'b0;
    end else if (ce) begin
      sat <= idx > 32'(N - 1);
      m   <= (idx > 32'(N - 1)) ? AW'(N - 1) : idx[AW-1:0];
    end
  end

endmodule
