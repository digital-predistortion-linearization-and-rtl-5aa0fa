// delay_line: run-time programmable integer delay of a complex sample stream,
// 0..DEPTH samples.
//
// Used for the aligned input x_{n-d} of a peak cancellation stage and for the
// coarse (whole-sample) path matching of the baseband-derived RF predistorter.
// A shift register advanced on ce holds the last DEPTH inputs; the output
// multiplexer picks x(n-del). del = 0 is a combinational pass-through.
//
// Interface: del is quasi-static (change it only while the stream is idle or
// accept DEPTH samples of transient). Timing: 1 sample per clock.
module delay_line
  import dpd_pkg::*;
#(
  parameter int DEPTH = 128,
  localparam int DELW = $clog2(DEPTH + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            ce,
  input  logic [DELW-1:0] del,
  input  cplx_t           x,
  output cplx_t           y
);

  cplx_t sr [DEPTH];   // sr[k] = x(n-1-k)

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < DEPTH; k++) sr[k] <= CPLX_ZERO;
    end else if (ce) begin
      sr[0] <= x;
      for (int k = 1; k < DEPTH; k++) sr[k] <= sr[k-1];
    end
  end

  always_comb begin
    int d;
    d = int'(del);
    if (d == 0)          y = x;
    else if (d > DEPTH)  y = sr[DEPTH-1];
    else                 y = sr[d-1];
  end

endmodule
