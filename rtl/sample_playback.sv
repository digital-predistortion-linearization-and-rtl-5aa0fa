// sample_playback: transmit sample memory of the predistortion test bed.
//
// The host loads a baseband test signal (for example a WCDMA frame) into a
// DEPTH-word memory; while run is high the first len words are played out
// cyclically, one per clock, as the stream that drives the crest factor
// reducer and predistorter. This mirrors the test bed of the source, where
// the samples are stored in the FPGA memory and replayed; depth, the loop
// length register and the handshake are this design's choices.
//
// Interface: host writes we/waddr/wdata at any time. out_valid marks each
// played sample; wrap pulses with the last sample of every pass (len-1).
// Timing: registered read, the first sample appears one clock after run
// rises.
module sample_playback
  import dpd_pkg::*;
#(
  parameter int DEPTH = 8192,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  cplx_t         wdata,
  input  logic          run,
  input  logic [AW:0]   len,
  output cplx_t         x,
  output logic          out_valid,
  output logic          wrap
);

  cplx_t         mem [DEPTH];
  logic [AW-1:0] rd;

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd        <= '0;
      x         <= CPLX_ZERO;
      out_valid <= 1'b0;
      wrap      <= 1'b0;
    end else begin
      out_valid <= run;
      wrap      <= 1'b0;
      if (run) begin
        x <= mem[rd];
        if ({1'b0, rd} >= len - 1'b1) begin
          rd   <= '0;
          wrap <= 1'b1;
        end else begin
          rd <= rd + 1'b1;
        end
      end else begin
        rd <= '0;
      end
    end
  end

endmodule
