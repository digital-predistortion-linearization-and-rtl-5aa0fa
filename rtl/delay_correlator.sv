// delay_correlator: feedback loop delay estimator by cross-correlation.
//
//   R(d) = sum_{n=0}^{BLOCK-1} r(n) conj(y(n+d)),   d = 0 .. MAXLAG-1
//   lag  = arg max_d |R(d)|
//
// r is the reference (predistorter output, or the input of the RF
// predistorter during its calibration) and y the captured feedback. The
// source estimates the loop delay this way before training and uses the same
// correlation block to measure each path of the RF predistorter. The 1/N
// factor of the source is dropped since it does not move the maximum; block
// length, lag range and the sequential search are this design's choices.
//
// Operation: a start pulse arms capture. From the next ce, BLOCK reference
// samples and BLOCK+MAXLAG-1 feedback samples are stored (both streams share
// ce). Then one complex multiply-accumulate per clock evaluates every lag;
// |R(d)|^2 is formed from the accumulators shifted right by 10 bits. done
// pulses for one clock with lag and peak valid until the next start.
//
// Fine estimate: the source refines the coarse (whole-sample) estimate to a
// fraction of a sample with Lagrange interpolators. Here the complex R(d) of
// every lag is kept, and after the coarse search the cross-correlation is
// interpolated around the peak with the same 3rd-order Lagrange taps as
// lagrange_frac_delay, at 2*STEPS points lag-1, lag-1+1/STEPS, ...,
// lag+1-1/STEPS (points outside 0..MAXLAG-1 are skipped). lag_fine is the
// position of the largest |R|^2 in units of 1/STEPS sample; for an integer
// delay it is STEPS*lag. Interpolating R rather than the captured samples is
// this design's choice: it needs 2*STEPS extra clocks instead of a search
// over STEPS interpolated copies of the feedback block.
//
// Timing: BLOCK+MAXLAG-1 samples of capture, then MAXLAG*(BLOCK+1) clocks of
// coarse search and 2*STEPS clocks of fine search.
module delay_correlator
  import dpd_pkg::*;
#(
  parameter int BLOCK  = 1024,
  parameter int MAXLAG = 64,
  parameter int STEPS  = 10,
  localparam int LW    = $clog2(MAXLAG),
  localparam int FLW   = $clog2(STEPS * MAXLAG)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          ce,
  input  logic          start,
  input  cplx_t         ref_x,
  input  cplx_t         fb_y,
  output logic          busy,
  output logic          done,
  output logic [LW-1:0] lag,
  output logic [63:0]   peak,
  output logic [FLW-1:0] lag_fine
);

  localparam int FBN = BLOCK + MAXLAG - 1;
  localparam int CW  = $clog2(FBN + 1);

  localparam int NT = 4;   // 3rd-order interpolator taps

  typedef enum logic [1:0] {S_IDLE, S_CAPTURE, S_SEARCH, S_FINE} state_t;
  state_t state;

  cplx_t ref_mem [BLOCK];
  cplx_t fb_mem  [FBN];

  logic [CW-1:0]      cnt;
  logic [LW:0]        d;
  logic [CW-1:0]      n;
  logic signed [47:0] acc_i, acc_q;

  // R(d) of every lag, for the fine search
  logic signed [31:0] rmem_i [MAXLAG];
  logic signed [31:0] rmem_q [MAXLAG];

  typedef s16_t tab_t [STEPS*NT];   // entry f*NT + k
  function automatic tab_t make_tab();
    tab_t t;
    for (int f = 0; f < STEPS; f++)
      for (int k = 0; k < NT; k++) t[f*NT+k] = lagrange_tap(STEPS, NT - 1, f, k);
    return t;
  endfunction
  localparam tab_t H = make_tab();

  logic [$clog2(2*STEPS)-1:0] j;        // fine candidate
  logic                       fany;     // a candidate has been kept
  logic [63:0]                fbest;

  // Capture memories: written in S_CAPTURE only.
  always_ff @(posedge clk) begin
    if (state == S_CAPTURE && ce) begin
      if (int'(cnt) < BLOCK) ref_mem[cnt[$clog2(BLOCK)-1:0]] <= ref_x;
      fb_mem[cnt] <= fb_y;
    end
  end

  cplx_t              rs, ys;
  logic signed [47:0] pi, pq;
  logic signed [31:0] ri, rq;
  logic        [63:0] pw;
  always_comb begin
    rs = ref_mem[n[$clog2(BLOCK)-1:0]];
    ys = fb_mem[CW'(n) + CW'(d)];
    // r * conj(y)
    pi = 48'(rs.i) * 48'(ys.i) + 48'(rs.q) * 48'(ys.q);
    pq = 48'(rs.q) * 48'(ys.i) - 48'(rs.i) * 48'(ys.q);
    ri = 32'(acc_i >>> 10);
    rq = 32'(acc_q >>> 10);
    pw = 64'(ri * ri) + 64'(rq * rq);
  end

  // Fine candidate j: position lag - 1 + j/STEPS, interpolated from
  // R(base .. base+3) with base = lag-2 (j < STEPS) or lag-1 (j >= STEPS).
  int                 fsel, base, pos10;
  logic               fvalid;
  logic signed [55:0] fi_acc, fq_acc;
  logic signed [31:0] fi, fq;
  logic        [63:0] fpw;
  always_comb begin
    fsel   = (int'(j) >= STEPS) ? int'(j) - STEPS : int'(j);
    base   = (int'(j) >= STEPS) ? int'(lag) - 1 : int'(lag) - 2;
    pos10  = STEPS * (int'(lag) - 1) + int'(j);
    fvalid = pos10 >= 0 && pos10 <= STEPS * (MAXLAG - 1);
    fi_acc = '0;
    fq_acc = '0;
    for (int k = 0; k < NT; k++) begin
      int a;
      a = base + k;
      if (a < 0) a = 0;
      if (a > MAXLAG - 1) a = MAXLAG - 1;
      fi_acc += 56'(H[fsel*NT+k]) * 56'(rmem_i[a]);
      fq_acc += 56'(H[fsel*NT+k]) * 56'(rmem_q[a]);
    end
    fi  = 32'(fi_acc >>> 14);
    fq  = 32'(fq_acc >>> 14);
    fpw = 64'(fi * fi) + 64'(fq * fq);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < MAXLAG; k++) begin
        rmem_i[k] <= '0;
        rmem_q[k] <= '0;
      end
    end else if (state == S_SEARCH && int'(n) == BLOCK) begin
      rmem_i[d[LW-1:0]] <= ri;
      rmem_q[d[LW-1:0]] <= rq;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cnt   <= '0;
      d     <= '0;
      n     <= '0;
      acc_i <= '0;
      acc_q <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
      lag   <= '0;
      peak  <= '0;
      j     <= '0;
      fany  <= 1'b0;
      fbest <= '0;
      lag_fine <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (start) begin
            state <= S_CAPTURE;
            cnt   <= '0;
            busy  <= 1'b1;
          end
        end
        S_CAPTURE: begin
          if (ce) begin
            cnt <= cnt + 1'b1;
            if (int'(cnt) == FBN - 1) begin
              state <= S_SEARCH;
              d     <= '0;
              n     <= '0;
              acc_i <= '0;
              acc_q <= '0;
              peak  <= '0;
              lag   <= '0;
            end
          end
        end
        S_SEARCH: begin
          if (int'(n) == BLOCK) begin
            // accumulation for lag d finished: compare, move to next lag
            if (pw > peak || d == '0) begin
              peak <= pw;
              lag  <= LW'(d);
            end
            acc_i <= '0;
            acc_q <= '0;
            n     <= '0;
            if (int'(d) == MAXLAG - 1) begin
              state <= S_FINE;
              j     <= '0;
              fany  <= 1'b0;
              fbest <= '0;
            end else begin
              d <= d + 1'b1;
            end
          end else begin
            acc_i <= acc_i + pi;
            acc_q <= acc_q + pq;
            n     <= n + 1'b1;
          end
        end
        S_FINE: begin
          if (fvalid && (!fany || fpw > fbest)) begin
            fany     <= 1'b1;
            fbest    <= fpw;
            lag_fine <= FLW'(pos10);
          end
          if (int'(j) == 2 * STEPS - 1) begin
            state <= S_IDLE;
            busy  <= 1'b0;
            done  <= 1'b1;
          end else begin
            j <= j + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
